// tb_nco_sine_rom: self-checking test of the NCO sine table.
//
// After reset the sample must be mid-scale (128). Each of the 256 phases is
// applied and the registered sample, read one falling edge later, is compared
// with round(127.5 * (1 + sin(2*pi*p/256))) computed here. Four landmark
// points (0, 90, 180 and 270 degrees) are checked against fixed numbers, and
// the output must not change prev_val the falling edge.
module tb_nco_sine_rom;
  logic       clk = 1'b1;
  logic       rst_n = 1'b0;
  logic [7:0] phase_in = '0;
  logic [7:0] amp, prev_val;
  int checks = 0, failures = 0;
  int expv;

  nco_sine_rom #(.PHASE_W(8), .AMP_W(8)) dut (.clk, .rst_n, .phase_in, .amp);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int p, output logic [7:0] got);
    @(negedge clk);
    #1 phase_in = 8'(p);
    prev_val = amp;
    @(posedge clk);
    #1;
    checks++;
    if (amp !== prev_val) begin failures++; $display("sample changed before the falling edge"); end
    @(negedge clk);
    #1 got = amp;
  endtask

  initial begin
    logic [7:0] got;
    #12;
    checks++;
    if (amp !== 8'd128) begin failures++; $display("reset sample %0d", amp); end
    @(negedge clk) rst_n = 1'b1;
    for (int p = 0; p < 256; p++) begin
      apply(p, got);
      expv = int'($floor(127.5 + 127.5 * $sin(2.0 * 3.141592653589793 * p / 256.0) + 0.5));
      checks++;
      if (int'(got) != expv) begin
        failures++;
        $display("phase %0d: sample %0d expected %0d", p, got, expv);
      end
    end
    apply(0, got);   checks++; if (got !== 8'd128) begin failures++; $display("0 deg: %0d", got); end
    apply(64, got);  checks++; if (got !== 8'd255) begin failures++; $display("90 deg: %0d", got); end
    apply(128, got); checks++; if (got !== 8'd128) begin failures++; $display("180 deg: %0d", got); end
    apply(192, got); checks++; if (got !== 8'd0)   begin failures++; $display("270 deg: %0d", got); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
