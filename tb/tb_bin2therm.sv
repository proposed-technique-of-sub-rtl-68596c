// tb_bin2therm: self-checking test of the binary to thermometer converter.
//
// After reset the code must be the mid-scale word. Then every 8-bit sample is
// applied after a falling edge and the code is read after the next falling
// edge (one cycle of latency): therm[i] must equal (amp[7:4] > i), bin must
// equal amp[3:0], and the code must not change prev_val that edge. The PLA
// network's completion output must be high while clk is high and low while
// it is low.
module tb_bin2therm;
  import bfsk_pkg::*;

  logic             clk = 1'b1;
  logic             rst_n = 1'b0;
  logic [AMP_W-1:0] amp = '0;
  dac_code_t        code, exp_code, prev_val;
  logic             net_clk_out;
  int checks = 0, failures = 0;
  int evals = 0;

  bin2therm dut (.clk, .rst_n, .amp, .code, .net_clk_out);

  always #5 clk = ~clk;

  function automatic dac_code_t ref_code(input logic [AMP_W-1:0] a);
    dac_code_t c;
    for (int i = 0; i < THERM_W; i++) c.therm[i] = (int'(a[AMP_W-1 -: THERM_BITS]) > i);
    c.bin = a[BIN_BITS-1:0];
    return c;
  endfunction

  always @(posedge net_clk_out) evals++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12;
    checks++;
    if (code !== '{therm: 15'h00FF, bin: 4'h0}) begin
      failures++;
      $display("reset code %h", code);
    end
    @(negedge clk) rst_n = 1'b1;
    for (int v = 0; v < 256; v++) begin
      @(negedge clk);
      #1 amp = AMP_W'(v);
      prev_val = code;
      @(posedge clk);
      #1;
      checks++;
      if (net_clk_out !== 1'b1) begin failures++; $display("net_clk_out low in evaluate"); end
      checks++;
      if (code !== prev_val) begin failures++; $display("code changed before the falling edge"); end
      @(negedge clk);
      #1;
      checks++;
      if (net_clk_out !== 1'b0) begin failures++; $display("net_clk_out high in precharge"); end
      exp_code = ref_code(AMP_W'(v));
      checks++;
      if (code !== exp_code) begin
        failures++;
        $display("amp=%h code=%h/%h expected %h/%h", v, code.therm, code.bin, exp_code.therm, exp_code.bin);
      end
    end
    checks++;
    if (evals < 256) begin failures++; $display("only %0d network evaluations", evals); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
