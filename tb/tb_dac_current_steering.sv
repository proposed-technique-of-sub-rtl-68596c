// tb_dac_current_steering: self-checking test of the DAC behavioural model.
//
// Every 8-bit code is applied as 15 thermometer lines plus 4 binary lines with
// their complements. The output current must be 16 unit currents per active
// thermometer line plus the binary weights 8, 4, 2, 1, that is the code value
// itself, and the output voltage must equal current * I_UNIT * R_OUT. The
// output must not change before the settling delay and must have settled
// after it. Codes with a single active binary leg check each binary weight.
module tb_dac_current_steering;
  localparam real IU = 10.0e-9;
  localparam real RO = 100.0e3;
  localparam int  ST = 3;

  logic [14:0] t;
  logic [3:0]  b;
  logic [8:0]  i_units, prev_i;
  real         v_out;
  int checks = 0, failures = 0;

  dac_current_steering #(.I_UNIT(IU), .R_OUT(RO), .SETTLE(ST)) dut (
    .t, .t_b(~t), .b, .b_b(~b), .i_units, .v_out
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int code);
    int n;
    real vexp;
    n = code >> 4;
    prev_i = i_units;
    t = 15'((1 << n) - 1);
    b = 4'(code);
    #1;
    checks++;
    if (i_units !== prev_i) begin failures++; $display("output moved before settling time"); end
    #(ST);
    checks++;
    if (int'(i_units) != code) begin failures++; $display("code %0d: %0d unit currents", code, i_units); end
    vexp = real'(code) * IU * RO;
    checks++;
    if (v_out < vexp - 1.0e-9 || v_out > vexp + 1.0e-9) begin
      failures++;
      $display("code %0d: v_out %f expected %f", code, v_out, vexp);
    end
  endtask

  initial begin
    t = '0; b = '0;
    #10;
    // Alternate with 0 so every step changes the output.
    for (int c = 1; c < 256; c++) begin
      apply(c);
      apply(0);
    end
    apply(1); apply(2); apply(4); apply(8); apply(16); apply(255);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
