// tb_phase_accumulator: self-checking test of the BFSK phase accumulator.
//
// A reference phase is advanced here by 2048 for a 0 and 4096 for a 1 at every
// falling edge, with random data bits, and compared after each edge. The test
// also checks reset to 0, that the phase holds between falling edges, that
// the accumulator wraps around, and that a constant bit gives the expected
// period (2**16/2048 = 32 clocks for a 0, 16 for a 1). The CLKOUT of the
// last PLA of the adder network must be high while clk is high (evaluation
// complete) and low while clk is low (precharge).
module tb_phase_accumulator;
  localparam int unsigned W = 16;
  logic         clk = 1'b1;
  logic         rst_n = 1'b0;
  logic         data_in = 1'b0;
  logic [W-1:0] phase, ref_phase, prev_val;
  logic         acc_clk_out;
  int checks = 0, failures = 0;
  int wraps = 0;

  phase_accumulator #(.ACC_W(W), .FCW0(16'd2048), .FCW1(16'd4096)) dut (.clk, .rst_n, .data_in, .phase, .acc_clk_out);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Called just after a falling edge: one step per clock.
  task automatic step(input logic d);
    data_in = d;
    prev_val = phase;
    @(posedge clk);
    #1;
    checks++;
    if (phase !== prev_val) begin failures++; $display("phase moved before the falling edge"); end
    checks++;
    if (acc_clk_out !== 1'b1) begin failures++; $display("PLA network did not complete while clk high"); end
    @(negedge clk);
    #1;
    checks++;
    if (acc_clk_out !== 1'b0) begin failures++; $display("PLA network not precharging while clk low"); end
    if (ref_phase > ref_phase + (d ? W'(4096) : W'(2048))) wraps++;
    ref_phase = ref_phase + (d ? W'(4096) : W'(2048));
    checks++;
    if (phase !== ref_phase) begin
      failures++;
      $display("d=%b phase=%h expected %h", d, phase, ref_phase);
    end
  endtask

  initial begin
    int start;
    #12;
    checks++;
    if (phase !== '0) begin failures++; $display("reset phase %h", phase); end
    // Release reset just after a falling edge, hold data at 0 for the next edge.
    @(negedge clk);
    #1 rst_n = 1'b1;
    ref_phase = '0;
    for (int i = 0; i < 300; i++) step(1'($urandom));
    // Period check: 32 steps of a 0 and 16 steps of a 1 return to the start.
    start = int'(ref_phase);
    for (int i = 0; i < 32; i++) step(1'b0);
    checks++;
    if (int'(phase) != start) begin failures++; $display("data 0 period wrong"); end
    for (int i = 0; i < 16; i++) step(1'b1);
    checks++;
    if (int'(phase) != start) begin failures++; $display("data 1 period wrong"); end
    checks++;
    if (wraps < 5) begin failures++; $display("too few wrap-arounds: %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
