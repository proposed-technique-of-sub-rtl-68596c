// tb_bfsk_modulator: self-checking test of the digital BFSK modulator.
//
// A cycle-accurate reference of the three-stage pipeline (phase register,
// sine sample register, DAC word register, all on the falling clock edge) is
// kept here, with the sine written as a real-valued formula and the
// thermometer code as a count. Random data bits, held for a random 1 to 40
// clocks each, drive both; the sample and the DAC word are compared after
// every falling edge, which also checks the two-cycle latency. The test then
// holds each bit for 128 clocks and counts rising mid-scale crossings of the
// sample: 4 for a 0 (f_clk/32) and 8 for a 1 (f_clk/16).
module tb_bfsk_modulator;
  import bfsk_pkg::*;

  logic             clk = 1'b1;
  logic             rst_n = 1'b0;
  logic             data_in = 1'b0;
  logic [AMP_W-1:0] amp;
  dac_code_t        dac_code;
  logic             acc_clk_out, net_clk_out;
  int checks = 0, failures = 0;

  bfsk_modulator dut (.clk, .rst_n, .data_in, .amp, .dac_code, .acc_clk_out, .net_clk_out);

  always #5 clk = ~clk;

  // Reference pipeline.
  logic [15:0] r_phase;
  int          r_amp, r_units;

  function automatic int sine_of(input logic [15:0] ph);
    return int'($floor(127.5 + 127.5 * $sin(2.0 * 3.141592653589793 * real'(ph[15:8]) / 256.0) + 0.5));
  endfunction

  function automatic int units_of(input dac_code_t c);
    return 16 * $countones(c.therm) + int'(c.bin);
  endfunction

  // Called just after a falling edge, with data_in already set for this edge.
  task automatic ref_edge();
    r_units = r_amp;
    r_amp   = sine_of(r_phase);
    r_phase = r_phase + (data_in ? 16'd4096 : 16'd2048);
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic clock_and_check();
    @(negedge clk);
    ref_edge();
    #1;
    checks++;
    if (int'(amp) != r_amp) begin failures++; $display("sample %0d expected %0d", amp, r_amp); end
    checks++;
    if (units_of(dac_code) != r_units) begin
      failures++;
      $display("DAC word %h/%h (%0d units) expected %0d units", dac_code.therm, dac_code.bin, units_of(dac_code), r_units);
    end
    checks++;
    // Thermometer code must be contiguous ones from bit 0.
    if (((dac_code.therm + 15'd1) & dac_code.therm) != 0) begin
      failures++;
      $display("thermometer code not contiguous: %b", dac_code.therm);
    end
  endtask

  int crossings;
  logic [AMP_W-1:0] prev_amp;

  initial begin
    #12;
    checks++;
    if (amp !== 8'd128 || units_of(dac_code) != 128) begin failures++; $display("reset state wrong"); end
    @(negedge clk);
    #1 rst_n = 1'b1;
    r_phase = '0; r_amp = 128; r_units = 128;
    for (int b = 0; b < 60; b++) begin
      data_in = 1'($urandom);
      repeat (1 + $urandom_range(0, 39)) clock_and_check();
    end
    for (int b = 0; b < 4; b++) begin
      data_in = 1'(b);
      crossings = 0;
      repeat (2) clock_and_check();   // let the new tone reach the sample
      prev_amp = amp;
      repeat (128) begin
        clock_and_check();
        if (prev_amp < 8'd128 && amp >= 8'd128) crossings++;
        prev_amp = amp;
      end
      checks++;
      if (crossings != (data_in ? 8 : 4)) begin
        failures++;
        $display("data %b: %0d periods in 128 clocks", data_in, crossings);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
