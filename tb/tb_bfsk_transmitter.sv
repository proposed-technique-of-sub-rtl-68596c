// tb_bfsk_transmitter: end-to-end test of the transmitter at its default
// parameters.
//
// A 32-bit message is sent at one bit per 64 clocks, so the two tones
// (f_clk/32 and f_clk/16) differ by twice the bit rate: orthogonal BFSK. The
// test checks, clock by clock, that the DAC current equals a reference of the
// modulator pipeline (phase, sine, thermometer word, two clocks of latency),
// that the DAC word is a valid thermometer code, and that the DAC voltage is
// the current times I_UNIT * R_OUT. It then demodulates the DAC voltage the way
// a non-coherent receiver would: per bit it measures the energy at each of
// the two tone frequencies and picks the larger. Every decoded bit must match.
// Finally an asynchronous reset in mid-operation must return the output to
// mid-scale.
//
// Mechanisms counted (each must occur): tone switches 0->1 and 1->0, phase
// accumulator wrap-around, PLA network evaluations (completion pulses),
// DAC settling after a change, and the asynchronous reset. Both PLA networks
// (the accumulator's 16-level ripple and the converter's single level) must
// complete an evaluation in every clock.
module tb_bfsk_transmitter;
  import bfsk_pkg::*;

  localparam int NBITS  = 32;
  localparam int SPB    = 64;          // clocks per bit
  localparam int NEDGES = NBITS * SPB + 4;

  logic             clk = 1'b1;
  logic             rst_n = 1'b0;
  logic             data_in = 1'b0;
  logic [AMP_W-1:0] amp;
  dac_code_t        dac_code;
  logic             acc_clk_out, net_clk_out;
  logic [AMP_W:0]   dac_i_units;
  real              dac_v_out;
  int checks = 0, failures = 0;

  bfsk_transmitter dut (.clk, .rst_n, .data_in, .amp, .dac_code, .acc_clk_out, .net_clk_out,
                        .dac_i_units, .dac_v_out);

  always #5 clk = ~clk;

  // Mechanism counters.
  int n_rise = 0, n_fall = 0, n_wrap = 0, n_eval = 0, n_settle = 0, n_reset = 0;
  always @(posedge net_clk_out) n_eval++;
  int n_acc_eval = 0;
  always @(posedge acc_clk_out) n_acc_eval++;
  always @(dac_i_units) n_settle++;

  logic [NBITS-1:0] msg;
  real              samples [NEDGES];

  logic [15:0] r_phase;
  int          r_amp, r_units;

  function automatic int sine_of(input logic [15:0] ph);
    return int'($floor(127.5 + 127.5 * $sin(2.0 * 3.141592653589793 * real'(ph[15:8]) / 256.0) + 0.5));
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   edge_n;
    real  e0c, e0s, e1c, e1s, e0, e1, s;
    logic dec;
    logic [15:0] nxt;

    msg = {16'b0110_1001_1100_0101, 16'($urandom)};
    #12;
    checks++;
    if (dac_i_units != 9'd128) begin failures++; $display("reset DAC current %0d", dac_i_units); end
    @(negedge clk);
    #1 rst_n = 1'b1;
    r_phase = '0; r_amp = 128; r_units = 128;
    edge_n = 0;
    for (int j = 0; j < NBITS + 1; j++) begin
      data_in = (j < NBITS) ? msg[j] : 1'b0;
      if (j > 0 && j < NBITS && msg[j] && !msg[j-1]) n_rise++;
      if (j > 0 && j < NBITS && !msg[j] && msg[j-1]) n_fall++;
      for (int c = 0; c < SPB; c++) begin
        @(negedge clk);
        edge_n++;
        r_units = r_amp;
        r_amp   = sine_of(r_phase);
        nxt     = r_phase + (data_in ? 16'd4096 : 16'd2048);
        if (nxt < r_phase) n_wrap++;
        r_phase = nxt;
        #2;   // after the DAC settling delay
        checks++;
        if (int'(dac_i_units) != r_units) begin
          failures++;
          $display("edge %0d: DAC current %0d expected %0d", edge_n, dac_i_units, r_units);
        end
        checks++;
        if (((dac_code.therm + 15'd1) & dac_code.therm) != 0) begin
          failures++;
          $display("edge %0d: bad thermometer code %b", edge_n, dac_code.therm);
        end
        checks++;
        s = real'(dac_i_units) * 10.0e-9 * 100.0e3;
        if (dac_v_out < s - 1.0e-9 || dac_v_out > s + 1.0e-9) begin
          failures++;
          $display("edge %0d: DAC voltage %f expected %f", edge_n, dac_v_out, s);
        end
        if (edge_n < NEDGES) samples[edge_n] = dac_v_out;
      end
    end

    // Non-coherent demodulation: bit j's tone appears in the DAC samples of
    // edges SPB*j+2 .. SPB*j+SPB+1.
    for (int j = 0; j < NBITS; j++) begin
      e0c = 0.0; e0s = 0.0; e1c = 0.0; e1s = 0.0;
      for (int i = 0; i < SPB; i++) begin
        s = samples[SPB*j + i + 2] - 0.5;   // remove the DC level
        e0c += s * $cos(2.0 * 3.141592653589793 * i / 32.0);
        e0s += s * $sin(2.0 * 3.141592653589793 * i / 32.0);
        e1c += s * $cos(2.0 * 3.141592653589793 * i / 16.0);
        e1s += s * $sin(2.0 * 3.141592653589793 * i / 16.0);
      end
      e0 = e0c * e0c + e0s * e0s;
      e1 = e1c * e1c + e1s * e1s;
      dec = (e1 > e0);
      checks++;
      if (dec != msg[j] || (e0 + e1) < 1.0) begin
        failures++;
        $display("bit %0d: sent %b decoded %b (E0=%f E1=%f)", j, msg[j], dec, e0, e1);
      end
    end

    // Asynchronous reset in the middle of a clock-high phase.
    @(posedge clk);
    #2 rst_n = 1'b0;
    #1;
    n_reset++;
    checks++;
    if (amp !== 8'd128 || 16 * $countones(dac_code.therm) + int'(dac_code.bin) != 128) begin
      failures++;
      $display("async reset did not return the modulator to mid-scale");
    end
    #2;
    checks++;
    if (dac_i_units != 9'd128) begin failures++; $display("DAC not at mid-scale after reset"); end

    $display("mechanisms: tone 0->1 %0d, tone 1->0 %0d, phase wraps %0d, PLA evaluations %0d/%0d, DAC updates %0d, resets %0d",
             n_rise, n_fall, n_wrap, n_acc_eval, n_eval, n_settle, n_reset);
    checks++; if (n_rise   == 0) begin failures++; $display("no 0->1 tone switch"); end
    checks++; if (n_fall   == 0) begin failures++; $display("no 1->0 tone switch"); end
    checks++; if (n_wrap   == 0) begin failures++; $display("no phase wrap"); end
    checks++; if (n_eval   <  NBITS * SPB) begin failures++; $display("too few converter PLA evaluations"); end
    checks++; if (n_acc_eval < NBITS * SPB) begin failures++; $display("too few accumulator PLA network evaluations"); end
    checks++; if (n_settle == 0) begin failures++; $display("DAC never updated"); end
    checks++; if (n_reset  == 0) begin failures++; $display("no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
