// bfsk_modulator: digital binary frequency shift keying modulator.
//
// One numerically controlled oscillator produces both tones: the data bit
// selects the frequency control word of the phase accumulator (FCW0 for a 0,
// FCW1 for a 1), the top PHASE_W phase bits address a sine table, and the
// 8-bit sample is converted into the 19-bit DAC word (15 thermometer lines and
// 4 binary lines). The three combinational stages are separated by registers
// on the falling edge of clk, so each stage's inputs are steady while clk is
// high, which is when the PLA-based logic evaluates.
//
// Timing: data_in is sampled on a falling edge n; the phase changes at n,
// the sample from that phase is registered at n+1 and its DAC word at n+2.
// Throughput is one DAC word per clock. Tone frequencies are
// f0 = FCW0 * f_clk / 2**ACC_W and f1 = FCW1 * f_clk / 2**ACC_W; with the
// defaults f0 = f_clk/32 and f1 = f_clk/16. For orthogonal (non-coherent)
// BFSK choose |f1 - f0| as an integer multiple of the bit rate.
//
// From the design description: single NCO in place of two oscillators, the
// three stages (phase accumulator, NCO, binary to thermometer converter),
// falling-edge registers between them, 19-bit DAC word. Own choices: the
// widths of the accumulator and phase, the control words, the reset.
module bfsk_modulator
  import bfsk_pkg::*;
#(
  parameter int unsigned      ACC_W   = bfsk_pkg::DEF_ACC_W,
  parameter int unsigned      PHASE_W = bfsk_pkg::DEF_PHASE_W,
  parameter logic [ACC_W-1:0] FCW0    = ACC_W'(2048),
  parameter logic [ACC_W-1:0] FCW1    = ACC_W'(4096)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             data_in,
  output logic [AMP_W-1:0] amp,          // registered sine sample (observation)
  output dac_code_t        dac_code,     // 19-bit DAC word
  output logic             acc_clk_out,  // completion of the accumulator's PLA network
  output logic             net_clk_out   // completion of the converter's PLA network
);

  logic [ACC_W-1:0] phase;

  phase_accumulator #(.ACC_W(ACC_W), .FCW0(FCW0), .FCW1(FCW1)) u_acc (
    .clk, .rst_n, .data_in, .phase, .acc_clk_out
  );

  nco_sine_rom #(.PHASE_W(PHASE_W), .AMP_W(AMP_W)) u_nco (
    .clk, .rst_n, .phase_in(phase[ACC_W-1 -: PHASE_W]), .amp
  );

  bin2therm u_b2t (
    .clk, .rst_n, .amp, .code(dac_code), .net_clk_out
  );

endmodule
