// bfsk_transmitter: the transmitter chip, from the data bit to the DAC output.
//
// The digital BFSK modulator turns the serial data bit into a stream of 19-bit
// DAC words that trace a sine at one of two frequencies. The current-steering
// DAC converts each word into a current and the voltage across its output
// resistor. That voltage drives a common-source amplifier and an antenna,
// which are analog parts outside this description: the DAC output is
// therefore brought out as ports (dac_i_units, dac_v_out), together with the
// DAC word and the sine sample it was made from.
//
// Timing: one DAC word per clock; the word that follows a data bit sampled
// on falling edge n appears at falling edge n+2 (see bfsk_modulator), and the
// DAC model settles one time unit later. rst_n is asynchronous, active low.
//
// The DAC is a behavioural model, so this top is for simulation; the
// modulator underneath it is the synthesizable part.
module bfsk_transmitter
  import bfsk_pkg::*;
#(
  parameter int unsigned      ACC_W   = bfsk_pkg::DEF_ACC_W,
  parameter int unsigned      PHASE_W = bfsk_pkg::DEF_PHASE_W,
  parameter logic [ACC_W-1:0] FCW0    = ACC_W'(2048),
  parameter logic [ACC_W-1:0] FCW1    = ACC_W'(4096)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            data_in,
  output logic [AMP_W-1:0] amp,
  output dac_code_t       dac_code,
  output logic            acc_clk_out,
  output logic            net_clk_out,
  output logic [AMP_W:0]  dac_i_units,
  output real             dac_v_out
);

  bfsk_modulator #(.ACC_W(ACC_W), .PHASE_W(PHASE_W), .FCW0(FCW0), .FCW1(FCW1)) u_mod (
    .clk, .rst_n, .data_in, .amp, .dac_code, .acc_clk_out, .net_clk_out
  );

  dac_current_steering u_dac (
    .t(dac_code.therm), .t_b(~dac_code.therm),
    .b(dac_code.bin),   .b_b(~dac_code.bin),
    .i_units(dac_i_units), .v_out(dac_v_out)
  );

endmodule
