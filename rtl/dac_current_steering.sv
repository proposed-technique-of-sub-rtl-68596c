// dac_current_steering: behavioural model of the 19-leg current-steering DAC
// (analog circuit; this model is for simulation only).
//
// A reference transistor biased by a resistor sets a unit current that each
// leg mirrors. Fifteen legs are driven by the thermometer lines and carry
// 16 unit currents each (wider mirror transistors); four legs are driven by the
// binary lines and carry 8, 4, 2 and 1 unit currents. Every leg is a
// differential switch with a true and a complement input; the leg steers its
// current into the output resistor when the true input is high. The output
// voltage is the summed current times R_OUT.
//
// Interface: t/t_b are the thermometer lines and their complements, b/b_b the
// binary lines and their complements. i_units is the output current in unit
// currents (0..255); v_out is the voltage across the output resistor in volts.
// An assertion reports a leg whose two inputs are not complementary.
//
// Timing: the output follows the inputs after SETTLE time units.
//
// From the design description: 19 legs, 15 thermometer plus 4 binary, the
// differential switch pair per leg, current summed into an output resistor.
// Own choices: the unit current, the resistor and the settling delay, which
// the description does not give.
module dac_current_steering
  import bfsk_pkg::*;
#(
  parameter real I_UNIT = 10.0e-9,   // unit (binary LSB) current, amperes
  parameter real R_OUT  = 100.0e3,   // output resistor, ohms
  parameter int  SETTLE = 1          // settling delay, time units
) (
  input  logic [THERM_W-1:0]  t,
  input  logic [THERM_W-1:0]  t_b,
  input  logic [BIN_BITS-1:0] b,
  input  logic [BIN_BITS-1:0] b_b,
  output logic [AMP_W:0]      i_units,
  output real                 v_out
);

  localparam int unsigned THERM_WEIGHT = 1 << BIN_BITS;   // 16 unit currents

  logic [AMP_W:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < THERM_W; i++) begin
      if (t[i] && !t_b[i]) sum = sum + (AMP_W+1)'(THERM_WEIGHT);
    end
    for (int i = 0; i < BIN_BITS; i++) begin
      if (b[i] && !b_b[i]) sum = sum + (AMP_W+1)'(1 << i);
    end
  end

  always @(sum) begin
    i_units <= #(SETTLE) sum;
    v_out   <= #(SETTLE) real'(sum) * I_UNIT * R_OUT;
  end

  // Each switch pair must be driven with complementary levels.
  always @(t, t_b, b, b_b) begin
    #0;
    assert ((t ^ t_b) == '1 && (b ^ b_b) == '1)
      else $error("dac_current_steering: non-complementary switch inputs");
  end

endmodule
