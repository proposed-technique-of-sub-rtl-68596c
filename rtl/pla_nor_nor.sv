// pla_nor_nor: precharged NOR-NOR programmable logic array, the building block
// of every combinational stage of the BFSK modulator.
//
// The PLA computes each output as a sum of cubes. Every input drives two
// bit-lines, one per literal (x and ~x). The AND plane holds one row per cube:
// a row is precharged high and is pulled low by any connected bit-line that is
// high, so a row connected to the bit-line of ~x (for a literal x) and of x (for
// a literal ~x) stays high exactly when every literal of its cube is true (a
// NOR of complemented literals). The OR plane holds one line per output: a line
// is precharged high and pulled low by any connected row that is high; the
// output buffer inverts it, so y[j] is the OR of its cubes.
//
// The personality is given by three parameters:
//   CUBE_TRUE[c][i] = 1  cube c contains literal x[i]
//   CUBE_COMP[c][i] = 1  cube c contains literal ~x[i]
//   OR_PLANE[j][c]  = 1  output j contains cube c
// A cube with no literal is always true; an output with no cube is always 0.
//
// Timing and the network handshake: the PLA precharges while clk_in is low
// and evaluates while it is high. A dummy row and output line that always
// discharge form the completion detector: done rises once an evaluation has
// run through both planes. clk_out = clk_in AND done clocks the next PLA of a
// cascade, so the PLAs of a network precharge together and evaluate one after
// the other. In this zero-delay description an evaluation completes as soon
// as it starts, so done follows clk_in, and y is given as the value the output
// lines hold at the end of evaluation: the registers that read it capture on
// the falling clock edge, before the next precharge could disturb it.
//
// From the design description: NOR-NOR form, two bit-lines per input,
// precharge/evaluate on the clock, completion signal, CLKOUT = completion AND
// CLK, and the fixed size of 8 inputs, 6 outputs, 12 cubes. Column folding is
// a layout technique that does not change the logic and is not modelled.
module pla_nor_nor #(
  parameter int unsigned N_IN    = 8,
  parameter int unsigned N_OUT   = 6,
  parameter int unsigned N_CUBES = 12,
  parameter logic [N_CUBES-1:0][N_IN-1:0]  CUBE_TRUE = '0,
  parameter logic [N_CUBES-1:0][N_IN-1:0]  CUBE_COMP = '0,
  parameter logic [N_OUT-1:0][N_CUBES-1:0] OR_PLANE  = '0
) (
  input  logic             clk_in,   // CLK, or CLKOUT of the previous PLA
  input  logic [N_IN-1:0]  x,
  output logic [N_OUT-1:0] y,
  output logic             done,     // completion signal
  output logic             clk_out   // CLKOUT = clk_in AND done
);

  logic [2*N_IN-1:0]  bitline;   // {~x, x}: the two literal bit-lines per input
  logic [N_CUBES-1:0] row;       // AND-plane rows (high = cube true)
  logic [N_OUT-1:0]   out_line;  // OR-plane lines before the output inverter
  logic               dummy_row;
  logic               dummy_line;

  always_comb begin
    bitline = {~x, x};
    // AND plane: a row is discharged by any connected bit-line that is high.
    // Literal x[i] connects the ~x[i] bit-line, literal ~x[i] the x[i] one.
    for (int c = 0; c < N_CUBES; c++) begin
      row[c] = ~|(bitline & {CUBE_TRUE[c], CUBE_COMP[c]});
    end
    // OR plane: a line is discharged by any connected row that is high.
    for (int j = 0; j < N_OUT; j++) begin
      out_line[j] = ~|(row & OR_PLANE[j]);
    end
    y = ~out_line;
  end

  // Completion detector: a row with no transistor stays high during evaluation
  // and discharges a dummy output line that is precharged while clk_in is low.
  always_comb begin
    dummy_row  = clk_in;
    dummy_line = ~dummy_row;
    done       = ~dummy_line;
    clk_out    = clk_in & done;
  end

endmodule
