// phase_accumulator: the frequency-selecting front end of the BFSK modulator.
//
// A single numerically controlled oscillator replaces the two tone generators
// and the output multiplexer of a textbook BFSK transmitter: the binary input
// chooses which of two frequency control words (FCW0 for a 0, FCW1 for a 1) is
// added to the phase register. The output tone frequency is
// f = FCW * f_clk / 2**ACC_W. Switching words leaves the phase untouched, so
// the output is phase-continuous across bit boundaries.
//
// The adder is a multilevel network of precharged NOR-NOR PLAs, one per phase
// bit, rippling the carry. PLA i sees three inputs, the phase bit a, the data
// bit d and the carry c from PLA i-1, and produces the sum bit and the carry.
// The addend bit is folded into its personality: it is FCW1[i] when d = 1 and
// FCW0[i] when d = 0, i.e. 0, 1, d or ~d. Each of the 8 minterms of (a, d, c)
// is one cube (8 of the 12 rows); the OR plane picks the minterms of
//   sum = a ^ b(d) ^ c     carry = maj(a, b(d), c).
// PLA 0 is clocked by clk; every later PLA is clocked by the CLKOUT of the one
// before it, so the network precharges together while clk is low and
// evaluates bit by bit while it is high. acc_clk_out, the CLKOUT of the last
// PLA, marks the end of the evaluation. Its depth is ACC_W levels, the N of
// the throughput estimate 1 / (T_precharge + N * T_eval).
//
// Timing: like every stage of the modulator, the register is clocked on the
// falling edge of clk, so its output is steady while clk is high and the
// network evaluates. data_in is sampled on the same falling edge; the new word
// first affects phase at that edge. rst_n is asynchronous, active low, and
// clears the phase to 0.
//
// From the design description: one NCO instead of two oscillators, the PLA
// network with CLKOUT cascading, negative-edge registers. Own choices:
// accumulator width, the two control words, the ripple-carry partition of the
// adder into PLAs, the reset.
module phase_accumulator
  import bfsk_pkg::*;
#(
  parameter int unsigned       ACC_W = 16,
  parameter logic [ACC_W-1:0]  FCW0  = ACC_W'(2048),  // tone for data 0: f_clk/32
  parameter logic [ACC_W-1:0]  FCW1  = ACC_W'(4096)   // tone for data 1: f_clk/16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             data_in,
  output logic [ACC_W-1:0] phase,
  output logic             acc_clk_out   // CLKOUT of the last PLA of the adder
);

  typedef logic [PLA_CUBES-1:0][PLA_IN-1:0]  and_plane_t;
  typedef logic [PLA_OUT-1:0][PLA_CUBES-1:0] or_plane_t;

  // Inputs of every adder PLA: x[0] = phase bit, x[1] = data bit, x[2] = carry in.
  // Cube m (m = 0..7) is the minterm of (x[2], x[1], x[0]) equal to m.
  function automatic and_plane_t minterm_true();
    and_plane_t p = '0;
    for (int m = 0; m < 8; m++) p[m] = PLA_IN'(m);
    return p;
  endfunction

  function automatic and_plane_t minterm_comp();
    and_plane_t p = '0;
    for (int m = 0; m < 8; m++) p[m] = PLA_IN'(~m & 7);
    return p;
  endfunction

  // OR plane of bit i: output 0 = sum, output 1 = carry.
  function automatic or_plane_t adder_or_plane(input logic f0, input logic f1);
    or_plane_t p = '0;
    logic a, d, c, b;
    for (int m = 0; m < 8; m++) begin
      a = m[0];
      d = m[1];
      c = m[2];
      b = d ? f1 : f0;
      p[0][m] = a ^ b ^ c;
      p[1][m] = (a & b) | (a & c) | (b & c);
    end
    return p;
  endfunction

  localparam and_plane_t ADD_TRUE = minterm_true();
  localparam and_plane_t ADD_COMP = minterm_comp();

  logic [ACC_W:0]   carry;
  logic [ACC_W:0]   pla_clk;
  logic [ACC_W-1:0] phase_next;

  assign carry[0]   = 1'b0;
  assign pla_clk[0] = clk;

  for (genvar i = 0; i < ACC_W; i++) begin : g_bit
    localparam or_plane_t ADD_OR = adder_or_plane(FCW0[i], FCW1[i]);
    logic [PLA_OUT-1:0] y;
    logic               done;

    pla_nor_nor #(.N_IN(PLA_IN), .N_OUT(PLA_OUT), .N_CUBES(PLA_CUBES),
                  .CUBE_TRUE(ADD_TRUE), .CUBE_COMP(ADD_COMP), .OR_PLANE(ADD_OR))
      u_pla (
        .clk_in (pla_clk[i]),
        .x      ({(PLA_IN-3)'(0), carry[i], data_in, phase[i]}),
        .y      (y),
        .done   (done),
        .clk_out(pla_clk[i+1])
      );

    assign phase_next[i] = y[0];
    assign carry[i+1]    = y[1];
  end

  assign acc_clk_out = pla_clk[ACC_W];

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase_next;
  end

endmodule
