// bin2therm: binary to thermometer code converter that forms the 19-bit DAC
// word from an 8-bit sine sample.
//
// The four most significant bits b = amp[7:4] become 15 thermometer lines,
// therm[i] = (b > i), so the DAC switches on b identical legs of weight 16;
// the four least significant bits drive the binary-weighted legs unchanged.
//
// The thermometer logic is a one-level network of three 8-input, 6-output,
// 12-cube NOR-NOR PLAs fed with the whole sample (only amp[7:4] appear in
// their cubes). Writing t_k = (b >= k) = therm[k-1]:
//   PLA A, t1..t6  : cubes b3, b2, b1, b0, b1b0, b2b1, b2b0
//                    t1=b3+b2+b1+b0  t2=b3+b2+b1  t3=b3+b2+b1b0
//                    t4=b3+b2        t5=b3+b2b1+b2b0  t6=b3+b2b1
//   PLA B, t7..t12 : cubes b3, b2b1b0, b3b2, b3b1, b3b0, b3b1b0
//                    t7=b3+b2b1b0  t8=b3  t9=b3b2+b3b1+b3b0
//                    t10=b3b2+b3b1  t11=b3b2+b3b1b0  t12=b3b2
//   PLA C, t13..t15: cubes b3b2b1, b3b2b0, b3b2b1b0
//                    t13=b3b2b1+b3b2b0  t14=b3b2b1  t15=b3b2b1b0
// All three PLAs evaluate in parallel while clk is high; net_clk_out is the
// AND of their CLKOUT signals and marks the network's evaluation as complete.
// PLA C's last three outputs are spare.
//
// Timing: the code is registered on the falling edge of clk (one cycle of
// latency). rst_n is asynchronous, active low, and loads the code of the
// mid-scale sample 8'h80, the DC level of the sine.
//
// From the design description: 15 thermometer MSB lines plus 4 binary LSB
// lines, PLA size, NPLA construction, falling-edge output register. Own
// choices: the partition of the cubes over three PLAs, the reset value.
module bin2therm
  import bfsk_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AMP_W-1:0] amp,
  output dac_code_t        code,
  output logic             net_clk_out
);

  typedef logic [PLA_CUBES-1:0][PLA_IN-1:0]  and_plane_t;
  typedef logic [PLA_OUT-1:0][PLA_CUBES-1:0] or_plane_t;

  // Cube over the nibble b = x[7:4]: bit n of 'lits' selects literal b[n].
  function automatic logic [PLA_IN-1:0] cube(input logic [3:0] lits);
    return {lits, 4'b0000};
  endfunction

  // Cube lists (true literals only; the thermometer code is monotone).
  localparam and_plane_t A_CUBES = {
    {5{8'h00}},
    cube(4'b0101), cube(4'b0110), cube(4'b0011),                    // c6..c4
    cube(4'b0001), cube(4'b0010), cube(4'b0100), cube(4'b1000)      // c3..c0
  };
  localparam or_plane_t A_OR = {
    12'b0000_0010_0001,  // t6  = c0|c5
    12'b0000_0110_0001,  // t5  = c0|c5|c6
    12'b0000_0000_0011,  // t4  = c0|c1
    12'b0000_0001_0011,  // t3  = c0|c1|c4
    12'b0000_0000_0111,  // t2  = c0|c1|c2
    12'b0000_0000_1111   // t1  = c0|c1|c2|c3
  };
  localparam and_plane_t B_CUBES = {
    {6{8'h00}},
    cube(4'b1011), cube(4'b1001), cube(4'b1010), cube(4'b1100),     // c5..c2
    cube(4'b0111), cube(4'b1000)                                    // c1..c0
  };
  localparam or_plane_t B_OR = {
    12'b0000_0000_0100,  // t12 = c2
    12'b0000_0010_0100,  // t11 = c2|c5
    12'b0000_0000_1100,  // t10 = c2|c3
    12'b0000_0001_1100,  // t9  = c2|c3|c4
    12'b0000_0000_0001,  // t8  = c0
    12'b0000_0000_0011   // t7  = c0|c1
  };
  localparam and_plane_t C_CUBES = {
    {9{8'h00}},
    cube(4'b1111), cube(4'b1101), cube(4'b1110)                     // c2..c0
  };
  localparam or_plane_t C_OR = {
    12'b0, 12'b0, 12'b0, // spare outputs
    12'b0000_0000_0100,  // t15 = c2
    12'b0000_0000_0001,  // t14 = c0
    12'b0000_0000_0011   // t13 = c0|c1
  };

  logic [PLA_OUT-1:0] y_a, y_b, y_c;
  logic [2:0]         pla_done, pla_clk_out;
  logic [THERM_W-1:0] therm;

  pla_nor_nor #(.N_IN(PLA_IN), .N_OUT(PLA_OUT), .N_CUBES(PLA_CUBES),
                .CUBE_TRUE(A_CUBES), .CUBE_COMP('0), .OR_PLANE(A_OR))
    u_pla_a (.clk_in(clk), .x(amp), .y(y_a), .done(pla_done[0]), .clk_out(pla_clk_out[0]));

  pla_nor_nor #(.N_IN(PLA_IN), .N_OUT(PLA_OUT), .N_CUBES(PLA_CUBES),
                .CUBE_TRUE(B_CUBES), .CUBE_COMP('0), .OR_PLANE(B_OR))
    u_pla_b (.clk_in(clk), .x(amp), .y(y_b), .done(pla_done[1]), .clk_out(pla_clk_out[1]));

  pla_nor_nor #(.N_IN(PLA_IN), .N_OUT(PLA_OUT), .N_CUBES(PLA_CUBES),
                .CUBE_TRUE(C_CUBES), .CUBE_COMP('0), .OR_PLANE(C_OR))
    u_pla_c (.clk_in(clk), .x(amp), .y(y_c), .done(pla_done[2]), .clk_out(pla_clk_out[2]));

  always_comb begin
    therm       = {y_c[2:0], y_b, y_a};
    net_clk_out = &(pla_clk_out & pla_done);
  end

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) code <= '{therm: THERM_W'(8'hFF), bin: '0};
    else        code <= '{therm: therm, bin: amp[BIN_BITS-1:0]};
  end

endmodule
