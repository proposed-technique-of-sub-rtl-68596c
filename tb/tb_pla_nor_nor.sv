// tb_pla_nor_nor: self-checking test of the NOR-NOR PLA.
//
// The PLA is programmed with a personality that uses true and complement
// literals, shared cubes, an empty cube (constant 1) and an output with no
// cube (constant 0):
//   y0 = x0 & ~x1            y1 = x0 ^ x1 (two cubes)
//   y2 = maj(x2, x3, x4)     y3 = x7 | (x0 & ~x1)   (shares y0's cube)
//   y4 = 1 (empty cube)      y5 = 0 (no cube)
// All 256 input values are applied and compared with these functions written
// directly. The completion signal and CLKOUT are checked against the clock in
// both the precharge and the evaluate phase.
module tb_pla_nor_nor;
  localparam int unsigned NI = 8, NO = 6, NC = 12;

  // Cubes: c0 = x0 ~x1, c1 = ~x0 x1, c2 = x2 x3, c3 = x2 x4, c4 = x3 x4,
  //        c5 = x7, c6 = (empty), c7..c11 unused.
  localparam logic [NC-1:0][NI-1:0] CT = {
    {5{8'h00}}, 8'h00, 8'h80, 8'b0001_1000, 8'b0001_0100, 8'b0000_1100, 8'b0000_0010, 8'b0000_0001
  };
  localparam logic [NC-1:0][NI-1:0] CC = {
    {5{8'h00}}, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'b0000_0001, 8'b0000_0010
  };
  localparam logic [NO-1:0][NC-1:0] OP = {
    12'b0000_0000_0000,   // y5: none
    12'b0000_0100_0000,   // y4: c6
    12'b0000_0010_0001,   // y3: c0 | c5
    12'b0000_0001_1100,   // y2: c2 | c3 | c4
    12'b0000_0000_0011,   // y1: c0 | c1
    12'b0000_0000_0001    // y0: c0
  };

  logic          clk_in = 1'b0;
  logic [NI-1:0] x;
  logic [NO-1:0] y, y_exp;
  logic          done, clk_out;
  int checks = 0, failures = 0;

  pla_nor_nor #(.N_IN(NI), .N_OUT(NO), .N_CUBES(NC),
                .CUBE_TRUE(CT), .CUBE_COMP(CC), .OR_PLANE(OP))
    dut (.clk_in, .x, .y, .done, .clk_out);

  function automatic logic [NO-1:0] ref_pla(input logic [NI-1:0] v);
    logic [NO-1:0] r;
    r[0] = v[0] & ~v[1];
    r[1] = v[0] ^ v[1];
    r[2] = (v[2] & v[3]) | (v[2] & v[4]) | (v[3] & v[4]);
    r[3] = v[7] | (v[0] & ~v[1]);
    r[4] = 1'b1;
    r[5] = 1'b0;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      x = NI'(v);
      clk_in = 1'b0;                      // precharge
      #5;
      checks++;
      if (done !== 1'b0 || clk_out !== 1'b0) begin
        failures++;
        $display("precharge: done=%b clk_out=%b", done, clk_out);
      end
      clk_in = 1'b1;                      // evaluate
      #5;
      y_exp = ref_pla(x);
      checks++;
      if (y !== y_exp) begin
        failures++;
        $display("x=%h y=%b expected %b", x, y, y_exp);
      end
      checks++;
      if (done !== 1'b1 || clk_out !== 1'b1) begin
        failures++;
        $display("evaluate: done=%b clk_out=%b", done, clk_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
