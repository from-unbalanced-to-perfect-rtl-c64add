// trivium_strand -- one circuit strand: y = x1 ^ x2 ^ (x3 & x4) ^ x5.
//
// This is the combinational module every Trivium state update is made of;
// an r-round unrolled circuit holds 3r of them, and the redundant modules
// are copies of it too.  The gate structure is that of the document's
// figure of the strand:
//   STYLE = 0: one NAND2 and three XNOR2
//              y = XNOR(XNOR(x1,x2), XNOR(NAND(x3,x4), x5))
//   STYLE = 1: one NAND2, one XNOR2, one XNOR3 and one inverter
//              y = XNOR3(NOT(XNOR(x1,x2)), NAND(x3,x4), x5)
// Both give the same function.  The keep_hierarchy attribute asks synthesis
// to keep each strand as its own block, so that all strands keep the same
// gates and delay and no logic is merged across strand boundaries.
// Purely combinational; no clock.
(* keep_hierarchy *)
module trivium_strand #(
  parameter int unsigned STYLE = 0
) (
  input  logic x1_i,
  input  logic x2_i,
  input  logic x3_i,
  input  logic x4_i,
  input  logic x5_i,
  output logic y_o
);

  logic nand34, xnor12;

  assign nand34 = ~(x3_i & x4_i);
  assign xnor12 = ~(x1_i ^ x2_i);

  if (STYLE == 0) begin : g_fig_a
    logic xnor_c5;
    assign xnor_c5 = ~(nand34 ^ x5_i);
    assign y_o     = ~(xnor12 ^ xnor_c5);
  end else begin : g_fig_b
    logic inv12;
    assign inv12 = ~xnor12;
    assign y_o   = ~(inv12 ^ nand34 ^ x5_i);
  end

endmodule
