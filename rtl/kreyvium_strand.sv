// kreyvium_strand -- six-input strand of Kreyvium:
//   y = x1 ^ x2 ^ (x3 & x4) ^ x5 ^ x6
// Kreyvium's t1 and t3 strands add one bit of the rotating IV* or K*
// register (x6) to the Trivium strand; t2 is a plain five-input strand.
// The gates for the sixth input are not fixed by the design description:
// this version keeps the Trivium strand's gates (STYLE as in trivium_strand)
// and folds x6 into the x5 branch with one more XNOR, so that x6 and x5
// enter at the same depth.  Purely combinational.
(* keep_hierarchy *)
module kreyvium_strand #(
  parameter int unsigned STYLE = 0
) (
  input  logic x1_i,
  input  logic x2_i,
  input  logic x3_i,
  input  logic x4_i,
  input  logic x5_i,
  input  logic x6_i,
  output logic y_o
);

  logic nand34, xnor12, xnor56;

  assign nand34 = ~(x3_i & x4_i);
  assign xnor12 = ~(x1_i ^ x2_i);
  assign xnor56 = ~(x5_i ^ x6_i);        // = x5 ^ x6 inverted

  if (STYLE == 0) begin : g_fig_a
    logic xnor_c56;
    assign xnor_c56 = nand34 ^ xnor56;   // = ~(nand34 ^ (x5 ^ x6))
    assign y_o      = ~(xnor12 ^ xnor_c56);
  end else begin : g_fig_b
    logic inv12;
    assign inv12 = ~xnor12;
    assign y_o   = inv12 ^ nand34 ^ xnor56;
  end

endmodule
