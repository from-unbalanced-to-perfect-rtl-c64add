// redundant_module -- delay-matching copy of a circuit strand.
//
// A strand input that comes straight from the state register arrives one or
// more strand delays before inputs that come from other strands, and the
// strand output glitches while it waits.  A redundant module is an ordinary
// trivium_strand with x1 = the register bit and x2 = x3 = x4 = x5 = 0.  Its
// output equals the register bit, but it arrives through the same gates as a
// strand output, so every input of the strand it feeds settles at the same
// depth.  Logically it is a wire; the gates are the point, and keep_hierarchy
// on the strand keeps synthesis from removing them.  Purely combinational.
module redundant_module #(
  parameter int unsigned STYLE = 0
) (
  input  logic s_i,    // state-register bit
  output logic y_o     // the same bit, one strand delay later
);

  trivium_strand #(.STYLE(STYLE)) u_strand (
    .x1_i(s_i),
    .x2_i(1'b0),
    .x3_i(1'b0),
    .x4_i(1'b0),
    .x5_i(1'b0),
    .y_o (y_o)
  );

endmodule
