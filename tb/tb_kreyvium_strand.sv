// tb_kreyvium_strand -- exhaustive check of both gate structures of the
// six-input strand against y = x1 ^ x2 ^ (x3 & x4) ^ x5 ^ x6.
module tb_kreyvium_strand;
  int checks = 0, failures = 0;
  logic [5:0] x;
  logic ya, yb;

  kreyvium_strand #(.STYLE(0)) dut_a (.x1_i(x[0]), .x2_i(x[1]), .x3_i(x[2]), .x4_i(x[3]), .x5_i(x[4]), .x6_i(x[5]), .y_o(ya));
  kreyvium_strand #(.STYLE(1)) dut_b (.x1_i(x[0]), .x2_i(x[1]), .x3_i(x[2]), .x4_i(x[3]), .x5_i(x[4]), .x6_i(x[5]), .y_o(yb));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp;
    for (int v = 0; v < 64; v++) begin
      x = 6'(v);
      #1;
      exp = x[0] ^ x[1] ^ (x[2] & x[3]) ^ x[4] ^ x[5];
      checks += 2;
      if (ya !== exp) begin failures++; $display("STYLE0 x=%b y=%b exp=%b", x, ya, exp); end
      if (yb !== exp) begin failures++; $display("STYLE1 x=%b y=%b exp=%b", x, yb, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
