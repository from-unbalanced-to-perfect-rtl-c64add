// tb_redundant_module -- the redundant module must reproduce the register
// bit it is given, for both strand gate structures.
module tb_redundant_module;
  int checks = 0, failures = 0;
  logic s;
  logic ya, yb;

  redundant_module #(.STYLE(0)) dut_a (.s_i(s), .y_o(ya));
  redundant_module #(.STYLE(1)) dut_b (.s_i(s), .y_o(yb));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 40; n++) begin
      s = (n < 2) ? 1'(n) : 1'($urandom);
      #1;
      checks += 2;
      if (ya !== s) begin failures++; $display("STYLE0 s=%b y=%b", s, ya); end
      if (yb !== s) begin failures++; $display("STYLE1 s=%b y=%b", s, yb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
