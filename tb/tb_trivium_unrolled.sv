// tb_trivium_unrolled -- compares the unrolled network with R rounds of the
// bit-serial reference, for random states, at R = 288 with and without
// redundant modules (both must compute the same function), at R = 100
// (strand trees of height 3 and 4 only partly present) and at R = 1.
module tb_trivium_unrolled;
  import cipher_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [288:1] s;
  logic [288:1] so_a, so_b, so_c, so_d;
  logic [287:0] ks_a, ks_b;
  logic [99:0]  ks_c;
  logic [0:0]   ks_d;

  trivium_unrolled #(.R(288), .REDUNDANT(1'b1))            dut_a (.s_i(s), .s_o(so_a), .ks_o(ks_a));
  trivium_unrolled #(.R(288), .REDUNDANT(1'b0))            dut_b (.s_i(s), .s_o(so_b), .ks_o(ks_b));
  trivium_unrolled #(.R(100), .REDUNDANT(1'b1), .STYLE(1)) dut_c (.s_i(s), .s_o(so_c), .ks_o(ks_c));
  trivium_unrolled #(.R(1),   .REDUNDANT(1'b1))            dut_d (.s_i(s), .s_o(so_d), .ks_o(ks_d));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    triv_t c;
    logic [287:0] z;
    logic [288:1] s1, s100, s288;
    for (int n = 0; n < 30; n++) begin
      for (int b = 1; b <= 288; b++) s[b] = (n == 0) ? 1'b0 : (n == 1) ? 1'b1 : 1'($urandom);
      #1;
      c.s = s;
      for (int k = 0; k < 288; k++) begin
        z[k] = triv_round(c);
        if (k == 0)  s1   = c.s;
        if (k == 99) s100 = c.s;
      end
      s288 = c.s;
      checks += 8;
      if (so_a !== s288)        begin failures++; $display("R288 red state mismatch n=%0d", n); end
      if (ks_a !== z)           begin failures++; $display("R288 red ks mismatch n=%0d", n); end
      if (so_b !== s288)        begin failures++; $display("R288 plain state mismatch n=%0d", n); end
      if (ks_b !== z)           begin failures++; $display("R288 plain ks mismatch n=%0d", n); end
      if (so_c !== s100)        begin failures++; $display("R100 state mismatch n=%0d", n); end
      if (ks_c !== z[99:0])     begin failures++; $display("R100 ks mismatch n=%0d", n); end
      if (so_d !== s1)          begin failures++; $display("R1 state mismatch n=%0d", n); end
      if (ks_d !== z[0:0])      begin failures++; $display("R1 ks mismatch n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
