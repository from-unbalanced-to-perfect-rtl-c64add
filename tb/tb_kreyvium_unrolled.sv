// tb_kreyvium_unrolled -- compares the unrolled Kreyvium network with R
// rounds of the bit-serial reference for random state, K* and IV*, at
// R = 256 with and without redundant modules, at R = 200 (K*/IV* rotate by
// 72 places) and at R = 1.
module tb_kreyvium_unrolled;
  import cipher_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [288:1] s;
  logic [127:0] k, v;
  logic [288:1] so_a, so_b, so_c, so_d;
  logic [127:0] ko_a, ko_b, ko_c, ko_d, vo_a, vo_b, vo_c, vo_d;
  logic [255:0] ks_a, ks_b;
  logic [199:0] ks_c;
  logic [0:0]   ks_d;

  kreyvium_unrolled #(.R(256), .REDUNDANT(1'b1)) dut_a (.s_i(s), .kstar_i(k), .ivstar_i(v), .s_o(so_a), .kstar_o(ko_a), .ivstar_o(vo_a), .ks_o(ks_a));
  kreyvium_unrolled #(.R(256), .REDUNDANT(1'b0)) dut_b (.s_i(s), .kstar_i(k), .ivstar_i(v), .s_o(so_b), .kstar_o(ko_b), .ivstar_o(vo_b), .ks_o(ks_b));
  kreyvium_unrolled #(.R(200), .REDUNDANT(1'b1), .STYLE(1)) dut_c (.s_i(s), .kstar_i(k), .ivstar_i(v), .s_o(so_c), .kstar_o(ko_c), .ivstar_o(vo_c), .ks_o(ks_c));
  kreyvium_unrolled #(.R(1),   .REDUNDANT(1'b1)) dut_d (.s_i(s), .kstar_i(k), .ivstar_i(v), .s_o(so_d), .kstar_o(ko_d), .ivstar_o(vo_d), .ks_o(ks_d));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what, input int n);
    checks++;
    if (!ok) begin failures++; $display("mismatch %s n=%0d", what, n); end
  endtask

  initial begin
    krey_t c, c1, c200;
    logic [255:0] z;
    for (int n = 0; n < 30; n++) begin
      for (int b = 1; b <= 288; b++) s[b] = 1'($urandom);
      for (int b = 0; b < 128; b++) begin k[b] = 1'($urandom); v[b] = 1'($urandom); end
      #1;
      c.s = s; c.k = k; c.v = v;
      for (int r = 0; r < 256; r++) begin
        z[r] = krey_round(c);
        if (r == 0)   c1   = c;
        if (r == 199) c200 = c;
      end
      chk(so_a === c.s && ko_a === c.k && vo_a === c.v, "R256 red state", n);
      chk(ks_a === z, "R256 red ks", n);
      chk(so_b === c.s && ko_b === c.k && vo_b === c.v, "R256 plain state", n);
      chk(ks_b === z, "R256 plain ks", n);
      chk(so_c === c200.s && ko_c === c200.k && vo_c === c200.v, "R200 state", n);
      chk(ks_c === z[199:0], "R200 ks", n);
      chk(so_d === c1.s && ko_d === c1.k && vo_d === c1.v, "R1 state", n);
      chk(ks_d === z[0:0], "R1 ks", n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
