// tb_unroll_sweep -- the degree-of-unrolling sweep: the same cores built for
// several R between the smallest tap and the full unrolling, each
// encrypting 16 kbit after initialisation, compared bit by bit with the
// bit-serial reference.  Covers R below, inside and above the range of
// rounds whose strands get redundant modules (67..111), and values of R
// that do not divide the 1152 initialisation rounds.
module tb_unroll_sweep;
  import cipher_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [79:0]  tkey = 80'h3c5a_9e01_77d2_4b86_e0f3, tiv = 80'h1234_5678_9abc_def0_1357;
  logic [127:0] kkey = 128'hdead_beef_0bad_f00d_1357_9bdf_2468_ace0;
  logic [127:0] kiv  = 128'h0102_0408_1020_4080_fedc_ba98_7654_3210;

  localparam int NBITS = 16384;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One Trivium and one Kreyvium core per R, each with its own checker.
  int done = 0;
  localparam int NR = 4;
  localparam int RS [NR] = '{25, 80, 150, 200};

  for (genvar g = 0; g < NR; g++) begin : g_r
    localparam int R = RS[g];
    logic         tv, tb_, kv, kb;
    logic [R-1:0] tm, tk, km, kk;

    trivium_core  #(.R(R)) u_t (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .key_i(tkey), .iv_i(tiv),
                                .ks_ready_i(1'b1), .ks_valid_o(tv), .ks_mask_o(tm), .ks_o(tk), .busy_o(tb_));
    kreyvium_core #(.R(R)) u_k (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .key_i(kkey), .iv_i(kiv),
                                .ks_ready_i(1'b1), .ks_valid_o(kv), .ks_mask_o(km), .ks_o(kk), .busy_o(kb));

    initial begin
      triv_t tc;
      krey_t kc;
      int tn, kn, tbad, kbad, cyc, tfirst, kfirst;
      tc = triv_load(tkey, tiv);
      for (int n = 0; n < 1152; n++) void'(triv_round(tc));
      kc = krey_load(kkey, kiv);
      for (int n = 0; n < 1152; n++) void'(krey_round(kc));
      tn = 0; kn = 0; tbad = 0; kbad = 0; tfirst = -1; kfirst = -1;
      @(negedge start);
      cyc = 1;
      while (tn < NBITS || kn < NBITS) begin
        if (tv && tfirst < 0) tfirst = cyc;
        if (kv && kfirst < 0) kfirst = cyc;
        if (tv) for (int b = 0; b < R; b++) if (tm[b] && tn < NBITS) begin
          if (tk[b] !== triv_round(tc)) tbad++;
          tn++;
        end
        if (kv) for (int b = 0; b < R; b++) if (km[b] && kn < NBITS) begin
          if (kk[b] !== krey_round(kc)) kbad++;
          kn++;
        end
        @(negedge clk); cyc++;
      end
      checks += 4;
      if (tbad != 0) begin failures++; $display("R=%0d Trivium: %0d wrong bits", R, tbad); end
      if (kbad != 0) begin failures++; $display("R=%0d Kreyvium: %0d wrong bits", R, kbad); end
      if (tfirst != 1152 / R + 1) begin failures++; $display("R=%0d Trivium first word cycle %0d", R, tfirst); end
      if (kfirst != 1152 / R + 1) begin failures++; $display("R=%0d Kreyvium first word cycle %0d", R, kfirst); end
      done++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done == NR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
