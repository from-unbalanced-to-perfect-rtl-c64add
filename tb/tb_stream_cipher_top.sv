// tb_stream_cipher_top -- end-to-end test of both keystream generators at
// their default sizes (Trivium 288 rounds/clock, Kreyvium 256 rounds/clock,
// redundant design).  A second top built without redundant modules runs
// alongside: both must give identical outputs, and both must match the
// bit-serial reference.  The test drives, and counts, every mechanism of the
// design: initialisation cycles, Kreyvium's half-initialisation first word,
// consumer stalls, re-keying in the middle of initialisation and in the
// middle of the keystream, and checks the number of redundant modules.
module tb_stream_cipher_top;
  import cipher_ref_pkg::*;
  import stream_cipher_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic         t_start = 0, t_ready = 0, k_start = 0, k_ready = 0;
  logic [79:0]  t_key, t_iv;
  logic [127:0] k_key, k_iv;
  logic         t_valid, t_busy, k_valid, k_busy;
  logic [287:0] t_mask, t_ks;
  logic [255:0] k_mask, k_ks;
  logic         t_valid0, t_busy0, k_valid0, k_busy0;
  logic [287:0] t_mask0, t_ks0;
  logic [255:0] k_mask0, k_ks0;

  stream_cipher_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .triv_start_i(t_start), .triv_key_i(t_key), .triv_iv_i(t_iv), .triv_ready_i(t_ready),
    .triv_valid_o(t_valid), .triv_mask_o(t_mask), .triv_ks_o(t_ks), .triv_busy_o(t_busy),
    .krey_start_i(k_start), .krey_key_i(k_key), .krey_iv_i(k_iv), .krey_ready_i(k_ready),
    .krey_valid_o(k_valid), .krey_mask_o(k_mask), .krey_ks_o(k_ks), .krey_busy_o(k_busy));

  stream_cipher_top #(.REDUNDANT(1'b0)) plain (
    .clk_i(clk), .rst_ni(rst_n),
    .triv_start_i(t_start), .triv_key_i(t_key), .triv_iv_i(t_iv), .triv_ready_i(t_ready),
    .triv_valid_o(t_valid0), .triv_mask_o(t_mask0), .triv_ks_o(t_ks0), .triv_busy_o(t_busy0),
    .krey_start_i(k_start), .krey_key_i(k_key), .krey_iv_i(k_iv), .krey_ready_i(k_ready),
    .krey_valid_o(k_valid0), .krey_mask_o(k_mask0), .krey_ks_o(k_ks0), .krey_busy_o(k_busy0));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_init = 0, n_partial = 0, n_stall = 0, n_rekey_init = 0, n_rekey_run = 0;
  int n_tword = 0, n_kword = 0;

  triv_t tc;
  krey_t kc;

  initial begin
    logic [287:0] z;
    logic [255:0] zk;
    int kfirst;

    chk(redundant_count(288) > 0 && redundant_count(256) == redundant_count(288),
        "redundant modules present at both sizes");
    repeat (2) @(posedge clk);
    rst_n = 1;

    for (int session = 0; session < 4; session++) begin
      t_key = {$urandom, $urandom, $urandom}; t_iv = {$urandom, $urandom, $urandom};
      k_key = {$urandom, $urandom, $urandom, $urandom}; k_iv = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk); t_start = 1; k_start = 1;
      @(negedge clk); t_start = 0; k_start = 0;
      // Session 1: re-key two cycles into the initialisation.
      if (session == 1) begin
        @(negedge clk);
        #1 chk(t_busy && k_busy, "busy before re-key");
        t_key = ~t_key; k_key = ~k_key;
        t_start = 1; k_start = 1; n_rekey_init++;
        @(negedge clk); t_start = 0; k_start = 0;
      end
      tc = triv_load(t_key, t_iv);
      for (int n = 0; n < 1152; n++) void'(triv_round(tc));
      kc = krey_load(k_key, k_iv);
      for (int n = 0; n < 1024; n++) void'(krey_round(kc));
      kfirst = 1;
      for (int cyc = 1; cyc <= 40; cyc++) begin
        t_ready = (session == 3) ? 1'b1 : 1'($urandom % 3 != 0);
        k_ready = (session == 3) ? 1'b1 : 1'($urandom % 3 != 0);
        // Session 2: re-key in the middle of the keystream.
        if (session == 2 && cyc == 20) begin
          t_start = 1; k_start = 1; n_rekey_run++;
        end
        #1;
        chk(t_valid === t_valid0 && t_ks === t_ks0 && t_mask === t_mask0 &&
            k_valid === k_valid0 && k_ks === k_ks0 && k_mask === k_mask0,
            "redundant and plain circuits agree");
        if (t_start) break;
        if (t_busy) n_init++;
        if ((t_valid && !t_ready) || (k_valid && !k_ready)) n_stall++;
        chk(t_valid == (cyc >= 5), $sformatf("Trivium valid in cycle %0d", cyc));
        chk(k_valid == (cyc >= 5), $sformatf("Kreyvium valid in cycle %0d", cyc));
        if (t_valid && t_ready) begin
          for (int b = 0; b < 288; b++) z[b] = triv_round(tc);
          chk(t_ks === z && t_mask == '1, "Trivium word");
          n_tword++;
        end
        if (k_valid && k_ready) begin
          for (int b = 0; b < 256; b++) zk[b] = krey_round(kc);
          if (kfirst) begin
            chk(k_mask == {{128{1'b1}}, {128{1'b0}}}, "Kreyvium first-word mask");
            chk(k_ks[255:128] === zk[255:128], "Kreyvium first word");
            n_partial++;
            kfirst = 0;
          end else begin
            chk(k_ks === zk && k_mask == '1, "Kreyvium word");
          end
          n_kword++;
        end
        @(negedge clk);
      end
      if (t_start) begin
        @(negedge clk); t_start = 0; k_start = 0;
        session = 2;   // rerun the keystream check for the new key as session 3
        t_key = {$urandom, $urandom, $urandom};
      end
    end

    $display("mechanisms: init=%0d partial_first=%0d stall=%0d rekey_init=%0d rekey_run=%0d tw=%0d kw=%0d",
             n_init, n_partial, n_stall, n_rekey_init, n_rekey_run, n_tword, n_kword);
    chk(n_init > 0, "initialisation happened");
    chk(n_partial > 0, "partial first word happened");
    chk(n_stall > 0, "stall happened");
    chk(n_rekey_init > 0, "re-key during initialisation happened");
    chk(n_rekey_run > 0, "re-key during keystream happened");
    chk(n_tword > 0 && n_kword > 0, "keystream words produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
