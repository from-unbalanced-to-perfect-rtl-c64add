// tb_encrypt_1mbit -- the evaluation workload: encrypt 1 Mbit (2^20 bits)
// of pseudo-random plaintext with each cipher, on the top at its default
// sizes (Trivium 288 rounds/clock, Kreyvium 256 rounds/clock), consumer
// always ready.  Every ciphertext word is compared with plaintext XOR the
// bit-serial reference keystream, and the clock cycles from start to the
// last word are checked: Trivium 4 blank cycles + 3641 words, Kreyvium
// 4 blank cycles + 1 half word (128 bits) + 4096 words (the last one only
// partly needed).
module tb_encrypt_1mbit;
  import cipher_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  localparam int MBIT = 1 << 20;

  logic         t_start = 0, k_start = 0;
  logic [79:0]  t_key = 80'h0123_4567_89ab_cdef_0f1e, t_iv = 80'hfedc_ba98_7654_3210_a5c3;
  logic [127:0] k_key = 128'h0011_2233_4455_6677_8899_aabb_ccdd_eeff;
  logic [127:0] k_iv  = 128'h0f0e_0d0c_0b0a_0908_0706_0504_0302_0100;
  logic         t_valid, t_busy, k_valid, k_busy;
  logic [287:0] t_mask, t_ks;
  logic [255:0] k_mask, k_ks;

  stream_cipher_top dut (
    .clk_i(clk), .rst_ni(rst_n),
    .triv_start_i(t_start), .triv_key_i(t_key), .triv_iv_i(t_iv), .triv_ready_i(1'b1),
    .triv_valid_o(t_valid), .triv_mask_o(t_mask), .triv_ks_o(t_ks), .triv_busy_o(t_busy),
    .krey_start_i(k_start), .krey_key_i(k_key), .krey_iv_i(k_iv), .krey_ready_i(1'b1),
    .krey_valid_o(k_valid), .krey_mask_o(k_mask), .krey_ks_o(k_ks), .krey_busy_o(k_busy));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    triv_t tc;
    krey_t kc;
    int tbits, kbits, cyc, t_last, k_last, t_bad, k_bad;
    logic p, z;
    tc = triv_load(t_key, t_iv);
    for (int n = 0; n < 1152; n++) void'(triv_round(tc));
    kc = krey_load(k_key, k_iv);
    for (int n = 0; n < 1152; n++) void'(krey_round(kc));
    tbits = 0; kbits = 0; t_bad = 0; k_bad = 0; t_last = 0; k_last = 0;

    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); t_start = 1; k_start = 1;
    @(negedge clk); t_start = 0; k_start = 0;
    cyc = 1;
    while (tbits < MBIT || kbits < MBIT) begin
      if (t_valid && tbits < MBIT) begin
        for (int b = 0; b < 288 && tbits < MBIT; b++) begin
          p = 1'($urandom);
          z = triv_round(tc);
          if (!t_mask[b] || ((p ^ t_ks[b]) !== (p ^ z))) t_bad++;
          tbits++;
        end
        t_last = cyc;
      end
      if (k_valid && kbits < MBIT) begin
        for (int b = 0; b < 256 && kbits < MBIT; b++) begin
          if (k_mask[b]) begin
            p = 1'($urandom);
            z = krey_round(kc);
            if ((p ^ k_ks[b]) !== (p ^ z)) k_bad++;
            kbits++;
          end
        end
        k_last = cyc;
      end
      @(negedge clk); cyc++;
    end
    checks += 4;
    if (t_bad != 0) begin failures++; $display("Trivium: %0d wrong ciphertext bits", t_bad); end
    if (k_bad != 0) begin failures++; $display("Kreyvium: %0d wrong ciphertext bits", k_bad); end
    if (t_last != 4 + (MBIT + 287) / 288) begin failures++; $display("Trivium last word in cycle %0d", t_last); end
    if (k_last != 4 + 1 + (MBIT - 128 + 255) / 256) begin failures++; $display("Kreyvium last word in cycle %0d", k_last); end
    $display("1 Mbit: Trivium %0d cycles, Kreyvium %0d cycles", t_last, k_last);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
