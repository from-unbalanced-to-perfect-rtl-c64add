// tb_trivium_core -- loads random keys and IVs, runs the initialisation and
// compares the keystream words with the bit-serial reference, at R = 288
// and R = 64, with random consumer stalls.  Checks that the first word is
// offered floor(1152 / R) + 1 cycles after start.
module tb_trivium_core;
  import cipher_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, ready = 0;
  logic [79:0] key, iv;

  logic va_a, bz_a; logic [287:0] mk_a, ks_a;
  logic va_b, bz_b; logic [63:0]  mk_b, ks_b;

  trivium_core #(.R(288)) dut_a (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .key_i(key), .iv_i(iv),
                                 .ks_ready_i(ready), .ks_valid_o(va_a), .ks_mask_o(mk_a), .ks_o(ks_a), .busy_o(bz_a));
  trivium_core #(.R(64))  dut_b (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .key_i(key), .iv_i(iv),
                                 .ks_ready_i(ready), .ks_valid_o(va_b), .ks_mask_o(mk_b), .ks_o(ks_b), .busy_o(bz_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference keystream of the current key: ref_z[n] = keystream bit n.
  logic ref_z [0:4095];
  int   pos_a, pos_b, first_a, first_b, cyc;

  task automatic make_ref();
    triv_t c;
    c = triv_load(key, iv);
    for (int n = 0; n < 1152; n++) void'(triv_round(c));
    for (int n = 0; n < 4096; n++) ref_z[n] = triv_round(c);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 3; trial++) begin
      key = {$urandom, $urandom, $urandom};
      iv  = {$urandom, $urandom, $urandom};
      if (trial == 0) begin key = '0; iv = '0; end
      make_ref();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      pos_a = 0; pos_b = 0; first_a = -1; first_b = -1; cyc = 1;
      while (pos_a < 2880 || pos_b < 640) begin
        ready = ($urandom % 4) != 0;
        #1;
        if (va_a && first_a < 0) first_a = cyc;
        if (va_b && first_b < 0) first_b = cyc;
        if (va_a && ready && pos_a < 2880) begin
          checks++;
          for (int b = 0; b < 288; b++)
            if (ks_a[b] !== ref_z[pos_a + b] || !mk_a[b]) begin failures++; $display("R288 bit %0d", pos_a + b); break; end
          pos_a += 288;
        end
        if (va_b && ready && pos_b < 640) begin
          checks++;
          for (int b = 0; b < 64; b++)
            if (ks_b[b] !== ref_z[pos_b + b] || !mk_b[b]) begin failures++; $display("R64 bit %0d", pos_b + b); break; end
          pos_b += 64;
        end
        @(negedge clk); cyc++;
      end
      checks += 2;
      if (first_a != 1152 / 288 + 1) begin failures++; $display("R288 first word at cycle %0d", first_a); end
      if (first_b != 1152 / 64 + 1)  begin failures++; $display("R64 first word at cycle %0d", first_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
