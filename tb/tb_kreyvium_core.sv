// tb_kreyvium_core -- loads random keys and IVs, runs the initialisation and
// compares the keystream with the bit-serial reference, at R = 256 (first
// word half initialisation, half keystream) and R = 96 (1152 = 12 x 96),
// with random consumer stalls.  Checks the first-word cycle and its mask.
module tb_kreyvium_core;
  import cipher_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, ready = 0;
  logic [127:0] key, iv;

  logic va_a, bz_a; logic [255:0] mk_a, ks_a;
  logic va_b, bz_b; logic [95:0]  mk_b, ks_b;

  kreyvium_core #(.R(256)) dut_a (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .key_i(key), .iv_i(iv),
                                  .ks_ready_i(ready), .ks_valid_o(va_a), .ks_mask_o(mk_a), .ks_o(ks_a), .busy_o(bz_a));
  kreyvium_core #(.R(96))  dut_b (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .key_i(key), .iv_i(iv),
                                  .ks_ready_i(ready), .ks_valid_o(va_b), .ks_mask_o(mk_b), .ks_o(ks_b), .busy_o(bz_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ref_z[n]: output bit n of round 1153 + n - OFF, i.e. indices below OFF
  // are initialisation rounds (not keystream).
  localparam int OFF = 128;
  logic ref_z [0:4095];
  int   pos_a, pos_b, first_a, first_b, cyc;

  task automatic make_ref();
    krey_t c;
    c = krey_load(key, iv);
    for (int n = 0; n < 1152 - OFF; n++) void'(krey_round(c));
    for (int n = 0; n < 4096; n++) ref_z[n] = krey_round(c);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 3; trial++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      iv  = {$urandom, $urandom, $urandom, $urandom};
      make_ref();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      pos_a = 0; pos_b = OFF; first_a = -1; first_b = -1; cyc = 1;
      while (pos_a < 2560 || pos_b < 960 + OFF) begin
        ready = ($urandom % 4) != 0;
        #1;
        if (va_a && first_a < 0) begin
          first_a = cyc;
          checks++;
          for (int b = 0; b < 256; b++)
            if (mk_a[b] != (b >= 128)) begin failures++; $display("R256 first mask bit %0d", b); break; end
        end
        if (va_b && first_b < 0) first_b = cyc;
        if (va_a && ready && pos_a < 2560) begin
          checks++;
          for (int b = 0; b < 256; b++)
            if (mk_a[b] && ks_a[b] !== ref_z[pos_a + b]) begin failures++; $display("R256 bit %0d", pos_a + b); break; end
          pos_a += 256;
        end
        if (va_b && ready && pos_b < 960 + OFF) begin
          checks++;
          for (int b = 0; b < 96; b++)
            if (ks_b[b] !== ref_z[pos_b + b] || !mk_b[b]) begin failures++; $display("R96 bit %0d", pos_b + b); break; end
          pos_b += 96;
        end
        @(negedge clk); cyc++;
      end
      checks += 2;
      if (first_a != 1152 / 256 + 1) begin failures++; $display("R256 first word at cycle %0d", first_a); end
      if (first_b != 1152 / 96 + 1)  begin failures++; $display("R96 first word at cycle %0d", first_b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
