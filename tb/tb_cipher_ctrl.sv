// tb_cipher_ctrl -- sequencing checks for three degrees of unrolling:
//   R = 288: 1152 = 4 x 288, four blank cycles, first word all keystream
//   R = 256: 1152 = 4.5 x 256, four blank cycles, first word half masked
//   R = 2048: no blank cycle, first word keystream from bit 1152 on
// Counts blank cycles, checks valid timing, the mask, stalls (step_o low
// while ready_i is low) and a restart in the middle of the initialisation.
module tb_cipher_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, ready = 0;

  logic         ld_a, st_a, va_a, bz_a;  logic [287:0]  mk_a;
  logic         ld_b, st_b, va_b, bz_b;  logic [255:0]  mk_b;
  logic         ld_c, st_c, va_c, bz_c;  logic [2047:0] mk_c;

  cipher_ctrl #(.R(288))  dut_a (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .ready_i(ready), .load_o(ld_a), .step_o(st_a), .valid_o(va_a), .mask_o(mk_a), .busy_o(bz_a));
  cipher_ctrl #(.R(256))  dut_b (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .ready_i(ready), .load_o(ld_b), .step_o(st_b), .valid_o(va_b), .mask_o(mk_b), .busy_o(bz_b));
  cipher_ctrl #(.R(2048)) dut_c (.clk_i(clk), .rst_ni(rst_n), .start_i(start), .ready_i(ready), .load_o(ld_c), .step_o(st_c), .valid_o(va_c), .mask_o(mk_c), .busy_o(bz_c));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected per-cycle behaviour, counted in cycles since the last start.
  initial begin
    int cyc;
    logic [255:0]  exp_b;
    logic [2047:0] exp_c;
    exp_b = '0; for (int b = 128; b < 256; b++) exp_b[b] = 1'b1;
    exp_c = '0; for (int b = 1152; b < 2048; b++) exp_c[b] = 1'b1;

    repeat (3) @(posedge clk);
    #1 chk(!va_a && !va_b && !va_c && !bz_a, "idle after reset");
    rst_n = 1;
    @(posedge clk); #1;
    chk(!va_a && !st_a && !st_b && !st_c, "idle before start");

    // Restart test: start, run two cycles, start again.
    start = 1; #1 chk(ld_a && ld_b && ld_c && !st_a, "load with start");
    @(posedge clk); #1 start = 0;
    @(posedge clk); #1;
    chk(bz_a && st_a, "initialising");
    start = 1;
    @(posedge clk); #1 start = 0;
    #1;

    // From here: cycle 1 after start.
    for (cyc = 1; cyc <= 4; cyc++) begin
      chk(bz_a && st_a && !va_a, $sformatf("R288 blank cycle %0d", cyc));
      chk(bz_b && st_b && !va_b, $sformatf("R256 blank cycle %0d", cyc));
      @(posedge clk); #1;
    end
    // cycle 5: R=288 and R=256 offer their first word; R=2048 has been in RUN.
    ready = 0;
    chk(va_a && mk_a == '1, "R288 first word valid, all keystream");
    chk(va_b && mk_b == exp_b, "R256 first word: bits 128..255 only");
    chk(va_c && mk_c == exp_c, "R2048 first word: bits 1152.. only");
    chk(!st_a && !st_b && !st_c, "stall: no step without ready");
    repeat (3) begin
      @(posedge clk); #1;
      chk(va_b && mk_b == exp_b && !st_b, "R256 held during stall");
    end
    ready = 1; #1;
    chk(st_a && st_b && st_c, "step with ready");
    @(posedge clk); #1;
    chk(va_a && mk_a == '1 && va_b && mk_b == '1 && mk_c == '1, "later words all keystream");
    repeat (5) begin
      @(posedge clk); #1;
      chk(va_b && st_b && mk_b == '1, "streaming");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
