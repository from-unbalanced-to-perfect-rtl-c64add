// kreyvium_core -- Kreyvium keystream generator, R rounds per clock, built
// from the redundant-design unrolled strand network.
//
// Besides the 288-bit state s it holds the rotating 128-bit registers K* and
// IV*.  Each clock kreyvium_unrolled advances all three by R rounds and
// offers the R keystream bits on ks_o (ks_o[0] first).  cipher_ctrl runs the
// 1152 blank initialisation rounds and the valid/ready handshake.  At the
// default R = 256, 1152 rounds are 4.5 clocks: the controller runs 4 blank
// clocks and the first word carries keystream only in bits 128..255
// (ks_mask_o), later words in all bits.
//
// Key/IV loading follows the Kreyvium specification with K_n = key_i[n],
// IV_n = iv_i[n] (n = 0..127):
//   (s1..s93)    <- (K0..K92)
//   (s94..s177)  <- (IV0..IV83)
//   (s178..s288) <- (IV84..IV127, 1..1, 0)
//   K*_b <- K_(127-b),  IV*_b <- IV_(127-b)
// Round k uses K*_0 and IV*_0, then both registers rotate one place towards
// bit 0.  The bit order of key_i and iv_i is this design's choice.
//
// Timing as trivium_core: ks_valid_o rises floor(1152 / R) + 1 cycles after
// start_i; one word per cycle while ks_ready_i is high.
module kreyvium_core
  import stream_cipher_pkg::*;
#(
  parameter int unsigned R         = 256,
  parameter bit          REDUNDANT = 1'b1,
  parameter int unsigned STYLE     = 0
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  logic [127:0] key_i,
  input  logic [127:0] iv_i,
  input  logic         ks_ready_i,
  output logic         ks_valid_o,
  output logic [R-1:0] ks_mask_o,
  output logic [R-1:0] ks_o,
  output logic         busy_o
);

  logic [STATE_BITS:1] s_q, s_next, s_load;
  logic [127:0]        k_q, k_next, k_load;
  logic [127:0]        v_q, v_next, v_load;
  logic                load, step;

  always_comb begin
    s_load          = '0;
    s_load[93:1]    = key_i[92:0];
    s_load[177:94]  = iv_i[83:0];
    s_load[221:178] = iv_i[127:84];
    s_load[287:222] = '1;
    s_load[288]     = 1'b0;
    for (int b = 0; b < 128; b++) begin
      k_load[b] = key_i[127-b];
      v_load[b] = iv_i[127-b];
    end
  end

  kreyvium_unrolled #(.R(R), .REDUNDANT(REDUNDANT), .STYLE(STYLE)) u_unrolled (
    .s_i     (s_q),
    .kstar_i (k_q),
    .ivstar_i(v_q),
    .s_o     (s_next),
    .kstar_o (k_next),
    .ivstar_o(v_next),
    .ks_o    (ks_o)
  );

  cipher_ctrl #(.R(R)) u_ctrl (
    .clk_i  (clk_i),
    .rst_ni (rst_ni),
    .start_i(start_i),
    .ready_i(ks_ready_i),
    .load_o (load),
    .step_o (step),
    .valid_o(ks_valid_o),
    .mask_o (ks_mask_o),
    .busy_o (busy_o)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      s_q <= '0;
      k_q <= '0;
      v_q <= '0;
    end else if (load) begin
      s_q <= s_load;
      k_q <= k_load;
      v_q <= v_load;
    end else if (step) begin
      s_q <= s_next;
      k_q <= k_next;
      v_q <= v_next;
    end
  end

endmodule
