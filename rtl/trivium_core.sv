// trivium_core -- Trivium keystream generator, R rounds per clock, built
// from the redundant-design unrolled strand network.
//
// A 288-bit state register s feeds trivium_unrolled; each clock the register
// takes the state R rounds later, and the R keystream bits of those rounds
// are offered on ks_o (ks_o[0] first).  cipher_ctrl runs the 1152 blank
// initialisation rounds (4 clocks at R = 288) and the valid/ready handshake.
//
// Key/IV loading follows the Trivium specification with key bit K_n = key_i[n-1]
// and IV bit IV_n = iv_i[n-1]:
//   (s1..s93)    <- (K1..K80, 0..0)
//   (s94..s177)  <- (IV1..IV80, 0..0)
//   (s178..s288) <- (0..0, 1, 1, 1)
// The bit order of key_i and iv_i is this design's choice.
//
// Timing: start_i high for one cycle loads key/IV; ks_valid_o rises
// floor(1152 / R) + 1 cycles later; then one R-bit word per cycle while
// ks_ready_i is high.  ks_mask_o marks the keystream bits of the first word
// when R does not divide 1152 (all ones otherwise).  ks_o is combinational
// from the state register through the whole unrolled network.
module trivium_core
  import stream_cipher_pkg::*;
#(
  parameter int unsigned R         = 288,
  parameter bit          REDUNDANT = 1'b1,
  parameter int unsigned STYLE     = 0
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,
  input  logic [79:0]  key_i,
  input  logic [79:0]  iv_i,
  input  logic         ks_ready_i,
  output logic         ks_valid_o,
  output logic [R-1:0] ks_mask_o,
  output logic [R-1:0] ks_o,
  output logic         busy_o
);

  logic [STATE_BITS:1] s_q, s_next, s_load;
  logic                load, step;

  always_comb begin
    s_load          = '0;
    s_load[80:1]    = key_i;
    s_load[173:94]  = iv_i;
    s_load[288:286] = 3'b111;
  end

  trivium_unrolled #(.R(R), .REDUNDANT(REDUNDANT), .STYLE(STYLE)) u_unrolled (
    .s_i (s_q),
    .s_o (s_next),
    .ks_o(ks_o)
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
    if (!rst_ni)   s_q <= '0;
    else if (load) s_q <= s_load;
    else if (step) s_q <= s_next;
  end

endmodule
