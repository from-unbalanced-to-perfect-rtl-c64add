// stream_cipher_top -- the two redundant-design keystream generators side by
// side: Trivium unrolled TRIV_R = 288 rounds per clock and Kreyvium unrolled
// KREY_R = 256 rounds per clock, the degrees of unrolling chosen as optimal
// for energy per encrypted bit.  The two share only clock and reset; each
// brings out its own start, key, IV and keystream handshake (see
// trivium_core and kreyvium_core for loading and timing).  REDUNDANT = 0
// builds the plain unrolled circuits for comparison; STYLE picks one of the
// two gate structures of the strand.
module stream_cipher_top #(
  parameter int unsigned TRIV_R    = 288,
  parameter int unsigned KREY_R    = 256,
  parameter bit          REDUNDANT = 1'b1,
  parameter int unsigned STYLE     = 0
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // Trivium
  input  logic              triv_start_i,
  input  logic [79:0]       triv_key_i,
  input  logic [79:0]       triv_iv_i,
  input  logic              triv_ready_i,
  output logic              triv_valid_o,
  output logic [TRIV_R-1:0] triv_mask_o,
  output logic [TRIV_R-1:0] triv_ks_o,
  output logic              triv_busy_o,
  // Kreyvium
  input  logic              krey_start_i,
  input  logic [127:0]      krey_key_i,
  input  logic [127:0]      krey_iv_i,
  input  logic              krey_ready_i,
  output logic              krey_valid_o,
  output logic [KREY_R-1:0] krey_mask_o,
  output logic [KREY_R-1:0] krey_ks_o,
  output logic              krey_busy_o
);

  trivium_core #(.R(TRIV_R), .REDUNDANT(REDUNDANT), .STYLE(STYLE)) u_trivium (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .start_i   (triv_start_i),
    .key_i     (triv_key_i),
    .iv_i      (triv_iv_i),
    .ks_ready_i(triv_ready_i),
    .ks_valid_o(triv_valid_o),
    .ks_mask_o (triv_mask_o),
    .ks_o      (triv_ks_o),
    .busy_o    (triv_busy_o)
  );

  kreyvium_core #(.R(KREY_R), .REDUNDANT(REDUNDANT), .STYLE(STYLE)) u_kreyvium (
    .clk_i     (clk_i),
    .rst_ni    (rst_ni),
    .start_i   (krey_start_i),
    .key_i     (krey_key_i),
    .iv_i      (krey_iv_i),
    .ks_ready_i(krey_ready_i),
    .ks_valid_o(krey_valid_o),
    .ks_mask_o (krey_mask_o),
    .ks_o      (krey_ks_o),
    .busy_o    (krey_busy_o)
  );

endmodule
