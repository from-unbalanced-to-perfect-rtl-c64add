// cipher_ctrl -- sequencing of an R-round unrolled keystream generator.
//
// start_i (one cycle, any state) makes the core load key and IV into its
// state registers at that clock edge.  The cipher then needs INIT_ROUNDS
// blank rounds before its output is keystream.  The core advances R rounds
// per clock, so the controller spends floor(INIT_ROUNDS / R) cycles in INIT
// with step_o = 1 and no output.  If R does not divide INIT_ROUNDS, the
// first output word still holds INIT_ROUNDS mod R initialisation rounds:
// mask_o marks which of its bits are keystream (bit b is keystream when
// b >= INIT_ROUNDS mod R); every later word has mask_o all ones.
//
// In RUN, valid_o is high and the word is held until ready_i; step_o =
// ready_i, so a consumer that is not ready stalls the cipher.  Timing: after
// start_i in cycle 0, valid_o rises in cycle floor(INIT_ROUNDS / R) + 1.
// The sequencing is this design's own; the design description gives only the
// round counts.  The reset also disables the handshake assertion below,
// which a linter reports as a synchronous use of an asynchronous reset; it
// has no effect on the logic.
module cipher_ctrl
  import stream_cipher_pkg::*;
#(
  parameter int unsigned R           = 288,
  parameter int unsigned INIT_CYCLES = INIT_ROUNDS / R,
  parameter int unsigned FIRST_SKIP  = INIT_ROUNDS % R
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         start_i,   // load key/IV now and initialise
  input  logic         ready_i,   // consumer takes the current word
  output logic         load_o,    // state registers load key/IV this edge
  output logic         step_o,    // state registers take the next state
  output logic         valid_o,   // keystream word available
  output logic [R-1:0] mask_o,    // which bits of the word are keystream
  output logic         busy_o     // initialisation in progress
);

  localparam int unsigned CW = (INIT_CYCLES > 1) ? $clog2(INIT_CYCLES) : 1;

  ctrl_state_e     state_q;
  logic [CW-1:0]   cnt_q;
  logic            first_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= CTRL_IDLE;
      cnt_q   <= '0;
      first_q <= 1'b0;
    end else if (start_i) begin
      state_q <= (INIT_CYCLES == 0) ? CTRL_RUN : CTRL_INIT;
      cnt_q   <= '0;
      first_q <= 1'b1;
    end else begin
      case (state_q)
        CTRL_INIT: begin
          if (cnt_q == CW'(INIT_CYCLES - 1)) state_q <= CTRL_RUN;
          cnt_q <= cnt_q + 1'b1;
        end
        CTRL_RUN: if (ready_i) first_q <= 1'b0;
        default: ;
      endcase
    end
  end

  assign load_o  = start_i;
  assign busy_o  = (state_q == CTRL_INIT);
  assign valid_o = (state_q == CTRL_RUN);
  assign step_o  = !start_i && ((state_q == CTRL_INIT) || (valid_o && ready_i));

  for (genvar b = 0; b < int'(R); b++) begin : g_mask
    assign mask_o[b] = !first_q || (b >= int'(FIRST_SKIP));
  end

  // A word on offer stays on offer, unchanged, until it is taken.
  a_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
                           valid_o && !ready_i && !start_i |=> valid_o && $stable(mask_o));

endmodule
