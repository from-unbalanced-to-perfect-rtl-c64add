// trivium_unrolled -- R rounds of the Trivium state update as one
// combinational network of circuit strands, with redundant modules.
//
// Round k (1..R) holds the three strands t1(k), t2(k), t3(k).  Each strand
// input is either the output of a strand of an earlier round of this network
// (when the tap reaches back less than k rounds) or a bit of the incoming
// state s_i.  With REDUNDANT = 1, every register-fed input that
// stream_cipher_pkg::port_needs_redundant() selects -- the early inputs of
// strands whose other inputs come from strands -- is routed through a
// redundant_module, so all inputs of that strand arrive after one strand
// delay.  REDUNDANT = 0 gives the plain unrolled circuit, with the same
// logic function.
//
// Interface: s_i[n] is state bit s_n (n = 1..288).  s_o is the state after
// R rounds.  ks_o[k-1] is the keystream bit of round k, i.e. the first
// keystream bit is ks_o[0].  Purely combinational: one call of this network
// per clock advances the cipher by R rounds.
//
// The tap structure follows the Trivium equations; the routing through
// redundant modules follows the port search.  Naming each round's outputs in
// its own generate scope keeps the simulator from seeing false loops.
module trivium_unrolled
  import stream_cipher_pkg::*;
#(
  parameter int unsigned R         = 288,
  parameter bit          REDUNDANT = 1'b1,
  parameter int unsigned STYLE     = 0
) (
  input  logic [STATE_BITS:1] s_i,
  output logic [STATE_BITS:1] s_o,
  output logic [R-1:0]        ks_o
);

  for (genvar k = 1; k <= int'(R); k++) begin : g_round
    wire [2:0] t;                       // t[i] = t_(i+1)(k)

    for (genvar i = 0; i < 3; i++) begin : g_strand
      wire [NPORTS-1:0] x;

      for (genvar p = 0; p < int'(NPORTS); p++) begin : g_port
        localparam int X = tap(i, p);
        localparam int J = src(i, p);
        if (k - X >= 1) begin : g_from_strand
          assign x[p] = g_round[k-X].t[J];
        end else if (REDUNDANT && port_needs_redundant(i, k, p)) begin : g_redundant
          redundant_module #(.STYLE(STYLE)) u_red (
            .s_i(s_i[state_bit(J, k - X)]),
            .y_o(x[p])
          );
        end else begin : g_from_reg
          assign x[p] = s_i[state_bit(J, k - X)];
        end
      end

      trivium_strand #(.STYLE(STYLE)) u_strand (
        .x1_i(x[0]), .x2_i(x[1]), .x3_i(x[2]), .x4_i(x[3]), .x5_i(x[4]),
        .y_o (t[i])
      );
    end

    // Keystream bit of round k: XOR of six history values.
    wire [5:0] zt;
    for (genvar q = 0; q < 6; q++) begin : g_zterm
      localparam int X = ztap(q);
      localparam int J = zsrc(q);
      if (k - X >= 1) begin : g_from_strand
        assign zt[q] = g_round[k-X].t[J];
      end else begin : g_from_reg
        assign zt[q] = s_i[state_bit(J, k - X)];
      end
    end
    assign ks_o[k-1] = ^zt;
  end

  // Next state: register bit n holds the value its strand produced
  // base(j) - n rounds before the end of this network.
  for (genvar n = 1; n <= int'(STATE_BITS); n++) begin : g_next
    localparam int J = owner(n);
    localparam int M = int'(R) + base(J) - n;     // round index that lands in s_n
    if (M >= 1) begin : g_from_strand
      assign s_o[n] = g_round[M].t[J];
    end else begin : g_from_reg
      assign s_o[n] = s_i[state_bit(J, M)];
    end
  end

endmodule
