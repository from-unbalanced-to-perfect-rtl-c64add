// kreyvium_unrolled -- R rounds of the Kreyvium state update as one
// combinational network of circuit strands, with redundant modules.
//
// Kreyvium has the Trivium state and taps and two extra 128-bit registers,
// K* and IV*, that rotate by one bit per round.  In round k the strand t1
// also adds IV*[(k-1) mod 128] and t3 adds K*[(k-1) mod 128], so those two
// strands are six-input kreyvium_strand modules and t2 is a five-input
// trivium_strand.  The keystream bit of round k is
// s66 + s93 + s162 + s177 + s243 + s288 + K*[(k-1) mod 128].
// As in trivium_unrolled, every register-fed state input selected by
// stream_cipher_pkg::port_needs_redundant() goes through a redundant_module
// when REDUNDANT = 1.  The port search looks at the five state taps only; the
// K*/IV* bit is taken straight from its register (the design description
// does not say how it is treated).
//
// Interface: s_i[n] = s_n, kstar_i[b] = K*_b, ivstar_i[b] = IV*_b.  s_o,
// kstar_o and ivstar_o are the values after R rounds (K*, IV* rotated by
// R mod 128 places).  ks_o[k-1] is the keystream bit of round k.  Purely
// combinational.
module kreyvium_unrolled
  import stream_cipher_pkg::*;
#(
  parameter int unsigned R         = 256,
  parameter bit          REDUNDANT = 1'b1,
  parameter int unsigned STYLE     = 0
) (
  input  logic [STATE_BITS:1] s_i,
  input  logic [127:0]        kstar_i,
  input  logic [127:0]        ivstar_i,
  output logic [STATE_BITS:1] s_o,
  output logic [127:0]        kstar_o,
  output logic [127:0]        ivstar_o,
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

      if (i == 1) begin : g_plain
        trivium_strand #(.STYLE(STYLE)) u_strand (
          .x1_i(x[0]), .x2_i(x[1]), .x3_i(x[2]), .x4_i(x[3]), .x5_i(x[4]),
          .y_o (t[i])
        );
      end else begin : g_keyed
        kreyvium_strand #(.STYLE(STYLE)) u_strand (
          .x1_i(x[0]), .x2_i(x[1]), .x3_i(x[2]), .x4_i(x[3]), .x5_i(x[4]),
          .x6_i((i == 0) ? ivstar_i[(k-1) % 128] : kstar_i[(k-1) % 128]),
          .y_o (t[i])
        );
      end
    end

    // Keystream bit of round k: XOR of six history values and K*.
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
    assign ks_o[k-1] = (^zt) ^ kstar_i[(k-1) % 128];
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

  // K* and IV* after R one-place rotations: bit b takes bit (b + R) mod 128.
  for (genvar b = 0; b < 128; b++) begin : g_rot
    assign kstar_o[b]  = kstar_i[(b + int'(R)) % 128];
    assign ivstar_o[b] = ivstar_i[(b + int'(R)) % 128];
  end

endmodule
