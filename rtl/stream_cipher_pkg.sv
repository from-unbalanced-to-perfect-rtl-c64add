// stream_cipher_pkg -- shared constants, tap functions and the redundant-port
// search for the unrolled Trivium / Kreyvium keystream generators.
//
// Both ciphers update a 288-bit state through three strands per round.  In
// an r-round unrolled circuit the strand t_i(k) (round k = 1..r) reads five
// earlier values t_j(k - X): if k - X >= 1 that value is the output of an
// earlier strand, otherwise it is a state-register bit.  The tap functions below
// give X and j for every input port x1..x5 of every strand, in the port order
// x1 + x2 + (x3 * x4) + x5.
//
// port_needs_redundant() is the port search: for round k it counts the taps
// X with k > X (the ports fed by strands).  If some but not all ports are fed
// by strands, the strand tree is unbalanced, and every port with k <= X (fed
// straight from the register, hence early) is marked for a redundant module.
// The functions run at elaboration time and steer generate-if blocks.
//
// Strand indices are 0..2 for t1..t3 and port indices 0..4 for x1..x5.  The
// tap numbers follow the cipher equations; the 1152 initialisation rounds
// (4 x 288) and the key/IV sizes come from the Trivium and Kreyvium
// specifications.
package stream_cipher_pkg;

  localparam int unsigned STATE_BITS  = 288;
  localparam int unsigned INIT_ROUNDS = 1152;
  localparam int unsigned NPORTS      = 5;

  // tap(i,p): tap location X of port p of strand t_(i+1).
  //   t1 = t3(k-66) + t3(k-93) + t3(k-91) t3(k-92) + t1(k-78)
  //   t2 = t1(k-69) + t1(k-84) + t1(k-82) t1(k-83) + t2(k-87)
  //   t3 = t2(k-66) + t2(k-111) + t2(k-109) t2(k-110) + t3(k-69)
  function automatic int tap(input int i, input int p);
    case (i)
      0:       return (p == 0) ? 66 : (p == 1) ?  93 : (p == 2) ?  91 : (p == 3) ?  92 : 78;
      1:       return (p == 0) ? 69 : (p == 1) ?  84 : (p == 2) ?  82 : (p == 3) ?  83 : 87;
      default: return (p == 0) ? 66 : (p == 1) ? 111 : (p == 2) ? 109 : (p == 3) ? 110 : 69;
    endcase
  endfunction

  // src(i,p): which strand's history (0..2 = t1..t3) port p of t_(i+1) reads.
  function automatic int src(input int i, input int p);
    case (i)
      0:       return (p == 4) ? 0 : 2;
      1:       return (p == 4) ? 1 : 0;
      default: return (p == 4) ? 2 : 1;
    endcase
  endfunction

  // base(j): t_(j+1)(m) = s_(base(j)-m) for m <= 0, i.e. the register bit
  // that holds the value strand j produced -m rounds before round 1.
  function automatic int base(input int j);
    return (j == 0) ? 94 : (j == 1) ? 178 : 1;
  endfunction

  // Keystream: z(k) is the XOR of six history values t_(zsrc(q)+1)(k - ztap(q)),
  // i.e. s66 + s93 + s162 + s177 + s243 + s288 of the state before round k.
  function automatic int zsrc(input int q);
    return (q < 2) ? 2 : (q < 4) ? 0 : 1;
  endfunction
  function automatic int ztap(input int q);
    case (q)
      0: return 66;  1: return 93;  2: return 69;
      3: return 84;  4: return 66;  default: return 111;
    endcase
  endfunction

  // Strand whose history register bit n (1..288) holds.
  function automatic int owner(input int n);
    return (n <= 93) ? 2 : (n <= 177) ? 0 : 1;
  endfunction

  // Controller states.
  typedef enum logic [1:0] {
    CTRL_IDLE = 2'd0,   // no key loaded, nothing valid
    CTRL_INIT = 2'd1,   // blank initialisation rounds, no output
    CTRL_RUN  = 2'd2    // keystream offered with valid/ready
  } ctrl_state_e;

  // Register bit read when strand src's value from m <= 0 rounds is needed.
  function automatic int state_bit(input int j, input int m);
    return base(j) - m;
  endfunction

  // Port search for one round k of strand i: is port p to be driven through
  // a redundant module?
  function automatic bit port_needs_redundant(input int i, input int k, input int p);
    int w;
    w = 0;
    for (int q = 0; q < int'(NPORTS); q++)
      if (k > tap(i, q)) w++;
    return (w != 0) && (w != int'(NPORTS)) && (k <= tap(i, p));
  endfunction

  // Number of redundant modules an r-round unrolled circuit holds.
  function automatic int redundant_count(input int r);
    int n;
    n = 0;
    for (int k = 1; k <= r; k++)
      for (int i = 0; i < 3; i++)
        for (int p = 0; p < int'(NPORTS); p++)
          if (port_needs_redundant(i, k, p)) n++;
    return n;
  endfunction

endpackage
