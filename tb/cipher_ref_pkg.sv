// cipher_ref_pkg -- bit-serial reference models of Trivium and Kreyvium for
// the testbenches.  They follow the cipher specifications round by round
// (one state shift per call) and share nothing with the unrolled RTL.
package cipher_ref_pkg;

  typedef struct {
    logic [288:1] s;
  } triv_t;

  typedef struct {
    logic [288:1] s;
    logic [127:0] k;   // K*, bit 0 used next
    logic [127:0] v;   // IV*, bit 0 used next
  } krey_t;

  function automatic triv_t triv_load(input logic [79:0] key, input logic [79:0] iv);
    triv_t c;
    c.s = '0;
    for (int n = 1; n <= 80; n++) begin
      c.s[n]      = key[n-1];
      c.s[93 + n] = iv[n-1];
    end
    c.s[286] = 1'b1;
    c.s[287] = 1'b1;
    c.s[288] = 1'b1;
    return c;
  endfunction

  // One round; returns the keystream bit of the round.
  function automatic logic triv_round(ref triv_t c);
    logic t1, t2, t3, z;
    t1 = c.s[66] ^ c.s[93];
    t2 = c.s[162] ^ c.s[177];
    t3 = c.s[243] ^ c.s[288];
    z  = t1 ^ t2 ^ t3;
    t1 = t1 ^ (c.s[91] & c.s[92]) ^ c.s[171];
    t2 = t2 ^ (c.s[175] & c.s[176]) ^ c.s[264];
    t3 = t3 ^ (c.s[286] & c.s[287]) ^ c.s[69];
    c.s = {c.s[287:178], t2, c.s[176:94], t1, c.s[92:1], t3};
    return z;
  endfunction

  function automatic krey_t krey_load(input logic [127:0] key, input logic [127:0] iv);
    krey_t c;
    for (int n = 0; n < 93; n++)  c.s[1 + n]   = key[n];
    for (int n = 0; n < 84; n++)  c.s[94 + n]  = iv[n];
    for (int n = 84; n < 128; n++) c.s[94 + n] = iv[n];   // s178..s221
    for (int n = 222; n <= 287; n++) c.s[n] = 1'b1;
    c.s[288] = 1'b0;
    for (int b = 0; b < 128; b++) begin
      c.k[b] = key[127 - b];
      c.v[b] = iv[127 - b];
    end
    return c;
  endfunction

  function automatic logic krey_round(ref krey_t c);
    logic t1, t2, t3, z;
    t1 = c.s[66] ^ c.s[93];
    t2 = c.s[162] ^ c.s[177];
    t3 = c.s[243] ^ c.s[288] ^ c.k[0];
    z  = t1 ^ t2 ^ t3;
    t1 = t1 ^ (c.s[91] & c.s[92]) ^ c.s[171] ^ c.v[0];
    t2 = t2 ^ (c.s[175] & c.s[176]) ^ c.s[264];
    t3 = t3 ^ (c.s[286] & c.s[287]) ^ c.s[69];
    c.s = {c.s[287:178], t2, c.s[176:94], t1, c.s[92:1], t3};
    c.k = {c.k[0], c.k[127:1]};
    c.v = {c.v[0], c.v[127:1]};
    return z;
  endfunction

endpackage
