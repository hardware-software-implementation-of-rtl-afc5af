// kasumi_pkg: types, constants and small pure functions shared by every KASUMI block.
//
// KASUMI works on 64-bit blocks with a 128-bit key split into eight 16-bit words K1..K8.
// The key schedule (Table 2.1 of the KASUMI description) is expressed here as functions of a
// key array and a constant array that have been rotated left by (round-1) words, so that every
// round uses the same index pattern: KL1 = K1<<<1, KL2 = K3', KO1 = K2<<<5, KO2 = K6<<<8,
// KO3 = K7<<<13, KI1 = K5', KI2 = K4', KI3 = K8', with Ki' = Ki ^ Ci.
// Word 1 of the arrays is element [0]. The constants C1..C8 are those of the KASUMI
// specification (0x0123, 0x4567, ..., 0x3210).
// From the original design: the KASUMI functions and key schedule themselves. Chosen here:
// splitting FI into the parts before and after each S-box layer.
package kasumi_pkg;

  typedef logic [15:0] word16_t;
  typedef word16_t     karr_t [8];   // K1..K8 (or C1..C8), element 0 is word 1

  // Round keys of one round.
  typedef struct packed {
    word16_t kl1, kl2;
    word16_t ko1, ko2, ko3;
    word16_t ki1, ki2, ki3;
  } rkeys_t;

  localparam word16_t KASUMI_C [8] = '{16'h0123, 16'h4567, 16'h89AB, 16'hCDEF,
                                       16'hFEDC, 16'hBA98, 16'h7654, 16'h3210};

  function automatic word16_t rol16(input word16_t x, input int unsigned n);
    return word16_t'((x << n) | (x >> (16 - n)));
  endfunction

  // Round keys of a round from key/constant arrays already rotated to that round.
  function automatic rkeys_t round_keys(input karr_t k, input karr_t c);
    rkeys_t r;
    r.kl1 = rol16(k[0], 1);
    r.kl2 = k[2] ^ c[2];
    r.ko1 = rol16(k[1], 5);
    r.ko2 = rol16(k[5], 8);
    r.ko3 = rol16(k[6], 13);
    r.ki1 = k[4] ^ c[4];
    r.ki2 = k[3] ^ c[3];
    r.ki3 = k[7] ^ c[7];
    return r;
  endfunction

  // Rotate an array left by n words (word n+1 becomes word 1).
  function automatic karr_t rot_arr(input karr_t a, input int unsigned n);
    karr_t r;
    for (int i = 0; i < 8; i++) r[i] = a[(i + n) % 8];
    return r;
  endfunction

  // 128-bit key <-> word array (K1 is the most significant word).
  function automatic karr_t key_to_arr(input logic [127:0] key);
    karr_t r;
    for (int i = 0; i < 8; i++) r[i] = key[127 - 16*i -: 16];
    return r;
  endfunction

  // FL function: 32-bit, AND/OR/rotate.
  function automatic logic [31:0] fl(input logic [31:0] x, input word16_t kl1, input word16_t kl2);
    word16_t l, r;
    l = x[31:16];
    r = x[15:0];
    r = r ^ rol16(l & kl1, 1);
    l = l ^ rol16(r | kl2, 1);
    return {l, r};
  endfunction

  // Pieces of the FI function around the S-boxes (the S-boxes themselves are ROMs).
  // First layer: n1 = S9(n0) ^ r0 ; r1 = S7(r0) ^ n1[6:0] ; then the subkey is mixed in.
  function automatic logic [15:0] fi_mid(input logic [8:0] s9o, input logic [6:0] s7o,
                                         input logic [6:0] r0, input word16_t ki);
    logic [8:0] n1;
    logic [6:0] r1;
    n1 = s9o ^ {2'b00, r0};
    r1 = s7o ^ n1[6:0];
    return {r1 ^ ki[15:9], n1 ^ ki[8:0]};   // {7-bit, 9-bit} addresses of the second layer
  endfunction

  // Second layer: n2 = S9(n1) ^ r1 ; r2 = S7(r1) ^ n2[6:0] ; FI = r2 || n2.
  function automatic logic [15:0] fi_out(input logic [8:0] s9o, input logic [6:0] s7o,
                                         input logic [6:0] r1);
    logic [8:0] n2;
    logic [6:0] r2;
    n2 = s9o ^ {2'b00, r1};
    r2 = s7o ^ n2[6:0];
    return {r2, n2};
  endfunction

endpackage
