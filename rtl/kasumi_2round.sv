// kasumi_2round: four-step datapath for one odd/even pair of KASUMI rounds (steps K1..K4).
//
// An odd round computes FO(FL(L)), an even round FL(FO(L)). Written with 16-bit halves, the
// two FO functions of the pair contain six FI functions, and the data dependences allow them
// to be computed two at a time: (FO1.FI1, FO1.FI2), (FO1.FI3, FO2.FI1), (FO2.FI2, FO2.FI3).
// Each pair runs on one dual-port FI unit (kasumi_dpfi) with a latency of one cycle, and the
// final FL of the even round takes a fourth step:
//   K1: FL of the odd round, first FI pair        K3: third FI pair
//   K2: second FI pair                            K4: FL of the even round, L2 = L0 ^ FL, R2 = L1
// Interface: l0/r0 and the round keys are sampled combinationally. The block enters in K1;
// l2/r2 are valid combinationally during K4, four cycles after entry (registering them takes
// the fourth rising edge). rk_a holds the keys of the odd round, rk_b of the even round; each
// field is read in one step only, and needs to be valid only then:
//   K1: rk_a.kl1, kl2, ko1, ko2, ki1, ki2      K3: rk_b.ko2, ko3, ki2, ki3
//   K2: rk_a.ko3, ki3, rk_b.ko1, ki1           K4: rk_b.kl1, kl2
// The datapath has no control and no reset: a new block may enter every cycle (pipelined use)
// or every fourth cycle (iterative use); surrounding logic tracks which steps hold valid data.
// From the original design: the unfolded two-round datapath, the three dual-port FI units and
// the four pipeline steps. Chosen here: the exact per-step split of the XORs and the
// combinational output in K4.
module kasumi_2round
  import kasumi_pkg::*;
(
  input  logic        clk,
  input  logic [31:0] l0, r0,
  input  rkeys_t      rk_a, rk_b,
  output logic [31:0] l2, r2
);
  // ---------------- K1 ----------------
  logic [31:0] x1;
  word16_t fi1a, fi1b;
  assign x1 = fl(l0, rk_a.kl1, rk_a.kl2);

  kasumi_dpfi u_dpfi1 (.clk,
    .x_a(x1[31:16] ^ rk_a.ko1), .ki_a(rk_a.ki1),
    .x_b(x1[15:0]  ^ rk_a.ko2), .ki_b(rk_a.ki2),
    .fi_a(fi1a), .fi_b(fi1b));

  word16_t     s1_xlo;
  logic [31:0] s1_r0, s1_l0;
  always_ff @(posedge clk) begin
    s1_xlo <= x1[15:0];
    s1_r0  <= r0;
    s1_l0  <= l0;
  end

  // ---------------- K2 ----------------
  word16_t o1_r1, o1_r2, l1_hi;
  word16_t fi2a, fi2b;
  always_comb begin
    o1_r1 = fi1a ^ s1_xlo;            // FO1 round 1
    o1_r2 = fi1b ^ o1_r1;             // FO1 round 2
    l1_hi = s1_r0[31:16] ^ o1_r2;     // upper half of L1 = R0 ^ FO1
  end

  kasumi_dpfi u_dpfi2 (.clk,
    .x_a(o1_r1 ^ rk_a.ko3), .ki_a(rk_a.ki3),
    .x_b(l1_hi ^ rk_b.ko1), .ki_b(rk_b.ki1),
    .fi_a(fi2a), .fi_b(fi2b));

  word16_t     s2_r2, s2_l1hi, s2_r0lo;
  logic [31:0] s2_l0;
  always_ff @(posedge clk) begin
    s2_r2   <= o1_r2;
    s2_l1hi <= l1_hi;
    s2_r0lo <= s1_r0[15:0];
    s2_l0   <= s1_l0;
  end

  // ---------------- K3 ----------------
  word16_t o1_r3, l1_lo, o2_r1;
  word16_t fi3a, fi3b;
  always_comb begin
    o1_r3 = fi2a ^ s2_r2;             // FO1 round 3
    l1_lo = s2_r0lo ^ o1_r3;          // lower half of L1
    o2_r1 = fi2b ^ l1_lo;             // FO2 round 1
  end

  kasumi_dpfi u_dpfi3 (.clk,
    .x_a(l1_lo ^ rk_b.ko2), .ki_a(rk_b.ki2),
    .x_b(o2_r1 ^ rk_b.ko3), .ki_b(rk_b.ki3),
    .fi_a(fi3a), .fi_b(fi3b));

  word16_t     s3_r1;
  logic [31:0] s3_l1, s3_l0;
  always_ff @(posedge clk) begin
    s3_r1 <= o2_r1;
    s3_l1 <= {s2_l1hi, l1_lo};
    s3_l0 <= s2_l0;
  end

  // ---------------- K4 ----------------
  word16_t o2_r2, o2_r3;
  always_comb begin
    o2_r2 = fi3a ^ s3_r1;             // FO2 round 2
    o2_r3 = fi3b ^ o2_r2;             // FO2 round 3
    l2    = s3_l0 ^ fl({o2_r2, o2_r3}, rk_b.kl1, rk_b.kl2);
    r2    = s3_l1;
  end
endmodule
