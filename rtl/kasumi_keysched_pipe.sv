// kasumi_keysched_pipe: pipelined key scheduler for one two-round section of the pipelined
// KASUMI core.
//
// It follows its kasumi_2round datapath step by step and produces in each step only the
// subkeys that step consumes:
//   step 1: KL of the odd round, KO1/KO2 and KI1/KI2 of the odd round
//   step 2: KO3/KI3 of the odd round, KO1/KI1 of the even round
//   step 3: KO2/KO3 and KI2/KI3 of the even round
//   step 4: KL of the even round
// The key and constant arrays travel down a four-register pipeline beside the data, so
// sections for different blocks (and keys) work at the same time. At the end the arrays are
// rotated left by two words and registered, and feed the next section in step with its data.
// Interface: k_in/c_in valid in step 1; rk_a/rk_b fields valid in the step that uses them;
// k_out/c_out valid one cycle after step 4.
// From the original design: a key scheduler pipelined beside the datapath that computes per
// stage only the round keys that stage needs and passes the arrays on rotated two positions.
// Chosen here: the exact split of fields per step.
module kasumi_keysched_pipe
  import kasumi_pkg::*;
(
  input  logic   clk,
  input  karr_t  k_in,  c_in,
  output rkeys_t rk_a,  rk_b,
  output karr_t  k_out, c_out
);
  karr_t k1q, c1q, k2q, c2q, k3q, c3q;
  rkeys_t a0, a1, b1, b2, b3;

  always_ff @(posedge clk) begin
    k1q   <= k_in;               c1q   <= c_in;
    k2q   <= k1q;                c2q   <= c1q;
    k3q   <= k2q;                c3q   <= c2q;
    k_out <= rot_arr(k3q, 2);    c_out <= rot_arr(c3q, 2);
  end

  always_comb begin
    a0 = round_keys(k_in, c_in);                         // odd round, step 1
    a1 = round_keys(k1q, c1q);                           // odd round, step 2
    b1 = round_keys(rot_arr(k1q, 1), rot_arr(c1q, 1));   // even round, step 2
    b2 = round_keys(rot_arr(k2q, 1), rot_arr(c2q, 1));   // even round, step 3
    b3 = round_keys(rot_arr(k3q, 1), rot_arr(c3q, 1));   // even round, step 4

    rk_a     = a0;
    rk_a.ko3 = a1.ko3;
    rk_a.ki3 = a1.ki3;

    rk_b     = b2;                 // ko2, ko3, ki2, ki3 in step 3
    rk_b.ko1 = b1.ko1;
    rk_b.ki1 = b1.ki1;
    rk_b.kl1 = b3.kl1;
    rk_b.kl2 = b3.kl2;
  end
endmodule
