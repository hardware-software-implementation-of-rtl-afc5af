// kasumi_roundkeys: combinational KASUMI round-key generator for one round.
//
// Takes the key array K1..K8 and the constant array C1..C8, both already rotated to the
// current round, and produces that round's KL, KO and KI subkeys by the fixed index pattern of
// the key schedule (rotations of Ki and Ki ^ Ci). It also outputs both arrays rotated left by
// one word, which are the arrays of the next round: fed back through a register, or chained
// to a second instance, the same block serves every round. Purely combinational, no clock.
// From the original design: the round-key formulas and the arrays rotated by one position.
// Chosen here: nothing beyond the port names.
module kasumi_roundkeys
  import kasumi_pkg::*;
(
  input  karr_t  k_in,
  input  karr_t  c_in,
  output rkeys_t rk,
  output karr_t  k_next,
  output karr_t  c_next
);
  always_comb begin
    rk     = round_keys(k_in, c_in);
    k_next = rot_arr(k_in, 1);
    c_next = rot_arr(c_in, 1);
  end
endmodule
