// kasumi_keysched_shift: shift-register key scheduler of the iterative two-round KASUMI core.
//
// Two left-rotate registers hold the key array K1..K8 and the constant array C1..C8. Before
// any ciphering they are preloaded through one 16-bit port, one word per cycle: K1..K8 then
// C1..C8 (16 cycles), and again whenever the key changes. While ciphering, both arrays rotate
// left by one word when `advance` is high; the core raises it every second cycle, so each
// array position is held for two cycles. After eight rotations (one block) the arrays are
// back at their loaded value and the next block needs no reload.
// Outputs: rk_cur, the round keys of the round the arrays are rotated to, and rk_nxt, those of
// the following round (the core uses only its KO1 and KI1, needed one cycle early).
// load_en and advance are not expected together; load_en wins.
// From the original design: two left-rotate arrays preloaded in 16 cycles and advanced every
// two cycles. Chosen here: a shift-in preload port and a clock enable in place of the
// divide-by-two clock.
module kasumi_keysched_shift
  import kasumi_pkg::*;
(
  input  logic    clk,
  input  logic    load_en,
  input  word16_t load_word,
  input  logic    advance,
  output rkeys_t  rk_cur,
  output rkeys_t  rk_nxt
);
  karr_t k_q, c_q;

  always_ff @(posedge clk) begin
    if (load_en) begin
      for (int i = 0; i < 7; i++) begin
        k_q[i] <= k_q[i+1];
        c_q[i] <= c_q[i+1];
      end
      k_q[7] <= c_q[0];
      c_q[7] <= load_word;
    end else if (advance) begin
      k_q <= rot_arr(k_q, 1);
      c_q <= rot_arr(c_q, 1);
    end
  end

  always_comb begin
    rk_cur = round_keys(k_q, c_q);
    rk_nxt = round_keys(rot_arr(k_q, 1), rot_arr(c_q, 1));
  end
endmodule
