// kasumi_keygen: key generation unit of the KASUMI functional unit.
//
// From the four 32-bit key words (registers 2..5, after forwarding) and the four constant
// words (registers 6..9) it produces the round keys of the two rounds that the next k2rnd
// performs: rk_a for the odd round and rk_b for the even one. The arrays in the registers are
// already rotated to the odd round (the register file rotates them by two words per k2rnd),
// so this is two chained one-round generators, the second fed with the arrays rotated by one
// word. Purely combinational; the results are registered in the decode/execute register.
// From the original design: a combinational unit that derives the round keys of two rounds from
// the key and constant registers. Chosen here: building it from two chained one-round
// generators.
module kasumi_keygen
  import kasumi_pkg::*;
(
  input  logic [31:0] key_w   [4],
  input  logic [31:0] const_w [4],
  output rkeys_t      rk_a,
  output rkeys_t      rk_b
);
  karr_t k0, c0, k1, c1, k2, c2;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      k0[2*i]   = key_w[i][31:16];
      k0[2*i+1] = key_w[i][15:0];
      c0[2*i]   = const_w[i][31:16];
      c0[2*i+1] = const_w[i][15:0];
    end
  end

  kasumi_roundkeys u_odd  (.k_in(k0), .c_in(c0), .rk(rk_a), .k_next(k1), .c_next(c1));
  kasumi_roundkeys u_even (.k_in(k1), .c_in(c1), .rk(rk_b), .k_next(k2), .c_next(c2));
endmodule
