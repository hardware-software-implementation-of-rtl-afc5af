// kasumi_reuse2: iterative KASUMI core that performs two rounds every three cycles with a
// single dual-port FI unit (the "superFO" datapath, 12 cycles per block).
//
// The two FO functions of an odd/even round pair hold six FI functions. With the pair written
// in 16-bit halves, they can be done two at a time on one kasumi_dpfi:
//   phase 0: FL of the odd round; FO1.FI1 and FO1.FI2
//   phase 1: FO1.FI3 and FO2.FI1 (FO2's upper input half, L1hi = R0hi ^ FO1 out, is ready)
//   phase 2: FO2.FI2 and FO2.FI3
// The last FI pair appears in the next cycle, where the pair is finished combinationally
// (FL of the even round, L2 = L0 ^ FL, R2 = L1) and fed straight into phase 0 of the next pair.
// Key schedule: two chained one-round generators (kasumi_roundkeys) give the keys of both
// rounds of the pair; their arrays, rotated by two words, are fed back through registers
// that advance every third cycle. The KL subkeys of the even round are kept one more cycle.
// Interface: as kasumi_reuse1, with 12 instead of 16: start/in_block/in_key taken when idle
// or in the last cycle of a block; done (and out_block valid) in the cycle after the 12th
// rising edge following the start edge; out_block holds until the next result.
// From the original design: two rounds in three cycles on one dual-port FI unit, 12 cycles per
// block, a key scheduler advanced two positions every third cycle. Chosen here: a clock enable
// in place of the divide-by-three clock, the order of FI pairs and the start/done handshake.
module kasumi_reuse2
  import kasumi_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [63:0]  in_block,
  input  logic [127:0] in_key,
  output logic         busy,
  output logic         done,
  output logic [63:0]  out_block
);
  logic [1:0]  ph, pass;
  logic        take, last, first;
  logic [31:0] in_l_q, in_r_q, l_hold, r_hold, l1_q;
  word16_t     xlo_q, r2_q, l1hi_q, o2r1_q, kl1_q, kl2_q;
  karr_t       k_q, c_q, k_m, c_m, k_nx, c_nx;
  rkeys_t      rk_a, rk_b;
  logic [63:0] out_q;

  assign first = busy && ph == 2'd0 && pass == 2'd0;
  assign last  = busy && ph == 2'd2 && pass == 2'd3;
  assign take  = start && (!busy || last);

  kasumi_roundkeys u_rk_a (.k_in(k_q), .c_in(c_q), .rk(rk_a), .k_next(k_m),  .c_next(c_m));
  kasumi_roundkeys u_rk_b (.k_in(k_m), .c_in(c_m), .rk(rk_b), .k_next(k_nx), .c_next(c_nx));

  word16_t     fi_a, fi_b;
  word16_t     o2r2, o2r3, r1, r2, l1hi, r3, l1lo, o2r1;
  logic [31:0] f_prev, l_fin, l_cur, r_cur, x;
  always_comb begin
    // finish the previous pair (phase 0 of the next pair, or the done cycle)
    o2r2   = fi_a ^ o2r1_q;
    o2r3   = fi_b ^ o2r2;
    f_prev = fl({o2r2, o2r3}, kl1_q, kl2_q);
    l_fin  = l_hold ^ f_prev;
    l_cur  = first ? in_l_q : l_fin;
    r_cur  = first ? in_r_q : l1_q;
    x      = fl(l_cur, rk_a.kl1, rk_a.kl2);
    // phase 1
    r1     = fi_a ^ xlo_q;
    r2     = fi_b ^ r1;
    l1hi   = r_hold[31:16] ^ r2;
    // phase 2
    r3     = fi_a ^ r2_q;
    l1lo   = r_hold[15:0] ^ r3;
    o2r1   = fi_b ^ l1lo;
  end

  word16_t xa, ka, xb, kb;
  always_comb begin
    unique case (ph)
      2'd0:    begin xa = x[31:16] ^ rk_a.ko1; ka = rk_a.ki1; xb = x[15:0] ^ rk_a.ko2; kb = rk_a.ki2; end
      2'd1:    begin xa = r1 ^ rk_a.ko3;       ka = rk_a.ki3; xb = l1hi ^ rk_b.ko1;    kb = rk_b.ki1; end
      default: begin xa = l1lo ^ rk_b.ko2;     ka = rk_b.ki2; xb = o2r1 ^ rk_b.ko3;    kb = rk_b.ki3; end
    endcase
  end
  kasumi_dpfi u_dpfi (.clk, .x_a(xa), .ki_a(ka), .x_b(xb), .ki_b(kb), .fi_a, .fi_b);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      ph   <= '0;
      pass <= '0;
      done <= 1'b0;
    end else begin
      done <= last;
      if (take) begin
        busy <= 1'b1;
        ph   <= '0;
        pass <= '0;
      end else if (busy) begin
        busy <= !last;
        ph   <= (ph == 2'd2) ? 2'd0 : ph + 2'd1;
        if (ph == 2'd2) pass <= pass + 2'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      in_l_q <= in_block[63:32];
      in_r_q <= in_block[31:0];
    end
    if (busy) begin
      unique case (ph)
        2'd0: begin l_hold <= l_cur; r_hold <= r_cur; xlo_q <= x[15:0]; end
        2'd1: begin r2_q <= r2; l1hi_q <= l1hi; end
        default: begin
          o2r1_q <= o2r1;
          l1_q   <= {l1hi_q, l1lo};
          kl1_q  <= rk_b.kl1;
          kl2_q  <= rk_b.kl2;
        end
      endcase
    end
    if (take) begin
      k_q <= key_to_arr(in_key);
      c_q <= KASUMI_C;
    end else if (busy && ph == 2'd2) begin
      k_q <= k_nx;
      c_q <= c_nx;
    end
    if (done) out_q <= {l_fin, l1_q};
  end

  assign out_block = done ? {l_fin, l1_q} : out_q;
endmodule
