// kasumi_reuse1: iterative KASUMI core that performs one round every two cycles with a single
// dual-port FI unit (16 cycles per block).
//
// The FO function (three chained FI functions) is done in two passes through one kasumi_dpfi:
//   phase 0: FI1 and FI2 of FO (independent of each other), after the odd round's FL
//   phase 1: FI3 of FO (the second port is idle)
// FI3's result appears in the next cycle, where the round is finished combinationally (even
// round: FL after FO; then L' = R ^ f, R' = L) and fed straight into phase 0 of the next round.
// Registers keep the round input (L, R) and the partial FO values across the two phases.
// Key schedule: a combinational one-round generator (kasumi_roundkeys) whose rotated arrays
// are fed back through registers that advance once per round, i.e. every second cycle; the KL
// subkeys of an even round are kept one more cycle for the FL that finishes it.
// Interface: start, in_block and in_key are taken when idle or in the last cycle of a block.
// done is high, and out_block valid, in the cycle after the 16th rising edge that followed
// the start edge; out_block then holds its value until the next result. Asynchronous
// active-low reset clears the control state only.
// From the original design: FO in two cycles on one dual-port FI unit, one round per two
// cycles, 16 cycles per block, a key scheduler clocked once per round. Chosen here: a clock
// enable in place of the divide-by-two clock, finishing each round at the start of the next,
// and the start/done handshake.
module kasumi_reuse1
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
  logic [3:0]  cnt;
  logic        take, last, ph, first, rnd_even;
  logic [31:0] in_l_q, in_r_q, l_hold, r_hold;
  word16_t     xlo_q, r2_q, kl1_q, kl2_q;
  karr_t       k_q, c_q, k_nx, c_nx;
  rkeys_t      rk;
  logic [63:0] out_q;
  logic [31:0] l_cur_fin;   // done cycle: the block's final L (l_cur already serves the next block)

  assign ph       = cnt[0];
  assign rnd_even = !cnt[1];            // 0-based round number even: an odd round (FL first)
  assign first    = busy && cnt == 4'd0;
  assign last     = busy && cnt == 4'd15;
  assign take     = start && (!busy || last);

  kasumi_roundkeys u_rk (.k_in(k_q), .c_in(c_q), .rk, .k_next(k_nx), .c_next(c_nx));

  // ---- finishing the previous round (or the block, in the done cycle)
  word16_t     fi_a, fi_b, r1, r2, r3;
  logic [31:0] fo, f_prev, l_cur, r_cur, x;
  logic        prev_fl;
  always_comb begin
    r3      = fi_a ^ r2_q;
    fo      = {r2_q, r3};
    prev_fl = done || rnd_even;         // the previous round was an even one
    f_prev  = prev_fl ? fl(fo, kl1_q, kl2_q) : fo;
    l_cur   = first ? in_l_q : (r_hold ^ f_prev);
    r_cur   = first ? in_r_q : l_hold;
    x       = rnd_even ? fl(l_cur, rk.kl1, rk.kl2) : l_cur;
    r1      = fi_a ^ xlo_q;
    r2      = fi_b ^ r1;
    l_cur_fin = r_hold ^ f_prev;
  end

  // ---- the shared dual-port FI
  word16_t xa, ka, xb, kb;
  always_comb begin
    if (!ph) begin
      xa = x[31:16] ^ rk.ko1;  ka = rk.ki1;
      xb = x[15:0]  ^ rk.ko2;  kb = rk.ki2;
    end else begin
      xa = r1 ^ rk.ko3;        ka = rk.ki3;
      xb = '0;                 kb = '0;
    end
  end
  kasumi_dpfi u_dpfi (.clk, .x_a(xa), .ki_a(ka), .x_b(xb), .ki_b(kb), .fi_a, .fi_b);

  // ---- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      done <= 1'b0;
    end else begin
      done <= last;
      if (take) begin
        busy <= 1'b1;
        cnt  <= '0;
      end else if (busy) begin
        busy <= !last;
        cnt  <= cnt + 4'd1;
      end
    end
  end

  // ---- data and key registers
  always_ff @(posedge clk) begin
    if (take) begin
      in_l_q <= in_block[63:32];
      in_r_q <= in_block[31:0];
    end
    if (busy && !ph) begin
      l_hold <= l_cur;
      r_hold <= r_cur;
      xlo_q  <= x[15:0];
    end
    if (busy && ph) begin
      r2_q  <= r2;
      kl1_q <= rk.kl1;
      kl2_q <= rk.kl2;
    end
    if (take) begin
      k_q <= key_to_arr(in_key);
      c_q <= KASUMI_C;
    end else if (busy && ph) begin
      k_q <= k_nx;
      c_q <= c_nx;
    end
    if (done) out_q <= {l_cur_fin, l_hold};
  end

  assign out_block = done ? {l_cur_fin, l_hold} : out_q;
endmodule
