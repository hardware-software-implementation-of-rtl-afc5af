// kasumi_reuse3: iterative KASUMI core built from one four-step two-round datapath.
//
// The two-round datapath (kasumi_2round) is used four times over, its L2||R2 output fed back
// to its input registers, so one block takes 16 cycles. The round keys come from the
// shift-register key scheduler (kasumi_keysched_shift), which must first be preloaded with the
// key and the constants (16 cycles, load_en/load_word); its arrays rotate every second cycle
// while a block is in flight:
//   cycles 1-2 of each pass: keys of the odd round, plus KO1/KI1 of the even round
//   cycles 3-4 of each pass: the remaining keys of the even round
// Interface: start (with in_block) is taken when the core is idle, or in the last cycle of a
// block, so blocks can follow each other every 16 cycles. out_block is registered and done
// pulses for one cycle 16 rising edges after the start edge. Asynchronous active-low reset
// clears the control state only.
// From the original design: one pipelined two-round datapath reused four times with
// multiplexers at its inputs, 16 cycles per block, and a preloaded shift-register key
// scheduler. Chosen here: the start/done handshake and the back-to-back start in the last
// cycle.
module kasumi_reuse3
  import kasumi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_en,
  input  word16_t     load_word,
  input  logic        start,
  input  logic [63:0] in_block,
  output logic        busy,
  output logic        done,
  output logic [63:0] out_block
);
  logic [3:0]  cnt;
  logic [31:0] l_q, r_q, l2, r2;
  rkeys_t      rk_cur, rk_nxt, rk_a, rk_b;
  logic        take, last;

  assign last = busy && (cnt == 4'd15);
  assign take = start && !load_en && (!busy || last);

  kasumi_keysched_shift u_ks (.clk, .load_en, .load_word,
                              .advance(busy && cnt[0]), .rk_cur, .rk_nxt);

  always_comb begin
    rk_a     = rk_cur;          // read in cycles 1-2 of a pass
    rk_b     = rk_cur;          // ko2/ko3/ki2/ki3/kl read in cycles 3-4 (arrays rotated)
    rk_b.ko1 = rk_nxt.ko1;      // read in cycle 2
    rk_b.ki1 = rk_nxt.ki1;
  end

  kasumi_2round u_dp (.clk, .l0(l_q), .r0(r_q), .rk_a, .rk_b, .l2, .r2);

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

  always_ff @(posedge clk) begin
    if (take) begin
      l_q <= in_block[63:32];
      r_q <= in_block[31:0];
    end else if (busy && cnt[1:0] == 2'd3) begin
      l_q <= l2;
      r_q <= r2;
    end
    if (last) out_block <= {l2, r2};
  end
endmodule
