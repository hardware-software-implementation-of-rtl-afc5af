// tb_kasumi_2round: checks the four-step two-round datapath against the reference model.
// Phase 1 feeds a new random block every cycle with a fixed key (pipelined use); phase 2
// changes the key for every block and feeds one block every four cycles (iterative use).
// Each result must appear during step K4, i.e. in the fourth cycle after entry.
// Provenance: expected values come from the reference model or from the conformance vectors of
// the f8/f9 specification, and the cycle counts checked are those of the original design; the
// stimulus is chosen here.
module tb_kasumi_2round;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] l0, r0, l2, r2;
  rkeys_t rk_a, rk_b;
  int checks = 0, failures = 0;

  kasumi_2round dut (.clk, .l0, .r0, .rk_a, .rk_b, .l2, .r2);

  logic [63:0] exp_q [$];
  logic [63:0] in_blk;
  logic [127:0] key;
  int pair;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(input logic [63:0] e);
    checks++;
    if ({l2, r2} !== e) begin
      failures++;
      $display("mismatch: got %h%h exp %h", l2, r2, e);
    end
  endtask

  initial begin
    init();
    key  = {$urandom, $urandom, $urandom, $urandom};
    pair = 1;
    rk_a = rkeys(key, 2*pair);
    rk_b = rkeys(key, 2*pair+1);
    // Phase 1: one block per cycle
    for (int n = 0; n < 40 + 3; n++) begin
      @(posedge clk); #1;
      in_blk = {$urandom, $urandom};
      l0 = in_blk[63:32]; r0 = in_blk[31:0];
      if (n < 40) exp_q.push_back(rounds(key, in_blk, 2*pair, 2*pair+1));
      @(negedge clk);
      if (n >= 3) check_out(exp_q.pop_front());
    end
    // Phase 2: one block every four cycles, new key and round pair each time
    for (int n = 0; n < 20; n++) begin
      @(posedge clk); #1;
      key  = {$urandom, $urandom, $urandom, $urandom};
      pair = n % 4;
      rk_a = rkeys(key, 2*pair);
      rk_b = rkeys(key, 2*pair+1);
      in_blk = {$urandom, $urandom};
      l0 = in_blk[63:32]; r0 = in_blk[31:0];
      repeat (3) @(posedge clk);
      @(negedge clk);
      check_out(rounds(key, in_blk, 2*pair, 2*pair+1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
