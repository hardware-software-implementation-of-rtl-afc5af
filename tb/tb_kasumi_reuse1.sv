// tb_kasumi_reuse1: known-answer and random tests of the one-round-per-two-cycles KASUMI core.
// Blocks are started singly and back to back (a new start in the last cycle of the previous
// block); every result must appear exactly LAT=16 cycles after its start edge, and stay on
// out_block afterwards.
// Provenance: expected values come from the reference model or from the conformance vectors of
// the f8/f9 specification, and the cycle counts checked are those of the original design; the
// stimulus is chosen here.
module tb_kasumi_reuse1;
  import kasumi_ref_pkg::*;
  localparam int LAT = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         start = 0, busy, done;
  logic [63:0]  in_block, out_block;
  logic [127:0] in_key;
  int checks = 0, failures = 0, cyc = 0;

  kasumi_reuse1 dut (.clk, .rst_n, .start, .in_block, .in_key, .busy, .done, .out_block);

  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { logic [63:0] exp; int t; } ent_t;
  ent_t q [$];
  logic [63:0] last_out;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (done) begin
      ent_t e;
      checks += 2;
      if (q.size() == 0) begin failures++; $display("unexpected done"); end
      else begin
        e = q.pop_front();
        if (out_block !== e.exp) begin failures++; $display("mismatch %h exp %h", out_block, e.exp); end
        if (cyc - e.t != LAT) begin failures++; $display("latency %0d", cyc - e.t); end
        last_out = e.exp;
      end
    end else if (!busy && q.size() == 0 && cyc > 5) begin
      checks++;
      if (out_block !== last_out) begin failures++; $display("output not held"); end
    end
  end

  // start a block at the next edge
  task automatic go(input logic [127:0] k, input logic [63:0] b, input logic [63:0] e);
    start = 1; in_block = b; in_key = k;
    q.push_back('{exp: e, t: cyc + 1});
    @(posedge clk); #1;
    start = 0;
  endtask

  initial begin
    init();
    last_out = 'x;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NKAT; i++) begin
      go(KAT_KEY[i], KAT_IN[i], KAT_OUT[i]);
      repeat (LAT + 3) @(posedge clk);
      #1;
    end
    // back to back: each start lands in the last cycle of the previous block
    for (int i = 0; i < 8; i++) begin
      logic [127:0] k; logic [63:0] b;
      k = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom};
      go(k, b, kasumi(k, b));
      repeat (LAT - 1) @(posedge clk);
      #1;
    end
    repeat (LAT + 4) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
