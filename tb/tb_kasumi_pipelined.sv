// tb_kasumi_pipelined: known-answer and random tests of the pipelined KASUMI core.
// The five conformance-test blocks go in first, then random blocks with random keys, one per
// clock cycle with a few gaps. Each result must come out exactly 16 cycles after its block
// entered, and a full run of back-to-back blocks must come out back to back.
// Provenance: expected values come from the reference model or from the conformance vectors of
// the f8/f9 specification, and the cycle counts checked are those of the original design; the
// stimulus is chosen here.
module tb_kasumi_pipelined;
  import kasumi_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid = 0, out_valid;
  logic [63:0]  in_block, out_block;
  logic [127:0] in_key;
  int checks = 0, failures = 0, cyc = 0;

  kasumi_pipelined dut (.clk, .rst_n, .in_valid, .in_block, .in_key, .out_valid, .out_block);

  typedef struct { logic [63:0] exp; int t_in; } ent_t;
  ent_t q [$];
  int n_out = 0, max_run = 0, run = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      ent_t e;
      run++;
      if (run > max_run) max_run = run;
      checks += 2;
      if (q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = q.pop_front();
        if (out_block !== e.exp) begin
          failures++; $display("data mismatch: got %h exp %h", out_block, e.exp);
        end
        if (cyc - e.t_in != 16) begin
          failures++; $display("latency %0d, expected 16", cyc - e.t_in);
        end
      end
      n_out++;
    end else run = 0;
  end

  task automatic send(input logic [127:0] k, input logic [63:0] b, input logic [63:0] e);
    in_valid = 1; in_key = k; in_block = b;
    q.push_back('{exp: e, t_in: cyc + 1});
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  initial begin
    init();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NKAT; i++) send(KAT_KEY[i], KAT_IN[i], KAT_OUT[i]);
    repeat (3) @(posedge clk);
    #1;
    for (int i = 0; i < 60; i++) begin
      logic [127:0] k; logic [63:0] b;
      k = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom};
      send(k, b, kasumi(k, b));
      if (i % 25 == 24) begin @(posedge clk); #1; end
    end
    repeat (25) @(posedge clk);
    checks++;
    if (n_out != 65 || q.size() != 0) begin failures++; $display("count %0d", n_out); end
    checks++;
    if (max_run < 25) begin failures++; $display("throughput: longest run %0d", max_run); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
