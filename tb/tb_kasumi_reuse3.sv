// tb_kasumi_reuse3: known-answer and random tests of the iterative two-round KASUMI core.
// For each key the scheduler is preloaded (16 cycles, K1..K8 then C1..C8), then several
// blocks are ciphered, some started back to back. Each result must appear 16 cycles after
// its start.
// Provenance: expected values come from the reference model or from the conformance vectors of
// the f8/f9 specification, and the cycle counts checked are those of the original design; the
// stimulus is chosen here.
module tb_kasumi_reuse3;
  import kasumi_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        load_en = 0, start = 0, busy, done;
  logic [15:0] load_word;
  logic [63:0] in_block, out_block;
  int checks = 0, failures = 0;

  kasumi_reuse3 dut (.clk, .rst_n, .load_en, .load_word, .start, .in_block, .busy, .done, .out_block);

  logic [15:0] C [8] = '{16'h0123, 16'h4567, 16'h89AB, 16'hCDEF, 16'hFEDC, 16'hBA98, 16'h7654, 16'h3210};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic preload(input logic [127:0] k);
    for (int i = 0; i < 16; i++) begin
      load_en = 1;
      load_word = (i < 8) ? k[127-16*i -: 16] : C[i-8];
      @(posedge clk); #1;
    end
    load_en = 0;
  endtask

  // Start nblk blocks back to back and check each one
  task automatic run(input logic [127:0] k, input logic [63:0] b0, input logic [63:0] e0, input int nblk);
    logic [63:0] b, e;
    int t;
    b = b0; e = e0;
    for (int n = 0; n < nblk; n++) begin
      if (n == 0) begin
        start = 1; in_block = b;
        @(posedge clk); #1;
        start = 0;
      end
      // else: this block was taken on the edge that ended the previous one
      t = 0;
      do begin
        if (t == 15 && n < nblk - 1) begin start = 1; in_block = b ^ 64'h1; end
        @(posedge clk); #1; t++;
        start = 0;
      end while (!done && t < 40);
      start = 0;
      checks += 2;
      if (out_block !== e) begin failures++; $display("mismatch %h exp %h", out_block, e); end
      if (t != 16) begin failures++; $display("latency %0d", t); end
      b = b ^ 64'h1;
      e = kasumi(k, b);
    end
    // the last back-to-back start above must be drained
    while (busy) @(posedge clk);
    #1;
  endtask

  initial begin
    init();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < NKAT; i++) begin
      preload(KAT_KEY[i]);
      run(KAT_KEY[i], KAT_IN[i], KAT_OUT[i], 1);
    end
    for (int i = 0; i < 4; i++) begin
      logic [127:0] k; logic [63:0] b;
      k = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom};
      preload(k);
      run(k, b, kasumi(k, b), 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
