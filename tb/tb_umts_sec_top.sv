// tb_umts_sec_top: end-to-end test of the whole design at its default parameters.
// While the four stand-alone KASUMI cores encrypt known-answer and random blocks, the extended
// processor runs the f8 keystream program of Test Set 3 and then the f9 MAC program of Test
// Set 1 (reset between them through cpu_rst_n, the other cores keep running). Every result is
// compared with the reference model, every latency with the core's figure (16, 12, 16 and 16
// cycles), and the processor's block writes and final registers with the conformance values.
// Each mechanism is counted and must occur at least once: the ten processor pipeline events,
// completed blocks of each core, the key preload of core 3, back-to-back starts of the three
// iterative cores, one-block-per-cycle streaming and a key change on every block of the
// pipelined core.
// Provenance: expected values come from the reference model or from the conformance vectors of
// the f8/f9 specification, and the cycle counts checked are those of the original design; the
// stimulus is chosen here.
module tb_umts_sec_top;
  import kasumi_pkg::*;
  import myrisc_pkg::*;
  import myrisc_asm_pkg::*;
  import kasumi_ref_pkg::*;

  logic clk = 0, rst_n = 1, cpu_rst_n = 0;
  always #5 clk = ~clk;

  logic         imem_we = 0;
  logic [9:0]   imem_addr = 0;
  logic [31:0]  imem_wdata = 0, dbg_reg_data, pc;
  logic [4:0]   dbg_reg_addr = 0;
  logic [31:0]  kregs [10];
  events_t      ev;
  logic         r1_start = 0, r1_busy, r1_done;
  logic [63:0]  r1_in_block = 0, r1_out_block;
  logic [127:0] r1_in_key = 0;
  logic         r2_start = 0, r2_busy, r2_done;
  logic [63:0]  r2_in_block = 0, r2_out_block;
  logic [127:0] r2_in_key = 0;
  logic         r3_load_en = 0, r3_start = 0, r3_busy, r3_done;
  logic [15:0]  r3_load_word = 0;
  logic [63:0]  r3_in_block = 0, r3_out_block;
  logic         p_in_valid = 0, p_out_valid;
  logic [63:0]  p_in_block = 0, p_out_block;
  logic [127:0] p_in_key = 0;

  umts_sec_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  // ---------------- scoreboards of the stand-alone cores
  typedef struct { logic [63:0] exp; int t; } ent_t;
  ent_t q1 [$], q2 [$], q3 [$], qp [$];
  // mechanism counters
  int n_done1 = 0, n_done2 = 0, n_done3 = 0, n_pipe = 0, n_preload = 0;
  int n_b2b1 = 0, n_b2b2 = 0, n_b2b3 = 0, n_stream = 0, n_keychg = 0;
  int n_ev [10];

  task automatic score(input string who, ref ent_t q [$], input logic [63:0] got, input int lat);
    ent_t e;
    checks += 2;
    if (q.size() == 0) begin failures++; $display("%s: unexpected result", who); return; end
    e = q.pop_front();
    if (got !== e.exp) begin failures++; $display("%s: got %h exp %h", who, got, e.exp); end
    if (cyc - e.t != lat) begin failures++; $display("%s: latency %0d", who, cyc - e.t); end
  endtask

  logic p_prev_valid = 0;
  logic [127:0] p_prev_key = 0;
  always @(negedge clk) if (rst_n) begin
    if (r1_done) begin score("reuse1", q1, r1_out_block, 16); n_done1++; end
    if (r2_done) begin score("reuse2", q2, r2_out_block, 12); n_done2++; end
    if (r3_done) begin score("reuse3", q3, r3_out_block, 16); n_done3++; end
    if (p_out_valid) begin
      score("pipelined", qp, p_out_block, 16); n_pipe++;
      if (p_prev_valid) n_stream++;
    end
    p_prev_valid = p_out_valid;
  end
  always @(posedge clk) if (rst_n && p_in_valid) begin
    if (p_in_key != p_prev_key) n_keychg++;
    p_prev_key <= p_in_key;
  end

  // ---------------- drivers of the stand-alone cores
  function automatic logic [127:0] rkey();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
  function automatic logic [63:0] rblk();
    return {$urandom, $urandom};
  endfunction

  // core 1 and core 2: known answers one at a time, then random blocks back to back
  task automatic drive12(input int which, input int lat, input int nrand);
    for (int i = 0; i < NKAT + nrand; i++) begin
      logic [127:0] k; logic [63:0] b;
      k = (i < NKAT) ? KAT_KEY[i] : rkey();
      b = (i < NKAT) ? KAT_IN[i] : rblk();
      if (which == 1) begin
        if (r1_busy) n_b2b1++;
        r1_start = 1; r1_in_key = k; r1_in_block = b; q1.push_back('{kasumi(k, b), cyc + 1});
      end else begin
        if (r2_busy) n_b2b2++;
        r2_start = 1; r2_in_key = k; r2_in_block = b; q2.push_back('{kasumi(k, b), cyc + 1});
      end
      @(posedge clk); #1;
      r1_start = (which == 1) ? 0 : r1_start;
      r2_start = (which == 2) ? 0 : r2_start;
      repeat ((i < NKAT) ? lat + 2 : lat - 1) @(posedge clk);
      #1;
    end
  endtask

  // core 3: preload the key schedule, then a few blocks back to back under that key
  task automatic drive3(input logic [127:0] k, input logic [63:0] b0, input int nblk);
    logic [63:0] b;
    for (int i = 0; i < 16; i++) begin
      r3_load_en = 1;
      r3_load_word = (i < 8) ? k[127-16*i -: 16] : KASUMI_C[i-8];
      @(posedge clk); #1;
    end
    r3_load_en = 0;
    n_preload++;
    b = b0;
    for (int n = 0; n < nblk; n++) begin
      if (r3_busy) n_b2b3++;
      r3_start = 1; r3_in_block = b; q3.push_back('{kasumi(k, b), cyc + 1});
      @(posedge clk); #1;
      r3_start = 0;
      repeat (15) @(posedge clk);
      #1;
      b = rblk();
    end
    repeat (4) @(posedge clk);
    #1;
  endtask

  // pipelined core: a new block and a new key on every cycle
  task automatic drivep(input int n);
    for (int i = 0; i < n; i++) begin
      logic [127:0] k; logic [63:0] b;
      k = (i < NKAT) ? KAT_KEY[i] : rkey();
      b = (i < NKAT) ? KAT_IN[i] : rblk();
      p_in_valid = 1; p_in_key = k; p_in_block = b;
      qp.push_back('{kasumi(k, b), cyc + 1});
      @(posedge clk); #1;
    end
    p_in_valid = 0;
  endtask

  // ---------------- processor
  logic [63:0] cpu_blocks [$];
  int blk_t [$];
  always @(negedge clk) if (rst_n && cpu_rst_n) begin
    if (ev.k2rnd_issue)  n_ev[0]++;
    if (ev.k2rnd_stall)  n_ev[1]++;
    if (ev.kfwd_int)     n_ev[2]++;
    if (ev.kfwd_k)       n_ev[3]++;
    if (ev.key_rotate)   n_ev[4]++;
    if (ev.blk_write)    begin n_ev[5]++; blk_t.push_back(cyc); end
    if (ev.false_hazard) n_ev[6]++;
    if (ev.int_fwd)      n_ev[7]++;
    if (ev.load_stall)   n_ev[8]++;
    if (ev.branch_taken) n_ev[9]++;
  end
  // a block written by the unit is visible in registers 0/1 from the following cycle
  always @(negedge clk) if (cpu_rst_n && blk_t.size() > cpu_blocks.size() && cyc > blk_t[cpu_blocks.size()])
    cpu_blocks.push_back({kregs[0], kregs[1]});

  task automatic cpu_run(input prog_t p, input int ncyc);
    cpu_rst_n = 0;
    cpu_blocks.delete(); blk_t.delete();
    @(posedge clk); #1;
    for (int i = 0; i < p.size() + 4; i++) begin
      imem_we = 1; imem_addr = 10'(i); imem_wdata = (i < p.size()) ? p[i] : nop();
      @(posedge clk); #1;
    end
    imem_we = 0;
    cpu_rst_n = 1;
    repeat (ncyc) @(posedge clk);
    #1;
  endtask

  task automatic cpu_tests();
    prog_t p;
    int s;
    logic [63:0] f8_exp [3] = '{64'h3E5A6D0A_3D1C82A5, 64'h365568B7_8ACD43EC, 64'hF6BED6AC_4E0BCD5F};
    logic [63:0] f9_exp [5] = '{64'h89E0A6D0_36C17090, 64'h45C16C01_42460205, 64'hE24CFA7D_8471E4DD,
                               64'hDFD3DCB9_499275BA, 64'hF63BD72C_702EBC7A};
    p = f8_prog(s);
    cpu_run(p, p.size() + 60);
    checks++;
    if (cpu_blocks.size() != 12) begin failures++; $display("f8: %0d block writes", cpu_blocks.size()); end
    else for (int i = 0; i < 3; i++) check($sformatf("f8 block %0d", i), cpu_blocks[4*i+3], f8_exp[i]);
    dbg_reg_addr = 1; #1 check("f8 $1", 64'(dbg_reg_data), 64'h3E5A6D0A);
    p = f9_prog(s);
    cpu_run(p, p.size() + 80);
    checks++;
    if (cpu_blocks.size() != 20) begin failures++; $display("f9: %0d block writes", cpu_blocks.size()); end
    else for (int i = 0; i < 5; i++) check($sformatf("f9 block %0d", i), cpu_blocks[4*i+3], f9_exp[i]);
    dbg_reg_addr = 16; #1 check("f9 MAC-I", 64'(dbg_reg_data), 64'hF63BD72C);
    // integer loop with a store, a load-use stall and a false hazard
    p.delete();
    p.push_back(addiu(1, 0, 16'd4));
    p.push_back(addiu(2, 0, 16'd0));
    p.push_back(rtype(2, 1, 2, 0, 6'h21));
    p.push_back(addiu(1, 1, 16'hFFFF));
    p.push_back(bne(1, 0, 16'hFFFD));
    p.push_back(sw(2, 0, 16'd4));
    p.push_back(lw(3, 0, 16'd4));
    p.push_back(rtype(3, 3, 4, 0, 6'h21));
    p.push_back(kxor1(5, 4, 2));
    p.push_back(xor_(6, 5, 0));
    repeat (4) p.push_back(nop());
    p.push_back(halt());
    cpu_run(p, 50);
    dbg_reg_addr = 4; #1 check("loop/load-use", 64'(dbg_reg_data), 20);
    check("kxor1 to k5", 64'(kregs[5]), 20 ^ 10);
  endtask

  initial begin
    init();
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    fork
      cpu_tests();
      drive12(1, 16, 6);
      drive12(2, 12, 6);
      begin
        for (int i = 0; i < NKAT; i++) drive3(KAT_KEY[i], KAT_IN[i], 1);
        drive3(rkey(), rblk(), 4);
      end
      begin
        repeat (20) @(posedge clk);
        #1 drivep(40);
      end
    join
    repeat (20) @(posedge clk);
    #1;
    checks++;
    if (q1.size() + q2.size() + q3.size() + qp.size() != 0) begin
      failures++; $display("results missing: %0d %0d %0d %0d", q1.size(), q2.size(), q3.size(), qp.size());
    end
    begin
      int m [20];
      static string nm [20] = '{"k2rnd issue", "k2rnd stall", "kxor forward from integer stages",
        "forward from K4/MEM", "key rotation", "block write", "false hazard", "integer forwarding",
        "load-use stall", "taken branch", "reuse1 block", "reuse2 block", "reuse3 block",
        "reuse3 preload", "reuse1 back to back", "reuse2 back to back", "reuse3 back to back",
        "pipelined block", "pipelined streaming", "pipelined key change"};
      for (int i = 0; i < 10; i++) m[i] = n_ev[i];
      m[10] = n_done1; m[11] = n_done2; m[12] = n_done3; m[13] = n_preload;
      m[14] = n_b2b1; m[15] = n_b2b2; m[16] = n_b2b3; m[17] = n_pipe; m[18] = n_stream; m[19] = n_keychg;
      for (int i = 0; i < 20; i++) begin
        checks++;
        $display("%-34s %0d", nm[i], m[i]);
        if (m[i] == 0) begin failures++; $display("  never happened"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
