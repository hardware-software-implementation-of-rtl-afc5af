// tb_myrisc_kasumi_core: runs three programs on the extended MIPS core.
//  1. f8 Test Set 3: three KASUMI blocks; checks the blocks written into registers 0/1
//     against the conformance values, the 26-cycle figure for loading plus the first block,
//     and 16 cycles per block of four k2rnd instructions.
//  2. f9 Test Set 1: five KASUMI blocks; checks every block and the MAC-I.
//  3. An integer program with a loop (taken branches), a store, a load and a load-use stall.
//  4. A program using the remaining integer instructions: multiply and divide (signed and
//     unsigned, with the HI/LO interlock), mthi/mtlo, variable shifts, byte and halfword
//     loads and stores, jumps, jump-and-link, and the sign-testing branches.
// It also checks that each pipeline mechanism (k2rnd stall, forwarding into the KASUMI unit
// from the integer stages and from K4/MEM, key rotation, false hazards, integer forwarding,
// load-use stall, taken branch) happened.
// Provenance: expected values come from the reference model or from the conformance vectors of
// the f8/f9 specification, and the cycle counts checked are those of the original design; the
// stimulus is chosen here.
module tb_myrisc_kasumi_core;
  import myrisc_pkg::*;
  import myrisc_asm_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        imem_we = 0;
  logic [9:0]  imem_addr;
  logic [31:0] imem_wdata, dbg_reg_data, pc;
  logic [4:0]  dbg_reg_addr = 0;
  logic [31:0] kregs [10];
  events_t     ev;
  int checks = 0, failures = 0, cyc = 0;

  myrisc_kasumi_core dut (.clk, .rst_n, .imem_we, .imem_addr, .imem_wdata,
                          .dbg_reg_addr, .dbg_reg_data, .kregs, .pc, .ev);

  always @(posedge clk) cyc <= cyc + 1;

  int n_ev [10];
  logic [63:0] blocks [$];
  int blk_t [$], issue_t [$];
  int t_start = -1, start_pc = 0;

  always @(negedge clk) if (rst_n) begin
    if (ev.k2rnd_issue)  begin n_ev[0]++; issue_t.push_back(cyc); end
    if (ev.k2rnd_stall)  n_ev[1]++;
    if (ev.kfwd_int)     n_ev[2]++;
    if (ev.kfwd_k)       n_ev[3]++;
    if (ev.key_rotate)   n_ev[4]++;
    if (ev.blk_write)    begin n_ev[5]++; blk_t.push_back(cyc); end
    if (ev.false_hazard) n_ev[6]++;
    if (ev.int_fwd)      n_ev[7]++;
    if (ev.load_stall)   n_ev[8]++;
    if (ev.branch_taken) n_ev[9]++;
    if (t_start < 0 && pc == 32'(start_pc)) t_start = cyc;
  end
  // blocks are sampled in the cycle after their write
  always @(negedge clk) if (rst_n && blk_t.size() > blocks.size() && cyc > blk_t[blocks.size()])
    blocks.push_back({kregs[0], kregs[1]});

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  function automatic logic [63:0] reg_of(int r);
    return 64'(dut.rf[r]);
  endfunction

  task automatic run(input prog_t p, input int sidx, input int ncyc);
    rst_n = 0;
    blocks.delete(); blk_t.delete(); issue_t.delete();
    t_start = -1; start_pc = 4 * sidx;
    @(posedge clk); #1;
    for (int i = 0; i < p.size(); i++) begin
      imem_we = 1; imem_addr = 10'(i); imem_wdata = p[i];
      @(posedge clk); #1;
    end
    for (int i = p.size(); i < p.size() + 4; i++) begin
      imem_addr = 10'(i); imem_wdata = nop();
      @(posedge clk); #1;
    end
    imem_we = 0;
    rst_n = 1;
    repeat (ncyc) @(posedge clk);
    #1;
  endtask

  initial begin
    prog_t p;
    int s;
    logic [63:0] f8_exp [3] = '{64'h3E5A6D0A_3D1C82A5, 64'h365568B7_8ACD43EC, 64'hF6BED6AC_4E0BCD5F};
    logic [63:0] f9_exp [5] = '{64'h89E0A6D0_36C17090, 64'h45C16C01_42460205, 64'hE24CFA7D_8471E4DD,
                               64'hDFD3DCB9_499275BA, 64'hF63BD72C_702EBC7A};
    // ---- f8
    p = f8_prog(s);
    run(p, s, p.size() + 60);
    checks++;
    if (blocks.size() != 12) begin failures++; $display("f8: %0d block writes", blocks.size()); end
    else for (int i = 0; i < 3; i++) check($sformatf("f8 block %0d", i), blocks[4*i+3], f8_exp[i]);
    check("f8 $1", reg_of(1), 32'h3E5A6D0A);
    check("f8 $2", reg_of(2), 32'h3D1C82A4);
    // first block: fetch of the first kxor1 (cycle 1) to WB of the fourth k2rnd (cycle 26)
    if (blk_t.size() >= 4) check("cycles to first block", blk_t[3] - t_start + 2, 26);
    for (int i = 0; i + 4 < issue_t.size(); i += 4)
      if (issue_t[i+1] - issue_t[i] == 4 && issue_t[i+3] - issue_t[i] == 12)
        check("16 cycles per block", issue_t[i+3] + 4 - issue_t[i], 16);
      else check("k2rnd spacing", issue_t[i+1] - issue_t[i], 4);
    // ---- f9
    p = f9_prog(s);
    run(p, s, p.size() + 80);
    checks++;
    if (blocks.size() != 20) begin failures++; $display("f9: %0d block writes", blocks.size()); end
    else for (int i = 0; i < 5; i++) check($sformatf("f9 block %0d", i), blocks[4*i+3], f9_exp[i]);
    check("f9 MAC-I", reg_of(16), 32'hF63BD72C);
    check("f9 B", {dut.rf[13], dut.rf[14]}, 64'hF1BEEC15_B964E3F2);
    // ---- integer program
    p.delete();
    p.push_back(addiu(1, 0, 16'd5));
    p.push_back(addiu(2, 0, 16'd0));
    p.push_back(rtype(2, 1, 2, 0, 6'h21));          // loop: addu $2,$2,$1
    p.push_back(addiu(1, 1, 16'hFFFF));             //       addiu $1,$1,-1
    p.push_back(bne(1, 0, 16'hFFFD));               //       bne $1,$0,loop
    p.push_back(sw(2, 0, 16'd8));
    p.push_back(lw(3, 0, 16'd8));
    p.push_back(rtype(3, 3, 4, 0, 6'h21));          // addu $4,$3,$3 (load-use)
    p.push_back(kxor1(5, 4, 2));                    // k5 = $4 ^ $2
    p.push_back(xor_(6, 5, 0));                     // $6 = $5 ^ $0: $5 is not k5 (false hazard)
    repeat (4) p.push_back(nop());
    p.push_back(halt());
    run(p, 0, 60);
    check("loop sum", reg_of(2), 15);
    check("load", reg_of(3), 15);
    check("load-use", reg_of(4), 30);
    check("kxor1 to k5", kregs[5], 30 ^ 15);
    check("false hazard", reg_of(6), 0);
    // ---- the rest of the integer instruction set
    p.delete();
    li(p, 1, 32'hFFFF_FFF9);                       // $1 = -7
    p.push_back(addiu(2, 0, 16'd3));               // $2 = 3
    p.push_back(rtype(1, 2, 0, 0, 6'h18));         // mult  $1,$2
    p.push_back(rtype(0, 0, 3, 0, 6'h12));         // mflo  $3 (waits for the unit)
    p.push_back(rtype(0, 0, 4, 0, 6'h10));         // mfhi  $4
    p.push_back(rtype(1, 2, 0, 0, 6'h19));         // multu $1,$2
    p.push_back(rtype(0, 0, 5, 0, 6'h10));         // mfhi  $5
    p.push_back(rtype(1, 2, 0, 0, 6'h1A));         // div   $1,$2
    p.push_back(rtype(0, 0, 6, 0, 6'h12));         // mflo  $6
    p.push_back(rtype(0, 0, 7, 0, 6'h10));         // mfhi  $7
    p.push_back(rtype(1, 2, 0, 0, 6'h1B));         // divu  $1,$2
    p.push_back(rtype(0, 0, 8, 0, 6'h12));         // mflo  $8
    p.push_back(rtype(2, 0, 0, 0, 6'h11));         // mthi  $2
    p.push_back(rtype(1, 0, 0, 0, 6'h13));         // mtlo  $1
    p.push_back(rtype(0, 0, 9, 0, 6'h10));         // mfhi  $9
    p.push_back(rtype(0, 0, 25, 0, 6'h12));        // mflo  $25
    p.push_back(rtype(2, 2, 10, 0, 6'h04));        // sllv  $10,$2,$2
    p.push_back(rtype(2, 1, 11, 0, 6'h07));        // srav  $11,$1,$2
    p.push_back(rtype(2, 1, 12, 0, 6'h06));        // srlv  $12,$1,$2
    p.push_back(sw(0, 0, 16'd0));
    p.push_back(itype(6'h28, 0, 1, 16'd1));        // sb  $1,1($0)
    p.push_back(itype(6'h29, 0, 2, 16'd2));        // sh  $2,2($0)
    p.push_back(lw(13, 0, 16'd0));
    p.push_back(itype(6'h20, 0, 14, 16'd1));       // lb  $14,1($0)
    p.push_back(itype(6'h24, 0, 15, 16'd1));       // lbu $15,1($0)
    p.push_back(itype(6'h21, 0, 16, 16'd0));       // lh  $16,0($0)
    p.push_back(itype(6'h25, 0, 17, 16'd2));       // lhu $17,2($0)
    s = p.size();                                  // jal at s, subroutine at s+4
    p.push_back({6'h03, 26'(s + 4)});              // jal sub
    p.push_back(addiu(19, 0, 16'd7));              // return point
    p.push_back({6'h02, 26'(s + 7)});              // j over the subroutine
    p.push_back(addiu(18, 0, 16'd1));              // skipped
    p.push_back(addiu(20, 0, 16'd5));              // sub:
    p.push_back(rtype(31, 0, 0, 0, 6'h08));        //   jr $31
    p.push_back(addiu(18, 0, 16'd2));              // skipped
    p.push_back(itype(6'h01, 1, 0, 16'd1));        // bltz $1 (taken)
    p.push_back(addiu(18, 0, 16'd3));              // skipped
    p.push_back(itype(6'h01, 1, 1, 16'd1));        // bgez $1 (not taken)
    p.push_back(addiu(21, 0, 16'd6));
    p.push_back(itype(6'h06, 0, 0, 16'd1));        // blez $0 (taken)
    p.push_back(addiu(18, 0, 16'd4));              // skipped
    p.push_back(itype(6'h07, 2, 0, 16'd1));        // bgtz $2 (taken)
    p.push_back(addiu(18, 0, 16'd5));              // skipped
    p.push_back(itype(6'h01, 2, 17, 16'd1));       // bgezal $2 (taken, links)
    p.push_back(addiu(18, 0, 16'd6));              // skipped
    p.push_back(addiu(23, 0, 16'(4 * (p.size() + 3))));
    p.push_back(rtype(23, 0, 22, 0, 6'h09));       // jalr $22,$23
    p.push_back(addiu(18, 0, 16'd7));              // skipped
    p.push_back(addiu(24, 0, 16'd9));
    p.push_back(halt());
    run(p, 0, 300);
    check("mult lo", reg_of(3), 32'hFFFF_FFEB);
    check("mult hi", reg_of(4), 32'hFFFF_FFFF);
    check("multu hi", reg_of(5), 32'h2);
    check("div quotient", reg_of(6), 32'hFFFF_FFFE);
    check("div remainder", reg_of(7), 32'hFFFF_FFFF);
    check("divu quotient", reg_of(8), 32'h5555_5553);
    check("mthi", reg_of(9), 32'h3);
    check("mtlo", reg_of(25), 32'hFFFF_FFF9);
    check("sllv", reg_of(10), 32'd24);
    check("srav", reg_of(11), 32'hFFFF_FFFF);
    check("srlv", reg_of(12), 32'h1FFF_FFFF);
    check("sb/sh", reg_of(13), 32'h00F9_0003);
    check("lb", reg_of(14), 32'hFFFF_FFF9);
    check("lbu", reg_of(15), 32'hF9);
    check("lh", reg_of(16), 32'hF9);
    check("lhu", reg_of(17), 32'h3);
    check("skipped instructions", reg_of(18), 0);
    check("jal return", reg_of(19), 7);
    check("subroutine", reg_of(20), 5);
    check("bgez not taken", reg_of(21), 6);
    check("bgezal link", reg_of(31), 64'(4 * (s + 16)));
    check("jalr link", reg_of(22), 64'(4 * (s + 19)));
    check("after jalr", reg_of(24), 9);
    // ---- every mechanism seen
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (n_ev[i] == 0) begin failures++; $display("event %0d never happened", i); end
    end
    $display("events: issue %0d stall %0d fwd_int %0d fwd_k %0d rot %0d blkwr %0d false %0d intfwd %0d ldstall %0d br %0d",
             n_ev[0], n_ev[1], n_ev[2], n_ev[3], n_ev[4], n_ev[5], n_ev[6], n_ev[7], n_ev[8], n_ev[9]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
