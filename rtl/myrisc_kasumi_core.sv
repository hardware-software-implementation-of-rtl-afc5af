// myrisc_kasumi_core: five-stage MIPS pipeline (IF, ID, EX, MEM, WB) extended with a KASUMI
// functional unit and the instructions kxor1, kxor2, kxor3 and k2rnd.
//
// Integer part: a classic in-order pipeline for the R2000 user-mode integer instructions
// (ALU register and immediate operations, constant and variable shifts, lui, byte/half/word
// loads and stores (big-endian), all conditional branches with their link forms, j, jal, jr,
// jalr, mult/multu/div/divu with mfhi/mflo/mthi/mtlo), with forwarding from the MEM and WB
// stages to EX, a register file written in WB and read through in ID, a one-cycle load-use
// stall, and branches and jumps resolved in EX (predicted not taken, two instructions
// flushed). Multiply and divide run in an iterative unit (myrisc_muldiv, 33 cycles); an
// instruction that uses HI, LO or the unit stalls in ID while it is busy. There are no branch
// delay slots (a link register receives the address of the next instruction), no coprocessor,
// system-call, trap or unaligned-access instructions, and no caches or exceptions. Instruction and data memories are
// word arrays inside the core; the instruction memory is filled through imem_we/imem_addr/
// imem_wdata while the core is held in reset.
//
// KASUMI part (decode stage): the extended register file (kasumi_regfile), the forwarding
// unit (kasumi_fwd) and the key generation unit (kasumi_keygen). Their results, the block and
// two sets of round keys, go to a decode/execute register of the unit, which follows the
// decode stage whenever steps K1..K3 are empty and holds still otherwise.
// KASUMI part (execute stage): the four-step two-round datapath (kasumi_2round), steps K1..K4,
// followed by a MEM step that writes the block into registers 0 and 1 on the edge into WB.
//   * k2rnd leaves decode only when K1..K3 are empty (its predecessor, if any, is in K4);
//     otherwise it stalls in decode. It then enters K1 as its predecessor moves on to MEM,
//     taking the new block from the K4 bypass. A stream of k2rnd instructions therefore runs
//     one every four cycles, and four of them, one KASUMI block, take 16 cycles.
//   * When a k2rnd enters K1, the integer EX stage receives a bubble; later integer
//     instructions overlap with K2..K4.
//   * Step K3 rotates the key and constant arrays by one register, so that the keys of the
//     next two rounds are ready when the next k2rnd enters K1.
//   * Step K4 bypasses the new block to the forwarding unit.
//   * kxor1/kxor2 write the extended registers in WB; their results are forwarded from EX, MEM
//     and WB. The integer forwarding logic ignores them (a matching register number is a
//     false hazard, as their destination is an extended register).
// Software must not issue a single extended-register write that lands on a rotation of the
// same array, or on the block write; the register file asserts this.
// From the original design: the extended register file, forwarding and key generation units,
// the K1..K4 steps with rotation at K3, the four instructions, the k2rnd stall and the
// resulting 26-cycle and 16-cycle timings. Chosen here: the integer pipeline (the original
// extends an existing open-source R2000 core, which is not reproduced), the memory sizes, the
// instruction-memory load port and the debug and event outputs.
module myrisc_kasumi_core
  import kasumi_pkg::*;
  import myrisc_pkg::*;
#(
  parameter int IMEM_WORDS = 1024,
  parameter int DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory fill port
  input  logic        imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_addr,
  input  logic [31:0] imem_wdata,
  // observation
  input  logic [4:0]  dbg_reg_addr,
  output logic [31:0] dbg_reg_data,
  output logic [31:0] kregs [10],
  output logic [31:0] pc,
  output events_t     ev
);
  localparam int IAW = $clog2(IMEM_WORDS);
  localparam int DAW = $clog2(DMEM_WORDS);

  // ------------------------------------------------------------------ memories
  logic [31:0] imem [IMEM_WORDS];
  logic [31:0] dmem [DMEM_WORDS];
  always_ff @(posedge clk) if (imem_we) imem[imem_addr] <= imem_wdata;

  // ------------------------------------------------------------------ pipeline registers
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    logic [31:0] instr;
  } ifid_t;

  typedef struct packed {
    logic        valid;
    ctrl_t       c;
    logic [31:0] pc;
    logic [4:0]  rs, rt, dst;      // dst: integer or extended destination number
    logic [31:0] a, b, kb, imm;
    logic [4:0]  shamt;
    logic [25:0] jidx;
  } idex_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write, kreg_write, mem_read, mem_write;
    mem_size_e   mem_size;
    logic        mem_unsigned;
    logic [4:0]  dst;
    logic [31:0] result, store;
  } exmem_t;

  typedef struct packed {
    logic        valid;
    logic        reg_write, kreg_write;
    logic [4:0]  dst;
    logic [31:0] result;
  } memwb_t;

  ifid_t  ifid;
  idex_t  idex;
  exmem_t exmem;
  memwb_t memwb;

  logic stall, flush;
  logic [31:0] br_target;

  // ------------------------------------------------------------------ IF
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc   <= '0;
      ifid <= '0;
    end else if (flush) begin
      pc   <= br_target;
      ifid <= '0;
    end else if (!stall) begin
      pc   <= pc + 32'd4;
      ifid <= '{valid: 1'b1, pc: pc, instr: imem[pc[IAW+1:2]]};
    end
  end

  // ------------------------------------------------------------------ ID: decode
  logic [5:0]  op, funct;
  logic [4:0]  rs, rt, rd, shamt;
  logic [15:0] imm16;
  ctrl_t       c;

  assign op    = ifid.instr[31:26];
  assign rs    = ifid.instr[25:21];
  assign rt    = ifid.instr[20:16];
  assign rd    = ifid.instr[15:11];
  assign shamt = ifid.instr[10:6];
  assign funct = ifid.instr[5:0];
  assign imm16 = ifid.instr[15:0];

  always_comb begin
    c = '0;
    c.alu_op = ALU_ADD;
    unique case (op)
      OP_RTYPE: begin
        c.use_rs = 1'b1; c.use_rt = 1'b1; c.reg_write = 1'b1;
        unique case (funct)
          FN_SLL:   begin c.alu_op = ALU_SLL; c.use_rs = 1'b0; end
          FN_SRL:   begin c.alu_op = ALU_SRL; c.use_rs = 1'b0; end
          FN_SRA:   begin c.alu_op = ALU_SRA; c.use_rs = 1'b0; end
          FN_SLLV:  c.alu_op = ALU_SLLV;
          FN_SRLV:  c.alu_op = ALU_SRLV;
          FN_SRAV:  c.alu_op = ALU_SRAV;
          FN_JR:    begin c.jump_reg = 1'b1; c.use_rt = 1'b0; c.reg_write = 1'b0; end
          FN_JALR:  begin c.jump_reg = 1'b1; c.use_rt = 1'b0; c.link = 1'b1; end
          FN_MFHI:  begin c.mf_hi = 1'b1; c.use_rs = 1'b0; c.use_rt = 1'b0; end
          FN_MFLO:  begin c.mf_lo = 1'b1; c.use_rs = 1'b0; c.use_rt = 1'b0; end
          FN_MTHI:  begin c.mt_hi = 1'b1; c.use_rt = 1'b0; c.reg_write = 1'b0; end
          FN_MTLO:  begin c.mt_lo = 1'b1; c.use_rt = 1'b0; c.reg_write = 1'b0; end
          FN_MULT, FN_MULTU, FN_DIV, FN_DIVU: begin
            c.reg_write = 1'b0; c.md_start = 1'b1;
            c.md_div    = funct[1];
            c.md_signed = !funct[0];
          end
          FN_ADD, FN_ADDU: c.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: c.alu_op = ALU_SUB;
          FN_AND:   c.alu_op = ALU_AND;
          FN_OR:    c.alu_op = ALU_OR;
          FN_XOR:   c.alu_op = ALU_XOR;
          FN_NOR:   c.alu_op = ALU_NOR;
          FN_SLT:   c.alu_op = ALU_SLT;
          FN_SLTU:  c.alu_op = ALU_SLTU;
          FN_KXOR1: begin c.alu_op = ALU_XOR; c.reg_write = 1'b0; c.kreg_write = 1'b1; end
          FN_KXOR2: begin c.alu_op = ALU_XOR; c.reg_write = 1'b0; c.kreg_write = 1'b1;
                          c.use_rt = 1'b0; c.b_kreg = 1'b1; end
          FN_KXOR3: begin c.alu_op = ALU_XOR; c.use_rt = 1'b0; c.b_kreg = 1'b1; end
          default:  begin c.reg_write = 1'b0; c.use_rs = 1'b0; c.use_rt = 1'b0; end
        endcase
      end
      OP_ADDI, OP_ADDIU: begin c.alu_op = ALU_ADD;  c.b_imm = 1'b1; c.use_rs = 1'b1; c.reg_write = 1'b1; end
      OP_SLTI:  begin c.alu_op = ALU_SLT;  c.b_imm = 1'b1; c.use_rs = 1'b1; c.reg_write = 1'b1; end
      OP_SLTIU: begin c.alu_op = ALU_SLTU; c.b_imm = 1'b1; c.use_rs = 1'b1; c.reg_write = 1'b1; end
      OP_ANDI:  begin c.alu_op = ALU_AND;  c.b_imm = 1'b1; c.imm_zext = 1'b1; c.use_rs = 1'b1; c.reg_write = 1'b1; end
      OP_ORI:   begin c.alu_op = ALU_OR;   c.b_imm = 1'b1; c.imm_zext = 1'b1; c.use_rs = 1'b1; c.reg_write = 1'b1; end
      OP_XORI:  begin c.alu_op = ALU_XOR;  c.b_imm = 1'b1; c.imm_zext = 1'b1; c.use_rs = 1'b1; c.reg_write = 1'b1; end
      OP_LUI:   begin c.alu_op = ALU_LUI;  c.b_imm = 1'b1; c.reg_write = 1'b1; end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        c.alu_op = ALU_ADD; c.b_imm = 1'b1; c.use_rs = 1'b1; c.reg_write = 1'b1; c.mem_read = 1'b1;
        c.mem_size = (op[1:0] == 2'b00) ? MS_BYTE : (op[1:0] == 2'b01) ? MS_HALF : MS_WORD;
        c.mem_unsigned = op[2];
      end
      OP_SB, OP_SH, OP_SW: begin
        c.alu_op = ALU_ADD; c.b_imm = 1'b1; c.use_rs = 1'b1; c.use_rt = 1'b1; c.mem_write = 1'b1;
        c.mem_size = (op[1:0] == 2'b00) ? MS_BYTE : (op[1:0] == 2'b01) ? MS_HALF : MS_WORD;
      end
      OP_BEQ:   begin c.use_rs = 1'b1; c.use_rt = 1'b1; c.branch = 1'b1; c.br_cond = BR_EQ; end
      OP_BNE:   begin c.use_rs = 1'b1; c.use_rt = 1'b1; c.branch = 1'b1; c.br_cond = BR_NE; end
      OP_BLEZ:  begin c.use_rs = 1'b1; c.branch = 1'b1; c.br_cond = BR_LEZ; end
      OP_BGTZ:  begin c.use_rs = 1'b1; c.branch = 1'b1; c.br_cond = BR_GTZ; end
      OP_REGIMM: begin                       // bltz, bgez, bltzal, bgezal
        c.use_rs = 1'b1; c.branch = 1'b1;
        c.br_cond = rt[0] ? BR_GEZ : BR_LTZ;
        c.link = rt[4]; c.reg_write = rt[4];
      end
      OP_J:     c.jump = 1'b1;
      OP_JAL:   begin c.jump = 1'b1; c.link = 1'b1; c.reg_write = 1'b1; end
      OP_K2RND: c.k2rnd = 1'b1;
      default:  ;
    endcase
    if (!ifid.valid) c = '0;
  end

  // destination number: rd for R-format (integer or extended), 31 for jal/bltzal/bgezal, rt
  // for the other I-format instructions
  logic [4:0] dst;
  assign dst = (op == OP_RTYPE) ? rd : (op == OP_JAL || op == OP_REGIMM) ? 5'd31 : rt;

  // ------------------------------------------------------------------ ID: integer registers
  logic [31:0] rf [32];
  logic [31:0] rs_val, rt_val;
  logic        wb_int_we;
  assign wb_int_we = memwb.valid && memwb.reg_write && memwb.dst != 5'd0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int i = 0; i < 32; i++) rf[i] <= '0;
    else if (wb_int_we) rf[memwb.dst] <= memwb.result;
  end

  always_comb begin
    rs_val = (wb_int_we && memwb.dst == rs) ? memwb.result : rf[rs];
    rt_val = (wb_int_we && memwb.dst == rt) ? memwb.result : rf[rt];
    if (rs == 5'd0) rs_val = '0;
    if (rt == 5'd0) rt_val = '0;
  end
  assign dbg_reg_data = rf[dbg_reg_addr];

  // ------------------------------------------------------------------ ID: KASUMI unit
  logic [31:0] kfile [10];
  logic [31:0] kfile_lo [6];
  logic [31:0] kfwd [6];
  logic        kfwd_int, kfwd_k;
  logic [31:0] ex_result;
  logic        ex_kwe;
  logic [31:0] kread, kfile_rd;
  logic        kv1, kv2, kv3, kv4, kvmem;     // steps K1..K4 and MEM occupied
  logic [31:0] k_l2, k_r2;
  logic [63:0] kmem_blk;
  logic        blk_we;

  assign ex_kwe = idex.valid && idex.c.kreg_write;
  assign blk_we = kvmem;

  kasumi_regfile u_kregs (
    .clk, .rst_n,
    .we(memwb.valid && memwb.kreg_write), .waddr(memwb.dst[3:0]), .wdata(memwb.result),
    .blk_we, .blk_wdata(kmem_blk),
    .rot(kv3),
    .raddr(rt[3:0]), .rdata(kfile_rd),
    .regs(kfile));

  assign kregs = kfile;
  always_comb for (int i = 0; i < 6; i++) kfile_lo[i] = kfile[i];

  kasumi_fwd u_kfwd (
    .ex_we(ex_kwe), .ex_addr(idex.dst[3:0]), .ex_data(ex_result),
    .mem_we(exmem.valid && exmem.kreg_write), .mem_addr(exmem.dst[3:0]), .mem_data(exmem.result),
    .wb_we(memwb.valid && memwb.kreg_write), .wb_addr(memwb.dst[3:0]), .wb_data(memwb.result),
    .k4_valid(kv4), .k4_block({k_l2, k_r2}),
    .kmem_valid(kvmem), .kmem_block(kmem_blk),
    .file_regs(kfile_lo), .fwd_regs(kfwd),
    .from_int(kfwd_int), .from_k(kfwd_k));

  // operand KRt of kxor2/kxor3: forwarded for registers 0..5, addressed read port otherwise
  assign kread = (rt[3:0] < 4'd6) ? kfwd[rt[2:0]] : kfile_rd;

  rkeys_t      rk_a, rk_b;
  logic [31:0] key_w [4], const_w [4];
  always_comb for (int i = 0; i < 4; i++) begin
    key_w[i]   = kfwd[2+i];
    const_w[i] = kfile[6+i];
  end
  kasumi_keygen u_keygen (.key_w, .const_w, .rk_a, .rk_b);

  // KASUMI decode/execute register: follows decode while K1..K3 are empty
  logic [31:0] kid_l0, kid_r0;
  rkeys_t      kid_rka, kid_rkb;
  logic        k_busy;
  assign k_busy = kv1 || kv2 || kv3;

  always_ff @(posedge clk) begin
    if (!k_busy) begin
      kid_l0  <= kfwd[0];
      kid_r0  <= kfwd[1];
      kid_rka <= rk_a;
      kid_rkb <= rk_b;
    end
  end

  // ------------------------------------------------------------------ hazards
  logic load_use, k_stall, k_issue;
  assign load_use = idex.valid && idex.c.mem_read && idex.dst != 5'd0 &&
                    ((c.use_rs && idex.dst == rs) || (c.use_rt && idex.dst == rt));
  assign k_stall  = c.k2rnd && k_busy;
  // HI/LO interlock: an instruction that uses HI/LO or the unit waits while it is busy
  logic md_busy, md_stall;
  assign md_stall = (c.mf_hi || c.mf_lo || c.mt_hi || c.mt_lo || c.md_start) &&
                    (md_busy || (idex.valid && idex.c.md_start));
  assign stall    = load_use || k_stall || md_stall;
  assign k_issue  = c.k2rnd && !k_busy && !flush;

  // ------------------------------------------------------------------ ID/EX
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) idex <= '0;
    else if (flush || stall || c.k2rnd) idex <= '0;     // bubble (k2rnd goes to K1 instead)
    else begin
      idex.valid <= ifid.valid;
      idex.c     <= c;
      idex.pc    <= ifid.pc;
      idex.rs    <= rs;
      idex.rt    <= rt;
      idex.dst   <= dst;
      idex.a     <= rs_val;
      idex.b     <= rt_val;
      idex.kb    <= kread;
      idex.imm   <= c.imm_zext ? {16'h0, imm16} : {{16{imm16[15]}}, imm16};
      idex.shamt <= shamt;
      idex.jidx  <= ifid.instr[25:0];
    end
  end

  // ------------------------------------------------------------------ EX: integer
  logic [31:0] opa, opb, alu_b, alu_y, pc4, md_hi, md_lo;
  logic        br_take;
  logic        fwd_a_mem, fwd_a_wb, fwd_b_mem, fwd_b_wb;
  logic        mem_int_we;
  assign mem_int_we = exmem.valid && exmem.reg_write && !exmem.mem_read && exmem.dst != 5'd0;

  always_comb begin
    fwd_a_mem = mem_int_we && exmem.dst == idex.rs;
    fwd_b_mem = mem_int_we && exmem.dst == idex.rt;
    fwd_a_wb  = wb_int_we && memwb.dst == idex.rs;
    fwd_b_wb  = wb_int_we && memwb.dst == idex.rt;
    opa = fwd_a_mem ? exmem.result : fwd_a_wb ? memwb.result : idex.a;
    opb = fwd_b_mem ? exmem.result : fwd_b_wb ? memwb.result : idex.b;
    alu_b = idex.c.b_kreg ? idex.kb : idex.c.b_imm ? idex.imm : opb;
    unique case (idex.c.alu_op)
      ALU_ADD:  alu_y = opa + alu_b;
      ALU_SUB:  alu_y = opa - alu_b;
      ALU_AND:  alu_y = opa & alu_b;
      ALU_OR:   alu_y = opa | alu_b;
      ALU_XOR:  alu_y = opa ^ alu_b;
      ALU_NOR:  alu_y = ~(opa | alu_b);
      ALU_SLT:  alu_y = {31'h0, $signed(opa) < $signed(alu_b)};
      ALU_SLTU: alu_y = {31'h0, opa < alu_b};
      ALU_SLL:  alu_y = opb << idex.shamt;
      ALU_SRL:  alu_y = opb >> idex.shamt;
      ALU_SRA:  alu_y = $unsigned($signed(opb) >>> idex.shamt);
      ALU_LUI:  alu_y = {idex.imm[15:0], 16'h0};
      ALU_SLLV: alu_y = opb << opa[4:0];
      ALU_SRLV: alu_y = opb >> opa[4:0];
      ALU_SRAV: alu_y = $unsigned($signed(opb) >>> opa[4:0]);
      default:  alu_y = '0;
    endcase
  end

  assign pc4 = idex.pc + 32'd4;
  always_comb begin
    unique case (idex.c.br_cond)
      BR_EQ:   br_take = opa == opb;
      BR_NE:   br_take = opa != opb;
      BR_LEZ:  br_take = $signed(opa) <= 0;
      BR_GTZ:  br_take = $signed(opa) > 0;
      BR_LTZ:  br_take = opa[31];
      BR_GEZ:  br_take = !opa[31];
      default: br_take = 1'b0;
    endcase
    // result: ALU, return address (no delay slot: the next instruction), HI or LO
    ex_result = idex.c.link  ? pc4 :
                idex.c.mf_hi ? md_hi :
                idex.c.mf_lo ? md_lo : alu_y;
  end

  assign flush     = idex.valid && ((idex.c.branch && br_take) || idex.c.jump || idex.c.jump_reg);
  assign br_target = idex.c.jump_reg ? opa :
                     idex.c.jump     ? {pc4[31:28], idex.jidx, 2'b00} :
                                       pc4 + {idex.imm[29:0], 2'b00};

  myrisc_muldiv u_md (
    .clk, .rst_n,
    .start(idex.valid && idex.c.md_start), .is_div(idex.c.md_div), .is_signed(idex.c.md_signed),
    .a(opa), .b(opb),
    .hi_we(idex.valid && idex.c.mt_hi), .lo_we(idex.valid && idex.c.mt_lo), .wdata(opa),
    .busy(md_busy), .hi(md_hi), .lo(md_lo));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) exmem <= '0;
    else begin
      exmem.valid      <= idex.valid;
      exmem.reg_write  <= idex.c.reg_write;
      exmem.kreg_write <= idex.c.kreg_write;
      exmem.mem_read   <= idex.c.mem_read;
      exmem.mem_write  <= idex.c.mem_write;
      exmem.mem_size   <= idex.c.mem_size;
      exmem.mem_unsigned <= idex.c.mem_unsigned;
      exmem.dst        <= idex.dst;
      exmem.result     <= ex_result;
      exmem.store      <= opb;
    end
  end

  // ------------------------------------------------------------------ EX: KASUMI K1..K4
  kasumi_2round u_k2r (.clk, .l0(kid_l0), .r0(kid_r0), .rk_a(kid_rka), .rk_b(kid_rkb),
                       .l2(k_l2), .r2(k_r2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {kv1, kv2, kv3, kv4, kvmem} <= '0;
    else        {kv1, kv2, kv3, kv4, kvmem} <= {k_issue, kv1, kv2, kv3, kv4};
  end

  always_ff @(posedge clk) if (kv4) kmem_blk <= {k_l2, k_r2};

  // ------------------------------------------------------------------ MEM
  // big-endian byte lanes: byte address 0 of a word is bits 31:24
  logic [31:0] mem_rdata, mem_word, st_data;
  logic [3:0]  st_be;
  logic [1:0]  boff;
  assign boff = exmem.result[1:0];
  always_comb begin
    unique case (exmem.mem_size)
      MS_BYTE: begin st_be = 4'b1000 >> boff;                   st_data = {4{exmem.store[7:0]}};  end
      MS_HALF: begin st_be = boff[1] ? 4'b0011 : 4'b1100;       st_data = {2{exmem.store[15:0]}}; end
      default: begin st_be = 4'b1111;                           st_data = exmem.store;            end
    endcase
  end
  always_ff @(posedge clk)
    if (exmem.valid && exmem.mem_write)
      for (int i = 0; i < 4; i++)
        if (st_be[i]) dmem[exmem.result[DAW+1:2]][8*i +: 8] <= st_data[8*i +: 8];
  assign mem_word = dmem[exmem.result[DAW+1:2]];
  always_comb begin
    logic [7:0]  b8;
    logic [15:0] h16;
    b8  = mem_word[{~boff, 3'b000} +: 8];
    h16 = boff[1] ? mem_word[15:0] : mem_word[31:16];
    unique case (exmem.mem_size)
      MS_BYTE: mem_rdata = exmem.mem_unsigned ? {24'h0, b8}  : {{24{b8[7]}}, b8};
      MS_HALF: mem_rdata = exmem.mem_unsigned ? {16'h0, h16} : {{16{h16[15]}}, h16};
      default: mem_rdata = mem_word;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) memwb <= '0;
    else begin
      memwb.valid      <= exmem.valid;
      memwb.reg_write  <= exmem.reg_write;
      memwb.kreg_write <= exmem.kreg_write;
      memwb.dst        <= exmem.dst;
      memwb.result     <= exmem.mem_read ? mem_rdata : exmem.result;
    end
  end

  // ------------------------------------------------------------------ events
  always_comb begin
    ev = '0;
    ev.k2rnd_issue  = k_issue;
    ev.k2rnd_stall  = k_stall;
    ev.kfwd_int     = k_issue && kfwd_int;
    ev.kfwd_k       = k_issue && kfwd_k;
    ev.key_rotate   = kv3;
    ev.blk_write    = blk_we;
    ev.false_hazard = idex.valid &&
                      ((exmem.valid && exmem.kreg_write &&
                        ((idex.c.use_rs && exmem.dst == idex.rs) || (idex.c.use_rt && exmem.dst == idex.rt))) ||
                       (memwb.valid && memwb.kreg_write &&
                        ((idex.c.use_rs && memwb.dst == idex.rs) || (idex.c.use_rt && memwb.dst == idex.rt))));
    ev.int_fwd      = idex.valid && ((idex.c.use_rs && (fwd_a_mem || fwd_a_wb)) ||
                                     (idex.c.use_rt && (fwd_b_mem || fwd_b_wb)));
    ev.load_stall   = load_use;
    ev.branch_taken = flush;
  end
endmodule
