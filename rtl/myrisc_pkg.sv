// myrisc_pkg: instruction encodings, decoded control word and event flags of the extended
// MIPS core.
//
// The base instructions are the usual R2000 encodings (the user-mode integer set, without
// coprocessor, system-call and trap instructions).
// The KASUMI extension adds four instructions:
//   kxor1 KRd, Rs, Rt   R-format, funct 001010 : KRd <- Rs ^ Rt
//   kxor2 KRd, Rs, KRt  R-format, funct 001011 : KRd <- Rs ^ KRt
//   kxor3 Rd,  Rs, KRt  R-format, funct 110010 : Rd  <- Rs ^ KRt
//   k2rnd               I-format, op 101100    : two KASUMI rounds on extended registers
// Extended register numbers are the four low bits of the 5-bit register fields.
// From the original design: the encodings of the four extended instructions. Chosen here: the
// control word and the event flags.
package myrisc_pkg;

  // Primary opcodes
  localparam logic [5:0] OP_RTYPE = 6'h00, OP_REGIMM = 6'h01, OP_J = 6'h02, OP_JAL = 6'h03,
                         OP_BEQ  = 6'h04, OP_BNE  = 6'h05, OP_BLEZ = 6'h06, OP_BGTZ = 6'h07,
                         OP_LB    = 6'h20, OP_LH   = 6'h21, OP_LBU  = 6'h24, OP_LHU  = 6'h25,
                         OP_SB    = 6'h28, OP_SH   = 6'h29,
                         OP_ADDI  = 6'h08, OP_ADDIU = 6'h09, OP_SLTI = 6'h0A, OP_SLTIU = 6'h0B,
                         OP_ANDI  = 6'h0C, OP_ORI  = 6'h0D, OP_XORI = 6'h0E, OP_LUI  = 6'h0F,
                         OP_LW    = 6'h23, OP_SW   = 6'h2B, OP_K2RND = 6'h2C;
  // R-format function codes
  localparam logic [5:0] FN_SLL = 6'h00, FN_SRL = 6'h02, FN_SRA = 6'h03,
                         FN_SLLV = 6'h04, FN_SRLV = 6'h06, FN_SRAV = 6'h07,
                         FN_JR = 6'h08, FN_JALR = 6'h09,
                         FN_MFHI = 6'h10, FN_MTHI = 6'h11, FN_MFLO = 6'h12, FN_MTLO = 6'h13,
                         FN_MULT = 6'h18, FN_MULTU = 6'h19, FN_DIV = 6'h1A, FN_DIVU = 6'h1B,
                         FN_KXOR1 = 6'h0A, FN_KXOR2 = 6'h0B,
                         FN_ADD = 6'h20, FN_ADDU = 6'h21, FN_SUB = 6'h22, FN_SUBU = 6'h23,
                         FN_AND = 6'h24, FN_OR = 6'h25, FN_XOR = 6'h26, FN_NOR = 6'h27,
                         FN_SLT = 6'h2A, FN_SLTU = 6'h2B, FN_KXOR3 = 6'h32;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR, ALU_SLT, ALU_SLTU,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI, ALU_SLLV, ALU_SRLV, ALU_SRAV
  } alu_op_e;

  typedef enum logic [2:0] { BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ } br_cond_e;

  typedef enum logic [1:0] { MS_BYTE, MS_HALF, MS_WORD } mem_size_e;

  typedef struct packed {
    alu_op_e    alu_op;
    logic       b_imm;       // ALU operand B is the immediate
    logic       imm_zext;    // zero-extend the immediate (logic ops)
    logic       b_kreg;      // ALU operand B is an extended register (kxor2, kxor3)
    logic       use_rs;
    logic       use_rt;
    logic       reg_write;   // writes an integer register
    logic       kreg_write;  // writes an extended register (kxor1, kxor2)
    logic       mem_read;
    logic       mem_write;
    logic       branch;      // conditional branch, condition br_cond
    br_cond_e   br_cond;
    logic       jump;        // j, jal: target from the instruction index
    logic       jump_reg;    // jr, jalr: target from rs
    logic       link;        // result is the return address
    mem_size_e  mem_size;
    logic       mem_unsigned;
    logic       md_start;    // mult, multu, div, divu
    logic       md_div;
    logic       md_signed;
    logic       mf_hi;       // mfhi
    logic       mf_lo;       // mflo
    logic       mt_hi;       // mthi
    logic       mt_lo;       // mtlo
    logic       k2rnd;
  } ctrl_t;

  // One-cycle event flags, for observing the pipeline mechanisms
  typedef struct packed {
    logic k2rnd_issue;     // a k2rnd entered step K1
    logic k2rnd_stall;     // a k2rnd waited in decode for the previous one to reach K4
    logic kfwd_int;        // an issuing k2rnd took block/key from the integer EX/MEM/WB stages
    logic kfwd_k;          // an issuing k2rnd took its block from K4 or the KASUMI MEM step
    logic key_rotate;      // step K3 rotated the key and constant arrays
    logic blk_write;       // a ciphertext block was written into registers 0 and 1
    logic false_hazard;    // a register number matched an extended destination and was ignored
    logic int_fwd;         // an integer operand was forwarded
    logic load_stall;      // load-use stall
    logic branch_taken;    // taken branch flushed the pipeline
  } events_t;

endpackage
