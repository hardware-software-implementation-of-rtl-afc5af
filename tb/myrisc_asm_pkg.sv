// myrisc_asm_pkg: a small assembler for the testbenches of the extended MIPS core, and the two
// conformance programs run on it: the f8 keystream of Test Set 3 (three KASUMI blocks) and
// the f9 MAC of Test Set 1 (five KASUMI blocks). Each program first sets the integer
// registers with lui/ori (the algorithm parameters), then runs the cipher with the extended
// instructions. Three instructions must separate the last k2rnd of a block from the first
// instruction that reads the new block (the K4 bypass is the earliest source).
// Provenance: the f8 program follows the original instruction sequence for the extended core;
// the f9 program and the assembler are written here.
package myrisc_asm_pkg;
  typedef logic [31:0] prog_t [$];

  function automatic logic [31:0] rtype(int rs, int rt, int rd, int sh, logic [5:0] fn);
    return {6'h00, 5'(rs), 5'(rt), 5'(rd), 5'(sh), fn};
  endfunction
  function automatic logic [31:0] itype(logic [5:0] op, int rs, int rt, logic [15:0] imm);
    return {op, 5'(rs), 5'(rt), imm};
  endfunction

  function automatic logic [31:0] kxor1(int krd, int rs, int rt);  return rtype(rs, rt, krd, 0, 6'h0A); endfunction
  function automatic logic [31:0] kxor2(int krd, int rs, int krt); return rtype(rs, krt, krd, 0, 6'h0B); endfunction
  function automatic logic [31:0] kxor3(int rd, int rs, int krt);  return rtype(rs, krt, rd, 0, 6'h32); endfunction
  function automatic logic [31:0] k2rnd();                          return 32'hB000_0000; endfunction
  function automatic logic [31:0] xor_(int rd, int rs, int rt);     return rtype(rs, rt, rd, 0, 6'h26); endfunction
  function automatic logic [31:0] nop();                            return xor_(0, 0, 0); endfunction
  function automatic logic [31:0] lui(int rt, logic [15:0] imm);    return itype(6'h0F, 0, rt, imm); endfunction
  function automatic logic [31:0] ori(int rt, int rs, logic [15:0] imm);  return itype(6'h0D, rs, rt, imm); endfunction
  function automatic logic [31:0] xori(int rt, int rs, logic [15:0] imm); return itype(6'h0E, rs, rt, imm); endfunction
  function automatic logic [31:0] addiu(int rt, int rs, logic [15:0] imm); return itype(6'h09, rs, rt, imm); endfunction
  function automatic logic [31:0] lw(int rt, int rs, logic [15:0] imm);   return itype(6'h23, rs, rt, imm); endfunction
  function automatic logic [31:0] sw(int rt, int rs, logic [15:0] imm);   return itype(6'h2B, rs, rt, imm); endfunction
  function automatic logic [31:0] bne(int rs, int rt, logic [15:0] off);  return itype(6'h05, rs, rt, off); endfunction

  function automatic logic [31:0] halt();                           return itype(6'h04, 0, 0, 16'hFFFF); endfunction

  function automatic void li(ref prog_t p, input int r, input logic [31:0] v);
    p.push_back(lui(r, v[31:16]));
    p.push_back(ori(r, r, v[15:0]));
  endfunction

  function automatic void k4x(ref prog_t p);
    repeat (4) p.push_back(k2rnd());
  endfunction

  // f8, Test Set 3. Index of the first kxor1 returned in start_idx.
  // Results: keystream block 0 = $1||$2 ^ (BLKCNT=1) before block 1, final k0||k1 = KS[1].
  function automatic prog_t f8_prog(output int start_idx);
    prog_t p;
    li(p, 1, 32'hFA556B26);                       // COUNT
    li(p, 2, 32'h1C000000);                       // BEARER || DIRECTION || 0...0
    li(p, 3, 32'h5ACB1D64); li(p, 4, 32'h4C0D5120);
    li(p, 5, 32'h4EA5F145); li(p, 6, 32'h1010D852);   // CK
    p.push_back(xor_(7, 0, 0));                   // BLKCNT = 0
    li(p, 10, 32'h55555555);                      // KM
    start_idx = p.size();
    p.push_back(kxor1(0, 1, 0));  p.push_back(kxor1(1, 2, 0));       // A = COUNT||BEARER||DIR
    p.push_back(kxor1(2, 3, 10)); p.push_back(kxor1(3, 4, 10));      // CK ^ KM
    p.push_back(kxor1(4, 5, 10)); p.push_back(kxor1(5, 6, 10));
    k4x(p);                                        // A = KASUMI[CK^KM](A)
    // restore CK while the last k2rnd is still rotating the key array
    p.push_back(kxor2(2, 10, 3));
    p.push_back(xori(7, 0, 1));                    // BLKCNT = 1
    p.push_back(kxor2(3, 10, 4));
    p.push_back(kxor2(4, 10, 4));
    p.push_back(kxor2(5, 10, 5));
    p.push_back(kxor3(1, 0, 0));                   // $1||$2 = A ^ BLKCNT
    p.push_back(kxor3(2, 7, 1));
    k4x(p);                                        // KS[0] = KASUMI[CK](A)
    repeat (3) p.push_back(nop());
    p.push_back(kxor2(0, 1, 0));                   // A ^ 1 ^ KS[0]
    p.push_back(kxor2(1, 2, 1));
    k4x(p);                                        // KS[1]
    repeat (4) p.push_back(nop());
    p.push_back(halt());
    return p;
  endfunction

  // f9, Test Set 1. MAC-I ends in $16; the accumulator B in $13||$14.
  function automatic prog_t f9_prog(output int start_idx);
    prog_t p;
    li(p, 1, 32'h38A6F056); li(p, 2, 32'h05D2EC49);   // COUNT, FRESH
    li(p, 3, 32'h6B227737); li(p, 4, 32'h296F393C);   // MESSAGE
    li(p, 5, 32'h8079353E); li(p, 6, 32'hDC87E2E8);
    li(p, 7, 32'h05D2EC49); li(p, 8, 32'hA4F2D8E0);
    li(p, 9, 32'h2BD6459F); li(p, 10, 32'h82C5B300);  // IK
    li(p, 11, 32'h952C4910); li(p, 12, 32'h4881FF48);
    li(p, 15, 32'hAAAAAAAA);                          // KM
    p.push_back(xori(8, 8, 16'h0002));                 // append DIRECTION (0) || 1 || 0...
    start_idx = p.size();
    p.push_back(kxor1(0, 1, 0));  p.push_back(kxor1(1, 2, 0));
    p.push_back(kxor1(2, 9, 0));  p.push_back(kxor1(3, 10, 0));
    p.push_back(kxor1(4, 11, 0)); p.push_back(kxor1(5, 12, 0));
    k4x(p);
    for (int m = 0; m < 3; m++) begin
      repeat (3) p.push_back(nop());
      p.push_back(kxor3(13, (m == 0) ? 0 : 13, 0));    // B ^= A
      p.push_back(kxor3(14, (m == 0) ? 0 : 14, 1));
      p.push_back(kxor2(0, 3 + 2*m, 0));               // A ^ PS
      p.push_back(kxor2(1, 4 + 2*m, 1));
      k4x(p);
    end
    repeat (3) p.push_back(nop());
    p.push_back(kxor3(13, 13, 0));
    p.push_back(kxor3(14, 14, 1));
    for (int i = 2; i < 6; i++) p.push_back(kxor2(i, 15, i));   // IK ^ KM
    p.push_back(kxor1(0, 13, 0));
    p.push_back(kxor1(1, 14, 0));
    k4x(p);
    repeat (3) p.push_back(nop());
    p.push_back(kxor3(16, 0, 0));                      // MAC-I
    repeat (4) p.push_back(nop());
    p.push_back(halt());
    return p;
  endfunction
endpackage
