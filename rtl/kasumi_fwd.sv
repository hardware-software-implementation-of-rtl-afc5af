// kasumi_fwd: forwarding unit of the KASUMI functional unit.
//
// The instruction in the decode stage (a k2rnd needing the block and the key, or a kxor2/kxor3
// reading an extended register) must see values that are still on their way to the extended
// register file. Candidates, youngest first:
//   1. kxor1/kxor2 result in the integer EX stage     (ex_*)
//   2. kxor1/kxor2 result in the integer MEM stage    (mem_*)
//   3. kxor1/kxor2 result in the integer WB stage     (wb_*, written at the end of WB)
//   4. ciphertext of a k2rnd in step K4 (bypass)      (k4_*)
//   5. ciphertext of a k2rnd in the MEM step          (kmem_*, written at the end of MEM)
// Any integer-pipeline instruction is younger than a k2rnd still in K4 or MEM, because a k2rnd
// leaves the integer pipeline a bubble when it enters K1; hence the order. Other instructions
// are ignored, as they do not write the extended registers.
// Output: the up-to-date values of registers 0..5 (block and key), combinational, plus flags
// telling which source supplied the block or the key (for event counting).
// From the original design: a forwarding unit that supplies the newest block and key words to
// the key generation unit and K1. Chosen here: the priority order among the sources and the two
// source flags.
module kasumi_fwd (
  input  logic        ex_we,   input logic [3:0] ex_addr,   input logic [31:0] ex_data,
  input  logic        mem_we,  input logic [3:0] mem_addr,  input logic [31:0] mem_data,
  input  logic        wb_we,   input logic [3:0] wb_addr,   input logic [31:0] wb_data,
  input  logic        k4_valid,   input logic [63:0] k4_block,
  input  logic        kmem_valid, input logic [63:0] kmem_block,
  input  logic [31:0] file_regs [6],
  output logic [31:0] fwd_regs  [6],
  output logic        from_int,     // some register came from an integer stage
  output logic        from_k        // the block came from K4 or MEM of a k2rnd
);
  always_comb begin
    from_int = 1'b0;
    from_k   = 1'b0;
    for (int i = 0; i < 6; i++) begin
      fwd_regs[i] = file_regs[i];
      if (i < 2 && kmem_valid) begin
        fwd_regs[i] = (i == 0) ? kmem_block[63:32] : kmem_block[31:0];
        from_k = 1'b1;
      end
      if (i < 2 && k4_valid) begin
        fwd_regs[i] = (i == 0) ? k4_block[63:32] : k4_block[31:0];
        from_k = 1'b1;
      end
      if (wb_we  && wb_addr  == 4'(i)) begin fwd_regs[i] = wb_data;  from_int = 1'b1; end
      if (mem_we && mem_addr == 4'(i)) begin fwd_regs[i] = mem_data; from_int = 1'b1; end
      if (ex_we  && ex_addr  == 4'(i)) begin fwd_regs[i] = ex_data;  from_int = 1'b1; end
    end
  end
endmodule
