// kasumi_regfile: extended register file of the KASUMI functional unit (ten 32-bit registers).
//
//   reg 0, 1 : data block (0 = upper 32 bits); plaintext in, ciphertext out
//   reg 2..5 : 128-bit key K, reg 2 = K1||K2 ... reg 5 = K7||K8
//   reg 6..9 : key-schedule constants C1||C2 ... C7||C8, loaded by reset
// Writes are synchronous: a single 32-bit write (we/waddr/wdata) to registers 0..5 (higher
// addresses are read-only and the write is dropped), or a parallel 64-bit write of the block
// into registers 0 and 1 (blk_we). The key array 2..5 and the constant array 6..9 rotate
// "upwards" by one register (two 16-bit words) when rot is high: reg 2 <- reg 3 <- reg 4 <-
// reg 5 <- reg 2, likewise 6..9. Only the block write may coincide with a rotation, and the
// single and block writes never coincide; the assertions flag a program that breaks this.
// Reads are asynchronous: all ten registers in parallel, plus one addressed read port.
// Reset (asynchronous, active low) clears registers 0..5 and loads the constants.
// From the original design: ten registers with this layout, constants loaded by reset, upward
// rotation of key and constants, block write in parallel with rotation. Chosen here: dropping
// writes to the constant registers and checking the write rules with assertions.
module kasumi_regfile
  import kasumi_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [3:0]  waddr,
  input  logic [31:0] wdata,
  input  logic        blk_we,
  input  logic [63:0] blk_wdata,
  input  logic        rot,
  input  logic [3:0]  raddr,
  output logic [31:0] rdata,
  output logic [31:0] regs [10]
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 6; i++) regs[i] <= '0;
      for (int i = 0; i < 4; i++) regs[6+i] <= {KASUMI_C[2*i], KASUMI_C[2*i+1]};
    end else begin
      if (rot) begin
        for (int i = 0; i < 4; i++) begin
          regs[2+i] <= regs[2 + (i+1)%4];
          regs[6+i] <= regs[6 + (i+1)%4];
        end
      end
      if (blk_we) begin
        regs[0] <= blk_wdata[63:32];
        regs[1] <= blk_wdata[31:0];
      end
      if (we && waddr < 4'd6) regs[waddr] <= wdata;
    end
  end

  assign rdata = (raddr < 4'd10) ? regs[raddr] : 32'h0;

  a_no_write_during_rot: assert property (@(posedge clk) disable iff (!rst_n)
    !(rot && we && waddr >= 4'd2 && waddr < 4'd6));
  a_no_double_write: assert property (@(posedge clk) disable iff (!rst_n)
    !(blk_we && we && waddr < 4'd2));
endmodule
