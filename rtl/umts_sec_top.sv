// umts_sec_top: the KASUMI hardware of this design, side by side.
//
// KASUMI is the 64-bit block cipher under the UMTS confidentiality (f8) and integrity (f9)
// algorithms. The main design is myrisc_kasumi_core: a five-stage MIPS pipeline with a KASUMI
// functional unit, where f8 and f9 run as software built from four added instructions
// (kxor1/kxor2/kxor3 to move and combine data, k2rnd for two cipher rounds). Beside it stand
// the four stand-alone KASUMI cores, sharing the dual-port FI unit and its techniques but
// independent of the processor and of each other, each with its own ports:
//   kasumi_reuse1     one round per 2 cycles, 16 cycles per block
//   kasumi_reuse2     two rounds per 3 cycles, 12 cycles per block
//   kasumi_reuse3     iterated four-step two-round datapath, 16 cycles, preloaded key schedule
//   kasumi_pipelined  16-stage pipeline, one block per cycle
// One clock and one asynchronous active-low reset serve all of them.
// From the original design: the processor extension and the four stand-alone cores. Chosen
// here: putting them side by side in one top with shared clock and reset, and the
// processor-only reset.
module umts_sec_top
  import kasumi_pkg::*;
  import myrisc_pkg::*;
#(
  parameter int IMEM_WORDS = 1024,
  parameter int DMEM_WORDS = 1024
) (
  input  logic         clk,
  input  logic         rst_n,
  // extended processor
  input  logic         cpu_rst_n,
  input  logic         imem_we,
  input  logic [$clog2(IMEM_WORDS)-1:0] imem_addr,
  input  logic [31:0]  imem_wdata,
  input  logic [4:0]   dbg_reg_addr,
  output logic [31:0]  dbg_reg_data,
  output logic [31:0]  kregs [10],
  output logic [31:0]  pc,
  output events_t      ev,
  // reuse-based core 1
  input  logic         r1_start,
  input  logic [63:0]  r1_in_block,
  input  logic [127:0] r1_in_key,
  output logic         r1_busy, r1_done,
  output logic [63:0]  r1_out_block,
  // reuse-based core 2
  input  logic         r2_start,
  input  logic [63:0]  r2_in_block,
  input  logic [127:0] r2_in_key,
  output logic         r2_busy, r2_done,
  output logic [63:0]  r2_out_block,
  // reuse-based core 3
  input  logic         r3_load_en,
  input  logic [15:0]  r3_load_word,
  input  logic         r3_start,
  input  logic [63:0]  r3_in_block,
  output logic         r3_busy, r3_done,
  output logic [63:0]  r3_out_block,
  // pipelined core
  input  logic         p_in_valid,
  input  logic [63:0]  p_in_block,
  input  logic [127:0] p_in_key,
  output logic         p_out_valid,
  output logic [63:0]  p_out_block
);
  myrisc_kasumi_core #(.IMEM_WORDS(IMEM_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_cpu (
    .clk, .rst_n(rst_n && cpu_rst_n), .imem_we, .imem_addr, .imem_wdata,
    .dbg_reg_addr, .dbg_reg_data, .kregs, .pc, .ev);

  kasumi_reuse1 u_reuse1 (.clk, .rst_n, .start(r1_start), .in_block(r1_in_block),
    .in_key(r1_in_key), .busy(r1_busy), .done(r1_done), .out_block(r1_out_block));

  kasumi_reuse2 u_reuse2 (.clk, .rst_n, .start(r2_start), .in_block(r2_in_block),
    .in_key(r2_in_key), .busy(r2_busy), .done(r2_done), .out_block(r2_out_block));

  kasumi_reuse3 u_reuse3 (.clk, .rst_n, .load_en(r3_load_en), .load_word(r3_load_word),
    .start(r3_start), .in_block(r3_in_block), .busy(r3_busy), .done(r3_done),
    .out_block(r3_out_block));

  kasumi_pipelined u_pipe (.clk, .rst_n, .in_valid(p_in_valid), .in_block(p_in_block),
    .in_key(p_in_key), .out_valid(p_out_valid), .out_block(p_out_block));
endmodule
