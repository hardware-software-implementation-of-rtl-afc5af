// kasumi_sbox_rom: dual-port synchronous ROM holding one KASUMI S-box (S7: 128x7, S9: 512x9).
//
// Each of the two read ports registers its output on the active clock edge, as an FPGA block
// RAM does; one ROM thus serves the same S-box position of two FI functions at once. The edge
// is a parameter: the S-boxes of the first FI layer switch on the falling edge and those of the
// second layer on the rising edge, so that a whole FI takes one clock cycle.
// Contents: the S7/S9 tables of the KASUMI specification, read from a hex file at start-up
// (the file name is a parameter, relative to the directory the simulator runs in).
// Interface: addr_a/addr_b in, data_a/data_b out one edge later. No reset: a ROM.
// From the original design: synchronous dual-port memories for the S-boxes, on either clock
// edge. Chosen here: the initialisation from hex files.
module kasumi_sbox_rom #(
  parameter int    AW        = 9,
  parameter int    DW        = 9,
  parameter bit    NEG_EDGE  = 1'b0,
  parameter string INIT_FILE = "rtl/kasumi_s9.hex"
) (
  input  logic          clk,
  input  logic [AW-1:0] addr_a,
  input  logic [AW-1:0] addr_b,
  output logic [DW-1:0] data_a,
  output logic [DW-1:0] data_b
);
  logic [DW-1:0] rom [2**AW];

  initial $readmemh(INIT_FILE, rom);

  if (NEG_EDGE) begin : g_neg
    always_ff @(negedge clk) begin
      data_a <= rom[addr_a];
      data_b <= rom[addr_b];
    end
  end else begin : g_pos
    always_ff @(posedge clk) begin
      data_a <= rom[addr_a];
      data_b <= rom[addr_b];
    end
  end
endmodule
