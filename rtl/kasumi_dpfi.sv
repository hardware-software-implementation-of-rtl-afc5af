// kasumi_dpfi: two KASUMI FI functions merged onto four dual-port S-box ROMs ("dual-port FI").
//
// FI is a 16-bit, four-round Feistel function with a 9-bit and a 7-bit path: two S9 and two S7
// look-ups in two layers with the 16-bit subkey KI mixed in between. Instead of two FI blocks
// with eight S-boxes, the two FIs share one dual-port ROM per S-box position: port A computes
// FI(x_a, ki_a), port B computes FI(x_b, ki_b).
// Timing: x_* and ki_* must be valid in the first half of a cycle (driven from rising-edge
// registers). The first-layer ROMs and the registers that keep the 7-bit path and the subkey
// are clocked on the falling edge; the second-layer ROMs and the register keeping the 7-bit
// path are clocked on the next rising edge. fi_a/fi_b are then valid, combinationally, during
// the whole following cycle: a latency of exactly one cycle, as the design requires.
// From the original design: two FI functions sharing dual-port S-box ROMs, upper layer on the
// falling edge and lower layer on the rising edge, result after one cycle. Chosen here: the
// register names and the FI arithmetic kept in package functions.
module kasumi_dpfi
  import kasumi_pkg::*;
#(
  parameter string S7_FILE = "rtl/kasumi_s7.hex",
  parameter string S9_FILE = "rtl/kasumi_s9.hex"
) (
  input  logic    clk,
  input  word16_t x_a,  ki_a,
  input  word16_t x_b,  ki_b,
  output word16_t fi_a, fi_b
);
  // First layer (falling edge)
  logic [8:0] s9u_a, s9u_b;
  logic [6:0] s7u_a, s7u_b;
  logic [6:0] r0_a_q, r0_b_q;        // 7-bit path kept alongside the ROM outputs
  word16_t    ki_a_q, ki_b_q;

  kasumi_sbox_rom #(.AW(9), .DW(9), .NEG_EDGE(1'b1), .INIT_FILE(S9_FILE)) u_s9_up (
    .clk, .addr_a(x_a[15:7]), .addr_b(x_b[15:7]), .data_a(s9u_a), .data_b(s9u_b));
  kasumi_sbox_rom #(.AW(7), .DW(7), .NEG_EDGE(1'b1), .INIT_FILE(S7_FILE)) u_s7_up (
    .clk, .addr_a(x_a[6:0]), .addr_b(x_b[6:0]), .data_a(s7u_a), .data_b(s7u_b));

  always_ff @(negedge clk) begin
    r0_a_q <= x_a[6:0];
    r0_b_q <= x_b[6:0];
    ki_a_q <= ki_a;
    ki_b_q <= ki_b;
  end

  // Between the layers: {r1, n1} after the subkey
  logic [15:0] mid_a, mid_b;
  always_comb begin
    mid_a = fi_mid(s9u_a, s7u_a, r0_a_q, ki_a_q);
    mid_b = fi_mid(s9u_b, s7u_b, r0_b_q, ki_b_q);
  end

  // Second layer (rising edge)
  logic [8:0] s9l_a, s9l_b;
  logic [6:0] s7l_a, s7l_b;
  logic [6:0] r1_a_q, r1_b_q;

  kasumi_sbox_rom #(.AW(9), .DW(9), .NEG_EDGE(1'b0), .INIT_FILE(S9_FILE)) u_s9_lo (
    .clk, .addr_a(mid_a[8:0]), .addr_b(mid_b[8:0]), .data_a(s9l_a), .data_b(s9l_b));
  kasumi_sbox_rom #(.AW(7), .DW(7), .NEG_EDGE(1'b0), .INIT_FILE(S7_FILE)) u_s7_lo (
    .clk, .addr_a(mid_a[15:9]), .addr_b(mid_b[15:9]), .data_a(s7l_a), .data_b(s7l_b));

  always_ff @(posedge clk) begin
    r1_a_q <= mid_a[15:9];
    r1_b_q <= mid_b[15:9];
  end

  always_comb begin
    fi_a = fi_out(s9l_a, s7l_a, r1_a_q);
    fi_b = fi_out(s9l_b, s7l_b, r1_b_q);
  end
endmodule
