// tb_kasumi_sbox_rom: checks both S-box ROMs, in both clock-edge variants.
// Reads every address of S9 and S7 through both ports at once (port b reads the mirrored
// address) and compares with the reference tables; a handful of entries are also compared with
// constants of the KASUMI specification written out here, so a wrong table file is caught.
// Checks that the rising-edge ROM changes its output only at a rising edge and the
// falling-edge ROM only at a falling edge.
// Provenance: expected values come from the reference model or from the conformance vectors of
// the f8/f9 specification, and the cycle counts checked are those of the original design; the
// stimulus is chosen here.
module tb_kasumi_sbox_rom;
  import kasumi_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [8:0] a9a = 0, a9b = 0, d9a, d9b;
  logic [6:0] a7a = 0, a7b = 0, d7a, d7b;

  kasumi_sbox_rom #(.AW(9), .DW(9), .NEG_EDGE(1'b0), .INIT_FILE("rtl/kasumi_s9.hex")) u9 (
    .clk, .addr_a(a9a), .addr_b(a9b), .data_a(d9a), .data_b(d9b));
  kasumi_sbox_rom #(.AW(7), .DW(7), .NEG_EDGE(1'b1), .INIT_FILE("rtl/kasumi_s7.hex")) u7 (
    .clk, .addr_a(a7a), .addr_b(a7b), .data_a(d7a), .data_b(d7b));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    logic [8:0] held9;
    logic [6:0] held7;
    init();
    // S9 on the rising edge
    for (int i = 0; i < 512; i++) begin
      @(negedge clk);
      a9a = 9'(i); a9b = 9'(511 - i);
      @(posedge clk); #1;
      check($sformatf("S9[%0d]", i), d9a, S9[i]);
      check($sformatf("S9[%0d] b", 511 - i), d9b, S9[511 - i]);
      if (i == 0)   check("S9[0] spec", d9a, 167);
      if (i == 2)   check("S9[2] spec", d9a, 161);
      if (i == 511) check("S9[511] spec", d9a, 461);
    end
    // S7 on the falling edge
    for (int i = 0; i < 128; i++) begin
      @(posedge clk);
      a7a = 7'(i); a7b = 7'(127 - i);
      @(negedge clk); #1;
      check($sformatf("S7[%0d]", i), d7a, S7[i]);
      check($sformatf("S7[%0d] b", 127 - i), d7b, S7[127 - i]);
      if (i == 0)   check("S7[0] spec", d7a, 54);
      if (i == 1)   check("S7[1] spec", d7a, 50);
      if (i == 127) check("S7[127] spec", d7a, 3);
    end
    // edge sensitivity: new address between edges must not show until the right edge
    @(posedge clk); #1;
    held9 = d9a; held7 = d7a;
    a9a = 9'd0; a7a = 7'd0;
    @(negedge clk); #1;
    check("S9 holds over falling edge", d9a, held9);
    check("S7 updates on falling edge", d7a, 54);
    a7a = 7'd1;
    @(posedge clk); #1;
    check("S9 updates on rising edge", d9a, 167);
    check("S7 holds over rising edge", d7a, 54);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
