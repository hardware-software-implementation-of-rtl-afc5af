// tb_myrisc_muldiv: checks the iterative multiply/divide unit against SystemVerilog arithmetic.
// Runs corner operands (zero, one, all ones, the most negative number) and 1500 random
// operations of each kind: mult, multu, div, divu. For each one it pulses start, counts the
// cycles busy stays high (must be 33) and compares {HI, LO} with the product, or LO/HI with
// the quotient/remainder (remainder takes the sign of the dividend). Also checks division by
// zero (LO all ones, HI the dividend for divu), the most negative number divided by -1 and
// the direct HI/LO writes of mthi/mtlo.
// Provenance: the expected results are the R2000 definitions of these instructions; the
// stimulus and the 33-cycle figure are this design's own.
module tb_myrisc_muldiv;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;

  logic        start = 0, is_div = 0, is_signed = 0, hi_we = 0, lo_we = 0, busy;
  logic [31:0] a = 0, b = 0, wdata = 0, hi, lo;
  int checks = 0, failures = 0;

  myrisc_muldiv dut (.clk, .rst_n, .start, .is_div, .is_signed, .a, .b, .hi_we, .lo_we, .wdata,
                     .busy, .hi, .lo);

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic op(input logic d, input logic s, input logic [31:0] x, input logic [31:0] y);
    int n = 0;
    logic [63:0] exp;
    @(negedge clk);
    start = 1; is_div = d; is_signed = s; a = x; b = y;
    @(negedge clk);
    start = 0;
    while (busy) begin n++; @(negedge clk); end
    check($sformatf("busy cycles %0d%0d %h %h", d, s, x, y), 64'(n), 64'd33);
    if (!d) exp = s ? 64'($signed({{32{x[31]}}, x}) * $signed({{32{y[31]}}, y})) : 64'({32'h0, x} * {32'h0, y});
    else if (y == 0) exp = {x, 32'hFFFF_FFFF};
    else if (s && x == 32'h8000_0000 && y == 32'hFFFF_FFFF) exp = {32'h0, 32'h8000_0000};
    else if (s) exp = {32'($signed(x) % $signed(y)), 32'($signed(x) / $signed(y))};
    else exp = {x % y, x / y};
    if (!(d && s && y == 0))            // signed division by zero: result not defined
      check($sformatf("op %0d%0d %h %h", d, s, x, y), {hi, lo}, exp);
  endtask

  initial begin
    static logic [31:0] corner [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0000_0007};
    #1 rst_n = 0;
    #11 rst_n = 1;
    check("reset", {hi, lo, 31'h0, busy}, '0);
    for (int d = 0; d < 2; d++)
      for (int s = 0; s < 2; s++)
        foreach (corner[i]) foreach (corner[j]) op(d[0], s[0], corner[i], corner[j]);
    for (int k = 0; k < 6000; k++) begin
      logic [31:0] x, y;
      x = $urandom; y = $urandom;
      if (k % 8 == 3) y = y >> (k % 29);          // small divisors too
      op(k[1], k[0], x, y);
    end
    // mthi / mtlo
    @(negedge clk); hi_we = 1; wdata = 32'h1234_5678;
    @(negedge clk); hi_we = 0; lo_we = 1; wdata = 32'h9ABC_DEF0;
    @(negedge clk); lo_we = 0;
    check("mthi/mtlo", {hi, lo}, 64'h12345678_9ABCDEF0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
