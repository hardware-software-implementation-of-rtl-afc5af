// tb_kasumi_dpfi: the dual-port FI unit against the reference FI function.
// A new pair of (input, subkey) is applied on each port every cycle, just after the rising
// edge; the unit must give FI of that pair one cycle later, on both ports independently.
// Provenance: expected values come from the reference model or from the conformance vectors of
// the f8/f9 specification, and the cycle counts checked are those of the original design; the
// stimulus is chosen here.
module tb_kasumi_dpfi;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  word16_t x_a = 0, ki_a = 0, x_b = 0, ki_b = 0, fi_a, fi_b;
  kasumi_dpfi dut (.clk, .x_a, .ki_a, .x_b, .ki_b, .fi_a, .fi_b);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ea, eb;
    init();
    @(posedge clk); #1;
    for (int i = 0; i < 300; i++) begin
      x_a  = (i == 0) ? 16'h0000 : 16'($urandom);
      ki_a = (i == 0) ? 16'h0000 : 16'($urandom);
      x_b  = (i == 0) ? 16'hFFFF : 16'($urandom);
      ki_b = (i == 0) ? 16'hFFFF : 16'($urandom);
      ea = FI(x_a, ki_a);
      eb = FI(x_b, ki_b);
      @(posedge clk); #1;
      checks += 2;
      if (fi_a !== ea) begin failures++; $display("port a: FI(%h,%h) got %h exp %h", x_a, ki_a, fi_a, ea); end
      if (fi_b !== eb) begin failures++; $display("port b: FI(%h,%h) got %h exp %h", x_b, ki_b, fi_b, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
