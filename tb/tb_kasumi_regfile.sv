// tb_kasumi_regfile: the ten extended registers of the KASUMI unit.
// Checks the reset contents (block and key cleared, constants loaded), single writes to
// registers 0..5 and the dropped write to the read-only constants, the 64-bit block write,
// the addressed read port, and the upward rotation of the key and constant arrays: after
// four rotations both arrays are back in place, and a block write in the same cycle as a
// rotation takes effect too. A shadow copy kept here is the reference.
// Provenance: the register layout, reset contents and rotation checked are those of the
// original design; the shadow model and the stimulus are written here.
module tb_kasumi_regfile;
  import kasumi_pkg::*;

  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        we = 0, blk_we = 0, rot = 0;
  logic [3:0]  waddr = 0, raddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [63:0] blk_wdata = 0;
  logic [31:0] regs [10];
  logic [31:0] model [10];

  kasumi_regfile dut (.clk, .rst_n, .we, .waddr, .wdata, .blk_we, .blk_wdata, .rot, .raddr, .rdata, .regs);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int i = 0; i < 10; i++) begin
      checks++;
      if (regs[i] !== model[i]) begin failures++; $display("%s: reg %0d got %h exp %h", what, i, regs[i], model[i]); end
      raddr = 4'(i); #0.1;
      checks++;
      if (rdata !== model[i]) begin failures++; $display("%s: read port %0d got %h", what, i, rdata); end
    end
  endtask

  task automatic step();
    logic [31:0] nm [10];
    nm = model;
    if (rot) for (int i = 0; i < 4; i++) begin
      nm[2+i] = model[2+(i+1)%4];
      nm[6+i] = model[6+(i+1)%4];
    end
    if (blk_we) begin nm[0] = blk_wdata[63:32]; nm[1] = blk_wdata[31:0]; end
    if (we && waddr < 6) nm[waddr] = wdata;
    model = nm;
    @(posedge clk); #1;
    we = 0; blk_we = 0; rot = 0;
  endtask

  initial begin
    model = '{0, 0, 0, 0, 0, 0, 32'h01234567, 32'h89ABCDEF, 32'hFEDCBA98, 32'h76543210};
    #1 rst_n = 0;
    #1;
    compare("reset");
    @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 10; i++) begin
      we = 1; waddr = 4'(i); wdata = $urandom;
      step();
    end
    compare("single writes");
    blk_we = 1; blk_wdata = {$urandom, $urandom};
    step();
    compare("block write");
    for (int r = 0; r < 4; r++) begin
      rot = 1;
      if (r == 2) begin blk_we = 1; blk_wdata = {$urandom, $urandom}; end
      if (r == 3) begin we = 1; waddr = 4'd1; wdata = $urandom; end
      step();
      compare($sformatf("rotation %0d", r));
    end
    checks++;
    if (regs[6] !== 32'h01234567) begin failures++; $display("constants not back in place"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
