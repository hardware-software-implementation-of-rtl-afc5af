// tb_kasumi_fwd: the forwarding unit of the KASUMI registers.
// Random combinations of pending writes (integer EX, MEM, WB stages; KASUMI K4 and MEM) are
// applied; for every register 0..5 the youngest pending value must win, in the order EX,
// MEM, WB, K4, MEM of the KASUMI unit, register file, and the two source flags must say
// where values came from. The expected result is computed here independently.
// Provenance: the expected values are computed in the testbench itself; the priority order
// checked is this design's own choice, the sources are those of the original design.
module tb_kasumi_fwd;
  int checks = 0, failures = 0;

  logic        ex_we, mem_we, wb_we, k4_valid, kmem_valid, from_int, from_k;
  logic [3:0]  ex_addr, mem_addr, wb_addr;
  logic [31:0] ex_data, mem_data, wb_data;
  logic [63:0] k4_block, kmem_block;
  logic [31:0] file_regs [6], fwd_regs [6];

  kasumi_fwd dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_int = 0, n_k = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [31:0] e [6];
      logic ei, ek;
      ex_we = 1'($urandom);  ex_addr = 4'($urandom % 12);  ex_data = $urandom;
      mem_we = 1'($urandom); mem_addr = 4'($urandom % 12); mem_data = $urandom;
      wb_we = 1'($urandom);  wb_addr = 4'($urandom % 12);  wb_data = $urandom;
      k4_valid = ($urandom % 4) == 0;   k4_block = {$urandom, $urandom};
      kmem_valid = ($urandom % 4) == 0; kmem_block = {$urandom, $urandom};
      for (int i = 0; i < 6; i++) file_regs[i] = $urandom;
      ei = 0; ek = 0;
      for (int i = 0; i < 6; i++) begin
        if (ex_we && ex_addr == 4'(i))        begin e[i] = ex_data;  ei = 1; end
        else if (mem_we && mem_addr == 4'(i)) begin e[i] = mem_data; ei = 1; end
        else if (wb_we && wb_addr == 4'(i))   begin e[i] = wb_data;  ei = 1; end
        else if (i < 2 && k4_valid)       e[i] = (i == 0) ? k4_block[63:32] : k4_block[31:0];
        else if (i < 2 && kmem_valid)     e[i] = (i == 0) ? kmem_block[63:32] : kmem_block[31:0];
        else                              e[i] = file_regs[i];
        if (i < 2 && (k4_valid || kmem_valid)) ek = 1;
      end
      #1;
      for (int i = 0; i < 6; i++) begin
        checks++;
        if (fwd_regs[i] !== e[i]) begin failures++; $display("t%0d reg %0d got %h exp %h", t, i, fwd_regs[i], e[i]); end
      end
      checks += 2;
      if (from_int !== ei) begin failures++; $display("t%0d from_int", t); end
      if (from_k !== ek) begin failures++; $display("t%0d from_k", t); end
      n_int += ei; n_k += ek;
    end
    checks++;
    if (n_int == 0 || n_k == 0) begin failures++; $display("a forwarding source never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
