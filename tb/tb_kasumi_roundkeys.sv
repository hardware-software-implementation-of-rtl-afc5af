// tb_kasumi_roundkeys: the combinational round-key generator.
// Starting from a key and the constants in their initial order, the rotated arrays are fed
// back eight times; round i's keys must equal the reference key schedule for round i, and
// after eight rotations both arrays must be back in their starting order.
// Provenance: expected values come from the reference model or from the conformance vectors of
// the f8/f9 specification, and the cycle counts checked are those of the original design; the
// stimulus is chosen here.
module tb_kasumi_roundkeys;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  int checks = 0, failures = 0;
  karr_t  k_in, c_in, k_next, c_next;
  rkeys_t rk;
  kasumi_roundkeys dut (.k_in, .c_in, .rk, .k_next, .c_next);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20; t++) begin
      logic [127:0] key;
      key = (t < NKAT) ? KAT_KEY[t] : {$urandom, $urandom, $urandom, $urandom};
      for (int j = 0; j < 8; j++) begin
        k_in[j] = key[127-16*j -: 16];
        c_in[j] = KASUMI_C[j];
      end
      for (int i = 0; i < 8; i++) begin
        #1;
        checks++;
        if (rk !== rkeys(key, i)) begin
          failures++; $display("key %0d round %0d: got %h exp %h", t, i, rk, rkeys(key, i));
        end
        k_in = k_next; c_in = c_next;
      end
      #1;
      checks += 2;
      for (int j = 0; j < 8; j++) begin
        if (k_in[j] !== key[127-16*j -: 16]) begin failures++; $display("key array not restored"); break; end
      end
      for (int j = 0; j < 8; j++) begin
        if (c_in[j] !== KASUMI_C[j]) begin failures++; $display("constant array not restored"); break; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
