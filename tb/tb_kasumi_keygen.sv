// tb_kasumi_keygen: the processor's key generation unit.
// The key and constant registers are presented as four 32-bit words each, rotated by one
// register (two rounds) at a time as the register file does; the two round-key sets given
// must be those of rounds 2j and 2j+1 of the reference key schedule.
// Provenance: expected values come from the reference model or from the conformance vectors of
// the f8/f9 specification, and the cycle counts checked are those of the original design; the
// stimulus is chosen here.
module tb_kasumi_keygen;
  import kasumi_pkg::*;
  import kasumi_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [31:0] key_w [4], const_w [4];
  rkeys_t rk_a, rk_b;
  kasumi_keygen dut (.key_w, .const_w, .rk_a, .rk_b);

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
      for (int j = 0; j < 4; j++) begin
        // register j+2 after 'pair' rotations holds words j+pair
        key_w[j]   = key[127-32*j -: 32];
        const_w[j] = {KASUMI_C[2*j], KASUMI_C[2*j+1]};
      end
      for (int pair = 0; pair < 4; pair++) begin
        logic [31:0] kw [4], cw [4];
        for (int j = 0; j < 4; j++) begin
          kw[j] = key[127-32*((j+pair)%4) -: 32];
          cw[j] = {KASUMI_C[2*((j+pair)%4)], KASUMI_C[2*((j+pair)%4)+1]};
        end
        key_w = kw; const_w = cw;
        #1;
        checks += 2;
        if (rk_a !== rkeys(key, 2*pair))   begin failures++; $display("key %0d round %0d: got %h", t, 2*pair, rk_a); end
        if (rk_b !== rkeys(key, 2*pair+1)) begin failures++; $display("key %0d round %0d: got %h", t, 2*pair+1, rk_b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
