// kasumi_ref_pkg: behavioural reference model of KASUMI for the testbenches.
// Straight software form of the cipher (FL, FO, FI, key schedule), with the S-box tables read
// from the same hex files as the ROMs. The tables themselves are checked by the known-answer
// vectors of the f8 and f9 conformance tests used in the testbenches.
// Provenance: reference model written from the KASUMI specification, independent of the RTL
// structure.
package kasumi_ref_pkg;
  logic [8:0] S9 [512];
  logic [6:0] S7 [128];
  bit loaded = 0;

  function automatic void init();
    if (!loaded) begin
      $readmemh("rtl/kasumi_s9.hex", S9);
      $readmemh("rtl/kasumi_s7.hex", S7);
      loaded = 1;
    end
  endfunction

  function automatic logic [15:0] rol(input logic [15:0] x, input int n);
    return (x << n) | (x >> (16 - n));
  endfunction

  function automatic logic [15:0] FI(input logic [15:0] x, input logic [15:0] k);
    logic [8:0] n; logic [6:0] r;
    n = x[15:7]; r = x[6:0];
    n = S9[n] ^ {2'b0, r};
    r = S7[r] ^ n[6:0];
    r = r ^ k[15:9];
    n = n ^ k[8:0];
    n = S9[n] ^ {2'b0, r};
    r = S7[r] ^ n[6:0];
    return {r, n};
  endfunction

  // Round keys for round i (0-based), packed like kasumi_pkg::rkeys_t
  function automatic logic [127:0] rkeys(input logic [127:0] key, input int i);
    logic [15:0] K [8], Kp [8];
    logic [15:0] C [8] = '{16'h0123, 16'h4567, 16'h89AB, 16'hCDEF, 16'hFEDC, 16'hBA98, 16'h7654, 16'h3210};
    for (int j = 0; j < 8; j++) begin K[j] = key[127-16*j -: 16]; Kp[j] = K[j] ^ C[j]; end
    return {rol(K[i], 1), Kp[(i+2)%8], rol(K[(i+1)%8], 5), rol(K[(i+5)%8], 8),
            rol(K[(i+6)%8], 13), Kp[(i+4)%8], Kp[(i+3)%8], Kp[(i+7)%8]};
  endfunction

  function automatic logic [31:0] FL(input logic [31:0] x, input logic [127:0] rk);
    logic [15:0] l, r;
    l = x[31:16]; r = x[15:0];
    r = r ^ rol(l & rk[127:112], 1);
    l = l ^ rol(r | rk[111:96], 1);
    return {l, r};
  endfunction

  function automatic logic [31:0] FO(input logic [31:0] x, input logic [127:0] rk);
    logic [15:0] l, r, t;
    logic [15:0] ko [3], ki [3];
    ko = '{rk[95:80], rk[79:64], rk[63:48]};
    ki = '{rk[47:32], rk[31:16], rk[15:0]};
    l = x[31:16]; r = x[15:0];
    for (int j = 0; j < 3; j++) begin
      t = FI(l ^ ko[j], ki[j]) ^ r;
      l = r; r = t;
    end
    return {l, r};
  endfunction

  // Rounds first..last (0-based, inclusive) on a 64-bit block
  function automatic logic [63:0] rounds(input logic [127:0] key, input logic [63:0] blk,
                                         input int first, input int last);
    logic [31:0] l, r, f;
    logic [127:0] rk;
    l = blk[63:32]; r = blk[31:0];
    for (int i = first; i <= last; i++) begin
      rk = rkeys(key, i);
      if (i % 2 == 0) f = FO(FL(l, rk), rk);
      else            f = FL(FO(l, rk), rk);
      r = r ^ f;
      {l, r} = {r, l};
    end
    return {l, r};
  endfunction

  function automatic logic [63:0] kasumi(input logic [127:0] key, input logic [63:0] blk);
    return rounds(key, blk, 0, 7);
  endfunction

  // Known-answer vectors: KASUMI blocks of the f8 Test Set 3 and f9 Test Set 1 conformance
  // tests (key, input, output).
  localparam int NKAT = 5;
  localparam logic [127:0] KAT_KEY [NKAT] = '{
    128'h0F9E4831_19580475_1BF0A410_45458D07, 128'h5ACB1D64_4C0D5120_4EA5F145_1010D852,
    128'h5ACB1D64_4C0D5120_4EA5F145_1010D852, 128'h2BD6459F_82C5B300_952C4910_4881FF48,
    128'h2BD6459F_82C5B300_952C4910_4881FF48};
  localparam logic [63:0] KAT_IN [NKAT] = '{
    64'hFA556B26_1C000000, 64'h3E5A6D0A_3D1C82A5, 64'h080F05BD_B7D1C148,
    64'h38A6F056_05D2EC49, 64'hE2C2D1E7_1FAE49AC};
  localparam logic [63:0] KAT_OUT [NKAT] = '{
    64'h3E5A6D0A_3D1C82A5, 64'h365568B7_8ACD43EC, 64'hF6BED6AC_4E0BCD5F,
    64'h89E0A6D0_36C17090, 64'h45C16C01_42460205};
endpackage
