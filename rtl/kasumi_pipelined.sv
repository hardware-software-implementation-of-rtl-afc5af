// kasumi_pipelined: fully pipelined KASUMI block cipher, one 64-bit block per clock cycle.
//
// Four two-round sections (kasumi_2round, four steps each) are chained, each with its own
// pipelined key scheduler section (kasumi_keysched_pipe), giving a 16-stage pipeline. Every
// block carries its own key down the pipeline, so consecutive blocks may use different keys.
// There are no hazards: stages never share hardware and never wait for each other.
// Interface: when in_valid is high at a rising edge, in_block (plaintext) and in_key are
// taken; 16 rising edges later out_block holds the ciphertext and out_valid is high for one
// cycle. A block may be taken on every edge. The key array enters together with the fixed
// constant array C1..C8 of the key schedule. rst_n (asynchronous, active low) clears only
// the valid bits; data registers are not reset.
// From the original design: four chained two-round sections with a pipelined key scheduler, 16
// cycles of latency and one block per cycle. Chosen here: the valid flag that travels with each
// block and the key input per block.
module kasumi_pipelined
  import kasumi_pkg::*;
#(
  parameter int SECTIONS = 4          // two rounds each: 4 sections = 8 rounds
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [63:0]  in_block,
  input  logic [127:0] in_key,
  output logic         out_valid,
  output logic [63:0]  out_block
);
  localparam int LAT = 4 * SECTIONS;

  logic [31:0] l   [SECTIONS+1];
  logic [31:0] r   [SECTIONS+1];
  karr_t       kar [SECTIONS+1];
  karr_t       car [SECTIONS+1];
  logic [LAT:0] vld;

  // Input registers: entry to step 1 of the first section
  always_ff @(posedge clk) begin
    l[0]   <= in_block[63:32];
    r[0]   <= in_block[31:0];
    kar[0] <= key_to_arr(in_key);
    car[0] <= KASUMI_C;
  end

  for (genvar s = 0; s < SECTIONS; s++) begin : g_sec
    rkeys_t      rk_a, rk_b;
    logic [31:0] l2, r2;
    kasumi_keysched_pipe u_ks (.clk, .k_in(kar[s]), .c_in(car[s]), .rk_a, .rk_b,
                               .k_out(kar[s+1]), .c_out(car[s+1]));
    kasumi_2round        u_dp (.clk, .l0(l[s]), .r0(r[s]), .rk_a, .rk_b, .l2, .r2);
    always_ff @(posedge clk) begin
      l[s+1] <= l2;
      r[s+1] <= r2;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-1:0], in_valid};
  end

  assign out_valid = vld[LAT];
  assign out_block = {l[SECTIONS], r[SECTIONS]};
endmodule
