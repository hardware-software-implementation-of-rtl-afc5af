// myrisc_muldiv: iterative multiply/divide unit with the HI and LO registers of the R2000.
//
// mult/multu form the 64-bit product {HI, LO}; div/divu give the quotient in LO and the
// remainder in HI (remainder with the sign of the dividend). Both work on magnitudes, one bit
// per cycle: shift-and-add for the product (multiplier in LO, partial product in HI, shifting
// right), restoring division for the quotient (dividend in LO, partial remainder in HI,
// shifting left). A final cycle applies the signs for the signed forms.
// Interface: start with a, b, is_div, is_signed (one cycle); busy is high for the next 33
// cycles, during which HI/LO must not be read (the pipeline interlocks on busy). hi_we/lo_we
// write HI/LO directly (mthi, mtlo) when the unit is idle. Division by zero leaves LO all ones
// (unsigned) and HI equal to the dividend; it raises nothing.
// From the original design: the R2000 instruction set of the base core, which includes these
// operations. Chosen here: the iterative algorithm and its timing; the base core itself is not
// part of the original work.
module myrisc_muldiv (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        is_div,
  input  logic        is_signed,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        hi_we,
  input  logic        lo_we,
  input  logic [31:0] wdata,
  output logic        busy,
  output logic [31:0] hi,
  output logic [31:0] lo
);
  logic [5:0]  cnt;
  logic        op_div, neg_res, neg_rem;
  logic [31:0] m, ua, ub;
  logic [32:0] sum, r33;
  logic [31:0] diff;
  logic        ge;

  assign busy = cnt != 6'd0;

  always_comb begin
    ua   = (is_signed && a[31]) ? 32'(-a) : a;
    ub   = (is_signed && b[31]) ? 32'(-b) : b;
    sum  = {1'b0, hi} + (lo[0] ? {1'b0, m} : 33'h0);
    r33  = {hi, lo[31]};
    ge   = r33 >= {1'b0, m};
    diff = r33[31:0] - m;          // the remainder when ge (it is below m)
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0; hi <= '0; lo <= '0; m <= '0;
      op_div <= 1'b0; neg_res <= 1'b0; neg_rem <= 1'b0;
    end else if (start) begin
      m       <= ub;
      op_div  <= is_div;
      neg_res <= is_signed && (a[31] ^ b[31]);
      neg_rem <= is_signed && a[31];
      hi      <= '0;
      lo      <= ua;
      cnt     <= 6'd33;
    end else if (cnt > 6'd1) begin
      cnt <= cnt - 6'd1;
      if (!op_div) begin
        hi <= sum[32:1];
        lo <= {sum[0], lo[31:1]};
      end else if (ge) begin
        hi <= diff;
        lo <= {lo[30:0], 1'b1};
      end else begin
        hi <= r33[31:0];
        lo <= {lo[30:0], 1'b0};
      end
    end else if (cnt == 6'd1) begin
      cnt <= '0;
      if (!op_div) begin
        if (neg_res) {hi, lo} <= 64'(-{hi, lo});
      end else begin
        if (neg_res) lo <= 32'(-lo);
        if (neg_rem) hi <= 32'(-hi);
      end
    end else begin
      if (hi_we) hi <= wdata;
      if (lo_we) lo <= wdata;
    end
  end
endmodule
