// fp64_mul: pipelined IEEE 754 double-precision multiplier, the "X" box of each
// dot-product lane (matrix value times vector entry).
//
// The document only names the multiplier, so this is the simplest complete
// unit: stage 1 multiplies the two 53-bit significands and adds the exponents;
// stage 2 normalizes by at most one bit, rounds to nearest even and packs the
// result. Zero and subnormal inputs are treated as zero, results below the
// normal range flush to a signed zero and results above it become infinity.
// NaN and infinity inputs are not given special treatment (the accumulator
// downstream does not handle them either).
//
// Interface: a and b are accepted every cycle; p is the product of the pair
// presented two cycles earlier. There is no handshake; the caller delays any
// side-band information by two cycles.
module fp64_mul (
  input  logic        clk,
  input  logic        rst,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] p
);

  // Stage 1: significand product and exponent sum.
  logic         s1_sign;
  logic         s1_zero;
  logic [12:0]  s1_esum;     // ea + eb, unbiased later
  logic [105:0] s1_prod;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_sign <= 1'b0;
      s1_zero <= 1'b1;
      s1_esum <= '0;
      s1_prod <= '0;
    end else begin
      s1_sign <= a[63] ^ b[63];
      s1_zero <= (a[62:52] == 11'd0) || (b[62:52] == 11'd0);
      s1_esum <= {2'b00, a[62:52]} + {2'b00, b[62:52]};
      s1_prod <= {53'd0, 1'b1, a[51:0]} * {53'd0, 1'b1, b[51:0]};
    end
  end

  // Stage 2: normalize, round to nearest even, pack.
  logic        hi;
  logic [51:0] frac;
  logic        guard, sticky, round_up;
  logic [52:0] frac_rnd;
  logic signed [14:0] exp_n;
  logic [63:0] result;

  always_comb begin
    hi = s1_prod[105];
    if (hi) begin
      frac   = s1_prod[104:53];
      guard  = s1_prod[52];
      sticky = |s1_prod[51:0];
    end else begin
      frac   = s1_prod[103:52];
      guard  = s1_prod[51];
      sticky = |s1_prod[50:0];
    end
    round_up = guard & (sticky | frac[0]);
    frac_rnd = {1'b0, frac} + {52'd0, round_up};
    exp_n    = $signed({2'b00, s1_esum}) - 15'sd1023 + (hi ? 15'sd1 : 15'sd0)
             + (frac_rnd[52] ? 15'sd1 : 15'sd0);
    if (s1_zero || exp_n <= 0)
      result = {s1_sign, 63'd0};
    else if (exp_n >= 15'sd2047)
      result = {s1_sign, 11'h7FF, 52'd0};
    else
      result = {s1_sign, exp_n[10:0], frac_rnd[51:0]};
  end

  always_ff @(posedge clk) begin
    if (rst) p <= '0;
    else     p <= result;
  end

endmodule
