// acc_normalize: converts a finished base-b sum back to IEEE 754 double
// precision (the last four stages of the accumulator).
//
// Stage 1 takes the absolute value of the two's complement significand and
// keeps the sign. Stage 2 counts its leading zeros. Stage 3 shifts the
// significand so that its leading one becomes the hidden bit and computes the
// base-2 exponent, b * exponent + (position of the leading one) - 52, which
// converts back to base 2 and renormalizes in one step. Stage 4 packs sign,
// exponent and fraction. The stage split follows the document. Its choices:
// the fraction is truncated, a zero sum gives +0.0, results below the normal
// range flush to zero and results above it become infinity.
//
// Interface: in_valid qualifies a sum; out_valid, out_val and out_tag follow
// four cycles later. One sum can be accepted every cycle.
module acc_normalize #(
  parameter int unsigned LG_BASE = spmv_pkg::ACC_LG_BASE,
  parameter int unsigned TAG_W   = 16,
  localparam int unsigned BASE   = 1 << LG_BASE,
  localparam int unsigned SIG_W  = 54 + BASE,
  localparam int unsigned EXP_W  = 11 - LG_BASE,
  localparam int unsigned LZ_W   = $clog2(SIG_W + 1)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    in_valid,
  input  logic signed [SIG_W-1:0] in_sig,
  input  logic [EXP_W-1:0]        in_exp,
  input  logic [TAG_W-1:0]        in_tag,
  output logic                    out_valid,
  output logic [63:0]             out_val,
  output logic [TAG_W-1:0]        out_tag
);

  // Stage 1: absolute value (box 6).
  logic             s1_valid, s1_sign;
  logic [SIG_W-1:0] s1_mag;
  logic [EXP_W-1:0] s1_exp;
  logic [TAG_W-1:0] s1_tag;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_valid <= 1'b0;
      s1_sign  <= 1'b0;
      s1_mag   <= '0;
      s1_exp   <= '0;
      s1_tag   <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_sign  <= in_sig[SIG_W-1];
      s1_mag   <= in_sig[SIG_W-1] ? SIG_W'(-in_sig) : SIG_W'(in_sig);
      s1_exp   <= in_exp;
      s1_tag   <= in_tag;
    end
  end

  // Stage 2: count leading zeros (box 7).
  logic [LZ_W-1:0]  lz;
  always_comb begin
    lz = LZ_W'(SIG_W);
    for (int i = 0; i < int'(SIG_W); i++)
      if (s1_mag[i]) lz = LZ_W'(int'(SIG_W) - 1 - i);
  end

  logic             s2_valid, s2_sign;
  logic [SIG_W-1:0] s2_mag;
  logic [EXP_W-1:0] s2_exp;
  logic [TAG_W-1:0] s2_tag;
  logic [LZ_W-1:0]  s2_lz;

  always_ff @(posedge clk) begin
    if (rst) begin
      s2_valid <= 1'b0;
      s2_sign  <= 1'b0;
      s2_mag   <= '0;
      s2_exp   <= '0;
      s2_tag   <= '0;
      s2_lz    <= '0;
    end else begin
      s2_valid <= s1_valid;
      s2_sign  <= s1_sign;
      s2_mag   <= s1_mag;
      s2_exp   <= s1_exp;
      s2_tag   <= s1_tag;
      s2_lz    <= lz;
    end
  end

  // Stage 3: renormalize / base conversion (box 8).
  logic [SIG_W-1:0]   norm;
  logic signed [15:0] e2;
  always_comb begin
    norm = s2_mag << s2_lz;
    e2   = 16'(int'(s2_exp) * int'(BASE) + (int'(SIG_W) - 1 - int'(s2_lz)) - 52);
  end

  logic              s3_valid, s3_sign, s3_zero;
  logic [51:0]       s3_frac;
  logic signed [15:0] s3_e2;
  logic [TAG_W-1:0]  s3_tag;

  always_ff @(posedge clk) begin
    if (rst) begin
      s3_valid <= 1'b0;
      s3_sign  <= 1'b0;
      s3_zero  <= 1'b1;
      s3_frac  <= '0;
      s3_e2    <= '0;
      s3_tag   <= '0;
    end else begin
      s3_valid <= s2_valid;
      s3_sign  <= s2_sign;
      s3_zero  <= (s2_lz == LZ_W'(SIG_W));
      s3_frac  <= norm[SIG_W-2 -: 52];
      s3_e2    <= e2;
      s3_tag   <= s2_tag;
    end
  end

  // Stage 4: reassembly (box 9).
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_val   <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= s3_valid;
      out_tag   <= s3_tag;
      if (s3_zero)
        out_val <= 64'd0;
      else if (s3_e2 <= 0)
        out_val <= {s3_sign, 63'd0};
      else if (s3_e2 >= 16'sd2047)
        out_val <= {s3_sign, 11'h7FF, 52'd0};
      else
        out_val <= {s3_sign, s3_e2[10:0], s3_frac};
    end
  end

endmodule
