// acc_condition: the two conditioning stages at the front of the accumulator
// (base conversion and two's complement).
//
// Stage 1 converts the IEEE 754 double from base 2 to base b = 2^LG_BASE: it
// restores the hidden leading 1, shifts the 53-bit significand left by the low
// LG_BASE bits of the exponent, keeps the upper 11-LG_BASE exponent bits as the
// base-b exponent and prefixes a zero sign bit and a zero carry bit, giving a
// (54+b)-bit significand. Stage 2 negates that significand when the input's sign
// bit is set. All of this follows the document. Treating a zero exponent field
// (zero and subnormal inputs) as a zero significand is this design's choice.
//
// Interface: one value per cycle, no handshake, latency 2. A tag (the row the
// value belongs to) travels alongside; tag_s1 is the tag one stage earlier than
// tag_out, which the reduction controller uses to see a set change coming.
module acc_condition #(
  parameter int unsigned LG_BASE = spmv_pkg::ACC_LG_BASE,
  parameter int unsigned TAG_W   = 16,
  localparam int unsigned BASE   = 1 << LG_BASE,
  localparam int unsigned SIG_W  = 54 + BASE,
  localparam int unsigned EXP_W  = 11 - LG_BASE
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [63:0]             in_val,
  input  logic [TAG_W-1:0]        in_tag,
  output logic signed [SIG_W-1:0] out_sig,
  output logic [EXP_W-1:0]        out_exp,
  output logic [TAG_W-1:0]        out_tag,
  output logic [TAG_W-1:0]        tag_s1
);

  // Stage 1: base conversion (box 1).
  logic [SIG_W-1:0] s1_mag;
  logic             s1_sign;
  logic [EXP_W-1:0] s1_exp;

  logic [SIG_W-1:0] conv_mag;
  always_comb begin
    conv_mag = '0;
    if (in_val[62:52] != 11'd0)
      conv_mag = {{(SIG_W-53){1'b0}}, 1'b1, in_val[51:0]} << in_val[52 +: LG_BASE];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1_mag  <= '0;
      s1_sign <= 1'b0;
      s1_exp  <= '0;
      tag_s1  <= '1;
    end else begin
      s1_mag  <= conv_mag;
      s1_sign <= in_val[63];
      s1_exp  <= in_val[62 -: EXP_W];
      tag_s1  <= in_tag;
    end
  end

  // Stage 2: two's complement (box 2).
  always_ff @(posedge clk) begin
    if (rst) begin
      out_sig <= '0;
      out_exp <= '0;
      out_tag <= '1;
    end else begin
      out_sig <= s1_sign ? -$signed(s1_mag) : $signed(s1_mag);
      out_exp <= s1_exp;
      out_tag <= tag_s1;
    end
  end

endmodule
