// denorm_add: the de-normalize/add datapath of the accumulator (compare/subtract,
// de-normalize, significand add and carry shift), latency ALPHA.
//
// Operands are base-b numbers: a signed (54+b)-bit two's complement significand
// and an (11-lg b)-bit exponent counting b-bit digits. The exponents are
// compared; the operand with the smaller exponent is shifted right by b bits per
// unit of difference; the significands are added; when the sum spills into the
// carry bit (the top two bits differ) the sum is shifted right by b bits and the
// larger exponent is incremented. These steps follow the document. Bits shifted
// out are dropped (truncation), which is this design's choice; the document
// does not say how they are rounded.
//
// As in the document, the logic is written as one combinational step followed
// by ALPHA-1 further registers, so that retiming can spread it over ALPHA
// stages. The output is the sum of the operands presented ALPHA cycles earlier.
// All pipeline registers reset to zero, so the pipeline then holds zero partial
// sums. The exponent is not widened: sums within a factor 2^b of the largest
// double would wrap it.
module denorm_add #(
  parameter int unsigned LG_BASE = spmv_pkg::ACC_LG_BASE,
  parameter int unsigned ALPHA   = spmv_pkg::ACC_ALPHA,
  localparam int unsigned BASE   = 1 << LG_BASE,
  localparam int unsigned SIG_W  = 54 + BASE,
  localparam int unsigned EXP_W  = 11 - LG_BASE
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [SIG_W-1:0] a_sig,
  input  logic [EXP_W-1:0]        a_exp,
  input  logic signed [SIG_W-1:0] b_sig,
  input  logic [EXP_W-1:0]        b_exp,
  output logic signed [SIG_W-1:0] s_sig,
  output logic [EXP_W-1:0]        s_exp
);

  // Digits after which an operand is shifted out entirely.
  localparam int unsigned MAX_DIGITS = (SIG_W + BASE - 1) / BASE;

  logic signed [SIG_W-1:0] hi_op, lo_op, sh_op, sum, sum_fix;
  logic [EXP_W-1:0]        emax, ediff, exp_fix;
  logic                    carry;

  always_comb begin
    // Compare/subtract (box 3).
    if (a_exp >= b_exp) begin
      hi_op   = a_sig;
      lo_op = b_sig;
      emax  = a_exp;
      ediff = a_exp - b_exp;
    end else begin
      hi_op   = b_sig;
      lo_op = a_sig;
      emax  = b_exp;
      ediff = b_exp - a_exp;
    end
    // De-normalize (box 4).
    if (int'(ediff) >= MAX_DIGITS)
      sh_op = lo_op >>> (SIG_W - 1);
    else
      sh_op = lo_op >>> (int'(ediff) * BASE);
    // Significand addition.
    sum   = hi_op + sh_op;
    // Carry shift (box 5).
    carry = sum[SIG_W-1] != sum[SIG_W-2];
    if (carry) begin
      sum_fix = sum >>> BASE;
      exp_fix = emax + 1'b1;
    end else begin
      sum_fix = sum;
      exp_fix = emax;
    end
  end

  logic signed [SIG_W-1:0] pipe_sig [ALPHA];
  logic [EXP_W-1:0]        pipe_exp [ALPHA];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(ALPHA); i++) begin
        pipe_sig[i] <= '0;
        pipe_exp[i] <= '0;
      end
    end else begin
      pipe_sig[0] <= sum_fix;
      pipe_exp[0] <= exp_fix;
      for (int i = 1; i < int'(ALPHA); i++) begin
        pipe_sig[i] <= pipe_sig[i-1];
        pipe_exp[i] <= pipe_exp[i-1];
      end
    end
  end

  assign s_sig = pipe_sig[ALPHA-1];
  assign s_exp = pipe_exp[ALPHA-1];

endmodule
