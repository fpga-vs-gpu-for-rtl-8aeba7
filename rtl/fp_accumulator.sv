// fp_accumulator: double-precision accumulator that sums sets of values arriving
// one per cycle, back to back, without stalling, and reports one IEEE 754 sum
// per set.
//
// Values are first converted to base b = 2^LG_BASE with a two's complement
// significand (acc_condition), because a wide integer addition with a short
// exponent compare is faster than a base-2 floating-point add. The
// de-normalize/add pipeline (denorm_add, ALPHA = 3 stages) would create a data
// hazard between a value and the running sum; the reduction circuit avoids it by
// keeping ALPHA partial sums in flight (configuration B) and, when a new set
// starts, folding them into one sum with the help of a one-entry input buffer
// and a one-entry output buffer while the new set keeps flowing in
// (configurations D, A, C; see reduction_ctrl). Routing needs a 2-input mux on
// the first pipeline operand (incoming value or output buffer) and a 3-input mux
// on the second (pipeline output, input buffer or zero). The finished sum goes
// from the output buffer through acc_normalize back to IEEE 754. All of this
// follows the document; the stage split of acc_normalize and the tag handling
// are this design's.
//
// Interface: one value per cycle with a set tag (the row number). Consecutive
// values with equal tags form a set; a set must have at least 8 values. The
// all-ones tag marks filler that is never reported; the pipeline starts out
// holding such a set of zeros, so the first real set does not report a
// spurious sum. out_valid (the data_valid flag) pulses once per set with the sum
// and the tag of that set, 14 cycles after the first value of the next set is
// presented (2 conditioning stages, 8 reduction cycles, the output buffer and
// 4 normalization stages, the last of which registers the output). Sums leave in
// order.
module fp_accumulator
  import spmv_pkg::*;
#(
  parameter int unsigned LG_BASE = spmv_pkg::ACC_LG_BASE,
  parameter int unsigned TAG_W   = COL_W,
  localparam int unsigned BASE   = 1 << LG_BASE,
  localparam int unsigned SIG_W  = 54 + BASE,
  localparam int unsigned EXP_W  = 11 - LG_BASE
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [63:0]      in_val,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [63:0]      out_val,
  output logic [TAG_W-1:0] out_tag
);

  localparam logic [TAG_W-1:0] TAG_IDLE = '1;

  // Conditioning (stages 1 and 2).
  logic signed [SIG_W-1:0] c_sig;
  logic [EXP_W-1:0]        c_exp;
  logic [TAG_W-1:0]        c_tag, c_tag_s1;

  acc_condition #(.LG_BASE(LG_BASE), .TAG_W(TAG_W)) u_cond (
    .clk, .rst, .in_val, .in_tag,
    .out_sig(c_sig), .out_exp(c_exp), .out_tag(c_tag), .tag_s1(c_tag_s1)
  );

  // Reduction controller: set change seen by comparing stages 2 and 3.
  red_cfg_e cfg;
  logic     final_sum, set_start;

  reduction_ctrl u_ctrl (
    .clk, .rst,
    .set_change_next(c_tag_s1 != c_tag),
    .cfg, .final_sum, .set_start
  );

  // Buffers and operand routing.
  logic signed [SIG_W-1:0] p_sig, in_buf_sig, out_buf_sig, op1_sig, op2_sig;
  logic [EXP_W-1:0]        p_exp, in_buf_exp, out_buf_exp, op1_exp, op2_exp;

  always_comb begin
    // 2-input mux on the first operand.
    if (cfg == CFG_A) begin
      op1_sig = out_buf_sig;
      op1_exp = out_buf_exp;
    end else begin
      op1_sig = c_sig;
      op1_exp = c_exp;
    end
    // 3-input mux on the second operand.
    unique case (cfg)
      CFG_A, CFG_B: begin op2_sig = p_sig;      op2_exp = p_exp;      end
      CFG_C:        begin op2_sig = in_buf_sig; op2_exp = in_buf_exp; end
      default:      begin op2_sig = '0;         op2_exp = '0;         end
    endcase
  end

  denorm_add #(.LG_BASE(LG_BASE), .ALPHA(ACC_ALPHA)) u_add (
    .clk, .rst,
    .a_sig(op1_sig), .a_exp(op1_exp),
    .b_sig(op2_sig), .b_exp(op2_exp),
    .s_sig(p_sig),   .s_exp(p_exp)
  );

  logic [TAG_W-1:0] last_tag, done_tag;
  logic             buf_valid;
  logic [TAG_W-1:0] buf_tag;

  always_ff @(posedge clk) begin
    if (rst) begin
      in_buf_sig  <= '0;
      in_buf_exp  <= '0;
      out_buf_sig <= '0;
      out_buf_exp <= '0;
      last_tag    <= TAG_IDLE;
      done_tag    <= TAG_IDLE;
      buf_valid   <= 1'b0;
      buf_tag     <= TAG_IDLE;
    end else begin
      last_tag <= c_tag;
      if (set_start) done_tag <= last_tag;
      if (cfg == CFG_A) begin
        in_buf_sig <= c_sig;
        in_buf_exp <= c_exp;
      end
      if (cfg == CFG_C || cfg == CFG_D) begin
        out_buf_sig <= p_sig;
        out_buf_exp <= p_exp;
      end
      buf_valid <= final_sum && (done_tag != TAG_IDLE);
      buf_tag   <= done_tag;
    end
  end

  // Conversion back to IEEE 754 (stages 3+alpha to 7+alpha).
  acc_normalize #(.LG_BASE(LG_BASE), .TAG_W(TAG_W)) u_norm (
    .clk, .rst,
    .in_valid(buf_valid), .in_sig(out_buf_sig), .in_exp(out_buf_exp), .in_tag(buf_tag),
    .out_valid, .out_val, .out_tag
  );

endmodule
