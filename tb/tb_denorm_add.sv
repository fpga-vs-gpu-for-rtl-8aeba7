// tb_denorm_add: adds random base-64 operand pairs (mixed signs, equal and
// distant exponents, pairs that overflow into the carry bit) and checks that
// the sum appears exactly three cycles later, that it equals the real sum to
// within the truncation of the aligned operand, and that the result is back in
// range (top two significand bits equal). Counts carry and shift-out cases.
module tb_denorm_add;
  import tb_spmv_pkg::*;

  logic clk = 0, rst = 1;
  logic signed [117:0] a_sig, b_sig, s_sig;
  logic [4:0] a_exp, b_exp, s_exp;
  int checks = 0, failures = 0, n_carry = 0, n_far = 0, n_neg = 0;

  denorm_add dut (.clk, .rst, .a_sig, .a_exp, .b_sig, .b_exp, .s_sig, .s_exp);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [117:0] rand_sig(bit big);
    logic [117:0] m;
    m = {$urandom, $urandom, $urandom, $urandom};
    m[117:116] = 2'b00;
    if (big) m[115] = 1'b1; else m[115:100] = {15'd0, 1'b1};
    return ($urandom_range(0, 1) == 1) ? -$signed(m) : $signed(m);
  endfunction

  real q_exp [$];
  real q_mag [$];

  initial begin
    a_sig = '0; b_sig = '0; a_exp = '0; b_exp = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 4000; i++) begin
      real ra, rb;
      @(negedge clk);
      a_sig = rand_sig(i % 3 == 0);
      b_sig = rand_sig(i % 5 == 0);
      a_exp = 5'($urandom_range(8, 20));
      b_exp = (i % 4 == 0) ? a_exp : 5'($urandom_range(8, 20));
      if (i % 7 == 0) begin   // same sign, both large: must carry
        a_sig = $signed({2'b00, 1'b1, 115'($urandom)});
        b_sig = $signed({2'b00, 1'b1, 115'($urandom)});
        b_exp = a_exp;
      end
      if (a_exp == b_exp && (a_sig + b_sig) > $signed({2'b01, 116'd0}) - 1) n_carry++;
      if (a_exp > b_exp + 1 || b_exp > a_exp + 1) n_far++;
      ra = base_to_real(a_sig, a_exp);
      rb = base_to_real(b_sig, b_exp);
      if (ra + rb < 0) n_neg++;
      q_exp.push_back(ra + rb);
      q_mag.push_back(fabs(ra) > fabs(rb) ? fabs(ra) : fabs(rb));
      if (q_exp.size() > 3) begin
        real e, m, got;
        e = q_exp.pop_front();
        m = q_mag.pop_front();
        got = base_to_real(s_sig, s_exp);
        checks++;
        if (fabs(got - e) > m * pow2(-50) || s_sig[117] !== s_sig[116]) begin
          failures++;
          if (failures < 10) $display("got %g expected %g", got, e);
        end
      end
    end
    if (n_carry == 0 || n_far == 0 || n_neg == 0) begin
      failures++; $display("coverage hole %0d %0d %0d", n_carry, n_far, n_neg);
    end
    $display("carry cases %0d, distant exponents %0d", n_carry, n_far);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
