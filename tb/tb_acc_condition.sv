// tb_acc_condition: feeds random doubles (and zeros) through the base
// conversion and two's complement stages and checks, two cycles later, that the
// base-64 significand and exponent represent exactly the same real number, that
// the significand keeps its top two bits as sign extension, that the exponent
// is the upper five bits of the IEEE exponent, and that the tags line up.
module tb_acc_condition;
  import tb_spmv_pkg::*;

  logic clk = 0, rst = 1;
  logic [63:0] in_val;
  logic [15:0] in_tag, out_tag, tag_s1;
  logic signed [117:0] out_sig;
  logic [4:0] out_exp;
  int checks = 0, failures = 0;

  acc_condition dut (.clk, .rst, .in_val, .in_tag, .out_sig, .out_exp, .out_tag, .tag_s1);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] q_val [$];
  logic [15:0] q_tag [$];

  initial begin
    in_val = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_val = rand_double(-900, 900);
      if (i % 50 == 0) in_val = '0;
      in_tag = 16'(i);
      q_val.push_back(in_val);
      q_tag.push_back(in_tag);
      if (q_val.size() > 2) begin
        logic [63:0] v;
        logic [15:0] t;
        real got;
        v = q_val.pop_front();
        t = q_tag.pop_front();
        got = base_to_real(out_sig, out_exp);
        checks++;
        if (got != $bitstoreal(v) || out_exp !== v[62:58] || out_tag !== t
            || out_sig[117] !== out_sig[116]
            || (v[62:0] != 0 && (out_sig[117] !== v[63]))
            || tag_s1 !== q_tag[0]) begin
          failures++;
          if (failures < 10) $display("in %h: sig %h exp %0d real %g", v, out_sig, out_exp, got);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
