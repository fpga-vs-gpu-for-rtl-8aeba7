// tb_acc_normalize: feeds base-64 sums of random magnitude, sign and exponent
// (plus zero) and checks that the IEEE 754 result four cycles later is the
// real value truncated to 53 bits: never larger in magnitude, within one unit
// in the last place, same sign; valid and tag must follow with the same delay.
module tb_acc_normalize;
  import tb_spmv_pkg::*;

  logic clk = 0, rst = 1;
  logic in_valid, out_valid;
  logic signed [117:0] in_sig;
  logic [4:0] in_exp;
  logic [15:0] in_tag, out_tag;
  logic [63:0] out_val;
  int checks = 0, failures = 0;

  acc_normalize dut (.clk, .rst, .in_valid, .in_sig, .in_exp, .in_tag,
                     .out_valid, .out_val, .out_tag);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real q_v [$];
  bit  q_ok [$];
  logic [15:0] q_t [$];

  initial begin
    in_valid = 0; in_sig = '0; in_exp = '0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      logic [117:0] m;
      int sh;
      @(negedge clk);
      m = {$urandom, $urandom, $urandom, $urandom};
      m[117:116] = 2'b00;
      sh = int'($urandom_range(0, 115));
      m = m >> sh;
      if (i % 37 == 0) m = '0;
      in_sig   = ($urandom_range(0, 1) == 1) ? -$signed(m) : $signed(m);
      in_exp   = 5'($urandom_range(6, 25));
      in_valid = (i % 3 != 1);
      in_tag   = 16'(i);
      q_v.push_back(base_to_real(in_sig, in_exp));
      q_ok.push_back(in_valid);
      q_t.push_back(in_tag);
      if (q_v.size() > 4) begin
        real e, got;
        bit ok;
        logic [15:0] t;
        e = q_v.pop_front(); ok = q_ok.pop_front(); t = q_t.pop_front();
        got = $bitstoreal(out_val);
        checks++;
        if (out_valid !== ok || out_tag !== t || fabs(got) > fabs(e) * (1.0 + pow2(-60))
            || fabs(got - e) > fabs(e) * pow2(-51) || (e < 0.0) != (got < 0.0)
            || (e == 0.0 && out_val != 64'd0)) begin
          failures++;
          if (failures < 10) $display("got %h (%g) expected %g", out_val, got, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
