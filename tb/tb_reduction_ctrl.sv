// tb_reduction_ctrl: drives the set-change signal for sets of 8 values (back to
// back), longer sets and a long steady run, and checks every cycle's
// configuration against the sequence B, D, A, C, B, A, B, B, C, then B or D,
// and that the final-sum and set-start flags fall on the last C and on D.
module tb_reduction_ctrl;
  import spmv_pkg::*;

  logic clk = 0, rst = 1, set_change_next = 0;
  red_cfg_e cfg;
  logic final_sum, set_start;
  int checks = 0, failures = 0;
  int cnt [4];

  reduction_ctrl dut (.clk, .rst, .set_change_next, .cfg, .final_sum, .set_start);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sequence after the first value of a new set (document's order).
  red_cfg_e seq [8] = '{CFG_D, CFG_A, CFG_C, CFG_B, CFG_A, CFG_B, CFG_B, CFG_C};

  // Runs one set of n values; the set change is flagged on its last value.
  task automatic run_set(int n);
    for (int k = 0; k < n; k++) begin
      red_cfg_e e;
      @(negedge clk);
      set_change_next = (k == n - 1);
      e = (k < 8) ? seq[k] : CFG_B;
      #1;
      checks++;
      cnt[cfg]++;
      if (cfg !== e || final_sum !== (k == 7) || set_start !== (k == 0)) begin
        failures++;
        $display("value %0d of set: cfg %s final %0b start %0b, expected %s",
                 k, cfg.name(), final_sum, set_start, e.name());
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst = 0;
    // Steady state before the first change.
    repeat (5) begin
      @(negedge clk); #1; checks++;
      if (cfg !== CFG_B) failures++;
    end
    @(negedge clk); set_change_next = 1; #1; checks++;
    if (cfg !== CFG_B) failures++;
    run_set(8);
    run_set(8);
    run_set(13);
    run_set(9);
    run_set(8);
    run_set(40);
    foreach (cnt[i]) if (cnt[i] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
