// tb_spmv_scaled: the engine widened to the lane counts of the scaled-bandwidth
// configurations (three to six times the five-lane packet, i.e. 15 to 30
// lanes), each running a random matrix with the size of the evaluation matrix
// paired with that bandwidth. It checks every result and the one-packet-per-
// cycle rate, and prints the slot utilisation (wider packets leave more lanes
// idle near the end of a matrix, which lowers it slightly).
module tb_spmv_scaled;
  int c [9], f [9];
  bit d [9];
  int checks, failures;

  tb_scaled_unit #(.NL(30), .NROWS(15374), .NCOLS(15374), .NNZ_MIN(20), .NNZ_MAX(59),
                   .NAME("TSOPF_RS_b162_c3-sized")) u0 (.checks(c[0]), .failures(f[0]), .done(d[0]));
  tb_scaled_unit #(.NL(30), .NROWS(17281), .NCOLS(17281), .NNZ_MIN(16), .NNZ_MAX(48),
                   .NAME("E40r1000-sized"))         u1 (.checks(c[1]), .failures(f[1]), .done(d[1]));
  tb_scaled_unit #(.NL(30), .NROWS(16146), .NCOLS(16146), .NNZ_MIN(32), .NNZ_MAX(94),
                   .NAME("olafu-sized"))            u2 (.checks(c[2]), .failures(f[2]), .done(d[2]));
  tb_scaled_unit #(.NL(25), .NROWS(13535), .NCOLS(13535), .NNZ_MIN(14), .NNZ_MAX(41),
                   .NAME("garon2-sized"))           u3 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  tb_scaled_unit #(.NL(20), .NROWS(10964), .NCOLS(10964), .NNZ_MIN(11), .NNZ_MAX(32),
                   .NAME("lhr11c-sized"))           u4 (.checks(c[4]), .failures(f[4]), .done(d[4]));
  tb_scaled_unit #(.NL(15), .NROWS(9129),  .NCOLS(9129),  .NNZ_MIN(3),  .NNZ_MAX(9),
                   .NAME("mark3jac020sc-sized"))    u5 (.checks(c[5]), .failures(f[5]), .done(d[5]));
  tb_scaled_unit #(.NL(15), .NROWS(8192),  .NCOLS(8192),  .NNZ_MIN(2),  .NNZ_MAX(8),
                   .NAME("dw8192-sized"))           u6 (.checks(c[6]), .failures(f[6]), .done(d[6]));
  tb_scaled_unit #(.NL(15), .NROWS(14318), .NCOLS(11028), .NNZ_MIN(2),  .NNZ_MAX(6),
                   .NAME("pssel-sized"))            u7 (.checks(c[7]), .failures(f[7]), .done(d[7]));
  tb_scaled_unit #(.NL(15), .NROWS(12111), .NCOLS(12111), .NNZ_MIN(3),  .NNZ_MAX(9),
                   .NAME("ncvxqp1-sized"))          u8 (.checks(c[8]), .failures(f[8]), .done(d[8]));

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=1 failures=1");
    $finish;
  end

  initial begin
    #100;
    wait (d.and() == 1'b1);
    checks = 0; failures = 0;
    foreach (c[i]) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
