// tb_vector_bram: writes random entries of the vector memory, then reads them
// back in random order and checks each value one cycle after its address.
module tb_vector_bram;
  logic clk = 0;
  logic we;
  logic [15:0] waddr, raddr;
  logic [63:0] wdata, rdata;
  int checks = 0, failures = 0;

  vector_bram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] shadow [int];
  int addrs [$];

  initial begin
    we = 0; waddr = 0; wdata = 0; raddr = 0;
    for (int i = 0; i < 2000; i++) begin
      int ad;
      @(negedge clk);
      ad = (i < 4) ? ((i == 0) ? 0 : (i == 1) ? 65535 : int'($urandom_range(0, 65535)))
                   : int'($urandom_range(0, 65535));
      we = 1; waddr = 16'(ad); wdata = {$urandom, $urandom};
      shadow[ad] = wdata;
      addrs.push_back(ad);
    end
    @(negedge clk); we = 0;
    addrs.shuffle();
    foreach (addrs[i]) begin
      raddr = 16'(addrs[i]);
      @(negedge clk);
      checks++;
      if (rdata !== shadow[addrs[i]]) begin
        failures++;
        if (failures < 10) $display("addr %0d: got %h expected %h", addrs[i], rdata, shadow[addrs[i]]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
