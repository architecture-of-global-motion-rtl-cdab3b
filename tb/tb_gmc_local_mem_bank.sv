// tb_gmc_local_mem_bank: checks a 40 x 8 local memory bank.
//
// Fills every word, then issues random simultaneous writes and reads and
// compares each read, one cycle later, with a reference array; a read of
// the word written in the same cycle must return the previous contents.
module tb_gmc_local_mem_bank;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0;
  logic [5:0] waddr, raddr;
  logic [7:0] wdata, rdata;

  gmc_local_mem_bank dut (.*);

  int checks = 0, failures = 0, n_same = 0;
  logic [7:0] model [40];

  initial begin
    int exp;
    for (int a = 0; a < 40; a++) begin
      @(negedge clk);
      we = 1; waddr = 6'(a); wdata = 8'($urandom); raddr = 0;
      model[a] = wdata;
    end
    @(negedge clk) we = 0;
    for (int t = 0; t < 2000; t++) begin
      we = $urandom % 2;
      waddr = 6'($urandom_range(0, 39));
      raddr = (t % 7 == 0) ? waddr : 6'($urandom_range(0, 39));
      wdata = 8'($urandom);
      if (we && raddr == waddr) n_same++;
      exp = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata != 8'(exp)) begin
        failures++;
        if (failures < 10) $display("read %0d got %0d expected %0d", raddr, rdata, exp);
      end
    end
    checks++;
    if (n_same == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
