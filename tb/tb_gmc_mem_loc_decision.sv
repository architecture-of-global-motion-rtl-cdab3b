// tb_gmc_mem_loc_decision: checks the memory location decision.
//
// Requests with random buffer rows and columns are pushed; responses come
// back in order after random delays with random data. Each response must
// produce one bank write, registered, at the interleaved location:
// bank = 2*(row mod 2) + (col mod 2), address = 20*(row div 4) +
// 10*((row div 2) mod 2) + col div 2; and a row_done pulse exactly for
// requests marked as the end of a row. Also checks that full stops pushes
// at 8 outstanding requests.
module tb_gmc_mem_loc_decision;
  import gmc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, last_col = 0, full, rvalid = 0, row_done;
  logic [2:0] slot;
  logic [4:0] col;
  logic [7:0] rdata, wdata;
  logic [3:0] we;
  logic [LM_AW-1:0] waddr;

  gmc_mem_loc_decision dut (.*);

  int checks = 0, failures = 0, n_full = 0;
  int q_slot [$], q_col [$], q_last [$];
  int e_bank [$], e_addr [$], e_data [$], e_last [$];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Check the registered write one cycle after each response.
  always @(posedge clk) if (rst_n) begin
    #1;
    if (e_bank.size() > 0) begin
      int b, a, d, l;
      b = e_bank.pop_front(); a = e_addr.pop_front(); d = e_data.pop_front(); l = e_last.pop_front();
      if (b < 0) begin
        check("no write", we, 0);
        check("no row_done", row_done, 0);
      end else begin
        check("we", we, 1 << b);
        check("waddr", waddr, a);
        check("wdata", wdata, d);
        check("row_done", row_done, l);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      // Drive at negedge, effective at next posedge.
      automatic int outstanding = q_slot.size();
      push = (t < 2800) && ($urandom % 3 != 0);
      slot = 3'($urandom);
      col = 5'($urandom_range(0, 19));
      last_col = ($urandom % 5) == 0;
      if (outstanding >= 8) begin
        n_full++;
        check("full", full, 1);
      end else check("not full", full, 0);
      rvalid = (outstanding > 0) && ($urandom % 4 == 0 || outstanding >= 8);
      rdata = 8'($urandom);
      if (rvalid) begin
        int s, c, l;
        s = q_slot.pop_front(); c = q_col.pop_front(); l = q_last.pop_front();
        e_bank.push_back(2 * (s % 2) + (c % 2));
        e_addr.push_back(20 * (s / 4) + 10 * ((s / 2) % 2) + c / 2);
        e_data.push_back(rdata);
        e_last.push_back(l);
      end else begin
        e_bank.push_back(-1); e_addr.push_back(0); e_data.push_back(0); e_last.push_back(0);
      end
      if (push && !(outstanding >= 8)) begin
        q_slot.push_back(slot); q_col.push_back(col); q_last.push_back(last_col);
      end
      @(negedge clk);
    end
    checks++;
    if (n_full == 0) failures++;
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
