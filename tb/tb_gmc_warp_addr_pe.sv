// tb_gmc_warp_addr_pe: checks one scanline address element.
//
// Random loads, column steps, row steps and idle cycles. The reference
// keeps the row-start and current values and applies the same rules:
// a column step adds col_inc to the current value, a row step adds
// row_inc to the row start and moves the current value there.
module tb_gmc_warp_addr_pe;
  import gmc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, next_col = 0, next_row = 0;
  coord_t init, col_inc, row_inc, coord;

  gmc_warp_addr_pe dut (.*);

  int checks = 0, failures = 0;
  longint rs, cur;

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    col_inc = 2100; row_inc = -150;
    for (int t = 0; t < 2000; t++) begin
      automatic int op = $urandom_range(0, 9);
      load = (op == 0);
      next_row = (op == 1 || op == 2);
      next_col = (op >= 3 && op <= 8);
      init = $urandom;
      if (t % 300 == 0) begin col_inc = $urandom_range(0, 4000); row_inc = $urandom_range(0, 600) - 300; end
      if (load) begin rs = init; cur = init; end
      else if (next_row) begin rs = rs + row_inc; cur = rs; end
      else if (next_col) cur = cur + col_inc;
      @(negedge clk);
      load = 0; next_row = 0; next_col = 0;
      if (t > 0 || op == 0) begin
        checks++;
        if (coord != coord_t'(cur)) begin
          failures++;
          if (failures < 10) $display("t=%0d got %0d expected %0d", t, coord, coord_t'(cur));
        end
      end
    end
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
