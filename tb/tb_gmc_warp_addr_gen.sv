// tb_gmc_warp_addr_gen: checks the warping address generator.
//
// Random parameters and start points for luma (16x16) and chroma (8x8)
// blocks, with the enable withheld at random. Every pixel taken must have
// x = x_start + m0*i + m1*j and y = y_start + m3*i + m4*j, evaluated
// directly, in raster order, with last on the final pixel, and the block
// must take exactly N*N enabled cycles.
module tb_gmc_warp_addr_gen;
  import gmc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, chroma = 0, en = 0, active, last;
  coord_t x_start, y_start, x, y;
  gmc_params_t params;
  logic [3:0] col, row;

  gmc_warp_addr_gen dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int n, taken;
      params.m0 = $urandom_range(1500, 2600);
      params.m1 = $urandom_range(0, 600) - 300;
      params.m3 = $urandom_range(0, 600) - 300;
      params.m4 = $urandom_range(1500, 2600);
      x_start = $urandom_range(0, 1000000);
      y_start = $urandom_range(0, 1000000);
      chroma = t[0];
      n = chroma ? 8 : 16;
      load = 1;
      @(negedge clk) load = 0;
      taken = 0;
      while (active) begin
        en = ($urandom % 3) != 0;
        if (en) begin
          automatic int i = taken % n, j = taken / n;
          check("x", x, x_start + params.m0 * i + params.m1 * j);
          check("y", y, y_start + params.m3 * i + params.m4 * j);
          check("col", col, i);
          check("row", row, j);
          check("last", last, taken == n * n - 1);
          taken++;
        end
        @(negedge clk);
      end
      en = 0;
      check("count", taken, n * n);
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
