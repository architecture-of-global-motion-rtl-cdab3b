// tb_gmc_mb_setting: checks macroblock setting.
//
// Random affine parameters and macroblock positions. The reference
// evaluates the warped position of all four corner pixels of each block
// directly (no sign-based corner choice), takes the minimum and maximum and
// derives the region box, the row spread of y' and the unsupported flag.
// Also checks the 15-cycle latency, the 5-cycle latency of the Y block
// (y_done) and that a chroma block is never flagged when the Y block fits.
module tb_gmc_mb_setting;
  import gmc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, y_done;
  logic [7:0] mbx, mby;
  gmc_params_t params;
  blk_set_t set [3];

  // Behavioural stand-in for the shared multiplier.
  mul_a_t mul_a;
  mul_b_t mul_b;
  mul_p_t mul_p;
  assign mul_p = mul_p_t'(mul_a) * mul_p_t'(mul_b);

  gmc_mb_setting dut (.*);

  int checks = 0, failures = 0, n_unsup = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint fl(longint v);  // floor to pixels
    return v >>> FRAC;
  endfunction

  initial begin
    int lat, ylat;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      // Scale 0.8..1.3, rotation/shear up to +-0.15, occasionally negative m4.
      params.m0 = 32'(1638 + $urandom_range(0, 1024));
      params.m4 = (t % 37 == 5) ? -32'sd2048 : 32'(1638 + $urandom_range(0, 1024));
      params.m1 = 32'($urandom_range(0, 614)) - 32'sd307;
      params.m3 = 32'($urandom_range(0, 614)) - 32'sd307;
      params.m2 = 32'($urandom_range(0, 2000000)) - 32'sd200000;
      params.m5 = 32'($urandom_range(0, 2000000)) - 32'sd200000;
      mbx = 8'($urandom_range(0, 44));
      mby = 8'($urandom_range(0, 35));
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      ylat = 0;
      while (!done) begin
        @(negedge clk);
        lat++;
        if (y_done) ylat = lat;
      end
      check("latency", lat - 1, 15);  // done 15 edges after the edge that samples start
      check("y latency", ylat - 1, 5);
      check("chroma fits when luma does", !set[0].unsupported && (set[1].unsupported || set[2].unsupported), 0);
      for (int b = 0; b < 3; b++) begin
        automatic int n = (b == 0) ? 16 : 8;
        automatic longint tx = (b == 0) ? params.m2 : (params.m2 >>> 1);
        automatic longint ty = (b == 0) ? params.m5 : (params.m5 >>> 1);
        automatic longint x0 = tx + params.m0 * (n * int'(mbx)) + params.m1 * (n * int'(mby));
        automatic longint y0 = ty + params.m3 * (n * int'(mbx)) + params.m4 * (n * int'(mby));
        automatic longint xs [4], ys [4];
        automatic longint xmin, xmax, ymin, ymax, ncols, nrows, rlo, rhi;
        bit uns;
        for (int c = 0; c < 4; c++) begin
          automatic int i = (c % 2) * (n - 1), j = (c / 2) * (n - 1);
          xs[c] = x0 + params.m0 * i + params.m1 * j;
          ys[c] = y0 + params.m3 * i + params.m4 * j;
        end
        xmin = xs[0]; xmax = xs[0]; ymin = ys[0]; ymax = ys[0];
        for (int c = 1; c < 4; c++) begin
          if (xs[c] < xmin) xmin = xs[c];
          if (xs[c] > xmax) xmax = xs[c];
          if (ys[c] < ymin) ymin = ys[c];
          if (ys[c] > ymax) ymax = ys[c];
        end
        ncols = fl(xmax) + 2 - fl(xmin);
        nrows = fl(ymax) + 2 - fl(ymin);
        rlo = (params.m3 < 0) ? params.m3 * (n - 1) : 0;
        rhi = (params.m3 > 0) ? params.m3 * (n - 1) : 0;
        uns = (ncols > 20) || (fl(rhi - rlo) + 2 > 6) || (params.m4 < 0) || (nrows > 255);
        if (uns) n_unsup++;
        check("x_start", set[b].x_start, x0);
        check("y_start", set[b].y_start, y0);
        check("x_lo", set[b].x_lo, fl(xmin));
        check("y_lo", set[b].y_lo, fl(ymin));
        check("ncols", set[b].ncols, ncols & 255);
        check("nrows", set[b].nrows, nrows & 255);
        check("row_lo_off", set[b].row_lo_off, rlo);
        check("row_hi_off", set[b].row_hi_off, rhi);
        check("unsupported", set[b].unsupported, uns);
      end
    end
    checks++;
    if (n_unsup == 0) failures++;
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
