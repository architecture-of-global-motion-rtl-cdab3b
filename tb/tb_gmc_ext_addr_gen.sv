// tb_gmc_ext_addr_gen: checks the external address generator.
//
// Three regions (one luma, two chroma), some reaching past the picture
// edges, are walked with a randomly withheld advance. The reference lists
// every pixel of the three regions in raster order with its clamped frame
// memory address, running row number and column, and the end-of-row flag.
module tb_gmc_ext_addr_gen;
  import gmc_pkg::*;
  localparam int W = 720, H = 576, AW = 20;
  localparam int CB = W * H, CR = CB + (W / 2) * (H / 2);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, adv = 0, valid, last_col;
  blk_set_t set [3];
  logic [AW-1:0] addr;
  logic [11:0] seq;
  logic [4:0] col;
  logic [1:0] comp;

  gmc_ext_addr_gen dut (.*);

  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      automatic int s = 0;
      for (int b = 0; b < 3; b++) begin
        set[b] = '0;
        set[b].ncols = 8'($urandom_range(2, 20));
        set[b].nrows = 8'($urandom_range(2, 20));
        set[b].x_lo = (t == 1) ? -16'sd3 : (t == 2) ? 16'(((b == 0) ? W : W / 2) - 5)
                                                    : 16'($urandom_range(0, 300));
        set[b].y_lo = (t == 3) ? -16'sd2 : (t == 4) ? 16'(((b == 0) ? H : H / 2) - 4)
                                                    : 16'($urandom_range(0, 250));
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int b = 0; b < 3; b++) begin
        automatic int pw = (b == 0) ? W : W / 2, ph = (b == 0) ? H : H / 2;
        automatic int base = (b == 0) ? 0 : (b == 1) ? CB : CR;
        for (int r = 0; r < set[b].nrows; r++) begin
          for (int c = 0; c < set[b].ncols; c++) begin
            automatic int ex = clampi(set[b].x_lo + c, 0, pw - 1), ey = clampi(set[b].y_lo + r, 0, ph - 1);
            adv = 0;
            while (!adv) begin
              adv = ($urandom % 4) != 0;
              if (!adv) @(negedge clk);
            end
            check("valid", valid, 1);
            check("addr", addr, base + ey * pw + ex);
            check("seq", seq, s);
            check("col", col, c);
            check("comp", comp, b);
            check("last_col", last_col, c == set[b].ncols - 1);
            @(negedge clk);
            adv = 0;
          end
          s++;
        end
      end
      check("end", valid, 0);
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
