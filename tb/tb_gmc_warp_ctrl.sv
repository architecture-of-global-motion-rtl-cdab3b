// tb_gmc_warp_ctrl: checks the warping controller's scheduling rules.
//
// The address generator and the loading path are modelled here. The warped
// rows follow the identity motion shifted by half a pixel, so row j of a
// block touches reference rows j and j+1 of its region. Region rows are
// four pixels wide, so loading runs ahead of warping and must wait for
// free rows. Row completions return two cycles after a row's last request.
// Checks, every cycle: a row is started only when both of its reference
// rows are complete; no row is requested while its buffer slot (sequence
// mod 8) still holds a row the current or a later block row needs; blocks
// are started Y, Cb, Cr; all 384 pixels are taken; done follows; and
// stalls, load waits and cascaded chroma loading all occur.
module tb_gmc_warp_ctrl;
  import gmc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  blk_set_t set [3];
  logic wag_load, wag_en, wag_active = 0, wag_last;
  logic [1:0] wag_blk;
  logic [11:0] wag_base;
  logic [3:0] wag_col = 0;
  coord_t wag_y;
  logic ld_valid = 0, fifo_full = 0, ext_gnt = 1, ext_req, ld_adv, row_done = 0;
  logic [11:0] ld_seq = 0;
  logic [1:0] ld_comp = 0;
  logic busy, done, warp_stall, load_wait, cascade;

  gmc_warp_ctrl dut (.*);

  int checks = 0, failures = 0;
  int n_stall = 0, n_wait = 0, n_casc = 0, n_pix = 0, n_done = 0;
  int rows_done = 0, cur_lo = 0, blk_seen [$];
  int row = 0, n = 16, ncols = 4, lcol = 0, lblk = 0, lrow = 0;
  int base [3] = '{0, 18, 28};
  int nrows [3] = '{18, 10, 10};
  logic [2:0] rd_pipe = 0;

  assign wag_y    = coord_t'(row * 2048 + 1024);
  assign wag_last = (wag_col == 4'(n - 1)) && (row == n - 1);

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%0t %s", $time, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    // Rules, checked on the values the controller acts on this cycle.
    if (wag_en && wag_col == 0)
      check("row started before its reference rows", base[wag_blk] + row + 1 < rows_done);
    if (ext_req)
      check("slot overwritten while needed", int'(ld_seq) < cur_lo + 8);
    if (warp_stall) n_stall++;
    if (load_wait)  n_wait++;
    if (cascade)    n_casc++;
    if (done)       n_done++;
    if (wag_active && wag_col == 0) cur_lo = base[wag_blk] + row;
    // Address generator model.
    if (wag_load) begin
      blk_seen.push_back(wag_blk);
      wag_active <= 1;
      n = (wag_blk == 0) ? 16 : 8;
      row = 0;
      wag_col <= 0;
    end else if (wag_en && wag_active) begin
      n_pix++;
      if (wag_last) wag_active <= 0;
      else if (wag_col == 4'(n - 1)) begin wag_col <= 0; row = row + 1; end
      else wag_col <= wag_col + 1;
    end
    // Loading model.
    rd_pipe <= {rd_pipe[1:0], ld_adv && lcol == ncols - 1};
    row_done <= rd_pipe[2];
    if (rd_pipe[2]) rows_done++;
    if (ld_adv) begin
      if (lcol == ncols - 1) begin
        lcol = 0;
        ld_seq <= ld_seq + 1;
        if (lrow == nrows[lblk] - 1) begin
          lrow = 0;
          if (lblk == 2) ld_valid <= 0;
          else begin lblk = lblk + 1; ld_comp <= 2'(lblk); end
        end else lrow = lrow + 1;
      end else lcol = lcol + 1;
    end
  end

  initial begin
    for (int b = 0; b < 3; b++) begin
      set[b] = '0;
      set[b].nrows = 8'(nrows[b]);
      set[b].ncols = 8'(ncols);
      set[b].row_hi_off = 0;
      set[b].row_lo_off = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    ld_valid = 1;
    start = 1;
    @(negedge clk) start = 0;
    wait (n_done == 1);
    repeat (5) @(negedge clk);
    check("blocks in order", blk_seen.size() == 3 && blk_seen[0] == 0 && blk_seen[1] == 1 && blk_seen[2] == 2);
    check("all pixels", n_pix == 384);
    check("all rows loaded", rows_done == 38);
    check("stall seen", n_stall > 0);
    check("load wait seen", n_wait > 0);
    check("cascade seen", n_casc > 0);
    check("idle", !busy);
    $display("pix=%0d stall=%0d wait=%0d cascade=%0d", n_pix, n_stall, n_wait, n_casc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
