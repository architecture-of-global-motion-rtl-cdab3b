// tb_gmc_controller: checks the GMC controller's sequencing.
//
// Plays the three units with delayed done pulses. Checks that a frame
// start starts the parameter generator and raises frame_ready only after
// it finishes; that a macroblock before any frame is ignored; that a
// macroblock starts setting, starts warping once the Y block is set up,
// and ends with mb_done after warping; that a flagged macroblock skips
// warping and reports mb_error only after setting has finished; and that
// the shared multipliers go to the unit that is running.
module tb_gmc_controller;
  import gmc_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic frame_start = 0, mb_start = 0, pg_done = 0, ms_done = 0, ms_y_done = 0, ms_unsupported = 0, wp_done = 0;
  logic pg_start, ms_start, wp_start, busy, frame_ready, mb_done, mb_error;
  mul_owner_e mul_owner;

  gmc_controller dut (.*);

  int checks = 0, failures = 0;
  int exp_wp = 0;
  int n_pg = 0, n_ms = 0, n_wp = 0, n_done = 0, n_err = 0;

  always @(posedge clk) if (rst_n) begin
    if (pg_start) n_pg++;
    if (ms_start) n_ms++;
    if (wp_start) n_wp++;
    if (mb_done)  n_done++;
    if (mb_error) n_err++;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1;
    @(negedge clk) s = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    pulse(mb_start);
    repeat (3) @(negedge clk);
    check("mb before frame ignored", n_ms, 0);
    pulse(frame_start);
    @(negedge clk);
    check("pg started", n_pg, 1);
    check("multipliers to pg", mul_owner, MUL_PG);
    check("not ready yet", frame_ready, 0);
    check("busy", busy, 1);
    repeat (4) @(negedge clk);
    pulse(pg_done);
    @(negedge clk);
    check("ready", frame_ready, 1);
    for (int k = 0; k < 4; k++) begin
      ms_unsupported = (k == 2);
      pulse(mb_start);
      @(negedge clk);
      check("ms started", n_ms, k + 1);
      check("multipliers to ms", mul_owner, MUL_MS);
      repeat (4) @(negedge clk);
      check("no warp before the Y block is set up", n_wp, exp_wp);
      pulse(ms_y_done);
      @(negedge clk);
      if (k == 2) begin
        check("skipped warp", n_wp, exp_wp);
        repeat (8) @(negedge clk);
        check("no error before setting done", n_err, 0);
        pulse(ms_done);
        @(negedge clk);
        check("error", n_err, 1);
        check("skipped warp", n_wp, exp_wp);
        check("done", n_done, k + 1);
      end else begin
        exp_wp++;
        check("warp started", n_wp, exp_wp);
        check("multipliers still to ms", mul_owner, MUL_MS);
        repeat (8) @(negedge clk);
        pulse(ms_done);
        @(negedge clk);
        check("multipliers to warping", mul_owner, MUL_WARP);
        check("not done after setting", n_done, k);
        repeat (20) @(negedge clk);
        check("not done before warp", n_done, k);
        pulse(wp_done);
        @(negedge clk);
        check("done", n_done, k + 1);
      end
      check("idle", busy, 0);
    end
    check("errors", n_err, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
