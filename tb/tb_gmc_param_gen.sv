// tb_gmc_param_gen: checks the global motion parameter generator.
//
// Random sprite points for each of the four models; the expected
// parameters are computed here from the defining formulas (division by W
// and H as a rounded fixed-point reciprocal; isotropic m1 = -m3, m4 = m0;
// stationary and translational give unit scale). Also checks the 5-cycle
// latency from start to done.
module tb_gmc_param_gen;
  import gmc_pkg::*;
  localparam int W = 720, H = 576, RS = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [1:0] num_pts = 0;
  sprite_t sp_x [3], sp_y [3];
  gmc_params_t params;

  // Behavioural stand-in for the shared multiplier.
  mul_a_t mul_a;
  mul_b_t mul_b;
  mul_p_t mul_p;
  assign mul_p = mul_p_t'(mul_a) * mul_p_t'(mul_b);

  gmc_param_gen dut (.*);

  int checks = 0, failures = 0;

  function automatic longint rdiv(longint d, int n);
    longint r = ((longint'(1) <<< (ALPHA + RS)) + n / 2) / n;
    return (d * r + (longint'(1) <<< (RS - 1))) >>> RS;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint one, e[6];
    int lat;
    one = longint'(1) <<< FRAC;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      automatic int np = t % 4;
      for (int k = 0; k < 3; k++) begin
        sp_x[k] = 16'($urandom_range(0, 3000)) - 16'sd1000;
        sp_y[k] = 16'($urandom_range(0, 3000)) - 16'sd1000;
      end
      num_pts = 2'(np);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!done) begin @(negedge clk); lat++; end
      check("latency", lat - 1, 5);  // done 5 edges after the edge that samples start
      e[2] = (np == 0) ? 0 : longint'(sp_x[0]) * 1024;
      e[5] = (np == 0) ? 0 : longint'(sp_y[0]) * 1024;
      if (np < 2) begin
        e[0] = one; e[1] = 0; e[3] = 0; e[4] = one;
      end else begin
        e[0] = rdiv(sp_x[1] - sp_x[0], W);
        e[3] = rdiv(sp_y[1] - sp_y[0], W);
        e[1] = (np == 3) ? rdiv(sp_x[2] - sp_x[0], H) : -e[3];
        e[4] = (np == 3) ? rdiv(sp_y[2] - sp_y[0], H) : e[0];
      end
      check("m0", params.m0, e[0]);
      check("m1", params.m1, e[1]);
      check("m2", params.m2, e[2]);
      check("m3", params.m3, e[3]);
      check("m4", params.m4, e[4]);
      check("m5", params.m5, e[5]);
    end
    // Exact case: a 2x zoom gives m0 = 2 * 2048.
    sp_x[0] = 0; sp_y[0] = 0; sp_x[1] = 16'(4 * W); sp_y[1] = 0; sp_x[2] = 0; sp_y[2] = 16'(4 * H);
    num_pts = 3;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    wait (done);
    check("zoom2 m0", params.m0, 4096);
    check("zoom2 m4", params.m4, 4096);
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
