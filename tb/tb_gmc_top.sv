// tb_gmc_top: end-to-end test of the GMC engine at its default size
// (720 x 576, MPEG-4 ASP@L5).
//
// For each scenario the test sends sprite points, runs a set of
// macroblocks and compares every predicted pixel and its address with a
// reference computed here directly from the affine formulas: position of
// pixel (x, y) = T + m0*x + m1*y (no scanline increments), then bilinear
// interpolation of the clamped reference pattern. Scenarios cover the
// stationary, translational, isotropic and affine models, macroblocks on
// the frame border (clamping), random grant gaps on the memory port
// (second memory instance), and a motion too large for the local memory
// (mb_error). It also counts warping stalls, load waits and cascaded chroma
// loading, and fails if any never happened. For the stationary model with
// a memory that grants every cycle it checks that a macroblock takes at
// most 496 cycles, the budget of 31 frames/s of 1620 macroblocks at 25 MHz.
module tb_gmc_top;
  import gmc_pkg::*;

  localparam int W = 720, H = 576, AW = 20;
  localparam int CB_BASE = W * H;
  localparam int CR_BASE = CB_BASE + (W / 2) * (H / 2);
  localparam int RS = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_start = 0, mb_start = 0;
  logic [1:0] num_pts = 0;
  sprite_t sp_x [3], sp_y [3];
  logic [7:0] mbx = 0, mby = 0;
  logic busy, frame_ready, mb_done, mb_error;
  logic ext_req, ext_gnt, ext_rvalid;
  logic [AW-1:0] ext_addr, out_addr;
  logic [7:0] ext_rdata, out_data;
  logic out_valid;
  logic [1:0] out_comp;
  logic warp_stall, load_wait, cascade;
  logic rand_mode = 0;

  gmc_top dut (.*);

  // Two memory models with the same contents: one grants every cycle, one
  // withholds grants at random. rand_mode selects which one serves.
  logic g0, g1, v0, v1;
  logic [7:0] d0, d1;
  gmc_frame_mem #(.FRAME_W(W), .FRAME_H(H), .AW(AW), .LAT(2), .RAND_GNT(1'b0)) u_mem0 (
    .clk, .req(ext_req && !rand_mode), .addr(ext_addr), .gnt(g0), .rvalid(v0), .rdata(d0));
  gmc_frame_mem #(.FRAME_W(W), .FRAME_H(H), .AW(AW), .LAT(3), .RAND_GNT(1'b1)) u_mem1 (
    .clk, .req(ext_req && rand_mode), .addr(ext_addr), .gnt(g1), .rvalid(v1), .rdata(d1));
  assign ext_gnt    = rand_mode ? g1 : g0;
  assign ext_rvalid = v0 | v1;
  assign ext_rdata  = v1 ? d1 : d0;

  int checks = 0, failures = 0;
  int n_stall = 0, n_wait = 0, n_casc = 0, n_err = 0, n_edge = 0, n_rand = 0;
  int n_model [4] = '{0, 0, 0, 0};

  always @(posedge clk) if (rst_n) begin
    if (warp_stall) n_stall++;
    if (load_wait)  n_wait++;
    if (cascade)    n_casc++;
  end

  // ---------------- reference model ----------------
  function automatic logic [7:0] pix(int p, int x, int y);
    return 8'((x * 37) ^ (y * 91) ^ (p * 85) ^ ((x * y) >> 4));
  endfunction

  function automatic logic [7:0] refpix(int p, int x, int y);
    int pw = (p == 0) ? W : W / 2;
    int ph = (p == 0) ? H : H / 2;
    if (x < 0) x = 0;
    if (x > pw - 1) x = pw - 1;
    if (y < 0) y = 0;
    if (y > ph - 1) y = ph - 1;
    return pix(p, x, y);
  endfunction

  longint m [6];

  function automatic longint rdiv(longint d, int n);
    longint r = ((longint'(1) <<< (ALPHA + RS)) + n / 2) / n;
    return (d * r + (longint'(1) <<< (RS - 1))) >>> RS;
  endfunction

  task automatic ref_params(int np);
    longint one = longint'(1) <<< FRAC;
    m[2] = (np == 0) ? 0 : longint'(sp_x[0]) * (1 << ALPHA);
    m[5] = (np == 0) ? 0 : longint'(sp_y[0]) * (1 << ALPHA);
    if (np < 2) begin
      m[0] = one; m[1] = 0; m[3] = 0; m[4] = one;
    end else begin
      m[0] = rdiv(sp_x[1] - sp_x[0], W);
      m[3] = rdiv(sp_y[1] - sp_y[0], W);
      m[1] = (np == 3) ? rdiv(sp_x[2] - sp_x[0], H) : -m[3];
      m[4] = (np == 3) ? rdiv(sp_y[2] - sp_y[0], H) : m[0];
    end
  endtask

  function automatic void expect_pix(int p, int x, int y, output int addr, output int val);
    longint t2 = (p == 0) ? m[2] : (m[2] >>> 1);
    longint t5 = (p == 0) ? m[5] : (m[5] >>> 1);
    longint X = t2 + m[0] * x + m[1] * y;
    longint Y = t5 + m[3] * x + m[4] * y;
    int xi = int'(X >>> FRAC), yi = int'(Y >>> FRAC);
    int fx = int'((X >>> (FRAC - IFRAC)) & 15), fy = int'((Y >>> (FRAC - IFRAC)) & 15);
    int s;
    int pw = (p == 0) ? W : W / 2;
    int base = (p == 0) ? 0 : (p == 1) ? CB_BASE : CR_BASE;
    s = (16 - fy) * ((16 - fx) * refpix(p, xi, yi) + fx * refpix(p, xi + 1, yi))
      + fy * ((16 - fx) * refpix(p, xi, yi + 1) + fx * refpix(p, xi + 1, yi + 1));
    val  = (s + 128) >> 8;
    addr = base + y * pw + x;
  endfunction

  // ---------------- output checking ----------------
  int exp_addr [$], exp_val [$];
  int got = 0;

  always @(posedge clk) begin
    if (out_valid) begin
      got++;
      checks++;
      if (exp_addr.size() == 0) begin
        failures++;
        $display("unexpected output addr %0d", out_addr);
      end else begin
        int a, v;
        a = exp_addr.pop_front();
        v = exp_val.pop_front();
        if (int'(out_addr) != a || int'(out_data) != v) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH addr %0d/%0d data %0d/%0d", out_addr, a, out_data, v);
        end
      end
    end
  end

  task automatic set_frame(int np, int x0, int y0, int x1, int y1, int x2, int y2);
    sp_x[0] = 16'(x0); sp_y[0] = 16'(y0);
    sp_x[1] = 16'(x1); sp_y[1] = 16'(y1);
    sp_x[2] = 16'(x2); sp_y[2] = 16'(y2);
    num_pts = 2'(np);
    ref_params(np);
    @(negedge clk) frame_start = 1;
    @(negedge clk) frame_start = 0;
    wait (frame_ready);
    checks++;
    if (dut.params.m0 != m[0] || dut.params.m1 != m[1] || dut.params.m3 != m[3] ||
        dut.params.m4 != m[4] || dut.params.m2 != m[2] || dut.params.m5 != m[5]) begin
      failures++;
      $display("param mismatch model %0d", np);
    end
    n_model[np]++;
  endtask

  // Runs one macroblock; returns its cycle count.
  task automatic run_mb(int x, int y, bit expect_err, output int cycles);
    int a, v, t0;
    if (!expect_err) begin
      for (int p = 0; p < 3; p++) begin
        int n = (p == 0) ? 16 : 8;
        for (int j = 0; j < n; j++)
          for (int i = 0; i < n; i++) begin
            expect_pix(p, n * x + i, n * y + j, a, v);
            exp_addr.push_back(a);
            exp_val.push_back(v);
          end
      end
    end
    @(negedge clk);
    mbx = 8'(x); mby = 8'(y); mb_start = 1;
    t0 = $time;
    @(negedge clk) mb_start = 0;
    @(posedge clk iff mb_done);
    cycles = ($time - t0) / 10;
    checks++;
    if (mb_error != expect_err) begin
      failures++;
      $display("mb (%0d,%0d) error flag %0d expected %0d", x, y, mb_error, expect_err);
    end
    if (mb_error) n_err++;
    $display("mb (%0d,%0d) model %0d: %0d cycles%s", x, y, num_pts, cycles, rand_mode ? " (grant gaps)" : "");
    repeat (3) @(posedge clk);
    checks++;
    if (exp_addr.size() != 0) begin
      failures++;
      $display("mb (%0d,%0d): %0d pixels missing", x, y, exp_addr.size());
      exp_addr.delete();
      exp_val.delete();
    end
    if (x == 0 || y == 0 || x == W / 16 - 1 || y == H / 16 - 1) n_edge++;
    if (rand_mode) n_rand++;
  endtask

  int cyc, worst;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Stationary model: prediction equals the reference; cycle budget.
    set_frame(0, 0, 0, 0, 0, 0, 0);
    worst = 0;
    for (int k = 0; k < 4; k++) begin
      run_mb(5 + k, 7, 0, cyc);
      if (cyc > worst) worst = cyc;
    end
    checks++;
    if (worst > 496) begin
      failures++;
      $display("stationary MB took %0d cycles, budget 496", worst);
    end
    $display("stationary macroblock: %0d cycles", worst);

    // Translational model: half-pel shift (sprite points in half-pel).
    set_frame(1, 7, -3, 0, 0, 0, 0);
    run_mb(10, 10, 0, cyc);
    run_mb(0, 0, 0, cyc);

    // Isotropic: zoom 1.05 and rotation about 0.06 rad.
    set_frame(2, 40, -30, 40 + 1512, -30 + 86, 0, 0);
    run_mb(3, 4, 0, cyc);
    run_mb(44, 35, 0, cyc);
    run_mb(20, 17, 0, cyc);

    // Affine: x scale 1.08, y scale 0.95, shear.
    set_frame(3, -25, 18, -25 + 1555, 18 - 100, -25 + 80, 18 + 1094);
    run_mb(0, 0, 0, cyc);
    run_mb(22, 18, 0, cyc);
    run_mb(44, 35, 0, cyc);
    run_mb(44, 0, 0, cyc);

    // Same affine motion with random memory grant gaps and longer latency.
    rand_mode = 1;
    run_mb(12, 9, 0, cyc);
    run_mb(0, 35, 0, cyc);
    rand_mode = 0;

    // Zoom-out 0.7: loading outruns warping and must wait for free rows.
    set_frame(2, 100, 60, 100 + 1008, 60 - 50, 0, 0);
    run_mb(15, 12, 0, cyc);
    run_mb(30, 20, 0, cyc);

    // Zoom 1.5: region wider than the local memory, macroblock rejected.
    set_frame(2, 0, 0, 2160, 0, 0, 0);
    run_mb(10, 10, 1, cyc);

    // Mechanism coverage.
    checks += 7;
    if (n_stall == 0) begin failures++; $display("no warping stall seen"); end
    if (n_wait == 0)  begin failures++; $display("no load wait seen"); end
    if (n_casc == 0)  begin failures++; $display("no cascaded loading seen"); end
    if (n_err == 0)   begin failures++; $display("no rejected macroblock"); end
    if (n_edge == 0)  begin failures++; $display("no border macroblock"); end
    if (n_rand == 0)  begin failures++; $display("no grant gaps"); end
    for (int k = 0; k < 4; k++) if (n_model[k] == 0) failures++;
    $display("stall=%0d wait=%0d cascade=%0d err=%0d edge=%0d pixels=%0d",
             n_stall, n_wait, n_casc, n_err, n_edge, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
