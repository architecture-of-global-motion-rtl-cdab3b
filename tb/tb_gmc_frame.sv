// tb_gmc_frame: one whole 720 x 576 frame (1620 macroblocks) through the
// engine at its default size, under a mild camera motion typical of real
// sequences (zoom 1.02, rotation about 0.01 rad, a small pan), with a
// frame memory that grants one byte every cycle.
//
// Every predicted pixel of the frame and its address is compared with a
// direct evaluation of the affine formula and bilinear interpolation of
// the reference pattern. The test reports the total cycle count and the
// resulting frame rate at 25 MHz (the ASP@L5 target is 30 frames/s, at
// most 833,333 cycles per frame). It requires that every macroblock is
// accepted, that the engine stays bound by its one-byte-per-cycle
// loading (at most 30 cycles per macroblock beyond the bytes it reads),
// and that the frame meets the 30 frames/s target.
module tb_gmc_frame;
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
  int n_bytes = 0;
  int n_stall = 0, n_wait = 0, n_casc = 0, n_err = 0, n_edge = 0, n_rand = 0;
  int n_model [4] = '{0, 0, 0, 0};

  always @(posedge clk) if (rst_n) begin
    if (warp_stall) n_stall++;
    if (load_wait)  n_wait++;
    if (cascade)    n_casc++;
    if (ext_req && ext_gnt) n_bytes++;
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

  int cyc, total;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    set_frame(3, 37, -22, 37 + 1469 - 0, -22 + 29, 37 - 23, -22 + 1175);
    total = 0;
    for (int y = 0; y < H / 16; y++)
      for (int x = 0; x < W / 16; x++) begin
        run_mb(x, y, 0, cyc);
        total += cyc;
      end
    checks++;
    if (total > n_bytes + 30 * (W / 16) * (H / 16)) begin
      failures++;
      $display("frame took %0d cycles for %0d bytes loaded", total, n_bytes);
    end
    checks++;
    if (total > 25_000_000 / 30) begin
      failures++;
      $display("frame took %0d cycles, more than the 30 frames/s budget", total);
    end
    $display("frame: %0d cycles, %0d bytes read, %0d macroblocks, %0d pixels, %0.2f frames/s at 25 MHz",
             total, n_bytes, (W / 16) * (H / 16), got, 25.0e6 / total);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
