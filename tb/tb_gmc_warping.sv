// tb_gmc_warping: checks warping with local memory on its own.
//
// Affine parameters are given directly. The reference region of each block
// is worked out here from the warped positions of its four corner pixels,
// and every predicted pixel is computed from the affine formula and
// bilinear interpolation of the clamped reference pattern. Runs an
// identity, a rotated and zoomed, and a zoomed-out macroblock, with
// in-frame and border positions, and with random memory grant gaps; checks
// all 384 pixels of each, in order, with their addresses, that the
// macroblock reads exactly the bytes of its three regions, and that
// stalls, load waits and cascaded loading occur.
module tb_gmc_warping;
  import gmc_pkg::*;

  localparam int W = 720, H = 576, AW = 20;
  localparam int CB_BASE = W * H;
  localparam int CR_BASE = CB_BASE + (W / 2) * (H / 2);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, busy, done;
  logic [7:0] mbx = 0, mby = 0;
  gmc_params_t params;
  blk_set_t set [3];
  logic ext_req, ext_gnt, ext_rvalid, out_valid;
  logic [AW-1:0] ext_addr, out_addr;
  logic [7:0] ext_rdata, out_data;
  logic [1:0] out_comp;
  logic warp_stall, load_wait, cascade;

  // Behavioural stand-in for the shared multipliers.
  mul_a_t mul_a [NMUL];
  mul_b_t mul_b [NMUL];
  mul_p_t mul_p [NMUL];
  for (genvar i = 0; i < NMUL; i++) begin : g_mul
    assign mul_p[i] = mul_p_t'(mul_a[i]) * mul_p_t'(mul_b[i]);
  end
  logic mul_use;

  gmc_warping dut (.*);

  gmc_frame_mem #(.FRAME_W(W), .FRAME_H(H), .AW(AW), .LAT(3), .RAND_GNT(1'b1)) u_mem (
    .clk, .req(ext_req), .addr(ext_addr), .gnt(ext_gnt), .rvalid(ext_rvalid), .rdata(ext_rdata));

  int checks = 0, failures = 0, n_stall = 0, n_wait = 0, n_casc = 0, n_reads = 0;
  always @(posedge clk) if (rst_n) begin
    if (warp_stall) n_stall++;
    if (load_wait) n_wait++;
    if (cascade) n_casc++;
    if (ext_req && ext_gnt) n_reads++;
  end

  function automatic logic [7:0] refpix(int p, int x, int y);
    int pw = (p == 0) ? W : W / 2;
    int ph = (p == 0) ? H : H / 2;
    x = (x < 0) ? 0 : (x > pw - 1) ? pw - 1 : x;
    y = (y < 0) ? 0 : (y > ph - 1) ? ph - 1 : y;
    return 8'((x * 37) ^ (y * 91) ^ (p * 85) ^ ((x * y) >> 4));
  endfunction

  longint m [6];

  function automatic longint pos(int p, bit is_y, int x, int y);
    longint t = is_y ? m[5] : m[2];
    if (p != 0) t = t >>> 1;
    return is_y ? t + m[3] * x + m[4] * y : t + m[0] * x + m[1] * y;
  endfunction

  // Region and start of block p from its four corners.
  function automatic blk_set_t region(int p);
    blk_set_t s;
    int n = (p == 0) ? 16 : 8;
    longint xmn, xmx, ymn, ymx, v;
    s = '0;
    xmn = pos(p, 0, n * mbx, n * mby); xmx = xmn;
    ymn = pos(p, 1, n * mbx, n * mby); ymx = ymn;
    for (int c = 1; c < 4; c++) begin
      v = pos(p, 0, n * mbx + (c % 2) * (n - 1), n * mby + (c / 2) * (n - 1));
      if (v < xmn) xmn = v;
      if (v > xmx) xmx = v;
      v = pos(p, 1, n * mbx + (c % 2) * (n - 1), n * mby + (c / 2) * (n - 1));
      if (v < ymn) ymn = v;
      if (v > ymx) ymx = v;
    end
    s.x_start = pos(p, 0, n * mbx, n * mby);
    s.y_start = pos(p, 1, n * mbx, n * mby);
    s.x_lo = 16'(xmn >>> FRAC);
    s.y_lo = 16'(ymn >>> FRAC);
    s.ncols = 8'((xmx >>> FRAC) + 2 - (xmn >>> FRAC));
    s.nrows = 8'((ymx >>> FRAC) + 2 - (ymn >>> FRAC));
    s.row_lo_off = (m[3] < 0) ? m[3] * (n - 1) : 0;
    s.row_hi_off = (m[3] > 0) ? m[3] * (n - 1) : 0;
    return s;
  endfunction

  int exp_addr [$], exp_val [$];
  always @(posedge clk) if (rst_n && out_valid) begin
    int a, v;
    checks++;
    if (exp_addr.size() == 0) failures++;
    else begin
      a = exp_addr.pop_front();
      v = exp_val.pop_front();
      if (int'(out_addr) != a || int'(out_data) != v) begin
        failures++;
        if (failures < 10) $display("addr %0d/%0d data %0d/%0d", out_addr, a, out_data, v);
      end
    end
  end

  task automatic run(int x, int y);
    int reads0, bytes;
    mbx = 8'(x); mby = 8'(y);
    bytes = 0;
    for (int p = 0; p < 3; p++) begin
      int n = (p == 0) ? 16 : 8, pw = (p == 0) ? W : W / 2;
      int base = (p == 0) ? 0 : (p == 1) ? CB_BASE : CR_BASE;
      set[p] = region(p);
      bytes += set[p].ncols * set[p].nrows;
      for (int j = 0; j < n; j++)
        for (int i = 0; i < n; i++) begin
          longint X = pos(p, 0, n * x + i, n * y + j), Y = pos(p, 1, n * x + i, n * y + j);
          int xi = int'(X >>> FRAC), yi = int'(Y >>> FRAC);
          int fx = int'((X >>> (FRAC - IFRAC)) & 15), fy = int'((Y >>> (FRAC - IFRAC)) & 15);
          int s = (16 - fy) * ((16 - fx) * refpix(p, xi, yi) + fx * refpix(p, xi + 1, yi))
                + fy * ((16 - fx) * refpix(p, xi, yi + 1) + fx * refpix(p, xi + 1, yi + 1));
          exp_val.push_back((s + 128) >> 8);
          exp_addr.push_back(base + (n * y + j) * pw + n * x + i);
        end
    end
    reads0 = n_reads;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    @(posedge clk iff done);
    repeat (4) @(posedge clk);
    checks += 2;
    if (exp_addr.size() != 0) begin
      failures++;
      $display("%0d pixels missing", exp_addr.size());
      exp_addr.delete(); exp_val.delete();
    end
    if (n_reads - reads0 != bytes) begin
      failures++;
      $display("read %0d bytes, region holds %0d", n_reads - reads0, bytes);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Identity.
    m = '{2048, 0, 0, 0, 2048, 0};
    params = '{m0: 2048, m1: 0, m2: 0, m3: 0, m4: 2048, m5: 0};
    run(10, 10);
    // Zoom 1.06 with rotation 0.08, offset (12.3, -7.6) pixels.
    m = '{2171, -164, 25190, 164, 2171, -15565};
    params = '{m0: 2171, m1: -164, m2: 25190, m3: 164, m4: 2171, m5: -15565};
    run(20, 15);
    run(0, 0);
    run(44, 35);
    // Zoom-out 0.7 with rotation -0.05.
    m = '{1434, 102, 409600, -102, 1434, 204800};
    params = '{m0: 1434, m1: 102, m2: 409600, m3: -102, m4: 1434, m5: 204800};
    run(30, 20);
    checks += 3;
    if (n_stall == 0) failures++;
    if (n_wait == 0) failures++;
    if (n_casc == 0) failures++;
    $display("stall=%0d wait=%0d cascade=%0d", n_stall, n_wait, n_casc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
