// gmc_warping: warping with local memory.
//
// Produces the global-motion-compensated Y, Cb and Cr blocks of one
// macroblock. The external address generator streams the reference
// regions from the frame memory, one byte per accepted request; memory
// location decision writes each byte into one of four interleaved local
// memory banks; the warping address generator walks the current block in
// raster order and gives each pixel's warped position; the four banks
// return its 2x2 neighbourhood in one cycle and the interpolation filter
// blends it. The warping controller overlaps loading and warping
// (cascaded scheduling).
//
// Pipeline of a warped pixel: cycle t the address generator offers it and
// the bank addresses are formed; the banks return data in t+1; the filter
// result appears in t+3 on out_valid/out_data with out_addr its address in
// the frame memory (same plane layout as the reference frame) and
// out_comp its plane (0 Y, 1 Cb, 2 Cr). One pixel per cycle when not
// stalled: 384 pixels per macroblock.
//
// Frame memory read port: ext_req/ext_addr is a request, taken when
// ext_gnt is high in the same cycle. Read data returns on ext_rvalid/
// ext_rdata some cycles later, in request order, one byte each.
//
// The filter's multiplications go out on mul_a/mul_b and come back on
// mul_p (the engine's shared multipliers); mul_use marks the cycles in
// which the products are needed.
//
// The unit structure (controller, two address generators, memory
// location decision, four banks, filter) follows the published design;
// the pipeline timing and the memory handshakes are this design's own.
module gmc_warping
  import gmc_pkg::*;
#(
  parameter int FRAME_W = 720,
  parameter int FRAME_H = 576,
  parameter int AW      = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [7:0]    mbx,
  input  logic [7:0]    mby,
  input  gmc_params_t   params,
  input  blk_set_t      set [3],
  output logic          busy,
  output logic          done,
  // frame memory read
  output logic          ext_req,
  output logic [AW-1:0] ext_addr,
  input  logic          ext_gnt,
  input  logic          ext_rvalid,
  input  logic [7:0]    ext_rdata,
  // compensated pixels
  output logic          out_valid,
  output logic [AW-1:0] out_addr,
  output logic [7:0]    out_data,
  output logic [1:0]    out_comp,
  // status
  output logic          warp_stall,
  output logic          load_wait,
  output logic          cascade,
  // shared multipliers, used by the interpolation filter
  output mul_a_t        mul_a [NMUL],
  output mul_b_t        mul_b [NMUL],
  input  mul_p_t        mul_p [NMUL],
  output logic          mul_use
);

  localparam int CB_BASE = FRAME_W * FRAME_H;
  localparam int CR_BASE = CB_BASE + (FRAME_W / 2) * (FRAME_H / 2);

  // ---------------- loading side ----------------
  logic        ld_valid, ld_adv, ld_last;
  logic [11:0] ld_seq;
  logic [4:0]  ld_col;
  logic [1:0]  ld_comp;
  logic        fifo_full, row_done;
  logic [3:0]  bank_we;
  logic [LM_AW-1:0] bank_waddr;
  logic [7:0]  bank_wdata;

  gmc_ext_addr_gen #(.FRAME_W(FRAME_W), .FRAME_H(FRAME_H), .AW(AW)) u_eag (
    .clk, .rst_n, .start, .set, .adv(ld_adv), .valid(ld_valid),
    .addr(ext_addr), .seq(ld_seq), .col(ld_col), .last_col(ld_last), .comp(ld_comp)
  );

  gmc_mem_loc_decision u_mld (
    .clk, .rst_n, .push(ld_adv), .slot(ld_seq[2:0]), .col(ld_col),
    .last_col(ld_last), .full(fifo_full), .rvalid(ext_rvalid), .rdata(ext_rdata),
    .we(bank_we), .waddr(bank_waddr), .wdata(bank_wdata), .row_done
  );

  // ---------------- warping side ----------------
  logic        wag_load, wag_en, wag_active, wag_last;
  logic [1:0]  wag_blk;
  logic [11:0] wag_base;
  coord_t      wx, wy;
  logic [3:0]  wcol, wrow;
  blk_set_t    cs;

  assign cs = set[wag_blk];

  gmc_warp_ctrl u_ctrl (
    .clk, .rst_n, .start, .set,
    .wag_load, .wag_blk, .wag_en, .wag_base, .wag_active, .wag_col(wcol),
    .wag_y(wy), .wag_last,
    .ld_valid, .ld_seq, .ld_comp, .fifo_full, .ext_gnt, .ext_req, .ld_adv,
    .row_done, .busy, .done, .warp_stall, .load_wait, .cascade
  );

  gmc_warp_addr_gen u_wag (
    .clk, .rst_n, .load(wag_load), .chroma(wag_blk != 2'd0),
    .x_start(cs.x_start), .y_start(cs.y_start), .params, .en(wag_en),
    .active(wag_active), .x(wx), .y(wy), .col(wcol), .row(wrow), .last(wag_last)
  );

  // Top-left neighbour in region coordinates, and the bank addresses of the
  // 2x2 neighbourhood: bank {rb, cb} holds whichever of rows r, r+1 has
  // parity rb and whichever of columns c, c+1 has parity cb.
  logic [4:0]  rc;
  logic [11:0] rs;
  logic [LM_AW-1:0] raddr [4];
  logic [7:0]  rdata [4];

  always_comb begin
    logic [11:0] rrow;
    logic [4:0]  rcol;
    rc = 5'(coord_int(wx) - cs.x_lo);
    rs = 12'(coord_int(wy) - cs.y_lo) + wag_base;
    for (int b = 0; b < 4; b++) begin
      rrow = (rs[0] == b[1]) ? rs : rs + 12'd1;
      rcol = (rc[0] == b[0]) ? rc : rc + 5'd1;
      raddr[b] = lm_addr(rrow[2:0], rcol);
    end
  end

  for (genvar b = 0; b < 4; b++) begin : g_bank
    gmc_local_mem_bank #(.DEPTH(LM_DEPTH), .DW(8), .AW(LM_AW)) u_bank (
      .clk, .we(bank_we[b]), .waddr(bank_waddr), .wdata(bank_wdata),
      .raddr(raddr[b]), .rdata(rdata[b])
    );
  end

  // Stage 1: bank data valid.
  logic             s1_valid;
  logic             s1_r0, s1_c0;
  logic [IFRAC-1:0] s1_fx, s1_fy;
  logic [AW-1:0]    s1_addr;
  logic [1:0]       s1_comp;
  logic             s2_valid;
  logic [1:0]       s2_comp, s3_comp;
  logic [AW-1:0]    s2_addr, s3_addr;
  int unsigned      o_pw, o_base, o_x, o_y;

  always_comb begin
    o_pw   = (wag_blk == 2'd0) ? FRAME_W : FRAME_W / 2;
    o_base = (wag_blk == 2'd0) ? 0 : (wag_blk == 2'd1) ? CB_BASE : CR_BASE;
    o_x    = ((wag_blk == 2'd0) ? 32'({mbx, 4'd0}) : 32'({mbx, 3'd0})) + 32'(wcol);
    o_y    = ((wag_blk == 2'd0) ? 32'({mby, 4'd0}) : 32'({mby, 3'd0})) + 32'(wrow);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_r0 <= 1'b0; s1_c0 <= 1'b0;
      s1_fx <= '0;   s1_fy <= '0;
      s1_addr <= '0; s1_comp <= '0;
      s2_addr <= '0; s2_comp <= '0; s2_valid <= 1'b0;
      s3_addr <= '0; s3_comp <= '0;
    end else begin
      s1_valid <= wag_en && wag_active;
      s1_r0    <= rs[0];
      s1_c0    <= rc[0];
      s1_fx    <= coord_frac(wx);
      s1_fy    <= coord_frac(wy);
      s1_addr  <= AW'(o_base + o_y * o_pw + o_x);
      s1_comp  <= wag_blk;
      s2_addr  <= s1_addr;
      s2_comp  <= s1_comp;
      s2_valid <= s1_valid;
      s3_addr  <= s2_addr;
      s3_comp  <= s2_comp;
    end
  end

  gmc_interp u_interp (
    .clk, .rst_n, .in_valid(s1_valid),
    .p00(rdata[{s1_r0,  s1_c0}]), .p01(rdata[{s1_r0, ~s1_c0}]),
    .p10(rdata[{~s1_r0, s1_c0}]), .p11(rdata[{~s1_r0, ~s1_c0}]),
    .fx(s1_fx), .fy(s1_fy), .out_valid, .out_pix(out_data),
    .mul_a, .mul_b, .mul_p
  );

  // The filter's products matter only while it has a pixel.
  assign mul_use = s1_valid || s2_valid;

  assign out_addr = s3_addr;
  assign out_comp = s3_comp;

endmodule
