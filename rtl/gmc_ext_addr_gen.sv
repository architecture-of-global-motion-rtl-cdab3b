// gmc_ext_addr_gen: external address generator.
//
// Walks the reference regions of the Y, Cb and Cr blocks of a macroblock,
// one after the other, row by row and left to right, and gives the
// off-chip frame memory address of each reference pixel. Rows are numbered
// by a running sequence number over the three regions, which the local
// memory uses to place the row (sequence mod 8) and the warping controller
// uses to decide when a row may be written. Positions outside the picture
// are clamped to its edge, which repeats the border pixels.
//
// Frame memory layout: the Y plane (FRAME_W x FRAME_H) at address 0, then
// the Cb and Cr planes (FRAME_W/2 x FRAME_H/2), each stored row by row.
//
// Interface: 'start' latches the Y region; each later region is latched
// when the walk reaches it, so set[1] and set[2] need to be valid only from
// the end of the Y region on. While 'valid', addr/seq/col
// describe the next pixel; 'adv' moves on. 'last_col' marks the last pixel
// of a region row and 'comp' the plane. 'valid' falls after the last pixel
// of the Cr region.
//
// Raster-order region addressing follows the published design; the frame
// memory layout and edge clamping are this design's own.
module gmc_ext_addr_gen
  import gmc_pkg::*;
#(
  parameter int FRAME_W = 720,
  parameter int FRAME_H = 576,
  parameter int AW      = 20
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  blk_set_t      set [3],
  input  logic          adv,
  output logic          valid,
  output logic [AW-1:0] addr,
  output logic [11:0]   seq,
  output logic [4:0]    col,
  output logic          last_col,
  output logic [1:0]    comp
);

  localparam int CB_BASE = FRAME_W * FRAME_H;
  localparam int CR_BASE = CB_BASE + (FRAME_W / 2) * (FRAME_H / 2);

  blk_set_t   s;
  logic [1:0] blk;
  logic [7:0] r;

  // Picture position of the pixel on offer, clamped to the plane.
  logic signed [16:0] px, py;
  int unsigned        pw, ph, base, cx, cy;
  logic               last_row;

  always_comb begin
    px = 17'(s.x_lo) + 17'(col);
    py = 17'(s.y_lo) + 17'(r);
    pw = (blk == 2'd0) ? FRAME_W : FRAME_W / 2;
    ph = (blk == 2'd0) ? FRAME_H : FRAME_H / 2;
    base = (blk == 2'd0) ? 0 : (blk == 2'd1) ? CB_BASE : CR_BASE;
    cx = (px < 0) ? 0 : (px >= 17'(pw)) ? pw - 1 : 32'(px);
    cy = (py < 0) ? 0 : (py >= 17'(ph)) ? ph - 1 : 32'(py);
    addr     = AW'(base + cy * pw + cx);
    last_col = (8'(col) == s.ncols - 8'd1);
    last_row = (r == s.nrows - 8'd1);
    comp     = blk;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= 1'b0;
      blk   <= '0;
      r     <= '0;
      col   <= '0;
      seq   <= '0;
      s     <= '0;
    end else if (start) begin
      s     <= set[0];
      valid <= 1'b1;
      blk   <= '0;
      r     <= '0;
      col   <= '0;
      seq   <= '0;
    end else if (valid && adv) begin
      if (!last_col) begin
        col <= col + 5'd1;
      end else begin
        col <= '0;
        seq <= seq + 12'd1;
        if (!last_row) begin
          r <= r + 8'd1;
        end else begin
          r <= '0;
          if (blk == 2'd2) begin
            valid <= 1'b0;
          end else begin
            blk <= blk + 2'd1;
            s   <= set[blk + 2'd1];
          end
        end
      end
    end
  end

endmodule
