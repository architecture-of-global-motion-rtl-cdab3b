// gmc_warp_addr_gen: warping address generator.
//
// Produces, in raster order, the warped reference position of every pixel
// of an N x N block (N = 16 for luma, 8 for chroma) using two scanline
// address elements: one for x' (column increment m0, row increment m1) and
// one for y' (column increment m3, row increment m4). The top-left position
// comes from macroblock setting, so the generator needs only additions.
//
// Interface: 'load' starts a block at (x_start, y_start) with size
// selected by 'chroma'. While 'active', x/y/col/row describe the pixel on
// offer; it is taken in a cycle where 'en' is high, and the next pixel is
// on offer the following cycle. 'last' marks the final pixel. A block of N*N
// pixels takes N*N enabled cycles.
//
// Two scanline elements and raster order follow the published design; the
// enable handshake is this design's own.
module gmc_warp_addr_gen
  import gmc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic        chroma,
  input  coord_t      x_start,
  input  coord_t      y_start,
  input  gmc_params_t params,
  input  logic        en,
  output logic        active,
  output coord_t      x,
  output coord_t      y,
  output logic [3:0]  col,
  output logic [3:0]  row,
  output logic        last
);

  logic       ch_q;
  logic [3:0] nmax;
  logic       fire, end_col, next_col, next_row;

  assign nmax     = ch_q ? 4'd7 : 4'd15;
  assign fire     = en && active;
  assign end_col  = (col == nmax);
  assign last     = end_col && (row == nmax);
  assign next_col = fire && !end_col;
  assign next_row = fire && end_col && !last;

  gmc_warp_addr_pe u_pe_x (
    .clk, .rst_n, .load, .init(x_start), .next_col, .next_row,
    .col_inc(params.m0), .row_inc(params.m1), .coord(x)
  );

  gmc_warp_addr_pe u_pe_y (
    .clk, .rst_n, .load, .init(y_start), .next_col, .next_row,
    .col_inc(params.m3), .row_inc(params.m4), .coord(y)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      ch_q   <= 1'b0;
      col    <= '0;
      row    <= '0;
    end else if (load) begin
      active <= 1'b1;
      ch_q   <= chroma;
      col    <= '0;
      row    <= '0;
    end else if (fire) begin
      if (last) begin
        active <= 1'b0;
      end else if (end_col) begin
        col <= '0;
        row <= row + 4'd1;
      end else begin
        col <= col + 4'd1;
      end
    end
  end

endmodule
