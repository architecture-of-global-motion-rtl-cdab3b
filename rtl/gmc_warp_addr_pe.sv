// gmc_warp_addr_pe: scanline address element for one warped coordinate.
//
// Two registers hold the coordinate: X0, the warped position of the first
// pixel of the current row, and X, the position of the current pixel. One
// adder serves both: its operands are chosen by multiplexers from
// {0, col_inc, row_inc} and {X0, X}. Moving one pixel right adds col_inc to
// X; moving to the next row adds row_inc to X0 and writes the sum into X0
// and X alike. So each pixel position costs one addition and no
// multiplication (the scanline method). A load writes the starting value
// into both registers.
//
// Interface: 'load' takes 'init'; 'next_col' and 'next_row' advance one
// step each (next_row wins if both are set). 'coord' is X, valid the cycle
// after the operation.
//
// The register/multiplexer/adder structure follows the published scanline
// element; the pairing of increments follows the increment equations; the
// width is this design's own.
module gmc_warp_addr_pe
  import gmc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  coord_t init,
  input  logic   next_col,
  input  logic   next_row,
  input  coord_t col_inc,
  input  coord_t row_inc,
  output coord_t coord
);

  coord_t x0_q, x_q;
  coord_t inc_sel, base_sel, sum;

  always_comb begin
    inc_sel  = next_row ? row_inc : (next_col ? col_inc : '0);
    base_sel = next_row ? x0_q : x_q;
    sum      = base_sel + inc_sel;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x0_q <= '0;
      x_q  <= '0;
    end else if (load) begin
      x0_q <= init;
      x_q  <= init;
    end else begin
      if (next_row) x0_q <= sum;
      x_q <= sum;
    end
  end

  assign coord = x_q;

endmodule
