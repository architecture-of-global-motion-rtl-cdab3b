// gmc_mem_loc_decision: memory location decision.
//
// Decides where each reference pixel read from the frame memory goes in the
// local memory. A pixel of region column c in region row with sequence
// number s goes to buffer row r = s mod 8, bank {r[0], c[0]}, address
// r[2]*20 + r[1]*10 + c/2 (see gmc_pkg). Because the frame memory answers
// some cycles after a request, the placement of every accepted request is
// kept in a small FIFO and used when the data comes back; responses arrive
// in request order. When the last pixel of a region row is written, a
// row_done pulse tells the warping controller that the row is complete.
//
// Interface: 'push' (with slot/col/last_col) records an accepted request;
// 'full' forbids a push. 'rvalid'/'rdata' is the frame memory response. The
// bank write (we one-hot, waddr, wdata) and row_done are registered: they
// appear the cycle after the response.
//
// The four-bank interleave with two halves of four rows follows the
// published design; the request FIFO is this design's own.
module gmc_mem_loc_decision
  import gmc_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [2:0]       slot,
  input  logic [4:0]       col,
  input  logic             last_col,
  output logic             full,
  input  logic             rvalid,
  input  logic [7:0]       rdata,
  output logic [3:0]       we,
  output logic [LM_AW-1:0] waddr,
  output logic [7:0]       wdata,
  output logic             row_done
);

  localparam int PW = $clog2(DEPTH);

  typedef struct packed {
    logic [2:0] slot;
    logic [4:0] col;
    logic       last;
  } tag_t;

  tag_t        fifo [DEPTH];
  logic [PW-1:0] wp, rp;
  logic [PW:0]   cnt;
  tag_t        head;

  assign full = (cnt == (PW+1)'(DEPTH));
  assign head = fifo[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      cnt      <= '0;
      we       <= '0;
      waddr    <= '0;
      wdata    <= '0;
      row_done <= 1'b0;
      for (int i = 0; i < DEPTH; i++) fifo[i] <= '0;
    end else begin
      if (push && !full) begin
        fifo[wp] <= '{slot: slot, col: col, last: last_col};
        wp       <= wp + 1'b1;
      end
      if (rvalid) rp <= rp + 1'b1;
      cnt <= cnt + (PW+1)'(push && !full) - (PW+1)'(rvalid);
      we       <= rvalid ? (4'b0001 << lm_bank(head.slot, head.col)) : 4'b0000;
      waddr    <= lm_addr(head.slot, head.col);
      wdata    <= rdata;
      row_done <= rvalid && head.last;
    end
  end

  // A response with no request outstanding breaks the protocol.
  a_no_orphan: assert property (@(posedge clk) disable iff (!rst_n) rvalid |-> cnt != 0);

endmodule
