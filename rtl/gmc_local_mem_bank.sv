// gmc_local_mem_bank: one bank of the local memory, a 40 x 8 two-port RAM.
//
// One write port, used while reference rows are loaded, and one read
// port, used by the interpolation path, so loading and warping proceed in
// the same cycle. Four such banks hold eight reference rows of up to 20
// pixels. The read is synchronous: rdata shows mem[raddr] the cycle after
// the address. A read of the address being written in the same cycle
// returns the old contents. Contents are not reset (memory macro).
//
// Size (40 x 8) and two ports follow the published design; read-during-
// write behaviour is this design's own.
module gmc_local_mem_bank #(
  parameter int DEPTH = 40,
  parameter int DW    = 8,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
