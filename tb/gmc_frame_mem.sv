// gmc_frame_mem: behavioural model of the off-chip frame memory, for
// simulation only.
//
// Holds a reference frame of FRAME_W x FRAME_H luma plus two quarter-size
// chroma planes, stored plane after plane, row by row. Its contents are a
// fixed pattern given by pix() so that a testbench can compute the same
// values independently. Read requests (req/addr) are granted when gnt is
// high; with RAND_GNT set, gnt is withheld at random about one cycle in
// four. Each granted request returns one byte on rvalid/rdata LAT cycles
// later, in order.
module gmc_frame_mem #(
  parameter int FRAME_W  = 720,
  parameter int FRAME_H  = 576,
  parameter int AW       = 20,
  parameter int LAT      = 2,
  parameter bit RAND_GNT = 1'b0
) (
  input  logic          clk,
  input  logic          req,
  input  logic [AW-1:0] addr,
  output logic          gnt,
  output logic          rvalid,
  output logic [7:0]    rdata
);

  localparam int CB_BASE = FRAME_W * FRAME_H;
  localparam int CR_BASE = CB_BASE + (FRAME_W / 2) * (FRAME_H / 2);

  // Pattern: pixel value of plane p (0 Y, 1 Cb, 2 Cr) at (x, y).
  function automatic logic [7:0] pix(int p, int x, int y);
    return 8'((x * 37) ^ (y * 91) ^ (p * 85) ^ ((x * y) >> 4));
  endfunction

  function automatic logic [7:0] byte_at(int a);
    if (a < CB_BASE) return pix(0, a % FRAME_W, a / FRAME_W);
    if (a < CR_BASE) return pix(1, (a - CB_BASE) % (FRAME_W / 2), (a - CB_BASE) / (FRAME_W / 2));
    return pix(2, (a - CR_BASE) % (FRAME_W / 2), (a - CR_BASE) / (FRAME_W / 2));
  endfunction

  logic [LAT-1:0] vpipe = '0;
  logic [7:0]     dpipe [LAT];
  logic           gnt_q = 1'b1;

  assign gnt    = gnt_q;
  assign rvalid = vpipe[LAT-1];
  assign rdata  = dpipe[LAT-1];

  always_ff @(posedge clk) begin
    gnt_q    <= RAND_GNT ? (($urandom % 4) != 0) : 1'b1;
    vpipe[0] <= req && gnt;
    dpipe[0] <= byte_at(int'(addr));
    for (int i = 1; i < LAT; i++) begin
      vpipe[i] <= vpipe[i-1];
      dpipe[i] <= dpipe[i-1];
    end
  end

endmodule
