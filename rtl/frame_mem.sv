// frame_mem: on-chip frame buffer, one word per image position.
//
// A simple dual-port memory written as an array: one synchronous write port
// and one synchronous read port, usable in the same cycle. A read returns
// the word in the cycle after re is asserted; reading the address being
// written in that same cycle returns the old word. Contents are not reset.
//
// The transform keeps two of these: one holds the image and, at the end, the
// wavelet coefficients; the other holds the results of each row pass. A
// frame buffer is part of the published architecture; the port arrangement and latency are this
// design's choices.
module frame_mem #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 512 * 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
