// transpose_buffer -- frame memory between the row and the column filter
// of the 2-D transform.
//
// A simple dual-port RAM of DEPTH words of W bits: one synchronous write
// port and one read port with a registered output (rdata is valid the
// clock after re). The row stage writes each (low, high) result pair as one
// word in row-major order; the column stage reads the words back column by
// column. The document gives no memory organisation; this single-frame
// buffer (rows are written, then columns are read) is this design's own.
module transpose_buffer #(
  parameter int unsigned W     = 30,
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
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
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
