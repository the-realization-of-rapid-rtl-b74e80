// line_ram - one image-line RAM: DEPTH words of DW bits, one write port and
// one synchronous read port on the same clock.
//
// A write stores wdata at waddr on the clock edge when we is high. A read
// with re high loads mem[raddr] into rdata on the clock edge; rdata keeps its
// value while re is low, so a stalled reader finds its word still there.
// Reading the address being written in the same cycle returns the old word.
// The size (1024 x 8) is the one given for the cache; the port arrangement
// is this design's choice. The contents are not reset (no RAM is).
module line_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned DW    = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
