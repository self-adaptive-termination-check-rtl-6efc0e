// ram_1r1w: simple dual-port RAM, one write port and one read port, both
// synchronous to clk. The read data of address raddr appears one clock after
// it is presented; a read of the word being written in the same cycle
// returns the old contents. No reset: every word the decoder reads has been
// written first. Written as an array so synthesis can map it to a RAM macro.
// The published decoder names a memory block only; this bank and its read latency
// are this design's own.
module ram_1r1w #(
  parameter int unsigned DEPTH = 96,
  parameter int unsigned WIDTH = 128,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
