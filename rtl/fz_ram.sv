// fz_ram - single-port synchronous RAM used for the on-chip memories.
//
// One write port and one read port sharing a clock. A write stores wdata at
// waddr on the rising edge; a read returns the word at raddr one clock later
// (registered output), like the RAM megacells of the original chip. The
// processor uses three of them: the 64 x 9 rule memory and the two 128 x 8
// fuzzification look-up tables. The contents are not reset: they hold the
// fuzzy system that is loaded before operation. Read-during-write to the
// same address returns the old word (this design's choice).
module fz_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 9,
  localparam int unsigned AW = $clog2(DEPTH)
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
