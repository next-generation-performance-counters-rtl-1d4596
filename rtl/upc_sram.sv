// upc_sram: the dense array holding the high-order part of every counter.
//
// DEPTH words of WIDTH bits (52 counter bits plus parity), one port shared by reads and
// writes, as a single-port SRAM macro would offer. A read in cycle t presents the word
// on rdata in cycle t+1 (registered output, held until the next read); a write in cycle
// t updates the word at the clock edge ending cycle t. Write has priority if both are
// requested. The array size follows the unit's description; the one-cycle read latency
// and the absence of a reset on the array contents are this design's choice (software
// clears counters by writing them).
module upc_sram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 53,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             re,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wdata;
    else if (re) rdata     <= mem[addr];
  end

endmodule
