// Per-set storage array: one word per cache set, synchronous read and write.
//
// Used three times by the cache: for the tags and valid bits of all ways of
// a set, for the baseline policy's state and for the Shepherd state.  A read
// issued with re_i returns the word on rdata_o after the next clock edge; a
// write with we_i takes effect at the same edge.  A read and a write of the
// same address in the same cycle return the old word.  The array is plain
// memory with no reset; the cache controller clears it after reset by
// writing every set.  The arrays are the per-set meta-data and tag storage
// the policies need; their organisation is this design's choice.
module set_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             re_i,
  input  logic [AW-1:0]    raddr_i,
  output logic [WIDTH-1:0] rdata_o,
  input  logic             we_i,
  input  logic [AW-1:0]    waddr_i,
  input  logic [WIDTH-1:0] wdata_i
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re_i) rdata_o <= mem[raddr_i];
    if (we_i) mem[waddr_i] <= wdata_i;
  end

endmodule
