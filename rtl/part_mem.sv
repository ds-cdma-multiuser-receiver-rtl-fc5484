// part_mem -- one user's L*M x P-bit partition memory (single port).
//
// Each user has two: the deinterleaver memory, into which the matched-filter
// partitions are written at interleaved addresses and which is read in order,
// and the interleaver memory, which is written in order with the extrinsic
// partitions and read at interleaved addresses. As in the published block
// diagram, each memory has one address input; the user receiver multiplexes
// the counter and the interleaver address onto it, since a memory is written in
// one pass and read in the other. The published ASIC maps these memories to
// positive-edge D flip-flops rather than SRAM; here it is a plain array with a
// registered read, which maps to flip-flops or to a block RAM.
//
// Timing: a write happens on the clock edge where `we` is high. A read with
// `re` returns `rdata` on the next cycle; `rdata` holds while `re` is low.
// Reading and writing in the same cycle is not allowed; the write wins.
module part_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned P     = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic          re,
  input  logic [AW-1:0] addr,
  input  logic [P-1:0]  wdata,
  output logic [P-1:0]  rdata
);

  logic [P-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)      mem[addr] <= wdata;
    else if (re) rdata <= mem[addr];
  end

endmodule
