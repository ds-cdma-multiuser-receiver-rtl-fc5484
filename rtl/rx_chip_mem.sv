// rx_chip_mem -- received-chip frame store (L*N words of H bits).
//
// One frame of synchronized received chips is written in arrival order by the
// memory's own address counter and is then read by every user receiver in
// every iteration: one memory serves all users because the chips of all users
// arrive synchronously. Chips are kept in sign-magnitude form.
// The shared frame store with its address counter follows the published
// design; sign-magnitude storage, the registered read and the full-frame stop
// are this design's choices.
//
// Interface: `wr_clr` resets the write counter; each cycle with `wr_en` writes
// `wr_data` at the counter and advances it; `wr_count` tells how many chips are
// in the frame (it stops at DEPTH, further writes are ignored). `rd_addr` is
// read synchronously: `rd_data` is valid one cycle later. The memory has one
// port, as drawn in the published block diagram: a cycle that writes does not
// read (`rd_data` then holds).
module rx_chip_mem #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned H     = 11,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_clr,
  input  logic          wr_en,
  input  logic [H-1:0]  wr_data,
  output logic [AW:0]   wr_count,
  input  logic [AW-1:0] rd_addr,
  output logic [H-1:0]  rd_data
);

  logic [H-1:0] mem [DEPTH];
  logic         full;

  assign full = (wr_count == (AW+1)'(DEPTH));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                wr_count <= '0;
    else if (wr_clr)           wr_count <= '0;
    else if (wr_en && !full)   wr_count <= wr_count + 1'b1;
  end

  // single port: the write counter drives the address while a chip is
  // written, the read address otherwise
  logic          wr;
  logic [AW-1:0] addr;

  assign wr   = wr_en && !wr_clr && !full;
  assign addr = wr ? wr_count[AW-1:0] : rd_addr;

  always_ff @(posedge clk) begin
    if (wr) mem[addr] <= wr_data;
    else    rd_data <= mem[addr];
  end

endmodule
