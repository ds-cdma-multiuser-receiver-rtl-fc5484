// interleaver_addr -- serial address generator of a user's interleaver.
//
// The interleaver is the polynomial permutation pi(x) = (C1*x + C2*x^2 + h)
// mod DEPTH with C1 = 63 and C2 = 128, as published; DEPTH = L*M is the
// interleaver depth and h the user's offset. Addresses are computed, not stored.
// This design avoids the multiplier with forward differences:
//   pi(0) = h,  pi(x+1) = pi(x) + d(x),  d(0) = C1 + C2,  d(x+1) = d(x) + 2*C2,
// all modulo DEPTH. DEPTH must be a power of two, so the modulo is a plain
// truncation (and only then is the polynomial a permutation for C2 = 128).
//
// Interface: `start` sets x = 0 (addr = h on the next cycle); `step` advances x
// by one (addr = pi(x+1) on the next cycle). `addr` is a register output.
module interleaver_addr #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned C1    = 63,
  parameter int unsigned C2    = 128,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          step,
  input  logic [AW-1:0] h,
  output logic [AW-1:0] addr
);

  localparam logic [AW-1:0] D0 = AW'((C1 + C2) % DEPTH);
  localparam logic [AW-1:0] DD = AW'((2 * C2) % DEPTH);

  logic [AW-1:0] diff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr <= '0;
      diff <= D0;
    end else if (start) begin
      addr <= h;
      diff <= D0;
    end else if (step) begin
      addr <= addr + diff;
      diff <= diff + DD;
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("interleaver_addr: DEPTH must be a power of two");
  end

endmodule
