// lfsr -- spreading-sequence generator of one user.
//
// A 51-stage shift register with stages 1 and 4 tapped. Stage 1 is the output;
// on every step the stages move one place toward stage 1 and the XOR of stages
// 1 and 4 enters stage 51, so the output sequence obeys a[n+51] = a[n] ^ a[n+3].
// The 51 stages and the taps 1 and 4 follow the published design; the direction
// of the shift and the output stage are this design's reading of it.
// Each user's register is programmed with its own seed (input `seed`), which
// makes the sequences user-distinct.
//
// Interface: `load` copies `seed` into the register (takes priority over
// `step`); `step` advances one chip. `chip` is the current bit: 1 means the chip
// is multiplied by -1. Both act on the rising clock edge. Reset clears the
// register; it must be loaded before its first use (the receiver loads it at
// the start of every chip pass).
module lfsr #(
  parameter int unsigned STAGES = 51,
  parameter int unsigned TAP_A  = 1,
  parameter int unsigned TAP_B  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic              step,
  input  logic [STAGES-1:0] seed,
  output logic              chip
);

  // sr[i-1] holds stage i.
  logic [STAGES-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sr <= '0;
    else if (load) sr <= seed;
    else if (step) sr <= {sr[TAP_A-1] ^ sr[TAP_B-1], sr[STAGES-1:1]};
  end

  assign chip = sr[0];

  initial begin
    assert (TAP_A >= 1 && TAP_A <= STAGES && TAP_B >= 1 && TAP_B <= STAGES)
      else $error("lfsr: taps must lie within the register");
  end

endmodule
