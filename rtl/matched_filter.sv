// matched_filter -- despreads one user's residual chips into partitions.
//
// As in the published design, the matched filter is an XOR gate, an
// accumulator with reset and a scaler. The chip arrives in sign-magnitude form,
// so despreading is the XOR of the chip's sign bit (MSB) with the user's LFSR
// bit. The accumulator adds or subtracts the magnitude according to that sign,
// over the CHIPS = N/M chips of one partition, and is then cleared. The sum is
// scaled by sqrt(M/N), given as SCALE / 2^SCALE_FRAC, rounded and saturated to
// a symmetric P-bit two's-complement partition. The fixed-point format of the
// scale and the saturation are this design's own choices.
//
// Timing: one chip per cycle with `in_valid` (gaps allowed). `start` clears the
// chip counter and the accumulator. One cycle after the last chip of a
// partition, `out_valid` pulses with `out_part`.
module matched_filter
  import ps_cdma_pkg::*;
#(
  parameter int unsigned H          = 11,
  parameter int unsigned P          = 8,
  parameter int unsigned CHIPS      = 16,
  parameter int unsigned SCALE      = 64,
  localparam int unsigned CW        = (CHIPS > 1) ? $clog2(CHIPS) : 1,
  localparam int unsigned SW        = H + CW + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                in_valid,
  input  logic [H-1:0]        in_chip,
  input  logic                code,
  output logic                out_valid,
  output logic signed [P-1:0] out_part
);

  localparam int unsigned PW = SW + SCALE_FRAC + 2;
  localparam logic signed [PW-1:0] PMAX = PW'(2 ** (P - 1) - 1);

  logic [CW-1:0]          cnt;
  logic signed [SW-1:0]   acc;
  logic                   sgn;
  logic signed [SW-1:0]   mag;
  logic signed [SW-1:0]   sum;
  logic signed [PW-1:0]   prod;
  logic signed [PW-1:0]   scaled;
  logic                   last;

  always_comb begin
    sgn    = in_chip[H-1] ^ code;
    mag    = SW'(in_chip[H-2:0]);
    sum    = sgn ? acc - mag : acc + mag;
    prod   = PW'(sum) * $signed({1'b0, (SCALE_FRAC+1)'(SCALE)});
    scaled = (prod + PW'(2 ** (SCALE_FRAC - 1))) >>> SCALE_FRAC;
    last   = (cnt == CW'(CHIPS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_part  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        cnt <= '0;
        acc <= '0;
      end else if (in_valid) begin
        if (last) begin
          cnt       <= '0;
          acc       <= '0;
          out_valid <= 1'b1;
          if (scaled > PMAX)       out_part <= PMAX[P-1:0];
          else if (scaled < -PMAX) out_part <= -PMAX[P-1:0];
          else                     out_part <= scaled[P-1:0];
        end else begin
          cnt <= cnt + 1'b1;
          acc <= sum;
        end
      end
    end
  end

endmodule
