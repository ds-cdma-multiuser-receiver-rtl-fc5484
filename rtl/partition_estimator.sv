// partition_estimator -- extrinsic step and hard decision of one user.
//
// The M partitions of a symbol are separate estimates of the same data bit
// (repetition code). Following the published design, an accumulator sums the M
// partitions of a symbol while each partition passes through an M-stage delay
// line; when the sum is complete, each delayed partition is subtracted from it,
// which gives the partition's extrinsic value (the evidence from the other M-1
// partitions). The MSB of the sum is the hard decision for the iteration.
// Saturating the extrinsic value to P bits is this design's choice.
//
// Timing: partitions arrive in symbol order with `in_valid`; the M partitions of
// one symbol must come on M consecutive cycles (gaps are allowed only between
// symbols; `start` realigns the symbol counter). The decision of a symbol pulses
// `dec_valid` one cycle after its last partition. The extrinsic value of the
// partition that arrived in cycle t leaves with `ext_valid` in cycle t+M+1.
module partition_estimator #(
  parameter int unsigned P  = 8,
  parameter int unsigned M  = 4,
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned SW = P + MW + 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                in_valid,
  input  logic signed [P-1:0] in_part,
  output logic                ext_valid,
  output logic signed [P-1:0] ext_part,
  output logic                dec_valid,
  output logic                dec_bit
);

  localparam logic signed [SW-1:0] PMAX = SW'(2 ** (P - 1) - 1);

  logic [MW-1:0]          cnt;
  logic signed [SW-1:0]   acc;
  logic signed [SW-1:0]   acc_next;
  logic signed [SW-1:0]   sum_hold;
  logic signed [P-1:0]    dl_part  [M];
  logic                   dl_valid [M];
  logic signed [SW-1:0]   ext_full;

  assign acc_next = acc + SW'(in_part);
  assign ext_full = sum_hold - SW'(dl_part[M-1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      acc       <= '0;
      sum_hold  <= '0;
      dec_valid <= 1'b0;
      dec_bit   <= 1'b0;
      ext_valid <= 1'b0;
      ext_part  <= '0;
      for (int i = 0; i < M; i++) begin
        dl_part[i]  <= '0;
        dl_valid[i] <= 1'b0;
      end
    end else begin
      // accumulator with reset at each symbol boundary
      dec_valid <= 1'b0;
      if (start) begin
        cnt <= '0;
        acc <= '0;
      end else if (in_valid) begin
        if (cnt == MW'(M - 1)) begin
          cnt       <= '0;
          acc       <= '0;
          sum_hold  <= acc_next;
          dec_valid <= 1'b1;
          dec_bit   <= acc_next[SW-1];
        end else begin
          cnt <= cnt + 1'b1;
          acc <= acc_next;
        end
      end
      // M delay
      dl_part[0]  <= in_part;
      dl_valid[0] <= in_valid && !start;
      for (int i = 1; i < M; i++) begin
        dl_part[i]  <= dl_part[i-1];
        dl_valid[i] <= dl_valid[i-1];
      end
      // P-bit adder: extrinsic = symbol sum - own partition
      ext_valid <= dl_valid[M-1];
      if (ext_full > PMAX)       ext_part <= PMAX[P-1:0];
      else if (ext_full < -PMAX) ext_part <= -PMAX[P-1:0];
      else                       ext_part <= ext_full[P-1:0];
    end
  end

endmodule
