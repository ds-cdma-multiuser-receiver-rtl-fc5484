// variance_est -- variance estimate and 1/sigma^2 weight of one user.
//
// The second path out of the matched filter. Assuming each partition's hard
// decision is right, its error is e = |b| - AMP, AMP being the noiseless
// partition amplitude. A multiplier squares e and an accumulator sums e^2 over
// the COUNT partitions of a frame; a shift by log2(COUNT) gives the mean, the
// variance sigma^2. A 1/x look-up table then turns sigma^2 into the weight that
// scales the extrinsic partitions ahead of the tanh table:
//   weight = 2^LLR_FRAC * AMP * 2^WEIGHT_FRAC / sigma^2,
// so that (ext * weight) >> WEIGHT_FRAC is half the extrinsic LLR
// (2*AMP*ext/sigma^2) in units of 2^-LLR_FRAC. The shifts, the multiplier, the
// accumulator and the 1/x table follow the published design; this error measure
// and the table's format (LUT_SIZE entries, each covering 2^VAR_SHIFT of
// sigma^2, centre of the bin, clipped) are this design's own.
//
// Timing: `start` clears the accumulator and the partition count. After the
// COUNT-th valid partition, `weight` takes the new value one cycle later and
// `weight_valid` pulses. Until the first estimate, `weight` is the table entry
// for the largest variance.
module variance_est
  import ps_cdma_pkg::*;
#(
  parameter int unsigned P         = 8,
  parameter int unsigned COUNT     = 256,
  parameter int unsigned AMP       = 64,
  parameter int unsigned VAR_SHIFT = 6,
  parameter int unsigned LUT_SIZE  = 256,
  localparam int unsigned CW       = $clog2(COUNT),
  localparam int unsigned EW       = 2 * P + 2,
  localparam int unsigned AW       = EW + CW
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                in_valid,
  input  logic signed [P-1:0] in_part,
  output logic [WEIGHT_W-1:0] weight,
  output logic                weight_valid
);

  typedef logic [WEIGHT_W-1:0] lut_t [LUT_SIZE];

  function automatic lut_t make_lut();
    lut_t t;
    for (int i = 0; i < LUT_SIZE; i++) begin
      real v;
      v = real'(2 ** LLR_FRAC) * real'(AMP) * real'(2 ** WEIGHT_FRAC)
          / ((real'(i) + 0.5) * real'(2 ** VAR_SHIFT));
      if (v > real'(2 ** WEIGHT_W - 1)) v = real'(2 ** WEIGHT_W - 1);
      t[i] = WEIGHT_W'($rtoi(v + 0.5));
    end
    return t;
  endfunction

  localparam lut_t INV_LUT = make_lut();

  logic [CW-1:0]          cnt;
  logic [AW-1:0]          acc;
  logic signed [P+1:0]    err;
  logic [EW-1:0]          err_sq;
  logic [AW-1:0]          total;
  logic [AW-CW-1:0]       sigma2;
  logic [AW-CW-1:0]       idx_full;
  logic [$clog2(LUT_SIZE)-1:0] idx;

  always_comb begin
    err      = (in_part < 0) ? (P+2)'(-in_part) - (P+2)'(AMP) : (P+2)'(in_part) - (P+2)'(AMP);
    err_sq   = EW'(err * err);
    total    = acc + AW'(err_sq);
    sigma2   = total[AW-1:CW];
    idx_full = sigma2 >> VAR_SHIFT;
    idx      = (idx_full > (AW-CW)'(LUT_SIZE - 1)) ? $clog2(LUT_SIZE)'(LUT_SIZE - 1)
                                                  : idx_full[$clog2(LUT_SIZE)-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      acc          <= '0;
      weight       <= INV_LUT[LUT_SIZE-1];
      weight_valid <= 1'b0;
    end else begin
      weight_valid <= 1'b0;
      if (start) begin
        cnt <= '0;
        acc <= '0;
      end else if (in_valid) begin
        if (cnt == CW'(COUNT - 1)) begin
          cnt          <= '0;
          acc          <= '0;
          weight       <= INV_LUT[idx];
          weight_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
          acc <= total;
        end
      end
    end
  end

endmodule
