// tanh_lut -- weighting and tanh step that turn an extrinsic partition into a
// soft chip amplitude.
//
// Stage 1 multiplies the extrinsic partition by the 1/sigma^2 weight and keeps
// x = (ext * weight) >> WEIGHT_FRAC, saturated to P bits: half the extrinsic LLR
// in units of 2^-LLR_FRAC. Stage 2 is a small table with P-bit input and H-bit
// output, as published, holding
//   soft(x) = round(CHIP_AMP * tanh(x / 2^LLR_FRAC))
// in sign-magnitude form: the expected value of the user's chip, with the chip
// amplitude scaling folded into the table so no multiplier is needed at the
// cancellation. The table is computed at elaboration from this formula; its
// input format and CHIP_AMP are this design's choices.
//
// Timing: two register stages; `out_valid`/`soft_chip` follow `in_valid` by two
// cycles.
module tanh_lut
  import ps_cdma_pkg::*;
#(
  parameter int unsigned P        = 8,
  parameter int unsigned H        = 11,
  parameter int unsigned CHIP_AMP = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [P-1:0] ext,
  input  logic [WEIGHT_W-1:0] weight,
  output logic                out_valid,
  output logic [H-1:0]        soft_chip
);

  localparam int unsigned XW = P + WEIGHT_W + 1;
  localparam logic signed [XW-1:0] PMAX = XW'(2 ** (P - 1) - 1);

  typedef logic [H-1:0] rom_t [2 ** P];

  function automatic real tanh_r(real a);
    real e;
    e = $exp(2.0 * a);
    return (e - 1.0) / (e + 1.0);
  endfunction

  function automatic rom_t make_rom();
    rom_t r;
    for (int i = 0; i < 2 ** P; i++) begin
      int  xs;
      real mag;
      logic [H-2:0] m;
      xs  = (i >= 2 ** (P - 1)) ? i - 2 ** P : i;
      mag = real'(CHIP_AMP) * tanh_r(real'((xs < 0) ? -xs : xs) / real'(2 ** LLR_FRAC));
      m   = (H-1)'($rtoi(mag + 0.5));
      r[i] = {(xs < 0) && (m != '0), m};
    end
    return r;
  endfunction

  localparam rom_t TANH_ROM = make_rom();

  logic signed [XW-1:0] prod;
  logic signed [P-1:0]  x;
  logic                 x_valid;

  assign prod = (XW'(ext) * $signed({1'b0, weight})) >>> WEIGHT_FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      x_valid   <= 1'b0;
      soft_chip      <= '0;
      out_valid <= 1'b0;
    end else begin
      x_valid <= in_valid;
      if (prod > PMAX)       x <= PMAX[P-1:0];
      else if (prod < -PMAX) x <= -PMAX[P-1:0];
      else                   x <= prod[P-1:0];
      out_valid <= x_valid;
      soft_chip      <= TANH_ROM[x];
    end
  end

endmodule
