// ps_cdma_pkg -- shared sizes, fixed-point helpers and per-user constants of the
// partition-spreading (PS) CDMA iterative demodulator.
//
// Two number domains meet in this receiver. The chip domain carries H-bit
// values (received chips, chip estimates, residuals) and the partition domain
// carries P-bit values (matched-filter partitions, extrinsic partitions).
// P = 8 and H = 11 are the widths the design was published with. Chips travel
// in sign-magnitude form wherever a spreading bit is applied, because spreading
// then only flips the sign bit; adders work in two's complement.
//
// The spreading seeds and the interleaver offsets per user are this design's
// own choice: any non-zero, user-distinct seed and any offset will do.
// Sign-magnitude conversion and saturation are written inline in the modules,
// since their widths are module parameters.
package ps_cdma_pkg;

  // Default system size: 50 users; N = 64 chips per symbol, split into M = 4
  // partitions of N/M = 16 chips; L = 64 symbols per frame.
  localparam int unsigned K_DEF = 50;
  localparam int unsigned N_DEF = 64;
  localparam int unsigned M_DEF = 4;
  localparam int unsigned L_DEF = 64;
  localparam int unsigned P_DEF = 8;
  localparam int unsigned H_DEF = 11;

  // LFSR length and taps (stages numbered from 1, stage 1 is the output).
  localparam int unsigned LFSR_STAGES = 51;
  localparam int unsigned LFSR_TAP_A  = 1;
  localparam int unsigned LFSR_TAP_B  = 4;

  // Received chip amplitude of one user, in LSBs of the chip domain.
  localparam int unsigned CHIP_AMP_DEF = 16;

  // Fixed-point fraction of the 1/sigma^2 weight and of the sqrt(M/N) scale.
  localparam int unsigned WEIGHT_W    = 16;
  localparam int unsigned WEIGHT_FRAC = 8;
  localparam int unsigned SCALE_FRAC  = 8;

  // The tanh table input is LLR/2 in units of 1/2^LLR_FRAC.
  localparam int unsigned LLR_FRAC = 4;

  // Cycles from a chip entering a user's estimate side to its chip estimate
  // leaving it (interleaver-memory read, weight multiply, tanh table, respread).
  localparam int unsigned EST_LAT = 4;

  // round(2^SCALE_FRAC * sqrt(M/N)): the matched-filter scale.
  function automatic int unsigned mf_scale(int unsigned n, int unsigned m);
    return int'($rtoi($sqrt(real'(m) / real'(n)) * real'(2 ** SCALE_FRAC) + 0.5));
  endfunction

  // Noiseless partition amplitude: CHIP_AMP * (N/M) * sqrt(M/N), in P-bit LSBs.
  function automatic int unsigned part_amp(int unsigned n, int unsigned m, int unsigned amp);
    return (amp * (n / m) * mf_scale(n, m) + (2 ** (SCALE_FRAC - 1))) >> SCALE_FRAC;
  endfunction

  // Seed of user k's spreading LFSR (a splitmix-style hash, forced non-zero).
  function automatic logic [LFSR_STAGES-1:0] lfsr_seed(int unsigned k);
    logic [63:0] z;
    z = 64'h9E37_79B9_7F4A_7C15 * 64'(k + 1);
    z = (z ^ (z >> 30)) * 64'hBF58_476D_1CE4_E5B9;
    z = (z ^ (z >> 27)) * 64'h94D0_49BB_1331_11EB;
    z = z ^ (z >> 31);
    return z[LFSR_STAGES-1:0] | {{(LFSR_STAGES-1){1'b0}}, 1'b1};
  endfunction

  // Offset h of user k's interleaver polynomial (63x + 128x^2 + h) mod depth.
  function automatic int unsigned il_offset(int unsigned k, int unsigned depth);
    return (37 * k + 11) % depth;
  endfunction

endpackage
