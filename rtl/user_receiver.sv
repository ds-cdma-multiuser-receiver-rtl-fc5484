// user_receiver -- the processor path of one user (one of K identical copies).
//
// Each iteration has a chip pass and a partition pass.
//
// Chip pass, estimate side (est_*): for every chip of the frame, the user's
// extrinsic partition of the previous iteration is read from the interleaver
// memory at the interleaved address pi(p) of the chip's partition slot p,
// weighted by 1/sigma^2, mapped through the tanh table to a soft chip
// amplitude and respread by flipping its sign with the user's LFSR bit. The
// resulting chip estimate `y_est` (two's complement) goes to the common adder
// tree. In the first iteration there are no estimates: `est_zero` forces them
// to zero, so the cancellation is skipped.
//
// Chip pass, matched-filter side (mf_*), log2(K) cycles later: the residual
//   r - (sum of all users' estimates) + (own estimate, delayed log2(K) cycles)
// is the received chip with the other users' interference cancelled. It is
// saturated to H bits, converted to sign-magnitude and matched-filtered into
// one partition per N/M chips. Each partition is written to the deinterleaver
// memory at pi(p), and feeds the variance estimate that sets the next weight.
//
// Partition pass (pe_*): the deinterleaver memory is read in symbol order into
// the partition estimator; its extrinsic partitions are written in the same
// order to the interleaver memory, and its decisions leave as `dec_bit`.
//
// The structure (two LFSRs, two address generators, two single-port L*M x P
// memories with counter/interleaver address multiplexers, the log2(K) delay
// and the two H-bit adders) follows the published block diagram;
// the pass schedule and the pipeline timing are this design's own.
//
// Timing: `y_valid`/`y_est` follow `est_valid` by EST_LAT cycles. The caller
// must present `agg` and `rx_chip` with `mf_valid` exactly LVL = ceil(log2 K)
// cycles after the matching `y_valid`. Each *_start pulse comes at least one
// cycle before the first valid of its pass. The last partition of a chip pass
// is written about N/M + 3 cycles after its last mf_valid; the last extrinsic
// value of a partition pass about M + 3 cycles after its last pe_valid.
module user_receiver
  import ps_cdma_pkg::*;
#(
  parameter int unsigned K        = 50,
  parameter int unsigned N        = 64,
  parameter int unsigned M        = 4,
  parameter int unsigned L        = 64,
  parameter int unsigned P        = 8,
  parameter int unsigned H        = 11,
  parameter int unsigned CHIP_AMP = 16,
  parameter int unsigned USER     = 0,
  localparam int unsigned LVL     = $clog2(K),
  localparam int unsigned CHIPS   = N / M,
  localparam int unsigned LM      = L * M,
  localparam int unsigned AW      = $clog2(LM),
  localparam int unsigned CW      = (CHIPS > 1) ? $clog2(CHIPS) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // chip pass, estimate side
  input  logic                    est_start,
  input  logic                    est_valid,
  input  logic                    est_zero,
  output logic                    y_valid,
  output logic signed [H-1:0]     y_est,
  // chip pass, matched-filter side
  input  logic                    mf_start,
  input  logic                    mf_valid,
  input  logic signed [H+LVL-1:0] agg,
  input  logic [H-1:0]            rx_chip,
  // partition pass
  input  logic                    pe_start,
  input  logic                    pe_valid,
  output logic                    dec_valid,
  output logic                    dec_bit
);

  localparam logic [LFSR_STAGES-1:0] SEED = lfsr_seed(USER);
  localparam logic [AW-1:0]          HOFF = AW'(il_offset(USER, LM));
  localparam int unsigned            RW   = H + LVL + 2;
  localparam logic signed [RW-1:0]   HMAX = RW'(2 ** (H - 1) - 1);

  // ---------------- estimate side ----------------
  logic [CW-1:0]        est_cnt;
  logic [AW-1:0]        il_est_addr;
  logic                 code_est;
  logic [3:1]           code_est_d;
  logic                 e1_valid;
  logic signed [P-1:0]  ilv_rdata;
  logic [WEIGHT_W-1:0]  weight;
  logic                 soft_valid;
  logic [H-1:0]         soft_chip;
  logic [H-1:0]         y_sm;
  logic [H-1:0]         y_mag;

  lfsr #(.STAGES(LFSR_STAGES), .TAP_A(LFSR_TAP_A), .TAP_B(LFSR_TAP_B)) u_lfsr_est (
    .clk, .rst_n, .load(est_start), .step(est_valid), .seed(SEED), .chip(code_est));

  interleaver_addr #(.DEPTH(LM)) u_il_est (
    .clk, .rst_n, .start(est_start),
    .step(est_valid && est_cnt == CW'(CHIPS - 1)), .h(HOFF), .addr(il_est_addr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est_cnt    <= '0;
      e1_valid   <= 1'b0;
      code_est_d <= '0;
    end else begin
      if (est_start)      est_cnt <= '0;
      else if (est_valid) est_cnt <= (est_cnt == CW'(CHIPS - 1)) ? '0 : est_cnt + 1'b1;
      e1_valid   <= est_valid;
      code_est_d <= {code_est_d[2:1], code_est};
    end
  end

  tanh_lut #(.P(P), .H(H), .CHIP_AMP(CHIP_AMP)) u_tanh (
    .clk, .rst_n, .in_valid(e1_valid), .ext(ilv_rdata), .weight(weight),
    .out_valid(soft_valid), .soft_chip(soft_chip));

  // respread: the LFSR bit flips the sign of the sign-magnitude soft chip
  assign y_sm  = {soft_chip[H-1] ^ code_est_d[3], soft_chip[H-2:0]};
  assign y_mag = {1'b0, y_sm[H-2:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y_est   <= '0;
    end else begin
      y_valid <= soft_valid;
      if (est_zero)      y_est <= '0;
      else if (y_sm[H-1]) y_est <= -$signed(y_mag);
      else               y_est <= $signed(y_mag);
    end
  end

  // ---------------- log2(K) delay of the own estimate ----------------
  logic signed [H-1:0] own_dl [LVL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LVL; i++) own_dl[i] <= '0;
    end else begin
      own_dl[0] <= y_est;
      for (int i = 1; i < LVL; i++) own_dl[i] <= own_dl[i-1];
    end
  end

  // ---------------- matched-filter side ----------------
  logic signed [RW-1:0] rx_tc;
  logic signed [RW-1:0] resid;
  logic [H-1:0]         res_sm;
  logic                 res_valid;
  logic                 code_mf;
  logic                 part_valid;
  logic signed [P-1:0]  part;
  logic [AW-1:0]        il_mf_addr;

  always_comb begin
    rx_tc = rx_chip[H-1] ? -RW'({1'b0, rx_chip[H-2:0]}) : RW'({1'b0, rx_chip[H-2:0]});
    resid = rx_tc - RW'(agg) + RW'(own_dl[LVL-1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_sm    <= '0;
    end else begin
      res_valid <= mf_valid && !mf_start;
      if (resid > HMAX)       res_sm <= {1'b0, {(H-1){1'b1}}};
      else if (resid < -HMAX) res_sm <= {1'b1, {(H-1){1'b1}}};
      else if (resid < 0)     res_sm <= {1'b1, (H-1)'(-resid)};
      else                    res_sm <= {1'b0, (H-1)'(resid)};
    end
  end

  lfsr #(.STAGES(LFSR_STAGES), .TAP_A(LFSR_TAP_A), .TAP_B(LFSR_TAP_B)) u_lfsr_mf (
    .clk, .rst_n, .load(mf_start), .step(res_valid), .seed(SEED), .chip(code_mf));

  matched_filter #(.H(H), .P(P), .CHIPS(CHIPS), .SCALE(mf_scale(N, M))) u_mf (
    .clk, .rst_n, .start(mf_start), .in_valid(res_valid), .in_chip(res_sm), .code(code_mf),
    .out_valid(part_valid), .out_part(part));

  interleaver_addr #(.DEPTH(LM)) u_il_mf (
    .clk, .rst_n, .start(mf_start), .step(part_valid), .h(HOFF), .addr(il_mf_addr));

  logic weight_upd;

  variance_est #(.P(P), .COUNT(LM), .AMP(part_amp(N, M, CHIP_AMP))) u_var (
    .clk, .rst_n, .start(mf_start), .in_valid(part_valid), .in_part(part),
    .weight(weight), .weight_valid(weight_upd));

  // ---------------- partition pass ----------------
  logic [AW-1:0]        rd_cnt;
  logic [AW-1:0]        wr_cnt;
  logic                 pe_in_valid;
  logic signed [P-1:0]  dil_rdata;
  logic                 ext_valid;
  logic signed [P-1:0]  ext_part;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_cnt      <= '0;
      wr_cnt      <= '0;
      pe_in_valid <= 1'b0;
    end else begin
      if (pe_start)      rd_cnt <= '0;
      else if (pe_valid) rd_cnt <= rd_cnt + 1'b1;
      if (pe_start)       wr_cnt <= '0;
      else if (ext_valid) wr_cnt <= wr_cnt + 1'b1;
      pe_in_valid <= pe_valid && !pe_start;
    end
  end

  // deinterleaver: written at pi(p) by the matched filter, read in order;
  // the address multiplexer selects the counter during the partition pass
  logic [AW-1:0] dil_addr;
  assign dil_addr = pe_valid ? rd_cnt : il_mf_addr;

  part_mem #(.DEPTH(LM), .P(P)) u_dil_mem (
    .clk, .we(part_valid), .re(pe_valid), .addr(dil_addr), .wdata(part), .rdata(dil_rdata));

  partition_estimator #(.P(P), .M(M)) u_pe (
    .clk, .rst_n, .start(pe_start), .in_valid(pe_in_valid), .in_part(dil_rdata),
    .ext_valid(ext_valid), .ext_part(ext_part), .dec_valid(dec_valid), .dec_bit(dec_bit));

  // interleaver: written in order, read at pi(p) by the estimate side;
  // the address multiplexer selects the counter during the partition pass
  logic [AW-1:0] ilv_addr;
  assign ilv_addr = ext_valid ? wr_cnt : il_est_addr;

  part_mem #(.DEPTH(LM), .P(P)) u_ilv_mem (
    .clk, .we(ext_valid), .re(est_valid), .addr(ilv_addr), .wdata(ext_part), .rdata(ilv_rdata));

  // The single-port partition memories are never read and written together.
  assert property (@(posedge clk) disable iff (!rst_n) !(part_valid && pe_valid))
    else $error("user_receiver: deinterleaver memory read and written in one cycle");
  assert property (@(posedge clk) disable iff (!rst_n) !(ext_valid && est_valid))
    else $error("user_receiver: interleaver memory read and written in one cycle");
  // The weight changes only after the estimate side has finished a chip pass.
  assert property (@(posedge clk) disable iff (!rst_n) !(weight_upd && est_valid))
    else $error("user_receiver: weight updated during a chip pass");

  initial begin
    assert (N % M == 0) else $error("user_receiver: M must divide N");
    assert (LVL >= 1)   else $error("user_receiver: K must be at least 2");
  end

endmodule
