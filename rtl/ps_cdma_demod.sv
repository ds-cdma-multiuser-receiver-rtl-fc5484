// ps_cdma_demod -- iterative multiuser demodulator for partition-spreading
// (PS) CDMA with parallel multiple-access-interference cancellation.
//
// K users transmit at once on the same band. Each user repeats every data bit
// M times (a rate-1/M repetition code), interleaves the coded bits with its own
// polynomial interleaver and spreads each coded bit ("partition") with N/M chips
// of its own LFSR sequence, so a symbol spans N chips. The receiver stores one
// frame of L symbols (L*N chips) and iterates: in every iteration each of the K
// user receivers re-creates its chips from the previous iteration's soft
// estimates, a K-operand adder tree sums them, and each user matched-filters
// the received chips minus everyone else's estimates. The per-user partition
// estimator combines the M partitions of a symbol into extrinsic values (for
// the next iteration) and hard decisions (for this one). The first iteration
// has nothing to cancel and is a plain matched-filter detector.
//
// Blocks: rx_chip_mem (shared frame store), iter_controller (passes and
// iteration count), K x user_receiver, k_adder_tree. The block structure
// follows the published architecture; the pass schedule, the pipeline timing,
// the fixed-point formats and the defaults N = 64, M = 4, L = 64 are this
// design's own (K = 50, P = 8, H = 11 are the published values).
//
// Interface: load a frame by presenting L*N sign-magnitude chips on `in_chip`
// with `in_valid` while `in_ready` is high (synchronized to the users' chip
// timing). Processing then starts by itself, for `num_iter` iterations (sampled
// when the frame is complete). For every symbol of every iteration,
// `dec_valid` pulses with the K hard decisions `dec_bits` (1 = negative, i.e.
// data bit 1), the symbol index `dec_sym`, the iteration `dec_iter` and
// `dec_last` on the final iteration. `done` pulses when the frame is finished.
// One iteration takes L*N + L*M + 2*DRAIN + 2 cycles.
module ps_cdma_demod
  import ps_cdma_pkg::*;
#(
  parameter int unsigned K        = K_DEF,
  parameter int unsigned N        = N_DEF,
  parameter int unsigned M        = M_DEF,
  parameter int unsigned L        = L_DEF,
  parameter int unsigned P        = P_DEF,
  parameter int unsigned H        = H_DEF,
  parameter int unsigned CHIP_AMP = CHIP_AMP_DEF,
  parameter int unsigned DRAIN    = 32,
  parameter int unsigned IW       = 4,
  localparam int unsigned LVL     = $clog2(K),
  localparam int unsigned LN      = L * N,
  localparam int unsigned LM      = L * M,
  localparam int unsigned CAW     = $clog2(LN),
  localparam int unsigned SYW     = (L > 1) ? $clog2(L) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  logic [H-1:0]    in_chip,
  output logic            in_ready,
  input  logic [IW-1:0]   num_iter,
  output logic            dec_valid,
  output logic [K-1:0]    dec_bits,
  output logic [SYW-1:0]  dec_sym,
  output logic [IW-1:0]   dec_iter,
  output logic            dec_last,
  output logic            busy,
  output logic            done
);

  // the matched-filter side trails the estimate side by this many cycles
  localparam int unsigned ALIGN = EST_LAT + LVL;

  // ---------------- frame store and controller ----------------
  logic [CAW:0]   wr_count;
  logic           full;
  logic           go;
  logic           chip_start, chip_valid;
  logic [CAW-1:0] chip_idx;
  logic           part_start, part_valid;
  logic [IW-1:0]  iter;
  logic           first_iter, last_iter;
  logic [H-1:0]   rx_chip;

  assign full     = (wr_count == (CAW+1)'(LN));
  assign in_ready = !busy && !full;
  assign go       = full && !busy && !done;

  // read-address pipeline: the chip memory is read ALIGN-1 cycles after the
  // estimate side sees the chip, so its data meets the adder-tree output
  logic           a_start [ALIGN];
  logic           a_valid [ALIGN];
  logic [CAW-1:0] a_idx   [ALIGN];
  logic           mf_start, mf_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ALIGN; i++) begin
        a_start[i] <= 1'b0;
        a_valid[i] <= 1'b0;
        a_idx[i]   <= '0;
      end
    end else begin
      a_start[0] <= chip_start;
      a_valid[0] <= chip_valid;
      a_idx[0]   <= chip_idx;
      for (int i = 1; i < ALIGN; i++) begin
        a_start[i] <= a_start[i-1];
        a_valid[i] <= a_valid[i-1];
        a_idx[i]   <= a_idx[i-1];
      end
    end
  end

  assign mf_start = a_start[ALIGN-1];
  assign mf_valid = a_valid[ALIGN-1];

  rx_chip_mem #(.DEPTH(LN), .H(H)) u_rx_mem (
    .clk, .rst_n, .wr_clr(done), .wr_en(in_valid && in_ready), .wr_data(in_chip),
    .wr_count(wr_count), .rd_addr(a_idx[ALIGN-2]), .rd_data(rx_chip));

  iter_controller #(.LN(LN), .LM(LM), .DRAIN(DRAIN), .IW(IW)) u_ctrl (
    .clk, .rst_n, .go, .num_iter,
    .chip_start, .chip_valid, .chip_idx,
    .part_start, .part_valid,
    .iter, .first_iter, .last_iter, .busy, .done);

  // ---------------- K user receivers and the common aggregator ----------------
  logic signed [H-1:0]     y_est   [K];
  logic [K-1:0]            y_valid;
  logic [K-1:0]            u_dec_valid;
  logic                    agg_valid;
  logic signed [H+LVL-1:0] agg;

  for (genvar k = 0; k < K; k++) begin : g_user
    user_receiver #(.K(K), .N(N), .M(M), .L(L), .P(P), .H(H), .CHIP_AMP(CHIP_AMP), .USER(k)) u_user (
      .clk, .rst_n,
      .est_start(chip_start), .est_valid(chip_valid), .est_zero(first_iter),
      .y_valid(y_valid[k]), .y_est(y_est[k]),
      .mf_start, .mf_valid, .agg, .rx_chip,
      .pe_start(part_start), .pe_valid(part_valid),
      .dec_valid(u_dec_valid[k]), .dec_bit(dec_bits[k]));
  end

  k_adder_tree #(.K(K), .W(H)) u_tree (
    .clk, .rst_n, .in_valid(y_valid[0]), .in_vals(y_est),
    .out_valid(agg_valid), .out_sum(agg));

  // ---------------- decision output ----------------
  assign dec_valid = u_dec_valid[0];
  assign dec_iter  = iter;
  assign dec_last  = last_iter;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         dec_sym <= '0;
    else if (part_start) dec_sym <= '0;
    else if (dec_valid)  dec_sym <= dec_sym + 1'b1;
  end

  // the tree output and the chip-memory data arrive together
  assert property (@(posedge clk) disable iff (!rst_n) agg_valid == mf_valid);
  // all users run in lock step
  assert property (@(posedge clk) disable iff (!rst_n) u_dec_valid == '0 || u_dec_valid == '1);
  assert property (@(posedge clk) disable iff (!rst_n) y_valid == '0 || y_valid == '1);

  initial begin
    assert (DRAIN >= ALIGN + N / M + 4 && DRAIN >= M + 4)
      else $error("ps_cdma_demod: DRAIN too short for the pipeline");
    assert ((LM & (LM - 1)) == 0) else $error("ps_cdma_demod: L*M must be a power of two");
  end

endmodule
