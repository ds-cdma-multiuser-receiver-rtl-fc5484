// tb_ps_cdma_demod -- end-to-end test of the demodulator at its default size
// (K = 50 users, N = 64, M = 4, L = 64, P = 8, H = 11).
//
// A frame of random data for all users is passed through the reference
// transmitter and noisy channel of ps_tb_pkg and loaded into the receiver,
// which then runs NUM_ITER iterations. Checks:
//   * every symbol of every iteration produces one decision word, in order;
//   * the first (matched-filter only) iteration makes errors, later iterations
//     make fewer, and the final one decodes every bit of every user;
//   * the frame takes exactly NUM_ITER * (L*N + L*M + 2*DRAIN + 2) cycles;
//   * the input is refused while the receiver is busy.
// It also counts how often each mechanism happened (cancellation skipped and
// active, decisions corrected by cancellation, partitions saturated in the
// matched filter, weight updates, load back-pressure) and fails any that never
// did.
`timescale 1ns/1ps
module tb_ps_cdma_demod;
  import ps_cdma_pkg::*;
  import ps_tb_pkg::*;

  localparam int unsigned K = K_DEF, N = N_DEF, M = M_DEF, L = L_DEF, H = H_DEF;
  localparam int unsigned LN = L * N, LM = L * M;
  localparam int unsigned DRAIN = 32;
  localparam int unsigned NUM_ITER = 8;
  localparam real NOISE_SD = 12.0;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [H-1:0] in_chip = '0;
  logic in_ready;
  logic [3:0] num_iter = 4'(NUM_ITER);
  logic dec_valid, dec_last, busy, done;
  logic [K-1:0] dec_bits;
  logic [$clog2(L)-1:0] dec_sym;
  logic [3:0] dec_iter;

  ps_cdma_demod dut (
    .clk, .rst_n, .in_valid, .in_chip, .in_ready, .num_iter,
    .dec_valid, .dec_bits, .dec_sym, .dec_iter, .dec_last, .busy, .done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit data [][];
  logic [50:0] seeds [];
  int unsigned offs [];
  logic [15:0] rx [];
  int errors [NUM_ITER];
  int words [NUM_ITER];
  bit prev_dec [K][L];
  int n_corrected = 0, n_skip = 0, n_cancel = 0, n_sat = 0, n_wupd = 0, n_refused = 0;
  longint cyc = 0, t_start = 0, t_done = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // decisions
  always @(posedge clk) if (rst_n && dec_valid) begin
    int it;
    it = int'(dec_iter);
    check(it < NUM_ITER, "iteration index in range");
    if (it < NUM_ITER) begin
      check(int'(dec_sym) == words[it], $sformatf("symbol order it=%0d sym=%0d", it, dec_sym));
      check(dec_last == (it == NUM_ITER - 1), "last-iteration flag");
      for (int k = 0; k < K; k++) begin
        if (dec_bits[k] != data[k][dec_sym]) errors[it]++;
        if (it > 0 && prev_dec[k][dec_sym] != data[k][dec_sym] && dec_bits[k] == data[k][dec_sym])
          n_corrected++;
        prev_dec[k][dec_sym] = dec_bits[k];
      end
      words[it]++;
    end
  end

  // mechanism counters (observed inside the design)
  always @(posedge clk) if (rst_n) begin
    if (dut.chip_valid && dut.first_iter) n_skip++;
    if (dut.chip_valid && !dut.first_iter) n_cancel++;
    if (dut.g_user[0].u_user.part_valid &&
        (dut.g_user[0].u_user.part == 8'sd127 || dut.g_user[0].u_user.part == -8'sd127)) n_sat++;
    if (dut.g_user[0].u_user.u_var.weight_valid) n_wupd++;
    if (in_valid && !in_ready) n_refused++;
  end

  initial begin
    data  = new[K];
    seeds = new[K];
    offs  = new[K];
    for (int k = 0; k < K; k++) begin
      data[k]  = new[L];
      foreach (data[k][q]) data[k][q] = $urandom % 2;
      seeds[k] = lfsr_seed(k);
      offs[k]  = il_offset(k, LM);
    end
    transmit(K, N, M, L, H, CHIP_AMP_DEF, NOISE_SD, seeds, offs, data, rx);

    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(in_ready, "ready after reset");
    for (int c = 0; c < int'(LN); c++) begin
      in_valid <= 1;
      in_chip  <= rx[c][H-1:0];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    // one extra chip offered after the frame: must be refused
    in_chip <= '0;
    @(posedge clk);
    t_start = cyc;
    in_valid <= 0;
    wait (done);
    t_done = cyc;
    @(posedge clk);
    @(posedge clk);

    for (int i = 0; i < NUM_ITER; i++) begin
      $display("iteration %0d: %0d decision words, %0d bit errors of %0d", i, words[i], errors[i], K * L);
      check(words[i] == int'(L), $sformatf("iteration %0d gave %0d decision words", i, words[i]));
      if (i > 0) check(errors[i] <= errors[i-1] + 5, $sformatf("errors do not grow at iteration %0d", i));
    end
    check(errors[0] > 0, "matched-filter-only iteration has errors at this load");
    check(errors[NUM_ITER-1] == 0, "final iteration decodes every bit");
    $display("cycles from frame loaded to done: %0d", t_done - t_start);
    check(t_done - t_start == longint'(NUM_ITER * (LN + LM + 2 * DRAIN + 2)) + 1, "frame cycle count");
    check(!busy, "idle after done");
    check(in_ready, "ready for the next frame");
    $display("mechanisms: skip=%0d cancel=%0d corrected=%0d mf_saturated=%0d weight_updates=%0d refused=%0d",
             n_skip, n_cancel, n_corrected, n_sat, n_wupd, n_refused);
    check(n_skip == int'(LN), "first iteration skips cancellation for the whole frame");
    check(n_cancel == int'((NUM_ITER - 1) * LN), "later iterations cancel");
    check(n_corrected > 0, "cancellation corrected decisions");
    check(n_sat > 0, "matched-filter saturation happened");
    check(n_wupd == NUM_ITER, "one weight update per iteration");
    check(n_refused > 0, "input refused while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
