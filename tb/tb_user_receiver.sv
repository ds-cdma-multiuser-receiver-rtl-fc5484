// tb_user_receiver -- one user's processor path on its own (N = 16, M = 4,
// L = 8, adder-tree depth 1). The testbench plays the controller and the
// adder tree (a tree whose other input is zero): it streams a noise-free frame
// of this user's chips from the reference transmitter through three
// iterations. Checks: the decisions of every iteration equal the data; the
// first iteration's chip estimates are zero (cancellation skipped); in later
// iterations every chip estimate equals the transmitted chip (+-16), which
// tests the interleaver memory, the weighting, the tanh table and the
// respreading together; the estimate count and latency (EST_LAT cycles).
`timescale 1ns/1ps
module tb_user_receiver;
  import ps_cdma_pkg::*;
  import ps_tb_pkg::*;

  localparam int K = 2, N = 16, M = 4, L = 8, H = 11, USER = 3;
  localparam int LN = L * N, LM = L * M, DLY = EST_LAT + 1, ITERS = 3;

  logic clk = 0, rst_n = 0;
  logic est_start = 0, est_valid = 0, est_zero = 0;
  logic [$clog2(LN)-1:0] est_idx = 0;
  logic y_valid;
  logic signed [H-1:0] y_est;
  logic mf_start, mf_valid;
  logic signed [H:0] agg = 0;
  logic [H-1:0] rx_chip;
  logic pe_start = 0, pe_valid = 0;
  logic dec_valid, dec_bit;

  user_receiver #(.K(K), .N(N), .M(M), .L(L), .USER(USER)) dut (
    .clk, .rst_n, .est_start, .est_valid, .est_zero, .y_valid, .y_est,
    .mf_start, .mf_valid, .agg, .rx_chip, .pe_start, .pe_valid, .dec_valid, .dec_bit);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit data [][];
  logic [50:0] seeds [];
  int unsigned offs [];
  logic [15:0] rx [];
  int tx_chip [LN];

  // matched-filter side: the estimate stream delayed by DLY cycles
  logic dl_s [DLY], dl_v [DLY];
  int   dl_i [DLY];
  always @(posedge clk) begin
    dl_s[0] <= est_start; dl_v[0] <= est_valid; dl_i[0] <= int'(est_idx);
    for (int i = 1; i < DLY; i++) begin dl_s[i] <= dl_s[i-1]; dl_v[i] <= dl_v[i-1]; dl_i[i] <= dl_i[i-1]; end
    agg <= (H+1)'(y_est);   // adder tree of depth 1, other user silent
  end
  assign mf_start = dl_s[DLY-1];
  assign mf_valid = dl_v[DLY-1];
  assign rx_chip  = rx[dl_i[DLY-1] % LN][H-1:0];

  // estimate monitor
  int it = 0, y_cnt = 0, n_dec = 0, sym = 0;
  longint cyc = 0;
  longint vt [$];
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n) begin
    if (est_valid) vt.push_back(cyc);
    if (y_valid) begin
      check(cyc == vt.pop_front() + EST_LAT, "estimate latency");
      if (it == 0) check(y_est == 0, "first iteration: no estimate");
      else check(int'(y_est) == tx_chip[y_cnt], $sformatf("iter %0d chip %0d: estimate %0d want %0d", it, y_cnt, y_est, tx_chip[y_cnt]));
      y_cnt++;
    end
    if (pe_start) sym = 0;
    if (dec_valid) begin
      check(dec_bit == data[0][sym], $sformatf("iter %0d decision %0d", it, sym));
      sym++; n_dec++;
    end
  end

  initial begin
    foreach (dl_s[i]) begin dl_s[i] = 0; dl_v[i] = 0; dl_i[i] = 0; end
    data = new[1]; seeds = new[1]; offs = new[1];
    data[0] = new[L];
    foreach (data[0][q]) data[0][q] = $urandom % 2;
    seeds[0] = lfsr_seed(USER);
    offs[0]  = il_offset(USER, LM);
    transmit(1, N, M, L, H, CHIP_AMP_DEF, 0.0, seeds, offs, data, rx);
    for (int c = 0; c < LN; c++) tx_chip[c] = rx[c][H-1] ? -int'(rx[c][H-2:0]) : int'(rx[c][H-2:0]);

    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (it = 0; it < ITERS; it++) begin
      y_cnt = 0;
      est_zero <= (it == 0);
      est_start <= 1; @(posedge clk); est_start <= 0;
      for (int c = 0; c < LN; c++) begin
        est_valid <= 1; est_idx <= 7'(c); @(posedge clk);
      end
      est_valid <= 0;
      repeat (20) @(posedge clk);
      check(y_cnt == LN, "one estimate per chip");
      pe_start <= 1; @(posedge clk); pe_start <= 0;
      for (int j = 0; j < LM; j++) begin pe_valid <= 1; @(posedge clk); end
      pe_valid <= 0;
      repeat (20) @(posedge clk);
      check(n_dec == (it + 1) * L, "one decision per symbol");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
