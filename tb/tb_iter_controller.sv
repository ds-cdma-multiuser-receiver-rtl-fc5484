// tb_iter_controller -- small frame (LN = 40 chips, LM = 8 partitions,
// DRAIN = 5): runs 3 iterations, then 1, then num_iter = 0 (taken as 1), and
// checks the pass order, chip indices, the number of valids per pass, the
// iteration flags, the exact cycle count and the single done pulse.
`timescale 1ns/1ps
module tb_iter_controller;
  localparam int LN = 40, LM = 8, DRAIN = 5;

  logic clk = 0, rst_n = 0, go = 0;
  logic [3:0] num_iter = 0;
  logic chip_start, chip_valid, part_start, part_valid, first_iter, last_iter, busy, done;
  logic [5:0] chip_idx;
  logic [3:0] iter;

  iter_controller #(.LN(LN), .LM(LM), .DRAIN(DRAIN)) dut (
    .clk, .rst_n, .go, .num_iter, .chip_start, .chip_valid, .chip_idx,
    .part_start, .part_valid, .iter, .first_iter, .last_iter, .busy, .done);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // monitor state
  int n_chip, n_part, n_cs, n_ps, n_done, exp_idx, cyc_count;
  int iter_seen [$];

  always @(posedge clk) if (rst_n && busy) begin
    cyc_count++;
    if (chip_start) begin
      n_cs++; exp_idx = 0;
      iter_seen.push_back(int'(iter));
      check(n_chip == (n_cs - 1) * LN && n_part == (n_cs - 1) * LM, "chip pass follows a full partition pass");
    end
    if (chip_valid) begin
      check(int'(chip_idx) == exp_idx, "chip index");
      check(first_iter == (iter == 0), "first_iter flag");
      exp_idx++; n_chip++;
    end
    if (part_start) begin
      n_ps++;
      check(n_chip == n_ps * LN, "partition pass follows a full chip pass");
    end
    if (part_valid) n_part++;
  end
  always @(posedge clk) if (rst_n && done) n_done++;

  task automatic run(int ni, int want_iters);
    int c;
    n_chip = 0; n_part = 0; n_cs = 0; n_ps = 0; n_done = 0; cyc_count = 0;
    iter_seen.delete();
    num_iter <= 4'(ni); go <= 1; @(posedge clk); go <= 0; num_iter <= 0;
    c = 0;
    while (!done && c < 5000) begin @(posedge clk); c++; end
    @(posedge clk);
    check(n_cs == want_iters && n_ps == want_iters, $sformatf("%0d iterations run", want_iters));
    check(n_chip == want_iters * LN && n_part == want_iters * LM, "valids per pass");
    check(cyc_count == want_iters * (LN + LM + 2 * DRAIN + 2), $sformatf("cycles %0d", cyc_count));
    check(n_done == 1, "one done pulse");
    for (int i = 0; i < want_iters; i++) check(iter_seen[i] == i, "iteration counter");
    check(!busy, "idle at the end");
  endtask

  always @(posedge clk) if (rst_n && busy) check(last_iter == (iter == 4'(dut.iters - 1)), "last_iter flag");

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(!busy && !chip_valid && !part_valid, "idle after reset");
    run(3, 3);
    run(1, 1);
    run(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
