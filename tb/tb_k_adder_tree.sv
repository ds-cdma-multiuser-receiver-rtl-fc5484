// tb_k_adder_tree -- random sets of K = 50 (and, in a second instance, K = 7)
// H-bit values, one set per cycle with random gaps; every sum must appear
// exactly ceil(log2 K) cycles after its inputs and equal the plain sum. Extreme
// values check that the full-width sum does not overflow.
`timescale 1ns/1ps
module tb_k_adder_tree;
  localparam int K1 = 50, K2 = 7, W = 11;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] v1 [K1];
  logic signed [W-1:0] v2 [K2];
  logic ov1, ov2;
  logic signed [W+5:0] s1;
  logic signed [W+2:0] s2;

  k_adder_tree #(.K(K1), .W(W)) dut1 (.clk, .rst_n, .in_valid, .in_vals(v1), .out_valid(ov1), .out_sum(s1));
  k_adder_tree #(.K(K2), .W(W)) dut2 (.clk, .rst_n, .in_valid, .in_vals(v2), .out_valid(ov2), .out_sum(s2));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int q1 [$], q2 [$];
  longint t_q [$], t_q2 [$];
  longint cyc = 0;
  int n_out = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // monitor: expected sums from the sampled inputs
  always @(posedge clk) if (rst_n && in_valid) begin
    int a, b;
    a = 0; b = 0;
    for (int i = 0; i < K1; i++) a += int'(v1[i]);
    for (int i = 0; i < K2; i++) b += int'(v2[i]);
    q1.push_back(a); q2.push_back(b); t_q.push_back(cyc); t_q2.push_back(cyc);
  end

  always @(posedge clk) if (rst_n) begin
    if (ov1) begin
      check(int'(s1) == q1.pop_front(), $sformatf("K=50 sum %0d", n_out));
      check(cyc == t_q.pop_front() + 6, "K=50 latency 6");
      n_out++;
    end
    if (ov2) begin
      check(int'(s2) == q2.pop_front(), "K=7 sum");
      check(cyc == t_q2.pop_front() + 3, "K=7 latency 3");
    end
  end

  initial begin
    foreach (v1[i]) v1[i] = '0;
    foreach (v2[i]) v2[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 1000; n++) begin
      for (int i = 0; i < K1; i++)
        v1[i] <= (n % 10 == 0) ? -11'sd1024 : (n % 10 == 1) ? 11'sd1023 : W'($urandom);
      for (int i = 0; i < K2; i++)
        v2[i] <= (n % 10 == 0) ? -11'sd1024 : W'($urandom);
      in_valid <= ($urandom % 4 != 0);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (10) @(posedge clk);
    check(n_out > 600 && q1.size() == 0 && q2.size() == 0, "all sums seen");
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
