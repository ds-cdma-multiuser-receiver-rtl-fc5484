// tb_matched_filter -- drives random sign-magnitude chips and spreading bits
// into the matched filter (16 chips per partition, scale sqrt(4/64)) and
// compares every partition with sum(chip * (-1)^code) * sqrt(M/N), rounded and
// saturated to +-127, computed here in real arithmetic. Small and large chip
// amplitudes exercise both the normal and the saturated range; gaps in
// `in_valid` and a restart with `start` are included.
`timescale 1ns/1ps
module tb_matched_filter;
  localparam int CHIPS = 16;
  localparam real SC = 0.25;   // sqrt(M/N) for M = 4, N = 64

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0, code = 0;
  logic [10:0] in_chip = 0;
  logic out_valid;
  logic signed [7:0] out_part;

  matched_filter dut (.clk, .rst_n, .start, .in_valid, .in_chip, .code, .out_valid, .out_part);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_out = 0, n_sat = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int expq [$];

  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    e = expq.pop_front();
    check(int'(out_part) == e, $sformatf("partition %0d: got %0d want %0d", n_out, out_part, e));
    if (e == 127 || e == -127) n_sat++;
    n_out++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    start <= 1; @(posedge clk); start <= 0;
    for (int p = 0; p < 400; p++) begin
      int sum, amp;
      real v;
      sum = 0;
      amp = (p % 3 == 0) ? 1023 : (p % 3 == 1) ? 40 : 200;
      for (int c = 0; c < CHIPS; c++) begin
        int mag, val;
        bit s, cd;
        mag = $urandom % (amp + 1); s = 1'($urandom); cd = 1'($urandom);
        val = s ? -mag : mag;
        if (cd) val = -val;
        sum += val;
        in_valid <= 1; in_chip <= {s, 10'(mag)}; code <= cd;
        @(posedge clk);
        if ($urandom % 8 == 0) begin in_valid <= 0; @(posedge clk); end
      end
      v = real'(sum) * SC;
      v = (v >= 0.0) ? real'($rtoi(v + 0.5)) : -real'($rtoi(-v + 0.5 - 1e-9));
      if (v > 127.0) v = 127.0;
      if (v < -127.0) v = -127.0;
      expq.push_back($rtoi(v));
      if (p == 200) begin
        // a partial partition thrown away by start
        in_valid <= 1; in_chip <= 11'd500; code <= 0; @(posedge clk);
        in_valid <= 0; start <= 1; @(posedge clk); start <= 0;
      end
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    check(n_out == 400, "partition count");
    check(n_sat > 0, "saturation exercised");
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
