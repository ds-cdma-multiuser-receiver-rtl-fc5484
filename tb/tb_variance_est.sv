// tb_variance_est -- feeds frames of COUNT = 16 partitions with different
// spreads around +-AMP (AMP = 64) and checks the weight against
// 16 * AMP * 256 / sigma2_bin, where sigma2 = floor(sum((|b| - AMP)^2) / COUNT)
// and sigma2_bin is the centre of its 64-wide table bin (clipped to the last
// of 256 bins; the weight is clipped to 65535), computed here.
`timescale 1ns/1ps
module tb_variance_est;
  localparam int COUNT = 16, AMP = 64;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  logic signed [7:0] in_part = 0;
  logic [15:0] weight;
  logic weight_valid;

  variance_est #(.COUNT(COUNT)) dut (.clk, .rst_n, .start, .in_valid, .in_part, .weight, .weight_valid);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int want(int s2);
    int idx;
    real v;
    idx = s2 / 64;
    if (idx > 255) idx = 255;
    v = 16.0 * 64.0 * 256.0 / ((real'(idx) + 0.5) * 64.0);
    if (v > 65535.0) v = 65535.0;
    return $rtoi(v + 0.5);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(int'(weight) == want(1 << 30), "weight before the first estimate");
    start <= 1; @(posedge clk); start <= 0;
    for (int f = 0; f < 60; f++) begin
      int acc, spread, n_upd;
      acc = 0; n_upd = 0;
      spread = (f % 4 == 0) ? 2 : (f % 4 == 1) ? 20 : (f % 4 == 2) ? 60 : 127;
      for (int i = 0; i < COUNT; i++) begin
        int b, e;
        b = AMP + int'($urandom % (2 * spread + 1)) - spread;
        if (b > 127) b = 127;
        if (b < -127) b = -127;
        if ($urandom % 2) b = -b;
        e = ((b < 0) ? -b : b) - AMP;
        acc += e * e;
        in_valid <= 1; in_part <= 8'(b);
        @(posedge clk);
        #1 if (weight_valid) n_upd++;
      end
      in_valid <= 0;
      @(posedge clk);
      #1 if (weight_valid) n_upd++;
      check(n_upd == 1, "one weight update per frame");
      check(int'(weight) == want(acc / COUNT), $sformatf("frame %0d: weight %0d want %0d", f, weight, want(acc / COUNT)));
    end
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
