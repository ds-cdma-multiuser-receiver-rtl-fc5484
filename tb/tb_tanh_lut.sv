// tb_tanh_lut -- random extrinsic partitions and weights; every output must
// equal round(16 * tanh(x / 16)) in sign-magnitude form, with
// x = floor(ext * weight / 256) saturated to +-127, two cycles after the input.
`timescale 1ns/1ps
module tb_tanh_lut;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [7:0] ext = 0;
  logic [15:0] weight = 0;
  logic out_valid;
  logic [10:0] soft_chip;

  tanh_lut dut (.clk, .rst_n, .in_valid, .ext, .weight, .out_valid, .soft_chip);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [10:0] exp_q [$];
  int n_out = 0;

  always @(posedge clk) if (rst_n && out_valid) begin
    check(soft_chip == exp_q.pop_front(), $sformatf("output %0d", n_out));
    n_out++;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 2000; i++) begin
      int e, w, x, m;
      real t;
      e = int'($urandom % 255) - 127;
      w = (i % 2) ? int'($urandom % 65536) : int'($urandom % 512);
      x = (e * w) >>> 8;
      if (x > 127) x = 127;
      if (x < -127) x = -127;
      t = $tanh(real'((x < 0) ? -x : x) / 16.0) * 16.0;
      m = $rtoi(t + 0.5);
      exp_q.push_back({(x < 0) && (m != 0), 10'(m)});
      in_valid <= 1; ext <= 8'(e); weight <= 16'(w);
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    check(n_out == 2000, "output count");
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
