// tb_interleaver_addr -- checks the serial address generator against the
// interleaver polynomial (63x + 128x^2 + h) mod DEPTH evaluated directly, for
// the default depth 256 and a depth of 1024, several offsets h, and checks
// that each sequence is a permutation and that `start` restarts it.
`timescale 1ns/1ps
module tb_interleaver_addr;
  import ps_tb_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, step = 0;
  logic [7:0] h8, a8;
  logic [9:0] h10, a10;

  interleaver_addr dut (.clk, .rst_n, .start, .step, .h(h8), .addr(a8));
  interleaver_addr #(.DEPTH(1024)) dut10 (.clk, .rst_n, .start, .step, .h(h10), .addr(a10));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit seen8 [256];
  bit seen10 [1024];

  initial begin
    h8 = '0; h10 = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 3; r++) begin
      h8 = 8'($urandom); h10 = 10'($urandom);
      foreach (seen8[i]) seen8[i] = 0;
      foreach (seen10[i]) seen10[i] = 0;
      start <= 1; @(posedge clk); start <= 0;
      for (int x = 0; x < 1024; x++) begin
        #1;
        if (x < 256) begin
          check(int'(a8) == il_addr(x, h8, 256), $sformatf("depth 256 h=%0d x=%0d", h8, x));
          check(!seen8[a8], "depth 256 permutation");
          seen8[a8] = 1;
        end
        check(int'(a10) == il_addr(x, h10, 1024), $sformatf("depth 1024 h=%0d x=%0d", h10, x));
        check(!seen10[a10], "depth 1024 permutation");
        seen10[a10] = 1;
        step <= 1; @(posedge clk); step <= 0;
        if (x % 100 == 7) @(posedge clk);  // gaps without step
      end
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
