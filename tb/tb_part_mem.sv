// tb_part_mem -- random writes and reads of the single-port partition memory
// compared with a model array: write, registered read, hold while idle.
`timescale 1ns/1ps
module tb_part_mem;
  logic clk = 0, we = 0, re = 0;
  logic [7:0] addr = 0;
  logic [7:0] wdata = 0, rdata;

  part_mem dut (.clk, .we, .re, .addr, .wdata, .rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] model [256];
  logic [7:0] expect_q;

  initial begin
    for (int a = 0; a < 256; a++) begin
      logic [7:0] v;
      v = 8'($urandom);
      we <= 1; addr <= 8'(a); wdata <= v; model[a] = v;
      @(posedge clk);
    end
    we <= 0;
    expect_q = '0;
    begin
    bit have_read;
    have_read = 0;
    for (int i = 0; i < 4000; i++) begin
      int op;
      logic [7:0] a, d;
      op = int'($urandom % 3); a = 8'($urandom); d = 8'($urandom);
      we <= (op == 0); re <= (op == 1); addr <= a; wdata <= d;
      if (op == 1) begin expect_q = model[a]; have_read = 1; end
      @(posedge clk);
      if (op == 0) model[a] = d;
      #1 if (have_read) check(rdata == expect_q, $sformatf("read %0d", i));
    end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
