// tb_rx_chip_mem -- loads a frame into the received-chip memory (depth 64),
// checks the write counter, that writes beyond a full frame are ignored, that
// every chip reads back one cycle after its address, and that clearing the
// counter allows a new frame.
`timescale 1ns/1ps
module tb_rx_chip_mem;
  logic clk = 0, rst_n = 0, wr_clr = 0, wr_en = 0;
  logic [10:0] wr_data = 0, rd_data;
  logic [6:0] wr_count;
  logic [5:0] rd_addr = 0;

  rx_chip_mem #(.DEPTH(64)) dut (.clk, .rst_n, .wr_clr, .wr_en, .wr_data, .wr_count, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [10:0] model [64];

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 2; f++) begin
      @(posedge clk);
      #1 check(wr_count == 0, "empty");
      for (int c = 0; c < 70; c++) begin
        logic [10:0] v;
        v = 11'($urandom);
        wr_en <= 1; wr_data <= v;
        if (c < 64) model[c] = v;
        @(posedge clk);
        #1 check(int'(wr_count) == ((c + 1 < 64) ? c + 1 : 64), "count");
        if (c >= 64) check(dut.mem[0] == model[0] && dut.mem[63] == model[63], "no overwrite when full");
      end
      wr_en <= 0;
      for (int i = 0; i < 200; i++) begin
        logic [5:0] a;
        a = 6'($urandom);
        rd_addr <= a;
        @(posedge clk);
        #1 check(rd_data == model[a], "read back");
      end
      wr_clr <= 1; @(posedge clk); wr_clr <= 0;
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
