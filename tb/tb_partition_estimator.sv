// tb_partition_estimator -- feeds random partitions (M = 4 per symbol, with
// gaps between symbols) and checks each extrinsic value (symbol sum minus the
// partition, saturated to +-127), its timing (M + 1 cycles after the
// partition) and each hard decision (sign of the symbol sum).
`timescale 1ns/1ps
module tb_partition_estimator;
  localparam int M = 4;

  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  logic signed [7:0] in_part = 0;
  logic ext_valid, dec_valid, dec_bit;
  logic signed [7:0] ext_part;

  partition_estimator dut (.clk, .rst_n, .start, .in_valid, .in_part, .ext_valid, .ext_part, .dec_valid, .dec_bit);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int ext_q [$];
  longint ext_t [$];
  bit dec_q [$];
  longint cyc = 0;
  int n_ext = 0, n_dec = 0, n_sat = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // input monitor: builds the expectations from what the block samples
  int sym_b [M];
  int sym_n = 0;
  always @(posedge clk) if (rst_n && in_valid && !start) begin
    sym_b[sym_n] = int'(in_part);
    ext_t.push_back(cyc);
    sym_n++;
    if (sym_n == M) begin
      int sum;
      sum = 0;
      for (int m = 0; m < M; m++) sum += sym_b[m];
      for (int m = 0; m < M; m++) begin
        int e;
        e = sum - sym_b[m];
        if (e > 127) begin e = 127; n_sat++; end
        if (e < -127) begin e = -127; n_sat++; end
        ext_q.push_back(e);
      end
      dec_q.push_back(sum < 0);
      sym_n = 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (ext_valid) begin
      begin int w; w = ext_q.pop_front(); check(int'(ext_part) == w, $sformatf("extrinsic %0d got %0d want %0d", n_ext, ext_part, w)); end
      check(cyc == ext_t.pop_front() + M + 1, "extrinsic latency");
      n_ext++;
    end
    if (dec_valid) begin
      check(dec_bit == dec_q.pop_front(), $sformatf("decision %0d", n_dec));
      n_dec++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    start <= 1; @(posedge clk); start <= 0;
    for (int q = 0; q < 500; q++) begin
      for (int m = 0; m < M; m++) begin
        in_valid <= 1; in_part <= 8'(int'($urandom % 255) - 127);
        @(posedge clk);
      end
      begin
        int gap;
        gap = int'($urandom % 3);
        if (gap > 0) begin
          in_valid <= 0;
          repeat (gap) @(posedge clk);
        end
      end
    end
    in_valid <= 0;
    repeat (M + 3) @(posedge clk);
    check(n_ext == 500 * M && n_dec == 500, "all outputs seen");
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
