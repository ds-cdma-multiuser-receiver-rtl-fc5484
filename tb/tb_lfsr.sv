// tb_lfsr -- checks the 51-stage spreading LFSR against the recurrence
// a[n+51] = a[n] ^ a[n+3] evaluated in the reference package, for several
// seeds, and checks that `load` restarts the sequence and that the register
// holds while `step` is low.
`timescale 1ns/1ps
module tb_lfsr;
  import ps_tb_pkg::*;

  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [50:0] seed;
  logic chip;

  lfsr dut (.clk, .rst_n, .load, .step, .seed, .chip);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bit seq [];

  initial begin
    seed = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 4; s++) begin
      seed = {$urandom, $urandom} | 51'd1;
      lfsr_seq(seed, 400, seq);
      load <= 1; @(posedge clk); load <= 0;
      for (int n = 0; n < 400; n++) begin
        step <= 1;
        #1 check(chip == seq[n], $sformatf("seed %0d bit %0d", s, n));
        @(posedge clk);
        if (n == 200) begin  // pause: the register must hold
          step <= 0;
          repeat (3) @(posedge clk);
          #1 check(chip == seq[n + 1], "hold while step is low");
        end
      end
      step <= 0;
    end
    // load has priority over step
    lfsr_seq(seed, 4, seq);
    load <= 1; step <= 1; @(posedge clk); load <= 0; step <= 0;
    #1 check(chip == seq[0], "load wins over step");
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
