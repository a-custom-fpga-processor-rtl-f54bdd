// tb_depe_pc: self-checking test of the DEPE program counter.
// Checks reset to 0, advance by one per clock while run is high, hold while
// run is low, restart to 0, the last flag, and that with run held high the
// counter returns to 0 exactly every prog_last+1 clocks (one time step per
// program length, no gap between steps).
module tb_depe_pc;
  logic clk = 0, rst_n = 0, run = 0, restart = 0;
  logic [10:0] prog_last, pc;
  logic last;
  int checks = 0, failures = 0;
  int exp_pc;

  depe_pc dut (.clk, .rst_n, .run, .restart, .prog_last, .pc, .last);

  always #5 clk = ~clk;

  task automatic expect_pc(int e, string what);
    checks++;
    if (pc !== 11'(e) || last !== (pc == prog_last)) begin
      failures++;
      $display("FAIL %s: pc=%0d exp=%0d last=%b", what, pc, e, last);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wraps, first_wrap, second_wrap;
    prog_last = 11'd9;
    repeat (2) @(posedge clk);
    #1 expect_pc(0, "reset");
    rst_n = 1;
    // free run for three steps, reference counter kept here
    run = 1;
    exp_pc = 0;
    wraps = 0; first_wrap = -1; second_wrap = -1;
    for (int c = 1; c <= 35; c++) begin
      @(posedge clk); #1;
      exp_pc = (exp_pc == 9) ? 0 : exp_pc + 1;
      expect_pc(exp_pc, "run");
      if (pc == 0) begin
        if (first_wrap < 0) first_wrap = c; else if (second_wrap < 0) second_wrap = c;
      end
    end
    checks++;
    if (second_wrap - first_wrap != 10) begin
      failures++;
      $display("FAIL step period %0d, expected 10", second_wrap - first_wrap);
    end
    // hold
    run = 0;
    repeat (4) begin @(posedge clk); #1 expect_pc(exp_pc, "hold"); end
    // restart
    restart = 1; @(posedge clk); #1 restart = 0;
    expect_pc(0, "restart");
    // shorter program
    prog_last = 11'd2; run = 1;
    for (int c = 0; c < 9; c++) begin
      @(posedge clk); #1;
      expect_pc((c + 1) % 3, "short");
    end
    // the longest program the default depth holds: wrap from 2047 to 0
    restart = 1; @(posedge clk); #1 restart = 0;
    prog_last = 11'd2047;
    repeat (2047) @(posedge clk);
    #1 expect_pc(2047, "full depth");
    @(posedge clk); #1 expect_pc(0, "full-depth wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
