// tb_thread_scheduler: runs the scheduler at the default size (16 slots,
// 4 assets, 4 threads) and at the smallest (4 slots, 4 assets, one thread,
// where a freed thread's first slot issues in the very cycle its termination
// arrives), each against a reference model (tb_thread_scheduler_run).
// Fails if no early restart or no idle slot was seen.
module tb_thread_scheduler;
  logic clk = 1'b0;
  int c1, f1, r1, i1, c2, f2, r2, i2;
  logic fin1, fin2;
  int checks, failures;

  always #5 clk = ~clk;

  tb_thread_scheduler_run #(.M(16), .N(4)) run_a (.clk(clk), .checks(c1), .failures(f1),
    .restarts(r1), .idles(i1), .finished(fin1));
  tb_thread_scheduler_run #(.M(4), .N(4)) run_b (.clk(clk), .checks(c2), .failures(f2),
    .restarts(r2), .idles(i2), .finished(fin2));

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2, f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (fin1 && fin2);
    checks   = c1 + c2 + 2;
    failures = f1 + f2;
    $display("restarts %0d/%0d, idle issues %0d/%0d", r1, r2, i1, i2);
    if (r1 == 0 || r2 == 0) failures++;
    if (i1 == 0 || i2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
