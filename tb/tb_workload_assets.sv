// tb_workload_assets: the worst-of-N down-and-out workload at the larger
// asset counts the architecture is evaluated with (8, 16 and 32 assets per
// thread), each on a two-core build of the pricer, run one after another.
// 32 assets need at least 32 pipeline slots, so that build uses M = 32.
module tb_workload_assets;
  logic clk = 1'b0;
  int c8, f8, c16, f16, c32, f32;
  logic d8, d16, d32;

  always #5 clk = ~clk;

  tb_workload_assets_run #(.K(2), .M(16), .N(8),  .TARGET(16)) run8  (.clk(clk), .go(1'b1), .checks(c8),  .failures(f8),  .finished(d8));
  tb_workload_assets_run #(.K(2), .M(16), .N(16), .TARGET(16)) run16 (.clk(clk), .go(d8),   .checks(c16), .failures(f16), .finished(d16));
  tb_workload_assets_run #(.K(2), .M(32), .N(32), .TARGET(16)) run32 (.clk(clk), .go(d16),  .checks(c32), .failures(f32), .finished(d32));

  initial begin
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32, f8 + f16 + f32 + 1);
    $finish;
  end

  initial begin
    @(negedge clk);
    wait (d32);
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32, f8 + f16 + f32);
    $finish;
  end
endmodule
