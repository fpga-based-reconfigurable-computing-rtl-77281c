// tb_payoff_adder_tree: 36 inputs (the default core count) with random valid
// masks, payoffs and path counts; checks each registered sum one cycle later
// against a plain loop, including the all-valid and none-valid cases.
module tb_payoff_adder_tree;
  import heston_pkg::*;
  localparam int K = 36, N = 4;
  localparam int SUM_W = PAY_W + $clog2(K + 1), CNT_W = $clog2(N + 1) + $clog2(K + 1);
  logic clk = 1'b0, rst = 1'b1;
  logic [K-1:0] in_valid;
  pay_t in_value [K];
  logic [2:0] in_paths [K];
  logic out_valid;
  logic [SUM_W-1:0] out_sum;
  logic [CNT_W-1:0] out_paths;
  int checks = 0, failures = 0;

  payoff_adder_tree #(.K(K), .N(N)) dut (.clk(clk), .rst(rst), .in_valid(in_valid),
    .in_value(in_value), .in_paths(in_paths), .out_valid(out_valid), .out_sum(out_sum),
    .out_paths(out_paths));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint es, ep;
    logic ev;
    in_valid = '0;
    for (int k = 0; k < K; k++) begin in_value[k] = '0; in_paths[k] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 500; c++) begin
      es = 0; ep = 0;
      for (int k = 0; k < K; k++) begin
        in_valid[k] = (c == 1) ? 1'b1 : (c == 2) ? 1'b0 : ($urandom_range(3) == 0);
        in_value[k] = {$urandom, $urandom} & {PAY_W{1'b1}};
        in_paths[k] = ($urandom_range(1) == 0) ? 3'd1 : 3'd4;
        if (in_valid[k]) begin es += longint'(in_value[k]); ep += longint'(in_paths[k]); end
      end
      ev = |in_valid;
      @(negedge clk);
      checks++;
      if (out_valid != ev || (ev && (longint'(out_sum) != es || longint'(out_paths) != ep))) begin
        failures++;
        if (failures < 10) $display("cycle %0d: sum %0d/%0d paths %0d/%0d", c, out_sum, es, out_paths, ep);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
