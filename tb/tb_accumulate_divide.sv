// tb_accumulate_divide: accumulates random payoff records, divides, and
// checks sum, paths and mean = floor(sum / paths) for 40 runs, including a
// run with no paths, and checks that the result appears ACC_W + 1 = 65
// cycles after finish.
module tb_accumulate_divide;
  logic clk = 1'b0, rst = 1'b1;
  logic clear, in_valid, finish, busy, result_valid;
  logic [45:0] in_sum;
  logic [8:0]  in_paths;
  logic [63:0] sum, mean;
  logic [39:0] paths;
  int checks = 0, failures = 0;

  accumulate_divide #(.IN_W(46), .CNT_W(9), .ACC_W(64), .PCW(40)) dut (
    .clk(clk), .rst(rst), .clear(clear), .in_valid(in_valid), .in_sum(in_sum),
    .in_paths(in_paths), .finish(finish), .sum(sum), .paths(paths), .busy(busy),
    .result_valid(result_valid), .mean(mean));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned es, ep;
    int wait_cycles;
    clear = 0; in_valid = 0; finish = 0; in_sum = '0; in_paths = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int run = 0; run < 40; run++) begin
      clear = 1'b1;
      @(negedge clk);
      clear = 1'b0;
      es = 0; ep = 0;
      for (int i = 0; i < ((run == 3) ? 0 : 1 + $urandom_range(200)); i++) begin
        in_valid = ($urandom_range(3) != 0);
        in_sum   = {$urandom, $urandom} & 46'h0000_FFFF_FFFF;
        in_paths = 9'($urandom_range(1, 144));
        if (in_valid) begin es += longint'(in_sum); ep += longint'(in_paths); end
        @(negedge clk);
      end
      in_valid = 1'b0;
      @(negedge clk);
      finish = 1'b1;
      @(negedge clk);
      finish = 1'b0;
      wait_cycles = 1;
      while (!result_valid && wait_cycles < 200) begin @(negedge clk); wait_cycles++; end
      checks++;
      if (sum != es || paths != 40'(ep)) begin failures++; $display("run %0d: totals wrong", run); end
      checks++;
      if (mean != ((ep == 0) ? 64'd0 : es / ep)) begin
        failures++; $display("run %0d: mean %0d expected %0d", run, mean, (ep == 0) ? 0 : es / ep);
      end
      if (ep != 0) begin
        checks++;
        if (wait_cycles != 65) begin failures++; $display("run %0d: divide took %0d cycles", run, wait_cycles); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
