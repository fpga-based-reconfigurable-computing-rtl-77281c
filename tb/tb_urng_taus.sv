// tb_urng_taus: checks the taus88 generator against a behavioural model of
// the three recurrences computed in the testbench, for 2000 outputs, checks
// that en low holds the state, and checks the mean of the outputs is near
// 2^31 (uniformity).
module tb_urng_taus;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [31:0] u;
  int checks = 0, failures = 0;

  localparam logic [31:0] S1 = 32'hDEAD_BEEF, S2 = 32'h0BAD_F00D, S3 = 32'h1357_2468;

  urng_taus #(.SEED1(S1), .SEED2(S2), .SEED3(S3)) dut (.clk(clk), .rst(rst), .en(en), .u(u));

  always #5 clk = ~clk;

  logic [31:0] m1, m2, m3;
  task automatic model_step();
    logic [31:0] b;
    b  = ((m1 << 13) ^ m1) >> 19;  m1 = ((m1 & ~32'd1)  << 12) ^ b;
    b  = ((m2 <<  2) ^ m2) >> 25;  m2 = ((m2 & ~32'd7)  <<  4) ^ b;
    b  = ((m3 <<  3) ^ m3) >> 11;  m3 = ((m3 & ~32'd15) << 17) ^ b;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real mean;
    mean = 0.0;
    m1 = S1; m2 = S2; m3 = S3;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    checks++;
    if (u !== (m1 ^ m2 ^ m3)) begin failures++; $display("seed output mismatch"); end
    en <= 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      #1;
      model_step();
      checks++;
      if (u !== (m1 ^ m2 ^ m3)) begin
        failures++;
        if (failures < 10) $display("mismatch at %0d: %h vs %h", i, u, m1 ^ m2 ^ m3);
      end
      mean += real'(u) / 2000.0;
    end
    en <= 1'b0;
    repeat (5) @(posedge clk);
    #1;
    checks++;
    if (u !== (m1 ^ m2 ^ m3)) begin failures++; $display("en=0 did not hold"); end
    checks++;
    if (mean < 0.45 * 4294967296.0 || mean > 0.55 * 4294967296.0) begin
      failures++; $display("mean off: %f", mean / 4294967296.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
