// tb_workload_assets_run: one worst-of-N down-and-out run of the full pricer
// built for N assets per thread (with K cores and M slots), used by
// tb_workload_assets. Loads a Cholesky factor of a correlation matrix with
// 0.3 off the diagonal, Heston parameters (kappa = 2, theta = 0.04,
// xi = 0.3, rho = -0.5, 1 year in 50 steps), barrier 80 (60 for 32 assets) and strike 95 for
// every asset, runs target threads per core and checks the path count,
// that the mean equals sum / paths, that some paths were knocked out and
// some matured, and the run length against the pipeline rate.
module tb_workload_assets_run
  import heston_pkg::*;
#(
  parameter int unsigned K = 2,
  parameter int unsigned M = 16,
  parameter int unsigned N = 8,
  parameter int unsigned TARGET = 8
) (
  input  logic clk,
  input  logic go,
  output int   checks,
  output int   failures,
  output logic finished
);
  logic rst, wr_en, start, done, result_valid;
  logic [15:0] wr_addr;
  logic [31:0] wr_data;
  logic [63:0] mean, sum;
  logic [39:0] paths;

  barrier_pricer_top #(.K(K), .M(M), .N(N)) dut (
    .clk(clk), .rst(rst), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .start(start), .done(done), .result_valid(result_valid), .mean(mean), .sum(sum),
    .paths(paths));

  function automatic longint q20(real x);
    return longint'($floor(x * 1048576.0 + 0.5));
  endfunction

  task automatic bus_write(logic [15:0] a, longint d);
    wr_en = 1'b1; wr_addr = a; wr_data = 32'(d);
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  int n_hit, n_mature;
  logic [K-1:0] pv, ph;
  for (genvar k = 0; k < K; k++) begin : g_obs
    assign pv[k] = dut.g_core[k].u_core.pay_valid;
    assign ph[k] = dut.g_core[k].u_core.pay_hit;
  end
  always @(posedge clk)
    for (int k = 0; k < K; k++)
      if (pv[k]) begin if (ph[k]) n_hit++; else n_mature++; end

  initial begin
    real L [N][N];
    int cycles, waves;
    checks = 0; failures = 0; finished = 1'b0; n_hit = 0; n_mature = 0;
    rst = 1'b1; wr_en = 0; wr_addr = '0; wr_data = '0; start = 0;
    @(negedge clk);
    wait (go);
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) L[i][j] = 0.0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j <= i; j++) begin
        real acc;
        acc = (i == j) ? 1.0 : 0.3;
        for (int k = 0; k < j; k++) acc -= L[i][k] * L[j][k];
        L[i][j] = (i == j) ? $sqrt(acc) : acc / L[j][j];
      end
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        bus_write({4'd2, 6'(i), 6'(j)}, q20(L[i][j]));
    for (int a = 0; a < N; a++) begin
      bus_write({4'd1, 8'(a), 4'(F_S0)},       q20(100.0));
      bus_write({4'd1, 8'(a), 4'(F_V0)},       q20(0.04));
      bus_write({4'd1, 8'(a), 4'(F_MU_DT)},    q20(0.03 / 50.0));
      bus_write({4'd1, 8'(a), 4'(F_KAPPA_DT)}, q20(2.0 / 50.0));
      bus_write({4'd1, 8'(a), 4'(F_THETA)},    q20(0.04));
      bus_write({4'd1, 8'(a), 4'(F_XI_SQDT)},  q20(0.3 * $sqrt(1.0 / 50.0)));
      bus_write({4'd1, 8'(a), 4'(F_SQDT)},     q20($sqrt(1.0 / 50.0)));
      bus_write({4'd1, 8'(a), 4'(F_RHO)},      q20(-0.5));
      bus_write({4'd1, 8'(a), 4'(F_RHO_C)},    q20($sqrt(0.75)));
      bus_write({4'd1, 8'(a), 4'(F_BARRIER)},  q20((N >= 32) ? 60.0 : 80.0));
      bus_write({4'd1, 8'(a), 4'(F_STRIKE)},   q20(95.0));
    end
    bus_write(16'h0000, 50);
    bus_write(16'h0001, longint'(TARGET));
    bus_write(16'h0002, 1);               // barrier on, worst-of-N
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!result_valid && cycles < 1000000) begin @(negedge clk); cycles++; end
    waves = (TARGET + M / N - 1) / (M / N);
    $display("N=%0d: %0d paths, mean payoff %f, %0d knocked out, %0d matured, %0d cycles",
             N, paths, real'(mean) / 1048576.0, n_hit, n_mature, cycles);
    checks++;
    if (!result_valid || paths != 40'(K * TARGET)) begin failures++; $display("N=%0d: paths %0d", N, paths); end
    checks++;
    if (paths == 0 || mean != sum / 64'(paths)) begin failures++; $display("N=%0d: mean", N); end
    checks++;
    if (n_hit == 0 || n_mature == 0) begin failures++; $display("N=%0d: knock-out or maturity missing", N); end
    checks++;
    if (cycles > waves * 51 * M + 200) begin failures++; $display("N=%0d: too slow", N); end
    finished = 1'b1;
  end
endmodule
