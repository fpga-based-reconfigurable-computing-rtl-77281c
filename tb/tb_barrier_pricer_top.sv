// tb_barrier_pricer_top: end-to-end test of the pricer at its default size
// (36 cores, 16-slot pipelines, 4 assets per thread), driven only through the
// host bus.
//   Run 1, validation set-up: identity correlation matrix, the same
//   parameters for every asset, vanilla payoff, barrier monitor off. With
//   xi = 0 and kappa = 0 the variance stays at v0 = 0.04, so each asset is a
//   Black-Scholes path with sigma = 0.2, r = 0; the mean payoff of the
//   at-the-money one-year call (S = K = 100, 50 steps) must lie within four
//   standard errors of the closed-form value 7.9656.
//   Run 2, a worst-of-4 down-and-out call with the Heston variance process on
//   (kappa = 2, theta = 0.04, xi = 0.3, rho = -0.5) and correlated assets
//   (Cholesky factor of a matrix with 0.5 off the diagonal), barrier 85.
// For both runs the testbench watches every core's payoff output, and checks
// that the totals and mean that come out of the bus equal its own sum of
// those payoffs and paths. It counts the mechanisms of the design and fails
// if one never happened: knock-out (early termination), maturity, restart of
// a thread in freed slots, idle slots at the end of a run, several cores
// finishing in one cycle (adder tree), the gated barrier, and the payoff-mode
// switch between runs. The cycle count of run 1 is checked against the
// pipeline rate: 32 threads per core on 4 thread slots take 8 waves of
// 51 rounds of 16 cycles.
module tb_barrier_pricer_top;
  import heston_pkg::*;
  localparam int K = 36, M = 16, N = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic wr_en, start, done, result_valid;
  logic [15:0] wr_addr;
  logic [31:0] wr_data;
  logic [63:0] mean, sum;
  logic [39:0] paths;
  int checks = 0, failures = 0;

  barrier_pricer_top dut (
    .clk(clk), .rst(rst), .wr_en(wr_en), .wr_addr(wr_addr), .wr_data(wr_data),
    .start(start), .done(done), .result_valid(result_valid), .mean(mean), .sum(sum),
    .paths(paths));

  always #5 clk = ~clk;

  function automatic longint q20(real x);
    return longint'($floor(x * 1048576.0 + 0.5));
  endfunction

  task automatic bus_write(logic [15:0] a, longint d);
    wr_en = 1'b1; wr_addr = a; wr_data = 32'(d);
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  // ---- observation of every core's payoff port ----
  longint obs_sum, obs_paths;
  int n_hit, n_mature, n_multi, n_restart, n_idle;
  logic [K-1:0] pv, ph;
  logic [39:0] pval [K];
  logic [2:0]  ppath [K];
  logic [1:0]  cmds [K];
  logic [K-1:0] more_to_launch, sched_running;

  for (genvar k = 0; k < K; k++) begin : g_obs
    assign pv[k]    = dut.g_core[k].u_core.pay_valid;
    assign ph[k]    = dut.g_core[k].u_core.pay_hit;
    assign pval[k]  = dut.g_core[k].u_core.pay_value;
    assign ppath[k] = dut.g_core[k].u_core.pay_paths;
    assign cmds[k]  = dut.g_core[k].u_core.cmd;
    assign more_to_launch[k] = dut.g_core[k].u_core.path_count < dut.target;
    assign sched_running[k]  = dut.g_core[k].u_core.u_sched.running;
  end

  always @(posedge clk) begin
    int cnt;
    cnt = 0;
    for (int k = 0; k < K; k++) begin
      if (pv[k]) begin
        cnt++;
        obs_sum   += longint'(pval[k]);
        obs_paths += longint'(ppath[k]);
        if (ph[k]) n_hit++; else n_mature++;
        if (more_to_launch[k]) n_restart++;
      end
      if (cmds[k] == 2'(SLOT_IDLE) && sched_running[k]) n_idle++;
    end
    if (cnt > 1) n_multi++;
  end

  task automatic do_run(int per_core, int steps, logic ben, payoff_mode_e md, output int cycles);
    obs_sum = 0; obs_paths = 0;
    bus_write(16'h0000, steps);
    bus_write(16'h0001, per_core);
    bus_write(16'h0002, {md, ben});
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 2000000) begin @(negedge clk); cycles++; end
    while (!result_valid && cycles < 2000000) @(negedge clk);
    checks++;
    if (!result_valid) begin failures++; $display("no result"); end
    checks++;
    if (sum != 64'(obs_sum) || paths != 40'(obs_paths)) begin
      failures++; $display("totals %0d/%0d paths %0d/%0d", sum, obs_sum, paths, obs_paths);
    end
    checks++;
    if (obs_paths == 0 || mean != 64'(obs_sum / obs_paths)) begin
      failures++; $display("mean %0d, expected %0d", mean, obs_paths ? obs_sum / obs_paths : 0);
    end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c1, c2, hits_run1, mature_run1;
    real m1, m2, se;
    n_hit = 0; n_mature = 0; n_multi = 0; n_restart = 0; n_idle = 0;
    obs_sum = 0; obs_paths = 0;
    wr_en = 0; wr_addr = '0; wr_data = '0; start = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (2) @(negedge clk);
    // ---------------- run 1: Black-Scholes limit, vanilla ----------------
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        bus_write({4'd2, 6'(i), 6'(j)}, (i == j) ? q20(1.0) : 0);
    for (int a = 0; a < N; a++) begin
      bus_write({4'd1, 8'(a), 4'(F_S0)},       q20(100.0));
      bus_write({4'd1, 8'(a), 4'(F_V0)},       q20(0.04));
      bus_write({4'd1, 8'(a), 4'(F_MU_DT)},    0);
      bus_write({4'd1, 8'(a), 4'(F_KAPPA_DT)}, 0);
      bus_write({4'd1, 8'(a), 4'(F_THETA)},    q20(0.04));
      bus_write({4'd1, 8'(a), 4'(F_XI_SQDT)},  0);
      bus_write({4'd1, 8'(a), 4'(F_SQDT)},     q20($sqrt(1.0 / 50.0)));
      bus_write({4'd1, 8'(a), 4'(F_RHO)},      0);
      bus_write({4'd1, 8'(a), 4'(F_RHO_C)},    q20(1.0));
      bus_write({4'd1, 8'(a), 4'(F_BARRIER)},  q20(99.0));
      bus_write({4'd1, 8'(a), 4'(F_STRIKE)},   q20(100.0));
    end
    do_run(32, 50, 1'b0, PAYOFF_VANILLA, c1);
    m1 = real'(mean) / 1048576.0;
    se = 14.0 / $sqrt(real'(paths));
    $display("run 1: %0d paths, mean payoff %f (Black-Scholes 7.9656, s.e. %f), %0d cycles",
             paths, m1, se, c1);
    checks++;
    if (paths != 40'(K * 32 * N)) begin failures++; $display("run 1 path count"); end
    checks++;
    if (m1 < 7.9656 - 4.0 * se || m1 > 7.9656 + 4.0 * se) begin failures++; $display("run 1 price off"); end
    checks++;
    if (c1 < 8 * 51 * M || c1 > 8 * 53 * M) begin failures++; $display("run 1 cycle count %0d", c1); end
    hits_run1 = n_hit; mature_run1 = n_mature;
    checks++;
    if (hits_run1 != 0) begin failures++; $display("gated barrier still knocked out %0d paths", hits_run1); end
    // ---------------- run 2: worst-of-4 down-and-out, Heston ----------------
    // Cholesky factor of the matrix with 1 on and 0.5 off the diagonal
    begin
      real L [N][N];
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) L[i][j] = 0.0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j <= i; j++) begin
          real acc;
          acc = (i == j) ? 1.0 : 0.5;
          for (int k = 0; k < j; k++) acc -= L[i][k] * L[j][k];
          L[i][j] = (i == j) ? $sqrt(acc) : acc / L[j][j];
        end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          bus_write({4'd2, 6'(i), 6'(j)}, q20(L[i][j]));
    end
    for (int a = 0; a < N; a++) begin
      bus_write({4'd1, 8'(a), 4'(F_S0)},       q20(100.0));
      bus_write({4'd1, 8'(a), 4'(F_MU_DT)},    q20(0.03 / 50.0));
      bus_write({4'd1, 8'(a), 4'(F_KAPPA_DT)}, q20(2.0 / 50.0));
      bus_write({4'd1, 8'(a), 4'(F_XI_SQDT)},  q20(0.3 * $sqrt(1.0 / 50.0)));
      bus_write({4'd1, 8'(a), 4'(F_RHO)},      q20(-0.5));
      bus_write({4'd1, 8'(a), 4'(F_RHO_C)},    q20($sqrt(0.75)));
      bus_write({4'd1, 8'(a), 4'(F_BARRIER)},  q20(85.0));
      bus_write({4'd1, 8'(a), 4'(F_STRIKE)},   q20(95.0));
    end
    do_run(16, 50, 1'b1, PAYOFF_WORST_OF, c2);
    m2 = real'(mean) / 1048576.0;
    $display("run 2: %0d paths, mean payoff %f, %0d cycles, %0d knocked out", paths, m2, c2,
             n_hit - hits_run1);
    checks++;
    if (paths != 40'(K * 16)) begin failures++; $display("run 2 path count"); end
    checks++;
    if (m2 <= 0.0 || m2 >= m1 + 5.0) begin failures++; $display("run 2 price implausible"); end
    $display("knock-outs %0d, maturities %0d, restarts %0d, multi-core cycles %0d, idle issues %0d",
             n_hit, n_mature, n_restart, n_multi, n_idle);
    checks++; if (n_hit == hits_run1) begin failures++; $display("no knock-out"); end
    checks++; if (mature_run1 == 0 || n_mature == mature_run1) begin failures++; $display("no maturity"); end
    checks++; if (n_restart == 0) begin failures++; $display("no restart"); end
    checks++; if (n_multi == 0) begin failures++; $display("no simultaneous payoffs"); end
    checks++; if (n_idle == 0) begin failures++; $display("no idle slot"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
