// tb_mc_core: one Monte Carlo core at its default size (16 slots, 4 assets,
// 4 threads) through four runs:
//   1. noise-free parameters (xi = 0, sqrt(dt) = 0), barrier below the
//      paths, worst-of-N payoff: every path matures and its payoff must equal
//      the fixed-point model's (min_i (S_i(T) - K_i))^+ exactly;
//   2. the same with the barrier of asset 2 above its first step: every path
//      is knocked out at step 1 with payoff 0, and the run must finish in a
//      fraction of run 1's time (early termination);
//   3. vanilla mode, noise on, every row of the correlation matrix
//      [1 0 0 0] and identical assets with constant variance: all assets
//      see the same noise, so each payoff is 4 equal parts, and payoffs vary;
//   4. vanilla mode with the identity matrix: assets now differ.
// Each run checks the number of payoff events, path counter, done and the
// cycle count against the pipeline rate (one asset step per cycle).
module tb_mc_core;
  import heston_pkg::*;
  localparam int M = 16, N = 4, T = M / N;
  logic clk = 1'b0, rst = 1'b1;
  ctrl_wr_t wr;
  logic start, barrier_en;
  logic [15:0] nsteps;
  logic [31:0] target, path_count;
  payoff_mode_e mode;
  logic pay_valid, pay_hit, done;
  pay_t pay_value;
  logic [2:0] pay_paths;
  int checks = 0, failures = 0;

  mc_core #(.M(M), .N(N), .CORE_ID(3)) dut (
    .clk(clk), .rst(rst), .wr(wr), .start(start), .nsteps(nsteps), .target(target),
    .barrier_en(barrier_en), .mode(mode), .pay_valid(pay_valid), .pay_value(pay_value),
    .pay_paths(pay_paths), .pay_hit(pay_hit), .path_count(path_count), .done(done));

  always #5 clk = ~clk;

  function automatic longint q20(real x);
    return longint'($floor(x * 1048576.0));
  endfunction

  task automatic bus_write(logic [15:0] a, longint d);
    wr = '{we: 1'b1, addr: a, data: 32'(d)};
    @(negedge clk);
    wr = '0;
  endtask

  task automatic set_param(int asset, int field, longint v);
    bus_write({4'd1, 8'(asset), 4'(field)}, v);
  endtask

  task automatic set_matrix(bit identity);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        bus_write({4'd2, 6'(i), 6'(j)}, (identity ? (i == j) : (j == 0)) ? (1 << 20) : 0);
  endtask

  longint pays [$];
  logic   hits [$];
  int     paths_sum;

  always @(posedge clk) begin
    if (pay_valid) begin
      pays.push_back(longint'(pay_value));
      hits.push_back(pay_hit);
      paths_sum += int'(pay_paths);
    end
  end

  task automatic run(int tgt, int steps, logic ben, payoff_mode_e md, output int cycles);
    pays.delete(); hits.delete(); paths_sum = 0;
    target = 32'(tgt); nsteps = 16'(steps); barrier_en = ben; mode = md;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done && cycles < 100000) begin @(negedge clk); cycles++; end
    @(negedge clk);
    checks++;
    if (!done || pays.size() != tgt || path_count != 32'(tgt)) begin
      failures++;
      $display("run: done %0b events %0d paths %0d, expected %0d", done, pays.size(), path_count, tgt);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c1, c2, c3, c4, steps, tgt;
    longint s [N], k [N], mu [N], mn, expected;
    int n_equal, n_distinct_pay, n_differ;
    wr = '0; start = 0; barrier_en = 0; nsteps = '0; target = '0; mode = PAYOFF_WORST_OF;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (5) @(negedge clk);
    set_matrix(1'b1);
    // ---- run 1: noise-free, matures, worst-of ----
    for (int a = 0; a < N; a++) begin
      s[a]  = q20(95.0 + 5.0 * a);
      k[a]  = q20(90.0);
      mu[a] = q20(0.002 * (a + 1));
      set_param(a, 0, s[a]);  set_param(a, 1, q20(0.04)); set_param(a, 2, mu[a]);
      set_param(a, 3, q20(0.01)); set_param(a, 4, q20(0.04)); set_param(a, 5, 0);
      set_param(a, 6, 0); set_param(a, 7, q20(-0.5)); set_param(a, 8, q20(0.866));
      set_param(a, 9, q20(50.0)); set_param(a, 10, k[a]);
    end
    steps = 20; tgt = 10;
    for (int i = 0; i < steps; i++)
      for (int a = 0; a < N; a++) s[a] = s[a] + ((s[a] * mu[a]) >>> 20);
    mn = s[0] - k[0];
    for (int a = 1; a < N; a++) if (s[a] - k[a] < mn) mn = s[a] - k[a];
    expected = mn < 0 ? 0 : mn;
    run(tgt, steps, 1'b1, PAYOFF_WORST_OF, c1);
    foreach (pays[i]) begin
      checks++;
      if (pays[i] != expected || hits[i]) begin
        failures++; $display("run 1: payoff %0d expected %0d", pays[i], expected);
      end
    end
    checks++;
    // 10 paths on 4 threads: 3 waves of (steps + 1) rounds of M cycles
    if (c1 > 3 * (steps + 2) * M || c1 < 3 * steps * M) begin
      failures++; $display("run 1 took %0d cycles", c1);
    end
    // ---- run 2: asset 2 knocked out at the first step ----
    set_param(2, 9, q20(200.0));
    run(tgt, steps, 1'b1, PAYOFF_WORST_OF, c2);
    foreach (pays[i]) begin
      checks++;
      if (pays[i] != 0 || !hits[i]) begin failures++; $display("run 2: payoff %0d hit %0b", pays[i], hits[i]); end
    end
    checks++;
    if (c2 * 4 > c1) begin failures++; $display("run 2 not terminated early: %0d vs %0d cycles", c2, c1); end
    $display("cycles: matured run %0d, knocked-out run %0d", c1, c2);
    // ---- run 3: common noise, vanilla ----
    set_matrix(1'b0);
    for (int a = 0; a < N; a++) begin
      set_param(a, 0, q20(100.0)); set_param(a, 2, q20(0.0002)); set_param(a, 3, q20(0.01));
      set_param(a, 4, q20(0.04)); set_param(a, 5, 0); set_param(a, 6, q20(0.063));
      set_param(a, 9, q20(10.0)); set_param(a, 10, q20(100.0));
    end
    run(12, 30, 1'b0, PAYOFF_VANILLA, c3);
    n_equal = 0; n_distinct_pay = 0;
    foreach (pays[i]) begin
      checks++;
      if (pays[i] % 4 != 0) begin failures++; $display("run 3: payoff %0d not 4 equal parts", pays[i]); end
      if (i > 0 && pays[i] != pays[i-1]) n_distinct_pay++;
    end
    checks++;
    if (paths_sum != 12 * N) begin failures++; $display("run 3: %0d paths", paths_sum); end
    checks++;
    if (n_distinct_pay == 0) begin failures++; $display("run 3: payoffs do not vary"); end
    // ---- run 4: independent noise ----
    set_matrix(1'b1);
    run(12, 30, 1'b0, PAYOFF_VANILLA, c4);
    n_differ = 0;
    foreach (pays[i]) if (pays[i] % 4 != 0) n_differ++;
    checks++;
    if (n_differ < 6) begin failures++; $display("run 4: only %0d payoffs look uncorrelated", n_differ); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
