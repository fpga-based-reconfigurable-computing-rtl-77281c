// tb_barrier_monitor: feeds the monitor 3000 thread steps (4 assets each,
// random spot values around the barrier and strike, random step counts around
// maturity, random gaps, random payoff mode and barrier gating) and checks
// every termination event (or its absence) in the cycle after each thread's
// last asset against a model of the down-and-out, worst-of-N and vanilla
// payoffs. Counts how often each case (knock-out, maturity, gated barrier,
// both modes) occurred and fails if one never did.
module tb_barrier_monitor;
  import heston_pkg::*;
  localparam int M = 16, N = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic barrier_en;
  payoff_mode_e mode;
  logic [15:0] nsteps;
  logic in_valid;
  logic [1:0] in_thread, in_asset;
  fx_t in_s, in_barrier, in_strike;
  logic [15:0] in_step;
  logic term_valid, term_hit;
  logic [1:0] term_thread;
  pay_t term_payoff;
  logic [2:0] term_paths;
  int checks = 0, failures = 0;
  int n_hit = 0, n_mature = 0, n_gated = 0, n_worst = 0, n_vanilla = 0;

  barrier_monitor #(.M(M), .N(N)) dut (
    .clk(clk), .rst(rst), .barrier_en(barrier_en), .mode(mode), .nsteps(nsteps),
    .in_valid(in_valid), .in_thread(in_thread), .in_asset(in_asset), .in_s(in_s),
    .in_step(in_step), .in_barrier(in_barrier), .in_strike(in_strike),
    .term_valid(term_valid), .term_thread(term_thread), .term_hit(term_hit),
    .term_payoff(term_payoff), .term_paths(term_paths));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_thread = 0; in_asset = 0; in_s = '0; in_step = '0;
    in_barrier = '0; in_strike = '0; barrier_en = 0; mode = PAYOFF_WORST_OF; nsteps = 16'd20;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      longint s [N], b [N], k [N];
      longint mn, sm, pay;
      logic   hit, any_below, term;
      int     step, th;
      barrier_en = ($urandom_range(3) != 0);
      mode       = payoff_mode_e'($urandom_range(1));
      step       = 16 + $urandom_range(8);
      th         = $urandom_range(3);
      hit = 0; any_below = 0; mn = 0; sm = 0;
      for (int a = 0; a < N; a++) begin
        b[a] = longint'(60 + $urandom_range(10)) << 20;
        k[a] = longint'(95 + $urandom_range(10)) << 20;
        if ($urandom_range(9) == 0) s[a] = b[a] - longint'($urandom_range(2 << 20));
        else                        s[a] = b[a] + longint'($urandom_range(60 << 20)) + 1;
        if (s[a] <= b[a]) any_below = 1;
        if (a == 0 || s[a] - k[a] < mn) mn = s[a] - k[a];
        if (s[a] > k[a]) sm += s[a] - k[a];
      end
      hit  = barrier_en && any_below;
      term = hit || (step >= nsteps);
      pay  = hit ? 0 : (mode == PAYOFF_WORST_OF ? (mn < 0 ? 0 : mn) : sm);
      for (int a = 0; a < N; a++) begin
        in_valid = 1; in_thread = 2'(th); in_asset = 2'(a); in_s = fx_t'(s[a]);
        in_step = 16'(step); in_barrier = fx_t'(b[a]); in_strike = fx_t'(k[a]);
        @(negedge clk);
        if (a < N - 1) begin
          checks++;
          if (term_valid) begin failures++; $display("event before last asset"); end
        end
      end
      in_valid = 0;
      if ($urandom_range(1)) in_asset = 2'($urandom_range(3));
      checks++;
      if (term_valid != term) begin
        failures++;
        if (failures < 10) $display("thread %0d: term_valid %0b expected %0b", t, term_valid, term);
      end else if (term) begin
        checks++;
        if (term_thread != 2'(th) || term_hit != hit || longint'(term_payoff) != pay
            || term_paths != (mode == PAYOFF_WORST_OF ? 3'd1 : 3'(N))) begin
          failures++;
          if (failures < 10) $display("thread %0d: payoff %0d expected %0d hit %0b/%0b", t,
                                      term_payoff, pay, term_hit, hit);
        end
      end
      if (hit) n_hit++;
      if (!hit && term) n_mature++;
      if (!barrier_en && any_below) n_gated++;
      if (term && !hit && mode == PAYOFF_WORST_OF) n_worst++;
      if (term && !hit && mode == PAYOFF_VANILLA) n_vanilla++;
      repeat ($urandom_range(2)) @(negedge clk);
    end
    $display("knock-outs %0d, maturities %0d, gated breaches %0d, worst-of %0d, vanilla %0d",
             n_hit, n_mature, n_gated, n_worst, n_vanilla);
    checks++; if (n_hit == 0) failures++;
    checks++; if (n_mature == 0) failures++;
    checks++; if (n_gated == 0) failures++;
    checks++; if (n_worst == 0) failures++;
    checks++; if (n_vanilla == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
