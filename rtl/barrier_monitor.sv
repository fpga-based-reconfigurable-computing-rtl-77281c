// barrier_monitor: discrete-time barrier monitor and payoff calculator of
// one Monte Carlo core.
//
// It watches the stream of asset results leaving the Heston core. The assets
// of a thread arrive in consecutive cycles, asset 0 first (the asset index
// travelling with the data is the in-stream signal that maps results to
// threads). Over the N assets of one time step it forms
//   hit  = OR_i (S_i <= B_i)            (down-and-out barrier, only when
//                                        barrier_en: the monitor is gated)
//   wmin = min_i (S_i - K_i)            (worst-of-N performance)
//   vsum = sum_i max(S_i - K_i, 0)      (independent vanilla calls)
// and, at the last asset of the thread, ends the thread when the barrier was
// hit (early termination) or when the step count reached nsteps (maturity).
// The termination event carries the thread number, the payoff and how many
// Monte Carlo paths it stands for:
//   knocked out            payoff 0
//   PAYOFF_WORST_OF        payoff max(wmin, 0), 1 path    (worst-of-N call)
//   PAYOFF_VANILLA         payoff vsum,         N paths   (each asset its own
//                                                          path, the validation
//                                                          set-up)
// With equal strikes K_i = K the worst-of payoff is (min_i S_i(T) - K)^+.
// The per-asset strike and barrier, the payoff-mode switch and the ">="
// maturity test are this design's reading of the architecture.
//
// Timing: the event is registered, one cycle after the last asset's result.
module barrier_monitor
  import heston_pkg::*;
#(
  parameter int unsigned M      = 16,
  parameter int unsigned N      = 4,
  parameter int unsigned STEP_W = 16
) (
  input  logic                      clk,
  input  logic                      rst,
  // configuration
  input  logic                      barrier_en,
  input  payoff_mode_e              mode,
  input  logic [STEP_W-1:0]         nsteps,
  // result stream from the Heston core
  input  logic                      in_valid,
  input  logic [((M/N > 1) ? $clog2(M/N) : 1)-1:0]  in_thread,
  input  logic [$clog2(N)-1:0]      in_asset,
  input  fx_t                       in_s,
  input  logic [STEP_W-1:0]         in_step,
  input  fx_t                       in_barrier,
  input  fx_t                       in_strike,
  // thread termination event
  output logic                      term_valid,
  output logic [((M/N > 1) ? $clog2(M/N) : 1)-1:0]  term_thread,
  output logic                      term_hit,
  output pay_t                      term_payoff,
  output logic [$clog2(N+1)-1:0]    term_paths
);
  logic hit_acc;
  fx_t  min_acc;
  pay_t sum_acc;

  logic first, last;
  logic hit_c;
  fx_t  diff, min_c;
  pay_t sum_c;

  assign first = (in_asset == '0);
  assign last  = (in_asset == $clog2(N)'(N - 1));

  always_comb begin
    diff  = in_s - in_strike;
    hit_c = (barrier_en && (in_s <= in_barrier)) || (!first && hit_acc);
    min_c = (first || diff < min_acc) ? diff : min_acc;
    sum_c = (first ? '0 : sum_acc) + (diff[FX_W-1] ? '0 : PAY_W'(diff));
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      hit_acc <= hit_c;
      min_acc <= min_c;
      sum_acc <= sum_c;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      term_valid <= 1'b0;
    end else begin
      term_valid <= in_valid && last && (hit_c || in_step >= nsteps);
    end
    term_thread <= in_thread;
    term_hit    <= hit_c;
    if (hit_c)
      term_payoff <= '0;
    else if (mode == PAYOFF_WORST_OF)
      term_payoff <= min_c[FX_W-1] ? '0 : PAY_W'(min_c);
    else
      term_payoff <= sum_c;
    term_paths <= (mode == PAYOFF_WORST_OF) ? $clog2(N+1)'(1) : $clog2(N+1)'(N);
  end
endmodule
