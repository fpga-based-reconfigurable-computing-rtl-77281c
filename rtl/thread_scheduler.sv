// thread_scheduler: run-time scheduler of the threads of one Monte Carlo core.
//
// A thread is one Monte Carlo path of an N-asset system; the core's M
// pipeline slots hold M/N threads. The scheduler keeps a table with one entry
// per thread (active or not) and an M-bit "initialize new thread" vector with
// one bit per slot, and the path counter: the number of threads launched.
//   * start launches the first min(M/N, target) threads.
//   * A termination event from the barrier monitor (barrier hit or maturity)
//     frees a thread. If fewer than target threads have been launched, a new
//     thread is started in the freed slots straight away (early termination:
//     the slots never wait for the slowest path) and the path counter
//     counts it; otherwise the thread goes idle.
//   * done rises once target threads have been launched and none is active,
//     i.e. all paths of this core have finished, and holds until next start.
// Per issue cycle it tells the Heston core what the issuing slot does
// (slot_cmd_e): SLOT_INIT when a launched thread's slots first issue, from
// its asset-0 slot on, so that all assets of a thread start in one round
// (a pending slot met before that issues a bubble),
// SLOT_RUN while the thread runs, SLOT_IDLE otherwise. A termination is
// applied in the cycle it arrives, so even with a single thread per core the
// freed slots all restart in the same round. The table layout and the
// handshake are this design's; the architecture gives the barrier-hit input,
// the M-bit new-thread output, the thread table, the path counter and done.
module thread_scheduler
  import heston_pkg::*;
#(
  parameter int unsigned M      = 16,
  parameter int unsigned N      = 4,
  parameter int unsigned PATH_W = 32
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      start,
  input  logic [PATH_W-1:0]         target,
  // slot issuing in the Heston core this cycle
  input  logic [$clog2(M)-1:0]      issue_slot,
  input  logic [((M/N > 1) ? $clog2(M/N) : 1)-1:0]  issue_thread,
  output slot_cmd_e                 cmd,
  // termination events from the barrier monitor
  input  logic                      term_valid,
  input  logic [((M/N > 1) ? $clog2(M/N) : 1)-1:0]  term_thread,
  // status
  output logic [PATH_W-1:0]         path_count,
  output logic [M-1:0]              init_pend,
  output logic                      done
);
  localparam int unsigned T = M / N;

  logic [T-1:0] active, active_n;
  logic [M-1:0] pend_n;
  logic         running;
  logic         relaunch;
  logic         first_ok;

  assign relaunch = term_valid && (path_count < target);

  always_comb begin
    active_n = active;
    pend_n   = init_pend;
    if (term_valid) begin
      if (relaunch) begin
        for (int j = 0; j < N; j++) pend_n[int'(term_thread) * N + j] = 1'b1;
      end else begin
        active_n[term_thread] = 1'b0;
      end
    end
    // A thread starts at its asset-0 slot, so all its assets begin in the
    // same round; a pending slot reached mid-thread waits as a bubble.
    first_ok = (int'(issue_slot) % N == 0) || !pend_n[issue_slot - 1'b1];
    if (pend_n[issue_slot])          cmd = first_ok ? SLOT_INIT : SLOT_IDLE;
    else if (active_n[issue_thread]) cmd = SLOT_RUN;
    else                             cmd = SLOT_IDLE;
    if (running && cmd == SLOT_INIT) pend_n[issue_slot] = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active     <= '0;
      init_pend  <= '0;
      path_count <= '0;
      running    <= 1'b0;
      done       <= 1'b0;
    end else if (start) begin
      for (int t = 0; t < T; t++) begin
        active[t] <= PATH_W'(t) < target;
        for (int j = 0; j < N; j++) init_pend[t*N + j] <= PATH_W'(t) < target;
      end
      path_count <= (target < PATH_W'(T)) ? target : PATH_W'(T);
      running    <= 1'b1;
      done       <= 1'b0;
    end else if (running) begin
      active    <= active_n;
      init_pend <= pend_n;
      if (relaunch) path_count <= path_count + 1'b1;
      if (path_count == target && active_n == '0) begin
        done    <= 1'b1;
        running <= 1'b0;
      end
    end
  end

  // A thread that terminates must be one that is running.
  assert property (@(posedge clk) disable iff (rst) term_valid |-> active[term_thread])
    else $error("thread_scheduler: termination of an idle thread");
endmodule
