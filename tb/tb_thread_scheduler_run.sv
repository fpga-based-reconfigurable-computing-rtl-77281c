// tb_thread_scheduler_run: one scheduler under test, at a given size, with
// its own reference model. The slot counter of the Heston core is imitated;
// termination events are sent for running threads in the cycle after their
// last asset issues, at random. A new thread must start at its asset-0
// slot, all its assets in one round. The model tracks the pending-initialisation
// bit of every slot, the thread table and the path counter; the scheduler's
// command for every issuing slot, its path counter and done are compared
// with it. Runs two jobs: one with more paths than threads and one with
// fewer. Reports checks, failures and how many early restarts and idle
// slots it saw.
module tb_thread_scheduler_run
  import heston_pkg::*;
#(
  parameter int unsigned M = 16,
  parameter int unsigned N = 4
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   restarts,
  output int   idles,
  output logic finished
);
  localparam int T = M / N;
  localparam int SW = $clog2(M);
  localparam int TW = (T > 1) ? $clog2(T) : 1;
  logic rst, start, term_valid, done;
  logic [31:0] target, path_count;
  logic [SW-1:0] issue_slot;
  logic [TW-1:0] issue_thread, term_thread;
  slot_cmd_e cmd;
  logic [M-1:0] init_pend;

  thread_scheduler #(.M(M), .N(N)) dut (
    .clk(clk), .rst(rst), .start(start), .target(target),
    .issue_slot(issue_slot), .issue_thread(issue_thread), .cmd(cmd),
    .term_valid(term_valid), .term_thread(term_thread),
    .path_count(path_count), .init_pend(init_pend), .done(done));

  logic pend [M];
  logic act [T];
  int   count;

  task automatic run_job(int tgt);
    int c, last_done_check;
    target = 32'(tgt);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int t = 0; t < T; t++) begin
      act[t] = (t < tgt);
      for (int j = 0; j < N; j++) pend[t*N + j] = (t < tgt);
    end
    count = (tgt < T) ? tgt : T;
    c = 0;
    while (1) begin
      int s, th, prev_th;
      logic all_run;
      slot_cmd_e e;
      s  = c % M;
      th = s / N;
      issue_slot   = SW'(s);
      issue_thread = TW'(th);
      // the thread whose last slot issued in the previous cycle may end now
      prev_th = ((s + M - 1) % M) / N;
      all_run = act[prev_th];
      for (int j = 0; j < N; j++) if (pend[prev_th*N + j]) all_run = 1'b0;
      term_valid  = (c >= M) && all_run && ($urandom_range(2) == 0);
      term_thread = TW'(prev_th);
      if (term_valid) begin
        if (count < tgt) begin
          for (int j = 0; j < N; j++) pend[prev_th*N + j] = 1'b1;
          count++;
          restarts++;
        end else begin
          act[prev_th] = 1'b0;
        end
      end
      if (pend[s])      e = (s % N == 0 || !pend[s-1]) ? SLOT_INIT : SLOT_IDLE;
      else if (act[th]) e = SLOT_RUN;
      else              e = SLOT_IDLE;
      if (e == SLOT_INIT) pend[s] = 1'b0;
      if (e == SLOT_IDLE) idles++;
      #1;
      checks++;
      if (cmd != e) begin
        failures++;
        if (failures < 10) $display("M=%0d: cycle %0d slot %0d cmd %0d expected %0d", M, c, s, cmd, e);
      end
      @(negedge clk);
      term_valid = 1'b0;
      checks++;
      if (path_count != 32'(count)) begin
        failures++;
        if (failures < 10) $display("M=%0d: path count %0d expected %0d", M, path_count, count);
      end
      begin
        logic any;
        any = 1'b0;
        for (int t = 0; t < T; t++) any |= act[t];
        if (count == tgt && !any) begin
          checks++;
          if (!done) begin failures++; $display("M=%0d: done missing", M); end
          break;
        end
        checks++;
        if (done) begin failures++; $display("M=%0d: early done", M); end
      end
      c++;
      if (c > 200 * M * (tgt + 1)) begin failures++; $display("M=%0d: job hangs", M); break; end
    end
  endtask

  initial begin
    checks = 0; failures = 0; restarts = 0; idles = 0; finished = 1'b0;
    rst = 1'b1; start = 1'b0; term_valid = 1'b0; term_thread = '0; target = '0;
    issue_slot = '0; issue_thread = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    run_job(3 * T + 5);
    repeat (3) @(negedge clk);
    run_job((T > 1) ? T - 1 : 1);
    finished = 1'b1;
  end
endmodule
