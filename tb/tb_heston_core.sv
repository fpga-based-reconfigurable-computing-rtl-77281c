// tb_heston_core: drives the Heston core at its default size (M = 16 slots,
// N = 4 assets, 4 threads) through 60 rounds. Threads 0-2 start with
// SLOT_INIT and then run; thread 3 stays idle for 10 rounds and then starts.
// Every issue gets random noise (eps_s, z_v). The testbench keeps its own
// fixed-point model of each slot's state (S, v, step) using 64-bit integer
// arithmetic and an exact integer square root, and checks every result that
// leaves the pipeline bit for bit, which also checks that a slot's result
// appears exactly M cycles after its issue. Idle slots must show no result.
module tb_heston_core;
  import heston_pkg::*;
  localparam int M = 16, N = 4, T = M / N;
  logic clk = 1'b0, rst = 1'b1;
  logic [3:0] issue_slot;
  logic [1:0] issue_thread, issue_asset, next_asset;
  logic next_load_vec;
  slot_cmd_e cmd;
  param_row_t row;
  fx_t eps_s, z_v;
  logic out_valid;
  fx_t out_s, out_v;
  logic [15:0] out_step;
  int checks = 0, failures = 0;

  heston_core #(.M(M), .N(N)) dut (
    .clk(clk), .rst(rst), .issue_slot(issue_slot), .issue_thread(issue_thread),
    .issue_asset(issue_asset), .next_asset(next_asset), .next_load_vec(next_load_vec),
    .cmd(cmd), .row(row), .eps_s(eps_s), .z_v(z_v),
    .out_valid(out_valid), .out_s(out_s), .out_v(out_v), .out_step(out_step));

  always #5 clk = ~clk;

  function automatic longint q20(real x);
    return longint'($floor(x * 1048576.0));
  endfunction
  function automatic longint mul(longint a, longint b);
    return (a * b) >>> 20;
  endfunction
  function automatic longint isqrt_q20(longint v);   // floor(sqrt(v * 2^20))
    longint x, r;
    x = v <<< 20;
    r = longint'($floor($sqrt(real'(x))));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  param_row_t rows [N];
  longint ms [M], mv [M], mstep [M];
  logic   mvalid [M];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idle_seen;
    idle_seen = 0;
    for (int a = 0; a < N; a++) begin
      rows[a].s0       = fx_t'(q20(90.0 + 10.0 * a));
      rows[a].v0       = fx_t'(q20(0.02 + 0.01 * a));
      rows[a].mu_dt    = fx_t'(q20(0.05 / 252.0));
      rows[a].kappa_dt = fx_t'(q20((1.0 + a) / 252.0));
      rows[a].theta    = fx_t'(q20(0.04));
      rows[a].xi_sqdt  = fx_t'(q20((0.3 + 0.4 * a) * $sqrt(1.0 / 252.0)));
      rows[a].sqdt     = fx_t'(q20($sqrt(1.0 / 252.0)));
      rows[a].rho      = fx_t'(q20(-0.3 * a));
      rows[a].rho_c    = fx_t'(q20($sqrt(1.0 - 0.09 * a * a)));
      rows[a].barrier  = fx_t'(q20(50.0));
      rows[a].strike   = fx_t'(q20(100.0));
    end
    for (int s = 0; s < M; s++) mvalid[s] = 1'b0;
    cmd = SLOT_IDLE; row = rows[0]; eps_s = '0; z_v = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 60 * M; c++) begin
      int s, th, as, rnd;
      longint vp, sq, ev, dw1, kt, drift, dv, e, zz;
      s  = c % M; th = s / N; as = s % N; rnd = c / M;
      // slot bookkeeping seen from outside
      checks++;
      if (issue_slot != 4'(s) || issue_thread != 2'(th) || issue_asset != 2'(as)
          || next_asset != 2'((as + 1) % N) || next_load_vec != (as == N - 1)) begin
        failures++;
        $display("cycle %0d: slot bookkeeping wrong", c);
      end
      row = rows[as];
      e   = longint'($urandom_range(6 << 20)) - (3 << 20);
      zz  = longint'($urandom_range(6 << 20)) - (3 << 20);
      eps_s = fx_t'(e);
      z_v   = fx_t'(zz);
      if (th == 3 && rnd < 10)       cmd = SLOT_IDLE;
      else if (rnd == 0 || (th == 3 && rnd == 10)) cmd = SLOT_INIT;
      else                           cmd = SLOT_RUN;
      #1;
      // result leaving now
      if (cmd == SLOT_RUN) begin
        checks++;
        if (!out_valid || longint'(out_s) != ms[s] || longint'(out_v) != mv[s]
            || longint'(out_step) != mstep[s]) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d slot %0d: got S=%0d v=%0d step=%0d valid=%0b, expected S=%0d v=%0d step=%0d",
                     c, s, out_s, out_v, out_step, out_valid, ms[s], mv[s], mstep[s]);
        end
      end else begin
        checks++;
        if (out_valid) begin failures++; $display("cycle %0d: result shown for a non-running slot", c); end
        if (cmd == SLOT_IDLE) idle_seen++;
      end
      // model of this issue
      if (cmd == SLOT_INIT) begin
        ms[s] = longint'(rows[as].s0); mv[s] = longint'(rows[as].v0); mstep[s] = 0;
      end
      if (cmd != SLOT_IDLE) begin
        vp    = mv[s] < 0 ? 0 : mv[s];
        sq    = isqrt_q20(vp);
        ev    = mul(longint'(rows[as].rho), e) + mul(longint'(rows[as].rho_c), zz);
        dw1   = mul(longint'(rows[as].sqdt), e);
        kt    = mul(longint'(rows[as].kappa_dt), longint'(rows[as].theta) - vp);
        drift = longint'(rows[as].mu_dt) + mul(sq, dw1);
        dv    = kt + mul(mul(longint'(rows[as].xi_sqdt), sq), ev);
        ms[s] = ms[s] + mul(ms[s], drift);
        mv[s] = mv[s] + dv;
        mstep[s] = mstep[s] + 1;
      end
      @(negedge clk);
    end
    checks++;
    if (idle_seen != 10 * N) begin failures++; $display("idle slots %0d", idle_seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
