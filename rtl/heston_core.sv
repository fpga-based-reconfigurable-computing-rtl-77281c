// heston_core: pipelined, time-multiplexed Heston model core.
//
// Each pass through the pipeline advances one asset of one thread (one Monte
// Carlo path of an N-asset system) by one time step of the full-truncation
// Euler scheme:
//   v+    = max(v, 0)
//   eps_v = rho * eps_s + sqrt(1 - rho^2) * z_v
//   S'    = S + S * (mu*dt + sqrt(v+) * sqrt(dt) * eps_s)
//   v'    = v + kappa*dt * (theta - v+) + xi*sqrt(dt) * sqrt(v+) * eps_v
// where eps_s is the asset's correlated Gaussian sample and z_v an
// independent one. The data flow (the S(0)/S(t-1) and v(0)/v(t-1) input
// multiplexers, theta - v, the square root, the products with dW1, dW2,
// kappa*dt, xi and mu*dt, and the two feedback adders) follows the source
// architecture's Heston core diagram; the multiplicative form of the asset
// step follows that diagram and the model's SDE.
//
// Time multiplexing: the pipeline has M register stages and M slots; slot s
// holds asset s mod N of thread s div N, so M/N threads share the core.
// A slot issues every M cycles and its result leaves the last stage exactly
// when the slot issues again, so the result feeds straight back into the
// input multiplexer (the S(t), v(t) queues of the architecture). Stages 1-4
// compute; stages 5..M only delay (M >= 4, N divides M).
//
// Per issue cycle the scheduler gives a command for the slot: SLOT_INIT loads
// S(0), v(0) and step 0 from the parameter row, SLOT_RUN feeds back the
// result that is leaving, SLOT_IDLE issues a bubble. The result leaving in
// that cycle is shown on out_* with out_valid only under SLOT_RUN.
// next_asset/next_load_vec tell the correlation unit, one cycle ahead, which
// asset issues next and whether it starts a thread slot; eps_s must arrive in
// the issue cycle, as must z_v and the parameter row of issue_asset.
module heston_core
  import heston_pkg::*;
#(
  parameter int unsigned M      = 16,  // pipeline depth = slots per core
  parameter int unsigned N      = 4,   // assets per thread
  parameter int unsigned STEP_W = 16   // width of the time-step counter
) (
  input  logic                       clk,
  input  logic                       rst,
  // slot bookkeeping
  output logic [$clog2(M)-1:0]       issue_slot,
  output logic [((M/N > 1) ? $clog2(M/N) : 1)-1:0]   issue_thread,
  output logic [$clog2(N)-1:0]       issue_asset,
  output logic [$clog2(N)-1:0]       next_asset,
  output logic                       next_load_vec,
  input  slot_cmd_e                  cmd,
  // per-issue inputs
  input  param_row_t                 row,
  input  fx_t                        eps_s,
  input  fx_t                        z_v,
  // result of the slot leaving the pipeline this cycle
  output logic                       out_valid,
  output fx_t                        out_s,
  output fx_t                        out_v,
  output logic [STEP_W-1:0]          out_step
);
  localparam int unsigned T = M / N;

  typedef struct packed {
    logic              valid;
    logic [STEP_W-1:0] step;
    fx_t               s;
    fx_t               v;
  } state_t;

  // ---------------- slot counters ----------------
  logic [$clog2(M)-1:0]     slot;
  logic [$clog2(N)-1:0]     asset;
  logic [((T > 1) ? $clog2(T) : 1)-1:0] thread;

  always_ff @(posedge clk) begin
    if (rst) begin
      slot   <= '0;
      asset  <= '0;
      thread <= '0;
    end else begin
      slot <= (slot == $clog2(M)'(M - 1)) ? '0 : slot + 1'b1;
      if (asset == $clog2(N)'(N - 1)) begin
        asset  <= '0;
        thread <= (thread == $bits(thread)'(T - 1)) ? '0 : thread + 1'b1;
      end else begin
        asset <= asset + 1'b1;
      end
    end
  end

  assign issue_slot    = slot;
  assign issue_thread  = thread;
  assign issue_asset   = asset;
  assign next_asset    = (asset == $clog2(N)'(N - 1)) ? '0 : asset + 1'b1;
  assign next_load_vec = (asset == $clog2(N)'(N - 1));

  // ---------------- input multiplexer ----------------
  state_t exit_st, in_st;

  always_comb begin
    unique case (cmd)
      SLOT_INIT: in_st = '{valid: 1'b1, step: '0, s: row.s0, v: row.v0};
      SLOT_RUN:  in_st = exit_st;
      default:   in_st = '{valid: 1'b0, step: '0, s: '0, v: '0};
    endcase
  end

  // ---------------- stage 1: truncation ----------------
  state_t st1;
  fx_t    vp1, eps1, zv1;
  fx_t    mu1, kdt1, th1, xi1, sq1, rho1, rc1;

  always_ff @(posedge clk) begin
    if (rst) st1.valid <= 1'b0;
    else     st1.valid <= in_st.valid;
    st1.step <= in_st.step;
    st1.s    <= in_st.s;
    st1.v    <= in_st.v;
    vp1  <= fx_max0(in_st.v);
    eps1 <= eps_s;
    zv1  <= z_v;
    mu1  <= row.mu_dt;
    kdt1 <= row.kappa_dt;
    th1  <= row.theta;
    xi1  <= row.xi_sqdt;
    sq1  <= row.sqdt;
    rho1 <= row.rho;
    rc1  <= row.rho_c;
  end

  // ---------------- stage 2: sqrt, noise terms, mean reversion ----------------
  state_t st2;
  fx_t    sqv2, epsv2, dw1_2, kterm2, mu2, xi2;

  always_ff @(posedge clk) begin
    if (rst) st2.valid <= 1'b0;
    else     st2.valid <= st1.valid;
    st2.step <= st1.step;
    st2.s    <= st1.s;
    st2.v    <= st1.v;
    sqv2   <= fx_sqrt(vp1);
    epsv2  <= fx_mul(rho1, eps1) + fx_mul(rc1, zv1);
    dw1_2  <= fx_mul(sq1, eps1);
    kterm2 <= fx_mul(kdt1, th1 - vp1);
    mu2    <= mu1;
    xi2    <= xi1;
  end

  // ---------------- stage 3: relative asset move, variance move ----------------
  state_t st3;
  fx_t    drift3, dv3;

  always_ff @(posedge clk) begin
    if (rst) st3.valid <= 1'b0;
    else     st3.valid <= st2.valid;
    st3.step <= st2.step;
    st3.s    <= st2.s;
    st3.v    <= st2.v;
    drift3 <= mu2 + fx_mul(sqv2, dw1_2);
    dv3    <= kterm2 + fx_mul(fx_mul(xi2, sqv2), epsv2);
  end

  // ---------------- stage 4: state update ----------------
  state_t st4;

  always_ff @(posedge clk) begin
    if (rst) st4.valid <= 1'b0;
    else     st4.valid <= st3.valid;
    st4.step <= st3.step + 1'b1;
    st4.s    <= st3.s + fx_mul(st3.s, drift3);
    st4.v    <= st3.v + dv3;
  end

  // ---------------- stages 5..M: delay to the slot period ----------------
  if (M > 4) begin : g_delay
    state_t dly [M-4];
    always_ff @(posedge clk) begin
      if (rst) begin
        for (int i = 0; i < M - 4; i++) dly[i].valid <= 1'b0;
      end else begin
        dly[0].valid <= st4.valid;
        for (int i = 1; i < M - 4; i++) dly[i].valid <= dly[i-1].valid;
      end
      dly[0].step <= st4.step;
      dly[0].s    <= st4.s;
      dly[0].v    <= st4.v;
      for (int i = 1; i < M - 4; i++) begin
        dly[i].step <= dly[i-1].step;
        dly[i].s    <= dly[i-1].s;
        dly[i].v    <= dly[i-1].v;
      end
    end
    assign exit_st = dly[M-5];
  end else begin : g_nodelay
    assign exit_st = st4;
  end

  assign out_valid = exit_st.valid && (cmd == SLOT_RUN);
  assign out_s     = exit_st.s;
  assign out_v     = exit_st.v;
  assign out_step  = exit_st.step;

  initial begin
    assert (M >= 4 && N >= 2 && M % N == 0)
      else $error("heston_core: need M >= 4, N >= 2 and N dividing M");
  end
endmodule
