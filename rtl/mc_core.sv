// mc_core: one Monte Carlo core with its thread scheduler.
//
// Holds the parts of one core of the architecture: two Gaussian generators
// (asset noise and variance noise), the correlation unit with its copy of
// the correlation matrix, the parameter table, the pipelined Heston core,
// the barrier monitor / payoff calculator and the core's thread scheduler.
// The core simulates M/N threads at a time (N assets each, time-multiplexed
// over M pipeline slots) and keeps launching threads until target paths have
// been started, then raises done when the last one ends.
//
// Data flow per cycle: the scheduler picks the command for the issuing slot;
// the parameter table is read by the issuing asset; the correlation unit has
// formed that asset's correlated sample eps_s in the previous cycle from the
// first generator's stream; the second generator supplies z_v; the Heston
// core issues the slot and shows the result of the slot's previous step,
// which the barrier monitor folds into its per-thread decision. Termination
// events go to the scheduler and, as payoffs, out of the core.
// Interface: the control bus (wr) loads the core's parameter table and
// correlation matrix; start begins a run with the given nsteps, target,
// barrier_en and mode, which must stay stable during the run.
// pay_valid/pay_value/pay_paths is one finished thread (registered).
// The seeds of the generators are derived from CORE_ID so that cores draw
// different random streams; that derivation is this design's choice.
module mc_core
  import heston_pkg::*;
#(
  parameter int unsigned M       = 16,
  parameter int unsigned N       = 4,
  parameter int unsigned STEP_W  = 16,
  parameter int unsigned PATH_W  = 32,
  parameter int unsigned CORE_ID = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  ctrl_wr_t                wr,
  input  logic                    start,
  input  logic [STEP_W-1:0]       nsteps,
  input  logic [PATH_W-1:0]       target,
  input  logic                    barrier_en,
  input  payoff_mode_e            mode,
  output logic                    pay_valid,
  output pay_t                    pay_value,
  output logic [$clog2(N+1)-1:0]  pay_paths,
  output logic                    pay_hit,
  output logic [PATH_W-1:0]       path_count,
  output logic                    done
);
  localparam logic [31:0] SALT = 32'(CORE_ID) * 32'h9E37_79B9;

  logic [$clog2(M)-1:0]     issue_slot;
  logic [((M/N > 1) ? $clog2(M/N) : 1)-1:0] issue_thread;
  logic [$clog2(N)-1:0]     issue_asset, next_asset;
  logic                     next_load_vec;
  slot_cmd_e                cmd;
  param_row_t               row;
  fx_t                      z1, z2, eps_s;
  logic                     z1_valid, z2_valid;
  logic                     out_valid;
  fx_t                      out_s, out_v;
  logic [STEP_W-1:0]        out_step;
  logic [((M/N > 1) ? $clog2(M/N) : 1)-1:0] term_thread;
  logic [M-1:0]             init_pend;

  grng #(
    .SEED1((32'h1234_5678 ^ SALT) | 32'h100),
    .SEED2((32'h9ABC_DEF0 + SALT) | 32'h100),
    .SEED3((32'h0F1E_2D3C ^ {SALT[15:0], SALT[31:16]}) | 32'h100)
  ) u_grng_s (.clk(clk), .rst(rst), .valid(z1_valid), .z(z1));

  grng #(
    .SEED1((32'h2468_ACE0 ^ SALT) | 32'h100),
    .SEED2((32'h1357_9BDF + SALT) | 32'h100),
    .SEED3((32'hC0FF_EE11 ^ {SALT[15:0], SALT[31:16]}) | 32'h100)
  ) u_grng_v (.clk(clk), .rst(rst), .valid(z2_valid), .z(z2));

  correlation_unit #(.N(N)) u_corr (
    .clk(clk), .rst(rst), .wr(wr),
    .z_valid(z1_valid), .z_in(z1),
    .load_vec(next_load_vec), .rd_asset(next_asset),
    .eps(eps_s)
  );

  param_table #(.N(N)) u_params (
    .clk(clk), .wr(wr), .rd_asset(issue_asset), .rd_row(row)
  );

  heston_core #(.M(M), .N(N), .STEP_W(STEP_W)) u_heston (
    .clk(clk), .rst(rst),
    .issue_slot(issue_slot), .issue_thread(issue_thread), .issue_asset(issue_asset),
    .next_asset(next_asset), .next_load_vec(next_load_vec),
    .cmd(cmd), .row(row), .eps_s(eps_s), .z_v(z2_valid ? z2 : '0),
    .out_valid(out_valid), .out_s(out_s), .out_v(out_v), .out_step(out_step)
  );

  barrier_monitor #(.M(M), .N(N), .STEP_W(STEP_W)) u_monitor (
    .clk(clk), .rst(rst),
    .barrier_en(barrier_en), .mode(mode), .nsteps(nsteps),
    .in_valid(out_valid), .in_thread(issue_thread), .in_asset(issue_asset),
    .in_s(out_s), .in_step(out_step),
    .in_barrier(row.barrier), .in_strike(row.strike),
    .term_valid(pay_valid), .term_thread(term_thread), .term_hit(pay_hit),
    .term_payoff(pay_value), .term_paths(pay_paths)
  );

  thread_scheduler #(.M(M), .N(N), .PATH_W(PATH_W)) u_sched (
    .clk(clk), .rst(rst), .start(start), .target(target),
    .issue_slot(issue_slot), .issue_thread(issue_thread), .cmd(cmd),
    .term_valid(pay_valid), .term_thread(term_thread),
    .path_count(path_count), .init_pend(init_pend), .done(done)
  );
endmodule
