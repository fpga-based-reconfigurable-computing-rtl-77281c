// barrier_pricer_top: one FPGA of the multi-asset barrier option pricer.
//
// Prices a down-and-out worst-of-N barrier call (or, for validation, N
// independent vanilla calls) by Monte Carlo simulation of an N-asset Heston
// model. K Monte Carlo cores run in parallel; each time-multiplexes N assets
// per thread over an M-deep pipeline, so K*M/N paths are in flight at once
// (36*16/4 = 144 at the defaults). Each core has its own thread scheduler,
// which restarts a thread's slots with a new path as soon as the old path is
// knocked out or matures. Finished paths' payoffs are summed by an adder tree
// and accumulated; at the end of the run the sum is divided by the number of
// paths.
//
// Host interface (plain signals):
//   wr_en/wr_addr/wr_data  control bus writes, broadcast to all cores
//     region 0 ([15:12] = 0): [3:0] = 0 nsteps, 1 paths per core,
//                             2 mode: bit0 barrier enable, bit1 payoff mode
//                             (0 worst-of-N, 1 vanilla per asset)
//     region 1: parameter table, [11:4] asset, [3:0] field (heston_pkg)
//     region 2: correlation matrix, [11:6] row, [5:0] column
//   start      begins a run (clears the totals, launches all cores)
//   done       all cores finished; result_valid follows about 66 cycles
//              later with mean = sum / paths (fixed point, 20 fraction bits)
// Every core gets the same parameters and its own random streams; paths per
// core times K is the total number of paths, so a run is evenly partitioned
// over the cores. The register map and the single broadcast bus are this
// design's choices.
module barrier_pricer_top
  import heston_pkg::*;
#(
  parameter int unsigned K      = 36,  // Monte Carlo cores
  parameter int unsigned M      = 16,  // Heston pipeline depth (slots)
  parameter int unsigned N      = 4,   // assets per thread
  parameter int unsigned STEP_W = 16,
  parameter int unsigned PATH_W = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        wr_en,
  input  logic [15:0] wr_addr,
  input  logic [31:0] wr_data,
  input  logic        start,
  output logic        done,
  output logic        result_valid,
  output logic [63:0] mean,
  output logic [63:0] sum,
  output logic [39:0] paths
);
  localparam int unsigned SUM_W = PAY_W + $clog2(K + 1);
  localparam int unsigned CNT_W = $clog2(N + 1) + $clog2(K + 1);

  ctrl_wr_t wr;
  assign wr = '{we: wr_en, addr: wr_addr, data: wr_data};

  // ---------------- configuration registers ----------------
  logic [STEP_W-1:0] nsteps;
  logic [PATH_W-1:0] target;
  logic              barrier_en;
  payoff_mode_e      mode;

  always_ff @(posedge clk) begin
    if (rst) begin
      nsteps     <= '0;
      target     <= '0;
      barrier_en <= 1'b0;
      mode       <= PAYOFF_WORST_OF;
    end else if (wr_en && wr_addr[15:12] == REG_CFG) begin
      unique case (wr_addr[3:0])
        CFG_NSTEPS: nsteps <= STEP_W'(wr_data);
        CFG_PATHS:  target <= PATH_W'(wr_data);
        CFG_MODE: begin
          barrier_en <= wr_data[0];
          mode       <= payoff_mode_e'(wr_data[1]);
        end
        default: ;
      endcase
    end
  end

  // ---------------- Monte Carlo cores ----------------
  logic [K-1:0]             pay_valid, core_done, pay_hit;
  pay_t                     pay_value [K];
  logic [$clog2(N+1)-1:0]   pay_paths [K];
  logic [PATH_W-1:0]        path_count [K];

  for (genvar k = 0; k < K; k++) begin : g_core
    mc_core #(.M(M), .N(N), .STEP_W(STEP_W), .PATH_W(PATH_W), .CORE_ID(k)) u_core (
      .clk(clk), .rst(rst), .wr(wr), .start(start),
      .nsteps(nsteps), .target(target), .barrier_en(barrier_en), .mode(mode),
      .pay_valid(pay_valid[k]), .pay_value(pay_value[k]), .pay_paths(pay_paths[k]),
      .pay_hit(pay_hit[k]), .path_count(path_count[k]), .done(core_done[k])
    );
  end

  // ---------------- adder tree, accumulate & divide ----------------
  logic             tree_valid;
  logic [SUM_W-1:0] tree_sum;
  logic [CNT_W-1:0] tree_paths;

  payoff_adder_tree #(.K(K), .N(N), .SUM_W(SUM_W), .CNT_W(CNT_W)) u_tree (
    .clk(clk), .rst(rst), .in_valid(pay_valid), .in_value(pay_value),
    .in_paths(pay_paths),
    .out_valid(tree_valid), .out_sum(tree_sum), .out_paths(tree_paths)
  );

  // Run control: finish the division two cycles after every core is done,
  // once the last payoff has passed the adder tree into the accumulator.
  logic       running;
  logic [1:0] done_dly;
  logic       finish;

  always_ff @(posedge clk) begin
    if (rst) begin
      running  <= 1'b0;
      done_dly <= '0;
    end else begin
      if (start) running <= 1'b1;
      done_dly <= {done_dly[0], running && !start && (&core_done)};
      if (finish) running <= 1'b0;
    end
  end
  assign finish = done_dly[1] && running;
  assign done   = &core_done && !running && !start;

  logic busy;

  accumulate_divide #(.IN_W(SUM_W), .CNT_W(CNT_W), .ACC_W(64), .PCW(40)) u_acc (
    .clk(clk), .rst(rst), .clear(start),
    .in_valid(tree_valid), .in_sum(tree_sum), .in_paths(tree_paths),
    .finish(finish), .sum(sum), .paths(paths), .busy(busy),
    .result_valid(result_valid), .mean(mean)
  );
endmodule
