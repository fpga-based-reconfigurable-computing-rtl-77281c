// param_table: the per-asset parameter table of one Monte Carlo core.
//
// One row per asset of a thread (N rows); the row holds the model and option
// parameters of that asset (heston_pkg::param_row_t). The source architecture
// keeps the table in distributed block RAM, loaded by the host and read by
// the core as it steps through the assets of a thread. Here each field is a
// small register array written one 32-bit field at a time from the control
// bus (region REG_PARAM, address [11:4] row, [3:0] field), and read
// asynchronously by asset index, so the row is available in the same cycle
// as the index.
module param_table
  import heston_pkg::*;
#(
  parameter int unsigned N = 4   // assets per thread
) (
  input  logic                  clk,
  input  ctrl_wr_t              wr,
  input  logic [$clog2(N)-1:0]  rd_asset,
  output param_row_t            rd_row
);
  fx_t mem [N*NUM_FIELDS];  // row r, field f at r*NUM_FIELDS + f

  logic [7:0] wr_row;
  logic [3:0] wr_field;
  assign wr_row   = wr.addr[11:4];
  assign wr_field = wr.addr[3:0];

  always_ff @(posedge clk) begin
    if (wr.we && wr.addr[15:12] == REG_PARAM && wr_row < 8'(N)
        && wr_field < 4'(NUM_FIELDS))
      mem[int'(wr_row) * NUM_FIELDS + int'(wr_field)] <= fx_t'(wr.data);
  end

  always_comb begin
    rd_row.s0       = mem[int'(rd_asset) * NUM_FIELDS + int'(F_S0)];
    rd_row.v0       = mem[int'(rd_asset) * NUM_FIELDS + int'(F_V0)];
    rd_row.mu_dt    = mem[int'(rd_asset) * NUM_FIELDS + int'(F_MU_DT)];
    rd_row.kappa_dt = mem[int'(rd_asset) * NUM_FIELDS + int'(F_KAPPA_DT)];
    rd_row.theta    = mem[int'(rd_asset) * NUM_FIELDS + int'(F_THETA)];
    rd_row.xi_sqdt  = mem[int'(rd_asset) * NUM_FIELDS + int'(F_XI_SQDT)];
    rd_row.sqdt     = mem[int'(rd_asset) * NUM_FIELDS + int'(F_SQDT)];
    rd_row.rho      = mem[int'(rd_asset) * NUM_FIELDS + int'(F_RHO)];
    rd_row.rho_c    = mem[int'(rd_asset) * NUM_FIELDS + int'(F_RHO_C)];
    rd_row.barrier  = mem[int'(rd_asset) * NUM_FIELDS + int'(F_BARRIER)];
    rd_row.strike   = mem[int'(rd_asset) * NUM_FIELDS + int'(F_STRIKE)];
  end
endmodule
