// correlation_unit: correlates the Gaussian noise of the assets of a thread.
//
// Computes eps_i = sum_j A[i][j] * Z_j, the i-th element of the product of
// the correlation matrix A (the Cholesky factor of the asset covariance,
// loaded by the host) with a vector Z of N independent Gaussian samples.
// The source architecture feeds the matrix product into the Heston core; it
// does not say how the vector is buffered. Here:
//   * Z samples arrive one per cycle (z_valid/z_in) into an N-deep shift
//     buffer; at the start of every thread slot (load_vec) the buffer is
//     taken as the vector for that thread's time step, so each thread step
//     uses N fresh samples and all assets of that step share one vector.
//   * One row is evaluated per cycle with N parallel multipliers and an
//     adder (the O(assets) multipliers per core behind the core/asset
//     trade-off), since the Heston core takes one asset per cycle.
// Interface: present rd_asset (and load_vec when rd_asset is asset 0 of a
// thread) one cycle before the asset issues; eps is registered and valid in
// the next cycle. Matrix writes: control bus region REG_CORR, address
// [11:6] row, [5:0] column, data heston_pkg::fx_t.
module correlation_unit
  import heston_pkg::*;
#(
  parameter int unsigned N = 4   // assets per thread
) (
  input  logic                 clk,
  input  logic                 rst,
  input  ctrl_wr_t             wr,
  input  logic                 z_valid,
  input  fx_t                  z_in,
  input  logic                 load_vec,
  input  logic [$clog2(N)-1:0] rd_asset,
  output fx_t                  eps
);
  fx_t a_mat [N][N];
  fx_t zbuf  [N];
  fx_t zcur  [N];
  fx_t zsel  [N];

  logic [5:0] wr_row, wr_col;
  assign wr_row = wr.addr[11:6];
  assign wr_col = wr.addr[5:0];

  always_ff @(posedge clk) begin
    if (wr.we && wr.addr[15:12] == REG_CORR && wr_row < 6'(N) && wr_col < 6'(N))
      a_mat[wr_row[$clog2(N)-1:0]][wr_col[$clog2(N)-1:0]] <= fx_t'(wr.data);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int j = 0; j < N; j++) begin
        zbuf[j] <= '0;
        zcur[j] <= '0;
      end
    end else begin
      if (z_valid) begin
        zbuf[0] <= z_in;
        for (int j = 1; j < N; j++) zbuf[j] <= zbuf[j-1];
      end
      if (load_vec) zcur <= zbuf;
    end
  end

  always_comb begin
    for (int j = 0; j < N; j++) zsel[j] = load_vec ? zbuf[j] : zcur[j];
  end

  // Row dot product: full-precision products, one rounding at the end.
  logic signed [2*FX_W+7:0] acc;
  logic signed [2*FX_W-1:0] prod;
  always_comb begin
    acc = '0;
    for (int j = 0; j < N; j++) begin
      prod = a_mat[rd_asset][j] * zsel[j];
      acc += (2*FX_W+8)'(prod);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) eps <= '0;
    else     eps <= fx_t'(acc >>> FX_FRAC);
  end

  initial begin
    assert (N >= 2 && N <= 64) else $error("correlation_unit: N out of range");
  end
endmodule
