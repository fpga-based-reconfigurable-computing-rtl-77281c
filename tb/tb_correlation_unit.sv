// tb_correlation_unit: loads a random 4x4 matrix over the control bus, streams
// random Gaussian-range samples in, steps rd_asset/load_vec the way the
// Heston core does, and checks every eps against sum_j A[i][j] * Z_j computed
// in 64-bit integer arithmetic on the vector captured at the last load.
// Also checks the one-cycle latency and that a write to another region
// leaves the matrix alone.
module tb_correlation_unit;
  import heston_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst = 1'b1;
  ctrl_wr_t wr;
  logic z_valid;
  fx_t  z_in, eps;
  logic load_vec;
  logic [1:0] rd_asset;
  int checks = 0, failures = 0;

  correlation_unit #(.N(N)) dut (.clk(clk), .rst(rst), .wr(wr), .z_valid(z_valid),
    .z_in(z_in), .load_vec(load_vec), .rd_asset(rd_asset), .eps(eps));

  always #5 clk = ~clk;

  longint a_ref [N][N];
  longint zb [N], zc [N];

  function automatic fx_t rnd_fx(int range_q20);
    return fx_t'(int'($urandom_range(2 * range_q20)) - range_q20);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expected, acc;
    logic   have_exp;
    wr = '0; z_valid = 1'b0; z_in = '0; load_vec = 1'b0; rd_asset = '0;
    for (int j = 0; j < N; j++) begin zb[j] = 0; zc[j] = 0; end
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        fx_t v;
        v = rnd_fx(1 << 20);
        a_ref[i][j] = longint'(v);
        wr = '{we: 1'b1, addr: {4'd2, 6'(i), 6'(j)}, data: v};
        @(negedge clk);
      end
    wr = '{we: 1'b1, addr: {4'd1, 6'd0, 6'd0}, data: 32'h7FFF_FFFF};
    @(negedge clk);
    wr = '0;
    have_exp = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      int nxt;
      // check the result of the previous cycle
      if (have_exp) begin
        checks++;
        if (longint'(eps) != expected) begin
          failures++;
          if (failures < 10) $display("cycle %0d: eps %0d expected %0d", c, eps, expected);
        end
      end
      nxt = c % N;
      z_valid  = 1'b1;
      z_in     = rnd_fx(4 << 20);
      rd_asset = 2'(nxt);
      load_vec = (nxt == 0);
      acc = 0;
      for (int j = 0; j < N; j++)
        acc += a_ref[nxt][j] * (load_vec ? zb[j] : zc[j]);
      expected = acc >>> 20;
      have_exp = 1'b1;
      @(posedge clk);
      if (load_vec) for (int j = 0; j < N; j++) zc[j] = zb[j];
      for (int j = N - 1; j > 0; j--) zb[j] = zb[j-1];
      zb[0] = longint'(z_in);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
