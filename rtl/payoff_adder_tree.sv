// payoff_adder_tree: combines the payoff events of all K Monte Carlo cores.
//
// In any cycle several cores may finish a thread. The tree adds the payoffs
// of those that did (in_valid) and the numbers of paths they stand for, and
// passes one (out_valid, out_sum, out_paths) record per cycle to the
// accumulator. The architecture draws this as a tree of two-input adders
// between the cores and the accumulator; here it is a binary tree over the
// K inputs, summed in one clock stage (latency 1 cycle).
module payoff_adder_tree
  import heston_pkg::*;
#(
  parameter int unsigned K      = 36,  // number of cores
  parameter int unsigned N      = 4,   // assets per thread
  parameter int unsigned SUM_W  = PAY_W + $clog2(K + 1),
  parameter int unsigned CNT_W  = $clog2(N + 1) + $clog2(K + 1)
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [K-1:0]             in_valid,
  input  pay_t                     in_value [K],
  input  logic [$clog2(N+1)-1:0]   in_paths [K],
  output logic                     out_valid,
  output logic [SUM_W-1:0]         out_sum,
  output logic [CNT_W-1:0]         out_paths
);
  // Leaves padded to a power of two; level l has 2^(L-l) nodes.
  localparam int unsigned L  = (K > 1) ? $clog2(K) : 1;
  localparam int unsigned NP = 1 << L;

  logic [SUM_W-1:0] vsum [2*NP];
  logic [CNT_W-1:0] psum [2*NP];

  // Heap numbering: node i has children 2i and 2i+1, leaves at NP..2NP-1.
  always_comb begin
    for (int i = 0; i < NP; i++) begin
      if (i < K && in_valid[i]) begin
        vsum[NP+i] = SUM_W'(in_value[i]);
        psum[NP+i] = CNT_W'(in_paths[i]);
      end else begin
        vsum[NP+i] = '0;
        psum[NP+i] = '0;
      end
    end
    vsum[0] = '0;
    psum[0] = '0;
    for (int i = NP - 1; i >= 1; i--) begin
      vsum[i] = vsum[2*i] + vsum[2*i+1];
      psum[i] = psum[2*i] + psum[2*i+1];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) out_valid <= 1'b0;
    else     out_valid <= |in_valid;
    out_sum   <= vsum[1];
    out_paths <= psum[1];
  end
endmodule
