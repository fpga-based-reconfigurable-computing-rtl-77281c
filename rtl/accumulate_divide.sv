// accumulate_divide: the final accumulator and divider of the FPGA.
//
// Adds up the payoff sums and path counts coming from the adder tree over a
// whole run and, when told the run has finished, divides the payoff sum by
// the number of paths to give the Monte Carlo estimate of the (undiscounted)
// option value, mean = sum / paths. Discounting is left to the host, which
// also combines the results of several FPGAs (it can use sum and paths for
// that). The divider is a restoring divider producing one quotient bit per
// cycle (ACC_W cycles); the architecture names this block "accumulate &
// divide" without giving its structure.
// Interface: clear resets the totals (at the start of a run). in_valid adds
// in_sum/in_paths. finish (a pulse after the last input) starts the
// division; result_valid rises ACC_W + 1 cycles later with mean and stays
// high until the next clear. Values are fixed point with heston_pkg::FX_FRAC
// fraction bits; with zero paths the mean is 0.
module accumulate_divide
  import heston_pkg::*;
#(
  parameter int unsigned IN_W  = 46,
  parameter int unsigned CNT_W = 9,
  parameter int unsigned ACC_W = 64,
  parameter int unsigned PCW   = 40
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic              in_valid,
  input  logic [IN_W-1:0]   in_sum,
  input  logic [CNT_W-1:0]  in_paths,
  input  logic              finish,
  output logic [ACC_W-1:0]  sum,
  output logic [PCW-1:0]    paths,
  output logic              busy,
  output logic              result_valid,
  output logic [ACC_W-1:0]  mean
);
  logic [ACC_W-1:0]        dividend;
  logic [PCW:0]            rem;
  logic [$clog2(ACC_W):0]  bit_cnt;
  logic [PCW:0]            rem_sh, rem_sub;

  always_comb begin
    rem_sh  = {rem[PCW-1:0], dividend[ACC_W-1]};
    rem_sub = rem_sh - {1'b0, paths};
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      sum          <= '0;
      paths        <= '0;
      busy         <= 1'b0;
      result_valid <= 1'b0;
      mean         <= '0;
      rem          <= '0;
      dividend     <= '0;
      bit_cnt      <= '0;
    end else if (busy) begin
      // one restoring step: shift in the next dividend bit, try to subtract
      dividend <= dividend << 1;
      if (!rem_sub[PCW]) begin
        rem  <= rem_sub;
        mean <= {mean[ACC_W-2:0], 1'b1};
      end else begin
        rem  <= rem_sh;
        mean <= {mean[ACC_W-2:0], 1'b0};
      end
      bit_cnt <= bit_cnt - 1'b1;
      if (bit_cnt == 1) begin
        busy         <= 1'b0;
        result_valid <= 1'b1;
      end
    end else begin
      if (in_valid) begin
        sum   <= sum + ACC_W'(in_sum);
        paths <= paths + PCW'(in_paths);
      end
      if (finish && !result_valid) begin
        if (paths == '0) begin
          mean         <= '0;
          result_valid <= 1'b1;
        end else begin
          dividend <= sum;
          rem      <= '0;
          mean     <= '0;
          bit_cnt  <= ($clog2(ACC_W)+1)'(ACC_W);
          busy     <= 1'b1;
        end
      end
    end
  end
endmodule
