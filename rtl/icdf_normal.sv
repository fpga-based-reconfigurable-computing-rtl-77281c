// icdf_normal: inverse cumulative distribution function of the standard
// normal distribution, turning a uniform 32-bit word into a Gaussian sample.
//
// The design follows the inversion method with piecewise polynomial
// approximation on a hierarchical segmentation (the method named by the
// source architecture; the segment layout and polynomial degree here are
// this design's choices):
//   * u[31] is a sign bit; the other 31 bits give p = (u[30:0] + 0.5) / 2^32
//     in (0, 0.5), and z = Phi^-1(p)
//     for u[31] = 0 and z = -Phi^-1(p) for u[31] = 1.
//   * Level 1 of the segmentation is the octave of p: k = leading zeros of
//     u[30:0] (0..30, p in [2^-(k+2), 2^-(k+1))), which gives fine segments
//     in the tail where Phi^-1 bends sharply.
//   * Level 2 splits each octave into 8 equal parts by the 3 bits after the
//     leading one; the remaining 27 bits are the position t in [0, 1).
//   * Each of the 31 x 8 segments holds a quadratic z = c0 + t*(c1 + t*c2),
//     a least-squares fit of Phi^-1 over the segment, read from a 248-word
//     ROM (rtl/icdf_normal_coef.hex, one {c2, c1, c0} row of three 32-bit
//     two's-complement words with 20 fractional bits per segment,
//     row index 8*k + part).
// An all-zero u[30:0] is evaluated in the last segment at t = 0.
// Maximum error is below 1e-4 over the whole range, |z| <= 6.3.
//
// Timing: fully pipelined, one sample per clock, latency 3 cycles from
// (valid_in, u) to (valid_out, z). z is heston_pkg::fx_t (Q11.20).
module icdf_normal
  import heston_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        valid_in,
  input  logic [31:0] u,
  output logic        valid_out,
  output fx_t         z
);
  localparam int unsigned SEGS = 248;
  localparam int unsigned TW   = 27;

  logic [95:0] rom [SEGS];
  initial $readmemh("rtl/icdf_normal_coef.hex", rom);

  // ---- stage 0: leading-zero count, normalisation, segment address ----
  logic [4:0]  lz;
  logic [30:0] norm;
  logic [7:0]  seg;

  always_comb begin
    lz = 5'd30;
    for (int i = 0; i <= 30; i++) begin
      if (u[30-i]) begin
        lz = 5'(i);
        break;
      end
    end
    norm = u[30:0] << lz;
    seg  = {lz, 3'b000} + {5'b0, norm[29:27]};
  end

  // ---- stage 1: ROM read ----
  logic            v1, sg1;
  logic [TW-1:0]   t1;
  logic [95:0]     coef1;

  always_ff @(posedge clk) begin
    if (rst) v1 <= 1'b0;
    else     v1 <= valid_in;
    sg1   <= u[31];
    t1    <= norm[TW-1:0];
    coef1 <= rom[seg];
  end

  // ---- stage 2: inner Horner step a = c1 + t*c2 ----
  logic                    v2, sg2;
  logic [TW-1:0]           t2;
  fx_t                     c0_2, a2;
  logic signed [FX_W+TW:0] prod_a;

  assign prod_a = fx_t'(coef1[95:64]) * $signed({1'b0, t1});

  always_ff @(posedge clk) begin
    if (rst) v2 <= 1'b0;
    else     v2 <= v1;
    sg2  <= sg1;
    t2   <= t1;
    c0_2 <= fx_t'(coef1[31:0]);
    a2   <= fx_t'(coef1[63:32]) + fx_t'(prod_a >>> TW);
  end

  // ---- stage 3: outer Horner step z = c0 + t*a, sign ----
  logic signed [FX_W+TW:0] prod_z;
  fx_t                     zn;

  assign prod_z = a2 * $signed({1'b0, t2});
  assign zn     = c0_2 + fx_t'(prod_z >>> TW);

  always_ff @(posedge clk) begin
    if (rst) valid_out <= 1'b0;
    else     valid_out <= v2;
    z <= sg2 ? -zn : zn;
  end
endmodule
