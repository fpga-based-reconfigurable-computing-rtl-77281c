// urng_taus: uniform 32-bit random number generator, one word per clock.
//
// A three-component combined Tausworthe generator (L'Ecuyer's taus88,
// period about 2^88): each component is a shift/xor recurrence on a 32-bit
// state and the output is the xor of the three states. It is the uniform
// source in front of the inversion-based Gaussian generator. The source
// architecture only says the Gaussian numbers come from inverting a uniform
// random number; the choice of taus88 is this design's.
//
// Interface: after rst the states hold the seeds (SEED1 > 1, SEED2 > 7,
// SEED3 > 15 are required by the recurrence). Every cycle with en high the
// states advance and u shows the new output on the next cycle.
module urng_taus #(
  parameter logic [31:0] SEED1 = 32'h1234_5678,
  parameter logic [31:0] SEED2 = 32'h9ABC_DEF0,
  parameter logic [31:0] SEED3 = 32'h0F1E_2D3C
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  output logic [31:0] u
);
  logic [31:0] s1, s2, s3;
  logic [31:0] n1, n2, n3;

  always_comb begin
    n1 = ((s1 & 32'hFFFF_FFFE) << 12) ^ (((s1 << 13) ^ s1) >> 19);
    n2 = ((s2 & 32'hFFFF_FFF8) <<  4) ^ (((s2 <<  2) ^ s2) >> 25);
    n3 = ((s3 & 32'hFFFF_FFF0) << 17) ^ (((s3 <<  3) ^ s3) >> 11);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= SEED1;
      s2 <= SEED2;
      s3 <= SEED3;
    end else if (en) begin
      s1 <= n1;
      s2 <= n2;
      s3 <= n3;
    end
  end

  assign u = s1 ^ s2 ^ s3;

  initial begin
    assert (SEED1 > 32'd1 && SEED2 > 32'd7 && SEED3 > 32'd15)
      else $error("urng_taus: seeds too small");
  end
endmodule
