// grng: Gaussian random number generator, one N(0,1) sample per clock.
//
// Inversion-based: a taus88 uniform generator (urng_taus) feeds the inverse
// normal CDF (icdf_normal). Each Monte Carlo core holds two of these, one
// for the asset noise vector and one for the independent variance noise, as
// in the source architecture; their seeds must differ.
//
// Interface: after rst, z carries a new sample every cycle once valid has
// risen (3 cycles after reset is released). z is heston_pkg::fx_t (Q11.20).
module grng
  import heston_pkg::*;
#(
  parameter logic [31:0] SEED1 = 32'h1234_5678,
  parameter logic [31:0] SEED2 = 32'h9ABC_DEF0,
  parameter logic [31:0] SEED3 = 32'h0F1E_2D3C
) (
  input  logic clk,
  input  logic rst,
  output logic valid,
  output fx_t  z
);
  logic [31:0] u;

  urng_taus #(.SEED1(SEED1), .SEED2(SEED2), .SEED3(SEED3)) u_urng (
    .clk(clk), .rst(rst), .en(1'b1), .u(u)
  );

  icdf_normal u_icdf (
    .clk(clk), .rst(rst), .valid_in(!rst), .u(u), .valid_out(valid), .z(z)
  );
endmodule
