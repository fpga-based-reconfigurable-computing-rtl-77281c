// tb_grng: runs the Gaussian generator for 20000 samples and compares every
// sample with a reference built in the testbench (the taus88 recurrences
// followed by a double-precision inverse normal CDF), then checks the sample
// mean and variance of the stream against N(0,1).
module tb_grng;
  import heston_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic valid;
  fx_t  z;
  int checks = 0, failures = 0;

  localparam logic [31:0] S1 = 32'h3141_5926, S2 = 32'h5358_9793, S3 = 32'h2384_6264;

  grng #(.SEED1(S1), .SEED2(S2), .SEED3(S3)) dut (.clk(clk), .rst(rst), .valid(valid), .z(z));

  always #5 clk = ~clk;

  function automatic real inv_norm(real p);
    real a1 = -3.969683028665376e+01, a2 = 2.209460984245205e+02, a3 = -2.759285104469687e+02;
    real a4 = 1.383577518672690e+02, a5 = -3.066479806614716e+01, a6 = 2.506628277459239e+00;
    real b1 = -5.447609879822406e+01, b2 = 1.615858368580409e+02, b3 = -1.556989798598866e+02;
    real b4 = 6.680131188771972e+01, b5 = -1.328068155288572e+01;
    real c1 = -7.784894002430293e-03, c2 = -3.223964580411365e-01, c3 = -2.400758277161838e+00;
    real c4 = -2.549732539343734e+00, c5 = 4.374664141464968e+00, c6 = 2.938163982698783e+00;
    real d1 = 7.784695709041462e-03, d2 = 3.224671290700398e-01, d3 = 2.445134137142996e+00;
    real d4 = 3.754408661907416e+00;
    real q, r;
    if (p < 0.02425) begin
      q = $sqrt(-2.0 * $ln(p));
      return (((((c1*q+c2)*q+c3)*q+c4)*q+c5)*q+c6) / ((((d1*q+d2)*q+d3)*q+d4)*q+1.0);
    end
    q = p - 0.5; r = q*q;
    return (((((a1*r+a2)*r+a3)*r+a4)*r+a5)*r+a6)*q / (((((b1*r+b2)*r+b3)*r+b4)*r+b5)*r+1.0);
  endfunction

  logic [31:0] m1, m2, m3;
  function automatic real model_next();
    logic [31:0] b, uu;
    real e;
    uu = m1 ^ m2 ^ m3;
    b  = ((m1 << 13) ^ m1) >> 19;  m1 = ((m1 & ~32'd1)  << 12) ^ b;
    b  = ((m2 <<  2) ^ m2) >> 25;  m2 = ((m2 & ~32'd7)  <<  4) ^ b;
    b  = ((m3 <<  3) ^ m3) >> 11;  m3 = ((m3 & ~32'd15) << 17) ^ b;
    e  = inv_norm((real'(uu[30:0]) + 0.5) / 4294967296.0);
    return uu[31] ? -e : e;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real s1, s2, zr, e, mean, var_;
    int  n;
    s1 = 0; s2 = 0; n = 0;
    m1 = S1; m2 = S2; m3 = S3;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    // The generator state advances from the first cycle out of reset; the
    // ICDF pipeline shows the first sample three cycles later.
    wait (valid);
    while (n < 20000) begin
      @(negedge clk);
      zr = real'(z) / 1048576.0;
      e  = model_next();
      checks++;
      if ((zr - e) > 2.0e-4 || (e - zr) > 2.0e-4) begin
        failures++;
        if (failures < 10) $display("sample %0d: got %f expected %f", n, zr, e);
      end
      s1 += zr; s2 += zr * zr; n++;
    end
    mean = s1 / n;
    var_ = s2 / n - mean * mean;
    $display("mean %f variance %f", mean, var_);
    checks++;
    if (mean > 0.03 || mean < -0.03) begin failures++; $display("mean off"); end
    checks++;
    if (var_ > 1.04 || var_ < 0.96) begin failures++; $display("variance off"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
