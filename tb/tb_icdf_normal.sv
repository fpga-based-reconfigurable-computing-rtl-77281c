// tb_icdf_normal: compares the hardware inverse normal CDF with a
// double-precision reference (Acklam's rational approximation refined by
// one Halley step) for edge-case and random inputs across all octaves, and
// checks the 3-cycle latency and one-result-per-cycle throughput.
module tb_icdf_normal;
  import heston_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic valid_in = 1'b0;
  logic [31:0] u = '0;
  logic valid_out;
  fx_t  z;
  int checks = 0, failures = 0;

  icdf_normal dut (.clk(clk), .rst(rst), .valid_in(valid_in), .u(u),
                   .valid_out(valid_out), .z(z));

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
    real q, r, x;
    if (p < 0.02425) begin
      q = $sqrt(-2.0 * $ln(p));
      x = (((((c1*q+c2)*q+c3)*q+c4)*q+c5)*q+c6) / ((((d1*q+d2)*q+d3)*q+d4)*q+1.0);
    end else begin
      q = p - 0.5; r = q*q;
      x = (((((a1*r+a2)*r+a3)*r+a4)*r+a5)*r+a6)*q / (((((b1*r+b2)*r+b3)*r+b4)*r+b5)*r+1.0);
    end
    return x;
  endfunction

  // expected results, queued with the input
  real exp_q[$];
  int  sent = 0, got = 0;
  int  first_in_cycle = -1, first_out_cycle = -1, cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    if (valid_out && !rst) begin
      real e, zr;
      if (first_out_cycle < 0) first_out_cycle = cyc;
      e  = exp_q.pop_front();
      zr = real'(z) / 1048576.0;
      checks++;
      got++;
      if ((zr - e) > 2.0e-4 || (e - zr) > 2.0e-4) begin
        failures++;
        if (failures < 10) $display("icdf mismatch: got %f expected %f", zr, e);
      end
    end
  end

  task automatic send(logic [31:0] val);
    real p, e;
    p = (real'(val[30:0]) + 0.5) / 4294967296.0;
    e = inv_norm(p);
    if (val[31]) e = -e;
    exp_q.push_back(e);
    u <= val;
    valid_in <= 1'b1;
    if (first_in_cycle < 0) first_in_cycle = cyc;
    sent++;
    @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // edges of every octave and sub-segment, both signs
    for (int k = 0; k <= 29; k++) begin
      send(32'h1 << (30 - k));
      send((32'h1 << (30 - k)) | 32'h8000_0000);
      send((32'h2 << (30 - k)) - 1);
    end
    send(32'h7FFF_FFFF);
    send(32'hFFFF_FFFF);
    send(32'h0000_0001);
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] r;
      r = $urandom;
      if (i % 3 == 0) r = {r[31], 31'(r[30:0] >> (r[4:0]))};
      if (r[30:0] == '0) r[0] = 1'b1;
      send(r);
    end
    valid_in <= 1'b0;
    repeat (10) @(posedge clk);
    checks++;
    if (got != sent) begin failures++; $display("lost samples %0d of %0d", got, sent); end
    checks++;
    // The input is applied after edge c and captured at edge c+1; three
    // register stages put the result out at edge c+3, where it is seen at c+4.
    if (first_out_cycle - first_in_cycle != 4) begin
      failures++; $display("latency %0d, expected 3 stages", first_out_cycle - first_in_cycle - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
