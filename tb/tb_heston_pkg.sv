// tb_heston_pkg: checks the fixed-point helpers of the shared package against
// independent references.
//   fx_mul  - 5000 random products, and the corner cases, against the exact
//             64-bit product shifted with floor semantics (computed with
//             longint arithmetic here).
//   fx_sqrt - 5000 random non-negative words plus 0, 1 ulp, 1.0 and the
//             largest word, against floor(sqrt(a * 2^20)) found from the
//             real square root and corrected by integer comparison.
//   fx_max0 - sign cases.
// Also checks the constants the rest of the design relies on: the 20-bit
// fraction and the field numbering of a parameter-table row.
// Purely combinational functions; a clock drives only the watchdog.
module tb_heston_pkg;
  import heston_pkg::*;
  logic clk = 1'b0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_mul(longint a, longint b);
    longint p = a * b;
    // floor division by 2^20 for either sign
    return (p >= 0) ? p / 1048576 : -((-p + 1048575) / 1048576);
  endfunction

  function automatic longint ref_sqrt(longint a);
    longint x = a * 1048576;
    longint r = longint'($floor($sqrt(real'(x))));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  task automatic check_mul(fx_t a, fx_t b);
    longint e = ref_mul(longint'(a), longint'(b));
    fx_t got = fx_mul(a, b);
    checks++;
    if (got != fx_t'(e)) begin
      failures++;
      if (failures < 10) $display("fx_mul(%0d, %0d) = %0d, expected %0d", a, b, got, fx_t'(e));
    end
  endtask

  task automatic check_sqrt(fx_t a);
    longint e = ref_sqrt(longint'(a));
    fx_t got = fx_sqrt(a);
    checks++;
    if (longint'(got) != e) begin
      failures++;
      if (failures < 10) $display("fx_sqrt(%0d) = %0d, expected %0d", a, got, e);
    end
  endtask

  initial begin
    fx_t a, b;
    @(posedge clk);
    checks++;
    if (FX_ONE != fx_t'(1 << 20) || FX_W != 32 || FX_FRAC != 20) begin
      failures++; $display("fixed-point constants");
    end
    checks++;
    if (int'(F_S0) != 0 || int'(F_STRIKE) != 10 || NUM_FIELDS != 11) begin
      failures++; $display("parameter field numbering");
    end

    check_mul(FX_ONE, FX_ONE);
    check_mul(-FX_ONE, FX_ONE);
    check_mul(fx_t'(-1), fx_t'(1));           // -2^-40 floors to -1 ulp
    check_mul(fx_t'(3), fx_t'(-5));
    check_mul(fx_t'(100 << 20), fx_t'(20 << 20)); // 2000.0
    for (int i = 0; i < 5000; i++) begin
      a = fx_t'($urandom);
      b = fx_t'($urandom) >>> ($urandom % 24);
      a = a >>> ($urandom % 20);
      check_mul(a, b);
    end

    check_sqrt('0);
    check_sqrt(fx_t'(1));
    check_sqrt(FX_ONE);
    check_sqrt(fx_t'(4 << 20));
    check_sqrt(fx_t'(32'h7fff_ffff));
    for (int i = 0; i < 5000; i++) begin
      a = fx_t'($urandom & 32'h7fff_ffff) >>> ($urandom % 28);
      check_sqrt(a);
    end

    for (int i = 0; i < 200; i++) begin
      a = fx_t'($urandom);
      checks++;
      if (fx_max0(a) != ((a < 0) ? fx_t'(0) : a)) begin
        failures++; $display("fx_max0(%0d)", a);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
