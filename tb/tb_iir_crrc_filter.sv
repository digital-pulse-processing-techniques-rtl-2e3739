// tb_iir_crrc_filter: self-checking test of the two-pole, two-zero shaping filter.
//
// Part 1 drives random samples through random coefficients and compares every
// output, one clock after its input, with a bit-exact model of the filter's
// fixed-point arithmetic written here with 128-bit integers.
// Part 2 checks the filter's purpose: a preamplifier pulse A*p^n, filtered
// with a double pole d (b1 = 2d, b2 = -d^2) and the pole-zero setting
// a0 = k, a1 = -k*p, a2 = 0, must come out as the ideal CR-RC pulse
// k*A*(n+1)*d^n, computed here in floating point, within 2 counts; and its
// long tail must return to zero (no pole-zero undershoot).
module tb_iir_crrc_filter;
  import dpp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [SAMP_W-1:0]   x;
  iir_coef_t                  coef;
  logic signed [SHAPED_W-1:0] y;

  int checks = 0, failures = 0;

  iir_crrc_filter dut (.clk(clk), .rst_n(rst_n), .x(x), .coef(coef), .y(y));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- bit-exact model -------------------------------------------------
  typedef logic signed [127:0] big_t;
  big_t mx1, mx2, my1, my2;

  function automatic big_t model_step(big_t xin);
    big_t acc, r, ymax, ymin;
    acc = big_t'(coef.b1) * my1 + big_t'(coef.b2) * my2
        + ((big_t'(coef.a0) * xin + big_t'(coef.a1) * mx1 + big_t'(coef.a2) * mx2) <<< 16);
    r = (acc + (big_t'(1) <<< 29)) >>> 30;
    ymax = (big_t'(1) <<< 47) - 1;
    ymin = -(big_t'(1) <<< 47);
    if (r > ymax) r = ymax;
    if (r < ymin) r = ymin;
    return r;
  endfunction

  function automatic big_t model_out(big_t ystate);
    big_t v;
    v = ystate >>> 16;
    if (v > 131071) v = 131071;
    if (v < -131072) v = -131072;
    return v;
  endfunction

  function automatic logic signed [COEF_W-1:0] q30(real v);
    return COEF_W'($rtoi(v * 1073741824.0 + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  task automatic reset_all();
    rst_n = 1'b0;
    x = '0;
    mx1 = 0; mx2 = 0; my1 = 0; my2 = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
  endtask

  // drive one sample, advance one clock, return the filter output
  task automatic step(input logic signed [SAMP_W-1:0] xin, output big_t yout);
    big_t ynew;
    x = xin;
    ynew = model_step(big_t'(xin));
    @(posedge clk);
    #1;
    mx2 = mx1; mx1 = big_t'(xin);
    my2 = my1; my1 = ynew;
    yout = model_out(ynew);
    checks++;
    if (big_t'(y) !== yout) begin
      failures++;
      if (failures < 10) $display("mismatch: x=%0d y=%0d model=%0d", xin, y, yout);
    end
  endtask

  initial begin
    big_t ym;
    real d, p, k, ideal, a;
    int maxerr;

    // ---- part 1: random coefficients, random data --------------------------
    for (int trial = 0; trial < 20; trial++) begin
      d = 0.5 + 0.49 * ($urandom_range(0, 1000) / 1000.0);
      coef.b1 = q30(2.0 * d);
      coef.b2 = q30(-d * d);
      coef.a0 = q30(($urandom_range(0, 2000) - 1000) / 1000.0);
      coef.a1 = q30(($urandom_range(0, 2000) - 1000) / 1000.0);
      coef.a2 = q30(($urandom_range(0, 2000) - 1000) / 1000.0);
      reset_all();
      for (int n = 0; n < 300; n++) step(SAMP_W'($signed($urandom_range(0, 8000)) - 4000), ym);
    end

    // ---- part 2: pole-zero cancellation and CR-RC shape ---------------------
    d = $exp(-1.0 / 20.0);
    p = $exp(-1.0 / 500.0);
    k = 0.1;
    a = 4000.0;
    coef.b1 = q30(2.0 * d);
    coef.b2 = q30(-d * d);
    coef.a0 = q30(k);
    coef.a1 = q30(-k * p);
    coef.a2 = '0;
    reset_all();
    maxerr = 0;
    for (int n = 0; n < 1500; n++) begin
      step(SAMP_W'($rtoi(a * (p ** n) + 0.5)), ym);
      ideal = k * a * (n + 1) * (d ** n);
      if ($rtoi(ideal) - int'(y) > maxerr) maxerr = $rtoi(ideal) - int'(y);
      if (int'(y) - $rtoi(ideal) > maxerr) maxerr = int'(y) - $rtoi(ideal);
    end
    checks++;
    if (maxerr > 2) begin
      failures++;
      $display("CR-RC shape error %0d counts", maxerr);
    end
    checks++;
    if (y > 1 || y < -1) begin
      failures++;
      $display("tail did not return to baseline: %0d", y);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
