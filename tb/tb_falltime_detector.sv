// tb_falltime_detector: self-checking test of the automatic pole-zero
// measurement.
//
// Baseline-subtracted preamplifier pulses are generated here: a 10-sample
// linear rise to amplitude A, then A*p^n with p = exp(-1/200), plus +-1 count
// of noise, 2000 samples apart. The detector runs at its defaults: a
// 1024-sample window, 64 samples after the edge, 16 pulses per block.
// Checked:
//   * no result before any pulse; 32 clean pulses give exactly 2 results, and
//     every published 1-p is within 2 % of the true one;
//   * 32 piled-up pairs (a second pulse 100 samples into the first pulse's
//     window) still give results within 2 %: the disturbed windows are
//     dropped and the second pulses are measured instead;
//   * a1 equals -a0*p rounded, for the published p, for two values of a0.
module tb_falltime_detector;
  import dpp_pkg::*;

  localparam real TAU = 200.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [SAMP_W-1:0] x;
  logic [SAMP_W-2:0]        rise_thr;
  logic signed [COEF_W-1:0] a0, p, a1;
  logic                     pz_valid, update;

  int checks = 0, failures = 0;
  int updates = 0;

  falltime_detector dut (
    .clk(clk), .rst_n(rst_n), .x(x), .rise_thr(rise_thr), .a0(a0),
    .p(p), .a1(a1), .pz_valid(pz_valid), .update(update));

  always #5 clk = ~clk;

  always @(posedge clk) if (update) begin
    real m, t;
    updates++;
    m = 1.0 - real'(p) / 1073741824.0;
    t = 1.0 - $exp(-1.0 / TAU);
    checks++;
    if (!(m > 0.98 * t && m < 1.02 * t)) begin
      failures++;
      $display("FAIL result %0d: 1-p %f, true %f", updates, m, t);
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // sum of the pulses currently present, sampled at time t
  real t0 [$];
  real amps [$];

  function automatic real signal(int t);
    real s = 0.0;
    foreach (t0[i]) begin
      real dt = t - t0[i];
      if (dt >= 0.0 && dt < 10.0) s += amps[i] * dt / 10.0;
      else if (dt >= 10.0)        s += amps[i] * $exp(-(dt - 10.0) / TAU);
    end
    return s;
  endfunction

  int now = 0;
  task automatic run(input int n);
    repeat (n) begin
      x = SAMP_W'($rtoi(signal(now) + 0.5) + $urandom_range(0, 2) - 1);
      @(posedge clk);
      #1;
      now++;
    end
  endtask

  task automatic check_p(input string what);
    real meas, truth;
    meas  = 1.0 - real'(p) / 1073741824.0;
    truth = 1.0 - $exp(-1.0 / TAU);
    $display("%s: 1-p measured %f, true %f", what, meas, truth);
    check(pz_valid, {what, ": result valid"});
    check(meas > 0.98 * truth && meas < 1.02 * truth,
          $sformatf("%s: 1-p measured %f, true %f", what, meas, truth));
  endtask

  task automatic check_a1();
    longint expect_a1;
    #1;
    @(posedge clk);
    #1;
    expect_a1 = -((longint'(a0) * longint'(p) + (64'sd1 <<< 29)) >>> 30);
    check(longint'(a1) == expect_a1, $sformatf("a1=%0d expected %0d", a1, expect_a1));
  endtask

  initial begin
    rise_thr = 13'd50;
    a0       = 32'sd107374182;   // 0.1
    x        = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(!pz_valid, "no result before any pulse");

    // clean pulses
    for (int i = 0; i < 32; i++) begin
      t0.push_back(now + 5);
      amps.push_back(1000.0 + $urandom_range(0, 3000));
      run(2000);
    end
    run(200);
    check(updates == 2, $sformatf("clean pulses: %0d results, expected 2", updates));
    check_p("clean");
    check_a1();
    a0 = -32'sd53687091;
    check_a1();

    // piled-up pairs
    for (int i = 0; i < 32; i++) begin
      t0.push_back(now + 5);
      amps.push_back(1000.0 + $urandom_range(0, 1500));
      t0.push_back(now + 5 + 10 + 64 + 100);
      amps.push_back(1000.0 + $urandom_range(0, 1500));
      run(2500);
    end
    run(200);
    check(updates == 4, $sformatf("after pile-up: %0d results, expected 4", updates));
    check_p("pile-up");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
