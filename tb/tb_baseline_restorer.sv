// tb_baseline_restorer: self-checking test of the baseline subtraction.
//
// A constant ADC level with +-2 counts of noise is applied; then large
// exponential pulses ride on it; then the level steps by 6 counts.
// Checked: the first sample loads the baseline; every output equals the
// previous clock's sample minus the previous clock's baseline, with the quiet
// flag telling whether it was inside the window; the baseline stays within
// -1..+3 counts of the true level while pulses are present (tails above the
// window must not pull it up; the last counts of each tail fall inside the
// window and lift it a little); and it follows the small step within 2^SHIFT*8 samples.
module tb_baseline_restorer;
  import dpp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [ADC_W-1:0]         adc;
  logic [ADC_W-1:0]         thr;
  logic signed [SAMP_W-1:0] x;
  logic                     quiet;
  logic [ADC_W-1:0]         baseline;

  int checks = 0, failures = 0;

  baseline_restorer dut (.clk(clk), .rst_n(rst_n), .adc(adc), .thr(thr),
                         .x(x), .quiet(quiet), .baseline(baseline));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  int level;
  int prev_adc, prev_bl;

  // drive one sample and check the output that belongs to the previous one
  task automatic drive(input int v);
    adc = ADC_W'(v);
    #1;
    prev_adc = v;
    prev_bl  = int'(baseline);
    @(posedge clk);
    #1;
    check(int'(x) == prev_adc - prev_bl, $sformatf("x=%0d expected %0d", x, prev_adc - prev_bl));
    check(quiet == ((prev_adc - prev_bl <= int'(thr)) && (prev_adc - prev_bl >= -int'(thr))),
          "quiet flag");
  endtask

  initial begin
    real amp;
    thr   = 12'd8;
    level = 1500;
    adc   = ADC_W'(level);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;
    check(baseline == ADC_W'(level), "first sample loads the baseline");

    // quiet baseline with noise
    for (int n = 0; n < 3000; n++) drive(level + $urandom_range(0, 4) - 2);
    check(int'(baseline) >= level - 1 && int'(baseline) <= level + 1, "baseline settles");

    // pulses with long tails
    for (int pulse = 0; pulse < 10; pulse++) begin
      amp = 500.0 + $urandom_range(0, 1500);
      for (int n = 0; n < 3000; n++) begin
        drive(level + $rtoi(amp * $exp(-n / 300.0)) + $urandom_range(0, 4) - 2);
        check(int'(baseline) >= level - 1 && int'(baseline) <= level + 3,
              $sformatf("baseline held during pulse: %0d", baseline));
      end
    end

    // slow drift: the level moves by 6 counts
    level = level + 6;
    for (int n = 0; n < 256 * 8; n++) drive(level + $urandom_range(0, 4) - 2);
    check(int'(baseline) >= level - 1 && int'(baseline) <= level + 1,
          $sformatf("baseline follows step: %0d", baseline));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
