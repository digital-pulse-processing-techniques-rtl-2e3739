// tb_peak_detector: self-checking test of the trigger-less peak search.
//
// CR-RC shaped pulses A*(n+1)*d^n/(tau/e) (peak about A) with +-3 counts of
// noise are generated here and fed one per clock, with thr = 50, hyst = 10.
// Checked:
//   * noise alone gives no peak; a pulse of height 40 (below thr) gives none;
//   * each isolated pulse gives exactly one peak, whose amplitude is the
//     largest sample of that pulse, reported on the clock after the first
//     sample that is hyst below the running maximum, with pile-up flag 0;
//   * a second pulse starting on the falling side of the first gives a
//     second peak with the pile-up flag set, equal to the largest sample
//     from the start of the second pulse on (the second pulse is made the
//     larger, so the first one's tail is below it there).
module tb_peak_detector;
  import dpp_pkg::*;

  localparam real TAU = 20.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [SHAPED_W-1:0] y;
  logic [SHAPED_W-2:0]        thr, hyst;
  logic                       peak_valid;
  peak_t                      peak;

  int checks = 0, failures = 0;

  peak_detector dut (.clk(clk), .rst_n(rst_n), .y(y), .thr(thr), .hyst(hyst),
                     .peak_valid(peak_valid), .peak(peak));

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  // record every reported peak with its cycle number
  int cycle = 0;
  peak_t got [$];
  int    got_cycle [$];
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (peak_valid) begin
      got.push_back(peak);
      got_cycle.push_back(cycle);
    end
  end

  function automatic real shape(real a, int n);
    if (n < 0) return 0.0;
    return a * (n + 1) * $exp(-n / TAU) / (TAU / 2.718281828);
  endfunction

  // drive a sequence of samples given pulse starts/heights; returns the
  // samples actually driven and the cycle each was driven in
  int samples [$];
  int sample_cycle [$];
  task automatic play(input int len, input int s0, input real a0v,
                      input int s1, input real a1v);
    samples.delete();
    sample_cycle.delete();
    for (int n = 0; n < len; n++) begin
      int v;
      v = $rtoi(shape(a0v, n - s0) + shape(a1v, n - s1) + 0.5) + $urandom_range(0, 6) - 3;
      y = SHAPED_W'(v);
      samples.push_back(v);
      sample_cycle.push_back(cycle);
      @(posedge clk);
      #1;
    end
  endtask

  // expected peak for samples [from, to): max, and cycle of the report
  task automatic expect_peak(input int from, input int to, output int amp,
                             output int rep_cycle, output int next_from);
    int mx = -1000000;
    amp = -1; rep_cycle = -1; next_from = to;
    for (int i = from; i < to; i++) begin
      if (samples[i] > mx) mx = samples[i];
      else if (mx > 50 && samples[i] <= mx - 10) begin
        amp = mx; rep_cycle = sample_cycle[i] + 1; next_from = i + 1;
        return;
      end
    end
  endtask

  initial begin
    int amp, rc, nf;
    thr  = 17'd50;
    hyst = 17'd10;
    y    = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // noise only, then a pulse below threshold
    play(500, 1000, 0.0, 1000, 0.0);
    play(300, 20, 40.0, 1000, 0.0);
    check(got.size() == 0, $sformatf("noise and small pulse gave %0d peaks", got.size()));

    // isolated pulses
    for (int k = 0; k < 30; k++) begin
      got.delete(); got_cycle.delete();
      play(400, 20, 200.0 + $urandom_range(0, 20000), 1000, 0.0);
      expect_peak(0, 400, amp, rc, nf);
      check(got.size() == 1, $sformatf("isolated pulse gave %0d peaks", got.size()));
      if (got.size() >= 1) begin
        check(int'(got[0].amp) == amp, $sformatf("amp %0d expected %0d", got[0].amp, amp));
        check(got_cycle[0] == rc, $sformatf("reported at %0d expected %0d", got_cycle[0], rc));
        check(got[0].pileup == 1'b0, "isolated pulse flagged as pile-up");
      end
    end

    // piled-up pairs: second pulse 50 samples after the first
    for (int k = 0; k < 20; k++) begin
      got.delete(); got_cycle.delete();
      play(600, 20, 2000.0 + $urandom_range(0, 4000), 70, 4000.0 + $urandom_range(0, 8000));
      expect_peak(0, 600, amp, rc, nf);
      check(got.size() == 2, $sformatf("pile-up pair gave %0d peaks", got.size()));
      if (got.size() == 2) begin
        check(int'(got[0].amp) == amp && !got[0].pileup, "first of pair");
        begin
          int mx2;
          mx2 = -1000000;
          for (int i = 70; i < 600; i++) if (samples[i] > mx2) mx2 = samples[i];
          check(int'(got[1].amp) == mx2, $sformatf("second amp %0d expected %0d", got[1].amp, mx2));
        end
        check(got[1].pileup == 1'b1, "second of pair not flagged");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
