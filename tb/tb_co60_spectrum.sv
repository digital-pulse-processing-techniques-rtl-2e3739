// tb_co60_spectrum: a 60Co gamma-ray spectrum measured through the whole
// pulse processor at its default sizes, read out over CAMAC and histogrammed
// in the testbench, as the data acquisition host would do.
//
// Source model (60Co line energies 1173.2 and 1332.5 keV; the detector's
// intrinsic resolution of about 2 keV FWHM; 30 % of events spread flat from
// 50 to 1100 keV as a stand-in for the Compton continuum): 1332.5 keV gives
// a preamplifier step of 1500 ADC counts. Pulses decay with a 2000-sample time
// constant and arrive at random, exponentially distributed intervals with a
// mean of 5000 samples (20 000 counts/s at 100 MHz), so tails overlap. The
// ADC adds +-2 counts of noise on a 400-count baseline.
// The pole-zero coefficient is measured automatically; peaks found before
// the first measurement and peaks flagged as pile-up are left out of the
// spectrum. Checked: both lines present with at least 150 counts each; the
// ratio of their centroids equals 1173.2/1332.5 within 0.3 % (linearity);
// the FWHM of the 1332.5 keV line is below 0.578 % (the value reported for
// the FPGA system, which includes real detector and electronics noise this
// model lacks); and no events are lost in the buffer.
module tb_co60_spectrum;
  import dpp_pkg::*;

  localparam real P_TRUE = 0.99950012497916927;   // exp(-1/2000)
  localparam real D      = 0.98019867330675525;   // exp(-1/50)
  localparam real K      = 1.0 / 18.757;
  localparam real GAIN   = 1500.0 / 1332.5;       // ADC counts per keV
  localparam int  BASE   = 400;
  localparam int  EVENTS = 1400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [ADC_W-1:0] adc_data;
  logic [ADC_W-1:0] bl_thr = 12'd8;
  logic [SAMP_W-2:0] rise_thr = 13'd60;
  logic pz_auto = 1'b1;
  logic signed [COEF_W-1:0] b1, b2, a0, a1_manual, a2;
  logic [SHAPED_W-2:0] peak_thr = 17'd30, peak_hyst = 17'd8;
  logic [ADC_W-1:0] baseline;
  logic bl_quiet, pz_valid, pz_update, peak_valid, fifo_full;
  logic signed [COEF_W-1:0] pz_p;
  logic signed [SHAPED_W-1:0] shaped;
  peak_t peak;
  logic cam_n, cam_s1, cam_s2, cam_z, cam_c, cam_i;
  logic [3:0] cam_a;
  logic [4:0] cam_f;
  logic [CAMAC_W-1:0] cam_r;
  logic cam_q, cam_x, cam_l;

  dpp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [COEF_W-1:0] q30(real v);
    return COEF_W'($rtoi(v * 1073741824.0 + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic real urand();
    return ($urandom_range(0, 1000000) + 0.5) / 1000001.0;
  endfunction

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += urand();
    return s - 6.0;
  endfunction

  // peaks produced before the pole-zero coefficient was measured
  int n_early = 0;
  always @(posedge clk) if (rst_n && peak_valid && !pz_valid) n_early++;

  // ---- CAMAC reader ---------------------------------------------------------
  logic [CAMAC_W-1:0] words [$];
  bit reader_busy = 1'b0;

  task automatic dataway(input int f, input int a, output logic [CAMAC_W-1:0] r,
                         output logic qq);
    cam_n = 1'b1; cam_f = 5'(f); cam_a = 4'(a);
    repeat (30) @(posedge clk);
    r = cam_r; qq = cam_q;
    cam_s1 = 1'b1; repeat (20) @(posedge clk);
    cam_s1 = 1'b0; repeat (10) @(posedge clk);
    cam_s2 = 1'b1; repeat (20) @(posedge clk);
    cam_s2 = 1'b0; repeat (5) @(posedge clk);
    cam_n = 1'b0; cam_f = '0; cam_a = '0;
    repeat (10) @(posedge clk);
  endtask

  bit read_en = 1'b0;
  initial begin
    logic [CAMAC_W-1:0] r;
    logic qq;
    forever begin
      @(posedge clk);
      if (read_en && cam_l) begin
        reader_busy = 1'b1;
        dataway(2, 0, r, qq);
        if (qq) words.push_back(r);
        reader_busy = 1'b0;
      end
    end
  end

  // ---- spectrum analysis ----------------------------------------------------
  int amps [$];

  task automatic line_fit(input real nominal, output real mean, output real fwhm,
                          output int n);
    real s, ss, lo, hi;
    mean = nominal;
    for (int pass = 0; pass < 3; pass++) begin
      lo = mean * (pass == 0 ? 0.97 : 0.99);
      hi = mean * (pass == 0 ? 1.03 : 1.01);
      s = 0.0; ss = 0.0; n = 0;
      foreach (amps[i]) if (amps[i] >= lo && amps[i] <= hi) begin
        s += amps[i]; ss += real'(amps[i]) * amps[i]; n++;
      end
      if (n > 1) mean = s / n;
    end
    fwhm = (n > 1) ? 2.3548 * $sqrt(ss / n - mean * mean) : 1.0e9;
  endtask

  // ---- stimulus --------------------------------------------------------------
  initial begin
    logic [CAMAC_W-1:0] r;
    logic qq;
    real tail, e, m1, m2, f1, f2;
    int gap, n1, n2, lost;

    {cam_n, cam_s1, cam_s2, cam_z, cam_c, cam_i} = '0;
    cam_a = '0; cam_f = '0;
    b1 = q30(2.0 * D);
    b2 = q30(-D * D);
    a0 = q30(K);
    a1_manual = q30(-K);
    a2 = '0;
    adc_data = ADC_W'(BASE);
    repeat (4) @(posedge clk);
    #1 rst_n = 1'b1;
    dataway(26, 0, r, qq);
    read_en = 1'b1;

    tail = 0.0;
    for (int ev = 0; ev < EVENTS; ev++) begin
      case ($urandom_range(0, 9))
        0, 1, 2:    e = 50.0 + urand() * 1050.0;
        3, 4, 5:    e = 1173.2 + gauss() * 2.0 / 2.3548;
        default:    e = 1332.5 + gauss() * 2.0 / 2.3548;
      endcase
      gap = 200 + $rtoi(-4800.0 * $ln(urand()));
      tail += e * GAIN;
      for (int n = 0; n < gap; n++) begin
        adc_data = ADC_W'(BASE + $rtoi(tail + 0.5) + $urandom_range(0, 4) - 2);
        tail = tail * P_TRUE;
        @(posedge clk);
        #1;
      end
    end
    repeat (5000) @(posedge clk);
    while (cam_l || reader_busy) @(posedge clk);
    read_en = 1'b0;
    dataway(0, 2, r, qq);
    lost = int'(r);

    foreach (words[i]) if (i >= n_early && !words[i][CAMAC_W-1]) amps.push_back(int'(words[i][AMP_W-1:0]));
    $display("%0d peaks read, %0d before pole-zero, %0d in spectrum, 1-p = %e",
             words.size(), n_early, amps.size(), 1.0 - real'(pz_p) / 1073741824.0);

    line_fit(1173.2 * GAIN, m1, f1, n1);
    line_fit(1332.5 * GAIN, m2, f2, n2);
    $display("1173 keV line: %0d counts, centroid %0.2f, FWHM %0.3f %%", n1, m1, 100.0 * f1 / m1);
    $display("1332 keV line: %0d counts, centroid %0.2f, FWHM %0.3f %%", n2, m2, 100.0 * f2 / m2);
    check(n1 >= 150 && n2 >= 150, "both lines present");
    check((m1 / m2) > 0.997 * (1173.2 / 1332.5) && (m1 / m2) < 1.003 * (1173.2 / 1332.5),
          $sformatf("line ratio %f", m1 / m2));
    check(f2 / m2 < 0.00578, "1332 keV resolution");
    check(lost == 0, "no events lost");
    check(pz_valid, "pole-zero measured");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
