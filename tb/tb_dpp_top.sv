// tb_dpp_top: end-to-end test of the pulse processor at its default sizes.
//
// The testbench generates the ADC stream of a charge preamplifier: a baseline
// of 400 counts with +-2 counts of noise, and steps of amplitude A that decay
// as A*p^n with p = exp(-1/2000) (20 us at 100 MHz). The shaping is a double
// pole at d = exp(-1/50) (CR-RC time constant 0.5 us), gain normalised so a
// pulse of height A gives a shaped peak of about A. It also plays the CAMAC
// crate controller, reading peaks with F2 A0 whenever LAM is raised.
//
// Phases:
//   1. 40 pulses 10000 samples apart, one of them followed 60 samples later
//      by a second (pile-up). The filter starts with the manual a1 = -a0 (a
//      plain CR-RC, no pole-zero); once the fall-time detector has averaged
//      16 pulses it switches to the measured a1. A few pulses are sent with
//      the inhibit line I raised and must not be stored.
//   2. With readout stopped, 600 small pulses 300 samples apart overflow the
//      512-word buffer; the lost count (F0 A2) must equal the excess. The
//      buffer is then drained.
// Every peak read is matched, in order, to the pulse that made it. For pulses
// after the pole-zero switch its amplitude must be within 1 % + 4 counts of
// the peak of a floating-point model of the filter equation with the exact p, run here
// on the noise-free signal. Also checked: the measured 1-p within 2 %, the
// pile-up flag on exactly the piled-up pulse, and that each mechanism
// (baseline tracking, pole-zero update, manual and automatic a1, pile-up,
// inhibit, buffer full and lost events, LAM) happened at least once.
module tb_dpp_top;
  import dpp_pkg::*;

  localparam real P_TRUE = 0.99950012497916927;   // exp(-1/2000)
  localparam real D      = 0.98019867330675525;   // exp(-1/50)
  localparam real K      = 1.0 / 18.757;          // 1 / max((n+1) d^n)
  localparam int  BASE   = 400;

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
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [COEF_W-1:0] q30(real v);
    return COEF_W'($rtoi(v * 1073741824.0 + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  // ---- mechanism counters -----------------------------------------------
  int n_quiet = 0, n_pz_update = 0, n_peaks = 0, n_pileup = 0, n_full = 0;
  int n_lam_reads = 0, n_manual = 0, n_auto = 0, n_inhibited = 0;
  always @(posedge clk) if (rst_n) begin
    if (bl_quiet) n_quiet++;
    if (pz_update) n_pz_update++;
    if (fifo_full) n_full++;
    if (peak_valid) begin
      n_peaks++;
      if (peak.pileup) n_pileup++;
      if (pz_valid) n_auto++; else n_manual++;
    end
  end

  // ---- stimulus and floating-point reference ----------------------------
  typedef struct {
    real amp;        // expected shaped peak (reference model)
    bit  compare;    // amplitude is compared
    bit  stored;     // expected in the buffer
    bit  pileup;     // expected pile-up flag
  } pulse_rec_t;
  pulse_rec_t pulses [$];

  real tail = 0.0;            // preamplifier signal above baseline
  real xr1 = 0.0, yr1 = 0.0, yr2 = 0.0;
  real cur_max = 0.0;

  // one ADC sample; `step` > 0 starts a pulse of that height
  task automatic sample(input real step);
    real yr;
    tail = tail * P_TRUE + step;
    yr = 2.0 * D * yr1 - D * D * yr2 + K * tail - K * P_TRUE * xr1;
    xr1 = tail; yr2 = yr1; yr1 = yr;
    if (yr > cur_max) cur_max = yr;
    adc_data = ADC_W'(BASE + $rtoi(tail + 0.5) + $urandom_range(0, 4) - 2);
    @(posedge clk);
    #1;
  endtask

  task automatic pulse(input real a, input int gap, input bit pu);
    pulse_rec_t r;
    if (pulses.size() > 0) pulses[$].amp = cur_max;
    cur_max = 0.0;
    r.amp = 0.0;
    r.compare = pz_valid && pz_auto;
    r.stored = !cam_i;
    r.pileup = pu;
    pulses.push_back(r);
    sample(a);
    repeat (gap - 1) sample(0.0);
  endtask

  // ---- CAMAC controller --------------------------------------------------
  bit read_en = 1'b0, reader_busy = 1'b0;
  logic [CAMAC_W-1:0] words [$];

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

  initial begin
    logic [CAMAC_W-1:0] r;
    logic qq;
    forever begin
      @(posedge clk);
      if (read_en && cam_l) begin
        reader_busy = 1'b1;
        dataway(2, 0, r, qq);
        if (qq) begin
          words.push_back(r);
          n_lam_reads++;
        end
        reader_busy = 1'b0;
      end
    end
  end

  task automatic stop_reader();
    read_en = 1'b0;
    while (reader_busy) @(posedge clk);
  endtask

  // ---- main sequence -----------------------------------------------------
  initial begin
    logic [CAMAC_W-1:0] r;
    logic qq;
    int stored_before, lost;
    real meas, truth;

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
    repeat (2000) sample(0.0);

    // enable LAM and start the reader
    dataway(26, 0, r, qq);
    check(qq, "F26 accepted");
    read_en = 1'b1;

    // phase 1
    for (int i = 0; i < 40; i++) begin
      if (i == 30) cam_i = 1'b1;
      if (i == 33) cam_i = 1'b0;
      if (i == 25) begin
        pulse(500.0 + $urandom_range(0, 200), 60, 1'b0);
        pulse(1500.0 + $urandom_range(0, 300), 10000, 1'b1);
      end else begin
        pulse(300.0 + $urandom_range(0, 1200), 10000, 1'b0);
      end
    end
    repeat (3000) sample(0.0);
    check(pz_valid, "pole-zero measured");
    meas  = 1.0 - real'(pz_p) / 1073741824.0;
    truth = 1.0 - P_TRUE;
    $display("1-p measured %e, true %e", meas, truth);
    check(meas > 0.98 * truth && meas < 1.02 * truth, "measured 1-p within 2 %");

    // phase 2: overflow with the reader stopped
    stop_reader();
    repeat (2000) sample(0.0);
    dataway(0, 1, r, qq);
    check(r == 24'd0, $sformatf("buffer empty before burst: %0d", r));
    stored_before = words.size();
    for (int i = 0; i < 600; i++) pulse(150.0 + $urandom_range(0, 100), 300, 1'b0);
    repeat (3000) sample(0.0);
    pulses[$].amp = cur_max;
    dataway(0, 1, r, qq);
    check(r == 24'd512, $sformatf("buffer full: count %0d", r));
    dataway(0, 2, r, qq);
    lost = int'(r);
    check(lost == 600 - 512, $sformatf("lost count %0d, expected %0d", lost, 600 - 512));
    for (int i = 0; i < 600; i++) if (i >= 512) pulses[pulses.size() - 600 + i].stored = 1'b0;
    read_en = 1'b1;
    while (words.size() < stored_before + 512) sample(0.0);
    stop_reader();
    dataway(0, 1, r, qq);
    check(r == 24'd0, "buffer drained");

    // ---- match every read word to its pulse ------------------------------
    begin
      int w;
      w = 0;
      foreach (pulses[i]) begin
        if (!pulses[i].stored) continue;
        if (w >= words.size()) begin
          check(1'b0, "fewer words than stored pulses");
          break;
        end
        check(words[w][CAMAC_W-1] == pulses[i].pileup,
              $sformatf("pulse %0d pile-up flag %0d", i, words[w][CAMAC_W-1]));
        if (pulses[i].compare) begin
          real e, g;
          e = pulses[i].amp;
          g = real'(words[w][AMP_W-1:0]);
          check(g >= e * 0.99 - 4.0 && g <= e * 1.01 + 4.0,
                $sformatf("pulse %0d amplitude %0.0f, expected %0.1f", i, g, e));
        end
        w++;
      end
      check(w == words.size(), $sformatf("%0d words read, %0d matched", words.size(), w));
    end

    n_inhibited = n_peaks - words.size() - lost;
    $display("mechanisms: quiet=%0d pz_updates=%0d manual=%0d auto=%0d pileup=%0d inhibited=%0d full=%0d lost=%0d lam_reads=%0d",
             n_quiet, n_pz_update, n_manual, n_auto, n_pileup, n_inhibited, n_full, lost, n_lam_reads);
    check(n_quiet > 0, "baseline tracked");
    check(n_pz_update > 0, "pole-zero updated");
    check(n_manual > 0, "manual a1 used");
    check(n_auto > 0, "measured a1 used");
    check(n_pileup == 1, "one pile-up peak");
    check(n_inhibited == 3, $sformatf("inhibited peaks %0d, expected 3", n_inhibited));
    check(n_full > 0, "buffer full");
    check(lost > 0, "events lost");
    check(n_lam_reads > 0, "LAM-driven reads");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
