// dpp_top: one channel of the trigger-less digital pulse processor for
// amplitude (energy) spectroscopy with a radiation detector.
//
// A fast 12-bit ADC samples the (amplified) charge-preamplifier output at
// 80-100 MHz, one sample per clock of `clk`. The chain then runs without a
// trigger and without dead time:
//
//   adc_data -> baseline_restorer -> iir_crrc_filter -> peak_detector
//                        |                 ^ a1             |
//                        +-> falltime_detector              v
//                                          peak_fifo -> camac_interface
//
//   * baseline_restorer subtracts the ADC's DC level;
//   * falltime_detector measures the preamplifier's decay per sample p from
//     the pulse tails and produces the pole-zero coefficient a1 = -a0*p;
//   * iir_crrc_filter applies the reference system's shaping equation: pole-zero
//     cancellation plus CR-RC shaping, whose shaping time is set by b1, b2;
//   * peak_detector finds the maximum of every shaped pulse;
//   * peak_fifo holds the peaks until the CAMAC data acquisition reads them
//     through camac_interface; the host histograms them into a spectrum.
//
// Follows the reference system: the stage order, the filter equation, automatic
// pole-zero from a fall-time measurement, trigger-less peak search, CAMAC
// readout, 12-bit input. This design's own: the baseline restorer, the
// fall-time method, the peak search's hysteresis, the FIFO and the CAMAC
// command set, and all fixed-point formats (see dpp_pkg).
//
// Configuration is by static ports: the shaping coefficients b1, b2, a0, a2
// (Q2.30), the manual a1 used while `pz_auto` is low or before the first
// fall-time measurement, and the thresholds. Latency from an ADC sample to the
// filter output is 2 clocks; a peak is reported `hyst` counts after the top of
// a pulse and is readable over CAMAC 2 clocks later.
module dpp_top
  import dpp_pkg::*;
#(
  parameter int FIFO_LOG2   = 9,    // peak buffer depth, 2^FIFO_LOG2
  parameter int PZ_WIN_LOG2 = 10,   // fall-time window, 2^PZ_WIN_LOG2 samples
  parameter int PZ_AVG_LOG2 = 4,    // pulses averaged per fall-time result
  parameter int PZ_SKIP     = 64    // samples from pulse edge to tail window
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // fast ADC
  input  logic [ADC_W-1:0]         adc_data,
  // configuration
  input  logic [ADC_W-1:0]         bl_thr,      // baseline update window
  input  logic [SAMP_W-2:0]        rise_thr,    // fall-time edge threshold
  input  logic                     pz_auto,     // use the measured a1
  input  logic signed [COEF_W-1:0] b1,
  input  logic signed [COEF_W-1:0] b2,
  input  logic signed [COEF_W-1:0] a0,
  input  logic signed [COEF_W-1:0] a1_manual,
  input  logic signed [COEF_W-1:0] a2,
  input  logic [SHAPED_W-2:0]      peak_thr,
  input  logic [SHAPED_W-2:0]      peak_hyst,
  // status
  output logic [ADC_W-1:0]         baseline,
  output logic                     bl_quiet,    // baseline being tracked
  output logic signed [COEF_W-1:0] pz_p,        // measured preamp pole, Q2.30
  output logic                     pz_valid,
  output logic                     pz_update,   // new fall-time result
  output logic signed [SHAPED_W-1:0] shaped,    // filter output, for monitoring
  output logic                     peak_valid,
  output peak_t                    peak,
  output logic                     fifo_full,   // peaks are being lost
  // CAMAC dataway
  input  logic                     cam_n,
  input  logic [3:0]               cam_a,
  input  logic [4:0]               cam_f,
  input  logic                     cam_s1,
  input  logic                     cam_s2,
  input  logic                     cam_z,
  input  logic                     cam_c,
  input  logic                     cam_i,
  output logic [CAMAC_W-1:0]       cam_r,
  output logic                     cam_q,
  output logic                     cam_x,
  output logic                     cam_l
);

  logic signed [SAMP_W-1:0] x;

  baseline_restorer u_bl (
    .clk      (clk),
    .rst_n    (rst_n),
    .adc      (adc_data),
    .thr      (bl_thr),
    .x        (x),
    .quiet    (bl_quiet),
    .baseline (baseline)
  );

  logic signed [COEF_W-1:0] a1_meas;

  falltime_detector #(
    .WIN_LOG2 (PZ_WIN_LOG2),
    .AVG_LOG2 (PZ_AVG_LOG2),
    .SKIP     (PZ_SKIP)
  ) u_ft (
    .clk      (clk),
    .rst_n    (rst_n),
    .x        (x),
    .rise_thr (rise_thr),
    .a0       (a0),
    .p        (pz_p),
    .a1       (a1_meas),
    .pz_valid (pz_valid),
    .update   (pz_update)
  );

  iir_coef_t coef;
  assign coef = '{b1: b1, b2: b2, a0: a0,
                  a1: (pz_auto && pz_valid) ? a1_meas : a1_manual,
                  a2: a2};

  iir_crrc_filter u_iir (
    .clk   (clk),
    .rst_n (rst_n),
    .x     (x),
    .coef  (coef),
    .y     (shaped)
  );

  peak_detector u_pk (
    .clk        (clk),
    .rst_n      (rst_n),
    .y          (shaped),
    .thr        (peak_thr),
    .hyst       (peak_hyst),
    .peak_valid (peak_valid),
    .peak       (peak)
  );

  logic                 fifo_pop, fifo_clr, fifo_empty, acq_enable;
  logic [PEAK_W-1:0]    fifo_head;
  logic [FIFO_LOG2:0]   fifo_count;
  logic [15:0]          fifo_lost;

  peak_fifo #(.WIDTH(PEAK_W), .DEPTH_LOG2(FIFO_LOG2), .LOST_W(16)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .clr     (fifo_clr),
    .wr_en   (peak_valid && acq_enable),
    .wr_data (peak),
    .rd_en   (fifo_pop),
    .rd_data (fifo_head),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .count   (fifo_count),
    .lost    (fifo_lost)
  );

  camac_interface #(.CNT_W(FIFO_LOG2 + 1), .LOST_W(16)) u_cam (
    .clk        (clk),
    .rst_n      (rst_n),
    .cam_n      (cam_n),
    .cam_a      (cam_a),
    .cam_f      (cam_f),
    .cam_s1     (cam_s1),
    .cam_s2     (cam_s2),
    .cam_z      (cam_z),
    .cam_c      (cam_c),
    .cam_i      (cam_i),
    .cam_r      (cam_r),
    .cam_q      (cam_q),
    .cam_x      (cam_x),
    .cam_l      (cam_l),
    .head       (peak_t'(fifo_head)),
    .fifo_empty (fifo_empty),
    .fifo_count (fifo_count),
    .fifo_lost  (fifo_lost),
    .fifo_pop   (fifo_pop),
    .fifo_clr   (fifo_clr),
    .acq_enable (acq_enable)
  );

endmodule
