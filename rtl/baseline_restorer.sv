// baseline_restorer: removes the DC level of the ADC samples so that the
// pole-zero filter and the fall-time measurement see pulses on a zero
// baseline.
//
// The reference system names baseline restoration among the processing steps
// moved from analog to digital; how it is done here is this design's own choice. The
// baseline is an exponential average of the raw samples with a time constant
// of 2^SHIFT samples, kept with FRAC fraction bits. It is updated only on
// samples within `thr` counts of the current baseline, so pulses and their
// tails do not pull it up. The first sample after reset loads the average
// directly, so the estimate starts at the right level.
//
// Timing: one sample per clock. x = adc - baseline (rounded), registered:
// sample n appears on x one clock later. `quiet` flags that x was taken while
// the baseline was being updated.
module baseline_restorer
  import dpp_pkg::*;
#(
  parameter int IN_W  = ADC_W,   // unsigned ADC sample width
  parameter int OUT_W = SAMP_W,  // signed output width (>= IN_W + 1)
  parameter int FRAC  = 8,       // fraction bits of the baseline
  parameter int SHIFT = 8        // averaging time constant, 2^SHIFT samples
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [IN_W-1:0]         adc,       // raw ADC sample, offset binary
  input  logic [IN_W-1:0]         thr,       // update window around baseline
  output logic signed [OUT_W-1:0] x,         // baseline-subtracted sample
  output logic                    quiet,     // x was within the window
  output logic [IN_W-1:0]         baseline   // current baseline, integer part
);

  localparam int BL_W = IN_W + FRAC;

  logic [BL_W-1:0]          bl;
  logic                     loaded;
  logic [IN_W-1:0]          bl_round;
  logic signed [IN_W+1:0]   diff;       // adc - baseline
  logic signed [BL_W+1:0]   step;       // (adc<<FRAC - bl) >> SHIFT
  logic                     in_window;

  assign bl_round  = (bl[FRAC-1] && bl[BL_W-1:FRAC] != '1)
                   ? bl[BL_W-1:FRAC] + 1'b1 : bl[BL_W-1:FRAC];
  assign diff      = $signed({2'b00, adc}) - $signed({2'b00, bl_round});
  assign in_window = (diff <= $signed({2'b00, thr})) && (diff >= -$signed({2'b00, thr}));
  assign step      = ($signed({2'b00, adc, {FRAC{1'b0}}}) - $signed({2'b00, bl})) >>> SHIFT;
  assign baseline  = bl_round;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bl     <= '0;
      loaded <= 1'b0;
      x      <= '0;
      quiet  <= 1'b0;
    end else begin
      if (!loaded) begin
        bl     <= {adc, {FRAC{1'b0}}};
        loaded <= 1'b1;
        x      <= '0;
        quiet  <= 1'b1;
      end else begin
        if (in_window) bl <= BL_W'($signed({2'b00, bl}) + step);
        x     <= OUT_W'(diff);
        quiet <= in_window;
      end
    end
  end

endmodule
