// peak_detector: trigger-less search for the maximum of every shaped pulse.
//
// The reference system measures the amplitude of each filtered pulse with a peak search
// that needs no external trigger and must not fire on noise jitter near the
// top of a pulse. The state machine below is this design's own way of doing
// that. It watches every output sample of the shaping filter:
//   IDLE    waits until y rises above `thr`;
//   RISING  tracks the running maximum. A peak is declared only when y has
//           dropped `hyst` counts below that maximum, so noise wiggles smaller
//           than `hyst` on the top of a pulse give one peak, not several.
//           Falling back under `thr` first means the pulse was too small:
//           nothing is reported;
//   FALLING tracks the running minimum. If y climbs `hyst` above it while
//           still over `thr`, a second pulse is riding on the first: the
//           search goes back to RISING and that peak is flagged as pile-up.
//           Under `thr` it returns to IDLE.
// The reported amplitude is the maximum sample value (no interpolation).
//
// Timing: one sample per clock. `peak_valid` pulses for one clock, on the
// clock after the sample that ended the RISING phase; `peak` holds the result
// until the next one.
module peak_detector
  import dpp_pkg::*;
#(
  parameter int Y_W = SHAPED_W   // signed input width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [Y_W-1:0] y,
  input  logic [Y_W-2:0]        thr,    // arming threshold
  input  logic [Y_W-2:0]        hyst,   // noise hysteresis
  output logic                  peak_valid,
  output peak_t                 peak
);

  typedef enum logic [1:0] {P_IDLE, P_RISING, P_FALLING} pstate_t;
  pstate_t state;

  logic signed [Y_W-1:0] ext;       // running maximum or minimum
  logic                  pile;      // current pulse rose from a tail
  logic signed [Y_W+1:0] thr_s, hyst_s, y_s, ext_s;

  assign thr_s  = (Y_W+2)'($signed({1'b0, thr}));
  assign hyst_s = (Y_W+2)'($signed({1'b0, hyst}));
  assign y_s    = (Y_W+2)'(y);
  assign ext_s  = (Y_W+2)'(ext);

  function automatic logic [AMP_W-1:0] to_amp(logic signed [Y_W-1:0] v);
    if (v <= 0)                                    return '0;
    else if ((Y_W+2)'(v) > (Y_W+2)'({AMP_W{1'b1}})) return '1;
    else                                           return AMP_W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= P_IDLE;
      ext        <= '0;
      pile       <= 1'b0;
      peak_valid <= 1'b0;
      peak       <= '0;
    end else begin
      peak_valid <= 1'b0;
      unique case (state)
        P_IDLE: if (y_s > thr_s) begin
          state <= P_RISING;
          ext   <= y;
          pile  <= 1'b0;
        end
        P_RISING: begin
          if (y > ext) begin
            ext <= y;
          end else if (y_s <= ext_s - hyst_s) begin
            peak_valid  <= 1'b1;
            peak.amp    <= to_amp(ext);
            peak.pileup <= pile;
            state       <= (y_s > thr_s) ? P_FALLING : P_IDLE;
            ext         <= y;
          end else if (y_s <= thr_s) begin
            state <= P_IDLE;
          end
        end
        P_FALLING: begin
          if (y_s <= thr_s) begin
            state <= P_IDLE;
          end else if (y < ext) begin
            ext <= y;
          end else if (y_s >= ext_s + hyst_s) begin
            state <= P_RISING;
            ext   <= y;
            pile  <= 1'b1;
          end
        end
        default: state <= P_IDLE;
      endcase
    end
  end

  // Two peaks are always at least two samples apart: after a report the
  // search must pass through FALLING or IDLE and RISING again.
  a_peak_spacing: assert property (@(posedge clk) disable iff (!rst_n) peak_valid |=> !peak_valid);

endmodule
