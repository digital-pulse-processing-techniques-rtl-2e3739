// iir_crrc_filter: the pulse-shaping filter of the chain, a second-order IIR
// section in direct form I:
//
//   y(n) = b1*y(n-1) + b2*y(n-2) + a0*x(n) + a1*x(n-1) + a2*x(n-2)
//
// This is the difference equation the reference system uses for CR-RC shaping with
// pole-zero compensation. b1 and b2 set the shaping time (a double pole at d
// gives b1 = 2d, b2 = -d^2); a0, a1, a2 place the zeros. Setting a1/a0 = -p,
// where p is the per-sample decay of the preamplifier tail, cancels the
// preamplifier pole, so each exponential pulse becomes a clean CR-RC pulse of
// height proportional to its step amplitude.
//
// Arithmetic (this design's choice): coefficients are signed Q2.30; the
// recursive state y is kept with Y_FRAC fraction bits in Y_W bits, so the
// feedback loop loses no precision at the integer scale even when the poles
// are close to 1. Every step is rounded to nearest and saturated to Y_W bits.
// The output is the integer part of y, saturated to OUT_W bits.
//
// Timing: one sample per clock, no handshake. The whole recursion is done in a
// single clock, as the reference system requires (the loop must close within one
// 10-12 ns sample period). x(n) presented in one cycle appears as y(n) on
// `y` after the next rising edge (latency 1). Coefficients may change at any
// time; they are used as presented.
module iir_crrc_filter
  import dpp_pkg::*;
#(
  parameter int X_W    = SAMP_W,    // input sample width (signed)
  parameter int OUT_W  = SHAPED_W,  // output width (signed, integer part of y)
  parameter int Y_W    = 48,        // internal state width
  parameter int Y_FRAC = 16         // fraction bits of the internal state
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [X_W-1:0]   x,      // x(n)
  input  iir_coef_t               coef,
  output logic signed [OUT_W-1:0] y       // y(n), one clock after x(n)
);

  localparam int PROD_W = COEF_W + Y_W;   // widest product
  localparam int ACC_W  = PROD_W + 3;     // sum of five products

  logic signed [X_W-1:0] x1, x2;          // x(n-1), x(n-2)
  logic signed [Y_W-1:0] y1, y2;          // y(n-1), y(n-2)

  logic signed [ACC_W-1:0] acc, rnd;
  logic signed [Y_W-1:0]   y_next;

  localparam logic signed [ACC_W-1:0] Y_MAX = ACC_W'({1'b0, {(Y_W-1){1'b1}}});
  localparam logic signed [ACC_W-1:0] Y_MIN = -Y_MAX - 1;

  always_comb begin
    logic signed [ACC_W-1:0] fir;
    fir = ACC_W'(coef.a0) * ACC_W'(x)
        + ACC_W'(coef.a1) * ACC_W'(x1)
        + ACC_W'(coef.a2) * ACC_W'(x2);
    acc = ACC_W'(coef.b1) * ACC_W'(y1)
        + ACC_W'(coef.b2) * ACC_W'(y2)
        + (fir <<< Y_FRAC);
    // back from Q(.,COEF_FRAC+Y_FRAC) to Q(.,Y_FRAC), round half up
    rnd = (acc + (ACC_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (rnd > Y_MAX)      y_next = Y_MAX[Y_W-1:0];
    else if (rnd < Y_MIN) y_next = Y_MIN[Y_W-1:0];
    else                  y_next = rnd[Y_W-1:0];
  end

  localparam logic signed [Y_W-1:0] O_MAX = Y_W'({1'b0, {(OUT_W-1){1'b1}}});
  localparam logic signed [Y_W-1:0] O_MIN = -O_MAX - 1;

  logic signed [Y_W-1:0] y_int;
  assign y_int = y1 >>> Y_FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1 <= '0;
      x2 <= '0;
      y1 <= '0;
      y2 <= '0;
    end else begin
      x1 <= x;
      x2 <= x1;
      y1 <= y_next;
      y2 <= y1;
    end
  end

  always_comb begin
    if (y_int > O_MAX)      y = O_MAX[OUT_W-1:0];
    else if (y_int < O_MIN) y = O_MIN[OUT_W-1:0];
    else                    y = y_int[OUT_W-1:0];
  end

endmodule
