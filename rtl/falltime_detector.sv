// falltime_detector: automatic pole-zero adjustment. It measures how fast the
// preamplifier pulses fall and turns that into the a1 coefficient of the
// shaping filter, so the filter's zero sits on the preamplifier's pole.
//
// The reference system detects the fall time automatically in hardware; the method
// below is this design's own. A preamplifier tail after baseline subtraction
// is x(k) = A*p^k. Summing N samples of it gives
//     S = x(0) + ... + x(N-1) = (x(0) - x(N)) / (1 - p),
// so 1 - p = (x(0) - x(N)) / S holds exactly for any window length N and
// needs no logarithm or root. The detector:
//   1. finds a pulse edge: x(n) - x(n-RISE_D) > rise_thr;
//   2. waits SKIP samples past the last rising sample, so the window starts on
//      the falling tail;
//   3. sums 2^WIN_LOG2 tail samples and takes x(0) and x(N); a new edge inside
//      the window (pile-up) drops that window and restarts at step 2;
//   4. adds x(0)-x(N) and S over 2^AVG_LOG2 pulses, to average out noise;
//   5. divides (seq_divider) to get q = 1-p in Q.30, and publishes
//      p = 1 - q and a1 = -a0*p. Blocks whose result would give p outside
//      (0,1) are discarded.
// It then starts over, so p follows slow drifts.
//
// Interface: x is the baseline-subtracted sample, one per clock. `p` and `a1`
// are Q2.30; `pz_valid` goes high after the first accepted block and stays
// high; `update` pulses once per accepted block. a1 follows a0 with one clock
// of latency. A measurement block takes about 2^AVG_LOG2 pulses plus
// NUM_W+COEF_FRAC clocks of division.
// Only the low COEF_W bits of the quotient are used: blocks are accepted only
// when num < den, so the quotient is at most 2^30 and the upper bits are
// always zero (lint reports them as unused).
module falltime_detector
  import dpp_pkg::*;
#(
  parameter int X_W      = SAMP_W,
  parameter int WIN_LOG2 = 10,   // tail window, 2^WIN_LOG2 samples
  parameter int AVG_LOG2 = 4,    // pulses per measurement block, 2^AVG_LOG2
  parameter int SKIP     = 64,   // samples from the edge to the window start
  parameter int RISE_D   = 4     // edge detector difference distance
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [X_W-1:0]    x,
  input  logic [X_W-2:0]           rise_thr,
  input  logic signed [COEF_W-1:0] a0,
  output logic signed [COEF_W-1:0] p,         // measured pole, Q2.30
  output logic signed [COEF_W-1:0] a1,        // -a0*p, Q2.30
  output logic                     pz_valid,
  output logic                     update
);

  localparam int WIN    = 1 << WIN_LOG2;
  localparam int NUM_W  = X_W + 2 + AVG_LOG2;             // sum of x(0)-x(N)
  localparam int DEN_W  = X_W + 1 + WIN_LOG2 + AVG_LOG2;  // sum of tail samples
  localparam int DIVN_W = NUM_W + COEF_FRAC;
  localparam int SKIP_W = $clog2(SKIP + 1);
  localparam int WCNT_W = WIN_LOG2 + 1;

  typedef enum logic [1:0] {S_IDLE, S_SKIP, S_WINDOW} state_t;
  state_t state;

  // ---- edge detection ----------------------------------------------------
  logic signed [X_W-1:0] xd [RISE_D];
  logic signed [X_W:0]   slope;
  logic                  edge_det;

  assign slope    = (X_W+1)'(x) - (X_W+1)'(xd[RISE_D-1]);
  assign edge_det = slope > $signed({2'b00, rise_thr});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < RISE_D; i++) xd[i] <= '0;
    end else begin
      xd[0] <= x;
      for (int i = 1; i < RISE_D; i++) xd[i] <= xd[i-1];
    end
  end

  // ---- tail window -------------------------------------------------------
  logic [SKIP_W-1:0]         skip_cnt;
  logic [WCNT_W-1:0]         win_cnt;
  logic signed [X_W-1:0]     x_first;
  logic signed [DEN_W-1:0]   win_sum;
  logic                      win_done;     // one-clock strobe
  logic signed [NUM_W-1:0]   win_num;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      skip_cnt <= '0;
      win_cnt  <= '0;
      x_first  <= '0;
      win_sum  <= '0;
      win_done <= 1'b0;
      win_num  <= '0;
    end else begin
      win_done <= 1'b0;
      unique case (state)
        S_IDLE: if (edge_det) begin
          state    <= S_SKIP;
          skip_cnt <= SKIP_W'(SKIP);
        end
        S_SKIP: begin
          if (edge_det)               skip_cnt <= SKIP_W'(SKIP);
          else if (skip_cnt > 1)      skip_cnt <= skip_cnt - 1'b1;
          else begin
            state   <= S_WINDOW;
            win_cnt <= '0;
          end
        end
        S_WINDOW: begin
          if (edge_det) begin            // pile-up: restart on the new pulse
            state    <= S_SKIP;
            skip_cnt <= SKIP_W'(SKIP);
          end else if (win_cnt == WCNT_W'(WIN)) begin
            win_num  <= NUM_W'(x_first) - NUM_W'(x);
            win_done <= 1'b1;
            state    <= S_IDLE;
          end else begin
            if (win_cnt == '0) begin
              x_first <= x;
              win_sum <= DEN_W'(x);
            end else begin
              win_sum <= win_sum + DEN_W'(x);
            end
            win_cnt <= win_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- block averaging and division -------------------------------------
  logic signed [NUM_W-1:0]  acc_num;
  logic signed [DEN_W-1:0]  acc_den;
  logic [AVG_LOG2:0]        acc_cnt;
  logic                     div_start, div_busy, div_done;
  logic [DIVN_W-1:0]        div_num, div_quo;
  logic [DEN_W-1:0]         div_den;

  logic signed [NUM_W-1:0]  nxt_num;
  logic signed [DEN_W-1:0]  nxt_den;
  assign nxt_num = acc_num + win_num;
  assign nxt_den = acc_den + win_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_num   <= '0;
      acc_den   <= '0;
      acc_cnt   <= '0;
      div_start <= 1'b0;
      div_num   <= '0;
      div_den   <= '0;
    end else begin
      div_start <= 1'b0;
      if (win_done) begin
        if (acc_cnt == (AVG_LOG2+1)'((1 << AVG_LOG2) - 1)) begin
          acc_num <= '0;
          acc_den <= '0;
          acc_cnt <= '0;
          // accept only 0 < num < den, i.e. 0 < p < 1
          if (nxt_num > 0 && nxt_den > DEN_W'(nxt_num) && !div_busy) begin
            div_start <= 1'b1;
            div_num   <= DIVN_W'(nxt_num) << COEF_FRAC;
            div_den   <= nxt_den;
          end
        end else begin
          acc_num <= nxt_num;
          acc_den <= nxt_den;
          acc_cnt <= acc_cnt + 1'b1;
        end
      end
    end
  end

  seq_divider #(.N_W(DIVN_W), .D_W(DEN_W)) u_div (
    .clk   (clk),
    .rst_n (rst_n),
    .start (div_start),
    .num   (div_num),
    .den   (div_den),
    .busy  (div_busy),
    .done  (div_done),
    .quo   (div_quo)
  );

  // ---- publish p and a1 -------------------------------------------------
  localparam logic signed [COEF_W-1:0] ONE = COEF_W'(1) <<< COEF_FRAC;
  logic signed [2*COEF_W-1:0] prod;
  assign prod = (2*COEF_W)'(a0) * (2*COEF_W)'(p);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p        <= ONE;
      a1       <= '0;
      pz_valid <= 1'b0;
      update   <= 1'b0;
    end else begin
      update <= div_done;
      if (div_done) begin
        p        <= ONE - COEF_W'(div_quo);
        pz_valid <= 1'b1;
      end
      a1 <= COEF_W'(-((prod + ((2*COEF_W)'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC));
    end
  end

endmodule
