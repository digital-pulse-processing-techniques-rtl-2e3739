// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// Pulse `start` with `num` and `den`; `busy` is high for N_W clocks, then
// `done` pulses for one clock with `quo` = num / den (truncated) valid from
// then until the next start. A zero divisor gives an all-ones quotient.
// Used by the fall-time detector, which needs one division per measurement
// block and has thousands of clocks to spare.
module seq_divider #(
  parameter int N_W = 48,   // dividend and quotient width
  parameter int D_W = 32    // divisor width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N_W-1:0] num,
  input  logic [D_W-1:0] den,
  output logic           busy,
  output logic           done,
  output logic [N_W-1:0] quo
);

  localparam int CNT_W = $clog2(N_W + 1);

  logic [N_W-1:0]   q;        // dividend shifting out, quotient shifting in
  logic [D_W-1:0]   r;        // partial remainder, always below d
  logic [D_W-1:0]   d;
  logic [CNT_W-1:0] cnt;

  logic [D_W:0] r_shift, r_sub;
  assign r_shift = {r, q[N_W-1]};
  assign r_sub   = r_shift - {1'b0, d};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= '0;
      r    <= '0;
      d    <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      quo  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        q    <= num;
        r    <= '0;
        d    <= den;
        cnt  <= CNT_W'(N_W);
        busy <= 1'b1;
      end else if (busy) begin
        if (!r_sub[D_W]) begin
          r <= r_sub[D_W-1:0];
          q <= {q[N_W-2:0], 1'b1};
        end else begin
          r <= r_shift[D_W-1:0];
          q <= {q[N_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quo  <= !r_sub[D_W] ? {q[N_W-2:0], 1'b1} : {q[N_W-2:0], 1'b0};
        end
      end
    end
  end

  // A new division may only be started while the divider is idle.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);

endmodule
