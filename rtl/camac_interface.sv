// camac_interface: CAMAC dataway slave of the pulse processor module. The
// data acquisition system reads the detected peaks through it.
//
// The reference system reads its peaks out over CAMAC but gives no command set; the one
// below follows common CAMAC module practice and is this design's choice.
// Commands, valid while the station line N is high:
//   F0  A0  read head peak word            Q = FIFO not empty
//   F0  A1  read FIFO word count           Q = 1
//   F0  A2  read lost-event count          Q = 1
//   F2  A0  read head peak word and pop it Q = FIFO not empty (pop on S2)
//   F8  A0  test LAM                       Q = LAM pending
//   F9  A0  clear FIFO and lost count      Q = 1 (on S1)
//   F24 A0  disable LAM                    Q = 1 (on S1)
//   F26 A0  enable LAM                     Q = 1 (on S1)
// X is high for these commands and low for any other. LAM (L) is raised
// while LAM is enabled and the FIFO holds data. Without N: Z with S2
// initialises (clears the FIFO, disables LAM); C with S2 clears the FIFO;
// I (inhibit) stops new peaks from being stored while it is high.
// The peak word carries the pile-up flag in bit 23 and the amplitude in bits
// 15..0.
//
// Timing: the dataway is asynchronous to the sample clock. Every dataway input
// goes through a two-flip-flop synchroniser; the command lines settle long
// before S1 (CAMAC allows several hundred ns), so sampling them bit by bit is
// safe. Actions on S1 or S2 happen once, on the synchronised rising edge of
// the strobe, 3 clocks after the strobe line rises. R, Q and X follow the
// synchronised command with 2 clocks of delay; R is zero when not reading.
module camac_interface
  import dpp_pkg::*;
#(
  parameter int CNT_W  = 10,   // FIFO count width
  parameter int LOST_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // dataway (positive logic)
  input  logic               cam_n,
  input  logic [3:0]         cam_a,
  input  logic [4:0]         cam_f,
  input  logic               cam_s1,
  input  logic               cam_s2,
  input  logic               cam_z,
  input  logic               cam_c,
  input  logic               cam_i,
  output logic [CAMAC_W-1:0] cam_r,
  output logic               cam_q,
  output logic               cam_x,
  output logic               cam_l,
  // FIFO side
  input  peak_t              head,
  input  logic               fifo_empty,
  input  logic [CNT_W-1:0]   fifo_count,
  input  logic [LOST_W-1:0]  fifo_lost,
  output logic               fifo_pop,
  output logic               fifo_clr,
  output logic               acq_enable
);

  typedef struct packed {
    logic       n;
    logic [3:0] a;
    logic [4:0] f;
    logic       s1;
    logic       s2;
    logic       z;
    logic       c;
    logic       i;
  } dataway_t;

  dataway_t dw_in, dw_m, dw;
  logic     s1_d, s2_d;     // strobes one clock later, for edge detection
  assign dw_in = '{n: cam_n, a: cam_a, f: cam_f, s1: cam_s1, s2: cam_s2,
                   z: cam_z, c: cam_c, i: cam_i};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dw_m <= '0;
      dw   <= '0;
      s1_d <= 1'b0;
      s2_d <= 1'b0;
    end else begin
      dw_m <= dw_in;
      dw   <= dw_m;
      s1_d <= dw.s1;
      s2_d <= dw.s2;
    end
  end

  logic s1_rise, s2_rise;
  assign s1_rise = dw.s1 && !s1_d;
  assign s2_rise = dw.s2 && !s2_d;

  // command decode
  logic cmd_rd_head, cmd_rd_cnt, cmd_rd_lost, cmd_rd_pop;
  logic cmd_test_lam, cmd_clear, cmd_lam_off, cmd_lam_on;
  always_comb begin
    cmd_rd_head  = dw.n && dw.f == 5'd0  && dw.a == 4'd0;
    cmd_rd_cnt   = dw.n && dw.f == 5'd0  && dw.a == 4'd1;
    cmd_rd_lost  = dw.n && dw.f == 5'd0  && dw.a == 4'd2;
    cmd_rd_pop   = dw.n && dw.f == 5'd2  && dw.a == 4'd0;
    cmd_test_lam = dw.n && dw.f == 5'd8  && dw.a == 4'd0;
    cmd_clear    = dw.n && dw.f == 5'd9  && dw.a == 4'd0;
    cmd_lam_off  = dw.n && dw.f == 5'd24 && dw.a == 4'd0;
    cmd_lam_on   = dw.n && dw.f == 5'd26 && dw.a == 4'd0;
  end

  logic lam_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lam_en <= 1'b0;
    end else if (dw.z && s2_rise) begin
      lam_en <= 1'b0;
    end else if (s1_rise) begin
      if (cmd_lam_off) lam_en <= 1'b0;
      if (cmd_lam_on)  lam_en <= 1'b1;
    end
  end

  assign cam_l      = lam_en && !fifo_empty;
  assign acq_enable = !dw.i;
  assign fifo_clr   = (s1_rise && cmd_clear) || (s2_rise && (dw.z || dw.c));
  assign fifo_pop   = s2_rise && cmd_rd_pop && !fifo_empty;

  always_comb begin
    cam_r = '0;
    cam_q = 1'b0;
    cam_x = 1'b1;
    if (cmd_rd_head || cmd_rd_pop) begin
      cam_r = peak_to_word(head);
      cam_q = !fifo_empty;
    end else if (cmd_rd_cnt) begin
      cam_r = CAMAC_W'(fifo_count);
      cam_q = 1'b1;
    end else if (cmd_rd_lost) begin
      cam_r = CAMAC_W'(fifo_lost);
      cam_q = 1'b1;
    end else if (cmd_test_lam) begin
      cam_q = cam_l;
    end else if (cmd_clear || cmd_lam_off || cmd_lam_on) begin
      cam_q = 1'b1;
    end else begin
      cam_x = 1'b0;
    end
  end

  // Rules of the buffer handshake: a pop is a single-clock pulse, never
  // asked of an empty buffer, and never coincides with a clear.
  a_pop_pulse: assert property (@(posedge clk) disable iff (!rst_n) fifo_pop |=> !fifo_pop);
  a_pop_data:  assert property (@(posedge clk) disable iff (!rst_n) fifo_pop |-> !fifo_empty);
  a_pop_clr:   assert property (@(posedge clk) disable iff (!rst_n) !(fifo_pop && fifo_clr));

endmodule
