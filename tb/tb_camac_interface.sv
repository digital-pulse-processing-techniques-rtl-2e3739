// tb_camac_interface: self-checking test of the CAMAC dataway slave.
//
// The testbench plays the crate controller: each dataway cycle sets N, A, F,
// waits 300 ns, samples R, Q and X, gives S1 and then S2 (200 ns each) and
// releases N. The buffer behind the interface is a queue in the testbench
// that pops on fifo_pop and empties on fifo_clr. Checked: reading the head
// (F0 A0) does not pop it; read-and-pop (F2 A0) returns the words in order
// and pops exactly one per cycle, and none when empty (Q = 0); word count
// and lost count (F0 A1, A2); LAM enable/disable/test (F26, F24, F8) and the
// L line; clear (F9); no X for an unknown command; Z and C with S2; and the
// inhibit line I.
module tb_camac_interface;
  import dpp_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic cam_n, cam_s1, cam_s2, cam_z, cam_c, cam_i;
  logic [3:0] cam_a;
  logic [4:0] cam_f;
  logic [CAMAC_W-1:0] cam_r;
  logic cam_q, cam_x, cam_l;
  peak_t head;
  logic fifo_empty, fifo_pop, fifo_clr, acq_enable;
  logic [9:0] fifo_count;
  logic [15:0] fifo_lost;

  int checks = 0, failures = 0;

  camac_interface dut (
    .clk(clk), .rst_n(rst_n),
    .cam_n(cam_n), .cam_a(cam_a), .cam_f(cam_f), .cam_s1(cam_s1), .cam_s2(cam_s2),
    .cam_z(cam_z), .cam_c(cam_c), .cam_i(cam_i),
    .cam_r(cam_r), .cam_q(cam_q), .cam_x(cam_x), .cam_l(cam_l),
    .head(head), .fifo_empty(fifo_empty), .fifo_count(fifo_count), .fifo_lost(fifo_lost),
    .fifo_pop(fifo_pop), .fifo_clr(fifo_clr), .acq_enable(acq_enable));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // buffer model
  peak_t q [$];
  int pops = 0;
  assign fifo_empty = (q.size() == 0);
  assign head       = (q.size() > 0) ? q[0] : '0;
  assign fifo_count = 10'(q.size());
  assign fifo_lost  = 16'd77;
  always @(posedge clk) begin
    if (fifo_clr) q.delete();
    else if (fifo_pop) begin
      pops++;
      if (q.size() > 0) void'(q.pop_front());
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  task automatic dataway(input int f, input int a, output logic [CAMAC_W-1:0] r,
                         output logic qq, output logic xx);
    cam_n = 1'b1; cam_f = 5'(f); cam_a = 4'(a);
    repeat (30) @(posedge clk);
    r = cam_r; qq = cam_q; xx = cam_x;
    cam_s1 = 1'b1; repeat (20) @(posedge clk);
    cam_s1 = 1'b0; repeat (10) @(posedge clk);
    cam_s2 = 1'b1; repeat (20) @(posedge clk);
    cam_s2 = 1'b0; repeat (5) @(posedge clk);
    cam_n = 1'b0; cam_f = '0; cam_a = '0;
    repeat (10) @(posedge clk);
  endtask

  task automatic unaddressed_s2(input bit z, input bit c);
    cam_z = z; cam_c = c;
    repeat (5) @(posedge clk);
    cam_s2 = 1'b1; repeat (20) @(posedge clk);
    cam_s2 = 1'b0; repeat (5) @(posedge clk);
    cam_z = 1'b0; cam_c = 1'b0;
    repeat (10) @(posedge clk);
  endtask

  function automatic peak_t mk(int amp, bit pu);
    peak_t p;
    p.amp = AMP_W'(amp);
    p.pileup = pu;
    return p;
  endfunction

  initial begin
    logic [CAMAC_W-1:0] r;
    logic qq, xx;
    peak_t exp_words [$];
    int pops_before;

    {cam_n, cam_s1, cam_s2, cam_z, cam_c, cam_i} = '0;
    cam_a = '0; cam_f = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (5) @(posedge clk);

    dataway(0, 0, r, qq, xx);
    check(!qq && xx, "F0 A0 on empty buffer: Q=0 X=1");
    check(r == '0 && cam_r == '0, "R lines idle");

    for (int i = 0; i < 5; i++) begin
      q.push_back(mk($urandom_range(0, 65535), i == 3));
      exp_words.push_back(q[$]);
    end
    repeat (5) @(posedge clk);
    check(!cam_l, "no LAM while disabled");
    dataway(8, 0, r, qq, xx);
    check(!qq && xx, "F8 test LAM while disabled");
    dataway(26, 0, r, qq, xx);
    check(qq && xx, "F26 enable LAM");
    repeat (5) @(posedge clk);
    check(cam_l, "LAM raised with data");
    dataway(8, 0, r, qq, xx);
    check(qq, "F8 sees LAM");

    dataway(0, 1, r, qq, xx);
    check(qq && r == 24'd5, $sformatf("F0 A1 count %0d", r));
    dataway(0, 2, r, qq, xx);
    check(qq && r == 24'd77, "F0 A2 lost count");

    dataway(0, 0, r, qq, xx);
    check(qq && r == peak_to_word(exp_words[0]), "F0 A0 head");
    dataway(0, 0, r, qq, xx);
    check(qq && r == peak_to_word(exp_words[0]) && q.size() == 5, "F0 A0 does not pop");

    for (int i = 0; i < 5; i++) begin
      pops_before = pops;
      dataway(2, 0, r, qq, xx);
      check(qq && xx && r == {exp_words[i].pileup, 7'd0, exp_words[i].amp},
            $sformatf("F2 A0 word %0d: %h", i, r));
      check(pops == pops_before + 1, "exactly one pop per F2");
    end
    check(!cam_l, "LAM drops when empty");
    pops_before = pops;
    dataway(2, 0, r, qq, xx);
    check(!qq && pops == pops_before, "F2 on empty: Q=0, no pop");

    dataway(16, 0, r, qq, xx);
    check(!xx && !qq, "unknown command: X=0");

    q.push_back(mk(1, 0)); q.push_back(mk(2, 0));
    dataway(9, 0, r, qq, xx);
    check(qq && q.size() == 0, "F9 clears");

    q.push_back(mk(3, 0));
    dataway(24, 0, r, qq, xx);
    repeat (5) @(posedge clk);
    check(qq && !cam_l, "F24 disables LAM");
    dataway(26, 0, r, qq, xx);
    unaddressed_s2(1, 0);
    check(q.size() == 0 && !cam_l, "Z.S2 clears and disables LAM");
    q.push_back(mk(4, 0));
    dataway(26, 0, r, qq, xx);
    unaddressed_s2(0, 1);
    check(q.size() == 0, "C.S2 clears");

    check(acq_enable, "acquisition enabled");
    cam_i = 1'b1;
    repeat (5) @(posedge clk);
    check(!acq_enable, "I inhibits");
    cam_i = 1'b0;
    repeat (5) @(posedge clk);
    check(acq_enable, "inhibit released");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
