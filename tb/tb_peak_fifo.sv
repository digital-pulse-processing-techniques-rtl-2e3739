// tb_peak_fifo: self-checking test of the peak buffer.
//
// A queue in the testbench is the reference. Random writes and reads (with a
// write-heavy phase that overflows the FIFO and a read-heavy phase that
// drains it) are applied at the clock; after every clock the head word,
// empty, full, count and the lost-event count are compared with the
// reference. A clear in the middle must empty the FIFO and zero the lost
// count. Uses the default depth of 512.
module tb_peak_fifo;

  localparam int W = 17, DL = 9, DEPTH = 1 << DL;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clr, wr_en, rd_en, empty, full;
  logic [W-1:0]  wr_data, rd_data;
  logic [DL:0]   count;
  logic [15:0]   lost;

  int checks = 0, failures = 0;

  peak_fifo dut (.clk(clk), .rst_n(rst_n), .clr(clr), .wr_en(wr_en), .wr_data(wr_data),
                 .rd_en(rd_en), .rd_data(rd_data), .empty(empty), .full(full),
                 .count(count), .lost(lost));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] q [$];
  int lost_ref = 0;
  int n_full = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", msg);
    end
  endtask

  task automatic cycle_once(input bit w, input bit r, input bit c);
    wr_en = w; rd_en = r; clr = c;
    wr_data = W'($urandom);
    #1;
    // reference update, using the state before the edge
    if (c) begin
      q.delete();
      lost_ref = 0;
    end else begin
      bit was_full = (q.size() == DEPTH);
      bit was_empty = (q.size() == 0);
      if (r && !was_empty) void'(q.pop_front());
      if (w && !was_full) q.push_back(wr_data);
      if (w && was_full) lost_ref++;
    end
    @(posedge clk);
    #1;
    check(int'(count) == q.size(), $sformatf("count %0d expected %0d", count, q.size()));
    check(empty == (q.size() == 0), "empty");
    check(full == (q.size() == DEPTH), "full");
    check(int'(lost) == lost_ref, $sformatf("lost %0d expected %0d", lost, lost_ref));
    if (q.size() > 0) check(rd_data == q[0], "head word");
    if (full) n_full++;
  endtask

  initial begin
    wr_en = 0; rd_en = 0; clr = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(empty && !full && count == 0, "empty after reset");

    for (int i = 0; i < 2000; i++) cycle_once($urandom_range(0, 9) < 8, $urandom_range(0, 9) < 3, 0);
    check(n_full > 0, "the FIFO was filled");
    for (int i = 0; i < 2000; i++) cycle_once($urandom_range(0, 9) < 3, $urandom_range(0, 9) < 8, 0);
    for (int i = 0; i < 1000; i++) cycle_once($urandom_range(0, 1), $urandom_range(0, 1), 0);
    cycle_once(1, 0, 1);
    for (int i = 0; i < 1500; i++) cycle_once($urandom_range(0, 9) < 7, $urandom_range(0, 9) < 3, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
