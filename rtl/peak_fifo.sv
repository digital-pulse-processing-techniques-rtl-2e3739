// peak_fifo: the write-out buffer between the peak detector and the readout.
//
// Peaks arrive at random times at the sample clock, while the CAMAC readout
// takes them one dataway cycle (about 1 us) at a time. This synchronous
// first-word-fall-through FIFO absorbs the bursts. The reference system names the data
// write-out logic but gives no buffer size; DEPTH_LOG2 = 9 (512 words) is
// this design's choice. The head is read asynchronously from the array, so
// the memory maps to distributed (LUT) RAM rather than block RAM.
//
// Writes (`wr_en`) and reads (`rd_en`, which pops the head) take effect on the
// rising clock edge; both may happen in the same clock. `rd_data` always shows
// the head word while `empty` is low. A write into a full FIFO is dropped and
// counted in `lost` (saturating), so the readout can tell that events were
// lost. `clr` empties the FIFO and zeroes `lost`.
module peak_fifo #(
  parameter int WIDTH      = 17,
  parameter int DEPTH_LOG2 = 9,
  parameter int LOST_W     = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clr,
  input  logic                  wr_en,
  input  logic [WIDTH-1:0]      wr_data,
  input  logic                  rd_en,
  output logic [WIDTH-1:0]      rd_data,
  output logic                  empty,
  output logic                  full,
  output logic [DEPTH_LOG2:0]   count,
  output logic [LOST_W-1:0]     lost
);

  localparam int DEPTH = 1 << DEPTH_LOG2;

  logic [WIDTH-1:0]      mem [DEPTH];
  logic [DEPTH_LOG2:0]   wr_ptr, rd_ptr;   // one extra wrap bit

  assign count   = wr_ptr - rd_ptr;
  assign empty   = (wr_ptr == rd_ptr);
  assign full    = (count == (DEPTH_LOG2+1)'(DEPTH));
  assign rd_data = mem[rd_ptr[DEPTH_LOG2-1:0]];

  logic do_wr, do_rd;
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[DEPTH_LOG2-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      lost   <= '0;
    end else if (clr) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      lost   <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
      if (wr_en && full && lost != '1) lost <= lost + 1'b1;
    end
  end

  // The occupancy never exceeds the depth; the head is never read when empty.
  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= (DEPTH_LOG2+1)'(DEPTH));
  a_no_underrun: assert property (@(posedge clk) disable iff (!rst_n) do_rd |-> !empty);

endmodule
