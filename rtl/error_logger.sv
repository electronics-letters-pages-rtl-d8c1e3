// error_logger: error-interval acquisition for the burst-error test bed.
//
// Counts transmitted bits between successive decision errors reported by the
// error detector, and stores each interval in a buffer that the workstation
// reads out for analysis of the error activity (its autocorrelation is
// computed offline from these intervals).
//
// How it works: while `enable` is high, every bit tick advances an interval
// counter. A tick with `err` set ends an interval: counter + 1 (the number of
// bit periods since the previous error, 1 for errors on adjacent bits) is
// pushed into a FIFO and the counter restarts from zero. The first interval
// after `clear` is measured from the clear. Intervals longer than the counter
// saturate at all ones. When the FIFO is full further intervals are dropped
// and the sticky `overflow` flag is set. `clear` empties the FIFO, restarts
// the counter and clears `overflow`.
//
// Read port: `rd_en` while `level` is non-zero pops the oldest interval;
// it appears on rd_data with `rd_valid` one cycle later.
// Logging intervals between errors follows the test bed description; the
// counter width, buffer depth, saturation, overflow handling and the read
// interface are this design's choices.
module error_logger #(
  parameter int unsigned IW     = 16,  // interval counter width
  parameter int unsigned DEPTH_W = 10  // buffer of 2^DEPTH_W intervals
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tick,      // one pulse per received bit
  input  logic             err,       // decision error on this bit (with tick)
  input  logic             enable,
  input  logic             clear,
  input  logic             rd_en,
  output logic             rd_valid,
  output logic [IW-1:0]    rd_data,
  output logic [DEPTH_W:0] level,
  output logic             overflow
);
  localparam logic [IW-1:0] IMAX = '1;
  localparam int unsigned   DEPTH = 2 ** DEPTH_W;

  logic [IW-1:0]      buf_q [DEPTH];
  logic [DEPTH_W-1:0] wptr_q, rptr_q;
  logic [IW-1:0]      cnt_q, interval;
  logic               push, pop, full;

  assign interval = (cnt_q == IMAX) ? IMAX : cnt_q + 1'b1;
  assign full     = (level == (DEPTH_W + 1)'(DEPTH));
  assign push     = enable && tick && err && !clear && !full;
  assign pop      = rd_en && (level != '0) && !clear;

  always_ff @(posedge clk) begin
    if (push) buf_q[wptr_q] <= interval;
    if (pop)  rd_data <= buf_q[rptr_q];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q    <= '0;
      wptr_q   <= '0;
      rptr_q   <= '0;
      level    <= '0;
      overflow <= 1'b0;
      rd_valid <= 1'b0;
    end else begin
      rd_valid <= pop;
      if (clear) begin
        cnt_q    <= '0;
        wptr_q   <= '0;
        rptr_q   <= '0;
        level    <= '0;
        overflow <= 1'b0;
      end else begin
        if (enable && tick) begin
          if (err) cnt_q <= '0;
          else     cnt_q <= interval;
          if (err && full) overflow <= 1'b1;
        end
        if (push) wptr_q <= wptr_q + 1'b1;
        if (pop)  rptr_q <= rptr_q + 1'b1;
        level <= level + (DEPTH_W + 1)'(push) - (DEPTH_W + 1)'(pop);
      end
    end
  end

  a_no_push_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    push |-> !full);
endmodule
