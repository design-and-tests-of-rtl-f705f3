// pixel_counters: the pixel's two alternating event counters.
//
// Two CNT_W-bit counters take turns: one counts discriminator hits of the
// current frame while the other holds the count of the previous frame for
// readout (rd_count). To save switching power they swap at a frame boundary
// only if the counting one registered a hit during the frame; the counter
// that takes over counting starts from zero. When no swap happens the held
// counter is cleared instead, so a pixel read out through its set-pixel bit
// reports 0 for an empty frame. Counters wrap around with no overflow
// protection, as on the chip (ripple counters there, synchronous here).
// count_en low (reset-pixel bit) stops counting.
//
// Timing: a hit in the frame_start cycle counts in the ending frame; rd_count
// shows the finished frame from the cycle after frame_start until the next.
// The clearing rules are this design's choice.
module pixel_counters #(
  parameter int unsigned CNT_W = vipic_pkg::CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             frame_start,
  input  logic             hit_edge,
  input  logic             count_en,
  output logic [CNT_W-1:0] rd_count,
  output logic             sel
);

  logic [CNT_W-1:0] cnt_q [2];
  logic             sel_q;
  logic             hit_seen_q;   // counting counter registered a hit this frame
  logic             inc;

  assign inc = hit_edge & count_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q[0]   <= '0;
      cnt_q[1]   <= '0;
      sel_q      <= 1'b0;
      hit_seen_q <= 1'b0;
    end else begin
      if (inc) cnt_q[sel_q] <= cnt_q[sel_q] + 1'b1;
      if (frame_start) begin
        hit_seen_q <= 1'b0;
        // The idle counter is cleared either way: it becomes the counting one
        // after a swap, or is the held (empty) one otherwise.
        cnt_q[~sel_q] <= '0;
        if (hit_seen_q || inc) sel_q <= ~sel_q;
      end else if (inc) begin
        hit_seen_q <= 1'b1;
      end
    end
  end

  assign sel      = sel_q;
  assign rd_count = cnt_q[~sel_q];

endmodule
