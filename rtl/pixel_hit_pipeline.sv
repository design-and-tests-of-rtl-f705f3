// pixel_hit_pipeline: the pixel's single-stage hit pipeline.
//
// The "waiting room" flip-flop is set by the (gated) discriminator level and
// so records that the pixel saw at least one hit in the current time frame.
// At the frame boundary its content moves into the "service room", which
// raises the readout request (inXX) to the group's sparsifier, and the
// waiting room starts empty for the new frame; hits keep being accepted
// without dead time. The service room is cleared by RStrobe while the pixel
// is selected (ack, the sparsifier's aXX), handing the readout to the next
// pixel. set_pix forces the waiting room high (the pixel is read every frame,
// even with no hits); reset_pix, when set_pix is low, forces it low and so
// removes the pixel from readout.
//
// Timing: a hit seen in the frame_start cycle still belongs to the frame that
// ends; req rises in the cycle after frame_start. frame_start wins over a
// simultaneous RStrobe. An unread request is overwritten by the next frame.
// Toggle flip-flops with asynchronous hit removal on the chip are modelled as
// synchronous set/clear flip-flops.
module pixel_hit_pipeline (
  input  logic clk,
  input  logic rst_n,
  input  logic frame_start,
  input  logic dis_gated,
  input  logic set_pix,
  input  logic reset_pix,
  input  logic ack,
  input  logic rstrobe,
  output logic req,
  output logic waiting
);

  logic wr_q;        // waiting room
  logic sr_q;        // service room
  logic wr_now;      // waiting room content including this cycle's level

  assign wr_now  = set_pix | (~reset_pix & (wr_q | dis_gated));
  assign waiting = set_pix | (~reset_pix & wr_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q <= 1'b0;
      sr_q <= 1'b0;
    end else if (frame_start) begin
      sr_q <= wr_now;
      wr_q <= 1'b0;
    end else begin
      wr_q <= wr_q | dis_gated;
      if (ack && rstrobe) sr_q <= 1'b0;
    end
  end

  assign req = sr_q;

endmodule
