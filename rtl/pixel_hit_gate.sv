// pixel_hit_gate: suppresses double registration of a hit at a frame boundary.
//
// A discriminator pulse that is still high when a new time frame starts has
// already been registered in the ending frame. At each frame_start the gate
// flip-flop samples the discriminator; if it is high the discriminator is
// masked until its falling edge clears the flip-flop. This follows the
// chip's circuit (one D flip-flop, muxes acting as gates); here the flip-flop
// is clocked by the serial clock instead of TS_Clk and the discriminator.
//
// Outputs: dis_gated is the masked level; hit_edge pulses for one clock on
// each rising edge of dis_gated (one per counted hit). dis_in is sampled once
// per clock, so pulses must last at least one clock period (front-end pulses
// last hundreds of ns against a 10 ns clock). Latency: combinational for
// dis_gated, hit_edge in the cycle the level is first seen high.
module pixel_hit_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic frame_start,
  input  logic dis_in,
  output logic dis_gated,
  output logic hit_edge
);

  logic gate_q;     // 1: pulse spans the frame boundary, keep it masked
  logic gated_q;    // dis_gated one clock earlier

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_q  <= 1'b0;
      gated_q <= 1'b0;
    end else begin
      if (frame_start)  gate_q <= dis_in;
      else if (!dis_in) gate_q <= 1'b0;
      gated_q <= dis_gated;
    end
  end

  assign dis_gated = dis_in & ~gate_q;
  assign hit_edge  = dis_gated & ~gated_q;

endmodule
