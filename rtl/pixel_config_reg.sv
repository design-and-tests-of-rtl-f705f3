// pixel_config_reg: one pixel's segment of the serial configuration chain.
//
// The chip is configured by a single shift register that runs through every
// pixel. Each pixel holds CFG_W bits of it: the 12-bit analog configuration
// (feedback trim, threshold trim, mode bits) and the set-pixel / reset-pixel
// bits. Shifting does not disturb the running pixel: the bits that act on the
// pixel come from shadow latches, updated from the shift stage only when
// cfg_load is pulsed, as on the chip.
//
// Interface: while cfg_shift is high the segment shifts one bit per clock,
// cfg_din entering at the least significant end and cfg_dout leaving from the
// most significant end, so the first bit sent ends up as the MSB of the last
// pixel in the chain. cfg_load copies the stage into `cfg` on the next edge.
// Shadow latches are modelled as flip-flops; reset clears both stages (the
// reset value and the bit order are this design's choices).
module pixel_config_reg
  import vipic_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cfg_shift,
  input  logic     cfg_din,
  input  logic     cfg_load,
  output logic     cfg_dout,
  output pix_cfg_t cfg
);

  logic [CFG_W-1:0] stage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage <= '0;
    end else if (cfg_shift) begin
      stage <= {stage[CFG_W-2:0], cfg_din};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
    end else if (cfg_load) begin
      cfg <= pix_cfg_t'(stage);
    end
  end

  assign cfg_dout = stage[CFG_W-1];

endmodule
