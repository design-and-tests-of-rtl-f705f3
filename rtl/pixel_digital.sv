// pixel_digital: the digital (lower-tier) part of one VIPIC1 pixel.
//
// Chains the blocks of the pixel: its configuration segment, the frame-
// boundary hit gate, the waiting-room / service-room pipeline and the two
// alternating counters. The service room drives the readout request (req,
// inXX) to the group's priority encoder; when the encoder selects this pixel
// (ack, aXX) the pixel puts the count of the finished frame on the group
// bus, and RStrobe clears the request. On the chip the bus is driven by
// tri-state buffers; here a pixel that is not selected drives zeros and the
// group ORs all pixels. The analog configuration bits go out on acfg to the
// analog tier. aXX is active high here (active low on the chip).
module pixel_digital
  import vipic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              frame_start,
  input  logic              dis_in,
  input  logic              cfg_shift,
  input  logic              cfg_din,
  input  logic              cfg_load,
  output logic              cfg_dout,
  input  logic              ack,
  input  logic              rstrobe,
  output logic              req,
  output logic [CNT_W-1:0]  count_bus,
  output pix_acfg_t         acfg
);

  pix_cfg_t         cfg;
  logic             dis_gated, hit_edge;
  logic [CNT_W-1:0] rd_count;

  pixel_config_reg u_cfg (
    .clk, .rst_n, .cfg_shift, .cfg_din, .cfg_load, .cfg_dout, .cfg
  );

  pixel_hit_gate u_gate (
    .clk, .rst_n, .frame_start, .dis_in, .dis_gated, .hit_edge
  );

  pixel_hit_pipeline u_pipe (
    .clk, .rst_n, .frame_start, .dis_gated,
    .set_pix   (cfg.set_pix),
    .reset_pix (cfg.reset_pix),
    .ack, .rstrobe, .req,
    .waiting   ()
  );

  pixel_counters #(.CNT_W(CNT_W)) u_cnt (
    .clk, .rst_n, .frame_start, .hit_edge,
    .count_en  (~cfg.reset_pix),
    .rd_count,
    .sel       ()
  );

  assign count_bus = ack ? rd_count : '0;
  assign acfg      = cfg.acfg;

endmodule
