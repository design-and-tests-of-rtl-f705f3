// pixel_group: one of the chip's readout groups, ROWS x NCOLS pixels.
//
// All pixels of a group share one priority-encoder sparsifier and one
// serializer (with its LVDS line). Each frame, the pixels whose service room
// holds a hit request readout; the sparsifier selects the lowest-addressed
// one, the serializer takes its counter and address and strobes RStrobe, and
// so on until no request is left. The pixel buses are the chip's tri-state
// lines, rebuilt as an OR of per-pixel gated outputs. The configuration
// chain enters at pixel 0 and leaves at the last pixel.
//
// Pixel address inside the group = row * NCOLS + column (this numbering, and
// the chain order, are this design's choice). dis_in and acfg are indexed by
// that address.
module pixel_group
  import vipic_pkg::*;
#(
  parameter int unsigned ROWS = GROUP_ROWS,
  parameter int unsigned NCOLS = COLS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 frame_start,
  input  logic [ROWS*NCOLS-1:0] dis_in,
  input  logic                 cfg_shift,
  input  logic                 cfg_din,
  input  logic                 cfg_load,
  output logic                 cfg_dout,
  input  logic                 imaging,
  input  logic                 rd_en,
  output logic                 sdata,
  output pix_acfg_t            acfg [ROWS*NCOLS]
);

  localparam int unsigned NPIX = ROWS * NCOLS;
  localparam int unsigned AW   = $clog2(NPIX);

  logic [NPIX-1:0]   req, grant;
  logic [NPIX:0]     chain;
  logic [CNT_W-1:0]  pix_count [NPIX];
  logic [CNT_W-1:0]  count_bus;
  logic [AW-1:0]     sp_addr;
  logic              hit, back_en, rstrobe;

  assign chain[0] = cfg_din;
  assign cfg_dout = chain[NPIX];

  for (genvar p = 0; p < NPIX; p++) begin : pix
    pixel_digital u_pix (
      .clk, .rst_n, .frame_start,
      .dis_in    (dis_in[p]),
      .cfg_shift, .cfg_load,
      .cfg_din   (chain[p]),
      .cfg_dout  (chain[p+1]),
      .ack       (grant[p]),
      .rstrobe,
      .req       (req[p]),
      .count_bus (pix_count[p]),
      .acfg      (acfg[p])
    );
  end

  // Shared counter bus: only the selected pixel drives non-zero bits.
  always_comb begin
    count_bus = '0;
    for (int unsigned p = 0; p < NPIX; p++) count_bus |= pix_count[p];
  end

  sparsifier #(.N(NPIX), .AW(AW)) u_sparse (
    .req, .back_en, .hit, .grant, .addr (sp_addr)
  );

  serializer u_ser (
    .clk, .rst_n, .hit, .count_bus,
    .addr    (ADDR_W'(sp_addr)),
    .imaging, .rd_en, .back_en, .rstrobe, .sdata
  );

endmodule
