// vipic1_top: digital tier of the VIPIC1 X-ray photon imaging chip.
//
// A 64 x 64 pixel matrix records, for every coarse time frame set by the
// external TS_Clk, which pixels saw a photon and how many (5-bit counters,
// two per pixel so counting never stops). The matrix is split into 16 groups
// of 4 rows x 64 columns; every group has its own priority-encoder
// sparsifier and serializer, and all 16 serial lines run in parallel from
// Serial_Clk. In sparsified mode each hit pixel of a frame yields a 16-bit
// record (010 START, counter, 8-bit address); in imaging mode every pixel is
// forced into the readout with its set-pixel bit and the record stops after
// the counter. One configuration shift chain runs through all pixels, group 0
// first.
//
// Ports: dis_in[r*64+c] are the discriminator outputs of the analog tier;
// acfg[r*64+c] the trim and mode bits sent back to it; sdata[g] the serial
// line of group g (rows 4g..4g+3) towards its LVDS driver. The analog tier
// and LVDS drivers are not logic and stay outside this module.
module vipic1_top
  import vipic_pkg::*;
#(
  parameter int unsigned NGROUPS = GROUPS,
  parameter int unsigned ROWS    = GROUP_ROWS,
  parameter int unsigned NCOLS   = COLS
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          ts_clk,
  input  logic [NGROUPS*ROWS*NCOLS-1:0] dis_in,
  input  logic                          cfg_shift,
  input  logic                          cfg_din,
  input  logic                          cfg_load,
  output logic                          cfg_dout,
  input  logic                          imaging,
  input  logic                          rd_en,
  output logic [NGROUPS-1:0]            sdata,
  output pix_acfg_t                     acfg [NGROUPS*ROWS*NCOLS]
);

  localparam int unsigned GPIX = ROWS * NCOLS;

  logic             frame_start;
  logic [NGROUPS:0] chain;

  frame_sync u_fsync (.clk, .rst_n, .ts_clk, .frame_start);

  assign chain[0] = cfg_din;
  assign cfg_dout = chain[NGROUPS];

  for (genvar g = 0; g < NGROUPS; g++) begin : grp
    pix_acfg_t g_acfg [GPIX];

    pixel_group #(.ROWS(ROWS), .NCOLS(NCOLS)) u_group (
      .clk, .rst_n, .frame_start,
      .dis_in   (dis_in[g*GPIX +: GPIX]),
      .cfg_shift, .cfg_load,
      .cfg_din  (chain[g]),
      .cfg_dout (chain[g+1]),
      .imaging, .rd_en,
      .sdata    (sdata[g]),
      .acfg     (g_acfg)
    );

    for (genvar p = 0; p < GPIX; p++) begin : ac
      assign acfg[g*GPIX + p] = g_acfg[p];
    end
  end

endmodule
