// Testbench for pixel_group at the chip's size (4 x 64 pixels). Loads a
// random per-pixel configuration (some set-pixel, some reset-pixel bits)
// through the chain, then runs frames of random discriminator activity. For
// each frame a reference predicts which pixels must be read and their
// counters; the serial stream of the frame must list exactly those pixels, in
// ascending address order, 16 clocks apart. An imaging-mode frame with every
// set-pixel bit on must deliver all 256 counters in 8-clock records. Also
// checks the analog configuration outputs and the chain output.
module tb_pixel_group;
  import vipic_pkg::*;
  localparam int ROWS = 4, NCOLS = 64, NPIX = ROWS * NCOLS;
  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start = 1'b0;
  logic [NPIX-1:0] dis_in = '0;
  logic cfg_shift = 1'b0, cfg_din = 1'b0, cfg_load = 1'b0, cfg_dout;
  logic imaging = 1'b0, rd_en = 1'b1, sdata;
  pix_acfg_t acfg [NPIX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pixel_group #(.ROWS(ROWS), .NCOLS(NCOLS)) dut (
    .clk, .rst_n, .frame_start, .dis_in, .cfg_shift, .cfg_din, .cfg_load, .cfg_dout,
    .imaging, .rd_en, .sdata, .acfg);

  serial_rx rx (.clk, .sdata, .imaging);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pix_cfg_t cfg [NPIX];

  // Chain enters at pixel 0: the last pixel's word is sent first, MSB first.
  task automatic configure();
    logic [CFG_W-1:0] w;
    for (int p = NPIX-1; p >= 0; p--) begin
      w = cfg[p];
      for (int i = CFG_W-1; i >= 0; i--) begin
        cfg_din = w[i]; cfg_shift = 1'b1; @(posedge clk); #1;
      end
    end
    cfg_shift = 1'b0; cfg_load = 1'b1; @(posedge clk); #1; cfg_load = 1'b0;
  endtask

  int edges [NPIX];
  logic [NPIX-1:0] dis_prev = '0;

  // One frame: `len` cycles of random pulses on the pixels in `active`, then
  // the boundary. Counts rising edges per pixel for the reference.
  task automatic frame(input int len, input int rate, input logic [NPIX-1:0] active);
    foreach (edges[p]) edges[p] = 0;
    for (int c = 0; c <= len; c++) begin
      for (int p = 0; p < NPIX; p++)
        if (active[p] && $urandom_range(0, rate) == 0) dis_in[p] = ~dis_in[p];
      for (int p = 0; p < NPIX; p++) if (dis_in[p] && !dis_prev[p]) edges[p]++;
      dis_prev = dis_in;
      frame_start = (c == len);
      @(posedge clk); #1;
    end
    frame_start = 1'b0;
  endtask

  task automatic check_readout(input string tag);
    int exp_addr[$];
    int exp_cnt[$];
    for (int p = 0; p < NPIX; p++) begin
      if (cfg[p].set_pix || (!cfg[p].reset_pix && edges[p] > 0)) begin
        exp_addr.push_back(p);
        exp_cnt.push_back(cfg[p].reset_pix ? 0 : edges[p] % 32);
      end
    end
    check(rx.recs[0].size() == exp_addr.size(),
          $sformatf("%s: %0d records, expected %0d", tag, rx.recs[0].size(), exp_addr.size()));
    for (int i = 0; i < exp_addr.size() && i < rx.recs[0].size(); i++) begin
      if (!imaging) check(int'(rx.recs[0][i].addr) == exp_addr[i],
                          $sformatf("%s rec %0d addr %0d exp %0d", tag, i, rx.recs[0][i].addr, exp_addr[i]));
      check(int'(rx.recs[0][i].cnt) == exp_cnt[i],
            $sformatf("%s rec %0d cnt %0d exp %0d", tag, i, rx.recs[0][i].cnt, exp_cnt[i]));
    end
    for (int i = 1; i < rx.starts[0].size(); i++)
      check(rx.starts[0][i] - rx.starts[0][i-1] == (imaging ? 8 : 16), $sformatf("%s: record spacing", tag));
    check(rx.bad_start[0] == 0, "START symbols");
  endtask

  initial begin
    logic [NPIX-1:0] active;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Sparsified mode: random set / reset bits and random hits
    foreach (cfg[p]) begin
      cfg[p] = pix_cfg_t'($urandom);
      cfg[p].set_pix   = ($urandom_range(0, 40) == 0);
      cfg[p].reset_pix = ($urandom_range(0, 20) == 0);
    end
    configure();
    foreach (cfg[p]) check(acfg[p] == cfg[p].acfg, "analog configuration");
    frame(20, 1000, '0);
    repeat (NPIX * 8 + 40) @(posedge clk);
    for (int f = 0; f < 6; f++) begin
      active = '0;
      for (int p = 0; p < NPIX; p++) active[p] = ($urandom_range(0, 6) == 0);
      frame(600, 40, active);
      #1 rx.clear();
      dis_in = '0; dis_prev = '0;   // quiet frame while reading
      repeat (NPIX * 16 + 40) @(posedge clk); #1;
      check_readout($sformatf("sparse frame %0d", f));
      frame(0, 1000, '0);           // empty frame closes the quiet one
      repeat (NPIX * 16 + 40) @(posedge clk); #1;
    end
    // Imaging mode: all pixels set
    foreach (cfg[p]) begin cfg[p].set_pix = 1'b1; end
    configure();
    imaging = 1'b1;
    frame(0, 1000, '0);
    repeat (NPIX * 8 + 40) @(posedge clk); #1;
    frame(800, 30, '1);
    #1 rx.clear();
    dis_in = '0; dis_prev = '0;
    repeat (NPIX * 8 + 40) @(posedge clk); #1;
    check_readout("imaging");
    check(rx.starts[0].size() == NPIX && rx.starts[0][NPIX-1] - rx.starts[0][0] == (NPIX - 1) * 8,
          "imaging readout of a group takes 256 x 8 clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
