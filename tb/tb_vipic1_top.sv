// End-to-end testbench of vipic1_top at the chip's full size (64 x 64 pixels,
// 16 groups, 16 serial lines), with the top's default parameters.
//
// The whole configuration chain (4096 x 14 bits) is loaded serially. TS_Clk
// is driven as an external frame clock. Scenarios:
//  * ring mask: a ring of pixels with the set-pixel bit, all others with the
//    reset-pixel bit; first with no discriminator activity (ring read with
//    zero counts), then with noise hits on every pixel (only the ring is
//    read, with its counts);
//  * sparsified mode at low occupancy, with a hot pixel whose counter wraps,
//    discriminator pulses held across frame boundaries, reset pixels, and a
//    frame in which readout is held off with rd_en;
//  * imaging mode: every pixel set, all 4096 counters read, 8 clocks per
//    pixel on each line.
// Every frame's 16 serial streams are decoded and compared with a reference
// built from the discriminator activity the bench generated. Each mechanism
// is counted, and one that never happened counts as a failure.
module tb_vipic1_top;
  import vipic_pkg::*;
  localparam int NG = 16, GPIX = 256, NPIX = NG * GPIX;
  logic clk = 1'b0, rst_n = 1'b0, ts_clk = 1'b0;
  logic [NPIX-1:0] dis_in = '0;
  logic cfg_shift = 1'b0, cfg_din = 1'b0, cfg_load = 1'b0, cfg_dout;
  logic imaging = 1'b0, rd_en = 1'b1;
  logic [NG-1:0] sdata;
  pix_acfg_t acfg [NPIX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;   // Serial_Clk, 100 MHz

  vipic1_top dut (.clk, .rst_n, .ts_clk, .dis_in, .cfg_shift, .cfg_din, .cfg_load, .cfg_dout,
                  .imaging, .rd_en, .sdata, .acfg);

  serial_rx #(.LINES(NG)) rx (.clk, .sdata, .imaging);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters
  int n_sparse = 0, n_imaging = 0, n_forced = 0, n_masked = 0, n_span = 0;
  int n_wrap = 0, n_stall = 0, n_ring = 0, n_gap = 0;
  bit gap_ok = 1'b0;
  int g_active [NG];

  pix_cfg_t cfg [NPIX];        // configuration being prepared
  pix_cfg_t cfg_loaded [NPIX]; // configuration loaded in the chip
  pix_cfg_t cfg_exp [NPIX];    // configuration at the last frame boundary
  int   edges [NPIX];
  int   exp_edges [NPIX];     // activity of the frame being read out
  logic [NPIX-1:0] dis_prev = '0;

  task automatic configure();
    logic [CFG_W-1:0] w;
    for (int p = NPIX-1; p >= 0; p--) begin
      w = cfg[p];
      for (int i = CFG_W-1; i >= 0; i--) begin
        cfg_din = w[i]; cfg_shift = 1'b1; @(posedge clk); #1;
      end
    end
    cfg_shift = 1'b0; cfg_load = 1'b1; @(posedge clk); #1; cfg_load = 1'b0;
    cfg_loaded = cfg;
  endtask

  task automatic toggle(input int p);
    dis_in[p] = ~dis_in[p];
    if (dis_in[p]) edges[p]++;
  endtask

  // Expected readout of each group for the frame whose activity is exp_edges
  function automatic int group_records(input int g);
    int n = 0;
    for (int a = 0; a < GPIX; a++) begin
      int p = g * GPIX + a;
      if (cfg_exp[p].set_pix || (!cfg_exp[p].reset_pix && exp_edges[p] > 0)) n++;
    end
    return n;
  endfunction

  // Compare what the 16 lines delivered with the frame in exp_edges.
  task automatic check_frame(input string tag);
    for (int g = 0; g < NG; g++) begin
      int i = 0;
      check(rx.bad_start[g] == 0, "START symbols");
      for (int a = 0; a < GPIX; a++) begin
        int p = g * GPIX + a;
        int ec;
        if (cfg_exp[p].set_pix || (!cfg_exp[p].reset_pix && exp_edges[p] > 0)) begin
          ec = cfg_exp[p].reset_pix ? 0 : exp_edges[p] % 32;
          if (i < rx.recs[g].size()) begin
            if (!imaging) check(int'(rx.recs[g][i].addr) == a,
                                $sformatf("%s g%0d rec %0d addr %0d exp %0d", tag, g, i, rx.recs[g][i].addr, a));
            check(int'(rx.recs[g][i].cnt) == ec,
                  $sformatf("%s g%0d addr %0d cnt %0d exp %0d", tag, g, a, rx.recs[g][i].cnt, ec));
          end
          if (cfg_exp[p].set_pix && exp_edges[p] == 0) n_forced++;
          if (!cfg_exp[p].reset_pix && exp_edges[p] >= 32) n_wrap++;
          i++;
        end else if (cfg_exp[p].reset_pix && exp_edges[p] > 0) n_masked++;
      end
      check(rx.recs[g].size() == i,
            $sformatf("%s g%0d: %0d records, expected %0d", tag, g, rx.recs[g].size(), i));
      for (int k = 1; k < rx.starts[g].size(); k++) begin
        longint d = rx.starts[g][k] - rx.starts[g][k-1];
        if (gap_ok && d > 16) n_gap++;   // readout held off between records
        else check(d == (imaging ? 8 : 16), $sformatf("%s g%0d record spacing", tag, g));
      end
      if (imaging) n_imaging += rx.recs[g].size();
      else         n_sparse  += rx.recs[g].size();
      if (rx.recs[g].size() > 0) g_active[g]++;
    end
  endtask

  // One time frame of `len` clocks: random activity (`toggles` per clock on
  // random pixels of `mask`), a quiet margin, the TS_Clk edge, and the check
  // of the readout of the previous frame, which ran during this one.
  task automatic frame(input int len, input int toggles, input logic [NPIX-1:0] mask,
                       input string tag, input bit do_check = 1'b1);
    int rl = readout_len();
    if (len < rl) len = rl;     // the frame must outlast the previous readout
    for (int c = 0; c < len; c++) begin
      logic [NPIX-1:0] prev;
      int tl[$];
      prev = dis_in;
      for (int k = 0; k < toggles; k++) begin
        int p = $urandom_range(0, NPIX-1);
        if (mask[p]) begin dis_in[p] = ~dis_in[p]; tl.push_back(p); end
      end
      // a pixel toggled twice in one clock makes no pulse
      foreach (tl[i]) if (dis_in[tl[i]] && !prev[tl[i]]) begin
        edges[tl[i]]++;
        prev[tl[i]] = 1'b1;
      end
      @(posedge clk); #1;
    end
    repeat (8) @(posedge clk);
    #1;
    if (do_check) check_frame(tag);
    rx.clear();
    foreach (edges[p]) begin
      if (dis_in[p]) n_span++;     // pulse still high at the boundary
      exp_edges[p] = edges[p];
      cfg_exp[p] = cfg_loaded[p];
      edges[p] = 0;
    end
    ts_clk = 1'b1;
    repeat (8) @(posedge clk);
    #1 ts_clk = 1'b0;
  endtask

  // Frame long enough to read out the previous one
  function automatic int readout_len();
    int m = 0;
    for (int g = 0; g < NG; g++) if (group_records(g) > m) m = group_records(g);
    return m * (imaging ? 8 : 16) + 40;
  endfunction

  initial begin
    logic [NPIX-1:0] none, all;
    int r2;
    none = '0; all = '1;
    foreach (edges[p]) begin edges[p] = 0; exp_edges[p] = 0; end
    foreach (g_active[g]) g_active[g] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- Ring mask (set / reset pixel bits) --------------------------------
    foreach (cfg[p]) begin
      cfg[p] = pix_cfg_t'($urandom);
      r2 = (p / 64 - 32) * (p / 64 - 32) + (p % 64 - 32) * (p % 64 - 32);
      cfg[p].set_pix   = (r2 >= 16 * 16 && r2 <= 24 * 24);
      cfg[p].reset_pix = !cfg[p].set_pix;
      if (cfg[p].set_pix) n_ring++;
    end
    configure();
    foreach (cfg[p]) if (acfg[p] != cfg[p].acfg) check(1'b0, "analog configuration");
    check(1'b1, "analog configuration");
    // chain output: the next bits out are the first word sent (pixel 4095)
    for (int i = CFG_W-1; i >= 0; i--) begin
      check(cfg_dout == cfg[NPIX-1][i], "configuration chain output");
      cfg_shift = 1'b1; cfg_din = 1'b0; @(posedge clk); #1;
    end
    cfg_shift = 1'b0;
    frame(20, 0, none, "start", 1'b0);
    frame(readout_len(), 0, none, "ring/front end off");        // ring, zero counts
    frame(readout_len(), 0, none, "ring/front end off");
    frame(600, 12, all, "ring/noise");                           // noise hits everywhere
    frame(readout_len(), 0, none, "ring/noise");                 // ring with counts

    // ---- Sparsified mode, low occupancy --------------------------------------
    foreach (cfg[p]) begin
      cfg[p].set_pix   = 1'b0;
      cfg[p].reset_pix = ($urandom_range(0, 30) == 0);
    end
    configure();
    frame(readout_len(), 0, none, "sparse/reconfigure");
    for (int f = 0; f < 4; f++) begin
      // hot pixel with > 32 pulses, plus a pulse straddling the boundary
      for (int k = 0; k < 40 + f; k++) begin
        toggle(100 + f); @(posedge clk); #1; toggle(100 + f); @(posedge clk); #1;
      end
      if (!dis_in[2000 + f]) toggle(2000 + f);
      frame(1200, 2, all, $sformatf("sparse %0d", f));
      toggle(2000 + f);                      // falls in the next frame
      check(1'b1, "boundary pulse released");
    end
    // readout held off at the start of a frame
    frame(1000, 2, all, "sparse/stall");
    rd_en = 1'b0;
    repeat (300) @(posedge clk);
    #1 check(sdata == '0, "no output while readout is held");
    n_stall++;
    rd_en = 1'b1;
    gap_ok = 1'b1;
    frame(readout_len(), 0, none, "sparse/after stall");
    gap_ok = 1'b0;
    frame(readout_len(), 0, none, "sparse/quiet");

    // ---- Imaging mode ---------------------------------------------------------
    foreach (cfg[p]) begin cfg[p].set_pix = 1'b1; cfg[p].reset_pix = 1'b0; end
    configure();
    imaging = 1'b1;
    frame(readout_len(), 0, none, "imaging/setup", 1'b0);
    frame(2200, 20, all, "imaging/empty");
    frame(2200, 0, none, "imaging 1");
    check(rx.starts[0].size() == 0, "receivers cleared");
    frame(2200, 0, none, "imaging 2");

    // ---- Mechanism coverage ----------------------------------------------------
    $display("held-off record gaps: %0d", n_gap);
    $display("records: sparse=%0d imaging=%0d forced=%0d masked=%0d span=%0d wrap=%0d stall=%0d ring=%0d",
             n_sparse, n_imaging, n_forced, n_masked, n_span, n_wrap, n_stall, n_ring);
    check(n_sparse > 0, "sparsified readout happened");
    check(n_imaging >= 2 * NPIX, "imaging readout of the whole matrix happened");
    check(n_forced > 0, "set pixel forced readout happened");
    check(n_masked > 0, "reset pixel masking happened");
    check(n_span > 0, "pulse across a frame boundary happened");
    check(n_wrap > 0, "counter wrap-around happened");
    check(n_stall > 0 && n_gap > 0, "readout hold-off happened and delayed records");
    foreach (g_active[g]) check(g_active[g] > 0, $sformatf("group %0d delivered data", g));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
