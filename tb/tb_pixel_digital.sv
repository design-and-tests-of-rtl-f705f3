// Testbench for pixel_digital: one complete pixel. The configuration is
// loaded through the serial chain, then random discriminator pulses run over
// many frames (pulses often straddle frame boundaries). For every finished
// frame a reference model predicts the readout request and the counter value
// (rising edges of the discriminator in that frame, modulo 32, with the
// set-pixel and reset-pixel rules); the bench then acts as the sparsifier,
// selects the pixel, checks the bus and strobes RStrobe.
module tb_pixel_digital;
  import vipic_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start = 1'b0, dis_in = 1'b0;
  logic cfg_shift = 1'b0, cfg_din = 1'b0, cfg_load = 1'b0, cfg_dout;
  logic ack = 1'b0, rstrobe = 1'b0, req;
  logic [CNT_W-1:0] count_bus;
  pix_acfg_t acfg;
  int checks = 0, failures = 0;
  int n_span = 0, n_wrap = 0, n_forced = 0, n_masked = 0;

  always #5 clk = ~clk;

  pixel_digital dut (.clk, .rst_n, .frame_start, .dis_in, .cfg_shift, .cfg_din, .cfg_load,
                     .cfg_dout, .ack, .rstrobe, .req, .count_bus, .acfg);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic configure(input pix_cfg_t c);
    for (int i = CFG_W-1; i >= 0; i--) begin
      cfg_din = c[i]; cfg_shift = 1'b1; @(posedge clk); #1;
    end
    cfg_shift = 1'b0; cfg_load = 1'b1; @(posedge clk); #1; cfg_load = 1'b0;
    check(acfg == c.acfg, "analog configuration reaches the analog tier");
  endtask

  // Run one frame of `len` cycles with random pulses, then a boundary.
  // Returns the number of discriminator rising edges in the frame.
  logic dis_prev = 1'b0;
  task automatic frame(input int len, input int rate, output int edges);
    edges = 0;
    for (int c = 0; c < len; c++) begin
      if ($urandom_range(0, rate) == 0) dis_in = ~dis_in;
      if (dis_in && !dis_prev) edges++;
      dis_prev = dis_in;
      @(posedge clk); #1;
    end
    if ($urandom_range(0, 2) == 0) dis_in = ~dis_in;   // boundary cycle
    if (dis_in && !dis_prev) edges++;
    dis_prev = dis_in;
    if (dis_in) n_span++;
    frame_start = 1'b1; @(posedge clk); #1; frame_start = 1'b0;
  endtask

  initial begin
    pix_cfg_t c;
    int edges, exp_cnt;
    logic exp_req;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < 12; k++) begin
      c = pix_cfg_t'($urandom);
      c.set_pix   = (k % 4 == 1);
      c.reset_pix = (k % 4 == 2) || (k % 6 == 1);
      configure(c);
      frame(40, 6, edges);          // settle: first frame after reconfiguration
      ack = 1'b1; rstrobe = 1'b1; @(posedge clk); #1; ack = 1'b0; rstrobe = 1'b0;
      for (int f = 0; f < 60; f++) begin
        frame($urandom_range(10, 300), (f % 5 == 0) ? 1 : $urandom_range(3, 40), edges);
        exp_req = c.set_pix || (!c.reset_pix && edges > 0);
        exp_cnt = c.reset_pix ? 0 : edges % 32;
        if (!c.reset_pix && edges >= 32) n_wrap++;
        if (c.set_pix && edges == 0) n_forced++;
        if (c.reset_pix && !c.set_pix && edges > 0) n_masked++;
        check(req == exp_req, $sformatf("cfg %0d frame %0d req %b exp %b", k, f, req, exp_req));
        check(count_bus == '0, "bus idle when not selected");
        ack = 1'b1; #1;
        check(count_bus == CNT_W'(exp_cnt),
              $sformatf("cfg %0d frame %0d count %0d exp %0d", k, f, count_bus, exp_cnt));
        rstrobe = 1'b1; @(posedge clk); #1; ack = 1'b0; rstrobe = 1'b0;
        check(req == 1'b0, "RStrobe clears the request");
      end
    end
    check(n_span > 0 && n_wrap > 0 && n_forced > 0 && n_masked > 0, "all pixel mechanisms exercised");
    $display("span=%0d wrap=%0d forced=%0d masked=%0d", n_span, n_wrap, n_forced, n_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
