// Testbench for pixel_config_reg: shifts random words through a chain of two
// segments, checks that the applied configuration only changes on cfg_load,
// that each segment ends up with the word meant for it, and that bits leave
// the chain in the order they entered.
module tb_pixel_config_reg;
  import vipic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_shift = 1'b0, cfg_din = 1'b0, cfg_load = 1'b0;
  logic mid, dout;
  pix_cfg_t cfg0, cfg1;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pixel_config_reg u0 (.clk, .rst_n, .cfg_shift, .cfg_din, .cfg_load, .cfg_dout(mid),  .cfg(cfg0));
  pixel_config_reg u1 (.clk, .rst_n, .cfg_shift, .cfg_din(mid), .cfg_load, .cfg_dout(dout), .cfg(cfg1));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Shift a word MSB first; returns the bits seen at the chain output.
  task automatic shift_word(input logic [CFG_W-1:0] w, output logic [CFG_W-1:0] seen);
    for (int i = CFG_W-1; i >= 0; i--) begin
      cfg_din = w[i]; cfg_shift = 1'b1;
      seen[i] = dout;
      @(posedge clk); #1;
    end
    cfg_shift = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CFG_W-1:0] wa, wb, seen, prev_a;
    pix_cfg_t snap;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(cfg0 == '0 && cfg1 == '0, "reset value");
    prev_a = '0;
    for (int it = 0; it < 40; it++) begin
      wa = CFG_W'($urandom); wb = CFG_W'($urandom);
      // The first word sent ends in the far segment (u1).
      shift_word(wa, seen);
      if (it > 0) check(seen == prev_a, $sformatf("chain output order it=%0d", it));
      snap = cfg1;
      shift_word(wb, seen);
      check(cfg1 == snap, "shadow unchanged while shifting");
      cfg_load = 1'b1; @(posedge clk); #1 cfg_load = 1'b0;
      check(cfg1 == pix_cfg_t'(wa), $sformatf("far segment %h vs %h", cfg1, wa));
      check(cfg0 == pix_cfg_t'(wb), $sformatf("near segment %h vs %h", cfg0, wb));
      check(cfg0.set_pix == wb[CFG_W-1] && cfg0.reset_pix == wb[CFG_W-2] &&
            cfg0.acfg.fb_trim == wb[11:9] && cfg0.acfg.thr_trim == wb[8:2],
            "field layout");
      prev_a = wa;
      // Shadow must hold when shifting without load
      shift_word(CFG_W'($urandom), seen);
      check(cfg1 == pix_cfg_t'(wa), "shadow holds without load");
      check(seen == wa, "far word leaves the chain first");
      prev_a = wb;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
