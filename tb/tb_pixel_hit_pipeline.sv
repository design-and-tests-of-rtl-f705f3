// Testbench for pixel_hit_pipeline: random hits, frames, readout strobes and
// set/reset bits, checked cycle by cycle against a reference model of the
// waiting room / service room rules, plus directed cases for the set and
// reset pixel bits.
module tb_pixel_hit_pipeline;
  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start = 1'b0, dis_gated = 1'b0, set_pix = 1'b0, reset_pix = 1'b0;
  logic ack = 1'b0, rstrobe = 1'b0;
  logic req, waiting;
  int checks = 0, failures = 0;
  int n_forced = 0, n_masked = 0, n_cleared = 0;

  always #5 clk = ~clk;

  pixel_hit_pipeline dut (.clk, .rst_n, .frame_start, .dis_gated, .set_pix, .reset_pix,
                          .ack, .rstrobe, .req, .waiting);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic m_wr = 1'b0, m_sr = 1'b0;   // reference model state
  always @(posedge clk) if (rst_n) begin
    logic hit_frame;
    check(req == m_sr, "service room / request");
    check(waiting == (set_pix || (!reset_pix && m_wr)), "waiting room");
    hit_frame = m_wr || dis_gated;
    if (frame_start) begin
      m_sr <= set_pix ? 1'b1 : (reset_pix ? 1'b0 : hit_frame);
      if (set_pix && !hit_frame) n_forced++;
      if (!set_pix && reset_pix && hit_frame) n_masked++;
      m_wr <= 1'b0;
    end else begin
      m_wr <= hit_frame;
      if (ack && rstrobe && m_sr) begin m_sr <= 1'b0; n_cleared++; end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // Directed: one hit, then frame, then readout
    dis_gated = 1'b1; @(posedge clk); #1 dis_gated = 1'b0;
    repeat (3) @(posedge clk); #1;
    check(req == 1'b0, "no request before the frame ends");
    frame_start = 1'b1; @(posedge clk); #1 frame_start = 1'b0;
    check(req == 1'b1, "request after frame boundary");
    rstrobe = 1'b1; @(posedge clk); #1 rstrobe = 1'b0;
    check(req == 1'b1, "RStrobe without ack ignored");
    ack = 1'b1; rstrobe = 1'b1; @(posedge clk); #1 ack = 1'b0; rstrobe = 1'b0;
    check(req == 1'b0, "RStrobe with ack clears");
    // Random phase
    for (int c = 0; c < 30000; c++) begin
      @(posedge clk); #1;
      frame_start = ($urandom_range(0, 15) == 0);
      dis_gated   = ($urandom_range(0, 40) == 0);
      ack         = $urandom_range(0, 1);
      rstrobe     = ($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 300) == 0) set_pix   = ~set_pix;
      if ($urandom_range(0, 300) == 0) reset_pix = ~reset_pix;
    end
    @(posedge clk); #1;
    check(n_forced > 0, "set pixel forced an empty pixel into readout");
    check(n_masked > 0, "reset pixel removed a hit pixel");
    check(n_cleared > 0, "RStrobe cleared requests");
    $display("forced=%0d masked=%0d cleared=%0d", n_forced, n_masked, n_cleared);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
