// Testbench for pixel_hit_gate: random discriminator pulses over random frame
// boundaries. A reference model counts the rising edges of the raw
// discriminator and marks, per pulse, whether it started before the last
// frame boundary; the gated level must be low for the remainder of such a
// pulse and each pulse must give exactly one hit_edge.
module tb_pixel_hit_gate;
  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start = 1'b0, dis_in = 1'b0;
  logic dis_gated, hit_edge;
  int checks = 0, failures = 0;
  int spans = 0;

  always #5 clk = ~clk;

  pixel_hit_gate dut (.clk, .rst_n, .frame_start, .dis_in, .dis_gated, .hit_edge);

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

  // Reference: pulse_old = current pulse started before a frame boundary
  logic dis_prev = 1'b0, pulse_old = 1'b0;
  int edges_ref = 0, edges_dut = 0;

  always @(posedge clk) if (rst_n) begin
    // Evaluate the outputs for this cycle (inputs were set after the last edge)
    check(dis_gated == (dis_in && !pulse_old), "gated level");
    check(hit_edge == (dis_in && !dis_prev && !pulse_old), "hit edge");
    if (dis_in && !dis_prev) edges_ref++;
    if (hit_edge) edges_dut++;
    // Next-state of the reference
    if (frame_start && dis_in) begin pulse_old <= 1'b1; spans++; end
    else if (!dis_in) pulse_old <= 1'b0;
    dis_prev <= dis_in;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 20000; c++) begin
      @(posedge clk); #1;
      frame_start = ($urandom_range(0, 19) == 0);
      if ($urandom_range(0, 5) == 0) dis_in = ~dis_in;
    end
    @(posedge clk); #1;
    check(edges_ref == edges_dut, $sformatf("pulse count %0d vs %0d", edges_dut, edges_ref));
    check(spans > 10, "pulses spanning frame boundaries occurred");
    $display("boundary-spanning pulses: %0d", spans);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
