// Testbench for pixel_counters: random hit trains over many frames. The
// reference counts hits per frame; after each boundary rd_count must equal
// that frame's hits modulo 32, the counters must swap exactly when the frame
// had hits, and disabled counting must leave the count at zero.
module tb_pixel_counters;
  localparam int CNT_W = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_start = 1'b0, hit_edge = 1'b0, count_en = 1'b1;
  logic [CNT_W-1:0] rd_count;
  logic sel;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_swap = 0, n_hold = 0;

  always #5 clk = ~clk;

  pixel_counters #(.CNT_W(CNT_W)) dut (.clk, .rst_n, .frame_start, .hit_edge, .count_en, .rd_count, .sel);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits, len;
    logic sel_before;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int f = 0; f < 600; f++) begin
      len = $urandom_range(5, 120);
      hits = 0;
      count_en = ($urandom_range(0, 9) != 0);
      // Frame with a random number of hits; some frames overflow the counter
      for (int c = 0; c < len; c++) begin
        hit_edge = ($urandom_range(0, 2) == 0) && (f % 7 != 3);
        if (hit_edge && count_en) hits++;
        @(posedge clk); #1;
        hit_edge = 1'b0;
        if ($urandom_range(0, 1) == 0) begin @(posedge clk); #1; end
      end
      // Boundary cycle, optionally with a hit (belongs to the ending frame)
      hit_edge = ($urandom_range(0, 4) == 0);
      if (hit_edge && count_en) hits++;
      sel_before = sel;
      frame_start = 1'b1; @(posedge clk); #1;
      frame_start = 1'b0; hit_edge = 1'b0;
      check(rd_count == CNT_W'(hits), $sformatf("frame %0d count %0d expected %0d", f, rd_count, hits % 32));
      check((sel != sel_before) == (hits > 0), "swap only after a frame with hits");
      if (hits >= 32) n_wrap++;
      if (hits > 0) n_swap++; else n_hold++;
    end
    check(n_wrap > 0 && n_swap > 0 && n_hold > 0, "wrap, swap and hold all exercised");
    $display("wraps=%0d swaps=%0d holds=%0d", n_wrap, n_swap, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
