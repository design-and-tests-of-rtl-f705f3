// Testbench for frame_sync: drives TS_Clk with random high and low times,
// unrelated to the serial clock, and checks one single-cycle frame_start per
// rising edge of TS_Clk, two to three clocks after it.
module tb_frame_sync;
  logic clk = 1'b0, rst_n = 1'b0, ts_clk = 1'b0;
  logic frame_start;
  int checks = 0, failures = 0;
  int rises = 0, pulses = 0;
  time last_rise;

  always #5 clk = ~clk;

  frame_sync dut (.clk, .rst_n, .ts_clk, .frame_start);

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %0t: %s", $time, msg); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic fs_q = 1'b0;
  always @(posedge clk) begin
    if (frame_start) begin
      pulses++;
      check(!fs_q, "pulse lasts one cycle");
      check($time - last_rise >= 10 && $time - last_rise <= 31,
            $sformatf("latency %0t", $time - last_rise));
    end
    fs_q <= frame_start;
  end

  initial begin
    #23 rst_n = 1'b1;
    for (int i = 0; i < 500; i++) begin
      #($urandom_range(40, 300));
      ts_clk = 1'b1; rises++; last_rise = $time;
      #($urandom_range(40, 300));
      ts_clk = 1'b0;
    end
    #100;
    check(pulses == rises, $sformatf("pulses %0d rises %0d", pulses, rises));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
