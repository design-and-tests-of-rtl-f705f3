// frame_sync: turns the external frame clock TS_Clk into frame_start.
//
// Time frames (10 us by default on the chip) are defined by the rising edges
// of TS_Clk, which comes from outside and is unrelated to Serial_Clk. The
// signal is passed through a two-flip-flop synchroniser and its rising edge
// becomes a one-cycle frame_start pulse for all pixels and groups.
// Latency: frame_start is high in the third clock cycle after TS_Clk rises
// (two synchroniser stages plus the edge register). Running the whole digital
// tier from Serial_Clk is this design's choice; the chip clocks its pixel
// flip-flops from TS_Clk directly.
module frame_sync (
  input  logic clk,
  input  logic rst_n,
  input  logic ts_clk,
  output logic frame_start
);

  logic [2:0] sync_q;   // [0],[1]: synchroniser, [2]: previous level

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync_q <= '0;
    else        sync_q <= {sync_q[1:0], ts_clk};
  end

  assign frame_start = sync_q[1] & ~sync_q[2];

endmodule
