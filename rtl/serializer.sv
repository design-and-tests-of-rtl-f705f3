// serializer: readout sequencer and serializer of one pixel group.
//
// Whenever the group's sparsifier reports HIT, the serializer takes a record
// from the selected pixel: the START symbol 010, the pixel's 5-bit counter
// and, in sparsified mode, its 8-bit address. In the same cycle it pulses
// RStrobe, which clears the pixel's request so that the priority encoder
// moves on to the next pixel while the record is being shifted out. Records
// go out MSB first, one bit per Serial_Clk, back to back, so a hit pixel costs
// 16 clocks (160 ns at 100 MHz). In imaging mode the record stops after the
// counter (8 bits), which is how the chip skips addresses when every pixel
// is read. rd_en low holds off new records (the gating of the HIT-to-Back
// loop) without cutting a record short; the line idles at 0.
//
// Timing: a record captured at edge t appears on sdata during cycles
// t+1 .. t+len; the next record is captured at the edge that ends cycle
// t+len, while the last bit is on the line, so there is no gap. Generating
// RStrobe here, and the bit order, are this design's choices.
module serializer
  import vipic_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hit,
  input  logic [CNT_W-1:0]  count_bus,
  input  logic [ADDR_W-1:0] addr,
  input  logic              imaging,
  input  logic              rd_en,
  output logic              back_en,
  output logic              rstrobe,
  output logic              sdata
);

  localparam int unsigned SR_W  = REC_SPARSE;
  localparam int unsigned REM_W = $clog2(SR_W + 1);

  logic [SR_W-1:0]  shreg;
  logic [REM_W-1:0] remain;    // bits of the current record still to send
  logic             capture;

  // Ready for a new record when idle or when the last bit is on the line.
  assign capture = hit && rd_en && (remain <= REM_W'(1));
  assign back_en = rd_en;
  assign rstrobe = capture;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg  <= '0;
      remain <= '0;
    end else if (capture) begin
      if (imaging) begin
        shreg  <= {START_SYM, count_bus, ADDR_W'(0)};
        remain <= REM_W'(REC_IMAGING);
      end else begin
        shreg  <= {START_SYM, count_bus, addr};
        remain <= REM_W'(REC_SPARSE);
      end
    end else if (remain != '0) begin
      shreg  <= {shreg[SR_W-2:0], 1'b0};
      remain <= remain - 1'b1;
    end
  end

  assign sdata = (remain != '0) ? shreg[SR_W-1] : 1'b0;

endmodule
