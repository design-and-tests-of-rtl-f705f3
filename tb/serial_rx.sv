// serial_rx: receiver model for LINES serial output lines, used by
// testbenches. Samples the lines on the falling clock edge, finds each record
// by its START symbol 010 (a line idles low), and stores per line the counter
// and address of every record with the cycle at which it started. The record
// length follows the `imaging` input: 16 bits (START, counter, address) or
// 8 bits (START, counter). bad_start counts records whose START was not 010.
module serial_rx #(
  parameter int LINES = 1
) (
  input logic             clk,
  input logic [LINES-1:0] sdata,
  input logic             imaging
);
  typedef struct packed { logic [4:0] cnt; logic [7:0] addr; } rec_t;
  rec_t   recs   [LINES][$];
  longint starts [LINES][$];
  int     bad_start [LINES];
  int     pos [LINES];
  logic [15:0] sh [LINES];
  longint cyc = 0;

  initial for (int l = 0; l < LINES; l++) begin bad_start[l] = 0; pos[l] = 0; end

  function automatic void clear();
    for (int l = 0; l < LINES; l++) begin
      recs[l].delete();
      starts[l].delete();
    end
  endfunction

  always @(negedge clk) begin
    int len;
    cyc++;
    len = imaging ? 8 : 16;
    for (int l = 0; l < LINES; l++) begin
      if (pos[l] == 0) begin
        if (sdata[l]) begin pos[l] = 2; sh[l] = 16'b01; starts[l].push_back(cyc - 1); end
      end else begin
        sh[l] = {sh[l][14:0], sdata[l]};
        pos[l]++;
        if (pos[l] == len) begin
          logic [15:0] r;
          r = sh[l] << (16 - len);
          if (r[15:13] != 3'b010) bad_start[l]++;
          recs[l].push_back(rec_t'(r[12:0]));
          pos[l] = 0;
        end
      end
    end
  end
endmodule
