// sparsifier: binary-tree priority encoder of one pixel group.
//
// Information flows through the tree twice. Upwards, every node ORs its two
// children, so the root gives HIT: some pixel of the group waits for readout.
// Downwards, the Back signal (HIT looped back, gated by back_en) enters at the
// root and each node passes it to its lower-numbered child if that child has
// a request, otherwise to the other child. Exactly one leaf, the requesting
// pixel with the lowest index, receives it as its grant (aXX). The binary
// address of that pixel is decoded from the grants. This is the structure of
// the chip's encoder; its dynamic NAND/NOR stages with tri-state buffers are
// replaced by static gates.
//
// Purely combinational. N must be a power of two; addr is $clog2(N) bits.
module sparsifier #(
  parameter int unsigned N  = 256,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic [N-1:0]  req,
  input  logic          back_en,
  output logic          hit,
  output logic [N-1:0]  grant,
  output logic [AW-1:0] addr
);

  localparam int unsigned LEVELS = $clog2(N);

  // Level l of the tree has 2**l nodes; level LEVELS are the leaves.
  for (genvar l = 0; l <= LEVELS; l++) begin : lv
    logic [(1 << l)-1:0] up;   // OR of the requests below the node
    logic [(1 << l)-1:0] dn;   // Back signal reaching the node
  end

  assign lv[LEVELS].up = req;

  for (genvar l = 0; l < LEVELS; l++) begin : tree
    for (genvar k = 0; k < (1 << l); k++) begin : node
      assign lv[l].up[k]       = lv[l+1].up[2*k] | lv[l+1].up[2*k+1];
      assign lv[l+1].dn[2*k]   = lv[l].dn[k] &  lv[l+1].up[2*k];
      assign lv[l+1].dn[2*k+1] = lv[l].dn[k] & ~lv[l+1].up[2*k];
    end
  end

  assign hit         = lv[0].up[0];
  assign lv[0].dn[0] = hit & back_en;
  assign grant       = lv[LEVELS].dn;

  // Address decoder: bit b is set if the granted leaf index has bit b set.
  always_comb begin
    addr = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (grant[i]) addr = addr | AW'(i);
    end
  end

endmodule
