// mc_layer: one inner layer of an MCluster together with the fixed Modified
// Omega link that feeds it from the layer before.
//
// Each of the W cell outputs of the previous layer has a fan-out of two; the
// 2*W lines are perfectly shuffled and paired into the A and B inputs of the
// W cells of this layer (mcfpga_pkg::omega_src): cell j takes cell j/2 on A
// and cell (j+W)/2 on B. The link is not configurable: the topology is fixed
// by the architect. For W = 3 the connectivity is the document's
// cross-connectivity matrix
//   X = [1 1 0; 1 0 1; 0 1 1]  (row = cell of this layer, column = source),
// for W = 2 every cell sees both previous outputs. The formula for other
// widths and the A/B assignment are this design's choices.
//
// cfg holds one 3-bit cell code per cell, cell j at cfg[j*3 +: 3].
// Purely combinational: one cell delay from y_prev to y.
module mc_layer
  import mcfpga_pkg::*;
#(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0]            y_prev,   // outputs of the previous layer
  input  logic [W*LC_CFG_W-1:0]   cfg,
  output logic [W-1:0]            y
);

  logic [W-1:0] a, b;

  for (genvar j = 0; j < W; j++) begin : g_cell
    assign a[j] = y_prev[omega_src(W, j, 0)];
    assign b[j] = y_prev[omega_src(W, j, 1)];
    ufg_lc u_lc (
      .a   (a[j]),
      .b   (b[j]),
      .cfg (cfg[j*LC_CFG_W +: LC_CFG_W]),
      .y   (y[j])
    );
  end

endmodule
