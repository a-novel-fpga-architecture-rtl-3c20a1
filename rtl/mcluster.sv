// mcluster: D x W matrix cluster of ultrafine-grain logic cells.
//
// Cells are arranged in D layers of W cells. Layer 0 takes its 2*W inputs
// straight from the cluster inputs (cell j gets in[2j] as A and in[2j+1] as
// B). Each later layer is fed only by the layer before it through the fixed
// Modified Omega link (mc_layer), so there are no jumps across layers and no feedback.
// The W outputs of the last layer are the cluster outputs. There is no
// pipelining or signal restoration between layers: the cluster is one
// combinational block.
//
// cfg holds one 3-bit cell code per cell; the cell in layer n, row j (f^{nj}
// in the document's naming) uses cfg[(n*W + j)*3 +: 3].
// The cluster itself has no loop; loop warnings that name its nets come from
// the configurable feedback of the enclosing CLB (see clb).
// Layered structure, layer-to-layer links and Modified Omega topology follow
// the document; the input ordering and the cfg layout are this design's.
module mcluster
  import mcfpga_pkg::*;
#(
  parameter int unsigned D = 2,
  parameter int unsigned W = 2
) (
  input  logic [2*W-1:0]                  in,
  input  logic [mcluster_cfg_bits(D,W)-1:0] cfg,
  output logic [W-1:0]                    out
);

  logic [W-1:0] y [D];

  // layer 0: cells fed straight from the cluster inputs
  for (genvar j = 0; j < W; j++) begin : g_first
    ufg_lc u_lc (
      .a   (in[2*j]),
      .b   (in[2*j+1]),
      .cfg (cfg[j*LC_CFG_W +: LC_CFG_W]),
      .y   (y[0][j])
    );
  end

  // layers 1..D-1: each behind its fixed Modified Omega link
  for (genvar n = 1; n < D; n++) begin : g_layer
    mc_layer #(.W(W)) u_layer (
      .y_prev (y[n-1]),
      .cfg    (cfg[n*W*LC_CFG_W +: W*LC_CFG_W]),
      .y      (y[n])
    );
  end

  assign out = y[D-1];

endmodule
