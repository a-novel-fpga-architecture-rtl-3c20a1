// ble: MCluster-based basic logic element.
//
// One D x W MCluster whose W outputs can each be registered on demand: every
// output has a D flip-flop and a 2:1 output multiplexer choosing the
// flip-flop (registered) or the MCluster output directly (combinational).
// The flip-flops share the CLB clock; the structure is the document's.
//
// Timing: a combinational output follows the inputs in the same cycle; a
// registered output shows the MCluster result one clock edge later.
// Reset (this design's choice): rst_n, active low and asynchronous, clears the
// flip-flops.
//
// cfg layout: cfg[0 +: D*W*3] is the MCluster configuration, followed by W
// register-select bits (bit 1 = registered) for outputs 0..W-1.
module ble
  import mcfpga_pkg::*;
#(
  parameter int unsigned D = 2,
  parameter int unsigned W = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [2*W-1:0]              in,
  input  logic [ble_cfg_bits(D,W)-1:0] cfg,
  output logic [W-1:0]                out
);

  localparam int unsigned MCB = mcluster_cfg_bits(D, W);

  logic [W-1:0] comb_out;
  logic [W-1:0] q;
  logic [W-1:0] reg_sel;

  assign reg_sel = cfg[MCB +: W];

  mcluster #(.D(D), .W(W)) u_mcluster (
    .in  (in),
    .cfg (cfg[0 +: MCB]),
    .out (comb_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= comb_out;
  end

  always_comb begin
    for (int unsigned j = 0; j < W; j++)
      out[j] = reg_sel[j] ? q[j] : comb_out[j];
  end

endmodule
