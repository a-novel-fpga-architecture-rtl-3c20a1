// global_routing: inter-CLB reconfigurable routing of the fabric.
//
// The document keeps a standard FPGA organisation at the top level: CLBs
// joined by an interconnect that can reach everything but cannot make all
// connections at once. Its channel and switchbox detail is not given, so this
// design models the routing by its effect: each CLB input and each fabric
// output is a route_mux over all fabric inputs and all CLB outputs. The
// resource limit is the number of CLB inputs (I per CLB), as in the document.
//
// Source numbering: 0..NPI-1 are the fabric inputs, NPI + c*W*N + m is output
// m of CLB c. A select code past the last source gives a constant 0.
// cfg layout: select of input i of CLB c at cfg[(c*I + i)*SB +: SB], select of
// fabric output p at cfg[(NCLB*I + p)*SB +: SB] (SB = sel_width of the source
// count). Purely combinational.
module global_routing
  import mcfpga_pkg::*;
#(
  parameter int unsigned W    = 2,
  parameter int unsigned N    = 10,
  parameter int unsigned I    = 22,
  parameter int unsigned NCLB = 4,
  parameter int unsigned NPI  = 16,
  parameter int unsigned NPO  = 8
) (
  input  logic [NPI-1:0]                                  pi,
  input  logic [NCLB*W*N-1:0]                             clb_out,
  input  logic [groute_cfg_bits(W,N,I,NCLB,NPI,NPO)-1:0]  cfg,
  output logic [NCLB*I-1:0]                               clb_in,
  output logic [NPO-1:0]                                  po
);

  localparam int unsigned NSRC = NPI + NCLB * W * N;
  localparam int unsigned SB   = sel_width(NSRC);

  logic [NSRC-1:0] src;
  assign src = {clb_out, pi};

  for (genvar t = 0; t < NCLB*I; t++) begin : g_clb_in
    route_mux #(.NSRC(NSRC), .SELW(SB)) u_mux (
      .in  (src),
      .sel (cfg[t*SB +: SB]),
      .out (clb_in[t])
    );
  end

  for (genvar p = 0; p < NPO; p++) begin : g_po
    route_mux #(.NSRC(NSRC), .SELW(SB)) u_mux (
      .in  (src),
      .sel (cfg[(NCLB*I + p)*SB +: SB]),
      .out (po[p])
    );
  end

endmodule
