// route_mux: configurable routing multiplexer.
//
// Selects one of NSRC inputs by a binary select code held in configuration
// memory. It is the building block of the CLB local routing (for the
// MClusters_2_2 CLB, 22 CLB inputs plus 20 fed-back BLE outputs: a 42-input
// multiplexer) and of the global routing. A select code of NSRC or above
// drives a constant 0; this is how the fabric ties off unused cell inputs
// (this design's choice). Purely combinational.
module route_mux
  import mcfpga_pkg::*;
#(
  parameter int unsigned NSRC = 42,
  parameter int unsigned SELW = sel_width(NSRC)
) (
  input  logic [NSRC-1:0] in,
  input  logic [SELW-1:0] sel,
  output logic            out
);

  always_comb begin
    out = 1'b0;
    for (int unsigned s = 0; s < NSRC; s++) begin
      if (sel == SELW'(s)) out = in[s];
    end
  end

endmodule
