// clb: configurable logic block made of N MCluster-based BLEs.
//
// Every BLE input (2*W per BLE) is driven by a local routing multiplexer
// whose sources are the I CLB inputs and all W*N BLE outputs, so any BLE
// output can feed any BLE input of the same CLB (full local connectivity).
// All W*N BLE outputs are also the CLB outputs. For the document's main
// configuration (MClusters_2_2, N = 10, I = 22) each multiplexer has 42
// inputs.
//
// Local source numbering: 0..I-1 are the CLB inputs, I + n*W + j is output j
// of BLE n. A select code of I+W*N or above gives a constant 0.
// cfg layout: BLE n at cfg[n*BB +: BB] (BB = ble_cfg_bits), then the select
// of input k of BLE n at cfg[N*BB + (n*2W + k)*SB +: SB] (SB = clb_sel_bits).
//
// The feedback path through the multiplexers is a structural combinational
// loop whenever a BLE output is configured combinational and selected by a
// BLE input; as in any FPGA it is the configuration's job not to close it,
// so loop warnings on this module are expected. While en is low (during
// reset or configuration loading, this design's choice) the BLE outputs are
// forced to 0 where they leave the BLEs, which opens every such loop.
module clb
  import mcfpga_pkg::*;
#(
  parameter int unsigned D = 2,
  parameter int unsigned W = 2,
  parameter int unsigned N = 10,
  parameter int unsigned I = 22
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              en,
  input  logic [I-1:0]                      in,
  input  logic [clb_cfg_bits(D,W,N,I)-1:0]  cfg,
  output logic [W*N-1:0]                    out
);

  localparam int unsigned BB   = ble_cfg_bits(D, W);
  localparam int unsigned SB   = clb_sel_bits(W, N, I);
  localparam int unsigned NSRC = I + W * N;

  logic [NSRC-1:0] src;
  logic [2*W-1:0]  ble_in [N];
  logic [W*N-1:0]  ble_out;

  assign out = ble_out & {(W*N){en}};
  assign src = {out, in};

  for (genvar n = 0; n < N; n++) begin : g_ble
    for (genvar k = 0; k < 2*W; k++) begin : g_mux
      route_mux #(.NSRC(NSRC), .SELW(SB)) u_mux (
        .in  (src),
        .sel (cfg[N*BB + (n*2*W + k)*SB +: SB]),
        .out (ble_in[n][k])
      );
    end
    ble #(.D(D), .W(W)) u_ble (
      .clk   (clk),
      .rst_n (rst_n),
      .in    (ble_in[n]),
      .cfg   (cfg[n*BB +: BB]),
      .out   (ble_out[n*W +: W])
    );
  end

endmodule
