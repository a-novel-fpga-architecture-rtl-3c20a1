// mcfpga_top: FPGA fabric built from MCluster-based CLBs.
//
// NCLB CLBs, each holding N BLEs built on a D x W MCluster of ultrafine-grain
// logic cells, are joined by the global routing to NPI fabric inputs and NPO
// fabric outputs. All configuration (cell codes, BLE register selects, CLB
// local routing selects and global routing selects) sits in one
// configuration memory loaded serially through cfg_en / cfg_din.
//
// Defaults are the document's main configuration: MClusters_2_2, N = 10 BLEs
// per CLB and I = 22 CLB inputs, with 42-input local routing multiplexers.
// The number of CLBs and of fabric pins is not given there; NCLB = 4,
// NPI = 16 and NPO = 8 are this design's choice.
//
// Configuration bit layout (bit 0 is the first bit shifted in):
//   [0 +: GB]                  global routing (see global_routing)
//   [GB + c*CB +: CB]          CLB c (see clb)
// with GB = groute_cfg_bits(...) and CB = clb_cfg_bits(...).
//
// Timing: fabric outputs follow fabric inputs combinationally through
// combinational BLE outputs; registered BLE outputs update on the rising edge
// of clk. rst_n (active low, asynchronous) is a global reset: it marks the
// configuration invalid, so a load must follow it. While rst_n is low, while
// configuration is being shifted in, and until the first edge after a load
// ends, the fabric is stopped: every CLB output is held at 0 on the routing
// and every BLE flip-flop is held cleared (this design's choice, like the
// global hold of commercial FPGAs), so a partial configuration cannot
// oscillate and user logic starts from zero on the first edge after the
// clock edge that raises the internal configuration-valid flag.
// Feedback through the routing forms structural combinational loops, which a
// valid configuration leaves open; loop warnings here are expected.
module mcfpga_top
  import mcfpga_pkg::*;
#(
  parameter int unsigned D    = 2,
  parameter int unsigned W    = 2,
  parameter int unsigned N    = 10,
  parameter int unsigned I    = 22,
  parameter int unsigned NCLB = 4,
  parameter int unsigned NPI  = 16,
  parameter int unsigned NPO  = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cfg_en,
  input  logic           cfg_din,
  output logic           cfg_dout,
  input  logic [NPI-1:0] pi,
  output logic [NPO-1:0] po
);

  localparam int unsigned GB   = groute_cfg_bits(W, N, I, NCLB, NPI, NPO);
  localparam int unsigned CB   = clb_cfg_bits(D, W, N, I);
  localparam int unsigned BITS = GB + NCLB * CB;

  logic [BITS-1:0]     cfg;
  logic [NCLB*I-1:0]   clb_in;
  logic [NCLB*W*N-1:0] clb_out;
  logic                cfg_valid;
  logic                run;

  assign run = rst_n & cfg_valid;

  config_mem #(.BITS(BITS)) u_cfg (
    .clk      (clk),
    .rst_n    (rst_n),
    .cfg_en   (cfg_en),
    .cfg_din  (cfg_din),
    .cfg_dout (cfg_dout),
    .cfg      (cfg),
    .cfg_valid(cfg_valid)
  );

  global_routing #(
    .W(W), .N(N), .I(I), .NCLB(NCLB), .NPI(NPI), .NPO(NPO)
  ) u_groute (
    .pi      (pi),
    .clb_out (clb_out),
    .cfg     (cfg[0 +: GB]),
    .clb_in  (clb_in),
    .po      (po)
  );

  for (genvar c = 0; c < NCLB; c++) begin : g_clb
    clb #(.D(D), .W(W), .N(N), .I(I)) u_clb (
      .clk   (clk),
      .rst_n (run),
      .en    (run),
      .in    (clb_in[c*I +: I]),
      .cfg   (cfg[GB + c*CB +: CB]),
      .out   (clb_out[c*W*N +: W*N])
    );
  end

endmodule
