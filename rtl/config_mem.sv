// config_mem: configuration memory of the fabric.
//
// Holds every configuration bit (cell codes, register selects, routing
// selects) and presents them in parallel on cfg. The document stores the
// configuration in SRAM cells; how the SRAM is written is not described, so
// this design loads it as one serial chain: while cfg_en is high, each rising
// clock edge shifts cfg_din in at the top (bit BITS-1) and every bit moves
// one place down. After BITS shifts the first bit sent sits in cfg[0], the
// last in cfg[BITS-1]. cfg_dout is cfg[0], so chains can be cascaded or read
// back. The memory cells have no reset: their contents are defined by
// loading.
//
// cfg_valid (this design's addition) tells the fabric that the contents form
// a complete configuration: rst_n (active low, asynchronous) clears it, it is
// low while cfg_en is high, and it rises on the first edge after a load ends.
// The fabric keeps its user logic quiet while it is low, so a half-loaded
// configuration cannot close a combinational loop.
module config_mem #(
  parameter int unsigned BITS = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_en,
  input  logic            cfg_din,
  output logic            cfg_dout,
  output logic [BITS-1:0] cfg,
  output logic            cfg_valid
);

  logic loaded;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loaded    <= 1'b0;
      cfg_valid <= 1'b0;
    end else if (cfg_en) begin
      loaded    <= 1'b1;
      cfg_valid <= 1'b0;
    end else begin
      cfg_valid <= loaded;
    end
  end

  if (BITS > 1) begin : g_chain
    always_ff @(posedge clk) begin
      if (cfg_en) cfg <= {cfg_din, cfg[BITS-1:1]};
    end
  end else begin : g_single
    always_ff @(posedge clk) begin
      if (cfg_en) cfg <= cfg_din;
    end
  end

  assign cfg_dout = cfg[0];

endmodule
