// mcfpga_sweep_unit: drives one fabric instance of a given cluster size
// through random loop-free configurations and compares its outputs with the
// reference model every cycle. Used by tb_mcfpga_sizes; reports its counts
// on its ports and raises done when finished.
module mcfpga_sweep_unit
  import tb_ref_pkg::*;
#(
  parameter int D = 2,
  parameter int W = 2,
  parameter int I = 22,
  parameter int NCLB = 2,
  parameter int ROUNDS = 3,
  parameter int CYCLES = 40
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int N = 10, NPI = 16, NPO = 8;

  logic rst_n = 0, cfg_en = 0, cfg_din = 0, cfg_dout;
  logic [NPI-1:0] pi = '0;
  logic [NPO-1:0] po;

  mcfpga_top #(.D(D), .W(W), .N(N), .I(I), .NCLB(NCLB), .NPI(NPI), .NPO(NPO)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_din(cfg_din),
    .cfg_dout(cfg_dout), .pi(pi), .po(po));

  initial begin
    geom_t g;
    mech_t m;
    bit c[], piv[], q[], pov[], nx[];
    checks = 0; failures = 0; done = 0;
    g = '{d: D, w: W, n: N, i: I, nclb: NCLB, npi: NPI, npo: NPO};
    m = '{default: 0};
    piv = new[NPI];
    q = new[NCLB * N * W];
    @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < ROUNDS; round++) begin
      gen_top(g, c, m);
      @(negedge clk);
      for (int k = 0; k < top_bits(g); k++) begin
        cfg_en = 1;
        cfg_din = c[k];
        @(negedge clk);
      end
      cfg_en = 0;
      @(negedge clk);
      foreach (q[k]) q[k] = 0;
      for (int cyc = 0; cyc < CYCLES; cyc++) begin
        if (cyc > 0) @(negedge clk);
        pi = NPI'($urandom);
        foreach (piv[k]) piv[k] = pi[k];
        #1;
        top_eval(g, c, piv, q, pov, nx);
        for (int p = 0; p < NPO; p++) begin
          checks++;
          if (po[p] !== pov[p]) failures++;
        end
        @(posedge clk);
        q = nx;
      end
    end
    // every size must have used both output modes and feedback
    checks++;
    if (m.reg_out == 0 || m.comb_out == 0 || m.local_fb == 0 || m.inter_clb == 0) failures++;
    $display("size %0d_%0d I=%0d: config bits %0d, checks %0d, failures %0d",
             D, W, I, top_bits(g), checks, failures);
    done = 1;
  end
endmodule
