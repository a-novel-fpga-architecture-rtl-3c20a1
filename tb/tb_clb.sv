// tb_clb: one CLB at the main size (MClusters_2_2, N = 10, I = 22).
// Several random loop-free configurations (cell codes, register selects,
// 42-input local multiplexer selects including BLE-to-BLE feedback and
// tied-off inputs) are applied; for each, random CLB inputs are driven for a
// number of cycles and all 20 outputs are compared with the reference model
// before and after every rising clock edge. en low must force every output
// to 0.
module tb_clb;
  import mcfpga_pkg::*;
  import tb_ref_pkg::*;

  localparam int D = 2, W = 2, N = 10, I = 22;
  localparam int CB = clb_cfg_bits(D, W, N, I);

  logic clk = 0, rst_n = 0, en = 0;
  logic [I-1:0] in;
  logic [CB-1:0] cfg;
  logic [W*N-1:0] out;
  int checks = 0, failures = 0;

  clb #(.D(D), .W(W), .N(N), .I(I)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .in(in), .cfg(cfg), .out(out));

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    geom_t g;
    mech_t m;
    bit c[], cin[], q[], o[], nx[];
    g = '{d: D, w: W, n: N, i: I, nclb: 1, npi: 0, npo: 0};
    m = '{default: 0};
    if (clb_bits(g) != CB) begin
      failures++;
      $display("FAIL config size %0d vs %0d", clb_bits(g), CB);
    end
    q = new[W*N];
    cin = new[I];
    in = '0;
    cfg = '0;
    #12;
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      c = new[CB];
      gen_clb(g, c, 0, m);
      @(negedge clk);
      en = 0;
      foreach (c[k]) cfg[k] = c[k];
      #1;
      checks++;
      if (out !== '0) begin failures++; $display("FAIL en low"); end
      en = 1;
      // flip-flops hold whatever they captured; read them from the model
      // after one clean clock with known inputs.
      in = I'($urandom);
      foreach (cin[k]) cin[k] = in[k];
      foreach (q[k]) q[k] = 0;
      rst_n = 0; #1; rst_n = 1;
      for (int cyc = 0; cyc < 30; cyc++) begin
        if (cyc > 0) @(negedge clk);
        in = I'($urandom);
        foreach (cin[k]) cin[k] = in[k];
        #1;
        clb_eval(g, c, 0, cin, q, o, nx);
        for (int k = 0; k < W*N; k++) begin
          checks++;
          if (out[k] !== o[k]) begin
            failures++;
            $display("FAIL round %0d cyc %0d out[%0d]=%b exp %b", round, cyc, k, out[k], o[k]);
          end
        end
        @(posedge clk);
        q = nx;
        #1;
        clb_eval(g, c, 0, cin, q, o, nx);
        for (int k = 0; k < W*N; k++) begin
          checks++;
          if (out[k] !== o[k]) failures++;
        end
      end
    end
    $display("mechanisms: registered=%0d combinational=%0d local_feedback=%0d tie_off=%0d",
             m.reg_out, m.comb_out, m.local_fb, m.tie_off);
    checks++;
    if (m.reg_out == 0 || m.comb_out == 0 || m.local_fb == 0 || m.tie_off == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
