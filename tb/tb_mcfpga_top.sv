// tb_mcfpga_top: end-to-end test of the fabric at its default size
// (4 CLBs of 10 MClusters_2_2 BLEs, 22 inputs each, 16 fabric inputs,
// 8 fabric outputs).
//
// For each of several rounds a random loop-free configuration is generated,
// shifted in serially (one bit per clock), and the previous configuration is
// checked as it comes out on cfg_dout. Then random fabric inputs are applied
// for a number of cycles and the fabric outputs are compared with the
// reference model before and after every rising edge.
// Mechanisms counted, each required to occur: serial load and read-back,
// outputs held at 0 during loading, registered and combinational BLE
// outputs, CLB-local feedback, inter-CLB routes, tied-off inputs, reset of
// the fabric (global reset before a load), outputs changing combinationally with the inputs and
// outputs changing on a clock edge alone.
module tb_mcfpga_top;
  import tb_ref_pkg::*;

  localparam int ROUNDS = 4;
  localparam int CYCLES = 60;

  logic clk = 0, rst_n = 0, cfg_en = 0, cfg_din = 0, cfg_dout;
  logic [15:0] pi = '0;
  logic [7:0] po;
  int checks = 0, failures = 0;
  int n_loads = 0, n_readback = 0, n_hold = 0, n_comb_change = 0, n_edge_change = 0;
  int n_reset = 0;

  mcfpga_top dut (.clk(clk), .rst_n(rst_n), .cfg_en(cfg_en), .cfg_din(cfg_din),
                  .cfg_dout(cfg_dout), .pi(pi), .po(po));

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", msg);
    end
  endtask

  function automatic logic [7:0] pack(const ref bit v[]);
    logic [7:0] r;
    foreach (r[k]) r[k] = v[k];
    return r;
  endfunction

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    geom_t g;
    mech_t m;
    bit c[], prev[], piv[], q[], pov[], nx[];
    int bits;
    g = '{d: 2, w: 2, n: 10, i: 22, nclb: 4, npi: 16, npo: 8};
    m = '{default: 0};
    bits = top_bits(g);
    $display("configuration bits: %0d", bits);
    piv = new[16];
    q = new[g.nclb * g.n * g.w];
    #12;
    rst_n = 1;
    for (int round = 0; round < ROUNDS; round++) begin
      automatic int shift_cycles = 0;
      gen_top(g, c, m);
      if (round == 2) begin
        // global reset: invalidates the configuration; the next load
        // must restart the fabric from zero
        @(negedge clk);
        rst_n = 0;
        @(negedge clk);
        rst_n = 1;
        n_reset++;
      end
      // serial load; the previous configuration comes out first-in first-out
      @(negedge clk);
      for (int k = 0; k < bits; k++) begin
        if (round > 0) begin
          chk(cfg_dout == prev[k], $sformatf("read-back bit %0d", k));
          n_readback++;
        end
        cfg_en = 1;
        cfg_din = c[k];
        pi = 16'($urandom);
        @(negedge clk);
        shift_cycles++;
      end
      // the whole configuration is in place but cfg_en is still high: the
      // fabric is held, so each output shows its fabric input or 0
      #1;
      begin
        automatic int gs = gsel(g);
        for (int p = 0; p < g.npo; p++) begin
          automatic int unsigned s = field(c, (g.nclb * g.i + p) * gs, gs);
          chk(po[p] == ((s < g.npi) ? pi[s] : 1'b0), "output held during loading");
          if (s >= g.npi) n_hold++;
        end
      end
      cfg_en = 0;
      n_loads++;
      chk(shift_cycles == bits, "one bit per clock");
      prev = c;
      // the load has ended; the fabric starts after one edge with all
      // flip-flops cleared
      @(negedge clk);
      foreach (q[k]) q[k] = 0;
      for (int cyc = 0; cyc < CYCLES; cyc++) begin
        logic [7:0] po_prev, po_now;
        if (cyc > 0) @(negedge clk);
        po_prev = po;
        pi = 16'($urandom);
        foreach (piv[k]) piv[k] = pi[k];
        #1;
        top_eval(g, c, piv, q, pov, nx);
        chk(po === pack(pov), $sformatf("round %0d cycle %0d before edge", round, cyc));
        if (cyc > 0 && po != po_prev) n_comb_change++;
        po_prev = po;
        @(posedge clk);
        q = nx;
        #1;
        top_eval(g, c, piv, q, pov, nx);
        po_now = po;
        chk(po === pack(pov), $sformatf("round %0d cycle %0d after edge", round, cyc));
        if (po_now != po_prev) n_edge_change++;
      end
    end
    $display("mechanisms: loads=%0d readback_bits=%0d hold=%0d registered=%0d combinational=%0d",
             n_loads, n_readback, n_hold, m.reg_out, m.comb_out);
    $display("            local_feedback=%0d inter_clb=%0d tie_off=%0d from_pi=%0d resets=%0d",
             m.local_fb, m.inter_clb, m.tie_off, m.from_pi, n_reset);
    $display("            comb_changes=%0d edge_changes=%0d", n_comb_change, n_edge_change);
    chk(n_loads > 1 && n_readback > 0 && n_hold > 0, "load/readback/hold happened");
    chk(m.reg_out > 0 && m.comb_out > 0, "both BLE output modes used");
    chk(m.local_fb > 0 && m.inter_clb > 0 && m.tie_off > 0 && m.from_pi > 0, "routing kinds used");
    chk(n_reset > 0 && n_comb_change > 0 && n_edge_change > 0, "activity seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
