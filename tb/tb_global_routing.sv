// tb_global_routing: inter-CLB routing at the default sizes (16 fabric
// inputs, 4 CLBs of 20 outputs, 22 inputs each, 8 fabric outputs).
// Random selects and source values; each CLB input and fabric output must
// equal the selected fabric input or CLB output, or 0 for a select past the
// last source.
module tb_global_routing;
  import mcfpga_pkg::*;
  localparam int W = 2, N = 10, I = 22, NCLB = 4, NPI = 16, NPO = 8;
  localparam int NSRC = NPI + NCLB*W*N;
  localparam int SB = 7;
  localparam int GB = (NCLB*I + NPO) * SB;

  logic [NPI-1:0] pi;
  logic [NCLB*W*N-1:0] clb_out;
  logic [GB-1:0] cfg;
  logic [NCLB*I-1:0] clb_in;
  logic [NPO-1:0] po;
  int checks = 0, failures = 0, n_pi = 0, n_clb = 0, n_zero = 0;

  global_routing #(.W(W), .N(N), .I(I), .NCLB(NCLB), .NPI(NPI), .NPO(NPO)) dut (
    .pi(pi), .clb_out(clb_out), .cfg(cfg), .clb_in(clb_in), .po(po));

  function automatic bit src_val(int s);
    if (s < NPI) return pi[s];
    if (s < NSRC) return clb_out[s - NPI];
    return 1'b0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    if (GB != groute_cfg_bits(W, N, I, NCLB, NPI, NPO)) begin
      failures++;
      $display("FAIL config size");
    end
    repeat (50) begin
      int sels[NCLB*I + NPO];
      foreach (sels[t]) begin
        sels[t] = $urandom_range(0, 127);
        cfg[t*SB +: SB] = SB'(sels[t]);
        if (sels[t] < NPI) n_pi++; else if (sels[t] < NSRC) n_clb++; else n_zero++;
      end
      pi = 16'($urandom);
      clb_out = {$urandom, $urandom, $urandom};
      #1;
      for (int t = 0; t < NCLB*I; t++) begin
        checks++;
        if (clb_in[t] !== src_val(sels[t])) failures++;
      end
      for (int p = 0; p < NPO; p++) begin
        checks++;
        if (po[p] !== src_val(sels[NCLB*I + p])) failures++;
      end
    end
    checks++;
    if (n_pi == 0 || n_clb == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
