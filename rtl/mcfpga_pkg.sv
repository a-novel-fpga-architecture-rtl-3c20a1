// mcfpga_pkg: types, constants and sizing functions shared by the MCluster
// FPGA fabric.
//
// The logic cell is programmed by three polarity-gate biases. In this RTL they
// form a 3-bit code {V_BA, V_BB, V_BC} (bit 2 = V_BA, bit 0 = V_BC); the eight
// codes and the functions they select are those of the cell's truth table.
//
// The fixed layer-to-layer topology is the Modified Omega pattern. This design
// generates it as a perfect shuffle of the 2*W cell-output lines (each cell
// output has a fan-out of two) followed by pairing of consecutive lines into
// the two inputs of a next-layer cell. For W = 3 this reproduces the published
// 3x3 cross-connectivity matrix exactly; for W = 2 it gives every cell both
// outputs of the previous layer. Input A of cell j takes cell j/2, input B
// takes cell (j+W)/2 (integer division); the A/B assignment is this design's
// choice.
//
// Configuration words are flat bit vectors. The functions below give their
// widths so that every level of the hierarchy agrees on the bit layout.
package mcfpga_pkg;

  localparam int unsigned LC_CFG_W = 3;

  // {V_BA, V_BB, V_BC}
  typedef enum logic [LC_CFG_W-1:0] {
    LC_NAND      = 3'b000,  // ~(A & B)
    LC_AND       = 3'b001,  // A & B
    LC_NA_OR_B   = 3'b010,  // ~A | B
    LC_A_AND_NB  = 3'b011,  // A & ~B
    LC_A_OR_NB   = 3'b100,  // A | ~B
    LC_NA_AND_B  = 3'b101,  // ~A & B
    LC_OR        = 3'b110,  // A | B
    LC_NOR       = 3'b111   // ~(A | B)
  } lc_func_e;

  // Source cell (in the previous layer) of input k (0 = A, 1 = B) of cell j
  // in a layer of width w.
  function automatic int unsigned omega_src(int unsigned w, int unsigned j,
                                            int unsigned k);
    return (k == 0) ? (j / 2) : ((j + w) / 2);
  endfunction

  // Width of a select field able to address nsrc sources (at least 1 bit).
  function automatic int unsigned sel_width(int unsigned nsrc);
    return (nsrc <= 2) ? 1 : $clog2(nsrc);
  endfunction

  // Configuration bits of one MCluster: one LC code per cell.
  function automatic int unsigned mcluster_cfg_bits(int unsigned d, int unsigned w);
    return d * w * LC_CFG_W;
  endfunction

  // Configuration bits of one BLE: its MCluster plus one register-select bit
  // per output.
  function automatic int unsigned ble_cfg_bits(int unsigned d, int unsigned w);
    return mcluster_cfg_bits(d, w) + w;
  endfunction

  // Select width of a CLB local input multiplexer (I CLB inputs plus the
  // w*N fed-back BLE outputs).
  function automatic int unsigned clb_sel_bits(int unsigned w, int unsigned n,
                                               int unsigned i);
    return sel_width(i + w * n);
  endfunction

  // Configuration bits of one CLB: N BLEs, then N*2w local multiplexers.
  function automatic int unsigned clb_cfg_bits(int unsigned d, int unsigned w,
                                               int unsigned n, int unsigned i);
    return n * ble_cfg_bits(d, w) + n * 2 * w * clb_sel_bits(w, n, i);
  endfunction

  // Configuration bits of the global routing: one select per CLB input and
  // per fabric output, over the fabric inputs and all CLB outputs.
  function automatic int unsigned groute_cfg_bits(int unsigned w, int unsigned n,
                                                  int unsigned i, int unsigned nclb,
                                                  int unsigned npi, int unsigned npo);
    return (nclb * i + npo) * sel_width(npi + nclb * w * n);
  endfunction

endpackage
