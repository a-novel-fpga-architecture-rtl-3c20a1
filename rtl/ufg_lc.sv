// ufg_lc: ultrafine-grain reconfigurable logic cell.
//
// Logic model of the seven-transistor controllable-polarity cell. The cell
// computes one of eight two-input functions of A and B, chosen by the three
// polarity-gate biases V_BA, V_BB and V_BC (cfg = {V_BA, V_BB, V_BC}):
//   000 NAND   001 AND    010 ~A|B   011 A&~B
//   100 A|~B   101 ~A&B   110 OR     111 NOR
// The table is the document's. The way it is computed here is this design's
// reading of the circuit: V_BA and V_BB set the polarity of the A and B input
// devices, which amounts to an optional inversion of each input before the
// first (AND-type) stage, and V_BC makes the second stage a follower (1) or
// an inverter (0).
//
// The real cell is two dynamic stages clocked by global precharge and evaluate
// signals; here it is purely combinational, its output valid within the same
// cycle as its inputs, as the register of the enclosing BLE sees it.
// Loop warnings that name this cell come from the configurable feedback of
// the CLB and global routing (see clb), not from the cell itself.
module ufg_lc
  import mcfpga_pkg::*;
(
  input  logic                a,
  input  logic                b,
  input  logic [LC_CFG_W-1:0] cfg,   // {V_BA, V_BB, V_BC}
  output logic                y
);

  logic stage1;

  always_comb begin
    stage1 = (a ^ cfg[2]) & (b ^ cfg[1]);
    y      = cfg[0] ? stage1 : ~stage1;
  end

endmodule
