// tb_mcfpga_sizes: the cluster granularities evaluated for the architecture,
// MClusters_1_1 to MClusters_4_4, each in a CLB of N = 10 BLEs with
// I = (N + 1) * (2w) / 2 inputs (11, 22, 33, 44), i.e. local multiplexers of
// 21, 42, 63 and 84 inputs. Each size is configured randomly several times
// and checked against the reference model. Two CLBs per fabric keep the run
// short.
module tb_mcfpga_sizes;
  logic clk = 0;
  int c1, f1, c2, f2, c3, f3, c4, f4;
  bit d1, d2, d3, d4;
  int checks, failures;

  always #5 clk = ~clk;

  mcfpga_sweep_unit #(.D(1), .W(1), .I(11)) u11 (.clk(clk), .checks(c1), .failures(f1), .done(d1));
  mcfpga_sweep_unit #(.D(2), .W(2), .I(22)) u22 (.clk(clk), .checks(c2), .failures(f2), .done(d2));
  mcfpga_sweep_unit #(.D(3), .W(3), .I(33)) u33 (.clk(clk), .checks(c3), .failures(f3), .done(d3));
  mcfpga_sweep_unit #(.D(4), .W(4), .I(44)) u44 (.clk(clk), .checks(c4), .failures(f4), .done(d4));

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3 + c4, f1 + f2 + f3 + f4 + 1);
    $finish;
  end

  initial begin
    wait (d1 && d2 && d3 && d4);
    checks = c1 + c2 + c3 + c4;
    failures = f1 + f2 + f3 + f4;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
