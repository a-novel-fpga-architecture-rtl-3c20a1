// tb_mc_layer: one cluster layer behind its fixed Modified Omega link.
// The link is probed by driving one previous-layer output at a time and
// programming every cell with a function that exposes one input:
//   A & ~B  -> cell is 1 only if the driven source is its input A,
//   ~A & B  -> only if it is its input B,
//   A | B   -> if it is either input,  A & B -> never (sources distinct).
// W = 3 is compared with the published matrix X = [1 1 0; 1 0 1; 0 1 1]
// (A taken as the lower-numbered source of each row), W = 2 with full
// connection, W = 4 and W = 8 with the fan-out-of-two rule. Random codes and
// values at W = 8 are compared with the reference model.
module tb_mc_layer;
  import mcfpga_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0] p2, y2;  logic [5:0]  c2;
  logic [2:0] p3, y3;  logic [8:0]  c3;
  logic [3:0] p4, y4;  logic [11:0] c4;
  logic [7:0] p8, y8;  logic [23:0] c8;

  mc_layer #(.W(2)) u2 (.y_prev(p2), .cfg(c2), .y(y2));
  mc_layer #(.W(3)) u3 (.y_prev(p3), .cfg(c3), .y(y3));
  mc_layer #(.W(4)) u4 (.y_prev(p4), .cfg(c4), .y(y4));
  mc_layer #(.W(8)) u8 (.y_prev(p8), .cfg(c8), .y(y8));

  localparam bit X3 [3][3] = '{'{1, 1, 0}, '{1, 0, 1}, '{0, 1, 1}};

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  function automatic logic [23:0] all(lc_func_e f, int w);
    logic [23:0] r = '0;
    for (int j = 0; j < w; j++) r[j*3 +: 3] = f;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p2 = '0; p3 = '0; p4 = '0; p8 = '0;
    for (int i = 0; i < 3; i++) begin
      p3 = 3'(1 << i);
      c3 = 9'(all(LC_A_AND_NB, 3)); #1;
      for (int j = 0; j < 3; j++) begin
        automatic int first = X3[j][0] ? 0 : 1;
        chk(y3[j] == (first == i), $sformatf("W3 cell %0d A source %0d", j, i));
      end
      c3 = 9'(all(LC_NA_AND_B, 3)); #1;
      for (int j = 0; j < 3; j++) begin
        automatic int second = X3[j][2] ? 2 : 1;
        chk(y3[j] == (second == i), $sformatf("W3 cell %0d B source %0d", j, i));
      end
      c3 = 9'(all(LC_OR, 3)); #1;
      for (int j = 0; j < 3; j++)
        chk(y3[j] == X3[j][i], $sformatf("W3 cell %0d any source %0d", j, i));
    end
    for (int i = 0; i < 2; i++) begin
      p2 = 2'(1 << i);
      c2 = 6'(all(LC_OR, 2)); #1;
      chk(y2 == 2'b11, "W2 full connection");
      c2 = 6'(all(LC_AND, 2)); #1;
      chk(y2 == 2'b00, "W2 distinct sources");
    end
    for (int i = 0; i < 4; i++) begin
      p4 = 4'(1 << i);
      c4 = 12'(all(LC_OR, 4)); #1;
      chk($countones(y4) == 2, $sformatf("W4 fan-out of source %0d", i));
      c4 = 12'(all(LC_AND, 4)); #1;
      chk(y4 == '0, $sformatf("W4 distinct sources %0d", i));
    end
    for (int i = 0; i < 8; i++) begin
      p8 = 8'(1 << i);
      c8 = all(LC_OR, 8); #1;
      chk($countones(y8) == 2, $sformatf("W8 fan-out of source %0d", i));
      c8 = all(LC_AND, 8); #1;
      chk(y8 == '0, $sformatf("W8 distinct sources %0d", i));
    end
    repeat (200) begin
      p8 = 8'($urandom);
      c8 = 24'($urandom);
      #1;
      for (int j = 0; j < 8; j++)
        chk(y8[j] == lc_ref(int'(c8[j*3 +: 3]), p8[j/2], p8[(j+8)/2]),
            $sformatf("W8 random cell %0d", j));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
