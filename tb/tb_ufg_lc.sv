// tb_ufg_lc: exhaustive check of the logic cell against its truth table.
// All eight configuration codes and all four input pairs are applied; each
// output is compared with the printed function of that code.
module tb_ufg_lc;
  import mcfpga_pkg::*;

  logic a, b, y;
  logic [2:0] cfg;
  int checks = 0, failures = 0;

  ufg_lc dut (.a(a), .b(b), .cfg(cfg), .y(y));

  function automatic bit expect_y(int code, bit x1, bit x2);
    case (code)
      0: return !(x1 && x2);
      1: return x1 && x2;
      2: return !x1 || x2;
      3: return x1 && !x2;
      4: return x1 || !x2;
      5: return !x1 && x2;
      6: return x1 || x2;
      default: return !(x1 || x2);
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int code = 0; code < 8; code++) begin
      for (int v = 0; v < 4; v++) begin
        cfg = 3'(code);
        a = v[1];
        b = v[0];
        #1;
        checks++;
        if (y !== expect_y(code, a, b)) begin
          failures++;
          $display("FAIL code=%b a=%b b=%b y=%b", cfg, a, b, y);
        end
      end
    end
    // named encodings
    cfg = LC_NOR; a = 0; b = 0; #1;
    checks++; if (y !== 1'b1) failures++;
    cfg = LC_A_AND_NB; a = 1; b = 0; #1;
    checks++; if (y !== 1'b1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
