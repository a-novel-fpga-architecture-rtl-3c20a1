// tb_ble: BLE (2x2 MCluster with per-output register) checks.
// Random configurations and inputs; output j is compared with the reference
// cluster result in the same cycle when combinational, and with the result
// captured at the previous rising edge when registered. Reset clearing the
// registers is checked too. A directed case shows the cluster producing
// two different functions of the same four inputs:
// out0 = (i0&i1) | (i2&i3) and out1 = ~(i0&i1&i2&i3).
module tb_ble;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n;
  logic [3:0]  in;
  logic [13:0] cfg;
  logic [1:0]  out;
  int checks = 0, failures = 0;
  int n_reg = 0, n_comb = 0;

  ble #(.D(2), .W(2)) dut (.clk(clk), .rst_n(rst_n), .in(in), .cfg(cfg), .out(out));

  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit c[], iv[], ov[], prev[];
    prev = new[2];
    rst_n = 0; in = '0; cfg = 14'h3fff;
    #12;
    chk(out == 2'b00, "reset clears registers");
    rst_n = 1;
    repeat (400) begin
      @(negedge clk);
      cfg = 14'($urandom); in = 4'($urandom);
      #1;
      c = new[14]; foreach (c[k]) c[k] = cfg[k];
      iv = new[4]; foreach (iv[k]) iv[k] = in[k];
      mcl_ref(2, 2, c, 0, iv, ov);
      for (int j = 0; j < 2; j++) begin
        if (!cfg[12 + j]) begin
          chk(out[j] == ov[j], "combinational output");
          n_comb++;
        end
      end
      @(posedge clk);
      #1;
      for (int j = 0; j < 2; j++) begin
        if (cfg[12 + j]) begin
          chk(out[j] == ov[j], "registered output after edge");
          n_reg++;
        end
      end
    end
    chk(n_reg > 0 && n_comb > 0, "both output modes exercised");
    // two outputs from the same four inputs, combinational
    cfg = {2'b00, 3'b000 /* f11 NAND */, 3'b110 /* f10 OR */,
           3'b001 /* f01 AND */, 3'b001 /* f00 AND */};
    for (int v = 0; v < 16; v++) begin
      in = 4'(v);
      #1;
      chk(out[0] == ((in[0] & in[1]) | (in[2] & in[3])), "two-output case, out0");
      chk(out[1] == !(in[0] & in[1] & in[2] & in[3]), "two-output case, out1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
