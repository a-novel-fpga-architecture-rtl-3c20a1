// tb_mcluster: MCluster matrix checks.
//  1. The mapping example of a 3x3 Modified Omega cluster: n1 on f00, n2 on
//     f02, buffers on f10 and f12, n3 on f11, n4 on f20, n5 on f22, with the
//     unused cell f01 forced to 0 so that the buffers (OR with 0) pass their
//     signal. All 16 input combinations are compared with the function
//     written out by hand.
//  2. Random configurations and inputs on 2x2 (the main size), 3x3 and 4x4
//     clusters, compared with the reference model.
module tb_mcluster;
  import mcfpga_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [5:0]  in3;  logic [26:0] cfg3; logic [2:0] out3;
  logic [3:0]  in2;  logic [11:0] cfg2; logic [1:0] out2;
  logic [7:0]  in4;  logic [47:0] cfg4; logic [3:0] out4;

  mcluster #(.D(3), .W(3)) u3 (.in(in3), .cfg(cfg3), .out(out3));
  mcluster #(.D(2), .W(2)) u2 (.in(in2), .cfg(cfg2), .out(out2));
  mcluster #(.D(4), .W(4)) u4 (.in(in4), .cfg(cfg4), .out(out4));

  function automatic void setc(ref logic [26:0] c, input int n, input int j,
                               input lc_func_e f);
    c[(n*3 + j)*3 +: 3] = f;
  endfunction

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit c[], iv[], ov[];
    // ---- 1. mapping example on MClusters_3_3 ----
    cfg3 = '0;
    setc(cfg3, 0, 0, LC_AND);       // n1 = pi0 & pi1
    setc(cfg3, 0, 1, LC_AND);       // unused, inputs tied 0 -> 0
    setc(cfg3, 0, 2, LC_OR);        // n2 = pi2 | pi3
    setc(cfg3, 1, 0, LC_OR);        // buf(n1) = n1 | 0
    setc(cfg3, 1, 1, LC_NA_AND_B);  // n3 = ~n1 & n2
    setc(cfg3, 1, 2, LC_OR);        // buf(n2) = 0 | n2
    setc(cfg3, 2, 0, LC_NAND);      // n4 = ~(n1 & n3)
    setc(cfg3, 2, 1, LC_AND);       // unused
    setc(cfg3, 2, 2, LC_NOR);       // n5 = ~(n3 | n2)
    for (int v = 0; v < 16; v++) begin
      bit p0, p1, p2, p3, n1, n2, n3, n4, n5;
      {p3, p2, p1, p0} = 4'(v);
      in3 = {p3, p2, 1'b0, 1'b0, p1, p0};
      #1;
      n1 = p0 & p1; n2 = p2 | p3; n3 = !n1 & n2;
      n4 = !(n1 & n3); n5 = !(n3 | n2);
      chk(out3[0] == n4, $sformatf("map po0 v=%0d", v));
      chk(out3[2] == n5, $sformatf("map po1 v=%0d", v));
    end
    // ---- 2. random configurations ----
    repeat (300) begin
      cfg2 = 12'($urandom); in2 = 4'($urandom);
      cfg3 = 27'($urandom); in3 = 6'($urandom);
      cfg4 = {$urandom, $urandom}; in4 = 8'($urandom);
      #1;
      c = new[12]; foreach (c[k]) c[k] = cfg2[k];
      iv = new[4]; foreach (iv[k]) iv[k] = in2[k];
      mcl_ref(2, 2, c, 0, iv, ov);
      for (int j = 0; j < 2; j++) chk(out2[j] == ov[j], "2x2 random");
      c = new[27]; foreach (c[k]) c[k] = cfg3[k];
      iv = new[6]; foreach (iv[k]) iv[k] = in3[k];
      mcl_ref(3, 3, c, 0, iv, ov);
      for (int j = 0; j < 3; j++) chk(out3[j] == ov[j], "3x3 random");
      c = new[48]; foreach (c[k]) c[k] = cfg4[k];
      iv = new[8]; foreach (iv[k]) iv[k] = in4[k];
      mcl_ref(4, 4, c, 0, iv, ov);
      for (int j = 0; j < 4; j++) chk(out4[j] == ov[j], "4x4 random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
