// tb_route_mux: 42-input local routing multiplexer (MClusters_2_2 CLB).
// Every select code 0..63 is applied with random input words; codes 0..41
// must return that input, codes 42..63 a constant 0.
module tb_route_mux;
  localparam int NSRC = 42;
  logic [NSRC-1:0] in;
  logic [5:0] sel;
  logic out;
  int checks = 0, failures = 0;

  route_mux #(.NSRC(NSRC)) dut (.in(in), .sel(sel), .out(out));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40) begin
      in = {$urandom, $urandom};
      for (int s = 0; s < 64; s++) begin
        bit exp;
        sel = 6'(s);
        #1;
        exp = (s < NSRC) ? in[s] : 1'b0;
        checks++;
        if (out !== exp) begin
          failures++;
          $display("FAIL sel=%0d out=%b exp=%b", s, out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
