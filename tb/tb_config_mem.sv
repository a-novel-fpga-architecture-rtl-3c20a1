// tb_config_mem: serial configuration chain.
// A random bitstream of BITS bits is shifted in; bit k sent k-th must land
// in cfg[k]. Holding cfg_en low must keep the contents; shifting a second
// stream must return the first one on cfg_dout in the order it was sent.
// cfg_valid must be low after reset and during shifting, and high once a
// load has ended.
module tb_config_mem;
  localparam int BITS = 97;
  logic clk = 0, rst_n = 0, cfg_en, cfg_din, cfg_dout, cfg_valid;
  logic [BITS-1:0] cfg;
  int checks = 0, failures = 0;
  bit s1[BITS], s2[BITS];

  config_mem #(.BITS(BITS)) dut (.clk(clk), .cfg_en(cfg_en), .cfg_din(cfg_din),
                                 .cfg_dout(cfg_dout), .cfg(cfg),
                                 .rst_n(rst_n), .cfg_valid(cfg_valid));
  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles = 0;
    foreach (s1[k]) s1[k] = 1'($urandom);
    foreach (s2[k]) s2[k] = 1'($urandom);
    cfg_en = 0; cfg_din = 0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (cfg_valid !== 1'b0) failures++;
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (cfg_valid !== 1'b0) failures++;
    for (int k = 0; k < BITS; k++) begin
      cfg_en = 1; cfg_din = s1[k];
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cfg_valid !== 1'b0) failures++;
    cfg_en = 0;
    for (int k = 0; k < BITS; k++) begin
      checks++;
      if (cfg[k] !== s1[k]) failures++;
    end
    checks++;
    if (cycles != BITS) failures++;
    @(negedge clk);
    checks++;
    if (cfg_valid !== 1'b1) failures++;
    repeat (5) @(negedge clk);
    cfg_din = 1;
    for (int k = 0; k < BITS; k++) begin
      checks++;
      if (cfg[k] !== s1[k]) failures++;
    end
    for (int k = 0; k < BITS; k++) begin
      checks++;
      if (cfg_dout !== s1[k]) failures++;
      cfg_en = 1; cfg_din = s2[k];
      @(negedge clk);
    end
    cfg_en = 0;
    for (int k = 0; k < BITS; k++) begin
      checks++;
      if (cfg[k] !== s2[k]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
