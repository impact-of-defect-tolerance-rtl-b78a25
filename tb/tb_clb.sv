// tb_clb: the 4-input CLB as a LUT (combinational), as LUT plus flip-flop
// (one clock of latency), and with hold forcing the output to 0.
module tb_clb;
  logic clk = 1'b0, rst, hold;
  logic [3:0]  in;
  logic [16:0] cfg;
  logic        out;
  logic        exp_reg;
  int checks = 0, failures = 0;

  clb #(.K(4)) dut (.clk(clk), .rst(rst), .hold(hold), .in(in), .cfg(cfg), .out(out));

  always #5 clk = ~clk;

  initial begin
    rst = 1'b1; hold = 1'b0; in = '0; cfg = '0;
    @(negedge clk); rst = 1'b0;
    // Combinational LUT.
    for (int it = 0; it < 300; it++) begin
      cfg = {1'b0, 16'($urandom)};
      in  = 4'($urandom);
      #1; checks++;
      if (out !== cfg[in]) begin failures++; $display("FAIL lut cfg=%h in=%h", cfg, in); end
    end
    // Registered: output shows the LUT value of the previous clock.
    cfg = {1'b1, 16'h6996};   // 4-input XOR
    @(negedge clk);
    in = 4'($urandom);
    exp_reg = cfg[in];
    @(negedge clk);
    for (int it = 0; it < 100; it++) begin
      // a new input must not reach the output before the next clock
      in = 4'($urandom);
      #1;
      checks++;
      if (out !== exp_reg) begin failures++; $display("FAIL reg in=%h", in); end
      exp_reg = cfg[in];
      @(negedge clk);
    end
    // Hold forces 0 and clears the flip-flop.
    cfg = {1'b0, 16'hFFFF}; hold = 1'b1; #1;
    checks++; if (out !== 1'b0) begin failures++; $display("FAIL hold comb"); end
    cfg = {1'b1, 16'hFFFF}; @(negedge clk); hold = 1'b0; #1;
    checks++; if (out !== 1'b0) begin failures++; $display("FAIL hold clears ff"); end
    @(negedge clk);
    checks++; if (out !== 1'b1) begin failures++; $display("FAIL ff after hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
