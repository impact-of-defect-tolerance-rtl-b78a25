// tb_cfg_mem: writes, overwrites, out-of-range writes and reset of a 70-bit
// (3-word) configuration memory, against a shadow copy.
module tb_cfg_mem;
  import moc_pkg::*;
  localparam int BITS = 70;

  logic clk = 1'b0, rst, we;
  logic [CFG_AW-1:0] addr;
  logic [CFG_DW-1:0] wdata;
  logic [BITS-1:0]   cfg;
  logic [3*CFG_DW-1:0] shadow;
  int checks = 0, failures = 0;

  cfg_mem #(.BITS(BITS)) dut (.clk(clk), .rst(rst), .we(we), .addr(addr), .wdata(wdata), .cfg(cfg));

  always #5 clk = ~clk;

  task automatic write(input int a, input logic [CFG_DW-1:0] v);
    @(negedge clk);
    we = 1'b1; addr = CFG_AW'(a); wdata = v;
    @(negedge clk);
    we = 1'b0;
    if (a < 3) shadow[a*CFG_DW +: CFG_DW] = v;
  endtask

  task automatic check(input string what);
    checks++;
    if (cfg !== shadow[BITS-1:0]) begin
      failures++;
      $display("FAIL %s cfg=%h exp=%h", what, cfg, shadow[BITS-1:0]);
    end
  endtask

  initial begin
    we = 1'b0; addr = '0; wdata = '0; rst = 1'b1; shadow = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check("after reset");
    for (int it = 0; it < 50; it++) begin
      write($urandom_range(0, 5), $urandom);
      check("after write");
    end
    @(negedge clk); we = 1'b0;
    rst = 1'b1; @(negedge clk); rst = 1'b0; shadow = '0;
    check("after second reset");
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
