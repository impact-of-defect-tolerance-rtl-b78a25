// tb_lrs_cluster: checks a default-size cluster built with each local
// redundancy strategy (no redundancy, LRS1..LRS5) against a bit-level model
// of its configuration, using cluster_lrs_check for each build.
module tb_lrs_cluster;
  import moc_pkg::*;
  localparam int NB = 6;
  logic clk = 1'b0;
  int   c [NB];
  int   f [NB];
  logic d [NB];
  int   checks, failures;

  always #5 clk = ~clk;

  cluster_lrs_check #(.RED(RED_NONE)) u_none (.clk(clk), .checks(c[0]), .failures(f[0]), .done(d[0]));
  cluster_lrs_check #(.RED(LRS1))     u_lrs1 (.clk(clk), .checks(c[1]), .failures(f[1]), .done(d[1]));
  cluster_lrs_check #(.RED(LRS2))     u_lrs2 (.clk(clk), .checks(c[2]), .failures(f[2]), .done(d[2]));
  cluster_lrs_check #(.RED(LRS3))     u_lrs3 (.clk(clk), .checks(c[3]), .failures(f[3]), .done(d[3]));
  cluster_lrs_check #(.RED(LRS4))     u_lrs4 (.clk(clk), .checks(c[4]), .failures(f[4]), .done(d[4]));
  cluster_lrs_check #(.RED(LRS5))     u_lrs5 (.clk(clk), .checks(c[5]), .failures(f[5]), .done(d[5]));

  initial begin
    #1;  // let every checker clear its done flag first
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    checks = 0; failures = 0;
    for (int i = 0; i < NB; i++) begin
      $display("strategy %0d: checks=%0d failures=%0d", i, c[i], f[i]);
      checks += c[i]; failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end
endmodule
