// tb_msb: random check of Mini Switch Boxes without redundancy, with FGR and
// with IFGR output levels. The expected output is computed from the
// configuration: Md j = d[sel_j] (0 past the last input), level 1 picks Md j
// or j+1, level 2 picks level-1 j or j-1, indices modulo N_OUT.
module tb_msb;
  localparam int NI = 9, NO = 10, SW = 4;
  localparam int CB0 = NO * SW, CB1 = NO * SW + 2 * NO;

  logic [NI-1:0]  d;
  logic [CB0-1:0] c0;
  logic [CB1-1:0] c1, c2;
  logic [NO-1:0]  q0, q1, q2;
  int checks = 0, failures = 0;
  int shifted = 0;

  msb #(.N_IN(NI), .N_OUT(NO))               dut_plain (.d(d), .cfg(c0), .q(q0));
  msb #(.N_IN(NI), .N_OUT(NO), .FGR(1'b1))   dut_fgr   (.d(d), .cfg(c1), .q(q1));
  msb #(.N_IN(NI), .N_OUT(NO), .IFGR(1'b1))  dut_ifgr  (.d(d), .cfg(c2), .q(q2));

  function automatic logic [NO-1:0] model(input logic [NI-1:0] din,
                                          input logic [CB1-1:0] cfg, input bit lv);
    logic [NO-1:0] md, o1, q;
    for (int j = 0; j < NO; j++) begin
      int s = int'(cfg[j*SW +: SW]);
      md[j] = (s < NI) ? din[s] : 1'b0;
    end
    if (!lv) return md;
    for (int j = 0; j < NO; j++) o1[j] = cfg[CB0 + j] ? md[(j + 1) % NO] : md[j];
    for (int j = 0; j < NO; j++) q[j] = cfg[CB0 + NO + j] ? o1[(j + NO - 1) % NO] : o1[j];
    return q;
  endfunction

  initial begin
    for (int it = 0; it < 1000; it++) begin
      d  = NI'($urandom);
      c1 = {$urandom, $urandom};
      c2 = {$urandom, $urandom};
      c0 = c1[CB0-1:0];
      #1;
      checks += 3;
      if (q0 !== model(d, {20'b0, c0}, 1'b0)) begin failures++; $display("FAIL plain"); end
      if (q1 !== model(d, c1, 1'b1))          begin failures++; $display("FAIL fgr");   end
      if (q2 !== model(d, c2, 1'b1))          begin failures++; $display("FAIL ifgr");  end
      if (q1 != model(d, {20'b0, c1[CB0-1:0]}, 1'b0)) shifted++;
    end
    // The output levels must actually change some results.
    checks++;
    if (shifted == 0) begin failures++; $display("FAIL output levels never shifted"); end
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
