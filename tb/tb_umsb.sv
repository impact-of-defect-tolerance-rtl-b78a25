// tb_umsb: random check of the UMSB with one and with two URM spares, and
// a directed check that a spare replaces an output whose own Mu is unusable.
module tb_umsb;
  localparam int NI = 10, NO = 12, SW = 4;
  localparam int CB1 = (NO + 1) * SW + NO * 1;   // N_URM = 1
  localparam int CB2 = (NO + 2) * SW + NO * 2;   // N_URM = 2

  logic [NI-1:0]  d;
  logic [CB1-1:0] c1;
  logic [CB2-1:0] c2;
  logic [NO-1:0]  q1, q2;
  int checks = 0, failures = 0;

  umsb #(.N_IN(NI), .N_OUT(NO), .N_URM(1)) dut1 (.d(d), .cfg(c1), .q(q1));
  umsb #(.N_IN(NI), .N_OUT(NO), .N_URM(2)) dut2 (.d(d), .cfg(c2), .q(q2));

  function automatic logic pick(input logic [NI-1:0] din, input int s);
    return (s < NI) ? din[s] : 1'b0;
  endfunction

  function automatic logic [NO-1:0] model(input logic [NI-1:0] din, input logic [CB2-1:0] cfg,
                                          input int nurm);
    logic [NO-1:0] q;
    int rw = (nurm > 1) ? 2 : 1;
    int bo = (NO + nurm) * SW;
    for (int j = 0; j < NO; j++) begin
      int r = int'(cfg[bo + j*rw +: 2]) & ((1 << rw) - 1);
      if (r == 0)         q[j] = pick(din, int'(cfg[j*SW +: SW]));
      else if (r <= nurm) q[j] = pick(din, int'(cfg[(NO + r - 1)*SW +: SW]));
      else                q[j] = 1'b0;
    end
    return q;
  endfunction

  initial begin
    for (int it = 0; it < 1000; it++) begin
      d  = NI'($urandom);
      c2 = {$urandom, $urandom, $urandom};
      c1 = {$urandom, $urandom};
      #1;
      checks += 2;
      if (q1 !== model(d, {{(CB2-CB1){1'b0}}, c1}, 1)) begin failures++; $display("FAIL urm1"); end
      if (q2 !== model(d, c2, 2))                      begin failures++; $display("FAIL urm2"); end
    end
    // Directed: output 7 should carry input 3, but its own Mu is left pointing
    // at input 9; the spare selects input 3 and output 7 switches to it.
    c1 = '0;
    c1[7*SW +: SW]  = 4'd9;
    c1[NO*SW +: SW] = 4'd3;
    c1[(NO + 1)*SW + 7] = 1'b1;
    for (int v = 0; v < 4; v++) begin
      d = NI'(v[0] << 3) | NI'(v[1] << 9);
      #1; checks++;
      if (q1[7] !== v[0]) begin failures++; $display("FAIL spare bypass v=%0d", v); end
    end
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
