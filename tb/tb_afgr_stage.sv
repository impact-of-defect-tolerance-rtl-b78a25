// tb_afgr_stage: random check of the AFGR input levels (line i carries input
// i-1, i or i+1 as configured) and of the pass-through with all bits 0.
module tb_afgr_stage;
  localparam int N = 24;
  logic [N-1:0]   d, q, l1, exp_q;
  logic [2*N-1:0] cfg;
  int checks = 0, failures = 0;

  afgr_stage #(.N(N)) dut (.d(d), .cfg(cfg), .q(q));

  initial begin
    for (int it = 0; it < 1000; it++) begin
      d   = N'($urandom);
      cfg = (it < 10) ? '0 : {$urandom, $urandom};
      #1;
      for (int i = 0; i < N; i++) l1[i] = cfg[i] ? d[(i + 1) % N] : d[i];
      for (int i = 0; i < N; i++) exp_q[i] = cfg[N + i] ? l1[(i + N - 1) % N] : l1[i];
      checks++;
      if (q !== exp_q) begin
        failures++;
        $display("FAIL d=%h cfg=%h q=%h exp=%h", d, cfg, q, exp_q);
      end
    end
    // Directed: line 5 takes its left neighbour (input 4), line 6 its right (input 7).
    d = 24'h000010; cfg = '0; cfg[N + 5] = 1'b1; cfg[4] = 1'b1;   // l1[4] = d[5], q[5] = l1[4]
    #1; checks++; if (q[5] !== d[5]) failures++;
    d = 24'h000080; cfg = '0; cfg[6] = 1'b1;                       // q[6] = d[7]
    #1; checks++; if (q[6] !== 1'b1) failures++;
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
