// tb_mux2: exhaustive check of the 2:1 multiplexer against its truth table.
module tb_mux2;
  logic a, b, s, y;
  int checks = 0, failures = 0;

  mux2 dut (.a(a), .b(b), .s(s), .y(y));

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, b, a} = 3'(v);
      #1;
      checks++;
      if (y !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL a=%0b b=%0b s=%0b y=%0b", a, b, s, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
