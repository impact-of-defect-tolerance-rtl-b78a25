// tb_cfg_mux: random check of N:1 configurable multiplexers of a
// non-power-of-two size (9, padded) and a power-of-two size (16) against
// "sel < N ? d[sel] : 0".
module tb_cfg_mux;
  logic [8:0]  d9;
  logic [3:0]  s9;
  logic        y9;
  logic [15:0] d16;
  logic [3:0]  s16;
  logic        y16;
  int checks = 0, failures = 0;

  cfg_mux #(.N(9))  dut9  (.d(d9),  .sel(s9),  .y(y9));
  cfg_mux #(.N(16)) dut16 (.d(d16), .sel(s16), .y(y16));

  initial begin
    for (int it = 0; it < 2000; it++) begin
      d9  = 9'($urandom);
      s9  = 4'($urandom);
      d16 = 16'($urandom);
      s16 = 4'($urandom);
      #1;
      checks += 2;
      if (y9 !== ((s9 < 9) ? d9[s9] : 1'b0)) begin
        failures++;
        $display("FAIL N=9 d=%h sel=%0d y=%0b", d9, s9, y9);
      end
      if (y16 !== d16[s16]) begin
        failures++;
        $display("FAIL N=16 d=%h sel=%0d y=%0b", d16, s16, y16);
      end
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
