// tb_sbox: the default switch box (36 tracks in and out, LRS2 redundancy)
// against a bit-level model computed from the configuration vector: random
// configurations and random tracks and cluster outputs, all 36 outgoing
// tracks and 24 cluster inputs compared. A directed route then takes a
// west-side track to cluster quadrant 3 and a quadrant-3 cluster output to
// the south side.
module tb_sbox;
  import moc_pkg::*;
  localparam int CW = 36, TW = 4, NQ = 4, NIQ = 6, NOQ = 3, NU2 = 3;
  localparam int ND2 = CW / TW, NS = ND2, SPER = NS / NU2, NCLO = NQ * NOQ;
  localparam int USW = 4, U2_CFG = (SPER + 1) * USW + SPER;
  localparam int D2SW = 3, D2_CFG = TW * D2SW;
  localparam int AFGR_CFG = 2 * CW, D1_IN = ND2, D1SW = 4, D1_CFG = NIQ * D1SW;
  localparam int O_D2 = NU2 * U2_CFG, O_AFGR = O_D2 + ND2 * D2_CFG;
  localparam int O_D1 = O_AFGR + AFGR_CFG, BITS = O_D1 + NQ * D1_CFG;
  localparam int WORDS = (BITS + CFG_DW - 1) / CFG_DW;

  logic clk = 1'b0, rst, cfg_we;
  logic [CFG_AW-1:0] cfg_addr;
  logic [CFG_DW-1:0] cfg_wdata;
  logic [CW-1:0]     trk_in, trk_out, trk_m;
  logic [NCLO-1:0]   clo;
  logic [NQ*NIQ-1:0] cli, cli_m;
  logic [WORDS*CFG_DW-1:0] cv;
  int checks = 0, failures = 0;

  sbox dut (.clk(clk), .rst(rst), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
            .trk_in(trk_in), .trk_out(trk_out), .clo(clo), .cli(cli));

  always #5 clk = ~clk;

  function automatic logic pick(input logic [63:0] v, input int n, input int s);
    return (s < n) ? v[s] : 1'b0;
  endfunction

  task automatic model();
    logic [NS-1:0] s;
    logic [CW-1:0] d2, l1, d2a;
    for (int u = 0; u < NU2; u++) begin
      int base = u * U2_CFG;
      logic spare = pick(64'(clo), NCLO, int'(cv[base + SPER*USW +: USW]));
      for (int p = 0; p < SPER; p++) begin
        logic mu = pick(64'(clo), NCLO, int'(cv[base + p*USW +: USW]));
        s[u*SPER + p] = cv[base + (SPER + 1)*USW + p] ? spare : mu;
      end
    end
    for (int k = 0; k < ND2; k++) begin
      logic [TW:0] dd = {trk_in[k*TW +: TW], s[k]};
      for (int l = 0; l < TW; l++)
        d2[k*TW + l] = pick(64'(dd), TW + 1, int'(cv[O_D2 + k*D2_CFG + l*D2SW +: D2SW]));
    end
    for (int t = 0; t < CW; t++) trk_m[(t + CW/2) % CW] = d2[t];
    for (int i = 0; i < CW; i++) l1[i]  = cv[O_AFGR + i] ? d2[(i + 1) % CW] : d2[i];
    for (int i = 0; i < CW; i++) d2a[i] = cv[O_AFGR + CW + i] ? l1[(i + CW - 1) % CW] : l1[i];
    for (int j = 0; j < NQ; j++) begin
      logic [ND2-1:0] lane;
      for (int k = 0; k < ND2; k++) lane[k] = d2a[k*TW + j];
      for (int o = 0; o < NIQ; o++)
        cli_m[j*NIQ + o] = pick(64'(lane), D1_IN, int'(cv[O_D1 + j*D1_CFG + o*D1SW +: D1SW]));
    end
  endtask

  task automatic load();
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = CFG_AW'(w); cfg_wdata = cv[w*CFG_DW +: CFG_DW];
    end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic set(input int off, input int w, input int v);
    for (int b = 0; b < w; b++) cv[off + b] = v[b];
  endtask

  task automatic compare(input string what);
    model();
    checks++;
    if (trk_out !== trk_m || cli !== cli_m) begin
      failures++;
      $display("FAIL %s trk=%h/%h cli=%h/%h", what, trk_out, trk_m, cli, cli_m);
    end
  endtask

  initial begin
    rst = 1'b1; cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0; trk_in = '0; clo = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < 30; r++) begin
      for (int w = 0; w < WORDS; w++) cv[w*CFG_DW +: CFG_DW] = $urandom;
      load();
      for (int t = 0; t < 30; t++) begin
        trk_in = {$urandom, $urandom};
        clo    = NCLO'($urandom);
        #1;
        compare("random");
      end
    end
    // Directed: west track 0 (track 27, DMSB2 6 input 4) -> DMSB2 6 lane 3
    // -> DMSB1 3 output 2 (quadrant 3 input 2), and on to outgoing track 9
    // (east 0, straight across); quadrant 3 output 0 (clo[9]) -> UMSB2 1
    // line s[5] via its URM spare -> DMSB2 5 lane 0 -> outgoing track 2
    // (north side).
    cv = '0;
    set(O_D2 + 6*D2_CFG + 3*D2SW, D2SW, 4);
    set(O_D1 + 3*D1_CFG + 2*D1SW, D1SW, 6);
    set(1*U2_CFG + 2*USW, USW, 0);            // own Mu of s[5] left on clo[0]
    set(1*U2_CFG + SPER*USW, USW, 9);         // spare picks clo[9]
    set(1*U2_CFG + (SPER + 1)*USW + 2, 1, 1); // s[5] takes the spare
    set(O_D2 + 5*D2_CFG + 0*D2SW, D2SW, 0);
    load();
    for (int t = 0; t < 50; t++) begin
      trk_in = {$urandom, $urandom};
      clo    = NCLO'($urandom);
      #1;
      checks += 3;
      if (cli[3*NIQ + 2] !== trk_in[27]) begin failures++; $display("FAIL track to cluster"); end
      if (trk_out[2] !== clo[9])        begin failures++; $display("FAIL cluster to track"); end
      if (trk_out[9] !== trk_in[27])     begin failures++; $display("FAIL straight through"); end
      compare("directed");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
