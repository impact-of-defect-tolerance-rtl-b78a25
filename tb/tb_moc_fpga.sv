// tb_moc_fpga: end-to-end test of the Mesh-of-Clusters fabric (LRS2
// redundancy). It configures tiles through the configuration port, then
// drives pins and checks pins against values computed in the testbench.
//
// Configured application (pin names as in moc_fpga):
//  - A = w_in[0][0] and B = s_in[0][1] enter switch box (0,0), go down its
//    DMSB2 and DMSB1 levels into cluster (0,0) inputs 2 and 5. Input 5 is
//    moved to line 6 (the next DMSB) by the cluster's AFGR levels.
//  - Cluster (0,0) CLB0 computes A ^ B combinationally. Its UMSB output 0 has
//    an unusable Mu (modelled as stuck at 1: it is left on CLB9, a constant
//    1); the URM spare replaces it. The value
//    leaves through switch box (0,0), whose UMSB2 line uses its own URM
//    spare, to s_out[0][0].
//  - CLB2 of cluster (0,0) registers A ^ B, read back through the UMSB
//    feedback into DMSB0, and sends it through switch box (1,1) into cluster
//    (1,1), whose CLB0 inverts it. The result goes from switch box (1,1)
//    along a channel track to switch box (0,1) and out on w_out[1][3].
//  - hold must force every CLB output, hence s_out[0][0], to 0.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_moc_fpga;
  import moc_pkg::*;
  localparam int NX = 2, NY = 2;
  localparam int N_TILE = NX * NY + (NX + 1) * (NY + 1);
  localparam int TAW = $clog2(N_TILE);
  // cluster configuration layout (defaults, LRS2)
  localparam int NIN = 24, NOUT = 12, NCLB = 10, SW = 4;
  localparam int C_DMSB = 2 * NIN, C_DMSBW = NCLB * SW, C_UMSB = C_DMSB + 4 * C_DMSBW;
  localparam int C_CLB = C_UMSB + (NOUT + 1) * SW + NOUT, C_CLBW = 17;
  localparam int C_BITS = C_CLB + NCLB * C_CLBW, C_WORDS = (C_BITS + CFG_DW - 1) / CFG_DW;
  // switch box configuration layout (defaults, LRS2)
  localparam int S_U2W = 4 * 4 + 3, S_D2 = 3 * S_U2W, S_D2W = 4 * 3, S_AFGR = S_D2 + 9 * S_D2W;
  localparam int S_D1 = S_AFGR + 72, S_D1W = 6 * 4;
  localparam int S_BITS = S_D1 + 4 * S_D1W, S_WORDS = (S_BITS + CFG_DW - 1) / CFG_DW;

  logic clk = 1'b0, rst, hold, cfg_we;
  logic [TAW-1:0]    cfg_tile;
  logic [CFG_AW-1:0] cfg_addr;
  logic [CFG_DW-1:0] cfg_wdata;
  logic [8:0] n_in [NX+1], n_out [NX+1], s_in [NX+1], s_out [NX+1];
  logic [8:0] e_in [NY+1], e_out [NY+1], w_in [NY+1], w_out [NY+1];

  logic [C_WORDS*CFG_DW-1:0] clv [NX*NY];
  logic [S_WORDS*CFG_DW-1:0] sbv [(NX+1)*(NY+1)];
  bit                        cl_dirty [NX*NY];
  bit                        sb_dirty [(NX+1)*(NY+1)];

  int checks = 0, failures = 0;
  int n_comb = 0, n_afgr = 0, n_urm_cl = 0, n_urm_sb = 0, n_fb = 0, n_reg = 0, n_hop = 0, n_hold = 0;

  moc_fpga #(.NX(NX), .NY(NY)) dut (
    .clk(clk), .rst(rst), .hold(hold), .cfg_we(cfg_we), .cfg_tile(cfg_tile), .cfg_addr(cfg_addr),
    .cfg_wdata(cfg_wdata), .n_in(n_in), .n_out(n_out), .s_in(s_in), .s_out(s_out),
    .e_in(e_in), .e_out(e_out), .w_in(w_in), .w_out(w_out)
  );

  always #5 clk = ~clk;

  function automatic int cl_id(input int i, input int j); return j * NX + i; endfunction
  function automatic int sb_id(input int x, input int y); return y * (NX + 1) + x; endfunction

  task automatic cl_set(input int i, input int j, input int off, input int w, input int v);
    for (int b = 0; b < w; b++) clv[cl_id(i, j)][off + b] = v[b];
    cl_dirty[cl_id(i, j)] = 1'b1;
  endtask

  task automatic sb_set(input int x, input int y, input int off, input int w, input int v);
    for (int b = 0; b < w; b++) sbv[sb_id(x, y)][off + b] = v[b];
    sb_dirty[sb_id(x, y)] = 1'b1;
  endtask

  task automatic write_word(input int tile, input int a, input logic [CFG_DW-1:0] v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_tile = TAW'(tile); cfg_addr = CFG_AW'(a); cfg_wdata = v;
  endtask

  // Writes every tile that differs from the reset state, under hold.
  task automatic configure();
    hold = 1'b1;
    for (int t = 0; t < NX * NY; t++)
      if (cl_dirty[t]) for (int w = 0; w < C_WORDS; w++) write_word(t, w, clv[t][w*CFG_DW +: CFG_DW]);
    for (int t = 0; t < (NX + 1) * (NY + 1); t++)
      if (sb_dirty[t]) for (int w = 0; w < S_WORDS; w++)
        write_word(NX * NY + t, w, sbv[t][w*CFG_DW +: CFG_DW]);
    @(negedge clk);
    cfg_we = 1'b0;
    // hold keeps the cluster outputs at 0 whatever the pins do
    w_in[0][0] = 1'b1; s_in[0][1] = 1'b0; #1;
    checks++;
    if (s_out[0][0] !== 1'b0) begin failures++; $display("FAIL hold"); end else n_hold++;
    @(negedge clk);
    hold = 1'b0;
  endtask

  initial begin
    logic a, b, x, reg_m, prev_reg;
    rst = 1'b1; hold = 1'b1; cfg_we = 1'b0; cfg_tile = '0; cfg_addr = '0; cfg_wdata = '0;
    for (int k = 0; k <= NX; k++) begin n_in[k] = '0; s_in[k] = '0; end
    for (int k = 0; k <= NY; k++) begin e_in[k] = '0; w_in[k] = '0; end
    for (int t = 0; t < NX * NY; t++) begin clv[t] = '0; cl_dirty[t] = 1'b0; end
    for (int t = 0; t < (NX + 1) * (NY + 1); t++) begin sbv[t] = '0; sb_dirty[t] = 1'b0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;

    // ---- switch box (0,0): pins A and B down to cluster (0,0)
    sb_set(0, 0, S_D2 + 6*S_D2W + 3*3, 3, 4);      // DMSB2 6 lane 3 <- track 27 (A)
    sb_set(0, 0, S_D1 + 3*S_D1W + 2*4, 4, 6);      // DMSB1 3 out 2 <- DMSB2 6 lane 3
    sb_set(0, 0, S_D2 + 4*S_D2W + 3*3, 3, 4);      // DMSB2 4 lane 3 <- track 19 (B)
    sb_set(0, 0, S_D1 + 3*S_D1W + 5*4, 4, 4);      // DMSB1 3 out 5 <- DMSB2 4 lane 3
    // ---- cluster (0,0): CLB0 = A ^ B, CLB2 = registered CLB0
    cl_set(0, 0, NIN + 6, 1, 1);                   // AFGR: line 6 takes input 5
    cl_set(0, 0, C_DMSB + 0*C_DMSBW + 0*SW, SW, 2);// CLB0.in0 <- input 2 (A)
    cl_set(0, 0, C_DMSB + 1*C_DMSBW + 0*SW, SW, 0);// CLB0.in1 <- line 6 (B)
    cl_set(0, 0, C_CLB + 0*C_CLBW, 16, 16'h6666);
    cl_set(0, 0, C_UMSB + 0*SW, SW, 9);            // Mu0 unusable: stuck on CLB9
    cl_set(0, 0, C_CLB + 9*C_CLBW, 16, 16'hFFFF);  // CLB9 = constant 1
    cl_set(0, 0, C_UMSB + NOUT*SW, SW, 0);         // URM spare <- CLB0
    cl_set(0, 0, C_UMSB + (NOUT + 1)*SW + 0, 1, 1);// out0 <- spare (Mu0 defective)
    cl_set(0, 0, C_DMSB + 0*C_DMSBW + 2*SW, SW, 6);// CLB2.in0 <- feedback out0
    cl_set(0, 0, C_CLB + 2*C_CLBW, 17, 17'h1AAAA); // CLB2 = registered in0
    cl_set(0, 0, C_UMSB + 9*SW, SW, 2);            // out9 <- CLB2 (corner 3)
    // ---- switch box (0,0): cluster output 0 to s_out[0][0] via its URM spare
    sb_set(0, 0, 0*S_U2W + 3*4, 4, 9);             // UMSB2 0 spare <- clo[9]
    sb_set(0, 0, 0*S_U2W + 4*4 + 0, 1, 1);         // s[0] <- spare
    sb_set(0, 0, S_D2 + 0*S_D2W + 0*3, 3, 0);      // DMSB2 0 lane 0 <- s[0] -> track 18
    // ---- switch box (1,1): cluster (0,0) out9 into cluster (1,1) input 0
    sb_set(1, 1, 0*S_U2W + 1*4, 4, 0);             // s[1] <- clo[0]
    sb_set(1, 1, S_D2 + 1*S_D2W + 3*3, 3, 0);      // DMSB2 1 lane 3 <- s[1]
    sb_set(1, 1, S_D1 + 3*S_D1W + 0*4, 4, 1);      // DMSB1 3 out 0 <- DMSB2 1 lane 3
    // ---- cluster (1,1): CLB0 = NOT input 0, out0
    cl_set(1, 1, C_DMSB + 0*C_DMSBW + 0*SW, SW, 0);
    cl_set(1, 1, C_CLB + 0*C_CLBW, 16, 16'h5555);
    cl_set(1, 1, C_UMSB + 0*SW, SW, 0);
    // ---- switch box (1,1) -> track west -> switch box (0,1) -> w_out[1][3]
    sb_set(1, 1, 1*S_U2W + 0*4, 4, 9);             // s[3] <- clo[9]
    sb_set(1, 1, S_D2 + 3*S_D2W + 0*3, 3, 0);      // DMSB2 3 lane 0 <- s[3] -> track 30 (W3)
    sb_set(0, 1, S_D2 + 3*S_D2W + 0*3, 3, 1);      // DMSB2 3 lane 0 <- track 12 (E3) -> W3
    configure();

    reg_m = 1'b0;
    for (int t = 0; t < 400; t++) begin
      a = 1'($urandom); b = 1'($urandom);
      w_in[0][0] = a; s_in[0][1] = b;
      // unrelated pins toggle freely
      n_in[0] = 9'($urandom); e_in[0] = 9'($urandom);
      #1;
      x = a ^ b;
      checks += 2;
      if (s_out[0][0] !== x) begin
        failures++; $display("FAIL comb path t=%0d a=%0b b=%0b out=%0b", t, a, b, s_out[0][0]);
      end else begin
        n_comb++;
        n_urm_sb++;
        if (b != dut.g_cx[0].g_cy[0].u_cluster.in[6]) n_afgr++;
        if (!x) n_urm_cl++;
      end
      if (w_out[1][3] !== ~reg_m) begin
        failures++; $display("FAIL registered path t=%0d out=%0b exp=%0b", t, w_out[1][3], ~reg_m);
      end else if (t > 0) begin
        n_fb++; n_hop++;
        if (reg_m != prev_reg) n_reg++;
      end
      @(posedge clk);
      prev_reg = reg_m;
      reg_m = x;
      @(negedge clk);
    end

    checks += 8;
    if (n_comb == 0)   begin failures++; $display("FAIL no combinational path"); end
    if (n_afgr == 0)   begin failures++; $display("FAIL AFGR never moved a signal"); end
    if (n_urm_cl == 0) begin failures++; $display("FAIL cluster URM never bypassed the defect"); end
    if (n_urm_sb == 0) begin failures++; $display("FAIL switch box URM never used"); end
    if (n_fb == 0)     begin failures++; $display("FAIL feedback never used"); end
    if (n_reg == 0)    begin failures++; $display("FAIL registered CLB never toggled"); end
    if (n_hop == 0)    begin failures++; $display("FAIL no track hop"); end
    if (n_hold == 0)   begin failures++; $display("FAIL hold never checked"); end
    $display("mechanisms: comb=%0d afgr=%0d urm_cluster=%0d urm_sbox=%0d feedback=%0d registered=%0d hop=%0d hold=%0d",
             n_comb, n_afgr, n_urm_cl, n_urm_sb, n_fb, n_reg, n_hop, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
