// tb_cluster: the default cluster (10 CLBs of 4 inputs, 24 inputs, 12
// outputs, LRS2 redundancy: AFGR + URM) against a bit-level model computed
// from the configuration vector the testbench writes.
//
// Phase 1: random configurations with every CLB registered (no
// combinational loop is then possible), random inputs every clock; all 12
// outputs are compared every cycle.
// Phase 2: a directed combinational configuration: CLB0 = AND of one input
// per DMSB (one of them moved by the AFGR levels), CLB1 = CLB0 XOR an input,
// reached through the UMSB feedback, and output 11 driven by the URM spare
// while its own Mu is pointed elsewhere.
module tb_cluster;
  import moc_pkg::*;
  localparam int NIN = 24, NOUT = 12, NCLB = 10, K = 4, NPER = 6, FBO = 3;
  localparam int DIN = NPER + FBO, SW = 4, DMSB_CFG = NCLB * SW;
  localparam int UMSB_CFG = (NOUT + 1) * SW + NOUT;
  localparam int AFGR_CFG = 2 * NIN, CLB_CFG = 17;
  localparam int O_DMSB = AFGR_CFG, O_UMSB = O_DMSB + K * DMSB_CFG, O_CLB = O_UMSB + UMSB_CFG;
  localparam int BITS = O_CLB + NCLB * CLB_CFG;
  localparam int WORDS = (BITS + CFG_DW - 1) / CFG_DW;

  logic clk = 1'b0, rst, hold, cfg_we;
  logic [CFG_AW-1:0] cfg_addr;
  logic [CFG_DW-1:0] cfg_wdata;
  logic [NIN-1:0]    in;
  logic [NOUT-1:0]   out;
  logic [WORDS*CFG_DW-1:0] cv;
  logic [NCLB-1:0]   ff_m;       // model flip-flops
  logic [NCLB-1:0]   lut_m;      // model LUT values
  logic [NOUT-1:0]   out_m;
  int checks = 0, failures = 0;

  cluster dut (.clk(clk), .rst(rst), .hold(hold), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
               .cfg_wdata(cfg_wdata), .in(in), .out(out));

  always #5 clk = ~clk;

  function automatic logic pick(input logic [31:0] v, input int n, input int s);
    return (s < n) ? v[s] : 1'b0;
  endfunction

  // Settles the cluster combinationally from inputs, configuration and
  // flip-flop state; returns outputs and LUT values.
  task automatic model(input logic [NIN-1:0] x, output logic [NOUT-1:0] o,
                       output logic [NCLB-1:0] lv);
    logic [NIN-1:0] l1, xa;
    logic [NCLB-1:0] co;
    logic [NOUT-1:0] mu, ub;
    logic spare;
    for (int i = 0; i < NIN; i++) l1[i] = cv[i] ? x[(i + 1) % NIN] : x[i];
    for (int i = 0; i < NIN; i++) xa[i] = cv[NIN + i] ? l1[(i + NIN - 1) % NIN] : l1[i];
    co = '0; lv = '0; ub = '0;
    for (int pass = 0; pass < NCLB + 2; pass++) begin
      for (int c = 0; c < NCLB; c++) co[c] = cv[O_CLB + c*CLB_CFG + 16] ? ff_m[c] : lv[c];
      for (int j = 0; j < NOUT + 1; j++) begin
        logic b = pick(32'(co), NCLB, int'(cv[O_UMSB + j*SW +: SW]));
        if (j < NOUT) mu[j] = b; else spare = b;
      end
      for (int j = 0; j < NOUT; j++) ub[j] = cv[O_UMSB + (NOUT + 1)*SW + j] ? spare : mu[j];
      for (int c = 0; c < NCLB; c++) begin
        logic [3:0] ci;
        for (int q = 0; q < K; q++) begin
          logic [DIN-1:0] dd = {ub[q*FBO +: FBO], xa[q*NPER +: NPER]};
          ci[q] = pick(32'(dd), DIN, int'(cv[O_DMSB + q*DMSB_CFG + c*SW +: SW]));
        end
        lv[c] = cv[O_CLB + c*CLB_CFG + int'(ci)];
      end
    end
    o = ub;
  endtask

  task automatic load();
    hold = 1'b1;
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = CFG_AW'(w); cfg_wdata = cv[w*CFG_DW +: CFG_DW];
    end
    @(negedge clk);
    cfg_we = 1'b0;
    @(negedge clk);
    hold = 1'b0;
    ff_m = '0;
  endtask

  task automatic set(input int off, input int w, input int v);
    for (int b = 0; b < w; b++) cv[off + b] = v[b];
  endtask

  initial begin
    rst = 1'b1; hold = 1'b1; cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0; in = '0; ff_m = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    // ---- phase 1: random registered configurations
    for (int r = 0; r < 20; r++) begin
      for (int w = 0; w < WORDS; w++) cv[w*CFG_DW +: CFG_DW] = $urandom;
      for (int c = 0; c < NCLB; c++) cv[O_CLB + c*CLB_CFG + 16] = 1'b1;
      load();
      for (int t = 0; t < 20; t++) begin
        in = NIN'($urandom);
        #1;
        model(in, out_m, lut_m);
        checks++;
        if (out !== out_m) begin
          failures++;
          $display("FAIL random cfg %0d cycle %0d out=%h exp=%h", r, t, out, out_m);
        end
        @(posedge clk);
        ff_m = lut_m;
        @(negedge clk);
      end
    end
    // ---- phase 2: directed combinational configuration
    cv = '0;
    set(3, 1, 1);                              // AFGR level 1: line 3 carries input 4
    set(O_DMSB + 0*DMSB_CFG + 0*SW, SW, 3);    // CLB0.in0 = line 3 (= input 4)
    set(O_DMSB + 1*DMSB_CFG + 0*SW, SW, 1);    // CLB0.in1 = input 7
    set(O_DMSB + 2*DMSB_CFG + 0*SW, SW, 2);    // CLB0.in2 = input 14
    set(O_DMSB + 3*DMSB_CFG + 0*SW, SW, 5);    // CLB0.in3 = input 23
    set(O_CLB + 0*CLB_CFG, 16, 16'h8000);      // CLB0 = AND4
    set(O_UMSB + 0*SW, SW, 0);                 // out0 = CLB0 (feeds back to DMSB0)
    set(O_DMSB + 0*DMSB_CFG + 1*SW, SW, 6);    // CLB1.in0 = feedback ub[0]
    set(O_DMSB + 1*DMSB_CFG + 1*SW, SW, 0);    // CLB1.in1 = input 6
    set(O_CLB + 1*CLB_CFG, 16, 16'h6666);      // CLB1 = in0 ^ in1
    set(O_UMSB + 5*SW, SW, 1);                 // out5 = CLB1
    set(O_UMSB + 11*SW, SW, 9);                // Mu11 left on CLB9 (treated as defective)
    set(O_UMSB + NOUT*SW, SW, 1);              // URM spare = CLB1
    set(O_UMSB + (NOUT + 1)*SW + 11, 1, 1);    // out11 takes the spare
    set(O_CLB + 9*CLB_CFG, 16, 16'hFFFF);      // CLB9 = 1, so the bypass is visible
    load();
    for (int t = 0; t < 200; t++) begin
      logic a, x;
      in = NIN'($urandom);
      #1;
      a = in[4] & in[7] & in[14] & in[23];
      x = a ^ in[6];
      model(in, out_m, lut_m);
      checks += 4;
      if (out[0]  !== a) begin failures++; $display("FAIL AND4 in=%h", in); end
      if (out[5]  !== x) begin failures++; $display("FAIL feedback XOR in=%h", in); end
      if (out[11] !== x) begin failures++; $display("FAIL URM bypass in=%h", in); end
      if (out !== out_m) begin failures++; $display("FAIL model out=%h exp=%h", out, out_m); end
      @(negedge clk);
    end
    // hold forces all CLB outputs to 0
    hold = 1'b1; in = '1; #1;
    checks++;
    if (out[0] !== 1'b0) begin failures++; $display("FAIL hold"); end
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
