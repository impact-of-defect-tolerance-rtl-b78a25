// cluster_lrs_check: test helper. Builds one default-size cluster with the
// redundancy set RED and checks it against a bit-level model of that
// configuration for NCFG random configurations (all CLBs registered, so no
// combinational loop can occur) and random inputs. Reports its counts on
// checks/failures and raises done when finished. The model follows the
// documented layout: [AFGR][DMSB 0..3 (Md selects, FGR levels)][UMSB Mu,
// spare, spare selects][CLB 0..9].
module cluster_lrs_check #(
  parameter moc_pkg::redund_t RED  = moc_pkg::LRS2,
  parameter int               NCFG = 12
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  import moc_pkg::*;
  localparam int NIN = 24, NOUT = 12, NCLB = 10, K = 4;
  localparam bit OL = RED.fgr || RED.ifgr;
  localparam int NFB = RED.df ? NOUT : NOUT / K, DIN = NIN / K + NFB;
  localparam int SWD = (DIN > 16) ? 5 : 4;
  localparam int DMSB_CFG = NCLB * SWD + (OL ? 2 * NCLB : 0);
  localparam int U = RED.urm ? 1 : 0;
  localparam int UMSB_CFG = (NOUT + U) * 4 + U * NOUT;
  localparam int O_DMSB = RED.afgr ? 2 * NIN : 0;
  localparam int O_UMSB = O_DMSB + K * DMSB_CFG, O_CLB = O_UMSB + UMSB_CFG;
  localparam int BITS = O_CLB + NCLB * 17, WORDS = (BITS + CFG_DW - 1) / CFG_DW;

  logic rst, hold, cfg_we;
  logic [CFG_AW-1:0] cfg_addr;
  logic [CFG_DW-1:0] cfg_wdata;
  logic [NIN-1:0] in;
  logic [NOUT-1:0] out, out_m;
  logic [WORDS*CFG_DW-1:0] cv;
  logic [NCLB-1:0] ff_m, lut_m;

  cluster #(.RED(RED)) dut (.clk(clk), .rst(rst), .hold(hold), .cfg_we(cfg_we), .cfg_addr(cfg_addr),
                            .cfg_wdata(cfg_wdata), .in(in), .out(out));

  function automatic logic pick(input logic [31:0] v, input int n, input int s);
    return (s < n) ? v[s] : 1'b0;
  endfunction

  task automatic model();
    logic [NIN-1:0] l1, xa;
    logic [NOUT-1:0] mu, ub;
    logic spare;
    if (RED.afgr) begin
      for (int i = 0; i < NIN; i++) l1[i] = cv[i] ? in[(i + 1) % NIN] : in[i];
      for (int i = 0; i < NIN; i++) xa[i] = cv[NIN + i] ? l1[(i + NIN - 1) % NIN] : l1[i];
    end else xa = in;
    spare = 1'b0;
    for (int j = 0; j < NOUT + U; j++) begin
      logic b = pick(32'(ff_m), NCLB, int'(cv[O_UMSB + j*4 +: 4]));
      if (j < NOUT) mu[j] = b; else spare = b;
    end
    for (int j = 0; j < NOUT; j++) ub[j] = (U > 0 && cv[O_UMSB + (NOUT + 1)*4 + j]) ? spare : mu[j];
    out_m = ub;
    for (int c = 0; c < NCLB; c++) begin
      logic [3:0] ci;
      for (int q = 0; q < K; q++) begin
        int base = O_DMSB + q * DMSB_CFG;
        logic [DIN-1:0] dd;
        logic [NCLB-1:0] md, o1, qq;
        if (RED.df) dd = DIN'({ub, xa[q*6 +: 6]});
        else        dd = DIN'({ub[q*3 +: 3], xa[q*6 +: 6]});
        for (int m = 0; m < NCLB; m++) md[m] = pick(32'(dd), DIN, int'(cv[base + m*SWD +: SWD]));
        if (OL) begin
          for (int m = 0; m < NCLB; m++) o1[m] = cv[base + NCLB*SWD + m] ? md[(m + 1) % NCLB] : md[m];
          for (int m = 0; m < NCLB; m++) qq[m] = cv[base + NCLB*SWD + NCLB + m] ? o1[(m + NCLB - 1) % NCLB] : o1[m];
        end else qq = md;
        ci[q] = qq[c];
      end
      lut_m[c] = cv[O_CLB + c*17 + int'(ci)];
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    rst = 1'b1; hold = 1'b1; cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0; in = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < NCFG; r++) begin
      for (int w = 0; w < WORDS; w++) cv[w*CFG_DW +: CFG_DW] = $urandom;
      for (int c = 0; c < NCLB; c++) cv[O_CLB + c*17 + 16] = 1'b1;
      hold = 1'b1;
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        cfg_we = 1'b1; cfg_addr = CFG_AW'(w); cfg_wdata = cv[w*CFG_DW +: CFG_DW];
      end
      @(negedge clk); cfg_we = 1'b0;
      @(negedge clk); hold = 1'b0; ff_m = '0;
      for (int t = 0; t < 20; t++) begin
        in = NIN'($urandom);
        #1;
        model();
        checks++;
        if (out !== out_m) begin
          failures++;
          $display("FAIL cluster RED=%b cfg %0d cycle %0d out=%h exp=%h", RED, r, t, out, out_m);
        end
        @(posedge clk);
        ff_m = lut_m;
        @(negedge clk);
      end
    end
    done = 1'b1;
  end
endmodule
