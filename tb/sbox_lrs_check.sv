// sbox_lrs_check: test helper. Builds one default-size switch box with the
// redundancy set RED and checks all outgoing tracks and cluster inputs
// against a bit-level model for NCFG random configurations and random
// inputs. Layout: [UMSB2 0..2 (Mu, spare, spare selects)][DMSB2 0..8]
// [AFGR][DMSB1 0..3 (Md selects, FGR levels)].
module sbox_lrs_check #(
  parameter moc_pkg::redund_t RED  = moc_pkg::LRS2,
  parameter int               NCFG = 12
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  import moc_pkg::*;
  localparam int CW = 36, TW = 4, ND2 = 9, NS = 9, NCLO = 12, NIQ = 6;
  localparam bit OL = RED.fgr || RED.ifgr;
  localparam int U = RED.urm ? 1 : 0;
  localparam int U2_CFG = (3 + U) * 4 + U * 3, D2_CFG = 12;
  localparam int D1_IN = ND2 + (RED.df ? NS : 0), D1SW = (D1_IN > 16) ? 5 : 4;
  localparam int D1_CFG = NIQ * D1SW + (OL ? 2 * NIQ : 0);
  localparam int O_D2 = 3 * U2_CFG, O_AFGR = O_D2 + ND2 * D2_CFG;
  localparam int O_D1 = O_AFGR + (RED.afgr ? 2 * CW : 0), BITS = O_D1 + 4 * D1_CFG;
  localparam int WORDS = (BITS + CFG_DW - 1) / CFG_DW;

  logic rst, cfg_we;
  logic [CFG_AW-1:0] cfg_addr;
  logic [CFG_DW-1:0] cfg_wdata;
  logic [CW-1:0] trk_in, trk_out, trk_m;
  logic [NCLO-1:0] clo;
  logic [4*NIQ-1:0] cli, cli_m;
  logic [WORDS*CFG_DW-1:0] cv;

  sbox #(.RED(RED)) dut (.clk(clk), .rst(rst), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
                         .trk_in(trk_in), .trk_out(trk_out), .clo(clo), .cli(cli));

  function automatic logic pick(input logic [63:0] v, input int n, input int s);
    return (s < n) ? v[s] : 1'b0;
  endfunction

  task automatic model();
    logic [NS-1:0] s;
    logic [CW-1:0] d2, l1, d2a;
    for (int u = 0; u < 3; u++) begin
      int base = u * U2_CFG;
      logic spare = (U > 0) ? pick(64'(clo), NCLO, int'(cv[base + 12 +: 4])) : 1'b0;
      for (int p = 0; p < 3; p++) begin
        logic mu = pick(64'(clo), NCLO, int'(cv[base + p*4 +: 4]));
        s[u*3 + p] = (U > 0 && cv[base + 16 + p]) ? spare : mu;
      end
    end
    for (int k = 0; k < ND2; k++) begin
      logic [TW:0] dd = {trk_in[k*TW +: TW], s[k]};
      for (int l = 0; l < TW; l++) d2[k*TW + l] = pick(64'(dd), TW + 1, int'(cv[O_D2 + k*D2_CFG + l*3 +: 3]));
    end
    for (int t = 0; t < CW; t++) trk_m[(t + CW/2) % CW] = d2[t];
    if (RED.afgr) begin
      for (int i = 0; i < CW; i++) l1[i]  = cv[O_AFGR + i] ? d2[(i + 1) % CW] : d2[i];
      for (int i = 0; i < CW; i++) d2a[i] = cv[O_AFGR + CW + i] ? l1[(i + CW - 1) % CW] : l1[i];
    end else d2a = d2;
    for (int j = 0; j < 4; j++) begin
      int base = O_D1 + j * D1_CFG;
      logic [ND2-1:0] lane;
      logic [D1_IN-1:0] din;
      logic [NIQ-1:0] md, o1, qq;
      for (int k = 0; k < ND2; k++) lane[k] = d2a[k*TW + j];
      if (RED.df) din = D1_IN'({s, lane}); else din = D1_IN'(lane);
      for (int o = 0; o < NIQ; o++) md[o] = pick(64'(din), D1_IN, int'(cv[base + o*D1SW +: D1SW]));
      if (OL) begin
        for (int o = 0; o < NIQ; o++) o1[o] = cv[base + NIQ*D1SW + o] ? md[(o + 1) % NIQ] : md[o];
        for (int o = 0; o < NIQ; o++) qq[o] = cv[base + NIQ*D1SW + NIQ + o] ? o1[(o + NIQ - 1) % NIQ] : o1[o];
      end else qq = md;
      cli_m[j*NIQ +: NIQ] = qq;
    end
  endtask

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    rst = 1'b1; cfg_we = 1'b0; cfg_addr = '0; cfg_wdata = '0; trk_in = '0; clo = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int r = 0; r < NCFG; r++) begin
      for (int w = 0; w < WORDS; w++) cv[w*CFG_DW +: CFG_DW] = $urandom;
      for (int w = 0; w < WORDS; w++) begin
        @(negedge clk);
        cfg_we = 1'b1; cfg_addr = CFG_AW'(w); cfg_wdata = cv[w*CFG_DW +: CFG_DW];
      end
      @(negedge clk); cfg_we = 1'b0;
      for (int t = 0; t < 20; t++) begin
        trk_in = {$urandom, $urandom};
        clo = NCLO'($urandom);
        #1;
        model();
        checks++;
        if (trk_out !== trk_m || cli !== cli_m) begin
          failures++;
          $display("FAIL sbox RED=%b cfg %0d: trk=%h/%h cli=%h/%h", RED, r, trk_out, trk_m, cli, cli_m);
        end
      end
    end
    done = 1'b1;
  end
endmodule
