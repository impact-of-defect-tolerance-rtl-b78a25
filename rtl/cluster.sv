// cluster: one cluster of the Mesh-of-Clusters FPGA with its configuration
// memory and local redundancy.
//
// N_CLB CLBs of K inputs are fed by K Downward Mini Switch Boxes (DMSBs):
// DMSB q drives input q of every CLB (one Md multiplexer per CLB) and sees
// the N_IN/K cluster inputs arriving from the cluster's corner q, plus
// feedback lines. The Upward MSB (UMSB) collects the N_CLB CLB outputs onto
// the N_OUT cluster outputs (one Mu per output); N_OUT/K of them leave
// through each corner. Every UMSB output is also fed back to a DMSB so CLBs
// can be chained inside the cluster: the N_OUT/K outputs of corner q return
// to DMSB q.
//
// Redundancy (parameter RED, default LRS2 = AFGR + URM):
//  - afgr: an afgr_stage on the N_IN cluster inputs, ahead of all DMSBs;
//  - df:   distributed feedbacks, every UMSB output reaches every DMSB
//          (N_df = N_OUT - N_OUT/K extra feedback inputs per Md);
//  - fgr / ifgr: output multiplexer levels on every DMSB;
//  - urm:  N_URM spare multiplexers in parallel with the UMSB.
// The grouping of inputs and feedbacks per DMSB and the distributed feedback
// sources are this design's reading of the architecture figures; the sizes
// (10 CLBs, 24 inputs, 12 outputs, 4 inputs per CLB) are the studied ones.
//
// Configuration is written through cfg_we/cfg_addr/cfg_wdata into the
// tile's cfg_mem (layout LSB first: AFGR, DMSB 0..K-1, UMSB, CLB 0..N_CLB-1).
// hold is asserted while the fabric is being configured and forces all CLB
// outputs to 0. The cluster is combinational from in to out except through
// CLB flip-flops that the configuration selects. The interconnect is
// structurally cyclic (UMSB -> DMSB -> CLB -> UMSB), as in any FPGA; a
// configuration must not close a loop without a registered CLB, and the
// combinational-loop warnings on this path are expected.
module cluster #(
  parameter int              N_CLB = 10,
  parameter int              N_IN  = 24,
  parameter int              N_OUT = 12,
  parameter int              K     = 4,
  parameter moc_pkg::redund_t RED  = moc_pkg::LRS2,
  parameter int              N_URM = 1,
  localparam int N_PER    = N_IN / K,
  localparam int FB_OWN   = N_OUT / K,
  localparam int N_FB     = RED.df ? N_OUT : FB_OWN,
  localparam int D_IN     = N_PER + N_FB,
  localparam int DMSB_CFG = N_CLB * moc_pkg::selw(D_IN) + ((RED.fgr || RED.ifgr) ? 2 * N_CLB : 0),
  localparam int U_URM    = RED.urm ? N_URM : 0,
  localparam int UMSB_CFG = (N_OUT + U_URM) * moc_pkg::selw(N_CLB)
                            + (U_URM > 0 ? N_OUT * moc_pkg::selw(1 + U_URM) : 0),
  localparam int AFGR_CFG = RED.afgr ? 2 * N_IN : 0,
  localparam int CLB_CFG  = (1 << K) + 1,
  localparam int O_DMSB   = AFGR_CFG,
  localparam int O_UMSB   = O_DMSB + K * DMSB_CFG,
  localparam int O_CLB    = O_UMSB + UMSB_CFG,
  localparam int CFG_BITS = O_CLB + N_CLB * CLB_CFG
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       hold,
  input  logic                       cfg_we,
  input  logic [moc_pkg::CFG_AW-1:0] cfg_addr,
  input  logic [moc_pkg::CFG_DW-1:0] cfg_wdata,
  input  logic [N_IN-1:0]            in,
  output logic [N_OUT-1:0]           out
);
  logic [CFG_BITS-1:0] cfg;
  logic [N_IN-1:0]     in_a;     // cluster inputs after the AFGR levels
  logic [N_OUT-1:0]    ub;       // UMSB outputs
  logic [N_CLB-1:0]    clb_out;
  logic [N_CLB-1:0]    dq [K];   // DMSB q outputs, one per CLB

  initial begin
    assert (N_IN % K == 0 && N_OUT % K == 0)
      else $error("cluster: N_IN and N_OUT must be multiples of K");
    assert (moc_pkg::cfg_words(CFG_BITS) <= (1 << moc_pkg::CFG_AW))
      else $error("cluster: configuration does not fit the address space");
  end

  cfg_mem #(.BITS(CFG_BITS)) u_cfg (
    .clk(clk), .rst(rst), .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata), .cfg(cfg)
  );

  if (RED.afgr) begin : g_afgr
    afgr_stage #(.N(N_IN)) u_afgr (.d(in), .cfg(cfg[0 +: AFGR_CFG]), .q(in_a));
  end else begin : g_noafgr
    assign in_a = in;
  end

  for (genvar q = 0; q < K; q++) begin : g_dmsb
    logic [N_FB-1:0] fb;
    if (RED.df) begin : g_df
      assign fb = ub;
    end else begin : g_own
      assign fb = ub[q*FB_OWN +: FB_OWN];
    end
    msb #(.N_IN(D_IN), .N_OUT(N_CLB), .FGR(RED.fgr), .IFGR(RED.ifgr)) u_dmsb (
      .d({fb, in_a[q*N_PER +: N_PER]}),
      .cfg(cfg[O_DMSB + q*DMSB_CFG +: DMSB_CFG]),
      .q(dq[q])
    );
  end

  for (genvar c = 0; c < N_CLB; c++) begin : g_clb
    logic [K-1:0] ci;
    for (genvar q = 0; q < K; q++) begin : g_in
      assign ci[q] = dq[q][c];
    end
    clb #(.K(K)) u_clb (
      .clk(clk), .rst(rst), .hold(hold), .in(ci),
      .cfg(cfg[O_CLB + c*CLB_CFG +: CLB_CFG]), .out(clb_out[c])
    );
  end

  umsb #(.N_IN(N_CLB), .N_OUT(N_OUT), .N_URM(U_URM)) u_umsb (
    .d(clb_out), .cfg(cfg[O_UMSB +: UMSB_CFG]), .q(ub)
  );

  assign out = ub;
endmodule
