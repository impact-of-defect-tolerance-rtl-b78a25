// sbox: one switch box of the Mesh-of-Clusters FPGA with its configuration
// memory and local redundancy. A switch box sits at every grid corner,
// between four channels (N, E, S, W) and four adjacent clusters.
//
// Structure (two hierarchical DMSB levels plus an upward box):
//  - UMSB2: N_U2 boxes; each sees the NOUT_Q outputs of every adjacent
//    cluster and drives S_PER "s" lines, N_S = N_D2 s lines in all.
//  - DMSB2: N_D2 = CW/TW boxes. DMSB2 k sees incoming tracks k*TW..k*TW+TW-1
//    and line s[k] and drives TW outgoing tracks, lane l driving outgoing
//    track (k*TW + l + CW/2) mod CW: half-way round the box, so a signal can
//    go straight across or turn a corner. Each of its multiplexers has two
//    loads, an outgoing track and the DMSB1 level (this is how a signal enters
//    the switch box and how a cluster output reaches the channels).
//  - DMSB1: N_ADJ boxes, one per adjacent cluster. DMSB1 j sees lane j%TW of
//    every DMSB2 and drives the NIN_Q inputs of cluster j.
// Incoming and outgoing track t belongs to side t / (CW/4) (0 N, 1 E, 2 S,
// 3 W). Quadrant j is the adjacent cluster 0 SW, 1 SE, 2 NW, 3 NE.
//
// Redundancy (parameter RED, default LRS2 = AFGR + URM):
//  - afgr: an afgr_stage on the DMSB2 -> DMSB1 lines, common to all DMSB1;
//  - df:   every s line also reaches every DMSB1 directly;
//  - fgr / ifgr: output multiplexer levels on every DMSB1;
//  - urm:  N_URM spare multiplexers in parallel with each UMSB2.
// The channel width (36 in, 36 out), the 4 tracks per DMSB2 and the per
// cluster counts (24 inputs over 4 corners, 12 outputs over 4 corners) follow
// the studied architecture; how the s lines and DMSB2 lanes are spread over
// the boxes is this design's own choice.
//
// Configuration layout (LSB first): UMSB2 0..N_U2-1, DMSB2 0..N_D2-1, AFGR,
// DMSB1 0..N_ADJ-1. Purely combinational apart from the configuration
// memory; with all configuration bits 0 no path from an incoming track to an
// outgoing track is enabled. Routing through neighbouring switch boxes is
// structurally cyclic, so the combinational-loop warnings are expected: a
// configuration must not route a track back onto itself.
module sbox #(
  parameter int               CW     = 36,
  parameter int               TW     = 4,
  parameter int               N_ADJ  = 4,
  parameter int               NIN_Q  = 6,
  parameter int               NOUT_Q = 3,
  parameter int               N_U2   = 3,
  parameter moc_pkg::redund_t RED    = moc_pkg::LRS2,
  parameter int               N_URM  = 1,
  localparam int N_D2     = CW / TW,
  localparam int N_S      = N_D2,
  localparam int S_PER    = N_S / N_U2,
  localparam int N_CLO    = N_ADJ * NOUT_Q,
  localparam int U_URM    = RED.urm ? N_URM : 0,
  localparam int U2_CFG   = (S_PER + U_URM) * moc_pkg::selw(N_CLO)
                            + (U_URM > 0 ? S_PER * moc_pkg::selw(1 + U_URM) : 0),
  localparam int D2_CFG   = TW * moc_pkg::selw(TW + 1),
  localparam int AFGR_CFG = RED.afgr ? 2 * CW : 0,
  localparam int D1_IN    = N_D2 + (RED.df ? N_S : 0),
  localparam int D1_CFG   = NIN_Q * moc_pkg::selw(D1_IN) + ((RED.fgr || RED.ifgr) ? 2 * NIN_Q : 0),
  localparam int O_D2     = N_U2 * U2_CFG,
  localparam int O_AFGR   = O_D2 + N_D2 * D2_CFG,
  localparam int O_D1     = O_AFGR + AFGR_CFG,
  localparam int CFG_BITS = O_D1 + N_ADJ * D1_CFG
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       cfg_we,
  input  logic [moc_pkg::CFG_AW-1:0] cfg_addr,
  input  logic [moc_pkg::CFG_DW-1:0] cfg_wdata,
  input  logic [CW-1:0]              trk_in,   // incoming channel tracks
  output logic [CW-1:0]              trk_out,  // outgoing channel tracks
  input  logic [N_CLO-1:0]           clo,      // adjacent cluster outputs, quadrant j at [j*NOUT_Q]
  output logic [N_ADJ*NIN_Q-1:0]     cli       // adjacent cluster inputs, quadrant j at [j*NIN_Q]
);
  logic [CFG_BITS-1:0] cfg;
  logic [N_S-1:0]      s;
  logic [CW-1:0]       d2;    // DMSB2 outputs
  logic [CW-1:0]       d2a;   // after the AFGR levels

  initial begin
    assert (CW % TW == 0 && N_S % N_U2 == 0 && CW % 4 == 0)
      else $error("sbox: CW must split evenly over DMSB2s, UMSB2s and sides");
    assert (moc_pkg::cfg_words(CFG_BITS) <= (1 << moc_pkg::CFG_AW))
      else $error("sbox: configuration does not fit the address space");
  end

  cfg_mem #(.BITS(CFG_BITS)) u_cfg (
    .clk(clk), .rst(rst), .we(cfg_we), .addr(cfg_addr), .wdata(cfg_wdata), .cfg(cfg)
  );

  for (genvar u = 0; u < N_U2; u++) begin : g_umsb2
    umsb #(.N_IN(N_CLO), .N_OUT(S_PER), .N_URM(U_URM)) u_umsb2 (
      .d(clo), .cfg(cfg[u*U2_CFG +: U2_CFG]), .q(s[u*S_PER +: S_PER])
    );
  end

  for (genvar k = 0; k < N_D2; k++) begin : g_dmsb2
    msb #(.N_IN(TW + 1), .N_OUT(TW)) u_dmsb2 (
      .d({trk_in[k*TW +: TW], s[k]}),
      .cfg(cfg[O_D2 + k*D2_CFG +: D2_CFG]),
      .q(d2[k*TW +: TW])
    );
  end

  for (genvar t = 0; t < CW; t++) begin : g_trk
    assign trk_out[(t + CW/2) % CW] = d2[t];
  end

  if (RED.afgr) begin : g_afgr
    afgr_stage #(.N(CW)) u_afgr (.d(d2), .cfg(cfg[O_AFGR +: AFGR_CFG]), .q(d2a));
  end else begin : g_noafgr
    assign d2a = d2;
  end

  for (genvar j = 0; j < N_ADJ; j++) begin : g_dmsb1
    logic [N_D2-1:0] lane;
    for (genvar k = 0; k < N_D2; k++) begin : g_lane
      assign lane[k] = d2a[k*TW + (j % TW)];
    end
    logic [D1_IN-1:0] din;
    if (RED.df) begin : g_df
      assign din = {s, lane};
    end else begin : g_nodf
      assign din = lane;
    end
    msb #(.N_IN(D1_IN), .N_OUT(NIN_Q), .FGR(RED.fgr), .IFGR(RED.ifgr)) u_dmsb1 (
      .d(din), .cfg(cfg[O_D1 + j*D1_CFG +: D1_CFG]), .q(cli[j*NIN_Q +: NIN_Q])
    );
  end
endmodule
