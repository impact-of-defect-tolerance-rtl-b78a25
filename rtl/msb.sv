// msb: a Mini Switch Box, the crossbar building block of both the cluster
// and the switch box. Each of the N_OUT outputs is driven by its own N_IN:1
// multiplexer (a node "Md"/"Mu" of the criticality graph) that can pick any
// of the N_IN inputs, so there are as many multiplexers as outputs.
//
// With FGR (Fine Grain Redundancy) two levels of 2:1 output multiplexers
// follow the Mds: level 1 lets output j take Md j or Md j+1, level 2 lets it
// take the level-1 result of j or j-1 (indices wrap around). Every output can
// therefore be served by Md j-1, j or j+1, so a defective Md is bypassed by
// shifting its traffic to a neighbour. IFGR builds the same levels but gives
// each Md two separate output drivers, one per level-1 multiplexer it feeds;
// in a defect-free logic model both drivers carry the same value, so IFGR is
// logically identical to FGR here. The FGR input multiplexer levels are not
// built: in a full crossbar every Md already sees every input.
//
// Configuration layout (LSB first): N_OUT selects of selw(N_IN) bits, then,
// with FGR or IFGR, N_OUT level-1 bits and N_OUT level-2 bits.
// Purely combinational.
module msb #(
  parameter int N_IN  = 16,
  parameter int N_OUT = 10,
  parameter bit FGR   = 1'b0,
  parameter bit IFGR  = 1'b0,
  localparam int SW       = moc_pkg::selw(N_IN),
  localparam bit OLVL     = FGR || IFGR,
  localparam int CFG_BITS = N_OUT * SW + (OLVL ? 2 * N_OUT : 0)
) (
  input  logic [N_IN-1:0]     d,
  input  logic [CFG_BITS-1:0] cfg,
  output logic [N_OUT-1:0]    q
);
  logic [N_OUT-1:0] md_a;  // Md outputs (first driver)
  logic [N_OUT-1:0] md_b;  // second driver (IFGR); same net otherwise

  for (genvar j = 0; j < N_OUT; j++) begin : g_md
    cfg_mux #(.N(N_IN)) u_md (.d(d), .sel(cfg[j*SW +: SW]), .y(md_a[j]));
    if (IFGR) begin : g_dup
      cfg_mux #(.N(N_IN)) u_md_b (.d(d), .sel(cfg[j*SW +: SW]), .y(md_b[j]));
    end else begin : g_nodup
      assign md_b[j] = md_a[j];
    end
  end

  if (OLVL) begin : g_fgr
    localparam int B1 = N_OUT * SW;
    localparam int B2 = B1 + N_OUT;
    logic [N_OUT-1:0] o1;
    for (genvar j = 0; j < N_OUT; j++) begin : g_o
      mux2 u_o1 (.a(md_a[j]), .b(md_b[(j + 1) % N_OUT]), .s(cfg[B1 + j]), .y(o1[j]));
      mux2 u_o2 (.a(o1[j]), .b(o1[(j + N_OUT - 1) % N_OUT]), .s(cfg[B2 + j]), .y(q[j]));
    end
  end else begin : g_plain
    assign q = md_a;
  end
endmodule
