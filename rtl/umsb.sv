// umsb: an Upward Mini Switch Box with optional Upward Redundant Multiplexers
// (URM). The UMSB collects the block outputs (CLB outputs in a cluster,
// adjacent cluster outputs in a switch box) onto N_OUT lines, one N_IN:1
// multiplexer "Mu" per line.
//
// URM adds N_URM spare multiplexers in parallel with the UMSB, seeing the
// same N_IN inputs. Every output line then ends in a (1+N_URM):1 selector:
// select 0 keeps its own Mu, select r (1..N_URM) takes spare r-1 instead, so
// any one defective Mu can be replaced by a spare. With N_URM = 0 this is a
// plain MSB.
//
// Configuration layout (LSB first): N_OUT Mu selects, N_URM spare selects
// (selw(N_IN) bits each), then N_OUT output selects of selw(1+N_URM) bits.
// Purely combinational.
module umsb #(
  parameter int N_IN  = 10,
  parameter int N_OUT = 12,
  parameter int N_URM = 1,
  localparam int SW       = moc_pkg::selw(N_IN),
  localparam int RW       = moc_pkg::selw(1 + N_URM),
  localparam int CFG_BITS = (N_OUT + N_URM) * SW + (N_URM > 0 ? N_OUT * RW : 0)
) (
  input  logic [N_IN-1:0]     d,
  input  logic [CFG_BITS-1:0] cfg,
  output logic [N_OUT-1:0]    q
);
  logic [N_OUT-1:0] mu;

  for (genvar j = 0; j < N_OUT; j++) begin : g_mu
    cfg_mux #(.N(N_IN)) u_mu (.d(d), .sel(cfg[j*SW +: SW]), .y(mu[j]));
  end

  if (N_URM > 0) begin : g_urm
    localparam int BO = (N_OUT + N_URM) * SW;
    logic [N_URM-1:0] spare;
    for (genvar r = 0; r < N_URM; r++) begin : g_sp
      cfg_mux #(.N(N_IN)) u_urm (.d(d), .sel(cfg[(N_OUT + r)*SW +: SW]), .y(spare[r]));
    end
    for (genvar j = 0; j < N_OUT; j++) begin : g_out
      cfg_mux #(.N(1 + N_URM)) u_sel (.d({spare, mu[j]}), .sel(cfg[BO + j*RW +: RW]), .y(q[j]));
    end
  end else begin : g_plain
    assign q = mu;
  end
endmodule
