// afgr_stage: the Adapted Fine Grain Redundancy input levels, a row of
// multiplexers placed in front of the DMSBs and common to all of them.
//
// Two levels of 2:1 multiplexers: level 1 lets line i carry input i or i+1,
// level 2 lets it carry the level-1 line i or i-1 (indices wrap around). Each
// output line can thus be fed from its own input or from either neighbour
// (two extra inputs per node), so a signal can be moved off a line whose
// downstream multiplexer is defective. With all bits 0 the stage is a plain
// pass-through.
//
// Configuration layout (LSB first): N level-1 bits, then N level-2 bits.
// Purely combinational.
module afgr_stage #(
  parameter int N = 24,
  localparam int CFG_BITS = 2 * N
) (
  input  logic [N-1:0]        d,
  input  logic [CFG_BITS-1:0] cfg,
  output logic [N-1:0]        q
);
  logic [N-1:0] l1;

  for (genvar i = 0; i < N; i++) begin : g_line
    mux2 u_l1 (.a(d[i]),  .b(d[(i + 1) % N]),     .s(cfg[i]),     .y(l1[i]));
    mux2 u_l2 (.a(l1[i]), .b(l1[(i + N - 1) % N]), .s(cfg[N + i]), .y(q[i]));
  end
endmodule
