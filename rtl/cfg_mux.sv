// cfg_mux: an N:1 interconnect multiplexer ("Mux"), the node of every Mini
// Switch Box. In silicon it is a balanced tree of N-1 mux2 cells whose level
// l (next to the inputs for l = 0) is steered by select bit l; the RTL
// states the same function as an indexed read so that large arrays stay
// small for the tools, and synthesis rebuilds the tree.
//
// The select is a binary index held in configuration SRAM: sel = i routes
// d[i] to y. A select past the last input (N not a power of two) gives 0,
// as a tree padded with constant-0 leaves would. Purely combinational.
module cfg_mux #(
  parameter int N = 4
) (
  input  logic [N-1:0]                d,
  input  logic [moc_pkg::selw(N)-1:0] sel,
  output logic                        y
);
  always_comb begin
    if (int'(sel) < N) y = d[sel];
    else               y = 1'b0;
  end
endmodule
