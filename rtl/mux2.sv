// mux2: the 2:1 multiplexer every interconnect multiplexer of the fabric is
// built from. y = a when s is 0, b when s is 1. Purely combinational.
module mux2 (
  input  logic a,
  input  logic b,
  input  logic s,
  output logic y
);
  assign y = s ? b : a;
endmodule
