// clb: a Configurable Logic Block with K inputs (K = 4 in the studied
// architecture): a K-input look-up table followed by an optional flip-flop.
//
// The LUT is a 2^K:1 multiplexer tree whose data inputs are the LUT
// configuration bits and whose select is the CLB input vector, so
// out = lut[in] combinationally. Configuration bit 2^K selects the
// registered output (flip-flop loaded with the LUT value on every rising
// clock edge). While 'hold' is high (configuration in progress) the output is
// forced to 0 and the flip-flop is cleared, so that a partly written
// configuration cannot close an oscillating loop through the interconnect.
// The flip-flop, its output select and the hold are this design's choices:
// the source gives only "4 inputs per CLB".
//
// Configuration layout (LSB first): 2^K LUT bits, 1 register-select bit.
module clb #(
  parameter int K = 4,
  localparam int CFG_BITS = (1 << K) + 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                hold,
  input  logic [K-1:0]        in,
  input  logic [CFG_BITS-1:0] cfg,
  output logic                out
);
  logic lut_y;
  logic ff_q;

  cfg_mux #(.N(1 << K)) u_lut (.d(cfg[(1 << K)-1:0]), .sel(in), .y(lut_y));

  always_ff @(posedge clk) begin
    if (rst || hold) ff_q <= 1'b0;
    else             ff_q <= lut_y;
  end

  assign out = hold ? 1'b0 : (cfg[1 << K] ? ff_q : lut_y);
endmodule
