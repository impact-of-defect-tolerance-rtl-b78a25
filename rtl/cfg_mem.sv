// cfg_mem: the SRAM configuration memory of one tile (a cluster or a switch
// box). The fabric is SRAM-based: every multiplexer select and LUT bit is a
// memory cell whose value is read continuously by the logic it configures.
//
// The cells are written CFG_DW bits at a time: when we is high on a rising
// clock edge, word addr (bits addr*CFG_DW upwards) takes wdata; addresses past
// the last word are ignored. cfg presents all BITS cells at once. A
// synchronous reset clears every cell, which puts the tile in a harmless
// state (all LUTs output 0). The word-write port and the reset are this
// design's own choices; the source architecture does not describe how the
// configuration is loaded.
module cfg_mem #(
  parameter int BITS = 64
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       we,
  input  logic [moc_pkg::CFG_AW-1:0] addr,
  input  logic [moc_pkg::CFG_DW-1:0] wdata,
  output logic [BITS-1:0]            cfg
);
  import moc_pkg::*;

  localparam int WORDS = cfg_words(BITS);

  logic [WORDS*CFG_DW-1:0] cells;

  always_ff @(posedge clk) begin
    if (rst) begin
      cells <= '0;
    end else if (we && (int'(addr) < WORDS)) begin
      cells[int'(addr)*CFG_DW +: CFG_DW] <= wdata;
    end
  end

  assign cfg = cells[BITS-1:0];
endmodule
