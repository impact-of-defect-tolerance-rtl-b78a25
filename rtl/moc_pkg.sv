// moc_pkg: types and constants shared by the Mesh-of-Clusters FPGA fabric.
//
// redund_t selects which hardware redundancy techniques are built into the
// interconnect: Fine Grain Redundancy (FGR), Improved FGR (IFGR), Adapted FGR
// (AFGR), Distributed Feedbacks (DF) and Upward Redundant Multiplexers (URM).
// The five Local Redundancy Strategies LRS1..LRS5 are the combinations the
// architecture study evaluates; LRS2 (AFGR + URM) is the best area / defect
// tolerance / delay trade-off and is the default of every block.
//
// Configuration is written word by word through a small write port
// (CFG_DW data bits, CFG_AW word address bits); both widths are this
// design's own choice.
package moc_pkg;

  typedef struct packed {
    logic fgr;   // two output multiplexer levels on every DMSB
    logic ifgr;  // FGR with doubled multiplexer outputs
    logic afgr;  // two input multiplexer levels common to all DMSBs
    logic df;    // feedbacks distributed to all DMSBs
    logic urm;   // redundant multiplexers in parallel with the UMSB
  } redund_t;

  localparam redund_t RED_NONE = '{fgr: 1'b0, ifgr: 1'b0, afgr: 1'b0, df: 1'b0, urm: 1'b0};
  localparam redund_t LRS1     = '{fgr: 1'b0, ifgr: 1'b0, afgr: 1'b0, df: 1'b1, urm: 1'b1};
  localparam redund_t LRS2     = '{fgr: 1'b0, ifgr: 1'b0, afgr: 1'b1, df: 1'b0, urm: 1'b1};
  localparam redund_t LRS3     = '{fgr: 1'b0, ifgr: 1'b1, afgr: 1'b1, df: 1'b0, urm: 1'b0};
  localparam redund_t LRS4     = '{fgr: 1'b0, ifgr: 1'b1, afgr: 1'b0, df: 1'b1, urm: 1'b0};
  localparam redund_t LRS5     = '{fgr: 1'b1, ifgr: 1'b0, afgr: 1'b0, df: 1'b0, urm: 1'b1};

  localparam int CFG_DW = 32;  // configuration write data width
  localparam int CFG_AW = 8;   // configuration word address width (per tile)

  // Width of the binary select of an n:1 multiplexer (at least one bit).
  function automatic int selw(input int n);
    return (n > 1) ? $clog2(n) : 1;
  endfunction

  // Number of configuration words needed to hold 'bits' configuration bits.
  function automatic int cfg_words(input int bits);
    return (bits + CFG_DW - 1) / CFG_DW;
  endfunction

endpackage
