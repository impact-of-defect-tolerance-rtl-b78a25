// moc_fpga: the Mesh-of-Clusters FPGA fabric. NX x NY clusters sit in a
// regular 2-D grid; a switch box sits at each of the (NX+1) x (NY+1) grid
// corners. Neighbouring switch boxes are joined by channels of CW/4 tracks
// in each direction per side; each cluster takes NIN_Q = N_IN/4 inputs from,
// and gives N_OUT/4 outputs to, each of its four corner switch boxes, so a
// cluster reaches its neighbours through shared switch boxes. Channel tracks
// that leave the edge of the array are the fabric's I/O pins.
//
// Pins: n_in/n_out[x] are the tracks of switch box (x, NY) on its north side,
// s_in/s_out[x] of switch box (x, 0) on its south side, e_in/e_out[y] of
// (NX, y) on its east side and w_in/w_out[y] of (0, y) on its west side.
// Track i of a side is bit i.
//
// Configuration: every tile (cluster or switch box) has its own SRAM
// configuration memory. A word is written by raising cfg_we for one clock
// with cfg_tile naming the tile (cluster (i, j) is tile j*NX + i, switch box
// (x, y) is tile NX*NY + y*(NX+1) + x), cfg_addr the word inside it and
// cfg_wdata its value. rst clears all configuration. hold is kept high while
// configuring: it forces every CLB output to 0 and clears CLB flip-flops.
// After hold falls the fabric behaves as configured: pin to pin paths are
// combinational except through CLBs configured as registered.
//
// Defaults follow the studied device: a 36 x 36 array, channel width 36,
// 10 CLBs of 4 inputs per cluster, 24 cluster inputs and 12 outputs, with
// the LRS2 local redundancy strategy (AFGR and URM). The configuration port
// and pin naming are this design's own. The fabric is structurally cyclic
// (as every FPGA interconnect), hence the combinational-loop warnings; a
// valid configuration closes no loop except through a registered CLB.
module moc_fpga #(
  parameter int               NX    = 36,
  parameter int               NY    = 36,
  parameter int               CW    = 36,
  parameter int               N_CLB = 10,
  parameter int               N_IN  = 24,
  parameter int               N_OUT = 12,
  parameter int               K     = 4,
  parameter moc_pkg::redund_t RED   = moc_pkg::LRS2,
  parameter int               N_URM = 1,
  localparam int TPS    = CW / 4,
  localparam int NIN_Q  = N_IN / 4,
  localparam int NOUT_Q = N_OUT / 4,
  localparam int N_TILE = NX * NY + (NX + 1) * (NY + 1),
  localparam int TAW    = $clog2(N_TILE)
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       hold,
  input  logic                       cfg_we,
  input  logic [TAW-1:0]             cfg_tile,
  input  logic [moc_pkg::CFG_AW-1:0] cfg_addr,
  input  logic [moc_pkg::CFG_DW-1:0] cfg_wdata,
  input  logic [TPS-1:0]             n_in  [NX+1],
  output logic [TPS-1:0]             n_out [NX+1],
  input  logic [TPS-1:0]             s_in  [NX+1],
  output logic [TPS-1:0]             s_out [NX+1],
  input  logic [TPS-1:0]             e_in  [NY+1],
  output logic [TPS-1:0]             e_out [NY+1],
  input  logic [TPS-1:0]             w_in  [NY+1],
  output logic [TPS-1:0]             w_out [NY+1]
);
  // Switch box side slices of a CW-bit track vector.
  localparam int SD_N = 0, SD_E = 1, SD_S = 2, SD_W = 3;

  logic [CW-1:0]     sb_in   [NX+1][NY+1];
  logic [CW-1:0]     sb_out  [NX+1][NY+1];
  logic [NOUT_Q-1:0] sb_clo  [NX+1][NY+1][4];   // cluster outputs into switch box, per quadrant
  logic [4*NIN_Q-1:0] sb_cli [NX+1][NY+1];      // switch box outputs to its clusters
  logic [N_OUT-1:0]  cl_out  [NX][NY];

  initial begin
    assert (N_IN % 4 == 0 && N_OUT % 4 == 0 && CW % 4 == 0)
      else $error("moc_fpga: N_IN, N_OUT and CW must be multiples of 4");
  end

  // ---------------------------------------------------------------- switch boxes
  for (genvar x = 0; x <= NX; x++) begin : g_sx
    for (genvar y = 0; y <= NY; y++) begin : g_sy
      localparam int TILE = NX * NY + y * (NX + 1) + x;
      logic [TPS-1:0] in_n, in_e, in_s, in_w;

      if (y < NY) begin : g_n
        assign in_n = sb_out[x][y+1][SD_S*TPS +: TPS];
      end else begin : g_npin
        assign in_n = n_in[x];
      end
      if (x < NX) begin : g_e
        assign in_e = sb_out[x+1][y][SD_W*TPS +: TPS];
      end else begin : g_epin
        assign in_e = e_in[y];
      end
      if (y > 0) begin : g_s
        assign in_s = sb_out[x][y-1][SD_N*TPS +: TPS];
      end else begin : g_spin
        assign in_s = s_in[x];
      end
      if (x > 0) begin : g_w
        assign in_w = sb_out[x-1][y][SD_E*TPS +: TPS];
      end else begin : g_wpin
        assign in_w = w_in[y];
      end
      assign sb_in[x][y] = {in_w, in_s, in_e, in_n};

      // Quadrant q is the cluster at (x-1+q%2, y-1+q/2); it reaches this
      // switch box through its corner 3-q.
      for (genvar q = 0; q < 4; q++) begin : g_q
        localparam int CX = x - 1 + (q % 2);
        localparam int CY = y - 1 + (q / 2);
        if (CX >= 0 && CX < NX && CY >= 0 && CY < NY) begin : g_cl
          assign sb_clo[x][y][q] = cl_out[CX][CY][(3-q)*NOUT_Q +: NOUT_Q];
        end else begin : g_none
          assign sb_clo[x][y][q] = '0;
        end
      end

      sbox #(.CW(CW), .TW(4), .N_ADJ(4), .NIN_Q(NIN_Q), .NOUT_Q(NOUT_Q),
             .N_U2(3), .RED(RED), .N_URM(N_URM)) u_sbox (
        .clk(clk), .rst(rst),
        .cfg_we(cfg_we && (int'(cfg_tile) == TILE)), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
        .trk_in(sb_in[x][y]), .trk_out(sb_out[x][y]),
        .clo({sb_clo[x][y][3], sb_clo[x][y][2], sb_clo[x][y][1], sb_clo[x][y][0]}),
        .cli(sb_cli[x][y])
      );
    end
  end

  // ---------------------------------------------------------------- clusters
  for (genvar i = 0; i < NX; i++) begin : g_cx
    for (genvar j = 0; j < NY; j++) begin : g_cy
      localparam int TILE = j * NX + i;
      logic [N_IN-1:0] cin;
      // Corner c is switch box (i + c%2, j + c/2), where this cluster is
      // quadrant 3-c.
      for (genvar c = 0; c < 4; c++) begin : g_c
        assign cin[c*NIN_Q +: NIN_Q] = sb_cli[i + (c % 2)][j + (c / 2)][(3-c)*NIN_Q +: NIN_Q];
      end

      cluster #(.N_CLB(N_CLB), .N_IN(N_IN), .N_OUT(N_OUT), .K(K), .RED(RED), .N_URM(N_URM)) u_cluster (
        .clk(clk), .rst(rst), .hold(hold),
        .cfg_we(cfg_we && (int'(cfg_tile) == TILE)), .cfg_addr(cfg_addr), .cfg_wdata(cfg_wdata),
        .in(cin), .out(cl_out[i][j])
      );
    end
  end

  // ---------------------------------------------------------------- pins
  for (genvar x = 0; x <= NX; x++) begin : g_pin_x
    assign n_out[x] = sb_out[x][NY][SD_N*TPS +: TPS];
    assign s_out[x] = sb_out[x][0][SD_S*TPS +: TPS];
  end
  for (genvar y = 0; y <= NY; y++) begin : g_pin_y
    assign e_out[y] = sb_out[NX][y][SD_E*TPS +: TPS];
    assign w_out[y] = sb_out[0][y][SD_W*TPS +: TPS];
  end
endmodule
