// ocn_top: low-diameter on-chip network for a 16x16 manycore, built by tiling
// one hard macro (ocn_tile).
//
// The core array is CORES_X x CORES_Y. CONC cores share a router (1, 4 or 8;
// 4 cores form a 2x2 block, 8 cores a 4-wide by 2-high block), giving a grid
// of RX x RY router tiles. With RUCHE > 0 every tile also has far channels
// that skip RUCHE-1 routers in both dimensions (a "ruche" mesh); with
// RUCHE = 0 it is a plain mesh. The default, CONC = 1 and RUCHE = 2, is the
// mesh-c1r2 network: 256 routers of radix 9. All wiring here is between
// adjacent tiles; the lane cross-over (ocn_pkg::next_lane) is what turns these
// short wires into long far channels.
//
// With TORUS = 1 the top instead tiles ocn_torus_tile into a folded torus
// (torus-c1r0, -c4r0, -c8r0; RUCHE is then ignored): lane 0 of one tile faces
// lane 1 of the next, and at the array edge each output lane loops back into
// the other lane on the same side, closing every row and column into a ring.
// The torus topology and its edge loops follow the source; the dateline
// virtual channels that keep the rings deadlock-free are this design's own.
//
// Each core slot has an injection channel (core -> network) and an ejection
// channel (network -> core), brought out as core_inj_* and core_ej_* and
// indexed by core number c = row * CORES_X + column. Every core slot also
// holds an ocn_dummy_core. With dummy_mode high the dummy cores drive the
// network (injection rate dummy_rate/256 packets per cycle per core) and the
// external core ports are idle (core_inj_rdy and core_ej_val low); with
// dummy_mode low the external ports are connected and the dummy cores are
// silent. The mode input must only change while the network is empty. The
// dummy-core mux is this design's own; the source places dummy cores on the
// router ports only while implementing the tiles.
//
// The feedthrough lanes are plain wires through each tile, so a lint tool
// that tracks whole arrays sees the edge-channel arrays feed themselves
// through the tiles. No real loop exists: every path from a tile's edge
// input reaches another tile's edge only through a feedthrough, and every
// router input ends in a queue register.
//
// Timing: one cycle per router traversed, none per channel, plus one cycle
// per extra flit of a packet: a packet of L flits crossing H routers is fully
// delivered L + H - 1 cycles after its first flit is injected.
module ocn_top
  import ocn_pkg::*;
#(
  parameter int unsigned CORES_X   = 16,
  parameter int unsigned CORES_Y   = 16,
  parameter int unsigned CONC      = 1,
  parameter int unsigned RUCHE     = 2,
  parameter bit          TORUS     = 1'b0,
  parameter int unsigned BUF_DEPTH = 2,
  parameter int unsigned PKT_LEN   = 2,
  parameter int unsigned NCORES    = CORES_X * CORES_Y,
  parameter int unsigned CW        = $clog2(CORES_X * CORES_Y)
) (
  input  logic         clk,
  input  logic         rst,

  input  logic         core_inj_val  [NCORES],
  output logic         core_inj_rdy  [NCORES],
  input  flit_t        core_inj_flit [NCORES],
  output logic         core_ej_val   [NCORES],
  input  logic         core_ej_rdy   [NCORES],
  output flit_t        core_ej_flit  [NCORES],

  input  logic         dummy_mode,
  input  logic [7:0]   dummy_rate,
  output logic [15:0]  dummy_sent [NCORES],
  output logic [15:0]  dummy_recv [NCORES],
  output logic [15:0]  dummy_recv_pkts [NCORES],
  output logic [31:0]  dummy_signature,   // XOR of all dummy-core signatures
  output logic         dummy_misroute     // some dummy core got a flit not meant for it
);

  localparam int unsigned CX    = conc_x(CONC);
  localparam int unsigned CY    = conc_y(CONC);
  localparam int unsigned RX    = CORES_X / CX;
  localparam int unsigned RY    = CORES_Y / CY;
  localparam int unsigned LANES = edge_lanes(RUCHE);

  // Per-tile terminal channels.
  logic  t_inj_val  [RY][RX][CONC];
  logic  t_inj_rdy  [RY][RX][CONC];
  flit_t t_inj_flit [RY][RX][CONC];
  logic  t_ej_val   [RY][RX][CONC];
  logic  t_ej_rdy   [RY][RX][CONC];
  flit_t t_ej_flit  [RY][RX][CONC];

  if (!TORUS) begin : g_mesh
    // Per-tile edge channels: [row][column][direction][lane].
    logic  ein_val   [RY][RX][4][LANES];
    logic  ein_rdy   [RY][RX][4][LANES];
    flit_t ein_flit  [RY][RX][4][LANES];
    logic  eout_val  [RY][RX][4][LANES];
    logic  eout_rdy  [RY][RX][4][LANES];
    flit_t eout_flit [RY][RX][4][LANES];

    for (genvar y = 0; y < RY; y++) begin : g_row
      for (genvar x = 0; x < RX; x++) begin : g_col
        ocn_tile #(.CONC(CONC), .RUCHE(RUCHE), .BUF_DEPTH(BUF_DEPTH)) u_tile (
          .clk, .rst,
          .pos_x (XW'(x)), .pos_y (YW'(y)),
          .edge_in_val   (ein_val[y][x]),  .edge_in_rdy  (ein_rdy[y][x]),  .edge_in_flit  (ein_flit[y][x]),
          .edge_out_val  (eout_val[y][x]), .edge_out_rdy (eout_rdy[y][x]), .edge_out_flit (eout_flit[y][x]),
          .inj_val (t_inj_val[y][x]), .inj_rdy (t_inj_rdy[y][x]), .inj_flit (t_inj_flit[y][x]),
          .ej_val  (t_ej_val[y][x]),  .ej_rdy  (t_ej_rdy[y][x]),  .ej_flit  (t_ej_flit[y][x])
        );

        // Short wires to the neighbour on each side, with the lane cross-over.
        for (genvar d = 0; d < 4; d++) begin : g_side
          localparam bit HAS_NB = (d == int'(DIR_N)) ? (y + 1 < RY) :
                                  (d == int'(DIR_S)) ? (y > 0) :
                                  (d == int'(DIR_E)) ? (x + 1 < RX) : (x > 0);
          localparam int NX = (d == int'(DIR_E)) ? x + 1 : (d == int'(DIR_W)) ? x - 1 : x;
          localparam int NY = (d == int'(DIR_N)) ? y + 1 : (d == int'(DIR_S)) ? y - 1 : y;
          localparam int OPP = d ^ 1;
          for (genvar j = 0; j < LANES; j++) begin : g_lane
            if (HAS_NB) begin : g_link
              localparam int NJ = next_lane(RUCHE, j);
              assign ein_val[NY][NX][OPP][NJ]  = eout_val[y][x][d][j];
              assign ein_flit[NY][NX][OPP][NJ] = eout_flit[y][x][d][j];
              assign eout_rdy[y][x][d][j]      = ein_rdy[NY][NX][OPP][NJ];
            end else begin : g_edge
              // Chip edge: nothing arrives, nothing may leave.
              assign ein_val[y][x][d][j]  = 1'b0;
              assign ein_flit[y][x][d][j] = '0;
              assign eout_rdy[y][x][d][j] = 1'b0;
            end
          end
        end
      end
    end
  end else begin : g_torus

    // Folded torus: two lanes per edge (far, feedthrough), crossed over
    // between neighbours and looped back at the array edge.
    logic       tin_val   [RY][RX][4][2];
    logic       tin_vc    [RY][RX][4][2];
    flit_t      tin_flit  [RY][RX][4][2];
    logic [1:0] tin_rdy   [RY][RX][4][2];
    logic       tout_val  [RY][RX][4][2];
    logic       tout_vc   [RY][RX][4][2];
    flit_t      tout_flit [RY][RX][4][2];
    logic [1:0] tout_rdy  [RY][RX][4][2];

    for (genvar y = 0; y < RY; y++) begin : g_row
      for (genvar x = 0; x < RX; x++) begin : g_col
        ocn_torus_tile #(.CONC(CONC), .RX(RX), .RY(RY), .BUF_DEPTH(BUF_DEPTH)) u_tile (
          .clk, .rst,
          .pos_x (XW'(x)), .pos_y (YW'(y)),
          .edge_in_val  (tin_val[y][x]),  .edge_in_vc  (tin_vc[y][x]),  .edge_in_flit  (tin_flit[y][x]),  .edge_in_rdy  (tin_rdy[y][x]),
          .edge_out_val (tout_val[y][x]), .edge_out_vc (tout_vc[y][x]), .edge_out_flit (tout_flit[y][x]), .edge_out_rdy (tout_rdy[y][x]),
          .inj_val (t_inj_val[y][x]), .inj_rdy (t_inj_rdy[y][x]), .inj_flit (t_inj_flit[y][x]),
          .ej_val  (t_ej_val[y][x]),  .ej_rdy  (t_ej_rdy[y][x]),  .ej_flit  (t_ej_flit[y][x])
        );

        for (genvar d = 0; d < 4; d++) begin : g_side
          localparam bit HAS_NB = (d == int'(DIR_N)) ? (y + 1 < RY) :
                                  (d == int'(DIR_S)) ? (y > 0) :
                                  (d == int'(DIR_E)) ? (x + 1 < RX) : (x > 0);
          // Across to the neighbour's facing side, or back into this tile's
          // own side at the array edge (the wrap-around loop).
          localparam int NX = !HAS_NB ? x : (d == int'(DIR_E)) ? x + 1 : (d == int'(DIR_W)) ? x - 1 : x;
          localparam int NY = !HAS_NB ? y : (d == int'(DIR_N)) ? y + 1 : (d == int'(DIR_S)) ? y - 1 : y;
          localparam int ND = HAS_NB ? (d ^ 1) : d;
          for (genvar j = 0; j < 2; j++) begin : g_lane
            assign tin_val[NY][NX][ND][1 - j]  = tout_val[y][x][d][j];
            assign tin_vc[NY][NX][ND][1 - j]   = tout_vc[y][x][d][j];
            assign tin_flit[NY][NX][ND][1 - j] = tout_flit[y][x][d][j];
            assign tout_rdy[y][x][d][j]        = tin_rdy[NY][NX][ND][1 - j];
          end
        end
      end
    end
  end

  // Core slots: dummy cores and the external core ports.
  logic [31:0] sig  [NCORES];
  logic        mis  [NCORES];

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    localparam int COL = c % CORES_X;
    localparam int ROW = c / CORES_X;
    localparam int TX  = COL / CX;
    localparam int TY  = ROW / CY;
    localparam int TT  = (ROW % CY) * CX + (COL % CX);

    logic  d_inj_val, d_ej_rdy;
    flit_t d_inj_flit;

    ocn_dummy_core #(.CORES_X(CORES_X), .CORES_Y(CORES_Y), .CONC(CONC), .PKT_LEN(PKT_LEN)) u_dummy (
      .clk, .rst,
      .core_id (CW'(c)), .my_x (XW'(TX)), .my_y (YW'(TY)), .my_t (TW'(TT)),
      .enable  (dummy_mode), .rate (dummy_rate),
      .inj_val (d_inj_val), .inj_rdy (dummy_mode && t_inj_rdy[TY][TX][TT]), .inj_flit (d_inj_flit),
      .ej_val  (dummy_mode && t_ej_val[TY][TX][TT]), .ej_rdy (d_ej_rdy), .ej_flit (t_ej_flit[TY][TX][TT]),
      .sent_cnt (dummy_sent[c]), .recv_cnt (dummy_recv[c]), .recv_pkts (dummy_recv_pkts[c]),
      .signature (sig[c]), .misroute (mis[c])
    );

    assign t_inj_val[TY][TX][TT]  = dummy_mode ? d_inj_val  : core_inj_val[c];
    assign t_inj_flit[TY][TX][TT] = dummy_mode ? d_inj_flit : core_inj_flit[c];
    assign t_ej_rdy[TY][TX][TT]   = dummy_mode ? d_ej_rdy   : core_ej_rdy[c];
    assign core_inj_rdy[c]        = !dummy_mode && t_inj_rdy[TY][TX][TT];
    assign core_ej_val[c]         = !dummy_mode && t_ej_val[TY][TX][TT];
    assign core_ej_flit[c]        = t_ej_flit[TY][TX][TT];
  end

  always_comb begin
    dummy_signature = '0;
    dummy_misroute  = 1'b0;
    for (int unsigned c = 0; c < NCORES; c++) begin
      dummy_signature = dummy_signature ^ sig[c];
      dummy_misroute  = dummy_misroute | mis[c];
    end
  end

endmodule
