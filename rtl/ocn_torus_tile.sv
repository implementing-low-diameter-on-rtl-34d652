// ocn_torus_tile: hard macro of the folded-torus network.
//
// One ocn_torus_router plus two lanes on each edge: lane 0, the far channel,
// is the router's port on that side; lane 1, the feedthrough channel, is a
// wire straight across the tile to the opposite edge. Between tiles the two
// lanes cross over (lane 0 of one tile faces lane 1 of the next), and at the
// array edge a short loop joins a tile's output lane to its other input lane
// on the same side (ocn_top does both). A router's link thus always reaches
// the router two tiles away, or the neighbour at the array edge, which folds
// each row and column into a ring using only short wires between neighbours.
// The two lanes, the cross-over and the edge loop follow the source's
// torus hard-macro and tiled-layout drawings; the lane numbering is this
// design's.
//
// Every channel carries valid, a virtual-channel bit and a flit forward and
// one ready per virtual channel backward; the feedthrough passes all of them
// through untouched. Tile position comes in on pins, as in ocn_tile.
module ocn_torus_tile
  import ocn_pkg::*;
#(
  parameter int unsigned CONC      = 1,
  parameter int unsigned RX        = 16,
  parameter int unsigned RY        = 16,
  parameter int unsigned BUF_DEPTH = 2
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [XW-1:0] pos_x,
  input  logic [YW-1:0] pos_y,

  input  logic          edge_in_val   [4][2],
  input  logic          edge_in_vc    [4][2],
  input  flit_t         edge_in_flit  [4][2],
  output logic [1:0]    edge_in_rdy   [4][2],
  output logic          edge_out_val  [4][2],
  output logic          edge_out_vc   [4][2],
  output flit_t         edge_out_flit [4][2],
  input  logic [1:0]    edge_out_rdy  [4][2],

  input  logic          inj_val  [CONC],
  output logic          inj_rdy  [CONC],
  input  flit_t         inj_flit [CONC],
  output logic          ej_val   [CONC],
  input  logic          ej_rdy   [CONC],
  output flit_t         ej_flit  [CONC]
);

  logic       n_in_val [4], n_in_vc [4], n_out_val [4], n_out_vc [4];
  flit_t      n_in_flit [4], n_out_flit [4];
  logic [1:0] n_in_rdy [4], n_out_rdy [4];

  ocn_torus_router #(.CONC(CONC), .RX(RX), .RY(RY), .BUF_DEPTH(BUF_DEPTH)) u_router (
    .clk, .rst, .pos_x, .pos_y,
    .term_in_val (inj_val), .term_in_rdy (inj_rdy), .term_in_flit (inj_flit),
    .term_out_val (ej_val), .term_out_rdy (ej_rdy), .term_out_flit (ej_flit),
    .net_in_val (n_in_val), .net_in_vc (n_in_vc), .net_in_flit (n_in_flit), .net_in_rdy (n_in_rdy),
    .net_out_val (n_out_val), .net_out_vc (n_out_vc), .net_out_flit (n_out_flit), .net_out_rdy (n_out_rdy)
  );

  for (genvar d = 0; d < 4; d++) begin : g_dir
    // Far channel (lane 0) to the router.
    assign n_in_val[d]          = edge_in_val[d][0];
    assign n_in_vc[d]           = edge_in_vc[d][0];
    assign n_in_flit[d]         = edge_in_flit[d][0];
    assign edge_in_rdy[d][0]    = n_in_rdy[d];
    assign edge_out_val[d][0]   = n_out_val[d];
    assign edge_out_vc[d][0]    = n_out_vc[d];
    assign edge_out_flit[d][0]  = n_out_flit[d];
    assign n_out_rdy[d]         = edge_out_rdy[d][0];
    // Feedthrough channel (lane 1) across to the opposite edge.
    assign edge_out_val[d ^ 1][1]  = edge_in_val[d][1];
    assign edge_out_vc[d ^ 1][1]   = edge_in_vc[d][1];
    assign edge_out_flit[d ^ 1][1] = edge_in_flit[d][1];
    assign edge_in_rdy[d][1]       = edge_out_rdy[d ^ 1][1];
  end

endmodule
