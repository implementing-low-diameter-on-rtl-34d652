// ocn_tile: the homogeneous hard macro that is tiled across the chip.
//
// Every tile is identical: one router plus the channel pins on its four
// edges. Each edge has 1+RUCHE lanes in each direction. Lane 0 is the near
// channel to the adjacent tile. With ruche channels, lane 1 is the far channel
// and lanes 2..RUCHE are feedthrough channels: wires that cross the tile
// from one edge to the opposite edge without touching the router. Between two
// tiles the lanes are crossed over (output lane j drives input lane
// ocn_pkg::next_lane(j) of the neighbour), so a flit that the router sends on
// the far channel travels through RUCHE-1 feedthroughs and enters the router
// RUCHE tiles away. All top-level wires thus run only between neighbouring
// tiles, which is what lets one hard macro be closed for timing and reused
// everywhere. The near, far and feedthrough channels and the cross-over
// follow the source's hard-macro drawings; the lane numbering is this
// design's own.
//
// Direction convention: flits on edge N's input lanes travel south, so the
// feedthrough from edge N's input lane j leaves on edge S's output lane j
// (likewise S->N, E->W, W->E). The tile's grid position comes in on pos_x and
// pos_y pins rather than parameters, so the netlist is the same for every
// tile; the top ties these pins to constants.
//
// Terminal ports 0..CONC-1 connect the cores served by this router. Timing is
// the router's: one cycle per router, no cycle on a channel.
module ocn_tile
  import ocn_pkg::*;
#(
  parameter int unsigned CONC      = 1,
  parameter int unsigned RUCHE     = 2,
  parameter int unsigned BUF_DEPTH = 2,
  parameter int unsigned LANES     = edge_lanes(RUCHE)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [XW-1:0] pos_x,
  input  logic [YW-1:0] pos_y,

  // Edge channels, indexed [direction][lane] with direction as in ocn_pkg::dir_e.
  input  logic          edge_in_val   [4][LANES],
  output logic          edge_in_rdy   [4][LANES],
  input  flit_t         edge_in_flit  [4][LANES],
  output logic          edge_out_val  [4][LANES],
  input  logic          edge_out_rdy  [4][LANES],
  output flit_t         edge_out_flit [4][LANES],

  // Core (terminal) channels: inj is core -> network, ej is network -> core.
  input  logic          inj_val  [CONC],
  output logic          inj_rdy  [CONC],
  input  flit_t         inj_flit [CONC],
  output logic          ej_val   [CONC],
  input  logic          ej_rdy   [CONC],
  output flit_t         ej_flit  [CONC]
);

  localparam int unsigned NP = router_radix(CONC, RUCHE);

  logic  r_in_val  [NP];
  logic  r_in_rdy  [NP];
  flit_t r_in_flit [NP];
  logic  r_out_val  [NP];
  logic  r_out_rdy  [NP];
  flit_t r_out_flit [NP];

  ocn_router #(.CONC(CONC), .RUCHE(RUCHE), .BUF_DEPTH(BUF_DEPTH)) u_router (
    .clk, .rst, .pos_x, .pos_y,
    .in_val  (r_in_val),  .in_rdy  (r_in_rdy),  .in_flit  (r_in_flit),
    .out_val (r_out_val), .out_rdy (r_out_rdy), .out_flit (r_out_flit)
  );

  // Terminal ports.
  for (genvar t = 0; t < CONC; t++) begin : g_term
    assign r_in_val[t]  = inj_val[t];
    assign r_in_flit[t] = inj_flit[t];
    assign inj_rdy[t]   = r_in_rdy[t];
    assign ej_val[t]    = r_out_val[t];
    assign ej_flit[t]   = r_out_flit[t];
    assign r_out_rdy[t] = ej_rdy[t];
  end

  // Opposite edge of each direction: N<->S, E<->W.
  function automatic int unsigned opposite(int unsigned d);
    return d ^ 1;
  endfunction

  for (genvar d = 0; d < 4; d++) begin : g_dir
    // Near channel (lane 0).
    assign r_in_val[CONC + d]    = edge_in_val[d][0];
    assign r_in_flit[CONC + d]   = edge_in_flit[d][0];
    assign edge_in_rdy[d][0]     = r_in_rdy[CONC + d];
    assign edge_out_val[d][0]    = r_out_val[CONC + d];
    assign edge_out_flit[d][0]   = r_out_flit[CONC + d];
    assign r_out_rdy[CONC + d]   = edge_out_rdy[d][0];

    if (RUCHE > 0) begin : g_ruche
      // Far channel (lane 1) ends at the router.
      assign r_in_val[CONC + 4 + d]  = edge_in_val[d][1];
      assign r_in_flit[CONC + 4 + d] = edge_in_flit[d][1];
      assign edge_in_rdy[d][1]       = r_in_rdy[CONC + 4 + d];
      assign edge_out_val[d][1]      = r_out_val[CONC + 4 + d];
      assign edge_out_flit[d][1]     = r_out_flit[CONC + 4 + d];
      assign r_out_rdy[CONC + 4 + d] = edge_out_rdy[d][1];

      // Feedthrough channels (lanes 2..RUCHE) cross the tile untouched.
      for (genvar j = 2; j < LANES; j++) begin : g_ft
        assign edge_out_val[opposite(d)][j]  = edge_in_val[d][j];
        assign edge_out_flit[opposite(d)][j] = edge_in_flit[d][j];
        assign edge_in_rdy[d][j]             = edge_out_rdy[opposite(d)][j];
      end
    end
  end

endmodule
