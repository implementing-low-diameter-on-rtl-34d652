// ocn_pkg: types and constants shared by the tiled manycore on-chip network.
//
// The network connects a 16x16 array of cores. A router serves CONC cores
// (concentration 1, 4 or 8) and sits on a 2-D grid of router tiles. Every
// channel carries one flit per cycle with a valid/ready handshake; a flit moves
// when valid and ready are both high on a rising clock edge.
//
// Flit format (own choice, the source names no format): each flit repeats the
// destination router coordinates and the destination terminal, so every flit
// can be routed on its own, and carries a `last` bit that closes a packet.
// Packets of several flits travel as worms: an output port stays locked to one
// input until the `last` flit has crossed it. The 64-bit flit width is an
// assumed channel width; the source sweeps 32 to 256 bits.
package ocn_pkg;

  // Field widths cover the 16x16 target chip: up to 16 router columns and rows
  // and up to 8 cores per router.
  localparam int unsigned XW       = 4;
  localparam int unsigned YW       = 4;
  localparam int unsigned TW       = 3;
  localparam int unsigned FLIT_W   = 64;
  localparam int unsigned PAYLOAD_W = FLIT_W - 1 - XW - YW - TW;

  typedef struct packed {
    logic                 last;    // final flit of the packet
    logic [XW-1:0]        dst_x;   // destination router column
    logic [YW-1:0]        dst_y;   // destination router row
    logic [TW-1:0]        dst_t;   // destination terminal (core) at that router
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  // Router port numbering. Terminal ports come first (0..CONC-1), then the
  // near-channel ports, then the ruche (far-channel) ports when RUCHE > 0.
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_S = 2'd1, DIR_E = 2'd2, DIR_W = 2'd3} dir_e;

  function automatic int unsigned near_port(int unsigned conc, dir_e d);
    return conc + int'(d);
  endfunction

  function automatic int unsigned far_port(int unsigned conc, dir_e d);
    return conc + 4 + int'(d);
  endfunction

  function automatic int unsigned router_radix(int unsigned conc, int unsigned ruche);
    return conc + 4 + ((ruche > 0) ? 4 : 0);
  endfunction

  // Router-grid shape for a concentration factor: with 4 cores per router
  // each router serves a 2x2 block of cores, with 8 a 4-wide by 2-high block.
  function automatic int unsigned conc_x(int unsigned conc);
    return (conc >= 8) ? 4 : (conc >= 4) ? 2 : 1;
  endfunction

  function automatic int unsigned conc_y(int unsigned conc);
    return (conc >= 4) ? 2 : 1;
  endfunction

  // Lanes on each tile edge: lane 0 is the near channel, lane 1 the far
  // channel and lanes 2..RUCHE the feedthrough channels.
  function automatic int unsigned edge_lanes(int unsigned ruche);
    return 1 + ruche;
  endfunction

  // Cross-over between neighbouring tiles: output lane j of one tile drives
  // input lane next_lane(j) of the next tile in the same direction. The near
  // lane goes straight across; the ruche lanes rotate far -> feedthrough 1 ->
  // ... -> feedthrough RUCHE-1 -> far, so a flit leaving on the far lane
  // re-enters a router exactly RUCHE tiles away.
  function automatic int unsigned next_lane(int unsigned ruche, int unsigned j);
    return (j == 0) ? 0 : (j % ruche) + 1;
  endfunction

endpackage
