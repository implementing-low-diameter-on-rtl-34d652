// ocn_torus_router: router of the folded-torus network, with two virtual
// channels on every network port.
//
// Ports: CONC terminal ports (one queue each) and four network ports N, S, E,
// W. Each network input has one ocn_fifo per virtual channel; a network
// channel carries valid, the flit and its virtual-channel number forward, and
// one ready per virtual channel backward (the not-full flag of that queue).
//
// Inside, every (input, virtual channel) queue is a virtual input and every
// (output, virtual channel) pair a virtual output. ocn_torus_route picks the
// output port and the virtual channel (dateline scheme). Each virtual output
// has a round-robin arbiter and a wormhole lock, exactly as in ocn_router, so
// a packet holds its output virtual channel until its last flit. The two
// virtual outputs of one network port then share the physical link: a second
// round-robin arbiter picks, each cycle, one of those whose downstream queue
// has room. Because that choice looks at the per-channel ready, a blocked
// virtual channel never holds up the other; valid is therefore only raised
// for a channel whose ready is high.
//
// Timing as in ocn_router: one cycle per router, none per channel. The source
// gives the torus topology and its tile wiring; the router's insides,
// including the virtual channels, are this design's choices.
module ocn_torus_router
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

  input  logic          term_in_val   [CONC],
  output logic          term_in_rdy   [CONC],
  input  flit_t         term_in_flit  [CONC],
  output logic          term_out_val  [CONC],
  input  logic          term_out_rdy  [CONC],
  output flit_t         term_out_flit [CONC],

  input  logic          net_in_val   [4],
  input  logic          net_in_vc    [4],
  input  flit_t         net_in_flit  [4],
  output logic [1:0]    net_in_rdy   [4],    // per virtual channel
  output logic          net_out_val  [4],
  output logic          net_out_vc   [4],
  output flit_t         net_out_flit [4],
  input  logic [1:0]    net_out_rdy  [4]     // per virtual channel
);

  localparam int unsigned NV = CONC + 8;          // virtual inputs and outputs
  localparam int unsigned VW = $clog2(NV);
  localparam int unsigned PW = $clog2(CONC + 4);

  logic          q_val  [NV];
  logic          q_rdy  [NV];
  flit_t         q_flit [NV];
  logic [VW-1:0] q_vo   [NV];       // virtual output wanted by each head flit

  // Virtual inputs: terminals, then network port d virtual channel v at CONC + 2d + v.
  for (genvar t = 0; t < CONC; t++) begin : g_tq
    ocn_fifo #(.DEPTH(BUF_DEPTH)) u_q (
      .clk, .rst,
      .enq_val (term_in_val[t]), .enq_rdy (term_in_rdy[t]), .enq_flit (term_in_flit[t]),
      .deq_val (q_val[t]), .deq_rdy (q_rdy[t]), .deq_flit (q_flit[t])
    );
  end
  for (genvar d = 0; d < 4; d++) begin : g_nq
    for (genvar v = 0; v < 2; v++) begin : g_vc
      ocn_fifo #(.DEPTH(BUF_DEPTH)) u_q (
        .clk, .rst,
        .enq_val (net_in_val[d] && (net_in_vc[d] == 1'(v))), .enq_rdy (net_in_rdy[d][v]),
        .enq_flit (net_in_flit[d]),
        .deq_val (q_val[CONC + 2*d + v]), .deq_rdy (q_rdy[CONC + 2*d + v]), .deq_flit (q_flit[CONC + 2*d + v])
      );
    end
  end

  for (genvar i = 0; i < NV; i++) begin : g_rc
    logic [PW-1:0] port;
    logic          vc;
    localparam bit IS_X = (i >= CONC) && (((i - CONC) / 2 == int'(DIR_E)) || ((i - CONC) / 2 == int'(DIR_W)));
    localparam bit IS_Y = (i >= CONC) && !IS_X;
    ocn_torus_route #(.CONC(CONC), .RX(RX), .RY(RY)) u_rc (
      .pos_x, .pos_y,
      .dst_x (q_flit[i].dst_x), .dst_y (q_flit[i].dst_y), .dst_t (q_flit[i].dst_t),
      .in_is_x (IS_X), .in_is_y (IS_Y), .in_vc ((i >= CONC) ? 1'((i - CONC) % 2) : 1'b0),
      .out_port (port), .out_vc (vc)
    );
    assign q_vo[i] = (int'(port) < CONC) ? VW'(port) : VW'(CONC + 2 * (int'(port) - CONC)) + VW'(vc);
  end

  // Virtual-output arbitration with wormhole locks.
  logic [NV-1:0] vo_grant [NV];
  logic          vo_val   [NV];
  logic          vo_fire  [NV];
  flit_t         vo_flit  [NV];

  for (genvar o = 0; o < NV; o++) begin : g_vo
    logic [NV-1:0] raw_req, req, arb_grant;
    logic [VW-1:0] win, owner;
    logic          locked;

    always_comb begin
      for (int unsigned i = 0; i < NV; i++) raw_req[i] = q_val[i] && (q_vo[i] == VW'(o));
      req = raw_req;
      if (locked) begin
        req = '0;
        req[owner] = raw_req[owner];
      end
    end

    ocn_rr_arbiter #(.N(NV)) u_arb (.clk, .rst, .req, .update (vo_fire[o]), .grant (arb_grant));

    always_comb begin
      win = '0;
      for (int unsigned i = 0; i < NV; i++) if (arb_grant[i]) win = VW'(i);
    end

    assign vo_grant[o] = arb_grant;
    assign vo_val[o]   = |arb_grant;
    assign vo_flit[o]  = q_flit[win];

    always_ff @(posedge clk) begin
      if (rst) begin
        locked <= 1'b0;
        owner  <= '0;
      end else if (vo_fire[o]) begin
        locked <= !q_flit[win].last;
        owner  <= win;
      end
    end
  end

  // Terminal outputs: one virtual output each.
  for (genvar t = 0; t < CONC; t++) begin : g_tout
    assign vo_fire[t]       = vo_val[t] && term_out_rdy[t];
    assign term_out_val[t]  = vo_val[t];
    assign term_out_flit[t] = vo_flit[t];
  end

  // Network outputs: two virtual channels share each physical link.
  for (genvar d = 0; d < 4; d++) begin : g_nout
    localparam int V0 = CONC + 2 * d;
    logic [1:0] elig, pick;
    assign elig = {vo_val[V0 + 1] && net_out_rdy[d][1], vo_val[V0] && net_out_rdy[d][0]};
    ocn_rr_arbiter #(.N(2)) u_link (.clk, .rst, .req (elig), .update (|elig), .grant (pick));
    assign vo_fire[V0]      = pick[0];
    assign vo_fire[V0 + 1]  = pick[1];
    assign net_out_val[d]   = |pick;
    assign net_out_vc[d]    = pick[1];
    assign net_out_flit[d]  = pick[1] ? vo_flit[V0 + 1] : vo_flit[V0];
  end

  // Pop a queue when its virtual output moves the flit.
  always_comb begin
    for (int unsigned i = 0; i < NV; i++) begin
      q_rdy[i] = 1'b0;
      for (int unsigned o = 0; o < NV; o++)
        if (vo_grant[o][i] && vo_fire[o]) q_rdy[i] = 1'b1;
    end
  end

endmodule
