// ocn_rr_arbiter: round-robin arbiter for one router output port.
//
// Picks one of N requesters. The requester just after the one granted last
// has the highest priority, so every waiting input is served within N grants.
// The grant is combinational from req and the priority register; the priority
// moves only when `update` is high (the router raises it when the granted
// flit actually leaves), so a stalled output does not lose its turn order.
//
// The source lists switch arbitration among the generator's options without
// fixing one; round robin is this design's choice.
module ocn_rr_arbiter #(
  parameter int unsigned N = 9
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] prio;     // index with the highest priority
  logic [IW-1:0] win;
  logic          any;

  always_comb begin
    grant = '0;
    win   = '0;
    any   = 1'b0;
    for (int unsigned k = 0; k < N; k++) begin
      logic [IW:0] idx;
      idx = {1'b0, prio} + (IW+1)'(k);
      if (idx >= (IW+1)'(N)) idx = idx - (IW+1)'(N);
      if (!any && req[idx[IW-1:0]]) begin
        any        = 1'b1;
        win        = idx[IW-1:0];
        grant[idx[IW-1:0]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst)                prio <= '0;
    else if (update && any) prio <= (win == IW'(N - 1)) ? '0 : win + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst) assert ($onehot0(grant)) else $error("ocn_rr_arbiter: grant not one-hot");
  end

endmodule
