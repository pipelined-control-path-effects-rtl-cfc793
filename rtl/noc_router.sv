// noc_router: five-port wormhole-switched mesh router (East, North, West,
// South, Local) with ID-based routing and link-level congestion control.
//
// Each input port has a 2-deep queue (fifo_queue), a routing engine and a
// grant unit; each output port has an arbiter and a MIM whose register drives
// the outgoing link; the crossbar between them carries only the connections
// of XY routing. A flit crosses the router in three phases after it has
// been queued: routing request (the engine asks the arbiter of its output),
// request acknowledge (the arbiter grants, selecting the MIM input and
// acknowledging the engine through its grant unit) and output switching (the
// flit is registered onto the link while the input side releases it). All five
// outputs can switch in parallel.
//
// CTRL_PIPE selects one of the two control paths compared by the source
// design:
//   2 - RE: the flit waits at the queue head through a routing cycle and a
//       request cycle; one flit per 3 cycles per stream.
//   1 - REB (default, the variant the design recommends): the flit moves into
//       a data register in the routing engine while it is routed, freeing the
//       queue; one flit per 2 cycles per stream.
// In both, a flit on the input link in cycle t is on the output link in cycle
// t+4 when nothing contends.
//
// Link interface per port p: in_flit/in_ew (flit and write enable from the
// neighbour), in_ff (this queue's full flag back to it), out_flit/out_ew
// (registered outgoing link), out_ff (the neighbour queue's full flag).
// MY_X/MY_Y are the router's mesh coordinates for XY routing.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned        CTRL_PIPE = 1,
  parameter logic [COORD_W-1:0] MY_X      = '0,
  parameter logic [COORD_W-1:0] MY_Y      = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  flit_t         in_flit  [NP],
  input  logic [NP-1:0] in_ew,
  output logic [NP-1:0] in_ff,
  output flit_t         out_flit [NP],
  output logic [NP-1:0] out_ew,
  input  logic [NP-1:0] out_ff
);

  flit_t                 q_head   [NP];
  logic  [NP-1:0]        q_es, q_er, er;
  flit_t                 sw_data  [NP];     // flit offered to the crossbar
  logic  [NP-1:0][NP-1:0] rr, ra_in, req_arb, gnt, blk;
  flit_t                 data_mim [NP][NP];

  for (genvar p = 0; p < NP; p++) begin : g_in
    fifo_queue #(.DEPTH(2), .W(FLIT_W)) u_q (
      .clk, .rst_n,
      .ew(in_ew[p]), .din(in_flit[p]), .ff(in_ff[p]),
      .er(q_er[p]), .es(q_es[p]), .dout(q_head[p])
    );

    if (CTRL_PIPE == 1) begin : g_reb
      route_engine_buf #(.MY_X(MY_X), .MY_Y(MY_Y)) u_reb (
        .clk, .rst_n,
        .q_es(q_es[p]), .q_head(q_head[p]), .q_er(q_er[p]),
        .dout(sw_data[p]), .rr(rr[p]), .er(er[p])
      );
    end else begin : g_re
      route_engine #(.MY_X(MY_X), .MY_Y(MY_Y)) u_re (
        .clk, .rst_n,
        .q_es(q_es[p]), .q_head(q_head[p]), .q_er(q_er[p]),
        .rr(rr[p]), .er(er[p])
      );
      assign sw_data[p] = q_head[p];
    end

    grant_unit u_g (.rr(rr[p]), .ra(ra_in[p]), .er(er[p]));
  end

  // Crossbar: requests go from input i to the arbiter of output o,
  // acknowledges come back, and every MIM sees the flit of each input, but
  // only along the connections of static XY routing (noc_pkg::CONN): North
  // and South inputs reach no East or West output, and no port reaches its
  // own output. A missing connection carries no request and an idle flit.
  always_comb begin
    for (int unsigned o = 0; o < NP; o++) begin
      for (int unsigned i = 0; i < NP; i++) begin
        req_arb[o][i]  = rr[i][o]  & CONN[o][i];
        ra_in[i][o]    = gnt[o][i] & CONN[o][i];
        data_mim[o][i] = CONN[o][i] ? sw_data[i] : '0;
      end
    end
  end

  for (genvar o = 0; o < NP; o++) begin : g_out
    arbiter #(.N(NP), .MASK(CONN[o])) u_a (
      .clk, .rst_n,
      .req(req_arb[o]), .blk(blk[o]), .ff(out_ff[o]), .gnt(gnt[o])
    );

    mim #(.N(NP)) u_mim (
      .clk, .rst_n,
      .in_flit(data_mim[o]), .sel(gnt[o]), .blk(blk[o]),
      .out_flit(out_flit[o]), .out_ew(out_ew[o])
    );
  end

endmodule
