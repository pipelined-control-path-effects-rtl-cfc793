// route_engine: the Routing Engine (RE) of the 2-cycle control-path router.
//
// The RE reads the flit at the head of its port's queue, which stays in the
// queue until the output arbiter has granted it. It holds a routing table of
// N_ID registers, one per ID slot of the incoming link. For a header flit with
// ID-tag h it computes the XY direction from the target address and stores it
// in table entry h; a body or tail flit with ID-tag h takes its direction from
// entry h. Flits of several messages can therefore be interleaved in the queue
// and still follow their own headers' paths.
//
// Control-path pipeline (two cycles, as in the source design):
//   ROUTE cycle - the head flit is visible; its direction is computed and
//                 registered (and written to the table for a header);
//   WAIT  cycle - the registered direction is held (the routing phase);
//   REQ   state - the one-hot routing request rr goes to the arbiter of the
//                 chosen output; when the grant unit answers with er, the
//                 queue is popped (q_er) at the same edge as the MIM takes the
//                 flit.
// A flit thus waits three cycles at the queue head when uncontended, and one
// stream moves at most one flit per three cycles through a port.
//
// Interface: q_es/q_head from the queue, q_er back to it; rr to the crossbar;
// er from the grant unit. The flit itself goes from the queue to the crossbar
// directly. The state machine split into ROUTE/WAIT/REQ is this design's
// reading of the timing diagram; reset clears the table and returns to ROUTE.
module route_engine
  import noc_pkg::*;
#(
  parameter int unsigned        N_ID = noc_pkg::ID_SLOTS,
  parameter logic [COORD_W-1:0] MY_X = '0,
  parameter logic [COORD_W-1:0] MY_Y = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          q_es,     // queue empty
  input  flit_t         q_head,   // flit at queue head
  output logic          q_er,     // pop the queue
  output logic [NP-1:0] rr,       // routing request, one-hot over outputs
  input  logic          er        // grant from the grant unit
);

  typedef enum logic [1:0] {S_ROUTE, S_WAIT, S_REQ} state_e;

  state_e state;
  port_e  dir_q, dir_now;
  port_e  table_q [N_ID];

  always_comb begin
    if (q_head.ftype == FT_HEAD) dir_now = xy_route(MY_X, MY_Y, q_head.data[XT_LSB +: COORD_W],
                                                                q_head.data[YT_LSB +: COORD_W]);
    else                         dir_now = table_q[q_head.id];
  end

  assign rr   = (state == S_REQ) ? port_onehot(dir_q) : '0;
  assign q_er = (state == S_REQ) && er;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_ROUTE;
      dir_q <= P_L;
      for (int i = 0; i < N_ID; i++) table_q[i] <= P_L;
    end else begin
      unique case (state)
        S_ROUTE: if (!q_es) begin
          dir_q <= dir_now;
          if (q_head.ftype == FT_HEAD) table_q[q_head.id] <= dir_now;
          state <= S_WAIT;
        end
        S_WAIT:  state <= S_REQ;
        S_REQ:   if (er) state <= S_ROUTE;
        default: state <= S_ROUTE;
      endcase
    end
  end

  a_ack_only_when_requested: assert property (@(posedge clk) disable iff (!rst_n)
    er |-> state == S_REQ);

endmodule
