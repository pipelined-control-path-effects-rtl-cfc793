// route_engine_buf: the Routing Engine with Data Buffer (REB) of the 1-cycle
// control-path router.
//
// The REB adds a data register between the queue and the crossbar. When the
// register is free, or its flit is being granted in this cycle, the REB pops
// the queue head into the register and, at the same clock edge, registers the
// flit's routing direction: XY direction from the target address for a header
// (also written to routing-table entry h, h being the flit's ID-tag), table
// entry h for a body or tail flit. The table has N_ID registers, one per ID
// slot of the incoming link.
//
// Timing per flit, uncontended:
//   cycle 0 - flit at the queue head, taken into the buffer at the end;
//   cycle 1 - buffer holds the flit and its direction (routing phase);
//   cycle 2 - rr is raised to the chosen output's arbiter; on the grant (er)
//             the flit goes to the MIM and the next queue head is taken into
//             the buffer at the same edge.
// One stream therefore moves one flit every two cycles through a port,
// against three for the 2-cycle router, at the cost of a flit-wide register.
//
// Interface: q_es/q_head from the queue, q_er pops it; dout and rr to the
// crossbar; er from the grant unit. The registered request (rr one cycle after
// the buffer is loaded) follows the timing diagram of the source design.
// Reset empties the buffer and clears the table.
module route_engine_buf
  import noc_pkg::*;
#(
  parameter int unsigned        N_ID = noc_pkg::ID_SLOTS,
  parameter logic [COORD_W-1:0] MY_X = '0,
  parameter logic [COORD_W-1:0] MY_Y = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          q_es,
  input  flit_t         q_head,
  output logic          q_er,
  output flit_t         dout,     // buffered flit to the crossbar
  output logic [NP-1:0] rr,
  input  logic          er
);

  flit_t d_q;
  logic  v_q, rr_q;
  port_e dir_q, dir_now;
  port_e table_q [N_ID];
  logic  load;

  always_comb begin
    if (q_head.ftype == FT_HEAD) dir_now = xy_route(MY_X, MY_Y, q_head.data[XT_LSB +: COORD_W],
                                                                q_head.data[YT_LSB +: COORD_W]);
    else                         dir_now = table_q[q_head.id];
  end

  assign load = !q_es && (!v_q || er);
  assign q_er = load;
  assign dout = d_q;
  assign rr   = rr_q ? port_onehot(dir_q) : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q   <= '0;
      v_q   <= 1'b0;
      rr_q  <= 1'b0;
      dir_q <= P_L;
      for (int i = 0; i < N_ID; i++) table_q[i] <= P_L;
    end else if (load) begin
      d_q   <= q_head;
      v_q   <= 1'b1;
      rr_q  <= 1'b0;
      dir_q <= dir_now;
      if (q_head.ftype == FT_HEAD) table_q[q_head.id] <= dir_now;
    end else if (er) begin
      v_q  <= 1'b0;
      rr_q <= 1'b0;
    end else begin
      rr_q <= v_q;
    end
  end

  a_ack_only_when_requested: assert property (@(posedge clk) disable iff (!rst_n)
    er |-> rr_q);

endmodule
