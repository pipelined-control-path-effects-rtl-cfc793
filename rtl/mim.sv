// mim: Multiplexor with ID-Management unit (MIM) of a router output port.
//
// The multiplexor switches the flit of the input selected by the arbiter (sel,
// one-hot) onto the outgoing link register; out_flit/out_ew are valid from the
// next clock edge. At the same edge the ID-management unit rewrites the flit's
// ID-tag so that every message on this link has its own tag:
//   header - a free slot j of the ID slot table is taken and filled with
//            (input port, old ID-tag); the header leaves with ID-tag j;
//   body   - the slot holding (input port, old ID-tag) is looked up; the flit
//            leaves with that slot's number;
//   tail   - looked up like a body flit, then the slot is freed.
// Flits of one message thus carry the same tag on each link, and up to N_ID
// messages can be interleaved on a link. The slot table, the header, body and
// tail handling and the lowest-free-slot pick shown in the design's example
// follow the source design.
//
// blk[i] tells the arbiter that input i presents a header while no slot is
// free, so the header waits; this guard and the reset (all slots free, link
// idle) are this implementation's choices.
module mim
  import noc_pkg::*;
#(
  parameter int unsigned N    = noc_pkg::NP,
  parameter int unsigned N_ID = noc_pkg::ID_SLOTS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  flit_t        in_flit [N],
  input  logic [N-1:0] sel,
  output logic [N-1:0] blk,
  output flit_t        out_flit,
  output logic         out_ew
);

  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned IW = (N_ID > 1) ? $clog2(N_ID) : 1;

  logic [N_ID-1:0] slot_v;
  logic [PW-1:0]   slot_port [N_ID];
  logic [ID_W-1:0] slot_old  [N_ID];

  flit_t         f;
  logic [PW-1:0] p;
  logic [IW-1:0] free_j, match_j;
  logic          has_free, has_match;

  // Selected input.
  always_comb begin
    f = '0;
    p = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (sel[i]) begin
        f = in_flit[i];
        p = PW'(i);
      end
    end
  end

  // Lowest free slot, and the slot already holding this (port, old ID).
  always_comb begin
    has_free  = 1'b0;
    free_j    = '0;
    has_match = 1'b0;
    match_j   = '0;
    for (int unsigned j = 0; j < N_ID; j++) begin
      if (!slot_v[j] && !has_free) begin
        has_free = 1'b1;
        free_j   = IW'(j);
      end
      if (slot_v[j] && slot_port[j] == p && slot_old[j] == f.id) begin
        has_match = 1'b1;
        match_j   = IW'(j);
      end
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N; i++)
      blk[i] = (in_flit[i].ftype == FT_HEAD) && !has_free;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_flit <= '0;
      out_ew   <= 1'b0;
      slot_v   <= '0;
      for (int unsigned j = 0; j < N_ID; j++) begin
        slot_port[j] <= '0;
        slot_old[j]  <= '0;
      end
    end else begin
      out_ew <= |sel;
      if (|sel) begin
        out_flit.ftype <= f.ftype;
        out_flit.data  <= f.data;
        if (f.ftype == FT_HEAD) begin
          out_flit.id       <= ID_W'(free_j);
          slot_v[free_j]    <= 1'b1;
          slot_port[free_j] <= p;
          slot_old[free_j]  <= f.id;
        end else begin
          out_flit.id <= ID_W'(match_j);
          if (f.ftype == FT_TAIL) slot_v[match_j] <= 1'b0;
        end
      end
    end
  end

  a_sel_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sel));
  a_header_has_slot: assert property (@(posedge clk) disable iff (!rst_n)
    (|sel && f.ftype == FT_HEAD) |-> has_free);
  a_payload_has_slot: assert property (@(posedge clk) disable iff (!rst_n)
    (|sel && f.ftype != FT_HEAD) |-> has_match);

endmodule
