// tb_tile_model: behavioural stand-in for a tile's network interface, used by
// the mesh testbenches (not part of the router hardware).
//
// Generator: after 'start', sends nmsg messages of nflits flits each (header,
// nflits-2 data bodies, tail) to (dst_x, dst_y). The messages are interleaved
// flit by flit on the injection link with local ID-tags 0..nmsg-1, so that
// several messages share the link as the ID-based routing allows. Message k
// carries tag tag_base+k: in the header's ext field and in the upper byte of
// every payload word, whose lower 24 bits number the flits in order. A flit is
// put on the link in the cycle after inj_ff was seen low, as a router's MIM
// does.
//
// Evaluator: checks every flit of the ejection link. A header must address
// this tile; a payload flit must carry the next number of the message that its
// ID-tag opened on this link. Counts flits, finished messages and errors and
// keeps the cycle of the last tail. ej_ff follows the 'stall' input.
module tb_tile_model
  import noc_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [3:0]   my_x,
  input  logic [3:0]   my_y,
  // generator control
  input  logic         start,
  input  logic [3:0]   dst_x,
  input  logic [3:0]   dst_y,
  input  int unsigned  nflits,
  input  int unsigned  nmsg,
  input  logic [7:0]   tag_base,
  output logic         tx_done,
  output longint       tx_first_cycle,
  // evaluator control and results
  input  logic         stall,
  output int unsigned  rx_flits,
  output int unsigned  rx_msgs,
  output int unsigned  rx_errors,
  output longint       rx_last_cycle,
  // router local port
  output flit_t        inj_flit,
  output logic         inj_ew,
  input  logic         inj_ff,
  input  flit_t        ej_flit,
  input  logic         ej_ew,
  output logic         ej_ff
);

  longint      cyc;
  int unsigned sent [16];
  int unsigned k_next;
  logic        active;
  logic [7:0]  rx_tag [16];
  int unsigned rx_seq [16];
  logic        rx_open [16];

  assign ej_ff = stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cyc <= 0;
    else        cyc <= cyc + 1;
  end

  function automatic flit_t gen_flit(int unsigned k, int unsigned s);
    flit_t f;
    if (s == 0) begin
      f = make_header(my_x, my_y, dst_x, dst_y, 4'(k), tag_base + 8'(k));
    end else begin
      f.ftype = (s == nflits - 1) ? FT_TAIL : FT_BODY;
      f.id    = 4'(k);
      f.data  = {tag_base + 8'(k), 24'(s)};
    end
    return f;
  endfunction

  // Generator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inj_ew  <= 1'b0;
      inj_flit <= '0;
      active  <= 1'b0;
      tx_done <= 1'b0;
      k_next  <= 0;
      tx_first_cycle <= -1;
      for (int i = 0; i < 16; i++) sent[i] <= 0;
    end else begin
      inj_ew <= 1'b0;
      if (start && !active && !tx_done) begin
        active <= 1'b1;
        k_next <= 0;
        tx_first_cycle <= -1;
        for (int i = 0; i < 16; i++) sent[i] <= 0;
      end else if (active && !inj_ff) begin
        inj_ew   <= 1'b1;
        inj_flit <= gen_flit(k_next, sent[k_next]);
        if (tx_first_cycle < 0) tx_first_cycle <= cyc + 1;
        sent[k_next] <= sent[k_next] + 1;
        if (k_next == nmsg - 1 && sent[k_next] + 1 == nflits) begin
          active  <= 1'b0;
          tx_done <= 1'b1;
        end
        k_next <= (k_next == nmsg - 1) ? 0 : k_next + 1;
      end
      if (!start) tx_done <= 1'b0;
    end
  end

  // Evaluator
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_flits  <= 0;
      rx_msgs   <= 0;
      rx_errors <= 0;
      rx_last_cycle <= 0;
      for (int i = 0; i < 16; i++) begin
        rx_open[i] <= 1'b0;
        rx_seq[i]  <= 0;
        rx_tag[i]  <= '0;
      end
    end else if (ej_ew) begin
      rx_flits <= rx_flits + 1;
      if (ej_flit.ftype == FT_HEAD) begin
        if (rx_open[ej_flit.id] || ej_flit.data[19:16] != my_x || ej_flit.data[15:12] != my_y) begin
          rx_errors <= rx_errors + 1;
          $display("tile(%0d,%0d): bad header %h", my_x, my_y, ej_flit);
        end
        rx_open[ej_flit.id] <= 1'b1;
        rx_tag[ej_flit.id]  <= ej_flit.data[7:0];
        rx_seq[ej_flit.id]  <= 1;
      end else begin
        if (!rx_open[ej_flit.id] ||
            ej_flit.data != {rx_tag[ej_flit.id], 24'(rx_seq[ej_flit.id])}) begin
          rx_errors <= rx_errors + 1;
          $display("tile(%0d,%0d): bad payload %h (expected tag %h seq %0d)", my_x, my_y,
                   ej_flit, rx_tag[ej_flit.id], rx_seq[ej_flit.id]);
        end
        rx_seq[ej_flit.id] <= rx_seq[ej_flit.id] + 1;
        if (ej_flit.ftype == FT_TAIL) begin
          rx_open[ej_flit.id] <= 1'b0;
          rx_msgs       <= rx_msgs + 1;
          rx_last_cycle <= cyc;
        end
      end
    end
  end

endmodule
