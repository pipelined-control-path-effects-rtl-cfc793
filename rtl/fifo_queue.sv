// fifo_queue: the input queue (Q) of a router port.
//
// A small FIFO of DEPTH registers (two in the design, chosen there for area)
// that buffers flits arriving on an incoming link. The upstream router writes
// a flit by raising ew with the flit on din; the flit is stored at that clock
// edge and appears on dout, with es (empty status) low, from the next cycle.
// The routing engine pops the head with er.
//
// Link-level congestion control: ff (full flag) tells the upstream arbiter not
// to switch another flit onto this link. Because the link register adds one
// cycle between the upstream grant and the write here, ff is raised when the
// queue is full and also when it holds DEPTH-1 flits while a flit is on the
// link (ew high). Under that rule no flit is ever lost, whatever the reader
// does. This early warning is this implementation's own choice: the source
// design's waveform shows the flag only when both registers are occupied, but
// it does not say how an in-flight flit is covered. The flag is a function of
// registered state and ew only, so it carries no path from the reader's pop.
//
// Reset is asynchronous, active low, and empties the queue.
module fifo_queue #(
  parameter int unsigned DEPTH = 2,
  parameter int unsigned W     = noc_pkg::FLIT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ew,
  input  logic [W-1:0] din,
  output logic         ff,
  input  logic         er,
  output logic         es,
  output logic [W-1:0] dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic          do_wr, do_rd;

  assign es    = (cnt == 0);
  assign do_rd = er && !es;
  assign do_wr = ew && ((cnt < (AW+1)'(DEPTH)) || do_rd);
  assign ff    = (cnt == (AW+1)'(DEPTH)) || ((cnt == (AW+1)'(DEPTH - 1)) && ew);
  assign dout  = mem[rp];

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (do_wr) begin
        mem[wp] <= din;
        wp      <= incr(wp);
      end
      if (do_rd) rp <= incr(rp);
      cnt <= cnt + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  // A write into a full queue would lose a flit: the congestion control must
  // prevent it.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    !(ew && cnt == (AW+1)'(DEPTH) && !do_rd));

endmodule
