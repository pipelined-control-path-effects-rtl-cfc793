// arbiter: the output-port Arbiter (A) of the router.
//
// Every input port whose routing engine requests this output raises its bit in
// req. Each cycle the arbiter grants at most one of them, round-robin: the
// search starts one position after the input granted last, so the selection
// moves on after every flit and interleaves flits of competing messages on the
// outgoing link (flit-by-flit arbitration, as in the source design; the
// round-robin order is this implementation's choice).
//
// Nothing is granted while ff, the full flag of the downstream input queue, is
// high (link-level congestion control). An input whose head flit is a header
// is skipped while the MIM has no free ID slot (blk), since the header could
// not be given a new ID-tag.
//
// The grant is combinational: gnt is both the routing acknowledge (ra) to the
// inputs' grant units and the one-hot select (sel) of the MIM, in the same
// cycle as the request. MASK removes inputs that the crossbar never connects
// to this output under XY routing.
module arbiter #(
  parameter int unsigned   N    = noc_pkg::NP,
  parameter logic [N-1:0]  MASK = '1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic [N-1:0] blk,
  input  logic         ff,
  output logic [N-1:0] gnt
);

  localparam int unsigned PW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  elig;
  logic [PW-1:0] ptr_q;     // first input to consider in the next search
  logic [PW-1:0] win;
  logic          found;

  assign elig = req & MASK & ~blk;

  always_comb begin
    logic [PW-1:0] idx;
    found = 1'b0;
    win   = '0;
    for (int unsigned i = 0; i < N; i++) begin
      idx = PW'((int'(ptr_q) + i) % N);
      if (!found && elig[idx]) begin
        found = 1'b1;
        win   = PW'(idx);
      end
    end
    gnt = '0;
    if (found && !ff) gnt[win] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             ptr_q <= '0;
    else if (found && !ff)  ptr_q <= (win == PW'(N - 1)) ? '0 : win + 1'b1;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
  a_no_grant_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    ff |-> gnt == '0);

endmodule
