// tb_route_engine_buf: checks the REB of the 1-cycle router at (2,1). A
// model queue feeds it flit streams in which up to 16 messages are interleaved
// by ID-tag; a model arbiter grants each request, at once or after a random
// wait. Every request must name the XY direction of the flit's message
// (headers by their target, payload flits by the direction their header
// stored), the buffered flit on dout must be the one granted, in queue order,
// and with immediate grants the flits must be requested one every 2 cycles.
module tb_route_engine_buf;
  import noc_pkg::*;
  localparam int PERIOD = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  flit_t      src [$];
  logic [4:0] exp_dir [$];
  logic       q_es, q_er, er;
  flit_t      q_head;
  logic [4:0] rr;
  bit         hold_grants;

  assign q_es   = (src.size() == 0);
  assign q_head = q_es ? flit_t'('0) : src[0];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // independent XY reference for a router at (2,1)
  function automatic logic [4:0] ref_dir(int xt, int yt);
    if (xt > 2) return 5'b00001;
    if (xt < 2) return 5'b00100;
    if (yt > 1) return 5'b00010;
    if (yt < 1) return 5'b01000;
    return 5'b10000;
  endfunction

  // build a random interleaved stream of messages with expected directions
  task automatic build_stream(int n);
    logic [4:0] tbl [16];
    bit         open_m [16];
    for (int i = 0; i < 16; i++) open_m[i] = 0;
    for (int k = 0; k < n; k++) begin
      int id = $urandom_range(0, 15);
      flit_t f;
      if (!open_m[id]) begin
        int xt = $urandom_range(0, 3), yt = $urandom_range(0, 3);
        f = make_header(4'd0, 4'd0, 4'(xt), 4'(yt), 4'(id), 8'(k));
        tbl[id] = ref_dir(xt, yt);
        open_m[id] = 1;
      end else begin
        f.id = 4'(id);
        f.data = {$urandom};
        f.ftype = ($urandom_range(0, 3) == 0) ? FT_TAIL : FT_BODY;
        if (f.ftype == FT_TAIL) open_m[id] = 0;
      end
      src.push_back(f);
      exp_dir.push_back(tbl[id]);
    end
  endtask

  // grant: immediately, or after a random wait when hold_grants is set
  int wait_cnt = 0;
  always_comb er = (rr != 0) && (wait_cnt == 0);
  always @(posedge clk) begin
    if (rr != 0 && wait_cnt > 0) wait_cnt <= wait_cnt - 1;
    else if (er) wait_cnt <= hold_grants ? $urandom_range(0, 2) : 0;
  end

  longint grant_cycles [$];
  always @(posedge clk) if (rst_n) begin
    check($onehot0(rr), "rr one-hot");
    if (er) begin
      check(exp_dir.size() > 0 && rr == exp_dir[0],
            $sformatf("direction: got %b expected %b", rr, exp_dir.size() ? exp_dir[0] : 5'b0));
      check_data();
      grant_cycles.push_back(cyc);
      if (exp_dir.size() > 0) void'(exp_dir.pop_front());
    end
    if (q_er) begin
      check(!q_es, "pop of an empty queue");
      if (!q_es) void'(src.pop_front());
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    hold_grants = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // timing: 10 flits, immediate grants
    build_stream(10);
    while (exp_dir.size() > 0) @(posedge clk);
    for (int k = 1; k < grant_cycles.size(); k++)
      check(grant_cycles[k] - grant_cycles[k-1] == PERIOD,
            $sformatf("request period %0d, expected %0d", grant_cycles[k] - grant_cycles[k-1], PERIOD));
    check(grant_cycles.size() == 10, "all 10 flits granted");
    // random stream with random grant delays
    hold_grants = 1;
    build_stream(400);
    while (exp_dir.size() > 0) @(posedge clk);
    repeat (5) @(posedge clk);
    check(src.size() == 0, "queue drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  flit_t dout;
  flit_t order [$];
  always @(posedge clk) if (q_er && !q_es) order.push_back(q_head);

  route_engine_buf #(.MY_X(4'd2), .MY_Y(4'd1)) dut (
    .clk, .rst_n, .q_es, .q_head, .q_er, .dout, .rr, .er);

  task automatic check_data();
    check(order.size() > 0 && dout == order[0], "granted flit is the oldest loaded one");
    if (order.size() > 0) void'(order.pop_front());
  endtask
endmodule
