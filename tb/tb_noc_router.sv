// tb_noc_router: tests one router at (1,1), once per control-path variant.
//
// Per variant (v=0: 1-cycle REB router, v=1: 2-cycle RE router):
//  1. a single 8-flit message West->East: the header is on the output link 4
//     cycles after it was on the input link, later flits follow every 2
//     (1-cycle) or 3 (2-cycle) cycles, data and order are intact, and the
//     message leaves with ID-tag 0 although it entered with ID-tag 5;
//  2. two messages entering West and Local, both to East: the arbiter
//     interleaves them flit by flit, they get different ID-tags, and every
//     flit of each arrives in order;
//  3. the same traffic with the East full flag held high for 30 cycles: no
//     flit leaves while it is high and nothing is lost;
//  4. turns South->North and North->Local.
module tb_noc_router;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  flit_t         in_flit  [2][NP];
  logic [NP-1:0] in_ew    [2];
  logic [NP-1:0] in_ff    [2];
  flit_t         out_flit [2][NP];
  logic [NP-1:0] out_ew   [2];
  logic [NP-1:0] out_ff   [2];

  noc_router #(.CTRL_PIPE(1), .MY_X(4'd1), .MY_Y(4'd1)) u_r1 (
    .clk, .rst_n, .in_flit(in_flit[0]), .in_ew(in_ew[0]), .in_ff(in_ff[0]),
    .out_flit(out_flit[0]), .out_ew(out_ew[0]), .out_ff(out_ff[0]));
  noc_router #(.CTRL_PIPE(2), .MY_X(4'd1), .MY_Y(4'd1)) u_r2 (
    .clk, .rst_n, .in_flit(in_flit[1]), .in_ew(in_ew[1]), .in_ff(in_ff[1]),
    .out_flit(out_flit[1]), .out_ew(out_ew[1]), .out_ff(out_ff[1]));

  // ---- stimulus: per input port a list of flits, sent as the full flag allows
  flit_t       src   [NP][$];
  longint      sent_cycle [NP][$];
  int          v;     // variant under test

  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (rst_n && src[p].size() > 0 && !in_ff[v][p]) begin
        in_flit[v][p] <= src[p].pop_front();
        in_ew[v][p]   <= 1'b1;
        sent_cycle[p].push_back(cyc + 1);
      end else begin
        in_ew[v][p] <= 1'b0;
      end
    end
  end

  // ---- monitor: per output port, record flits and cycles
  flit_t  got       [NP][$];
  longint got_cycle [NP][$];
  int     ff_violation = 0;
  always @(posedge clk) begin
    for (int o = 0; o < NP; o++) if (out_ew[v][o]) begin
      got[o].push_back(out_flit[v][o]);
      got_cycle[o].push_back(cyc);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL (variant %0d): %s", v, what);
    end
  endtask

  function automatic flit_t hdr(int xt, int yt, int id, int tag);
    return make_header(4'd0, 4'd0, 4'(xt), 4'(yt), 4'(id), 8'(tag));
  endfunction

  function automatic flit_t pay(int id, int tag, int s, bit last);
    flit_t f;
    f.ftype = last ? FT_TAIL : FT_BODY;
    f.id    = 4'(id);
    f.data  = {8'(tag), 24'(s)};
    return f;
  endfunction

  task automatic queue_msg(int p, int xt, int yt, int id, int tag, int n);
    src[p].push_back(hdr(xt, yt, id, tag));
    for (int s = 1; s < n; s++) src[p].push_back(pay(id, tag, s, s == n - 1));
  endtask

  // Splits the flits seen on output o into messages by ID-tag and checks each:
  // returns the number of complete, in-order messages; tags seen go to 'tags'.
  function automatic int check_output(int o, int n, ref int tags[$], ref int ids[$]);
    int ok = 0;
    int tag_of [16];
    int seq_of [16];
    bit open_of[16];
    for (int i = 0; i < 16; i++) open_of[i] = 0;
    foreach (got[o][k]) begin
      flit_t f = got[o][k];
      if (f.ftype == FT_HEAD) begin
        open_of[f.id] = 1; tag_of[f.id] = int'(f.data[7:0]); seq_of[f.id] = 1;
        tags.push_back(tag_of[f.id]); ids.push_back(int'(f.id));
      end else if (open_of[f.id] && f.data == {8'(tag_of[f.id]), 24'(seq_of[f.id])}) begin
        seq_of[f.id]++;
        if (f.ftype == FT_TAIL) begin
          open_of[f.id] = 0;
          if (seq_of[f.id] == n) ok++;
        end
      end else begin
        $display("  bad flit on output %0d: %h", o, f);
      end
    end
    return ok;
  endfunction

  task automatic clear();
    for (int p = 0; p < NP; p++) begin
      got[p].delete(); got_cycle[p].delete(); sent_cycle[p].delete();
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int tags[$], ids[$];
    for (int w = 0; w < 2; w++) begin
      in_ew[w] = '0; out_ff[w] = '0;
      for (int p = 0; p < NP; p++) in_flit[w][p] = '0;
    end
    for (v = 0; v < 2; v++) begin
      rst_n = 1'b0;
      repeat (3) @(posedge clk);
      rst_n = 1'b1;
      @(posedge clk);

      // 1. single message West -> East, latency and spacing
      clear();
      queue_msg(P_W, 3, 1, 5, 8'h11, 8);
      repeat (60) @(posedge clk);
      check(got[P_E].size() == 8, $sformatf("test1: 8 flits out East (got %0d)", got[P_E].size()));
      if (got[P_E].size() == 8) begin
        check(got_cycle[P_E][0] - sent_cycle[P_W][0] == 4,
              $sformatf("test1: header latency 4 cycles (got %0d)", got_cycle[P_E][0] - sent_cycle[P_W][0]));
        for (int k = 2; k < 8; k++)
          check(got_cycle[P_E][k] - got_cycle[P_E][k-1] == (v == 0 ? 2 : 3),
                $sformatf("test1: flit %0d spacing %0d", k, got_cycle[P_E][k] - got_cycle[P_E][k-1]));
        tags.delete(); ids.delete();
        check(check_output(P_E, 8, tags, ids) == 1, "test1: message intact");
        check(ids.size() == 1 && ids[0] == 0, "test1: ID-tag 5 rewritten to slot 0");
      end

      // 2. West and Local both to East: interleaved, distinct IDs
      clear();
      queue_msg(P_W, 3, 2, 0, 8'h21, 10);
      queue_msg(P_L, 2, 1, 0, 8'h22, 10);
      repeat (120) @(posedge clk);
      tags.delete(); ids.delete();
      check(check_output(P_E, 10, tags, ids) == 2, "test2: both messages intact");
      check(ids.size() == 2 && ids[0] != ids[1], "test2: distinct ID-tags on the link");
      begin
        int changes = 0;
        for (int k = 1; k < got[P_E].size(); k++) if (got[P_E][k].id != got[P_E][k-1].id) changes++;
        check(changes >= 10, $sformatf("test2: flit-by-flit interleaving (%0d switches)", changes));
      end

      // 3. back-pressure from East
      clear();
      out_ff[v][P_E] = 1'b1;
      queue_msg(P_W, 3, 1, 2, 8'h31, 6);
      queue_msg(P_L, 3, 0, 1, 8'h32, 6);
      repeat (30) @(posedge clk);
      check(got[P_E].size() == 0, "test3: nothing leaves while East is full");
      out_ff[v][P_E] = 1'b0;
      repeat (80) @(posedge clk);
      tags.delete(); ids.delete();
      check(check_output(P_E, 6, tags, ids) == 2, "test3: both messages intact after the stall");

      // 4. turns: South -> North, North -> Local
      clear();
      queue_msg(P_S, 1, 3, 3, 8'h41, 5);
      queue_msg(P_N, 1, 1, 7, 8'h42, 5);
      repeat (60) @(posedge clk);
      tags.delete(); ids.delete();
      check(check_output(P_N, 5, tags, ids) == 1 && tags[0] == 8'h41, "test4: South->North");
      tags.delete(); ids.delete();
      check(check_output(P_L, 5, tags, ids) == 1 && tags[0] == 8'h42, "test4: North->Local");
      check(got[P_E].size() == 0 && got[P_W].size() == 0 && got[P_S].size() == 0,
            "test4: no stray flits");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
