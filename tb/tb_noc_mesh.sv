// tb_noc_mesh: end-to-end test of the 4x4 mesh, both router control paths.
//
// Two meshes run side by side: one at the defaults (1-cycle control path) and
// one with CTRL_PIPE=2. Phase 1 runs the transpose traffic pattern: the tile
// at (i,j) sends one message of NF flits to (j,i) for the six pairs below the
// diagonal, which share links in groups of three, two and one. Each acceptor
// checks that its message arrives complete and in order; the rate NF/latency
// of the uncontended pair (3,2)->(2,3) must be close to one flit per 2 cycles
// (1-cycle router) and one per 3 cycles (2-cycle router).
//
// Phase 2 (default mesh) drives the ID slot table of one link to exhaustion:
// tile (3,0) interleaves 16 messages to (0,0) while tile (2,0) sends one more,
// so 17 messages compete for the 16 ID-tags of the links towards (0,0), and
// (0,0) stalls its ejection link at random. All 17 must arrive intact.
//
// Phase 3 (default mesh) loads all five ports of router (1,1) at once with the
// connections East->West, North->South, West->North, South->Local and
// Local->East, so that the router switches five flits in the same cycle.
//
// Mechanism counters (default mesh): arbitration contention, grants withheld
// by a full flag, headers held back for lack of an ID slot, ID-tags rewritten
// to a non-zero slot, interleaving of messages on one link, cycles with all
// five outputs of router (1,1) busy. Each must occur.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int unsigned NX = 4, NY = 4, NN = NX * NY;
  localparam int unsigned NF = 60;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- two meshes and their tiles ----------------
  flit_t        inj_flit [2][NN];
  logic [NN-1:0] inj_ew [2], inj_ff [2], ej_ew [2], ej_ff [2];
  flit_t        ej_flit  [2][NN];

  logic        start   [2][NN];
  logic [3:0]  dst_x   [2][NN], dst_y [2][NN];
  int unsigned nflits  [2][NN], nmsg [2][NN];
  logic [7:0]  tagb    [2][NN];
  logic        stall   [2][NN];
  logic        tx_done [2][NN];
  longint      tx_first[2][NN], rx_last[2][NN];
  int unsigned rx_flits[2][NN], rx_msgs[2][NN], rx_err[2][NN];

  noc_mesh m1 (
    .clk, .rst_n,
    .inj_flit(inj_flit[0]), .inj_ew(inj_ew[0]), .inj_ff(inj_ff[0]),
    .ej_flit(ej_flit[0]),   .ej_ew(ej_ew[0]),   .ej_ff(ej_ff[0])
  );

  noc_mesh #(.CTRL_PIPE(2)) m2 (
    .clk, .rst_n,
    .inj_flit(inj_flit[1]), .inj_ew(inj_ew[1]), .inj_ff(inj_ff[1]),
    .ej_flit(ej_flit[1]),   .ej_ew(ej_ew[1]),   .ej_ff(ej_ff[1])
  );

  for (genvar v = 0; v < 2; v++) begin : g_v
    for (genvar n = 0; n < NN; n++) begin : g_t
      tb_tile_model u_t (
        .clk, .rst_n, .my_x(4'(n % NX)), .my_y(4'(n / NX)),
        .start(start[v][n]), .dst_x(dst_x[v][n]), .dst_y(dst_y[v][n]),
        .nflits(nflits[v][n]), .nmsg(nmsg[v][n]), .tag_base(tagb[v][n]),
        .tx_done(tx_done[v][n]), .tx_first_cycle(tx_first[v][n]),
        .stall(stall[v][n]), .rx_flits(rx_flits[v][n]), .rx_msgs(rx_msgs[v][n]),
        .rx_errors(rx_err[v][n]), .rx_last_cycle(rx_last[v][n]),
        .inj_flit(inj_flit[v][n]), .inj_ew(inj_ew[v][n]), .inj_ff(inj_ff[v][n]),
        .ej_flit(ej_flit[v][n]), .ej_ew(ej_ew[v][n]), .ej_ff(ej_ff[v][n])
      );
    end
  end

  // ---------------- mechanism probes on the default mesh ----------------
  logic [NN*NP-1:0] p_contend, p_ffstall, p_slotblk, p_newid;
  for (genvar y = 0; y < NY; y++) begin : g_py
    for (genvar x = 0; x < NX; x++) begin : g_px
      for (genvar o = 0; o < NP; o++) begin : g_po
        localparam int unsigned K = (y * NX + x) * NP + o;
        assign p_contend[K] = $countones(m1.g_y[y].g_x[x].u_r.g_out[o].u_a.req
                                         & CONN[o]) > 1;
        assign p_ffstall[K] = |m1.g_y[y].g_x[x].u_r.g_out[o].u_a.req
                              && m1.g_y[y].g_x[x].u_r.g_out[o].u_a.ff;
        assign p_slotblk[K] = |(m1.g_y[y].g_x[x].u_r.g_out[o].u_a.req
                                & m1.g_y[y].g_x[x].u_r.g_out[o].u_a.blk);
        assign p_newid[K]   = m1.g_y[y].g_x[x].u_r.out_ew[o]
                              && m1.g_y[y].g_x[x].u_r.out_flit[o].id != 4'd0;
      end
    end
  end

  int n_contend = 0, n_ffstall = 0, n_slotblk = 0, n_newid = 0, n_interleave = 0, n_five = 0;
  logic [3:0] last_id_l00 = '0;
  always @(posedge clk) if (rst_n) begin
    n_contend <= n_contend + $countones(p_contend);
    n_ffstall <= n_ffstall + $countones(p_ffstall);
    n_slotblk <= n_slotblk + $countones(p_slotblk);
    n_newid   <= n_newid   + $countones(p_newid);
    if (m1.g_y[1].g_x[1].u_r.out_ew == 5'b11111) n_five <= n_five + 1;
    // link from (1,0) into (0,0): West output of router (1,0)
    if (m1.g_y[0].g_x[1].u_r.out_ew[P_W]) begin
      if (m1.g_y[0].g_x[1].u_r.out_flit[P_W].id != last_id_l00) n_interleave <= n_interleave + 1;
      last_id_l00 <= m1.g_y[0].g_x[1].u_r.out_flit[P_W].id;
    end
  end

  // ---------------- helpers ----------------
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic clear_all();
    for (int v = 0; v < 2; v++)
      for (int n = 0; n < NN; n++) begin
        start[v][n] = 1'b0; dst_x[v][n] = '0; dst_y[v][n] = '0;
        nflits[v][n] = 2; nmsg[v][n] = 1; tagb[v][n] = '0; stall[v][n] = 1'b0;
      end
  endtask

  // transpose pairs: sender (x,y) -> (y,x)
  int unsigned cx [6] = '{1, 2, 3, 2, 3, 3};
  int unsigned cy [6] = '{0, 0, 0, 1, 1, 2};

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real rate [2][6];

  initial begin : main
    int s, d;
    bit all_in;
    clear_all();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---- phase 1: transpose traffic on both meshes ----
    for (int v = 0; v < 2; v++)
      for (int c = 0; c < 6; c++) begin
        s = cy[c] * NX + cx[c];
        dst_x[v][s] = 4'(cy[c]); dst_y[v][s] = 4'(cx[c]);
        nflits[v][s] = NF; nmsg[v][s] = 1; tagb[v][s] = 8'(16 * (c + 1));
        start[v][s] = 1'b1;
      end
    do begin
      @(posedge clk);
      all_in = 1;
      for (int v = 0; v < 2; v++)
        for (int c = 0; c < 6; c++) begin
          d = cx[c] * NX + cy[c];
          if (rx_msgs[v][d] < 1) all_in = 0;
        end
    end while (!all_in);
    repeat (5) @(posedge clk);

    for (int v = 0; v < 2; v++)
      for (int c = 0; c < 6; c++) begin
        s = cy[c] * NX + cx[c];
        d = cx[c] * NX + cy[c];
        check(rx_msgs[v][d] == 1, $sformatf("mesh%0d comm%0d message count", v + 1, c + 1));
        check(rx_flits[v][d] == NF, $sformatf("mesh%0d comm%0d flit count %0d", v + 1, c + 1, rx_flits[v][d]));
        check(rx_err[v][d] == 0, $sformatf("mesh%0d comm%0d integrity", v + 1, c + 1));
        rate[v][c] = real'(NF) / real'(rx_last[v][d] - tx_first[v][s]);
        $display("CTRL_PIPE=%0d comm %0d (%0d,%0d)->(%0d,%0d): last flit after %0d cycles, %0.3f fpc",
                 v + 1, c + 1, cx[c], cy[c], cy[c], cx[c], rx_last[v][d] - tx_first[v][s], rate[v][c]);
      end
    check(rate[0][5] > 0.45 && rate[0][5] <= 0.51, "1-cycle router: uncontended pair near 0.5 fpc");
    check(rate[1][5] > 0.30 && rate[1][5] <= 0.34, "2-cycle router: uncontended pair near 0.33 fpc");
    check(rate[0][5] / rate[1][5] > 1.4 && rate[0][5] / rate[1][5] < 1.6, "1-cycle router about 1.5x faster");
    for (int c = 0; c < 5; c++)
      check(rate[0][c] < rate[0][5] && rate[1][c] < rate[1][5],
            $sformatf("comm%0d slower than the uncontended pair", c + 1));

    // ---- phase 2: ID slot exhaustion with ejection stalls (default mesh) ----
    for (int v = 0; v < 2; v++) for (int n = 0; n < NN; n++) start[v][n] = 1'b0;
    @(posedge clk);
    begin
      int unsigned base_msgs;
      base_msgs = rx_msgs[0][0];
      dst_x[0][3] = 0; dst_y[0][3] = 0; nflits[0][3] = 12; nmsg[0][3] = 16; tagb[0][3] = 8'h40;
      dst_x[0][2] = 0; dst_y[0][2] = 0; nflits[0][2] = 12; nmsg[0][2] = 1;  tagb[0][2] = 8'hA0;
      start[0][3] = 1'b1;
      repeat (20) @(posedge clk);
      start[0][2] = 1'b1;
      while (rx_msgs[0][0] < base_msgs + 17) begin
        @(posedge clk);
        stall[0][0] = ($urandom_range(0, 3) == 0);
      end
      stall[0][0] = 1'b0;
      repeat (5) @(posedge clk);
      check(rx_msgs[0][0] == base_msgs + 17, "slot exhaustion: all 17 messages delivered");
      check(rx_err[0][0] == 0, "slot exhaustion: integrity at (0,0)");
    end

    // ---- phase 3: five simultaneous connections through router (1,1) ----
    for (int n = 0; n < NN; n++) start[0][n] = 1'b0;
    @(posedge clk);
    begin
      // sender node, destination x, y
      int unsigned fs [5] = '{1*NX+2, 2*NX+1, 1*NX+0, 0*NX+1, 1*NX+1};
      int unsigned fx [5] = '{0, 1, 1, 1, 2};
      int unsigned fy [5] = '{1, 0, 2, 1, 1};
      int unsigned base [5];
      bit all_done;
      for (int k = 0; k < 5; k++) base[k] = rx_msgs[0][fy[k] * NX + fx[k]];
      for (int k = 0; k < 5; k++) begin
        dst_x[0][fs[k]] = 4'(fx[k]); dst_y[0][fs[k]] = 4'(fy[k]);
        nflits[0][fs[k]] = 40; nmsg[0][fs[k]] = 1; tagb[0][fs[k]] = 8'(8'hC0 + k);
        start[0][fs[k]] = 1'b1;
      end
      do begin
        @(posedge clk);
        all_done = 1;
        for (int k = 0; k < 5; k++) if (rx_msgs[0][fy[k] * NX + fx[k]] == base[k]) all_done = 0;
      end while (!all_done);
      repeat (5) @(posedge clk);
      for (int k = 0; k < 5; k++) begin
        check(rx_msgs[0][fy[k] * NX + fx[k]] == base[k] + 1, $sformatf("five-way flow %0d delivered", k));
        check(rx_err[0][fy[k] * NX + fx[k]] == 0, $sformatf("five-way flow %0d integrity", k));
      end
    end

    $display("mechanisms: contention=%0d ff_stall=%0d slot_block=%0d id_rewrite=%0d interleave=%0d five_parallel=%0d",
             n_contend, n_ffstall, n_slotblk, n_newid, n_interleave, n_five);
    check(n_five > 0, "five simultaneous crossbar connections happened");
    check(n_contend > 0, "arbitration contention happened");
    check(n_ffstall > 0, "full-flag stall happened");
    check(n_slotblk > 0, "header held for lack of ID slot happened");
    check(n_newid > 0, "ID-tag rewrite to non-zero slot happened");
    check(n_interleave > 0, "message interleaving on a link happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
