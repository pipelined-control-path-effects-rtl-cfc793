// tb_transpose_driver: runs the transpose workload on a 4x4 mesh and checks it.
//
// Drives the clock and reset of the mesh it is connected to and places a tile
// model at every node. For each workload size N in 250, 500, 1000, ..., 4000
// flits per producer, the six transpose pairs (1,0)->(0,1), (2,0)->(0,2),
// (3,0)->(0,3), (2,1)->(1,2), (3,1)->(1,3) and (3,2)->(2,3) each send one
// message of N flits at the same time. Every message must arrive complete and
// in order. The latency of the last flit and the rate N/latency are printed
// per pair. Rates are held against the published per-pair rates for the
// selected control path (within 10%) for the pairs whose sharing does not
// depend on the arbitration order: pair 6 (alone), pairs 1, 4 and 5 (one
// competitor). Pairs 2 and 3 only have to be slower than pair 6.
module tb_transpose_driver
  import noc_pkg::*;
#(
  parameter int unsigned CTRL_PIPE = 1
) (
  output logic         clk,
  output logic         rst_n,
  output flit_t        inj_flit [16],
  output logic [15:0]  inj_ew,
  input  logic [15:0]  inj_ff,
  input  flit_t        ej_flit  [16],
  input  logic [15:0]  ej_ew,
  output logic [15:0]  ej_ff,
  output logic         done,
  output int           checks,
  output int           failures
);

  localparam int unsigned NX = 4, NN = 16;
  localparam int unsigned NW = 9;
  int unsigned sizes [NW] = '{250, 500, 1000, 1500, 2000, 2500, 3000, 3500, 4000};
  // published rates in flits per cycle (2-cycle, 1-cycle control path)
  real pub2 [6] = '{0.166, 0.166, 0.111, 0.166, 0.166, 0.332};
  real pub1 [6] = '{0.259, 0.249, 0.166, 0.247, 0.249, 0.497};

  int unsigned cx [6] = '{1, 2, 3, 2, 3, 3};
  int unsigned cy [6] = '{0, 0, 0, 1, 1, 2};

  logic        start   [NN];
  logic [3:0]  dst_x   [NN], dst_y [NN];
  int unsigned nflits  [NN];
  logic [7:0]  tagb    [NN];
  logic        tx_done [NN];
  longint      tx_first[NN], rx_last[NN];
  int unsigned rx_flits[NN], rx_msgs[NN], rx_err[NN];

  initial clk = 1'b0;
  always #1 clk = ~clk;

  for (genvar n = 0; n < NN; n++) begin : g_t
    tb_tile_model u_t (
      .clk, .rst_n, .my_x(4'(n % NX)), .my_y(4'(n / NX)),
      .start(start[n]), .dst_x(dst_x[n]), .dst_y(dst_y[n]),
      .nflits(nflits[n]), .nmsg(1), .tag_base(tagb[n]),
      .tx_done(tx_done[n]), .tx_first_cycle(tx_first[n]),
      .stall(1'b0), .rx_flits(rx_flits[n]), .rx_msgs(rx_msgs[n]),
      .rx_errors(rx_err[n]), .rx_last_cycle(rx_last[n]),
      .inj_flit(inj_flit[n]), .inj_ew(inj_ew[n]), .inj_ff(inj_ff[n]),
      .ej_flit(ej_flit[n]), .ej_ew(ej_ew[n]), .ej_ff(ej_ff[n])
    );
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : main
    int s, d;
    bit all_in;
    int unsigned msgs0 [6], flits0 [6];
    real rate [6], pub;
    done = 1'b0; checks = 0; failures = 0; rst_n = 1'b0;
    for (int n = 0; n < NN; n++) begin
      start[n] = 1'b0; dst_x[n] = '0; dst_y[n] = '0; nflits[n] = 2; tagb[n] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    for (int w = 0; w < NW; w++) begin
      for (int c = 0; c < 6; c++) begin
        s = cy[c] * NX + cx[c];
        d = cx[c] * NX + cy[c];
        msgs0[c] = rx_msgs[d]; flits0[c] = rx_flits[d];
        dst_x[s] = 4'(cy[c]); dst_y[s] = 4'(cx[c]);
        nflits[s] = sizes[w]; tagb[s] = 8'(16 * (c + 1) + w);
        start[s] = 1'b1;
      end
      do begin
        @(posedge clk);
        all_in = 1;
        for (int c = 0; c < 6; c++) if (rx_msgs[cx[c] * NX + cy[c]] == msgs0[c]) all_in = 0;
      end while (!all_in);
      repeat (4) @(posedge clk);
      for (int c = 0; c < 6; c++) begin
        s = cy[c] * NX + cx[c];
        d = cx[c] * NX + cy[c];
        check(rx_msgs[d] == msgs0[c] + 1, $sformatf("N=%0d comm%0d one message", sizes[w], c + 1));
        check(rx_flits[d] - flits0[c] == sizes[w], $sformatf("N=%0d comm%0d all flits", sizes[w], c + 1));
        check(rx_err[d] == 0, $sformatf("N=%0d comm%0d integrity", sizes[w], c + 1));
        rate[c] = real'(sizes[w]) / real'(rx_last[d] - tx_first[s]);
        pub = (CTRL_PIPE == 1) ? pub1[c] : pub2[c];
        $display("CTRL_PIPE=%0d N=%4d comm %0d: latency %6d cycles, %0.3f fpc (published %0.3f)",
                 CTRL_PIPE, sizes[w], c + 1, rx_last[d] - tx_first[s], rate[c], pub);
        if (c == 0 || c >= 3)
          check(rate[c] > 0.9 * pub && rate[c] < 1.1 * pub,
                $sformatf("N=%0d comm%0d rate within 10%% of published", sizes[w], c + 1));
      end
      check(rate[1] < rate[5] && rate[2] < rate[5], $sformatf("N=%0d comms 2,3 slower than comm 6", sizes[w]));
      for (int n = 0; n < NN; n++) start[n] = 1'b0;
      repeat (4) @(posedge clk);
    end
    done = 1'b1;
  end

endmodule
