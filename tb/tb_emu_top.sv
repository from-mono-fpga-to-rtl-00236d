// tb_emu_top: end-to-end test of both multi-FPGA platforms at their default sizes.
//
// Each physical link is closed by a link model per direction (24 cycles per frame
// plus one per word). For comparison, a single-FPGA platform holding the whole mesh
// runs the same traffic alongside. Every node sends to its mirror node (3-x, 2-y),
// so every packet of the two multi-FPGA platforms crosses the partition.
//   Run A: ten constant-rate runs, 10 % to 100 % injection, 50 packets of 15 flits
//          per node each.
//   Run B: one run with the injection swept from 10 % to 100 % in 10 % steps, 50
//          packets per step.
//   Run C: 20 % injection with random intervals between packets, 50 packets.
// Checks: every node of every platform receives all packets, none wrong, and the
// generators finish; packets of the multi-FPGA platforms are counted as crossing
// once, so their overhead-free latency is below their raw latency; at every rate
// the single FPGA is faster than version 1 and version 1 not slower than version 2;
// latency at 100 % exceeds latency at 10 %; the shared link
// of version 2 carries frames of all three inter-FPGA links; and each mechanism
// below happens at least once: adaptor1 frames, adaptor2 channel changes,
// back-pressure from a full FIFO-Out onto its switch, packets waiting at their
// source, rate steps of the sweep, random intervals, trace memory overflow. Average latencies per
// injection rate are printed for the three platforms.
module tb_emu_top;
  import noc_pkg::*;

  localparam int NN = 6;
  localparam int NPK = 50;

  logic clk = 1'b0, lclk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [5:0] trace_addr = '0;

  logic       v1_link_clk [2][3];
  link_word_t v1_tx_word [2][3], v1_rx_word [2][3];
  logic       v1_tx_valid [2][3], v1_tx_ready [2][3], v1_rx_valid [2][3], v1_rx_ready [2][3];
  tg_cfg_t    v1_cfg [2][NN];
  tr_stats_t  v1_stats [2][NN];
  logic       v1_tg_done [2][NN];
  logic [15:0] v1_tg_sent [2][NN];
  trace_t     v1_trace [2][NN];
  logic [6:0] v1_trace_count [2][NN];
  logic       v1_trace_ovf [2][NN];

  logic       v2_link_clk [2][1];
  link_word_t v2_tx_word [2][1], v2_rx_word [2][1];
  logic       v2_tx_valid [2][1], v2_tx_ready [2][1], v2_rx_valid [2][1], v2_rx_ready [2][1];
  logic [7:0] v2_bad_chan [2][1];
  tg_cfg_t    v2_cfg [2][NN];
  tr_stats_t  v2_stats [2][NN];
  logic       v2_tg_done [2][NN];
  logic [15:0] v2_tg_sent [2][NN];
  trace_t     v2_trace [2][NN];
  logic [6:0] v2_trace_count [2][NN];
  logic       v2_trace_ovf [2][NN];
  flit_t      now [2][2];

  int checks = 0, failures = 0;

  emu_top dut (.*, .link_rst_n(rst_n));

  // single-FPGA reference platform (whole mesh, no partition)
  logic       m_link_clk [1];
  link_word_t m_tx_word [1], m_rx_word [1];
  logic       m_tx_valid [1], m_tx_ready [1], m_rx_valid [1], m_rx_ready [1];
  logic [7:0] m_bad [1];
  tg_cfg_t    m_cfg [12];
  tr_stats_t  m_stats [12];
  logic       m_done [12];
  logic [15:0] m_sent [12];
  trace_t     m_trace [12];
  logic [6:0] m_tcount [12];
  logic       m_tovf [12];
  flit_t      m_now;
  assign m_link_clk[0] = lclk;
  assign m_tx_ready[0] = 1'b1;
  assign m_rx_word[0]  = '0;
  assign m_rx_valid[0] = 1'b0;

  fpga_platform #(.X_LO(0), .X_CNT(4), .N_PL(0), .BOUND_X(0)) u_mono (
    .clk, .rst_n, .link_clk(m_link_clk), .link_rst_n(rst_n),
    .link_tx_word(m_tx_word), .link_tx_valid(m_tx_valid), .link_tx_ready(m_tx_ready),
    .link_rx_word(m_rx_word), .link_rx_valid(m_rx_valid), .link_rx_ready(m_rx_ready),
    .bad_chan(m_bad), .clear, .cfg(m_cfg), .stats(m_stats), .tg_done(m_done), .tg_sent(m_sent),
    .trace_addr, .trace_data(m_trace), .trace_count(m_tcount), .trace_overflow(m_tovf), .now(m_now)
  );

  always #5 clk = ~clk;
  initial begin
    #3;
    forever #5 lclk = ~lclk;   // link user clocks: same rate, other phase
  end

  // link models
  for (genvar f = 0; f < 2; f++) begin : g_f
    for (genvar p = 0; p < 3; p++) begin : g_v1
      assign v1_link_clk[f][p] = lclk;
      aurora_link_model u_l (
        .clk(lclk), .rst_n,
        .tx_word(v1_tx_word[f][p]), .tx_valid(v1_tx_valid[f][p]), .tx_ready(v1_tx_ready[f][p]),
        .rx_word(v1_rx_word[1-f][p]), .rx_valid(v1_rx_valid[1-f][p]), .rx_ready(v1_rx_ready[1-f][p])
      );
    end
    assign v2_link_clk[f][0] = lclk;
    aurora_link_model u_l2 (
      .clk(lclk), .rst_n,
      .tx_word(v2_tx_word[f][0]), .tx_valid(v2_tx_valid[f][0]), .tx_ready(v2_tx_ready[f][0]),
      .rx_word(v2_rx_word[1-f][0]), .rx_valid(v2_rx_valid[1-f][0]), .rx_ready(v2_rx_ready[1-f][0])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int v1_frames = 0, v2_chan_changes = 0, fifo_backpressure = 0, src_wait = 0, sweep_top = 0;
  int random_gaps = 0;
  int v2_last_ch [2] = '{-1, -1};
  logic [2:0] v2_seen [2] = '{3'b000, 3'b000};
  always @(posedge lclk) begin
    for (int f = 0; f < 2; f++) begin
      for (int p = 0; p < 3; p++)
        if (v1_tx_valid[f][p] && v1_tx_ready[f][p] && v1_tx_word[f][p].eof) v1_frames++;
      if (v2_tx_valid[f][0] && v2_tx_ready[f][0] && v2_tx_word[f][0].eof) begin
        if (v2_last_ch[f] >= 0 && v2_last_ch[f] != int'(v2_tx_word[f][0].chan)) v2_chan_changes++;
        v2_last_ch[f] = int'(v2_tx_word[f][0].chan);
        v2_seen[f][v2_tx_word[f][0].chan[1:0]] = 1'b1;
      end
    end
  end

  // per-rate latency sums: [platform 0 mono, 1 v1, 2 v2][rate/10]
  longint lat_sum [3][11], lat_n [3][11], comp_sum [3][11];

  for (genvar y = 0; y < 3; y++) begin : g_my
    for (genvar x = 0; x < 4; x++) begin : g_mx
      always @(posedge clk)
        if (rst_n && u_mono.g_y[y].g_x[x].u_node.u_trs.done && !u_mono.g_y[y].g_x[x].u_node.u_trs.err) begin
          int r;
          r = int'(u_mono.g_y[y].g_x[x].u_node.u_trs.rec.rate) / 10;
          lat_sum[0][r] += longint'(u_mono.g_y[y].g_x[x].u_node.u_trs.lat);
          comp_sum[0][r] += longint'(u_mono.g_y[y].g_x[x].u_node.u_trs.comp);
          lat_n[0][r]++;
        end
    end
  end
  for (genvar f = 0; f < 2; f++) begin : g_pf
    for (genvar y = 0; y < 3; y++) begin : g_py
      // back-pressure from the FIFO-Out onto the boundary switch of row y
      always @(posedge clk) begin
        if (!dut.g_fpga[f].u_v1.b_cr_i[y] || !dut.g_fpga[f].u_v2.b_cr_i[y]) fifo_backpressure++;
      end
      for (genvar x = 0; x < 2; x++) begin : g_px
        always @(posedge clk) begin
          if (rst_n && dut.g_fpga[f].u_v1.g_y[y].g_x[x].u_node.u_trs.done &&
              !dut.g_fpga[f].u_v1.g_y[y].g_x[x].u_node.u_trs.err) begin
            int r;
            r = int'(dut.g_fpga[f].u_v1.g_y[y].g_x[x].u_node.u_trs.rec.rate) / 10;
            lat_sum[1][r] += longint'(dut.g_fpga[f].u_v1.g_y[y].g_x[x].u_node.u_trs.lat);
            comp_sum[1][r] += longint'(dut.g_fpga[f].u_v1.g_y[y].g_x[x].u_node.u_trs.comp);
            lat_n[1][r]++;
          end
          if (rst_n && dut.g_fpga[f].u_v2.g_y[y].g_x[x].u_node.u_trs.done &&
              !dut.g_fpga[f].u_v2.g_y[y].g_x[x].u_node.u_trs.err) begin
            int r;
            r = int'(dut.g_fpga[f].u_v2.g_y[y].g_x[x].u_node.u_trs.rec.rate) / 10;
            lat_sum[2][r] += longint'(dut.g_fpga[f].u_v2.g_y[y].g_x[x].u_node.u_trs.lat);
            comp_sum[2][r] += longint'(dut.g_fpga[f].u_v2.g_y[y].g_x[x].u_node.u_trs.comp);
            lat_n[2][r]++;
          end
          // a packet whose creation time has passed but which cannot start yet
          if (dut.g_fpga[f].u_v2.g_y[y].g_x[x].u_node.u_tg.st == 3'd3 &&
              !dut.g_fpga[f].u_v2.g_y[y].g_x[x].u_node.u_tg.credit_i) src_wait++;
          if (dut.g_fpga[f].u_v1.g_y[y].g_x[x].u_node.u_tg.cur_rate == 7'd100) sweep_top++;
          // a random interval that differs from the fixed period
          if (dut.g_fpga[f].u_v1.g_y[y].g_x[x].u_node.u_tg.gap !=
              dut.g_fpga[f].u_v1.g_y[y].g_x[x].u_node.u_tg.period) random_gaps++;
        end
      end
    end
  end

  logic stoch = 1'b0;

  task automatic start_all(input logic sweep, input int rate, input int npkts);
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < NN; n++) begin
        int x, y;
        x = 2 * f + n % 2;
        y = n / 2;
        v1_cfg[f][n] = '{start: 1'b0, sweep: sweep, stoch: stoch, rate: 7'(rate), dest: make_addr(3 - x, 2 - y),
                         npkts: 16'(npkts)};
        v2_cfg[f][n] = v1_cfg[f][n];
      end
    for (int n = 0; n < 12; n++)
      m_cfg[n] = '{start: 1'b0, sweep: sweep, stoch: stoch, rate: 7'(rate),
                   dest: make_addr(3 - n % 4, 2 - n / 4),
                   npkts: 16'(npkts)};
    @(posedge clk);
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < NN; n++) begin
        v1_cfg[f][n].start = 1'b1;
        v2_cfg[f][n].start = 1'b1;
      end
    for (int n = 0; n < 12; n++) m_cfg[n].start = 1'b1;
    repeat (2) @(posedge clk);
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < NN; n++) begin
        v1_cfg[f][n].start = 1'b0;
        v2_cfg[f][n].start = 1'b0;
      end
    for (int n = 0; n < 12; n++) m_cfg[n].start = 1'b0;
    repeat (2) @(posedge clk);
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < NN; n++) begin
        wait (v1_tg_done[f][n]);
        wait (v2_tg_done[f][n]);
      end
    for (int n = 0; n < 12; n++) wait (m_done[n]);
    repeat (2000) @(posedge clk);
  endtask

  task automatic check_run(input string name, input int expect_pkts);
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < NN; n++) begin
        check(v1_stats[f][n].pkts == 32'(expect_pkts) && v1_stats[f][n].errors == 0,
              $sformatf("%s v1 fpga %0d node %0d: %0d packets, %0d wrong", name, f, n,
                        v1_stats[f][n].pkts, v1_stats[f][n].errors));
        check(v2_stats[f][n].pkts == 32'(expect_pkts) && v2_stats[f][n].errors == 0,
              $sformatf("%s v2 fpga %0d node %0d: %0d packets, %0d wrong", name, f, n,
                        v2_stats[f][n].pkts, v2_stats[f][n].errors));
        check(v1_stats[f][n].flits == 32'(expect_pkts * 15), "v1 flit count");
        check(v1_stats[f][n].lat_comp_sum < v1_stats[f][n].lat_sum, "v1 overhead removed");
        check(v2_stats[f][n].lat_comp_sum < v2_stats[f][n].lat_sum, "v2 overhead removed");
        check(v1_stats[f][n].lat_min > 16'd73, "v1 crossing costs at least the link and FIFO time");
      end
    for (int n = 0; n < 12; n++)
      check(m_stats[n].pkts == 32'(expect_pkts) && m_stats[n].errors == 0,
            $sformatf("%s mono node %0d: %0d packets", name, n, m_stats[n].pkts));
  endtask

  task automatic report(input string name);
    $display("%s: injection rate, average latency in cycles (single FPGA | v1 raw, v1 without crossing | v2 raw, v2 without crossing)", name);
    for (int r = 1; r <= 10; r++)
      if (lat_n[1][r] > 0)
        $display("  %3d%%  %5d | %5d %5d | %5d %5d", r * 10,
                 lat_sum[0][r] / (lat_n[0][r] > 0 ? lat_n[0][r] : 1),
                 lat_sum[1][r] / lat_n[1][r], comp_sum[1][r] / lat_n[1][r],
                 lat_sum[2][r] / (lat_n[2][r] > 0 ? lat_n[2][r] : 1),
                 comp_sum[2][r] / (lat_n[2][r] > 0 ? lat_n[2][r] : 1));
  endtask

  task automatic clear_sums();
    for (int p = 0; p < 3; p++)
      for (int r = 0; r <= 10; r++) begin
        lat_sum[p][r] = 0; lat_n[p][r] = 0; comp_sum[p][r] = 0;
      end
  endtask

  initial begin
    clear_sums();
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < NN; n++) begin
        v1_cfg[f][n] = '0;
        v2_cfg[f][n] = '0;
      end
    for (int n = 0; n < 12; n++) m_cfg[n] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);

    // Run A: one constant-rate run per injection rate, 10 % .. 100 %
    for (int r = 1; r <= 10; r++) start_all(1'b0, 10 * r, NPK);
    check_run("constant rates", 10 * NPK);
    report("constant rate runs");
    for (int r = 1; r <= 10; r++)
      check(lat_n[1][r] == 12 * NPK && lat_n[2][r] == 12 * NPK && lat_n[0][r] == 12 * NPK,
            $sformatf("run at %0d%%: %0d/%0d/%0d packets", r * 10, lat_n[0][r], lat_n[1][r], lat_n[2][r]));
    check(v2_seen[0] == 3'b111 && v2_seen[1] == 3'b111, "v2 link carried all three inter-FPGA links");
    check(v2_bad_chan[0][0] == 0 && v2_bad_chan[1][0] == 0, "no bad channel on v2 link");
    // the platforms order as expected at every rate: single FPGA fastest, shared link slowest
    for (int r = 1; r <= 10; r++) begin
      check(lat_sum[0][r] < lat_sum[1][r], $sformatf("%0d%%: single FPGA faster than v1", 10 * r));
      check(lat_sum[1][r] <= lat_sum[2][r], $sformatf("%0d%%: v1 not slower than v2", 10 * r));
    end
    // saturation: latency at 100 % above latency at 10 %
    check(lat_sum[2][10] > lat_sum[2][1] && lat_sum[1][10] > lat_sum[1][1] && lat_sum[0][10] > lat_sum[0][1],
          "latency grows with load");

    // Run B: sweep 10 % .. 100 % within one run, totals keep counting
    clear_sums();
    start_all(1'b1, 0, NPK);
    check_run("after sweep", 20 * NPK);
    report("sweep");
    for (int r = 1; r <= 10; r++)
      check(lat_n[1][r] == 12 * NPK && lat_n[2][r] == 12 * NPK && lat_n[0][r] == 12 * NPK,
            $sformatf("sweep step %0d%%: %0d/%0d/%0d packets", r * 10, lat_n[0][r], lat_n[1][r], lat_n[2][r]));

    // Run C: random intervals at 20 % (below saturation for the single FPGA and
    // version 1)
    clear_sums();
    stoch = 1'b1;
    start_all(1'b0, 20, NPK);
    stoch = 1'b0;
    check_run("after random run", 21 * NPK);
    report("random intervals");
    check(lat_n[1][2] == 12 * NPK && lat_n[2][2] == 12 * NPK && lat_n[0][2] == 12 * NPK,
          $sformatf("random run: %0d/%0d/%0d packets", lat_n[0][2], lat_n[1][2], lat_n[2][2]));
    check(lat_sum[0][2] < lat_sum[1][2] && lat_sum[1][2] <= lat_sum[2][2], "random run: platforms in order");
    check(random_gaps > 0, $sformatf("random intervals: %0d cycles", random_gaps));

    // mechanisms
    check(v1_frames > 0, $sformatf("adaptor1 frames: %0d", v1_frames));
    check(v2_chan_changes > 0, $sformatf("adaptor2 channel changes: %0d", v2_chan_changes));
    check(fifo_backpressure > 0, $sformatf("FIFO-Out back-pressure cycles: %0d", fifo_backpressure));
    check(src_wait > 0, $sformatf("source wait cycles: %0d", src_wait));
    check(sweep_top > 0, "sweep reached 100%");
    check(v1_trace_ovf[0][0] && v2_trace_ovf[1][5] && int'(v1_trace_count[0][0]) == 64, "trace memory overflow");
    $display("mechanisms: adaptor1 frames %0d, adaptor2 channel changes %0d, FIFO-Out back-pressure %0d, source waits %0d, random intervals %0d",
             v1_frames, v2_chan_changes, fifo_backpressure, src_wait, random_gaps);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
