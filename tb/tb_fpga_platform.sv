// tb_fpga_platform: self-checking test of one FPGA's platform holding the whole
// 4x3 mesh (no partition, the single-FPGA case).
//
// Every node sends 10 packets of 15 flits at 30 % injection rate to the node
// mirrored through the centre of the mesh, (3-x, 2-y), so that all four directions
// of the mesh and every switch carry traffic. Checks: every node receives exactly
// 10 packets, none wrong, all from its mirror node (from the trace records), with
// no inter-FPGA crossing counted; every generator reports done. The average
// latency is printed.
module tb_fpga_platform;
  import noc_pkg::*;

  localparam int NN = 12;

  logic       clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic       link_clk [1];
  link_word_t link_tx_word [1], link_rx_word [1];
  logic       link_tx_valid [1], link_tx_ready [1], link_rx_valid [1], link_rx_ready [1];
  logic [7:0] bad_chan [1];
  tg_cfg_t    cfg [NN];
  tr_stats_t  stats [NN];
  logic       tg_done [NN];
  logic [15:0] tg_sent [NN];
  logic [5:0] trace_addr = '0;
  trace_t     trace_data [NN];
  logic [6:0] trace_count [NN];
  logic       trace_overflow [NN];
  flit_t      now;

  int checks = 0, failures = 0;

  fpga_platform #(.X_LO(0), .X_CNT(4), .N_PL(0), .BOUND_X(0)) dut (
    .clk, .rst_n, .link_clk, .link_rst_n(rst_n),
    .link_tx_word, .link_tx_valid, .link_tx_ready, .link_rx_word, .link_rx_valid, .link_rx_ready,
    .bad_chan, .clear, .cfg, .stats, .tg_done, .tg_sent, .trace_addr, .trace_data, .trace_count,
    .trace_overflow, .now
  );

  always #5 clk = ~clk;
  assign link_clk[0] = clk;
  assign link_tx_ready[0] = 1'b1;
  assign link_rx_word[0] = '0;
  assign link_rx_valid[0] = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    longint lsum = 0, psum = 0;
    for (int n = 0; n < NN; n++) begin
      cfg[n] = '0;
      cfg[n].rate = 7'd30;
      cfg[n].npkts = 16'd10;
      cfg[n].dest = make_addr(3 - n % 4, 2 - n / 4);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < NN; n++) cfg[n].start = 1'b1;
    for (int n = 0; n < NN; n++) wait (tg_done[n]);
    repeat (300) @(posedge clk);
    for (int n = 0; n < NN; n++) begin
      check(tg_sent[n] == 10, $sformatf("node %0d sent %0d", n, tg_sent[n]));
      check(stats[n].pkts == 10 && stats[n].errors == 0,
            $sformatf("node %0d received %0d, %0d wrong", n, stats[n].pkts, stats[n].errors));
      check(stats[n].flits == 150, $sformatf("node %0d flits %0d", n, stats[n].flits));
      check(stats[n].lat_comp_sum == stats[n].lat_sum, "no crossing overhead in a single FPGA");
      check(stats[n].lat_min >= 16'd17, $sformatf("node %0d minimum latency %0d", n, stats[n].lat_min));
      check(int'(trace_count[n]) == 10 && !trace_overflow[n], "trace count");
      lsum += stats[n].lat_sum;
      psum += stats[n].pkts;
    end
    for (int a = 0; a < 10; a++) begin
      trace_addr = 6'(a);
      #1;
      for (int n = 0; n < NN; n++)
        check(trace_data[n].src == make_addr(3 - n % 4, 2 - n / 4) && trace_data[n].ncross == 0 &&
              trace_data[n].seq == 8'(a), $sformatf("node %0d record %0d", n, a));
    end
    $display("single FPGA, 30%%: average latency %0d cycles over %0d packets", lsum / psum, psum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
