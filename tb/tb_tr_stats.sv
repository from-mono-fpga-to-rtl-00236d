// tb_tr_stats: self-checking test of the statistics traffic receptor at (2,1).
//
// Packets with known creation times are delivered; the expected latency of each is
// the time base at its last flit minus its creation time. Checks the packet, flit
// and error counts, the latency sum, minimum and maximum, and the latency sum with
// the crossing overhead (24 + 2*2 + 3*15 = 73 cycles per crossing for 15-flit
// packets) removed, then that clear empties everything. A second phase sends 60
// packets of random length (6..16 flits), age and crossing count (0..2) and checks
// after each one the change of every total, with 28 + 3*n cycles removed per
// crossing of an n-flit packet and the result floored at zero; a 5-flit packet
// (size below 4) must count as an error.
module tb_tr_stats;
  import noc_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0, clear = 1'b0, rx;
  flit_t     data_in, now;
  tr_stats_t stats;

  int checks = 0, failures = 0;

  tr_stats #(.XADDR(2), .YADDR(1)) dut (.*);
  tr_pkt_driver u_drv (.clk, .now, .rx, .data(data_in));

  always #5 clk = ~clk;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) now <= 16'd1000; else now <= now + 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    flit_t ts, tl;
    longint sum = 0, csum = 0, mn = 65535, mx = 0, lat, c;
    int ages [5] = '{10, 200, 80, 500, 30};
    int cr   [5] = '{0, 1, 1, 0, 1};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 5; i++) begin
      u_drv.send(make_addr(2, 1), make_addr(0, i % 3), ages[i], 40, cr[i], i, 15, 0, ts, tl);
      lat = longint'(flit_t'(tl - ts));
      c   = lat - cr[i] * 73;
      if (c < 0) c = 0;
      sum += lat; csum += c;
      if (lat < mn) mn = lat;
      if (lat > mx) mx = lat;
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    u_drv.send(make_addr(2, 1), make_addr(0, 0), 5, 40, 0, 9, 15, 1, ts, tl);   // wrong target
    u_drv.send(make_addr(2, 1), make_addr(0, 0), 5, 40, 0, 10, 15, 2, ts, tl);  // bad filler
    repeat (3) @(posedge clk);
    check(stats.pkts == 5, $sformatf("pkts %0d", stats.pkts));
    check(stats.flits == 75, $sformatf("flits %0d", stats.flits));
    check(stats.errors == 2, $sformatf("errors %0d", stats.errors));
    check(longint'(stats.lat_sum) == sum, $sformatf("lat_sum %0d, expected %0d", stats.lat_sum, sum));
    check(longint'(stats.lat_comp_sum) == csum, $sformatf("lat_comp_sum %0d, expected %0d", stats.lat_comp_sum, csum));
    check(longint'(stats.lat_min) == mn, $sformatf("lat_min %0d, expected %0d", stats.lat_min, mn));
    check(longint'(stats.lat_max) == mx, $sformatf("lat_max %0d, expected %0d", stats.lat_max, mx));
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    check(stats.pkts == 0 && stats.lat_sum == 0 && stats.errors == 0 && stats.lat_min == 16'hFFFF, "clear");

    // per-packet totals with random lengths and crossings
    for (int i = 0; i < 60; i++) begin
      tr_stats_t prev;
      int pf, nc, age;
      pf  = $urandom_range(6, 16);
      nc  = $urandom_range(0, 2);
      age = $urandom_range(0, 400);
      prev = stats;
      u_drv.send(make_addr(2, 1), make_addr(3, 0), age, 70, nc, i, pf, 0, ts, tl);
      repeat (2) @(posedge clk);
      #1;
      lat = longint'(flit_t'(tl - ts));
      c   = lat - nc * (28 + 3 * pf);
      if (c < 0) c = 0;
      check(stats.pkts == prev.pkts + 1 && stats.flits == prev.flits + 32'(pf) &&
            stats.errors == prev.errors,
            $sformatf("packet %0d (%0d flits): counts", i, pf));
      check(longint'(stats.lat_sum - prev.lat_sum) == lat,
            $sformatf("packet %0d: latency %0d, expected %0d", i, stats.lat_sum - prev.lat_sum, lat));
      check(longint'(stats.lat_comp_sum - prev.lat_comp_sum) == c,
            $sformatf("packet %0d (%0d flits, %0d crossings): without crossing %0d, expected %0d", i, pf,
                      nc, stats.lat_comp_sum - prev.lat_comp_sum, c));
    end
    begin
      tr_stats_t prev;
      prev = stats;
      u_drv.send(make_addr(2, 1), make_addr(3, 0), 5, 70, 0, 99, 5, 0, ts, tl);   // size 3: too short
      repeat (3) @(posedge clk);
      check(stats.errors == prev.errors + 1 && stats.pkts == prev.pkts, "short packet is an error");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
