// tb_pkt_fifo: self-checking test of the dual-clock one-packet FIFO.
//
// The write side runs on a 10 ns clock, the read side on a 7 ns clock. Packets of
// 3 to 12 flits are written with random gaps and read with random stalls. Checks:
// every flit and end-of-packet mark comes out in order; the first flit of a packet
// is never offered before its last flit was written (store-and-forward); the delay
// from writing the last flit of a packet into an empty FIFO to the first flit
// being offered is two to three read clocks; a 20-flit packet, longer than the
// FIFO, still passes once the FIFO is full.
module tb_pkt_fifo;
  import noc_pkg::*;

  localparam int DEPTH = 16;

  logic  wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  logic  wr_en = 1'b0, wr_eop = 1'b0, wfull, rd_en = 1'b0, rvalid, rd_eop;
  flit_t wr_flit = '0, rd_flit;

  int checks = 0, failures = 0;
  int eop_written = 0, eop_read = 0;
  int long_pkt_started = 0;
  realtime t_last_eop;

  pkt_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5   wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Expected stream
  flit_t exp_f [$];
  logic  exp_e [$];
  logic  first_of_pkt = 1'b1;
  logic  long_mode = 1'b0;

  task automatic write_pkt(input int len, input int gap_max);
    for (int k = 0; k < len; k++) begin
      flit_t f;
      f = flit_t'($urandom);
      @(posedge wclk); #1;
      while (wfull) begin @(posedge wclk); #1; end
      wr_en = 1'b1; wr_flit = f; wr_eop = (k == len - 1);
      exp_f.push_back(f); exp_e.push_back(k == len - 1);
      @(posedge wclk); #1;
      if (k == len - 1) begin eop_written++; t_last_eop = $realtime; end
      wr_en = 1'b0;
      repeat ($urandom_range(0, gap_max)) @(posedge wclk);
    end
  endtask

  // Reader
  logic rd_random = 1'b1;
  always @(negedge rclk) rd_en <= rd_random ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge rclk) begin
    if (rrst_n && rvalid && rd_en) begin
      if (first_of_pkt && !long_mode)
        check(eop_written > eop_read, "packet offered before its last flit was written");
      check(exp_f.size() > 0, "read from an empty FIFO");
      if (exp_f.size() > 0) begin
        check(rd_flit == exp_f[0] && rd_eop == exp_e[0],
              $sformatf("flit %h/%0b, expected %h/%0b", rd_flit, rd_eop, exp_f[0], exp_e[0]));
        void'(exp_f.pop_front());
        void'(exp_e.pop_front());
      end
      first_of_pkt = rd_eop;
      if (rd_eop) eop_read++;
    end
  end

  initial begin
    realtime t0;
    repeat (3) @(posedge wclk);
    wrst_n = 1'b1; rrst_n = 1'b1;

    // control delay of one packet through an idle FIFO, reader always ready
    rd_random = 1'b0;
    write_pkt(4, 0);
    t0 = t_last_eop;
    wait (rvalid);
    check(($realtime - t0) >= 7.0 && ($realtime - t0) <= 4 * 7.0,
          $sformatf("control delay %0t", $realtime - t0));
    wait (exp_f.size() == 0);
    rd_random = 1'b1;

    // random packets
    for (int n = 0; n < 60; n++) write_pkt($urandom_range(3, 12), 2);
    wait (exp_f.size() == 0);

    // packet longer than the FIFO: must pass cut-through once the FIFO is full
    long_mode = 1'b1;
    write_pkt(20, 0);
    wait (exp_f.size() == 0);
    repeat (10) @(posedge rclk);
    check(eop_read == eop_written, $sformatf("%0d packets read of %0d", eop_read, eop_written));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
