// tb_tr_trace: self-checking test of the trace traffic receptor at (1,2), with a
// 4-entry memory. Six good packets are delivered; the first four must be recorded
// with source, sequence, rate, crossings, creation time and arrival time of the
// last flit, the rest must set overflow. Clear must empty the memory.
module tb_tr_trace;
  import noc_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0, clear = 1'b0, rx;
  flit_t      data_in, now;
  logic [1:0] rd_addr = '0;
  trace_t     rd_data;
  logic [2:0] count;
  logic       overflow;

  int checks = 0, failures = 0;

  tr_trace #(.XADDR(1), .YADDR(2), .DEPTH(4)) dut (.*);
  tr_pkt_driver u_drv (.clk, .now, .rx, .data(data_in));

  always #5 clk = ~clk;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) now <= 16'd65000; else now <= now + 1'b1;   // wraps during the test

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    flit_t ts [6], tl [6];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 6; i++) begin
      u_drv.send(make_addr(1, 2), make_addr(3, i % 3), 20 + 7 * i, 10 * (i + 1), i % 2, 100 + i, 9, 0,
                 ts[i], tl[i]);
      repeat (2) @(posedge clk);
      #1;
      check(int'(count) == ((i < 4) ? i + 1 : 4), $sformatf("count %0d after packet %0d", count, i));
      check(overflow == (i >= 4), $sformatf("overflow after packet %0d", i));
    end
    for (int i = 0; i < 4; i++) begin
      rd_addr = 2'(i);
      #1;
      check(rd_data.src == make_addr(3, i % 3) && rd_data.seq == 8'(100 + i) &&
            rd_data.rate == 8'(10 * (i + 1)) && rd_data.ncross == 8'(i % 2),
            $sformatf("record %0d fields", i));
      check(rd_data.t_sent == ts[i] && rd_data.t_recv == tl[i],
            $sformatf("record %0d times %0d..%0d, expected %0d..%0d", i, rd_data.t_sent, rd_data.t_recv,
                      ts[i], tl[i]));
    end
    @(negedge clk); clear = 1'b1;
    @(negedge clk); clear = 1'b0;
    check(count == 0 && !overflow, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
