// tb_link_demux: self-checking test of the de-multiplexer of Adaptor 2.
//
// A stream of words with channel numbers 0..2, and now and then an invalid
// channel 5, is offered while the three outputs accept at random. Checks: each
// word appears on the output of its channel and only there, in order; the input
// waits while that output is not ready; invalid words are dropped and counted.
module tb_link_demux;
  import noc_pkg::*;

  localparam int N = 3;
  localparam int NW = 600;

  logic       clk = 1'b0, rst_n = 1'b0;
  link_word_t in_word;
  logic       in_valid, in_ready;
  link_word_t out_word [N];
  logic       out_valid [N], out_ready [N];
  logic [7:0] bad_chan;

  int checks = 0, failures = 0;
  int sent = 0, bad_sent = 0;
  int recv [N];
  int exp_next [N];

  link_demux #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic link_word_t word_of(input int i);
    link_word_t w;
    w.chan = (i % 11 == 7) ? CHAN_W'(5) : CHAN_W'(i % N);
    w.eof  = (i % 4 == 3);
    w.flit = flit_t'(i);
    return w;
  endfunction

  assign in_word = word_of(sent);

  always @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 1'b0;
      for (int c = 0; c < N; c++) out_ready[c] <= 1'b0;
    end else begin
      for (int c = 0; c < N; c++) out_ready[c] <= ($urandom_range(0, 2) != 0);
      if (in_valid && in_ready) begin
        if (int'(in_word.chan) >= N) bad_sent++;
        sent++;
      end
      if (!(in_valid && !in_ready)) in_valid <= (sent + ((in_valid && in_ready) ? 1 : 0) < NW);
      for (int c = 0; c < N; c++) begin
        if (out_valid[c]) begin
          check(int'(out_word[c].chan) == c, $sformatf("word for channel %0d on output %0d", out_word[c].chan, c));
          check(in_valid, "output valid without input");
        end
        if (out_valid[c] && out_ready[c]) begin
          check(int'(out_word[c].flit) == exp_next[c], $sformatf("output %0d word %0d, expected %0d",
                c, out_word[c].flit, exp_next[c]));
          check(in_ready, "input not taken when its output took it");
          recv[c]++;
          // next word of this channel
          exp_next[c]++;
          while (word_of(exp_next[c]).chan != CHAN_W'(c)) exp_next[c]++;
        end
        if (in_valid && int'(in_word.chan) == c && !out_ready[c])
          check(!in_ready, "input accepted while its output was not ready");
      end
    end
  end

  initial begin
    for (int c = 0; c < N; c++) begin
      recv[c] = 0;
      exp_next[c] = c;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (sent == NW);
    repeat (5) @(posedge clk);
    check(int'(bad_chan) == bad_sent && bad_sent > 0, $sformatf("bad_chan %0d, expected %0d", bad_chan, bad_sent));
    check(recv[0] + recv[1] + recv[2] + bad_sent == NW, "every word delivered or dropped");
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
