// tb_link_mux: self-checking test of the packet multiplexer of Adaptor 2.
//
// Three sources offer packets (words ending with eof) at random; the link accepts
// at random. Checks: every word leaves tagged with its source number, words of one
// source stay in order, and once a packet has begun on the link no other source's
// word appears until its eof (no interleaving). All three sources get the link.
module tb_link_mux;
  import noc_pkg::*;

  localparam int N = 3;
  localparam int NPKT = 40;

  logic       clk = 1'b0, rst_n = 1'b0;
  link_word_t in_word [N];
  logic       in_valid [N], in_ready [N];
  link_word_t out_word;
  logic       out_valid, out_ready;

  int checks = 0, failures = 0;
  int sent_pk [N], recv_w [N], recv_pk [N];
  int busy_ch = -1;

  link_mux #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // word w of source s: flit = s*4096 + running count, eof every (s+3) words
  int wcount [N];
  always_comb
    for (int s = 0; s < N; s++) begin
      in_word[s].chan = '0;
      in_word[s].flit = flit_t'(s * 4096 + wcount[s]);
      in_word[s].eof  = ((wcount[s] % (s + 3)) == s + 2);
    end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < N; s++) begin
        wcount[s] <= 0; in_valid[s] <= 1'b0; sent_pk[s] <= 0;
      end
      out_ready <= 1'b0;
    end else begin
      out_ready <= ($urandom_range(0, 3) != 0);
      for (int s = 0; s < N; s++) begin
        if (in_valid[s] && in_ready[s]) begin
          wcount[s] <= wcount[s] + 1;
          if (in_word[s].eof) sent_pk[s] <= sent_pk[s] + 1;
        end
        // a source keeps valid up while it has words left
        if (!(in_valid[s] && !in_ready[s]))
          in_valid[s] <= (sent_pk[s] + ((in_valid[s] && in_ready[s] && in_word[s].eof) ? 1 : 0) < NPKT)
                         && ($urandom_range(0, 4) != 0);
      end
      if (out_valid && out_ready) begin
        int c;
        c = int'(out_word.chan);
        check(c < N, "channel number in range");
        if (c < N) begin
          check(out_word.flit == flit_t'(c * 4096 + recv_w[c]), $sformatf("word order of source %0d", c));
          check(busy_ch < 0 || busy_ch == c, $sformatf("source %0d interleaved into packet of %0d", c, busy_ch));
          recv_w[c]++;
          if (out_word.eof) begin
            busy_ch = -1;
            recv_pk[c]++;
          end else busy_ch = c;
        end
      end
    end
  end

  initial begin
    for (int s = 0; s < N; s++) begin recv_w[s] = 0; recv_pk[s] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (recv_pk[0] == NPKT && recv_pk[1] == NPKT && recv_pk[2] == NPKT);
    repeat (5) @(posedge clk);
    for (int s = 0; s < N; s++)
      check(recv_pk[s] == NPKT, $sformatf("source %0d: %0d packets", s, recv_pk[s]));
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
