// tb_adaptor2: self-checking test of Adaptor 2 across one modelled serial link.
//
// Two adaptor2 blocks with three inter-FPGA links each are joined by one link
// model per direction. All three links of both sides send 15-flit packets at once,
// so the multiplexers must share the single physical link. Checks: every packet
// leaves the far side on the same inter-FPGA link it entered, whole and in order;
// packets never interleave on the physical link; the physical link is really
// shared (frames of different channels follow each other); no word has a bad
// channel number.
module tb_adaptor2;
  import noc_pkg::*;

  localparam int N = 3;
  localparam int PF = 15;
  localparam int NPKT = 12;

  logic clk = 1'b0, lclk = 1'b0, rst_n = 1'b0;
  logic rx [2][N], credit_o [2][N], tx [2][N], credit_i [2][N];
  flit_t data_in [2][N], data_out [2][N];
  link_word_t t_word [2], r_word [2];
  logic t_valid [2], t_ready [2], r_valid [2], r_ready [2];
  logic [7:0] bad_chan [2];

  int checks = 0, failures = 0;
  int recv_pk [2][N], recv_k [2][N];
  int switches = 0;

  always #5 clk = ~clk;
  always #4 lclk = ~lclk;

  for (genvar s = 0; s < 2; s++) begin : g_side
    adaptor2 #(.N(N), .DEPTH(16)) u_ad (
      .clk, .rst_n, .link_clk(lclk), .link_rst_n(rst_n),
      .rx(rx[s]), .data_in(data_in[s]), .credit_o(credit_o[s]),
      .tx(tx[s]), .data_out(data_out[s]), .credit_i(credit_i[s]),
      .link_tx_word(t_word[s]), .link_tx_valid(t_valid[s]), .link_tx_ready(t_ready[s]),
      .link_rx_word(r_word[s]), .link_rx_valid(r_valid[s]), .link_rx_ready(r_ready[s]),
      .bad_chan(bad_chan[s])
    );
    aurora_link_model #(.INIT_CYCLES(24)) u_link (
      .clk(lclk), .rst_n,
      .tx_word(t_word[s]), .tx_valid(t_valid[s]), .tx_ready(t_ready[s]),
      .rx_word(r_word[1-s]), .rx_valid(r_valid[1-s]), .rx_ready(r_ready[1-s])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic flit_t flit_of(input int s, input int c, input int n, input int k);
    if (k == 0) return make_addr(s == 0 ? 2 : 1, c);
    if (k == 1) return flit_t'(PF - 2);
    return flit_t'((s << 14) + (c << 12) + (n << 4) + k);
  endfunction

  task automatic send_pkt(input int s, input int c, input int n);
    for (int k = 0; k < PF; k++) begin
      #1;
      while (!credit_o[s][c]) begin @(posedge clk); #1; end
      rx[s][c] = 1'b1; data_in[s][c] = flit_of(s, c, n, k);
      @(posedge clk);
      #1; rx[s][c] = 1'b0;
    end
  endtask

  // physical link: no interleaving, count channel changes between frames
  int cur_ch [2], last_ch [2];
  always @(posedge lclk) begin
    for (int s = 0; s < 2; s++) begin
      if (rst_n && t_valid[s] && t_ready[s]) begin
        if (cur_ch[s] >= 0) check(int'(t_word[s].chan) == cur_ch[s], "packets interleaved on the link");
        else if (last_ch[s] >= 0 && int'(t_word[s].chan) != last_ch[s]) switches++;
        cur_ch[s] = t_word[s].eof ? -1 : int'(t_word[s].chan);
        if (t_word[s].eof) last_ch[s] = int'(t_word[s].chan);
      end
    end
  end

  always @(posedge clk) begin
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < N; c++) begin
        credit_i[s][c] <= ($urandom_range(0, 3) != 0);
        if (rst_n && tx[s][c]) begin
          check(data_out[s][c] == flit_of(1 - s, c, recv_pk[s][c], recv_k[s][c]),
                $sformatf("side %0d link %0d packet %0d flit %0d: %h", s, c, recv_pk[s][c], recv_k[s][c],
                          data_out[s][c]));
          if (recv_k[s][c] == PF - 1) begin recv_k[s][c] = 0; recv_pk[s][c]++; end
          else recv_k[s][c]++;
        end
      end
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      cur_ch[s] = -1; last_ch[s] = -1;
      for (int c = 0; c < N; c++) begin
        rx[s][c] = 1'b0; data_in[s][c] = '0; credit_i[s][c] = 1'b1; recv_pk[s][c] = 0; recv_k[s][c] = 0;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < N; c++) begin
        automatic int ss = s, cc = c;
        fork
          for (int n = 0; n < NPKT; n++) send_pkt(ss, cc, n);
        join_none
      end
    wait fork;
    for (int s = 0; s < 2; s++)
      for (int c = 0; c < N; c++) wait (recv_pk[s][c] == NPKT);
    repeat (10) @(posedge clk);
    for (int s = 0; s < 2; s++) begin
      check(bad_chan[s] == 0, "no bad channel numbers");
      for (int c = 0; c < N; c++)
        check(recv_pk[s][c] == NPKT, $sformatf("side %0d link %0d: %0d packets", s, c, recv_pk[s][c]));
    end
    check(switches > 2 * N, $sformatf("link shared: %0d channel changes", switches));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
