// tb_adaptor1: self-checking test of Adaptor 1 across a modelled serial link.
//
// Two adaptor1 blocks, one per FPGA, are joined by two link models (one per
// direction, 24 cycles per frame plus one per word). Packets of 15 flits are sent
// into each side from the NoC clock domain (10 ns) and must come out of the other
// side whole and in order, while the receiving switch's credit toggles at random.
// On the link every word carries the adaptor's channel number and the last flit of
// every packet carries eof. For a lone packet the time from its last flit entering
// to its first flit leaving the far side must cover the link's 24 initialisation
// cycles and the far FIFO collecting the whole packet.
module tb_adaptor1;
  import noc_pkg::*;

  localparam int PF = 15;     // flits per packet
  localparam int NPKT = 30;
  localparam realtime TL = 8.0;   // link clock period

  logic clk = 1'b0, lclk = 1'b0, rst_n = 1'b0;
  logic rx [2], credit_o [2], tx [2], credit_i [2];
  flit_t data_in [2], data_out [2];
  link_word_t t_word [2], r_word [2];
  logic t_valid [2], t_ready [2], r_valid [2], r_ready [2];

  int checks = 0, failures = 0;
  int recv_pk [2], recv_k [2];
  logic random_credit = 1'b0;
  realtime t_in_last, t_out_first;

  always #5 clk = ~clk;
  always #4 lclk = ~lclk;

  for (genvar s = 0; s < 2; s++) begin : g_side
    adaptor1 #(.DEPTH(16), .CHAN(2)) u_ad (
      .clk, .rst_n, .link_clk(lclk), .link_rst_n(rst_n),
      .rx(rx[s]), .data_in(data_in[s]), .credit_o(credit_o[s]),
      .tx(tx[s]), .data_out(data_out[s]), .credit_i(credit_i[s]),
      .link_tx_word(t_word[s]), .link_tx_valid(t_valid[s]), .link_tx_ready(t_ready[s]),
      .link_rx_word(r_word[s]), .link_rx_valid(r_valid[s]), .link_rx_ready(r_ready[s])
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

  function automatic flit_t flit_of(input int s, input int n, input int k);
    if (k == 0) return make_addr(s == 0 ? 3 : 0, n % 3);
    if (k == 1) return flit_t'(PF - 2);
    return flit_t'((s << 14) + (n << 4) + k);
  endfunction

  task automatic send_pkt(input int s, input int n);
    for (int k = 0; k < PF; k++) begin
      #1;
      while (!credit_o[s]) begin @(posedge clk); #1; end
      rx[s] = 1'b1; data_in[s] = flit_of(s, n, k);
      @(posedge clk);
      if (k == PF - 1) t_in_last = $realtime;
      #1; rx[s] = 1'b0;
    end
  endtask

  // link side checks
  int lk_k [2];
  always @(posedge lclk) begin
    for (int s = 0; s < 2; s++) begin
      if (rst_n && t_valid[s] && t_ready[s]) begin
        check(t_word[s].chan == CHAN_W'(2), "channel number on the link");
        check(t_word[s].eof == (lk_k[s] == PF - 1), $sformatf("eof on word %0d", lk_k[s]));
        lk_k[s] = (lk_k[s] == PF - 1) ? 0 : lk_k[s] + 1;
      end
    end
  end

  // NoC side receivers: side s receives what side 1-s sent
  always @(posedge clk) begin
    for (int s = 0; s < 2; s++) begin
      credit_i[s] <= random_credit ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (rst_n && tx[s]) begin
        check(credit_i[s], "flit sent without credit");
        check(data_out[s] == flit_of(1 - s, recv_pk[s], recv_k[s]),
              $sformatf("side %0d packet %0d flit %0d: %h", s, recv_pk[s], recv_k[s], data_out[s]));
        if (recv_k[s] == 0 && recv_pk[s] == 0 && s == 1) t_out_first = $realtime;
        if (recv_k[s] == PF - 1) begin recv_k[s] = 0; recv_pk[s]++; end
        else recv_k[s]++;
      end
    end
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      rx[s] = 1'b0; data_in[s] = '0; credit_i[s] = 1'b1; recv_pk[s] = 0; recv_k[s] = 0; lk_k[s] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // one lone packet, side 0 -> side 1
    send_pkt(0, 0);
    wait (recv_pk[1] == 1);
    check(t_out_first - t_in_last >= (24 + PF - 1) * TL,
          $sformatf("crossing delay %0t too short", t_out_first - t_in_last));
    check(t_out_first - t_in_last <= (24 + PF - 1) * TL + 12 * 10.0,
          $sformatf("crossing delay %0t too long", t_out_first - t_in_last));

    // both directions at once with random credit
    random_credit = 1'b1;
    fork
      for (int n = 1; n < NPKT; n++) send_pkt(0, n);
      for (int n = 0; n < NPKT; n++) send_pkt(1, n);
    join
    wait (recv_pk[1] == NPKT && recv_pk[0] == NPKT);
    check(recv_pk[0] == NPKT && recv_pk[1] == NPKT, "all packets crossed");

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
