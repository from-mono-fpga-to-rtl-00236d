// tb_traffic_generator: self-checking test of the traffic generator at (0,1).
//
// A monitor rebuilds every packet the generator sends and checks its layout
// (destination, size, source, time stamp, rate, crossings, sequence, filler).
// Runs: constant 50 % to a node across the partition (period 1500/50 = 30 cycles,
// one crossing, each header leaving one cycle after its creation time), 33 %
// (period 45), 100 % with random credit (creation times 15 cycles apart however
// long the packets wait), a sweep of 2 packets per step from 10 % to 100 % to a
// node on the same side (no crossing), random intervals at 50 % (each interval
// against a model of the generator's free-running LFSR, their mean near 30
// cycles), and 0 % (nothing sent).
module tb_traffic_generator;
  import noc_pkg::*;

  localparam int PF = 15;

  logic    clk = 1'b0, rst_n = 1'b0;
  tg_cfg_t cfg;
  flit_t   now;
  logic    tx, credit_i, done;
  flit_t   data_out;
  logic [6:0]  cur_rate;
  logic [15:0] sent;

  int checks = 0, failures = 0;
  logic random_credit = 1'b0;

  traffic_generator #(.XADDR(0), .YADDR(1), .PKT_FLITS(PF), .BOUND_X(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1'b1;
  always @(posedge clk) credit_i <= random_credit ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // model of the generator's LFSR: same seed, steps every cycle
  logic [15:0] m_lfsr;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) m_lfsr <= 16'((0 * 256 + 1) ^ 16'hACE1) | 16'h0001;
    else        m_lfsr <= {1'b0, m_lfsr[15:1]} ^ (m_lfsr[0] ? 16'hB400 : 16'h0000);

  // packet records
  flit_t p_ts [$];
  flit_t p_hdr_time [$];
  int    p_rate [$], p_cross [$], p_seq [$], p_gap [$];
  flit_t p_dest [$];
  int    k = 0;
  flit_t f [PF];

  always @(posedge clk) begin
    if (rst_n && tx) begin
      check(credit_i, "flit sent without credit");
      f[k] = data_out;
      if (k == 0) p_hdr_time.push_back(now);
      if (k == PF - 1) begin
        check(f[1] == flit_t'(PF - 2), "size flit");
        check(f[2] == make_addr(0, 1), "source address");
        for (int j = 6; j < PF; j++)
          check(f[j] == filler(f[5][7:0], 8'(j)), $sformatf("filler flit %0d", j));
        p_dest.push_back(f[0]);
        p_ts.push_back(f[3]);
        p_rate.push_back(int'(f[4][14:8]));
        p_cross.push_back(int'(f[4][7:0]));
        p_seq.push_back(int'(f[5]));
        p_gap.push_back((int'(m_lfsr) * 30) / 32768 == 0 ? 1 : (int'(m_lfsr) * 30) / 32768);
        k = 0;
      end else k++;
    end
  end

  task automatic run(input logic sweep, input int rate, input flit_t dest, input int npkts);
    p_ts.delete(); p_hdr_time.delete(); p_rate.delete(); p_cross.delete(); p_seq.delete(); p_dest.delete(); p_gap.delete();
    cfg.sweep = sweep; cfg.rate = 7'(rate); cfg.dest = dest; cfg.npkts = 16'(npkts);
    @(posedge clk); cfg.start <= 1'b1;
    @(posedge clk); cfg.start <= 1'b0;
    repeat (2) @(posedge clk);
    wait (done);
    repeat (2) @(posedge clk);
  endtask

  initial begin
    cfg = '0;
    credit_i = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // constant 50 %, across the partition
    run(1'b0, 50, make_addr(3, 2), 8);
    check(p_ts.size() == 8 && sent == 8, $sformatf("50%%: %0d packets", p_ts.size()));
    for (int i = 0; i < p_ts.size(); i++) begin
      check(p_dest[i] == make_addr(3, 2) && p_rate[i] == 50 && p_cross[i] == 1 && p_seq[i] == i,
            $sformatf("50%% packet %0d fields", i));
      check(p_hdr_time[i] == p_ts[i] + 1, $sformatf("50%% packet %0d left at %0d, created %0d", i,
            p_hdr_time[i], p_ts[i]));
      if (i > 0) check(p_ts[i] - p_ts[i-1] == 30, $sformatf("50%% period %0d", p_ts[i] - p_ts[i-1]));
    end

    // constant 33 %: period floor(1500/33) = 45
    run(1'b0, 33, make_addr(2, 0), 4);
    for (int i = 1; i < p_ts.size(); i++)
      check(p_ts[i] - p_ts[i-1] == 45, $sformatf("33%% period %0d", p_ts[i] - p_ts[i-1]));
    check(p_cross.size() == 4 && p_cross[0] == 1, "33%: 4 packets, one crossing");

    // 100 % with random credit: creation times stay 15 apart, packets fall behind
    random_credit = 1'b1;
    run(1'b0, 100, make_addr(1, 1), 10);
    random_credit = 1'b0;
    check(p_ts.size() == 10, "100%: 10 packets");
    for (int i = 1; i < p_ts.size(); i++)
      check(p_ts[i] - p_ts[i-1] == 15, $sformatf("100%% period %0d", p_ts[i] - p_ts[i-1]));
    check(p_hdr_time[9] - p_ts[9] > 1, "100% with stalls: last packet waited at the source");

    // sweep 10 % .. 100 %, 2 packets per step, same side
    run(1'b1, 0, make_addr(1, 0), 2);
    check(p_ts.size() == 20, $sformatf("sweep: %0d packets", p_ts.size()));
    for (int i = 0; i < p_ts.size(); i++) begin
      check(p_rate[i] == 10 * (i / 2 + 1) && p_cross[i] == 0, $sformatf("sweep packet %0d rate %0d", i, p_rate[i]));
      if (i % 2 == 1) check(p_ts[i] - p_ts[i-1] == flit_t'(1500 / p_rate[i]),
                            $sformatf("sweep period at %0d %%", p_rate[i]));
    end

    // random intervals at 50 %: each interval predicted from the LFSR model's value
    // in the cycle of the previous packet's last flit
    begin
      int gsum, distinct, g, prev_g;
      cfg.stoch = 1'b1;
      run(1'b0, 50, make_addr(3, 2), 40);
      cfg.stoch = 1'b0;
      check(p_ts.size() == 40, $sformatf("random 50%%: %0d packets", p_ts.size()));
      gsum = 0; distinct = 0; prev_g = -1;
      for (int i = 1; i < p_ts.size(); i++) begin
        g = p_gap[i-1];
        check(int'(flit_t'(p_ts[i] - p_ts[i-1])) == g,
              $sformatf("random interval %0d: %0d, expected %0d", i, p_ts[i] - p_ts[i-1], g));
        check(g >= 1 && g < 60, "random interval within 1..2*period-1");
        if (g != prev_g) distinct++;
        prev_g = g;
        gsum += g;
      end
      check(distinct > 20, $sformatf("random intervals vary: %0d changes", distinct));
      check(gsum >= 39 * 22 && gsum <= 39 * 38, $sformatf("random intervals average %0d/39", gsum));
      for (int i = 0; i < p_ts.size(); i++) check(p_seq[i] == i && p_rate[i] == 50, "random packet fields");
    end

    // 0 %: nothing
    run(1'b0, 0, make_addr(3, 0), 5);
    check(p_ts.size() == 0 && sent == 0, "0%: no packet");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
