// tb_hermes_switch: self-checking test of one Hermes switch at address (1,1).
//
// First a single packet crosses the idle switch from West to East and the header's
// delay (two cycles from entering the buffer to leaving) is checked. Then every
// input port sends packets to destinations in all directions at once while the
// downstream credits toggle at random. A monitor on every output rebuilds the
// packets: each must leave on the port XY routing prescribes, arrive whole and
// uninterleaved, and every packet must arrive exactly once.
module tb_hermes_switch;
  import noc_pkg::*;

  localparam int NPK = 12;     // packets per input port
  localparam int PL  = 6;      // payload flits per packet

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  rx [N_PORTS], credit_o [N_PORTS], tx [N_PORTS], credit_i [N_PORTS];
  flit_t data_in [N_PORTS], data_out [N_PORTS];

  int checks = 0, failures = 0;
  int recv_cnt [N_PORTS*NPK+1];
  logic random_credit = 1'b0;

  hermes_switch #(.XADDR(1), .YADDR(1), .BUF_DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Destination table and the port XY routing must pick at (1,1)
  function automatic flit_t dest_of(input int k);
    case (k % 7)
      0: return make_addr(2, 1);  // east
      1: return make_addr(0, 1);  // west
      2: return make_addr(1, 2);  // north
      3: return make_addr(1, 0);  // south
      4: return make_addr(1, 1);  // local
      5: return make_addr(3, 0);  // east (X first)
      default: return make_addr(0, 2); // west (X first)
    endcase
  endfunction
  function automatic int port_of(input flit_t d);
    int x, y;
    x = int'(d[15:8]);
    y = int'(d[7:0]);
    if (x > 1) return 0;
    if (x < 1) return 1;
    if (y > 1) return 2;
    if (y < 1) return 3;
    return 4;
  endfunction


  // Inputs: one flit per cycle while the switch grants credit. credit_o is
  // registered, so it is sampled just after a clock edge, before driving rx.
  task automatic send_pkt_safe(input int p, input flit_t dst, input int id);
    for (int k = 0; k < PL + 2; k++) begin
      flit_t f;
      f = (k == 0) ? dst : (k == 1) ? flit_t'(PL) : (k == 2) ? flit_t'(id) : flit_t'(id * 16 + k);
      #1;
      while (!credit_o[p]) begin
        @(posedge clk);
        #1;
      end
      rx[p]      = 1'b1;
      data_in[p] = f;
      @(posedge clk);
      #1;
      rx[p] = 1'b0;
    end
  endtask

  // Output monitors
  int   st [N_PORTS];
  int   cur_id [N_PORTS];
  int   kk [N_PORTS];
  flit_t hdr [N_PORTS];
  longint cyc = 0;
  longint t_hdr_out = -1;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int o = 0; o < N_PORTS; o++) begin
        if (tx[o]) begin
          check(credit_i[o], "flit sent without credit");
          case (st[o])
            0: begin
              hdr[o] = data_out[o];
              check(port_of(data_out[o]) == o, $sformatf("header %h left on port %0d", data_out[o], o));
              if (t_hdr_out < 0) t_hdr_out = cyc;
              st[o] = 1;
            end
            1: begin
              check(data_out[o] == flit_t'(PL), "size flit");
              st[o] = 2; kk[o] = 2;
            end
            default: begin
              if (kk[o] == 2) cur_id[o] = int'(data_out[o]);
              else check(data_out[o] == flit_t'(cur_id[o] * 16 + kk[o]),
                         $sformatf("payload flit %0d of packet %0d on port %0d", kk[o], cur_id[o], o));
              kk[o]++;
              if (kk[o] == PL + 2) begin
                if (cur_id[o] >= 0 && cur_id[o] <= N_PORTS*NPK) begin
                  recv_cnt[cur_id[o]]++;
                  check(dest_of(cur_id[o]) == hdr[o], "header belongs to packet");
                end else check(1'b0, "unknown packet id");
                st[o] = 0;
              end
            end
          endcase
        end
      end
    end
  end

  // Downstream credit: always on, or random
  always @(posedge clk) begin
    for (int o = 0; o < N_PORTS; o++)
      credit_i[o] <= random_credit ? ($urandom_range(0, 3) != 0) : 1'b1;
  end

  initial begin
    longint t_in;
    for (int p = 0; p < N_PORTS; p++) begin
      rx[p] = 1'b0; data_in[p] = '0; credit_i[p] = 1'b1; st[p] = 0; kk[p] = 0; cur_id[p] = 0;
    end
    for (int i = 0; i <= N_PORTS*NPK; i++) recv_cnt[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // 1) latency of a header through an idle switch, West -> East
    #1;
    rx[1] = 1'b1; data_in[1] = dest_of(0);
    @(posedge clk); t_in = cyc;
    #1;
    rx[1] = 1'b0;
    for (int k = 1; k < PL + 2; k++) begin
      rx[1] = 1'b1;
      data_in[1] = (k == 1) ? flit_t'(PL) : (k == 2) ? flit_t'(0) : flit_t'(k);
      @(posedge clk); #1;
      rx[1] = 1'b0;
    end
    repeat (20) @(posedge clk);
    check(t_hdr_out - t_in == 2, $sformatf("header latency %0d cycles, expected 2", t_hdr_out - t_in));
    check(recv_cnt[0] == 1, "single packet delivered");
    recv_cnt[0] = 0;

    // 2) all ports at once, random credits
    random_credit = 1'b1;
    for (int p = 0; p < N_PORTS; p++) begin
      automatic int pp = p;
      fork
        for (int n = 0; n < NPK; n++) begin
          int id;
          id = pp * NPK + n + 1;
          send_pkt_safe(pp, dest_of(id), id);
          repeat ($urandom_range(0, 3)) @(posedge clk);
        end
      join_none
    end
    wait fork;
    random_credit = 1'b0;
    repeat (100) @(posedge clk);
    for (int id = 1; id <= N_PORTS*NPK; id++)
      check(recv_cnt[id] == 1, $sformatf("packet %0d received %0d times", id, recv_cnt[id]));

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
