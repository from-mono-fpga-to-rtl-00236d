// traffic_generator: packet source that stands in for the IP core of one node.
//
// It knows its own (initiator) address and, from its configuration, the
// destination address, the number of packets to send and the injection rate. It
// sends packets of PKT_FLITS flits: header (destination), size (PKT_FLITS-2), then
// the payload: source address, creation time stamp, {rate, number of inter-FPGA
// links the packet will cross}, sequence number and filler flits. The crossing
// count follows from XY routing: a packet crosses the partition boundary (the
// column BOUND_X where the second FPGA begins) once when source and destination lie
// on different sides of it.
//
// Injection rate r % means packets occupy r % of the local link: packets are
// created every PERIOD = PKT_FLITS*100/r cycles, computed by a 16-step
// shift-subtract divider whenever the rate changes. A packet is sent once its
// creation time has come and the previous packet has left; its time stamp is its
// creation time, so waiting at the source counts in the measured latency. In sweep
// mode the rate starts at 10 % and rises by 10 % after every npkts packets up to
// 100 %; otherwise cfg.rate is used for one run of npkts packets. A rising edge of
// cfg.start begins a run; done is high after it.
//
// With cfg.stoch set the interval to the next creation time is random instead of
// fixed: gap = max(1, floor(L * PERIOD / 2^15)), where L is a 16-bit maximal-length
// LFSR (x^16 + x^14 + x^13 + x^11 + 1, seeded from the node address) that steps
// every cycle from reset; L is its value in the cycle of a packet's last flit. The gap is spread evenly over 0..2*PERIOD-1, so the mean rate
// stays the configured one while packets bunch up and spread out as an IP core's
// would.
//
// Interface: tx/data_out/credit_i toward the switch's local port (credit-based);
// now is the platform's time base. The fields the generator holds (addresses,
// packet size, packet count, crossings), the two rate modes and a random traffic
// distribution follow the platform's description; the packet layout, the rate
// arithmetic and the uniform interval distribution are this design's choices.
module traffic_generator
  import noc_pkg::*;
#(
  parameter int unsigned XADDR     = 0,
  parameter int unsigned YADDR     = 0,
  parameter int unsigned PKT_FLITS = noc_pkg::DEF_PKT_FLITS,
  parameter int unsigned BOUND_X   = 2      // 0: platform not partitioned
) (
  input  logic        clk,
  input  logic        rst_n,
  input  tg_cfg_t     cfg,
  input  flit_t       now,
  output logic        tx,
  output flit_t       data_out,
  input  logic        credit_i,
  output logic        done,
  output logic [6:0]  cur_rate,
  output logic [15:0] sent
);
  typedef enum logic [2:0] {S_IDLE, S_DIV, S_RUN, S_SEND, S_DONE} state_e;

  localparam logic [15:0] DIVIDEND = 16'(PKT_FLITS * 100);
  // any non-zero seed; different per node so that the nodes are not in step
  localparam logic [15:0] LFSR_SEED = 16'((XADDR * 256 + YADDR) ^ 16'hACE1) | 16'h0001;

  state_e      st;
  logic        start_q;
  logic [15:0] period, rem, quo;
  logic [4:0]  div_i;
  logic [15:0] batch;        // packets sent in the current rate step
  flit_t       next_ts, ts;
  logic [7:0]  seq;
  logic [7:0]  idx;
  logic [7:0]  ncross;
  logic [16:0] trial;
  logic [15:0] lfsr;
  logic [31:0] prod;
  logic [15:0] gap;         // interval to the next creation time

  always_comb begin
    logic sx, dx;
    sx = (BOUND_X != 0) && (XADDR >= BOUND_X);
    dx = (BOUND_X != 0) && (cfg.dest[FLIT_W-1:HALF_W] >= HALF_W'(BOUND_X));
    ncross = (BOUND_X != 0 && sx != dx) ? 8'd1 : 8'd0;
  end

  always_comb begin
    unique case (idx)
      8'd0:    data_out = cfg.dest;
      8'd1:    data_out = flit_t'(PKT_FLITS - 2);
      8'd2:    data_out = make_addr(XADDR, YADDR);
      8'd3:    data_out = ts;
      8'd4:    data_out = {1'b0, cur_rate, ncross};
      8'd5:    data_out = flit_t'(seq);
      default: data_out = filler(seq, idx);
    endcase
  end

  assign tx    = (st == S_SEND) && credit_i;
  assign done  = (st == S_DONE);
  assign trial = {rem, quo[15]} - {1'b0, 9'd0, cur_rate};
  assign prod  = 32'(lfsr) * 32'(period);
  assign gap   = !cfg.stoch ? period : (prod[30:15] == '0 ? 16'd1 : prod[30:15]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= S_IDLE;
      start_q  <= 1'b0;
      period   <= '0;
      rem      <= '0;
      quo      <= '0;
      div_i    <= '0;
      batch    <= '0;
      sent     <= '0;
      next_ts  <= '0;
      ts       <= '0;
      seq      <= '0;
      idx      <= '0;
      cur_rate <= '0;
      lfsr     <= LFSR_SEED;
    end else begin
      lfsr    <= {1'b0, lfsr[15:1]} ^ (lfsr[0] ? 16'hB400 : 16'h0000);
      start_q <= cfg.start;
      if (cfg.start && !start_q && (st == S_IDLE || st == S_DONE)) begin
        cur_rate <= cfg.sweep ? 7'd10 : cfg.rate;
        sent     <= '0;
        seq      <= '0;
        st       <= S_DIV;
        rem      <= '0;
        quo      <= DIVIDEND;
        div_i    <= '0;
      end else begin
        unique case (st)
          S_DIV: begin
            // restoring division DIVIDEND / cur_rate, one quotient bit per cycle
            if (cur_rate == '0) begin
              st <= S_DONE;
            end else if (div_i == 5'd16) begin
              period  <= quo;
              batch   <= '0;
              next_ts <= now + 1'b1;
              st      <= S_RUN;
            end else begin
              if (!trial[16]) begin
                rem <= trial[15:0];
                quo <= {quo[14:0], 1'b1};
              end else begin
                rem <= {rem[14:0], quo[15]};
                quo <= {quo[14:0], 1'b0};
              end
              div_i <= div_i + 1'b1;
            end
          end
          S_RUN: begin
            if (batch == cfg.npkts) begin
              if (cfg.sweep && cur_rate < 7'd100) begin
                cur_rate <= cur_rate + 7'd10;
                st       <= S_DIV;
                rem      <= '0;
                quo      <= DIVIDEND;
                div_i    <= '0;
              end else begin
                st <= S_DONE;
              end
            end else if (!next_ts_pending(now, next_ts)) begin
              ts  <= next_ts;
              idx <= '0;
              st  <= S_SEND;
            end
          end
          S_SEND: begin
            if (tx) begin
              idx <= idx + 1'b1;
              if (idx == 8'(PKT_FLITS - 1)) begin
                next_ts <= next_ts + gap;
                batch   <= batch + 1'b1;
                sent    <= sent + 1'b1;
                seq     <= seq + 1'b1;
                st      <= S_RUN;
              end
            end
          end
          default: ;
        endcase
      end
    end
  end

  // True while the creation time t has not yet been reached (modulo time base)
  function automatic logic next_ts_pending(input flit_t tnow, input flit_t t);
    flit_t d;
    d = tnow - t;
    return d[FLIT_W-1];
  endfunction

  initial begin
    assert (PKT_FLITS >= 6 && PKT_FLITS <= 255) else $error("PKT_FLITS out of range");
  end
endmodule
