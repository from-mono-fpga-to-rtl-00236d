// hermes_switch: one router of the Hermes 2D mesh.
//
// Five bidirectional ports (East, West, North, South, Local), each with an input
// buffer. A central routing unit serves, round-robin, the inputs whose head flit is
// an unrouted header, and connects each to the output chosen by XY routing (first
// along X, then along Y) if that output is free: at most one connection is made per
// cycle. The connection then carries the header, the size flit and as many payload
// flits as the size flit says (wormhole switching), and is released after the last
// one. A flit moves from input to output in a cycle in which the input buffer is
// not empty and the downstream credit is high, so the crossbar is combinational
// from buffer head to output.
//
// Interface per port p: rx/data_in/credit_o toward the neighbour that sends into
// this switch, tx/data_out/credit_i toward the neighbour it sends to.
// Timing: a header at the head of an idle input is routed in the next cycle and
// leaves one cycle later; payload flits follow at one per cycle.
//
// The five ports, the mesh and XY routing are those of the Hermes NoC; the buffer
// depth, credit-based flow control, routing one header per cycle and the
// round-robin order are this design's choices.
module hermes_switch
  import noc_pkg::*;
#(
  parameter int unsigned XADDR     = 0,
  parameter int unsigned YADDR     = 0,
  parameter int unsigned BUF_DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rx       [N_PORTS],
  input  flit_t data_in  [N_PORTS],
  output logic  credit_o [N_PORTS],
  output logic  tx       [N_PORTS],
  output flit_t data_out [N_PORTS],
  input  logic  credit_i [N_PORTS]
);
  typedef enum logic [1:0] {PH_HDR, PH_SIZE, PH_PAY} phase_e;

  flit_t      head  [N_PORTS];
  logic       empty [N_PORTS];
  logic       pop   [N_PORTS];

  // Per input: connection state
  logic       routed [N_PORTS];
  logic [2:0] out_of [N_PORTS];
  phase_e     phase  [N_PORTS];
  flit_t      rem    [N_PORTS];
  // Per output: owner
  logic       busy   [N_PORTS];
  logic [2:0] in_of  [N_PORTS];
  logic [2:0] rr;

  for (genvar p = 0; p < N_PORTS; p++) begin : g_buf
    hermes_buffer #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .rx(rx[p]), .data_in(data_in[p]), .credit_o(credit_o[p]),
      .head(head[p]), .empty(empty[p]), .pop(pop[p])
    );
  end

  function automatic logic [2:0] xy_route(input flit_t hdr);
    logic [HALF_W-1:0] tx_, ty_;
    tx_ = hdr[FLIT_W-1:HALF_W];
    ty_ = hdr[HALF_W-1:0];
    if (tx_ > HALF_W'(XADDR))      return 3'(P_EAST);
    else if (tx_ < HALF_W'(XADDR)) return 3'(P_WEST);
    else if (ty_ > HALF_W'(YADDR)) return 3'(P_NORTH);
    else if (ty_ < HALF_W'(YADDR)) return 3'(P_SOUTH);
    else                           return 3'(P_LOCAL);
  endfunction

  // Routing unit: round-robin choice of one requesting input whose output is free
  logic       grant;
  logic [2:0] g_in, g_out;
  always_comb begin
    grant = 1'b0;
    g_in  = '0;
    g_out = '0;
    for (int k = 1; k <= N_PORTS; k++) begin
      if (!grant && !routed[(int'(rr) + k) % N_PORTS] && !empty[(int'(rr) + k) % N_PORTS]
          && !busy[xy_route(head[(int'(rr) + k) % N_PORTS])]) begin
        grant = 1'b1;
        g_in  = 3'((int'(rr) + k) % N_PORTS);
        g_out = xy_route(head[(int'(rr) + k) % N_PORTS]);
      end
    end
  end

  // Crossbar
  always_comb begin
    for (int i = 0; i < N_PORTS; i++) pop[i] = 1'b0;
    for (int o = 0; o < N_PORTS; o++) begin
      tx[o]       = 1'b0;
      data_out[o] = head[in_of[o]];
      if (busy[o] && !empty[in_of[o]] && credit_i[o]) begin
        tx[o]         = 1'b1;
        pop[in_of[o]] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0;
      for (int p = 0; p < N_PORTS; p++) begin
        routed[p] <= 1'b0;
        out_of[p] <= '0;
        phase[p]  <= PH_HDR;
        rem[p]    <= '0;
        busy[p]   <= 1'b0;
        in_of[p]  <= '0;
      end
    end else begin
      // Flits leaving: advance each connection, release it after its last flit
      for (int i = 0; i < N_PORTS; i++) begin
        if (routed[i] && pop[i]) begin
          unique case (phase[i])
            PH_HDR:  phase[i] <= PH_SIZE;
            PH_SIZE: begin
              rem[i]   <= head[i];
              phase[i] <= PH_PAY;
              if (head[i] == '0) begin
                routed[i]      <= 1'b0;
                busy[out_of[i]] <= 1'b0;
                phase[i]       <= PH_HDR;
              end
            end
            default: begin
              rem[i] <= rem[i] - 1'b1;
              if (rem[i] == flit_t'(1)) begin
                routed[i]      <= 1'b0;
                busy[out_of[i]] <= 1'b0;
                phase[i]       <= PH_HDR;
              end
            end
          endcase
        end
      end
      // New connection
      if (grant) begin
        routed[g_in] <= 1'b1;
        out_of[g_in] <= g_out;
        phase[g_in]  <= PH_HDR;
        busy[g_out]  <= 1'b1;
        in_of[g_out] <= g_in;
        rr           <= g_in;
      end
    end
  end

  for (genvar p = 0; p < N_PORTS; p++) begin : g_chk
    a_credit: assert property (@(posedge clk) disable iff (!rst_n) tx[p] |-> credit_i[p]);
  end
endmodule
