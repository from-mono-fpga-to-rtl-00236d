// emu_node: one node of the emulation platform.
//
// A Hermes switch whose local port is wired to the emulation blocks that replace
// the node's IP core: a traffic generator sends into the local port, and both
// traffic receptors (statistics and trace) listen to what the local port delivers.
// The receptors always accept, so the switch's local credit is tied high. The four
// mesh ports (East, West, North, South, in noc_pkg::port_e order) are brought out.
// Putting a generator and both receptor types at every node follows the
// platform's "emulation block insertion" step.
module emu_node
  import noc_pkg::*;
#(
  parameter int unsigned XADDR       = 0,
  parameter int unsigned YADDR       = 0,
  parameter int unsigned BUF_DEPTH   = 16,
  parameter int unsigned PKT_FLITS   = noc_pkg::DEF_PKT_FLITS,
  parameter int unsigned BOUND_X     = 2,
  parameter int unsigned TRACE_DEPTH = 64
) (
  input  logic      clk,
  input  logic      rst_n,
  input  flit_t     now,
  input  logic      clear,
  input  tg_cfg_t   cfg,
  // mesh ports 0..3 = East, West, North, South
  input  logic      rx       [4],
  input  flit_t     data_in  [4],
  output logic      credit_o [4],
  output logic      tx       [4],
  output flit_t     data_out [4],
  input  logic      credit_i [4],
  // results
  output tr_stats_t stats,
  output logic      tg_done,
  output logic [15:0] tg_sent,
  input  logic [$clog2(TRACE_DEPTH)-1:0] trace_addr,
  output trace_t    trace_data,
  output logic [$clog2(TRACE_DEPTH):0]   trace_count,
  output logic      trace_overflow
);
  logic  s_rx [N_PORTS], s_cr_o [N_PORTS], s_tx [N_PORTS], s_cr_i [N_PORTS];
  flit_t s_di [N_PORTS], s_do [N_PORTS];
  logic  tg_tx;
  flit_t tg_data;
  logic [6:0] tg_rate_unused;

  for (genvar p = 0; p < 4; p++) begin : g_mesh
    assign s_rx[p]     = rx[p];
    assign s_di[p]     = data_in[p];
    assign credit_o[p] = s_cr_o[p];
    assign tx[p]       = s_tx[p];
    assign data_out[p] = s_do[p];
    assign s_cr_i[p]   = credit_i[p];
  end
  assign s_rx[P_LOCAL]   = tg_tx;
  assign s_di[P_LOCAL]   = tg_data;
  assign s_cr_i[P_LOCAL] = 1'b1;

  hermes_switch #(.XADDR(XADDR), .YADDR(YADDR), .BUF_DEPTH(BUF_DEPTH)) u_sw (
    .clk, .rst_n,
    .rx(s_rx), .data_in(s_di), .credit_o(s_cr_o),
    .tx(s_tx), .data_out(s_do), .credit_i(s_cr_i)
  );

  traffic_generator #(.XADDR(XADDR), .YADDR(YADDR), .PKT_FLITS(PKT_FLITS), .BOUND_X(BOUND_X)) u_tg (
    .clk, .rst_n, .cfg, .now,
    .tx(tg_tx), .data_out(tg_data), .credit_i(s_cr_o[P_LOCAL]),
    .done(tg_done), .cur_rate(tg_rate_unused), .sent(tg_sent)
  );

  tr_stats #(.XADDR(XADDR), .YADDR(YADDR)) u_trs (
    .clk, .rst_n, .clear, .rx(s_tx[P_LOCAL]), .data_in(s_do[P_LOCAL]), .now, .stats
  );

  tr_trace #(.XADDR(XADDR), .YADDR(YADDR), .DEPTH(TRACE_DEPTH)) u_trt (
    .clk, .rst_n, .clear, .rx(s_tx[P_LOCAL]), .data_in(s_do[P_LOCAL]), .now,
    .rd_addr(trace_addr), .rd_data(trace_data), .count(trace_count), .overflow(trace_overflow)
  );
endmodule
