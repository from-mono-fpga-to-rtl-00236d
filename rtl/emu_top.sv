// emu_top: the two multi-FPGA emulation platforms of the 4x3 Hermes mesh.
//
// Both platforms split the mesh between two FPGAs: columns 0-1 in FPGA 0, columns
// 2-3 in FPGA 1. The mesh links cut by the split, one per row (three inter-FPGA
// links), pass through adaptation blocks to serial link cores.
//   Version 1 (v1_*): three physical links, one per inter-FPGA link, each with an
//     adaptor1 on either side (N_PL = N_IF = 3).
//   Version 2 (v2_*): one physical link shared by the three inter-FPGA links through
//     an adaptor2 on either side (N_PL = 1 < N_IF = 3).
// The two platforms stand side by side and share nothing but the NoC clock, the
// resets, clear and the trace read address. The serial link cores themselves
// (Aurora over the FPGAs' multi-gigabit transceivers) are vendor IP and are not
// part of this RTL: their user-side streams are the ports v*_tx_* (words leaving
// an FPGA) and v*_rx_* (words arriving), indexed [fpga][physical link]. Joining
// v*_tx_*[0][p] to v*_rx_*[1][p] and back through such a core, or a model of it,
// closes the platform.
//
// Per-node ports are indexed [fpga][n] with n = y*2 + (x - 2*fpga). All FPGAs run
// on one NoC clock and are reset together, so their time bases agree and time
// stamps can be compared across the cut. Each physical link has its own user clock.
module emu_top
  import noc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH   = 16,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned PKT_FLITS   = noc_pkg::DEF_PKT_FLITS,
  parameter int unsigned TRACE_DEPTH = 64,
  localparam int unsigned NN  = 2 * DEF_MESH_Y,
  localparam int unsigned NP1 = 3,
  localparam int unsigned NP2 = 1,
  localparam int unsigned TAW = $clog2(TRACE_DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       link_rst_n,
  input  logic       clear,
  input  logic [TAW-1:0] trace_addr,
  // version 1
  input  logic       v1_link_clk  [2][NP1],
  output link_word_t v1_tx_word   [2][NP1],
  output logic       v1_tx_valid  [2][NP1],
  input  logic       v1_tx_ready  [2][NP1],
  input  link_word_t v1_rx_word   [2][NP1],
  input  logic       v1_rx_valid  [2][NP1],
  output logic       v1_rx_ready  [2][NP1],
  input  tg_cfg_t    v1_cfg       [2][NN],
  output tr_stats_t  v1_stats     [2][NN],
  output logic       v1_tg_done   [2][NN],
  output logic [15:0] v1_tg_sent  [2][NN],
  output trace_t     v1_trace     [2][NN],
  output logic [TAW:0] v1_trace_count [2][NN],
  output logic       v1_trace_ovf [2][NN],
  // version 2
  input  logic       v2_link_clk  [2][NP2],
  output link_word_t v2_tx_word   [2][NP2],
  output logic       v2_tx_valid  [2][NP2],
  input  logic       v2_tx_ready  [2][NP2],
  input  link_word_t v2_rx_word   [2][NP2],
  input  logic       v2_rx_valid  [2][NP2],
  output logic       v2_rx_ready  [2][NP2],
  output logic [7:0] v2_bad_chan  [2][NP2],
  input  tg_cfg_t    v2_cfg       [2][NN],
  output tr_stats_t  v2_stats     [2][NN],
  output logic       v2_tg_done   [2][NN],
  output logic [15:0] v2_tg_sent  [2][NN],
  output trace_t     v2_trace     [2][NN],
  output logic [TAW:0] v2_trace_count [2][NN],
  output logic       v2_trace_ovf [2][NN],
  output flit_t      now          [2][2]    // [version][fpga]
);
  logic [7:0] v1_bad_chan_unused [2][NP1];

  for (genvar f = 0; f < 2; f++) begin : g_fpga
    fpga_platform #(
      .X_LO(2 * f), .X_CNT(2), .MESH_Y(DEF_MESH_Y), .N_PL(NP1), .EAST_EDGE(f == 0),
      .BOUND_X(2), .BUF_DEPTH(BUF_DEPTH), .FIFO_DEPTH(FIFO_DEPTH),
      .PKT_FLITS(PKT_FLITS), .TRACE_DEPTH(TRACE_DEPTH)
    ) u_v1 (
      .clk, .rst_n, .link_clk(v1_link_clk[f]), .link_rst_n,
      .link_tx_word(v1_tx_word[f]), .link_tx_valid(v1_tx_valid[f]), .link_tx_ready(v1_tx_ready[f]),
      .link_rx_word(v1_rx_word[f]), .link_rx_valid(v1_rx_valid[f]), .link_rx_ready(v1_rx_ready[f]),
      .bad_chan(v1_bad_chan_unused[f]),
      .clear, .cfg(v1_cfg[f]), .stats(v1_stats[f]), .tg_done(v1_tg_done[f]), .tg_sent(v1_tg_sent[f]),
      .trace_addr, .trace_data(v1_trace[f]), .trace_count(v1_trace_count[f]),
      .trace_overflow(v1_trace_ovf[f]), .now(now[0][f])
    );

    fpga_platform #(
      .X_LO(2 * f), .X_CNT(2), .MESH_Y(DEF_MESH_Y), .N_PL(NP2), .EAST_EDGE(f == 0),
      .BOUND_X(2), .BUF_DEPTH(BUF_DEPTH), .FIFO_DEPTH(FIFO_DEPTH),
      .PKT_FLITS(PKT_FLITS), .TRACE_DEPTH(TRACE_DEPTH)
    ) u_v2 (
      .clk, .rst_n, .link_clk(v2_link_clk[f]), .link_rst_n,
      .link_tx_word(v2_tx_word[f]), .link_tx_valid(v2_tx_valid[f]), .link_tx_ready(v2_tx_ready[f]),
      .link_rx_word(v2_rx_word[f]), .link_rx_valid(v2_rx_valid[f]), .link_rx_ready(v2_rx_ready[f]),
      .bad_chan(v2_bad_chan[f]),
      .clear, .cfg(v2_cfg[f]), .stats(v2_stats[f]), .tg_done(v2_tg_done[f]), .tg_sent(v2_tg_sent[f]),
      .trace_addr, .trace_data(v2_trace[f]), .trace_count(v2_trace_count[f]),
      .trace_overflow(v2_trace_ovf[f]), .now(now[1][f])
    );
  end
endmodule
