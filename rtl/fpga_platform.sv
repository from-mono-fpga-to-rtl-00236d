// fpga_platform: the part of the emulation platform placed in one FPGA.
//
// It holds the columns X_LO .. X_LO+X_CNT-1 of the MESH_X x MESH_Y Hermes mesh,
// each node with its traffic generator and receptors (emu_node), a free-running
// time base, and the adaptation blocks that join the mesh links cut by the
// partition to the serial link cores. The cut runs between two columns; the cut
// links (one per row, N_IF = MESH_Y) leave from the east ports of the last column
// when EAST_EDGE = 1 and from the west ports of the first column otherwise. With
// N_PL physical links:
//   N_PL >= N_IF: one adaptor1 per cut link; row y uses physical link y.
//   0 < N_PL < N_IF: N_PL adaptor2 blocks, each multiplexing G = ceil(N_IF/N_PL)
//                    consecutive rows (row y on physical link y/G, channel y%G).
//   N_PL = 0: no cut (the whole mesh in one FPGA).
// Mesh edges that lead nowhere are tied off.
//
// Interface: clk/rst_n for the NoC, link_clk[p] for the user side of physical link
// p, and per physical link a valid/ready word stream to (link_tx_*) and from
// (link_rx_*) the serial link core. Per node n = y*X_CNT + (x-X_LO): a generator
// configuration, its statistics, and a trace read port addressed by trace_addr.
// now is the time base; platforms that compare time stamps must be reset together
// and run on the same NoC clock.
// The partition of the 4x3 mesh into two FPGAs of two columns each and the two
// adaptor scenarios follow the platform's description; the row-to-link mapping is
// this design's choice.
module fpga_platform
  import noc_pkg::*;
#(
  parameter int unsigned X_LO        = 0,
  parameter int unsigned X_CNT       = 2,
  parameter int unsigned MESH_Y      = noc_pkg::DEF_MESH_Y,
  parameter int unsigned N_PL        = 3,
  parameter bit          EAST_EDGE   = 1'b1,
  parameter int unsigned BOUND_X     = 2,
  parameter int unsigned BUF_DEPTH   = 16,
  parameter int unsigned FIFO_DEPTH  = 16,
  parameter int unsigned PKT_FLITS   = noc_pkg::DEF_PKT_FLITS,
  parameter int unsigned TRACE_DEPTH = 64,
  localparam int unsigned NN = X_CNT * MESH_Y,
  localparam int unsigned LP = (N_PL > 0) ? N_PL : 1,
  localparam int unsigned TAW = $clog2(TRACE_DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       link_clk      [LP],
  input  logic       link_rst_n,
  output link_word_t link_tx_word  [LP],
  output logic       link_tx_valid [LP],
  input  logic       link_tx_ready [LP],
  input  link_word_t link_rx_word  [LP],
  input  logic       link_rx_valid [LP],
  output logic       link_rx_ready [LP],
  output logic [7:0] bad_chan      [LP],
  input  logic       clear,
  input  tg_cfg_t    cfg           [NN],
  output tr_stats_t  stats         [NN],
  output logic       tg_done       [NN],
  output logic [15:0] tg_sent      [NN],
  input  logic [TAW-1:0] trace_addr,
  output trace_t     trace_data    [NN],
  output logic [TAW:0] trace_count [NN],
  output logic       trace_overflow [NN],
  output flit_t      now
);
  localparam int unsigned N_IF = MESH_Y;
  localparam int unsigned G    = (N_PL > 0 && N_PL < N_IF) ? (N_IF + N_PL - 1) / N_PL : 1;
  localparam int unsigned BCOL = EAST_EDGE ? X_CNT - 1 : 0;
  localparam int unsigned BPORT = EAST_EDGE ? 0 : 1;   // East or West

  // Per node, per mesh port (0..3)
  logic  n_rx [NN][4], n_cr_o [NN][4], n_tx [NN][4], n_cr_i [NN][4];
  flit_t n_di [NN][4], n_do [NN][4];

  // Cut links, one per row: from the mesh (b_*_out) and into it (b_*_in)
  logic  b_tx [N_IF], b_cr_o [N_IF], b_rx [N_IF], b_cr_i [N_IF];
  flit_t b_do [N_IF], b_di [N_IF];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar xi = 0; xi < X_CNT; xi++) begin : g_x
      localparam int unsigned N = y * X_CNT + xi;
      emu_node #(
        .XADDR(X_LO + xi), .YADDR(y), .BUF_DEPTH(BUF_DEPTH), .PKT_FLITS(PKT_FLITS),
        .BOUND_X(BOUND_X), .TRACE_DEPTH(TRACE_DEPTH)
      ) u_node (
        .clk, .rst_n, .now, .clear, .cfg(cfg[N]),
        .rx(n_rx[N]), .data_in(n_di[N]), .credit_o(n_cr_o[N]),
        .tx(n_tx[N]), .data_out(n_do[N]), .credit_i(n_cr_i[N]),
        .stats(stats[N]), .tg_done(tg_done[N]), .tg_sent(tg_sent[N]),
        .trace_addr, .trace_data(trace_data[N]), .trace_count(trace_count[N]),
        .trace_overflow(trace_overflow[N])
      );

      // East (0) / West (1)
      if (xi + 1 < X_CNT) begin : g_east
        assign n_rx[N][0]   = n_tx[N+1][1];
        assign n_di[N][0]   = n_do[N+1][1];
        assign n_cr_i[N][0] = n_cr_o[N+1][1];
      end else if (N_PL > 0 && EAST_EDGE) begin : g_east_cut
        assign n_rx[N][0]   = b_rx[y];
        assign n_di[N][0]   = b_di[y];
        assign n_cr_i[N][0] = b_cr_i[y];
      end else begin : g_east_edge
        assign n_rx[N][0]   = 1'b0;
        assign n_di[N][0]   = '0;
        assign n_cr_i[N][0] = 1'b0;
      end
      if (xi > 0) begin : g_west
        assign n_rx[N][1]   = n_tx[N-1][0];
        assign n_di[N][1]   = n_do[N-1][0];
        assign n_cr_i[N][1] = n_cr_o[N-1][0];
      end else if (N_PL > 0 && !EAST_EDGE) begin : g_west_cut
        assign n_rx[N][1]   = b_rx[y];
        assign n_di[N][1]   = b_di[y];
        assign n_cr_i[N][1] = b_cr_i[y];
      end else begin : g_west_edge
        assign n_rx[N][1]   = 1'b0;
        assign n_di[N][1]   = '0;
        assign n_cr_i[N][1] = 1'b0;
      end
      // North (2) / South (3)
      if (y + 1 < MESH_Y) begin : g_north
        assign n_rx[N][2]   = n_tx[N+X_CNT][3];
        assign n_di[N][2]   = n_do[N+X_CNT][3];
        assign n_cr_i[N][2] = n_cr_o[N+X_CNT][3];
      end else begin : g_north_edge
        assign n_rx[N][2]   = 1'b0;
        assign n_di[N][2]   = '0;
        assign n_cr_i[N][2] = 1'b0;
      end
      if (y > 0) begin : g_south
        assign n_rx[N][3]   = n_tx[N-X_CNT][2];
        assign n_di[N][3]   = n_do[N-X_CNT][2];
        assign n_cr_i[N][3] = n_cr_o[N-X_CNT][2];
      end else begin : g_south_edge
        assign n_rx[N][3]   = 1'b0;
        assign n_di[N][3]   = '0;
        assign n_cr_i[N][3] = 1'b0;
      end
    end

    // Boundary switch of this row, seen from the adaptation blocks
    assign b_tx[y]   = n_tx[y*X_CNT + BCOL][BPORT];
    assign b_do[y]   = n_do[y*X_CNT + BCOL][BPORT];
    assign b_cr_o[y] = n_cr_o[y*X_CNT + BCOL][BPORT];
  end

  if (N_PL == 0) begin : g_mono
    for (genvar y = 0; y < N_IF; y++) begin : g_tie
      assign b_rx[y]   = 1'b0;
      assign b_di[y]   = '0;
      assign b_cr_i[y] = 1'b0;
    end
    assign link_tx_word[0]  = '0;
    assign link_tx_valid[0] = 1'b0;
    assign link_rx_ready[0] = 1'b1;
    assign bad_chan[0]      = '0;
  end else if (N_PL >= N_IF) begin : g_scn1
    for (genvar y = 0; y < N_IF; y++) begin : g_ad
      adaptor1 #(.DEPTH(FIFO_DEPTH), .CHAN(0)) u_ad1 (
        .clk, .rst_n, .link_clk(link_clk[y]), .link_rst_n,
        .rx(b_tx[y]), .data_in(b_do[y]), .credit_o(b_cr_i[y]),
        .tx(b_rx[y]), .data_out(b_di[y]), .credit_i(b_cr_o[y]),
        .link_tx_word(link_tx_word[y]), .link_tx_valid(link_tx_valid[y]),
        .link_tx_ready(link_tx_ready[y]),
        .link_rx_word(link_rx_word[y]), .link_rx_valid(link_rx_valid[y]),
        .link_rx_ready(link_rx_ready[y])
      );
      assign bad_chan[y] = '0;
    end
    for (genvar p = N_IF; p < LP; p++) begin : g_unused
      assign link_tx_word[p]  = '0;
      assign link_tx_valid[p] = 1'b0;
      assign link_rx_ready[p] = 1'b1;
      assign bad_chan[p]      = '0;
    end
  end else begin : g_scn2
    for (genvar p = 0; p < N_PL; p++) begin : g_ad
      logic  a_rx [G], a_cr_o [G], a_tx [G], a_cr_i [G];
      flit_t a_di [G], a_do [G];
      for (genvar c = 0; c < G; c++) begin : g_ch
        if (p * G + c < N_IF) begin : g_used
          assign a_rx[c]          = b_tx[p*G+c];
          assign a_di[c]          = b_do[p*G+c];
          assign b_cr_i[p*G+c]    = a_cr_o[c];
          assign b_rx[p*G+c]      = a_tx[c];
          assign b_di[p*G+c]      = a_do[c];
          assign a_cr_i[c]        = b_cr_o[p*G+c];
        end else begin : g_spare
          assign a_rx[c]   = 1'b0;
          assign a_di[c]   = '0;
          assign a_cr_i[c] = 1'b0;
        end
      end
      adaptor2 #(.N(G), .DEPTH(FIFO_DEPTH)) u_ad2 (
        .clk, .rst_n, .link_clk(link_clk[p]), .link_rst_n,
        .rx(a_rx), .data_in(a_di), .credit_o(a_cr_o),
        .tx(a_tx), .data_out(a_do), .credit_i(a_cr_i),
        .link_tx_word(link_tx_word[p]), .link_tx_valid(link_tx_valid[p]),
        .link_tx_ready(link_tx_ready[p]),
        .link_rx_word(link_rx_word[p]), .link_rx_valid(link_rx_valid[p]),
        .link_rx_ready(link_rx_ready[p]), .bad_chan(bad_chan[p])
      );
    end
  end
endmodule
