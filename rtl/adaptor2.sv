// adaptor2: adaptation block for N inter-FPGA links sharing one physical link
// (the case where there are fewer physical links than inter-FPGA links).
//
// Each inter-FPGA link has a FIFO-Out and a FIFO-In, as in adaptor1. The FIFO-Outs
// feed a packet-granular multiplexer (link_mux) that drives the serial link core's
// transmit interface and tags every word with its link number; the receive
// interface feeds a de-multiplexer (link_demux) that returns every word to the
// FIFO-In of its link. Because a FIFO-Out only offers a packet once it holds all of
// it, a packet occupies the shared link for exactly its length.
//
// NoC side: one rx/data_in/credit_o and tx/data_out/credit_i group per inter-FPGA
// link, on the NoC clock. Link side: valid/ready word streams on the link clock.
// The structure (FIFOs, multiplexing, de-multiplexing) follows the platform's
// Adaptor 2; the channel tag and round-robin order are this design's choices.
module adaptor2
  import noc_pkg::*;
#(
  parameter int unsigned N     = 3,
  parameter int unsigned DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       link_clk,
  input  logic       link_rst_n,
  // NoC side, one group per inter-FPGA link
  input  logic       rx       [N],
  input  flit_t      data_in  [N],
  output logic       credit_o [N],
  output logic       tx       [N],
  output flit_t      data_out [N],
  input  logic       credit_i [N],
  // serial link side
  output link_word_t link_tx_word,
  output logic       link_tx_valid,
  input  logic       link_tx_ready,
  input  link_word_t link_rx_word,
  input  logic       link_rx_valid,
  output logic       link_rx_ready,
  output logic [7:0] bad_chan
);
  link_word_t fo_word  [N];
  logic       fo_valid [N];
  logic       fo_ready [N];
  link_word_t fi_word  [N];
  logic       fi_valid [N];
  logic       fi_ready [N];

  for (genvar i = 0; i < N; i++) begin : g_ch
    logic eop_in, out_full, in_full, in_valid, in_eop_unused;

    pkt_tracker u_trk (.clk, .rst_n, .valid(rx[i]), .flit(data_in[i]), .eop(eop_in));

    pkt_fifo #(.DEPTH(DEPTH)) u_fifo_out (
      .wclk(clk), .wrst_n(rst_n), .wr_en(rx[i]), .wr_flit(data_in[i]), .wr_eop(eop_in),
      .wfull(out_full),
      .rclk(link_clk), .rrst_n(link_rst_n), .rd_en(fo_ready[i]), .rvalid(fo_valid[i]),
      .rd_flit(fo_word[i].flit), .rd_eop(fo_word[i].eof)
    );
    assign fo_word[i].chan = CHAN_W'(i);
    assign credit_o[i] = !out_full;

    pkt_fifo #(.DEPTH(DEPTH)) u_fifo_in (
      .wclk(link_clk), .wrst_n(link_rst_n), .wr_en(fi_valid[i] && !in_full),
      .wr_flit(fi_word[i].flit), .wr_eop(fi_word[i].eof), .wfull(in_full),
      .rclk(clk), .rrst_n(rst_n), .rd_en(credit_i[i]), .rvalid(in_valid),
      .rd_flit(data_out[i]), .rd_eop(in_eop_unused)
    );
    assign fi_ready[i] = !in_full;
    assign tx[i] = in_valid && credit_i[i];
  end

  link_mux #(.N(N)) u_mux (
    .clk(link_clk), .rst_n(link_rst_n),
    .in_word(fo_word), .in_valid(fo_valid), .in_ready(fo_ready),
    .out_word(link_tx_word), .out_valid(link_tx_valid), .out_ready(link_tx_ready)
  );

  link_demux #(.N(N)) u_demux (
    .clk(link_clk), .rst_n(link_rst_n),
    .in_word(link_rx_word), .in_valid(link_rx_valid), .in_ready(link_rx_ready),
    .out_word(fi_word), .out_valid(fi_valid), .out_ready(fi_ready),
    .bad_chan
  );
endmodule
