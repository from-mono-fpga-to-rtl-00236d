// adaptor1: adaptation block for one inter-FPGA link on its own physical link
// (the case where there are at least as many physical links as inter-FPGA links).
//
// It holds two packet FIFOs. FIFO-Out takes the flits that the boundary switch
// sends toward the other FPGA (NoC clock), marks the last flit of each packet and
// hands whole packets to the serial link core's transmit interface (link clock).
// FIFO-In takes words from the core's receive interface (link clock) and hands
// them to the boundary switch (NoC clock) under its credit.
//
// NoC side: rx/data_in/credit_o from the switch, tx/data_out/credit_i to it.
// Link side: link_tx_* and link_rx_* are valid/ready word streams; every word
// carries the channel number CHAN and an end-of-frame mark.
// Timing: see pkt_fifo; each FIFO adds about two control cycles plus one cycle per
// flit. The two FIFOs follow the platform's Adaptor 1; the valid/ready link
// interface and the channel field are this design's choices.
module adaptor1
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned CHAN  = 0
) (
  input  logic       clk,        // NoC clock
  input  logic       rst_n,
  input  logic       link_clk,   // user clock of the serial link core
  input  logic       link_rst_n,
  // NoC side
  input  logic       rx,
  input  flit_t      data_in,
  output logic       credit_o,
  output logic       tx,
  output flit_t      data_out,
  input  logic       credit_i,
  // serial link side
  output link_word_t link_tx_word,
  output logic       link_tx_valid,
  input  logic       link_tx_ready,
  input  link_word_t link_rx_word,
  input  logic       link_rx_valid,
  output logic       link_rx_ready
);
  logic eop_in, out_full, in_full, in_valid, in_eop_unused;

  pkt_tracker u_trk (.clk, .rst_n, .valid(rx), .flit(data_in), .eop(eop_in));

  pkt_fifo #(.DEPTH(DEPTH)) u_fifo_out (
    .wclk(clk), .wrst_n(rst_n), .wr_en(rx), .wr_flit(data_in), .wr_eop(eop_in), .wfull(out_full),
    .rclk(link_clk), .rrst_n(link_rst_n), .rd_en(link_tx_ready), .rvalid(link_tx_valid),
    .rd_flit(link_tx_word.flit), .rd_eop(link_tx_word.eof)
  );
  assign link_tx_word.chan = CHAN_W'(CHAN);
  assign credit_o = !out_full;

  pkt_fifo #(.DEPTH(DEPTH)) u_fifo_in (
    .wclk(link_clk), .wrst_n(link_rst_n), .wr_en(link_rx_valid && !in_full),
    .wr_flit(link_rx_word.flit), .wr_eop(link_rx_word.eof), .wfull(in_full),
    .rclk(clk), .rrst_n(rst_n), .rd_en(credit_i), .rvalid(in_valid),
    .rd_flit(data_out), .rd_eop(in_eop_unused)
  );
  assign link_rx_ready = !in_full;
  assign tx = in_valid && credit_i;
endmodule
