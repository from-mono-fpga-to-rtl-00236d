// link_demux: the De-Multiplexing block of Adaptor 2.
//
// Words arriving from one physical link are steered to the FIFO-In of the
// inter-FPGA link named by their chan field. The link is stalled (in_ready low)
// while that FIFO-In cannot take the word. A word whose chan names no output is
// dropped and counted in bad_chan, so a wrong channel can neither block the link
// nor corrupt another link's packets.
//
// Valid/ready word streams on the link clock; steering is combinational. Steering
// by a channel field carried with each word is this design's choice.
module link_demux
  import noc_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  link_word_t in_word,
  input  logic       in_valid,
  output logic       in_ready,
  output link_word_t out_word  [N],
  output logic       out_valid [N],
  input  logic       out_ready [N],
  output logic [7:0] bad_chan
);
  logic known;

  always_comb begin
    known    = 1'b0;
    in_ready = 1'b1;
    for (int i = 0; i < N; i++) begin
      out_word[i]  = in_word;
      out_valid[i] = in_valid && (in_word.chan == CHAN_W'(i));
      if (in_word.chan == CHAN_W'(i)) begin
        known    = 1'b1;
        in_ready = out_ready[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) bad_chan <= '0;
    else if (in_valid && !known && bad_chan != 8'hFF) bad_chan <= bad_chan + 1'b1;
  end
endmodule
