// link_mux: the Multiplexing block of Adaptor 2.
//
// Several FIFO-Outs share one physical link. The multiplexer grants the link to one
// input at a time, round-robin, for a whole packet: once the first word of a packet
// has been sent it keeps the same input until the word marked eof has gone, so the
// packets of different inter-FPGA links never interleave on the link. Each word is
// sent with the number of its input in its chan field, which the de-multiplexer on
// the other board uses.
//
// Inputs and output are valid/ready word streams on the link clock. The selection
// is combinational, so an idle multiplexer forwards a waiting word in the same
// cycle. Packet-granular round-robin and the chan field are this design's choices.
module link_mux
  import noc_pkg::*;
#(
  parameter int unsigned N = 3
) (
  input  logic       clk,
  input  logic       rst_n,
  input  link_word_t in_word  [N],
  input  logic       in_valid [N],
  output logic       in_ready [N],
  output link_word_t out_word,
  output logic       out_valid,
  input  logic       out_ready
);
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1;

  logic          locked;
  logic [SW-1:0] cur, last, sel;
  logic          any;

  always_comb begin
    any = 1'b0;
    sel = cur;
    if (!locked) begin
      for (int k = 1; k <= N; k++) begin
        if (!any && in_valid[(int'(last) + k) % N]) begin
          any = 1'b1;
          sel = SW'((int'(last) + k) % N);
        end
      end
    end
    out_valid     = in_valid[sel];
    out_word      = in_word[sel];
    out_word.chan = CHAN_W'(sel);
    for (int i = 0; i < N; i++) in_ready[i] = out_ready && (SW'(i) == sel);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked <= 1'b0;
      cur    <= '0;
      last   <= SW'(N - 1);
    end else if (out_valid && out_ready) begin
      if (in_word[sel].eof) begin
        locked <= 1'b0;
        last   <= sel;
      end else begin
        locked <= 1'b1;
        cur    <= sel;
      end
    end
  end
endmodule
