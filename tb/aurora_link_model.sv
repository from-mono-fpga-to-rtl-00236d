// aurora_link_model: behavioural model of one direction of a serial inter-board
// link (an Aurora core on a multi-gigabit transceiver), seen from its user
// interface. Not synthesizable; used by testbenches only.
//
// Words offered on tx_* are accepted while fewer than CAP are in flight. A frame
// (the words up to and including one marked eof) reaches the far end INIT_CYCLES
// clock cycles after its first word was accepted or after the previous frame's last
// word would have been delivered, whichever is later; its words then follow at one
// per cycle. rx_valid/rx_ready hand them to the receiving adaptation block; while
// the receiver is not ready the words wait in the model. Both ends share one
// clock. INIT_CYCLES = 24 and one cycle per word are the timings reported for the
// Aurora link of the platform.
module aurora_link_model
  import noc_pkg::*;
#(
  parameter int unsigned INIT_CYCLES = 24,
  parameter int unsigned CAP         = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  link_word_t tx_word,
  input  logic       tx_valid,
  output logic       tx_ready,
  output link_word_t rx_word,
  output logic       rx_valid,
  input  logic       rx_ready
);
  link_word_t  q_w [$];
  longint      q_t [$];
  longint      cyc;
  longint      last_t;
  logic        in_frame;
  int unsigned frames;

  assign tx_ready = (q_w.size() < CAP);
  assign rx_valid = (q_w.size() > 0) && (q_t[0] <= cyc);
  assign rx_word  = (q_w.size() > 0) ? q_w[0] : '0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_w.delete();
      q_t.delete();
      cyc      <= 0;
      last_t   <= 0;
      in_frame <= 1'b0;
      frames   <= 0;
    end else begin
      longint t;
      if (rx_valid && rx_ready) begin
        void'(q_w.pop_front());
        void'(q_t.pop_front());
      end
      if (tx_valid && tx_ready) begin
        if (!in_frame) t = ((cyc > last_t) ? cyc : last_t) + INIT_CYCLES;
        else           t = last_t + 1;
        q_w.push_back(tx_word);
        q_t.push_back(t);
        last_t   <= t;
        in_frame <= !tx_word.eof;
        if (tx_word.eof) frames <= frames + 1;
      end
      cyc <= cyc + 1;
    end
  end
endmodule
