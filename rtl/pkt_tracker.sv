// pkt_tracker: finds the last flit of each packet in a flit stream.
//
// It follows the packet format (header, size flit, then as many payload flits as
// the size says) and raises eop, combinationally, on the flit of the stream that
// ends a packet. valid marks the cycles in which a flit moves. Reset places it
// before a header. Used where packet-level framing is needed but the NoC carries
// no end-of-packet wire: at the input of each FIFO-Out of the adaptation blocks.
module pkt_tracker
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  valid,
  input  flit_t flit,
  output logic  eop
);
  typedef enum logic [1:0] {T_HDR, T_SIZE, T_PAY} tphase_e;
  tphase_e ph;
  flit_t   rem;

  always_comb begin
    eop = 1'b0;
    if (valid) begin
      if (ph == T_SIZE && flit == '0)      eop = 1'b1;
      else if (ph == T_PAY && rem == flit_t'(1)) eop = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph  <= T_HDR;
      rem <= '0;
    end else if (valid) begin
      unique case (ph)
        T_HDR:  ph <= T_SIZE;
        T_SIZE: begin
          rem <= flit;
          ph  <= (flit == '0) ? T_HDR : T_PAY;
        end
        default: begin
          rem <= rem - 1'b1;
          if (rem == flit_t'(1)) ph <= T_HDR;
        end
      endcase
    end
  end
endmodule
