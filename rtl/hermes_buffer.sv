// hermes_buffer: input buffer of one Hermes switch port.
//
// A synchronous circular FIFO of DEPTH flits. It accepts a flit in every cycle in
// which rx is high; credit_o is high while a free slot exists, so the sender only
// raises rx when it saw credit_o (credit-based flow control, one of the two Hermes
// flow-control options; this design uses it throughout). The flit at the head is
// visible combinationally on head while empty is low, and leaves on pop. Reset
// empties the buffer. The depth is this design's choice.
module hermes_buffer
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rx,
  input  flit_t data_in,
  output logic  credit_o,
  output flit_t head,
  output logic  empty,
  input  logic  pop
);
  localparam int unsigned AW = $clog2(DEPTH);

  flit_t          mem [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [AW:0]    count;

  assign empty    = (count == '0);
  assign credit_o = (count != (AW+1)'(DEPTH));
  assign head     = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (rx) begin
        wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (pop) begin
        rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      end
      count <= count + (AW+1)'(rx) - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (rx) mem[wp] <= data_in;
  end

  // The sender must respect the credit, and nobody pops an empty buffer.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) rx |-> credit_o);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
