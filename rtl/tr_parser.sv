// tr_parser: packet decoder shared by the two traffic receptors.
//
// It follows the flits that the switch's local port delivers (one per cycle in
// which rx is high), checks the header against the node's own address, the
// filler flits against their expected values and the size flit against the
// minimum packet, and collects the payload fields. In the cycle after the last
// flit of a packet it raises done for one cycle with the packet's record (rec, the
// receive time being the value of now when the last flit arrived), its length in
// flits and an error flag. Latency is therefore measured from the creation time
// stamp to the arrival of the last flit. The packet layout is the one made by
// traffic_generator.
module tr_parser
  import noc_pkg::*;
#(
  parameter int unsigned XADDR = 0,
  parameter int unsigned YADDR = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx,
  input  flit_t      data_in,
  input  flit_t      now,
  output logic       done,
  output trace_t     rec,
  output flit_t      nflits,
  output logic       err
);
  typedef enum logic [1:0] {R_HDR, R_SIZE, R_PAY} rphase_e;

  rphase_e ph;
  flit_t   size, rem, k;
  logic    bad;
  trace_t  cur;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph     <= R_HDR;
      size   <= '0;
      rem    <= '0;
      k      <= '0;
      bad    <= 1'b0;
      cur    <= '0;
      done   <= 1'b0;
      rec    <= '0;
      nflits <= '0;
      err    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (rx) begin
        unique case (ph)
          R_HDR: begin
            bad <= (data_in != make_addr(XADDR, YADDR));
            cur <= '0;
            ph  <= R_SIZE;
          end
          R_SIZE: begin
            size <= data_in;
            rem  <= data_in;
            k    <= '0;
            if (data_in == '0) begin
              // empty packet: nothing to time
              done   <= 1'b1;
              rec    <= '0;
              nflits <= flit_t'(2);
              err    <= 1'b1;
              ph     <= R_HDR;
            end else begin
              ph <= R_PAY;
            end
          end
          default: begin
            unique case (k)
              flit_t'(0): cur.src    <= data_in;
              flit_t'(1): cur.t_sent <= data_in;
              flit_t'(2): {cur.rate, cur.ncross} <= data_in;
              flit_t'(3): cur.seq    <= data_in[7:0];
              default: if (data_in != filler(cur.seq, 8'(k + flit_t'(2)))) bad <= 1'b1;
            endcase
            k   <= k + 1'b1;
            rem <= rem - 1'b1;
            if (rem == flit_t'(1)) begin
              done        <= 1'b1;
              rec         <= cur;
              rec.t_recv  <= now;
              if (k == flit_t'(0)) rec.src <= data_in;
              if (k == flit_t'(1)) rec.t_sent <= data_in;
              if (k == flit_t'(2)) {rec.rate, rec.ncross} <= data_in;
              if (k == flit_t'(3)) rec.seq <= data_in[7:0];
              nflits      <= size + flit_t'(2);
              err         <= bad || (size < flit_t'(4))
                             || (k >= flit_t'(4) && data_in != filler(cur.seq, 8'(k + flit_t'(2))));
              ph          <= R_HDR;
            end
          end
        endcase
      end
    end
  end
endmodule
