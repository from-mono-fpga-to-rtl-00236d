// tr_pkt_driver: testbench helper that feeds packets, in the layout made by the
// traffic generators, into a traffic receptor, one flit per cycle. For each packet
// it reports the value of the time base when its last flit was presented, so the
// testbench can work out the expected latency.
module tr_pkt_driver
  import noc_pkg::*;
(
  input  logic  clk,
  input  flit_t now,
  output logic  rx,
  output flit_t data
);
  initial begin
    rx = 1'b0;
    data = '0;
  end

  // kind: 0 good, 1 wrong target, 2 bad filler
  task automatic send(input flit_t target, input flit_t src, input int age, input int rate,
                      input int ncross, input int seq, input int pf, input int kind,
                      output flit_t t_sent, output flit_t t_last);
    flit_t f;
    t_sent = now - flit_t'(age);
    for (int k = 0; k < pf; k++) begin
      case (k)
        0: f = (kind == 1) ? target + 16'h0100 : target;
        1: f = flit_t'(pf - 2);
        2: f = src;
        3: f = t_sent;
        4: f = {1'b0, 7'(rate), 8'(ncross)};
        5: f = flit_t'(seq);
        default: f = filler(8'(seq), 8'(k)) ^ ((kind == 2 && k == pf - 2) ? 16'h0001 : 16'h0000);
      endcase
      @(negedge clk);
      rx = 1'b1;
      data = f;
      if (k == pf - 1) t_last = now;
    end
    @(negedge clk);
    rx = 1'b0;
  endtask
endmodule
