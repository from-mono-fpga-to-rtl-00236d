// tr_stats: statistics traffic receptor.
//
// Receives every packet delivered to its node and keeps running totals: packets,
// flits, the sum, minimum and maximum of packet latencies, and the number of
// packets found wrong (addressed to another node, too short, or with bad filler).
// It also keeps a second latency sum from which the cost of crossing FPGAs has been
// removed: for each inter-FPGA link the packet crossed (a number the packet
// carries), 24 cycles of serial-link initialisation, 2 control cycles for each of
// the two FIFOs and one cycle per flit in each of the three stages are subtracted.
// This gives an estimate of the latency the same traffic would see on a single
// FPGA. Average latency is lat_sum / pkts, computed by the reader of the results.
//
// Interface: rx/data_in from the switch's local port (the receptor always accepts,
// so the switch's credit is tied high outside), now is the time base, clear zeroes
// the totals. Results update at the second clock edge after the one
// that took a packet's last flit. The overhead
// figures follow the platform's evaluation; accumulating them this way is this
// design's choice.
module tr_stats
  import noc_pkg::*;
#(
  parameter int unsigned XADDR = 0,
  parameter int unsigned YADDR = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      rx,
  input  flit_t     data_in,
  input  flit_t     now,
  output tr_stats_t stats
);
  logic   done, err;
  trace_t rec;
  flit_t  nflits;
  flit_t  lat, ovh, comp;

  tr_parser #(.XADDR(XADDR), .YADDR(YADDR)) u_parse (
    .clk, .rst_n, .rx, .data_in, .now, .done, .rec, .nflits, .err
  );

  assign lat  = rec.t_recv - rec.t_sent;
  assign ovh  = flit_t'(rec.ncross) * cross_overhead(nflits);
  assign comp = (lat > ovh) ? lat - ovh : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stats <= '0;
      stats.lat_min <= '1;
    end else if (clear) begin
      stats <= '0;
      stats.lat_min <= '1;
    end else if (done) begin
      if (err) begin
        stats.errors <= stats.errors + 1'b1;
      end else begin
        stats.pkts         <= stats.pkts + 1'b1;
        stats.flits        <= stats.flits + 32'(nflits);
        stats.lat_sum      <= stats.lat_sum + 32'(lat);
        stats.lat_comp_sum <= stats.lat_comp_sum + 32'(comp);
        if (lat < stats.lat_min) stats.lat_min <= lat;
        if (lat > stats.lat_max) stats.lat_max <= lat;
      end
    end
  end
endmodule
