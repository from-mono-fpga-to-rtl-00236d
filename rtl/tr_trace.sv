// tr_trace: trace traffic receptor.
//
// Receives every packet delivered to its node and writes one record per packet
// into a memory of DEPTH entries: source address, sequence number, injection rate,
// inter-FPGA links crossed, creation time and arrival time of the last flit. With
// these records the latency of each packet, and its dependence on the injection
// rate of a sweep, can be read out after a run. When the memory is full further
// packets are not recorded and overflow is set.
//
// Interface: rx/data_in from the switch's local port (always accepted), now is the
// time base, clear empties the memory; rd_addr/rd_data is an asynchronous read port
// for reading the records out, count tells how many are valid. A record is written
// at the second clock edge after the one that took the packet's last flit.
// That a trace receptor exists follows the platform's description; the record
// layout and depth are this design's choices.
module tr_trace
  import noc_pkg::*;
#(
  parameter int unsigned XADDR = 0,
  parameter int unsigned YADDR = 0,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     rx,
  input  flit_t                    data_in,
  input  flit_t                    now,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output trace_t                   rd_data,
  output logic [$clog2(DEPTH):0]   count,
  output logic                     overflow
);
  logic   done, err;
  trace_t rec;
  flit_t  nflits;
  trace_t mem [DEPTH];

  tr_parser #(.XADDR(XADDR), .YADDR(YADDR)) u_parse (
    .clk, .rst_n, .rx, .data_in, .now, .done, .rec, .nflits, .err
  );

  assign rd_data = mem[rd_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (done) begin
      if (count == ($clog2(DEPTH)+1)'(DEPTH)) overflow <= 1'b1;
      else                                    count    <= count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (done && count != ($clog2(DEPTH)+1)'(DEPTH)) mem[count[$clog2(DEPTH)-1:0]] <= rec;
  end
endmodule
