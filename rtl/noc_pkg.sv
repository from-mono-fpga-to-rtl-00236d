// noc_pkg: types and constants shared by the multi-FPGA Hermes emulation platform.
//
// Flits are FLIT_W bits wide. A packet is a header flit (target address, X in the
// upper half, Y in the lower half), a size flit (number of payload flits) and the
// payload. Packets made by the traffic generators carry in their payload, in this
// order: source address, creation time stamp, {injection rate, inter-FPGA links
// crossed}, sequence number, then filler flits. The 4x3 mesh, the 15-flit packet,
// the 50-packet run and the inter-FPGA timing figures (24 cycles of Aurora
// initialisation, 2 control cycles per FIFO) are the figures used for the platform's
// evaluation; the flit width, buffer depth and field layout are this design's choices.
package noc_pkg;

  parameter int unsigned FLIT_W    = 16;   // Hermes default flit width
  parameter int unsigned HALF_W    = FLIT_W / 2;
  parameter int unsigned DEF_MESH_X    = 4;    // 4*3 mesh
  parameter int unsigned DEF_MESH_Y    = 3;
  parameter int unsigned DEF_PKT_FLITS = 15;   // flits per packet, header and size included
  parameter int unsigned DEF_N_PACKETS = 50;   // packets sent per run
  parameter int unsigned CHAN_W    = 4;    // channel number carried on a physical link

  // Inter-FPGA overhead removed from measured latencies
  parameter int unsigned T_AURORA_INIT = 24; // cycles per packet, plus 1 per flit
  parameter int unsigned T_FIFO_CTRL   = 2;  // cycles per FIFO, plus 1 per flit

  typedef logic [FLIT_W-1:0] flit_t;

  // Switch port numbering (Hermes order)
  typedef enum logic [2:0] {
    P_EAST  = 3'd0,
    P_WEST  = 3'd1,
    P_NORTH = 3'd2,
    P_SOUTH = 3'd3,
    P_LOCAL = 3'd4
  } port_e;
  parameter int unsigned N_PORTS = 5;

  // Word exchanged with the serial link core's user interface
  typedef struct packed {
    logic [CHAN_W-1:0] chan;   // inter-FPGA link the packet belongs to
    logic              eof;    // last flit of the packet
    flit_t             flit;
  } link_word_t;

  // Run-time configuration of one traffic generator
  typedef struct packed {
    logic        start;    // rising edge starts a run
    logic        sweep;    // 1: rate swept 10%..100% in 10% steps; 0: constant rate
    logic        stoch;    // 1: random intervals between packets, same mean rate
    logic [6:0]  rate;     // constant injection rate in percent (0..100)
    flit_t       dest;     // destination address {x, y}
    logic [15:0] npkts;    // packets per rate step
  } tg_cfg_t;

  // Results of one statistics traffic receptor
  typedef struct packed {
    logic [31:0] pkts;          // packets received
    logic [31:0] flits;         // flits received
    logic [31:0] lat_sum;       // sum of packet latencies
    logic [31:0] lat_comp_sum;  // same, with inter-FPGA overhead removed
    logic [15:0] lat_min;
    logic [15:0] lat_max;
    logic [15:0] errors;        // wrong target, bad filler, bad size
  } tr_stats_t;

  // One record of the trace traffic receptor
  typedef struct packed {
    flit_t      src;
    logic [7:0] seq;
    logic [7:0] rate;
    logic [7:0] ncross;
    flit_t      t_sent;
    flit_t      t_recv;
  } trace_t;

  function automatic flit_t make_addr(input int unsigned x, input int unsigned y);
    return flit_t'({HALF_W'(x), HALF_W'(y)});
  endfunction

  // Filler flit k of a packet with sequence number s
  function automatic flit_t filler(input logic [7:0] s, input logic [7:0] k);
    return {s, k} ^ 16'hA5C3;
  endfunction

  // Extra latency of one inter-FPGA crossing for a packet of n flits
  function automatic logic [15:0] cross_overhead(input logic [15:0] n);
    return 16'(T_AURORA_INIT + 2 * T_FIFO_CTRL) + 16'(3) * n;
  endfunction

endpackage
