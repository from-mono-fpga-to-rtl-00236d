// pkt_fifo: dual-clock FIFO that holds one packet (the FIFO-Out and FIFO-In of the
// adaptation blocks).
//
// It sits between the NoC clock and the serial link's user clock, so it both adapts
// the two frequencies and stores a packet whole before passing it on
// (store-and-forward). Each entry is a flit and its end-of-packet mark. Write and
// read pointers cross the clock boundary as Gray codes through two-flop
// synchronisers, and so does a count of packets written, so the read side sees
// when a packet is complete. The read side offers a flit (rvalid) when the FIFO
// holds a complete packet, when a packet is already being read out, or when the
// FIFO is full (a packet longer than DEPTH then passes cut-through instead of
// blocking).
//
// Write side (wclk): wr_en writes wr_flit/wr_eop; it must be low while wfull.
// Read side (rclk): rd_flit/rd_eop show the oldest entry; rd_en pops it when rvalid.
// Timing: a packet's last flit becomes visible to the read side two to three read
// clock cycles after it is written (the synchroniser), then flits leave at one per
// read clock. That a FIFO stores one packet and adapts frequencies follows the
// platform's description; the Gray-code construction and the full-FIFO fallback are
// this design's choices.
module pkt_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 16   // one packet of up to 16 flits
) (
  input  logic  wclk,
  input  logic  wrst_n,
  input  logic  wr_en,
  input  flit_t wr_flit,
  input  logic  wr_eop,
  output logic  wfull,

  input  logic  rclk,
  input  logic  rrst_n,
  input  logic  rd_en,
  output logic  rvalid,
  output flit_t rd_flit,
  output logic  rd_eop
);
  localparam int unsigned AW = $clog2(DEPTH);

  typedef logic [AW:0] ptr_t;

  function automatic ptr_t bin2gray(input ptr_t b);
    return b ^ (b >> 1);
  endfunction
  function automatic ptr_t gray2bin(input ptr_t g);
    ptr_t b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  logic [FLIT_W:0] mem [DEPTH];

  // Write domain
  ptr_t wbin, wgray, wpkt, wpkt_gray;
  ptr_t rgray_w1, rgray_w2;
  // Read domain
  ptr_t rbin, rgray, rpkt, rpkt_gray;
  ptr_t wgray_r1, wgray_r2, wpkt_r1, wpkt_r2;
  logic in_pkt;

  // ---------------- write side ----------------
  assign wfull = (wgray == {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin      <= '0;
      wgray     <= '0;
      wpkt      <= '0;
      wpkt_gray <= '0;
      rgray_w1  <= '0;
      rgray_w2  <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr_en && !wfull) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
        if (wr_eop) begin
          wpkt      <= wpkt + 1'b1;
          wpkt_gray <= bin2gray(wpkt + 1'b1);
        end
      end
    end
  end

  always_ff @(posedge wclk) begin
    if (wr_en && !wfull) mem[wbin[AW-1:0]] <= {wr_eop, wr_flit};
  end

  // ---------------- read side ----------------
  ptr_t rcount;
  logic rempty, rfull, pkt_ready;
  assign rcount    = gray2bin(wgray_r2) - rbin;
  assign rempty    = (wgray_r2 == rgray);
  assign rfull     = (rcount == ptr_t'(DEPTH));
  assign pkt_ready = (wpkt_r2 != rpkt_gray);
  assign rvalid    = !rempty && (in_pkt || pkt_ready || rfull);
  assign {rd_eop, rd_flit} = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin      <= '0;
      rgray     <= '0;
      rpkt      <= '0;
      rpkt_gray <= '0;
      wgray_r1  <= '0;
      wgray_r2  <= '0;
      wpkt_r1   <= '0;
      wpkt_r2   <= '0;
      in_pkt    <= 1'b0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      wpkt_r1  <= wpkt_gray;
      wpkt_r2  <= wpkt_r1;
      if (rd_en && rvalid) begin
        rbin   <= rbin + 1'b1;
        rgray  <= bin2gray(rbin + 1'b1);
        in_pkt <= !rd_eop;
        if (rd_eop) begin
          rpkt      <= rpkt + 1'b1;
          rpkt_gray <= bin2gray(rpkt + 1'b1);
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge wclk) disable iff (!wrst_n) wr_en |-> !wfull);
endmodule
