// pkt_queue: dual-clock FIFO that sits between a port and the pipeline.
//
// Every port (four 10GbE MACs and the DMA engine) runs in its own clock
// domain; one RX queue per port carries its beats into the pipeline clock and
// one TX queue per port carries them back out. That the queues are FIFOs
// which bridge the port clocks is the document's; the construction below is
// this design's: a memory of 2**ADDR_W words, binary read and write pointers
// one bit wider than the address, exchanged between the domains in Gray code
// through two-flop synchronisers.
//
// The word type T defaults to one port beat (256 data bits, keep, last) and
// the default depth of 64 beats holds one 1500-byte packet (47 beats) with
// room to spare; both are this design's choices.
//
// Interface: valid/ready on both sides. wr_ready is low when the queue is
// full, rd_valid is high when it holds at least one word. rd_data is the head
// word (first-word fall-through). A word written is visible to the reader
// three to four read-clock edges later; space freed by a read is seen by the
// writer three to four write-clock edges later.
// Each side has its own active-low reset, synchronous to its own clock; both
// must be asserted together for the queue to start empty.
module pkt_queue #(
  parameter type         T      = nic_pkg::axis_beat_t,
  parameter int unsigned ADDR_W = 6
) (
  input  logic         wr_clk,
  input  logic         wr_rst_n,
  input  logic         wr_valid,
  output logic         wr_ready,
  input  T             wr_data,

  input  logic         rd_clk,
  input  logic         rd_rst_n,
  output logic         rd_valid,
  input  logic         rd_ready,
  output T             rd_data
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  T mem [DEPTH];

  logic [ADDR_W:0] wr_bin, wr_gray, rd_bin, rd_gray;
  logic [ADDR_W:0] rd_gray_s1, rd_gray_s2;  // read pointer in write domain
  logic [ADDR_W:0] wr_gray_s1, wr_gray_s2;  // write pointer in read domain

  function automatic logic [ADDR_W:0] bin2gray(input logic [ADDR_W:0] b);
    return b ^ (b >> 1);
  endfunction

  // ------------------------------------------------------------ write side
  logic full;
  assign full     = wr_gray == {~rd_gray_s2[ADDR_W:ADDR_W-1], rd_gray_s2[ADDR_W-2:0]};
  assign wr_ready = !full;

  always_ff @(posedge wr_clk) begin
    if (wr_valid && wr_ready) mem[wr_bin[ADDR_W-1:0]] <= wr_data;
  end

  always_ff @(posedge wr_clk) begin
    if (!wr_rst_n) begin
      wr_bin     <= '0;
      wr_gray    <= '0;
      rd_gray_s1 <= '0;
      rd_gray_s2 <= '0;
    end else begin
      rd_gray_s1 <= rd_gray;
      rd_gray_s2 <= rd_gray_s1;
      if (wr_valid && wr_ready) begin
        wr_bin  <= wr_bin + 1'b1;
        wr_gray <= bin2gray(wr_bin + 1'b1);
      end
    end
  end

  // ------------------------------------------------------------- read side
  assign rd_valid = rd_gray != wr_gray_s2;
  assign rd_data  = mem[rd_bin[ADDR_W-1:0]];

  always_ff @(posedge rd_clk) begin
    if (!rd_rst_n) begin
      rd_bin     <= '0;
      rd_gray    <= '0;
      wr_gray_s1 <= '0;
      wr_gray_s2 <= '0;
    end else begin
      wr_gray_s1 <= wr_gray;
      wr_gray_s2 <= wr_gray_s1;
      if (rd_valid && rd_ready) begin
        rd_bin  <= rd_bin + 1'b1;
        rd_gray <= bin2gray(rd_bin + 1'b1);
      end
    end
  end

  // ------------------------------------------------------------ assertions
  // A producer must hold a word until it is taken.
  property p_hold_wr;
    @(posedge wr_clk) disable iff (!wr_rst_n)
      (wr_valid && !wr_ready) |=> wr_valid && $stable(wr_data);
  endproperty
  a_hold_wr: assert property (p_hold_wr) else $error("pkt_queue: write word changed while stalled");

  initial begin
    if (ADDR_W < 2) $error("pkt_queue: ADDR_W must be at least 2");
  end
endmodule
