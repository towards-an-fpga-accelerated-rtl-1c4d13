// p4_parser: parsing stage of the 5G multi-tenant pipeline.
//
// The parser watches the packet stream on its way into the pipeline's packet
// buffer and builds, for every packet, the 152-bit match key K1..K11 (see
// nic_pkg::key_t) plus a fragment flag. It works in two parts:
//   * capture: the first WIN_BEATS beats of a packet (160 bytes by default,
//     enough for the 144-byte shortest GTP-over-VXLAN video packet with its
//     RTP and H.265 headers) are collected into a header window;
//   * walk: a pipeline of STAGES parser_stage steps, one header per stage,
//     follows the parse graph (Ethernet, IPv4, UDP/TCP, VXLAN, GTP-U, RTP,
//     H.265). Twelve stages cover the deepest stack the design supports,
//     MAC/IP/UDP/VXLAN/MAC/IP/UDP/GTP/IP/UDP/RTP/H.265.
// The header-by-header, data-driven walk and the key fields are the
// document's; the window capture, the one-header-per-stage pipeline and the
// sizes are this design's. Headers beyond the window are not parsed.
//
// Fragments: the meta data also carries the fragment flag, whether the packet
// is the first fragment, and the datagram identity (see parser_stage).
//
// Interface: in_* observes the pipeline stream (pipe_beat_t; only tdata,
// tkeep, tlast and src are used). in_ready drops only while a completed
// window waits for a stalled walk pipeline (out_ready low with a key at
// the output); otherwise a beat is taken every cycle. out_* carries one
// meta_t per packet, in packet order.
// Timing: the key of a packet leaves STAGES+1 cycles after the beat that
// completes its window (its WIN_BEATS-th beat or its last beat) when out_ready
// stays high; one packet can enter the walk per cycle.
module p4_parser
  import nic_pkg::*;
#(
  parameter int unsigned WIN_BEATS = 5,
  parameter int unsigned STAGES    = 12
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  pipe_beat_t in_beat,
  output logic       out_valid,
  input  logic       out_ready,
  output meta_t      out_meta
);
  localparam int unsigned WIN_BYTES = WIN_BEATS * KEEP_W;
  localparam int unsigned WIN_W     = WIN_BYTES * 8;
  localparam int unsigned BI_W      = $clog2(WIN_BEATS + 1);

  // ---------------------------------------------------------------- capture
  logic [WIN_W-1:0] cap_win;
  logic [7:0]       cap_rem;
  logic [BI_W-1:0]  cap_beat;     // beats of the current packet seen so far
  logic             cap_done;     // window of the current packet handed on
  logic             win_pending;  // completed window waiting for stage 0
  port_idx_t        cap_src;
  logic             en;           // walk pipeline advances

  logic [6:0] keep_cnt;
  always_comb begin
    keep_cnt = '0;
    for (int i = 0; i < KEEP_W; i++) keep_cnt += 7'(in_beat.tkeep[i]);
  end

  // A pending window leaves for stage 0 on any edge where the walk advances,
  // so a new beat can be captured on that same edge.
  assign in_ready = !win_pending || en;

  logic take;
  assign take = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cap_beat    <= '0;
      cap_done    <= 1'b0;
      win_pending <= 1'b0;
      cap_rem     <= '0;
      cap_src     <= '0;
    end else begin
      if (win_pending && en) win_pending <= 1'b0;
      if (take) begin
        if (!cap_done) begin
          cap_win[int'(cap_beat)*DATA_W +: DATA_W] <= in_beat.tdata;
          cap_rem <= ((cap_beat == '0) ? 8'd0 : cap_rem) + 8'(keep_cnt);
          if (cap_beat == '0) cap_src <= in_beat.src;
          if (in_beat.tlast || int'(cap_beat) == WIN_BEATS - 1) begin
            win_pending <= 1'b1;
            cap_done    <= 1'b1;
          end
        end
        if (in_beat.tlast) begin
          cap_beat <= '0;
          cap_done <= 1'b0;
        end else if (int'(cap_beat) < WIN_BEATS) begin
          cap_beat <= cap_beat + 1'b1;
        end
      end
    end
  end

  // ------------------------------------------------------------------- walk
  logic [WIN_W-1:0] win_q  [STAGES];
  pstate_t          st_q   [STAGES+1];
  port_idx_t        src_q  [STAGES+1];
  logic             vld_q  [STAGES+1];
  logic [WIN_W-1:0] win_d  [STAGES];
  pstate_t          st_d   [STAGES];

  assign en = !vld_q[STAGES] || out_ready;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    logic [WIN_W-1:0] w_nxt;
    if (s + 1 < STAGES) begin : g_win
      assign win_d[s] = w_nxt;
    end else begin : g_last
      assign win_d[s] = '0;
    end
    parser_stage #(.WIN_BYTES(WIN_BYTES)) u_step (
      .win_in (win_q[s]),
      .st_in  (st_q[s]),
      .win_out(w_nxt),
      .st_out (st_d[s])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s <= STAGES; s++) vld_q[s] <= 1'b0;
    end else if (en) begin
      vld_q[0] <= win_pending;
      for (int s = 0; s < STAGES; s++) vld_q[s+1] <= vld_q[s];
    end
  end

  always_ff @(posedge clk) begin
    if (en) begin
      win_q[0]       <= cap_win;
      st_q[0].nxt    <= H_ETH;
      st_q[0].rem    <= cap_rem;
      st_q[0].key    <= '0;
      st_q[0].depth  <= '0;
      st_q[0].frag   <= 1'b0;
      st_q[0].frag_first <= 1'b0;
      st_q[0].frag_tag   <= '0;
      src_q[0]       <= cap_src;
      for (int s = 0; s < STAGES; s++) begin
        if (s + 1 < STAGES) win_q[s+1] <= win_d[s];
        st_q[s+1]  <= st_d[s];
        src_q[s+1] <= src_q[s];
      end
    end
  end

  assign out_valid     = vld_q[STAGES];
  assign out_meta.key  = st_q[STAGES].key;
  assign out_meta.src  = src_q[STAGES];
  assign out_meta.frag = st_q[STAGES].frag;
  assign out_meta.frag_first = st_q[STAGES].frag_first;
  assign out_meta.frag_tag   = st_q[STAGES].frag_tag;

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> out_valid && $stable(out_meta))
    else $error("p4_parser: key changed while stalled");
endmodule
