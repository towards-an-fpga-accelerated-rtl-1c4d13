// nic_datapath: FPGA NIC data path with a P4-style pipeline that classifies
// 5G multi-tenant traffic (GTP-U inside VXLAN, with RTP/H.265 video) and
// applies ternary rules to it.
//
// Structure (left to right):
//   4 x 10GbE + 1 DMA port -> RX queues (pkt_queue, one clock domain per
//   port) -> input_arbiter (round-robin, whole packets) -> pipeline:
//       * the packet buffer (sync_fifo) holds the beats,
//       * p4_parser walks the headers of the same beats and builds the
//         152-bit key,
//       * match_action looks the key up in the 512-entry TCAM and turns the
//         first matching rule into a destination bitmap (DROP, MIRROR,
//         REDIRECT, or default forwarding); later fragments of an IPv4
//         datagram get the decision made for its first fragment,
//       * p4_deparser pairs each buffered packet with its decision,
//   -> output_arbiter -> TX queues (pkt_queue) -> ports.
//   rule_config executes the add/delete/clean/numRules commands of the host's
//   configuration channel on the rule table.
// The block structure, the 256-bit bus, the round-robin input arbiter, the
// parse graph, the key, the TCAM size and its write time, and the three
// actions are the document's. The Ethernet MACs, the DMA engine and PCIe are
// outside this module: their streams and the register channel are ports.
//
// Clocks and resets: clk/rst_n for the pipeline; port_clk[i]/port_rst_n[i]
// for the port side of RX and TX queue i. All resets are active low and
// synchronous to their clock; assert all of them together.
// Counters (pipeline clock, wrap around): packets whose decision came from a
// rule (hit) or from the defaults (miss), packets
// dropped by a rule, packets carrying an IPv4 fragment, packets emitted.
module nic_datapath
  import nic_pkg::*;
#(
  parameter int unsigned TCAM_DEPTH        = 512,
  parameter int unsigned TCAM_WRITE_CYCLES = 16,
  parameter int unsigned PARSE_WIN_BEATS   = 5,
  parameter int unsigned PARSE_STAGES      = 12,
  parameter int unsigned QUEUE_ADDR_W      = 6,
  parameter int unsigned BUF_ADDR_W        = 6,
  parameter int unsigned FRAG_ENTRIES      = 16,
  parameter logic [NPORTS-1:0][NPORTS-1:0] DEFAULT_DST =
    {5'b00001, 5'b10000, 5'b10000, 5'b10000, 5'b10000},
  localparam int unsigned IDX_W = $clog2(TCAM_DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             port_clk   [NPORTS],
  input  logic             port_rst_n [NPORTS],
  // from MACs / DMA engine
  input  logic             rx_valid   [NPORTS],
  output logic             rx_ready   [NPORTS],
  input  axis_beat_t       rx_beat    [NPORTS],
  // to MACs / DMA engine
  output logic             tx_valid   [NPORTS],
  input  logic             tx_ready   [NPORTS],
  output axis_beat_t       tx_beat    [NPORTS],
  // configuration channel (pipeline clock)
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  cfg_cmd_e         cmd,
  input  key_t             cmd_value,
  input  key_t             cmd_mask,
  input  action_t          cmd_action,
  input  logic [IDX_W-1:0] cmd_index,
  output logic             rsp_valid,
  output cfg_status_e      rsp_status,
  output logic [15:0]      rsp_data,
  // counters
  output logic [31:0]      cnt_hit,
  output logic [31:0]      cnt_miss,
  output logic [31:0]      cnt_drop,
  output logic [31:0]      cnt_frag,
  output logic [31:0]      cnt_pkt_out
);
  // ------------------------------------------------------------ RX queues
  logic       rxq_valid [NPORTS];
  logic       rxq_ready [NPORTS];
  axis_beat_t rxq_beat  [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_rxq
    pkt_queue #(.T(axis_beat_t), .ADDR_W(QUEUE_ADDR_W)) u_rxq (
      .wr_clk(port_clk[p]), .wr_rst_n(port_rst_n[p]),
      .wr_valid(rx_valid[p]), .wr_ready(rx_ready[p]), .wr_data(rx_beat[p]),
      .rd_clk(clk), .rd_rst_n(rst_n),
      .rd_valid(rxq_valid[p]), .rd_ready(rxq_ready[p]), .rd_data(rxq_beat[p])
    );
  end

  // ------------------------------------------------------- input arbiter
  logic       arb_valid, arb_ready;
  pipe_beat_t arb_beat;

  input_arbiter #(.N(NPORTS)) u_in_arb (
    .clk, .rst_n,
    .in_valid(rxq_valid), .in_ready(rxq_ready), .in_beat(rxq_beat),
    .out_valid(arb_valid), .out_ready(arb_ready), .out_beat(arb_beat)
  );

  // ------------------------------------- packet buffer and parser (split)
  logic buf_wr_ready, prs_in_ready;
  logic buf_rd_valid, buf_rd_ready;
  pipe_beat_t buf_rd_beat;

  assign arb_ready = buf_wr_ready && prs_in_ready;

  sync_fifo #(.W($bits(pipe_beat_t)), .ADDR_W(BUF_ADDR_W)) u_pkt_buf (
    .clk, .rst_n,
    .wr_valid(arb_valid && prs_in_ready), .wr_ready(buf_wr_ready), .wr_data(arb_beat),
    .rd_valid(buf_rd_valid), .rd_ready(buf_rd_ready), .rd_data(buf_rd_beat),
    .count()
  );

  logic  prs_valid, prs_ready;
  meta_t prs_meta;

  p4_parser #(.WIN_BEATS(PARSE_WIN_BEATS), .STAGES(PARSE_STAGES)) u_parser (
    .clk, .rst_n,
    .in_valid(arb_valid && buf_wr_ready), .in_ready(prs_in_ready), .in_beat(arb_beat),
    .out_valid(prs_valid), .out_ready(prs_ready), .out_meta(prs_meta)
  );

  // -------------------------------------------------------- match/action
  logic             dec_valid, dec_ready;
  decision_t        dec;
  logic             tbl_valid, tbl_ready, tbl_clear, tbl_entry_valid, tbl_done;
  logic [IDX_W-1:0] tbl_index;
  key_t             tbl_value, tbl_mask;
  action_t          tbl_action;
  logic [TCAM_DEPTH-1:0] tbl_map;
  logic             stat_hit, stat_miss;

  match_action #(
    .DEPTH(TCAM_DEPTH), .WRITE_CYCLES(TCAM_WRITE_CYCLES), .DEFAULT_DST(DEFAULT_DST),
    .FRAG_ENTRIES(FRAG_ENTRIES)
  ) u_match_action (
    .clk, .rst_n,
    .in_valid(prs_valid), .in_ready(prs_ready), .in_meta(prs_meta),
    .out_valid(dec_valid), .out_ready(dec_ready), .out_dec(dec),
    .cfg_valid(tbl_valid), .cfg_ready(tbl_ready), .cfg_clear(tbl_clear),
    .cfg_index(tbl_index), .cfg_value(tbl_value), .cfg_mask(tbl_mask),
    .cfg_entry_valid(tbl_entry_valid), .cfg_action(tbl_action),
    .cfg_done(tbl_done), .entry_valid(tbl_map),
    .stat_hit, .stat_miss
  );

  rule_config #(.DEPTH(TCAM_DEPTH)) u_rule_config (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd, .cmd_value, .cmd_mask, .cmd_action, .cmd_index,
    .rsp_valid, .rsp_status, .rsp_data,
    .tbl_valid, .tbl_ready, .tbl_clear, .tbl_index, .tbl_value, .tbl_mask,
    .tbl_entry_valid, .tbl_action, .tbl_done, .tbl_entry_valid_map(tbl_map)
  );

  // ------------------------------------------------------------- deparser
  logic       dp_valid, dp_ready;
  pipe_beat_t dp_beat;
  logic       stat_drop, stat_pkt;

  p4_deparser u_deparser (
    .clk, .rst_n,
    .data_valid(buf_rd_valid), .data_ready(buf_rd_ready), .data_beat(buf_rd_beat),
    .dec_valid, .dec_ready, .dec,
    .out_valid(dp_valid), .out_ready(dp_ready), .out_beat(dp_beat),
    .stat_drop, .stat_pkt
  );

  // ------------------------------------------------------ output arbiter
  logic       txq_valid [NPORTS];
  logic       txq_ready [NPORTS];
  axis_beat_t txq_beat  [NPORTS];

  output_arbiter #(.N(NPORTS)) u_out_arb (
    .clk, .rst_n,
    .in_valid(dp_valid), .in_ready(dp_ready), .in_beat(dp_beat),
    .out_valid(txq_valid), .out_ready(txq_ready), .out_beat(txq_beat)
  );

  for (genvar p = 0; p < NPORTS; p++) begin : g_txq
    pkt_queue #(.T(axis_beat_t), .ADDR_W(QUEUE_ADDR_W)) u_txq (
      .wr_clk(clk), .wr_rst_n(rst_n),
      .wr_valid(txq_valid[p]), .wr_ready(txq_ready[p]), .wr_data(txq_beat[p]),
      .rd_clk(port_clk[p]), .rd_rst_n(port_rst_n[p]),
      .rd_valid(tx_valid[p]), .rd_ready(tx_ready[p]), .rd_data(tx_beat[p])
    );
  end

  // ------------------------------------------------------------- counters
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_hit     <= '0;
      cnt_miss    <= '0;
      cnt_drop    <= '0;
      cnt_frag    <= '0;
      cnt_pkt_out <= '0;
    end else begin
      if (stat_hit)  cnt_hit     <= cnt_hit + 1;
      if (stat_miss) cnt_miss    <= cnt_miss + 1;
      if (stat_drop) cnt_drop    <= cnt_drop + 1;
      if (stat_pkt)  cnt_pkt_out <= cnt_pkt_out + 1;
      if (prs_valid && prs_ready && prs_meta.frag) cnt_frag <= cnt_frag + 1;
    end
  end
endmodule
