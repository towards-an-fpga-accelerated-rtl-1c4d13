// match_action: match/action stage of the pipeline.
//
// For every parser result it looks the 152-bit key up in the TCAM, reads the
// value stored next to the matching entry (rule ID and action) and turns it
// into the set of output ports of the packet:
//   no match       -> default ports of the input port (DEFAULT_DST)
//   ACT_FORWARD    -> default ports (the rule is only counted)
//   ACT_DROP       -> no port, the packet is discarded
//   ACT_MIRROR     -> default ports plus the rule's ports (a copy)
//   ACT_REDIRECT   -> the rule's ports instead of the default ones
// Document: key matched against a list of rules, first match gives the
// action, the actions DROP, MIRROR and REDIRECT, a CAM/TCAM for the key and a
// RAM for the value (rule ID and action). This design's choices: the action
// encoding, a port bitmap as the argument of MIRROR and REDIRECT, a
// per-input-port default destination (by default the four Ethernet ports
// deliver to the host through DMA and host packets leave on port 0), and
// writing the action RAM in the same cycle the TCAM entry takes effect.
// Fragments (document: coherent decisions for all fragments of a packet,
// mechanism not given): the decision of a first fragment is remembered in a
// FRAG_ENTRIES-entry table keyed by the datagram identity, and later
// fragments of that datagram reuse it; stat_hit/stat_miss report whether the
// decision that was applied came from a rule.
//
// Timing: a key taken at clock edge t has its TCAM result registered at t,
// its action read from the action RAM at t+1, and its decision written into
// the output FIFO at t+2, where it is visible at once (first-word
// fall-through): two cycles from key to decision. One key per cycle. in_ready is withheld only when the 4-entry output
// FIFO could not take every key in flight.
// The configuration port (cfg_*) follows the tcam write port; cfg_action is
// stored with the entry.
module match_action
  import nic_pkg::*;
#(
  parameter int unsigned DEPTH        = 512,
  parameter int unsigned WRITE_CYCLES = 16,
  parameter logic [NPORTS-1:0][NPORTS-1:0] DEFAULT_DST =
    {5'b00001, 5'b10000, 5'b10000, 5'b10000, 5'b10000},
  parameter int unsigned FRAG_ENTRIES = 16,
  localparam int unsigned IDX_W = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // parser results
  input  logic             in_valid,
  output logic             in_ready,
  input  meta_t            in_meta,
  // decisions, one per packet in order
  output logic             out_valid,
  input  logic             out_ready,
  output decision_t        out_dec,
  // rule writes
  input  logic             cfg_valid,
  output logic             cfg_ready,
  input  logic             cfg_clear,
  input  logic [IDX_W-1:0] cfg_index,
  input  key_t             cfg_value,
  input  key_t             cfg_mask,
  input  logic             cfg_entry_valid,
  input  action_t          cfg_action,
  output logic             cfg_done,
  output logic [DEPTH-1:0] entry_valid,
  // one-cycle pulse per decision made
  output logic             stat_hit,
  output logic             stat_miss
);
  // ------------------------------------------------------------ TCAM
  logic             rs_valid, rs_hit;
  logic [IDX_W-1:0] rs_index;
  logic             lk_valid;

  assign lk_valid = in_valid && in_ready;

  tcam #(.KEY_W(KEY_W), .DEPTH(DEPTH), .WRITE_CYCLES(WRITE_CYCLES)) u_tcam (
    .clk, .rst_n,
    .lk_valid, .lk_key(in_meta.key),
    .rs_valid, .rs_hit, .rs_index,
    .wr_valid(cfg_valid), .wr_ready(cfg_ready), .wr_clear(cfg_clear),
    .wr_index(cfg_index), .wr_value(cfg_value), .wr_mask(cfg_mask),
    .wr_entry_valid(cfg_entry_valid), .wr_done(cfg_done),
    .entry_valid
  );

  // ------------------------------------------------------ action RAM
  action_t          aram [DEPTH];
  action_t          p_action;
  logic [IDX_W-1:0] p_index;
  logic             p_clear;

  always_ff @(posedge clk) begin
    if (cfg_valid && cfg_ready) begin
      p_action <= cfg_action;
      p_index  <= cfg_index;
      p_clear  <= cfg_clear;
    end
    if (cfg_done && !p_clear) aram[p_index] <= p_action;
  end

  // --------------------------------------------------------- pipeline
  port_idx_t src1, src2;
  logic      v2, hit2;
  action_t   act2;
  logic      frag1, frag2, first1, first2;
  frag_tag_t tag1, tag2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v2 <= 1'b0;
    end else begin
      v2 <= rs_valid;
    end
    if (lk_valid) begin
      src1   <= in_meta.src;
      frag1  <= in_meta.frag;
      first1 <= in_meta.frag_first;
      tag1   <= in_meta.frag_tag;
    end
    src2   <= src1;
    frag2  <= frag1;
    first2 <= first1;
    tag2   <= tag1;
    hit2 <= rs_hit;
    act2 <= aram[rs_index];
  end

  decision_t rule_dec, dec;
  always_comb begin
    rule_dec.hit     = hit2;
    rule_dec.rule_id = hit2 ? act2.rule_id : '0;
    rule_dec.act     = hit2 ? act2.act : ACT_FORWARD;
    rule_dec.dst     = DEFAULT_DST[src2];
    if (hit2) begin
      unique case (act2.act)
        ACT_FORWARD:  rule_dec.dst = DEFAULT_DST[src2];
        ACT_DROP:     rule_dec.dst = '0;
        ACT_MIRROR:   rule_dec.dst = DEFAULT_DST[src2] | act2.ports;
        ACT_REDIRECT: rule_dec.dst = act2.ports;
        default:      rule_dec.dst = DEFAULT_DST[src2];
      endcase
    end
  end

  // ------------------------------------------------- fragment decisions
  // The first fragment of a datagram is classified on its full key; the
  // later fragments carry no inner headers. The decision made for a first
  // fragment is kept, under the datagram identity, in a small table replaced
  // oldest first; a later fragment whose identity is in the table gets the
  // same decision, one that is not (first fragment lost, reordered or
  // evicted) is classified on the fields it has.
  localparam int unsigned FI_W = (FRAG_ENTRIES > 1) ? $clog2(FRAG_ENTRIES) : 1;
  logic                 ft_valid [FRAG_ENTRIES];
  frag_tag_t            ft_tag   [FRAG_ENTRIES];
  decision_t            ft_dec   [FRAG_ENTRIES];
  logic [FI_W-1:0]      ft_ptr;
  logic                 ft_hit;
  logic [FI_W-1:0]      ft_idx;

  always_comb begin
    ft_hit = 1'b0;
    ft_idx = '0;
    for (int e = FRAG_ENTRIES - 1; e >= 0; e--) begin
      if (ft_valid[e] && ft_tag[e] == tag2) begin
        ft_hit = 1'b1;
        ft_idx = FI_W'(e);
      end
    end
  end

  always_comb begin
    dec = rule_dec;
    if (frag2 && !first2 && ft_hit) dec = ft_dec[ft_idx];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ft_ptr <= '0;
      for (int e = 0; e < FRAG_ENTRIES; e++) ft_valid[e] <= 1'b0;
    end else if (v2 && frag2 && first2) begin
      if (ft_hit) begin
        ft_dec[ft_idx] <= rule_dec;
      end else begin
        ft_valid[ft_ptr] <= 1'b1;
        ft_tag[ft_ptr]   <= tag2;
        ft_dec[ft_ptr]   <= rule_dec;
        ft_ptr <= (int'(ft_ptr) == FRAG_ENTRIES - 1) ? '0 : ft_ptr + 1'b1;
      end
    end
  end

  assign stat_hit  = v2 && dec.hit;
  assign stat_miss = v2 && !dec.hit;

  // -------------------------------------------------------- output FIFO
  logic [2:0] fcount;
  logic [2:0] inflight;
  logic       fifo_wr_ready;

  sync_fifo #(.W($bits(decision_t)), .ADDR_W(2)) u_out (
    .clk, .rst_n,
    .wr_valid(v2), .wr_ready(fifo_wr_ready),
    .wr_data(dec),
    .rd_valid(out_valid), .rd_ready(out_ready), .rd_data(out_dec),
    .count(fcount)
  );

  assign inflight = fcount + 3'(rs_valid) + 3'(v2);
  // A key accepted now lands in the FIFO two cycles later; by then at most
  // the keys in flight are ahead of it.
  assign in_ready = inflight < 3'd4;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      v2 |-> fifo_wr_ready)
    else $error("match_action: decision FIFO overflow");
endmodule
