// tb_match_action: self-checking test of the match/action stage.
//
// Installs rules with each of the four actions through the configuration
// port, then sends keys that hit them, keys that miss, and keys that match
// several rules (the lowest entry must win), from every input port, with
// random back-pressure on the output. Each decision is compared with a model
// of the rule table and of the default destinations. Also checks the
// two-cycle key-to-decision latency, and that the action of an entry being
// rewritten changes only when its TCAM entry does. A last phase sends first
// and later IPv4 fragments: a later fragment must get the decision of the
// first fragment of its datagram while that is still in the 16-entry
// fragment table, and its own key's decision otherwise.
module tb_match_action;
  import nic_pkg::*;

  localparam int DEPTH = 64;
  localparam int IDX_W = $clog2(DEPTH);
  localparam logic [NPORTS-1:0][NPORTS-1:0] DDST =
    {5'b00001, 5'b10000, 5'b10000, 5'b10000, 5'b10000};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             in_valid, in_ready, out_valid, out_ready;
  meta_t            in_meta;
  decision_t        out_dec;
  logic             cfg_valid, cfg_ready, cfg_clear, cfg_entry_valid, cfg_done;
  logic [IDX_W-1:0] cfg_index;
  key_t             cfg_value, cfg_mask;
  action_t          cfg_action;
  logic [DEPTH-1:0] entry_valid;
  logic             stat_hit, stat_miss;

  match_action #(.DEPTH(DEPTH), .WRITE_CYCLES(16), .DEFAULT_DST(DDST)) dut (.*);

  key_t    m_value [DEPTH];
  key_t    m_mask  [DEPTH];
  action_t m_act   [DEPTH];
  logic    m_valid [DEPTH];

  int checks = 0, failures = 0, cycle = 0;
  int n_hit = 0, n_miss = 0;
  decision_t exp_q[$];
  int        t_in_q[$];
  bit        bp_on = 0;
  int        lat_seen = -1;

  always @(posedge clk) cycle <= cycle + 1;
  always @(negedge clk) out_ready = bp_on ? ($urandom_range(0, 2) != 0) : 1'b1;

  function automatic decision_t model(input key_t k, input port_idx_t src);
    decision_t d;
    d.hit = 0; d.rule_id = '0; d.act = ACT_FORWARD; d.dst = DDST[src];
    for (int e = 0; e < DEPTH; e++) begin
      if (m_valid[e] && ((k ^ m_value[e]) & m_mask[e]) == '0) begin
        d.hit = 1; d.rule_id = m_act[e].rule_id; d.act = m_act[e].act;
        case (m_act[e].act)
          ACT_DROP:     d.dst = '0;
          ACT_MIRROR:   d.dst = DDST[src] | m_act[e].ports;
          ACT_REDIRECT: d.dst = m_act[e].ports;
          default:      d.dst = DDST[src];
        endcase
        return d;
      end
    end
    return d;
  endfunction

  function automatic key_t rand_key();
    logic [KEY_W-1:0] k;
    for (int i = 0; i < KEY_W; i += 32) k[i +: 32] = $urandom;
    return key_t'(k);
  endfunction

  task automatic add(input int idx, input key_t v, input key_t m, input action_t a);
    @(negedge clk);
    while (!cfg_ready) @(negedge clk);
    cfg_valid = 1; cfg_clear = 0; cfg_index = IDX_W'(idx); cfg_value = v; cfg_mask = m;
    cfg_entry_valid = 1; cfg_action = a;
    @(negedge clk);
    cfg_valid = 0;
    while (!cfg_done) @(negedge clk);
    m_value[idx] = v; m_mask[idx] = m; m_act[idx] = a; m_valid[idx] = 1;
  endtask

  // Model of the fragment table: 16 entries, replaced oldest first.
  localparam int FRAGS = 16;
  frag_tag_t mf_tag [FRAGS];
  decision_t mf_dec [FRAGS];
  bit        mf_v   [FRAGS];
  int        mf_ptr = 0;
  int        n_frag_reuse = 0;

  function automatic decision_t frag_model(input key_t k, input port_idx_t src, input logic frag,
                                           input logic first, input frag_tag_t tag);
    decision_t d;
    int f;
    d = model(k, src);
    if (!frag) return d;
    f = -1;
    for (int e = 0; e < FRAGS; e++) if (f < 0 && mf_v[e] && mf_tag[e] == tag) f = e;
    if (first) begin
      if (f >= 0) mf_dec[f] = d;
      else begin
        mf_v[mf_ptr] = 1; mf_tag[mf_ptr] = tag; mf_dec[mf_ptr] = d;
        mf_ptr = (mf_ptr + 1) % FRAGS;
      end
      return d;
    end
    if (f >= 0) begin n_frag_reuse++; return mf_dec[f]; end
    return d;
  endfunction

  task automatic send(input key_t k, input port_idx_t src, input logic frag = 1'b0,
                      input logic first = 1'b0, input frag_tag_t tag = '0);
    @(negedge clk);
    in_valid = 1; in_meta.key = k; in_meta.src = src;
    in_meta.frag = frag; in_meta.frag_first = first; in_meta.frag_tag = tag;
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    exp_q.push_back(frag_model(k, src, frag, first, tag));
    t_in_q.push_back(cycle + 1);
    @(negedge clk);
    in_valid = 0;
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      decision_t e;
      int t;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: extra decision"); end
      else begin
        e = exp_q.pop_front();
        t = t_in_q.pop_front();
        if (lat_seen < 0) lat_seen = cycle - t;
        if (out_dec !== e) begin
          failures++;
          $display("FAIL: decision %p expected %p", out_dec, e);
        end
      end
    end
    if (stat_hit) n_hit++;
    if (stat_miss) n_miss++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    action_t a;
    key_t    k, m;
    in_valid = 0; in_meta = '0; cfg_valid = 0; cfg_clear = 0; cfg_index = '0;
    cfg_value = '0; cfg_mask = '0; cfg_entry_valid = 0; cfg_action = '0; out_ready = 1;
    for (int e = 0; e < DEPTH; e++) m_valid[e] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Miss with an empty table; latency of the first decision.
    send(rand_key(), 3'd2);
    repeat (6) @(negedge clk);
    checks++;
    if (lat_seen != 2) begin failures++; $display("FAIL: latency %0d, expected 2", lat_seen); end

    // Rules: exact, wildcarded on the video layer only, match-all at the end.
    for (int i = 0; i < 40; i++) begin
      k = rand_key();
      m = '1;
      if (i % 3 == 1) begin m = '0; m.hevc_layer = '1; m.flow_layer = '1; end
      if (i % 3 == 2) begin m = '0; m.encap_id2 = '1; end
      a.rule_id = 16'(100 + i);
      a.act     = action_e'(i % 4);
      a.ports   = 5'($urandom_range(1, 31));
      add(i, k, m, a);
    end
    a.rule_id = 16'd999; a.act = ACT_REDIRECT; a.ports = 5'b00100;
    add(DEPTH - 1, '0, '0, a);   // catch-all, lowest priority

    bp_on = 1;
    for (int i = 0; i < 600; i++) begin
      int e;
      e = $urandom_range(0, 39);
      k = rand_key();
      if (i % 3 != 0) k = key_t'((m_value[e] & m_mask[e]) | (k & ~m_mask[e]));
      send(k, 3'($urandom_range(0, 4)));
    end
    bp_on = 0;

    // Delete the catch-all: random keys miss again.
    @(negedge clk);
    while (!cfg_ready) @(negedge clk);
    cfg_valid = 1; cfg_index = IDX_W'(DEPTH - 1); cfg_entry_valid = 0;
    @(negedge clk); cfg_valid = 0;
    while (!cfg_done) @(negedge clk);
    m_valid[DEPTH - 1] = 0;
    for (int i = 0; i < 20; i++) send(rand_key(), 3'($urandom_range(0, 4)));

    // Rewrite entry 0 while looking it up: old action until the write is done.
    a.rule_id = 16'd7; a.act = ACT_DROP; a.ports = '0;
    k = m_value[0];
    @(negedge clk);
    while (!cfg_ready) @(negedge clk);
    cfg_valid = 1; cfg_index = '0; cfg_value = m_value[0]; cfg_mask = m_mask[0];
    cfg_entry_valid = 1; cfg_action = a;
    @(negedge clk); cfg_valid = 0;
    send(k, 3'd0);             // old rule still in force
    while (!cfg_done) @(negedge clk);
    m_act[0] = a;
    @(negedge clk);
    send(k, 3'd0);             // new action

    // Fragments: later fragments (whose key lacks the inner fields) get the
    // decision of the first fragment of their datagram; more than 16
    // datagrams in flight evict the oldest; unknown datagrams are classified
    // on their own key.
    for (int e = 0; e < FRAGS; e++) mf_v[e] = 0;
    bp_on = 1;
    for (int i = 0; i < 300; i++) begin
      frag_tag_t tg;
      int e;
      port_idx_t s;
      tg = {$urandom, $urandom, 16'($urandom_range(0, 40))};
      s  = 3'($urandom_range(0, 4));
      e  = $urandom_range(0, 39);
      k  = key_t'((m_value[e] & m_mask[e]) | (rand_key() & ~m_mask[e]));
      case (i % 4)
        0, 1: begin
          send(k, s, 1'b1, 1'b1, tg);          // first fragment
          send(rand_key(), s, 1'b1, 1'b0, tg); // later fragment, other key
        end
        2: begin
          // a later fragment of one of the datagrams seen so far
          int f;
          f = $urandom_range(0, FRAGS - 1);
          send(rand_key(), s, 1'b1, 1'b0, mf_v[f] ? mf_tag[f] : tg);
        end
        default: send(k, s, 1'b1, 1'b0, tg);   // first fragment never seen
      endcase
    end
    bp_on = 0;

    repeat (20) @(negedge clk);
    checks++;
    if (n_frag_reuse < 100) begin failures++; $display("FAIL: only %0d fragments reused a decision", n_frag_reuse); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d decisions missing", exp_q.size()); end
    checks++;
    if (n_hit == 0 || n_miss == 0) begin failures++; $display("FAIL: hit/miss counters %0d %0d", n_hit, n_miss); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
