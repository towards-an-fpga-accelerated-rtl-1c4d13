// tb_nic_datapath: end-to-end test of the NIC data path at its default size
// (512-entry, 152-bit TCAM; 4 x 10GbE ports and a DMA port).
//
// Scenario: the video use case of the design. Through the control channel the
// test installs a MIRROR rule for one tenant's VXLAN flow, a REDIRECT rule for
// one GTP flow, a count-only rule for one IP flow, and one DROP rule per
// GTP-over-VXLAN video flow that matches the flow's TEID and the enhancement
// (4K) video layer, until the 512 entries are full; one more /add must report
// FULL, and /numRules must report 512. The four Ethernet ports (156.25 MHz)
// and the DMA port (250 MHz) then send a mix of IP, VXLAN, GTP and
// GTP-over-VXLAN video packets of 150 to 1500 bytes at once into the 200 MHz
// pipeline; the base layer of every video flow must reach the host (DMA
// port) and the enhancement layer of the flows with a rule must not. A
// reference model (its own key builder and rule table) predicts the output
// ports of every packet; every packet leaving every port is compared byte by
// byte. Later phases stall the DMA TX side to back the whole pipeline up,
// /delete the MIRROR rule, and /clean the table. Two timing checks: while
// all five ports send, the 256-bit pipeline must move a beat on at least 98%
// of its cycles, and a lone packet arriving at port rate must reach the
// deparser 22 cycles after its first beat left the input arbiter.
// Counted mechanisms (each must occur): the four flow types, TCAM hit and
// miss, DROP, MIRROR, REDIRECT, fragment detection, input contention served
// round-robin, TX back-pressure reaching the pipeline, FULL, delete, clean,
// and later IPv4 fragments that must share the DROP decision of their first
// fragment although their own key matches no rule.
module tb_nic_datapath;
  import nic_pkg::*;
  import tb_pkt_pkg::*;

  localparam int DEPTH = 512;
  localparam int IDX_W = $clog2(DEPTH);
  localparam port_mask_t DEF_DST [NPORTS] = '{5'b10000, 5'b10000, 5'b10000, 5'b10000, 5'b00001};

  // ------------------------------------------------------------- clocks
  logic clk = 1'b0, rst_n = 1'b0;
  logic port_clk [NPORTS];
  logic port_rst_n [NPORTS];
  always #2500 clk = ~clk;                       // 200 MHz pipeline
  for (genvar p = 0; p < NPORTS; p++) begin : g_clk
    initial port_clk[p] = 1'b0;
    if (p == PORT_DMA) begin : g_dma
      always #2000 port_clk[p] = ~port_clk[p];   // 250 MHz DMA side
    end else begin : g_eth
      always #3200 port_clk[p] = ~port_clk[p];   // 156.25 MHz 10GbE side
    end
  end

  // ---------------------------------------------------------------- DUT
  logic             rx_valid [NPORTS], rx_ready [NPORTS];
  axis_beat_t       rx_beat  [NPORTS];
  logic             tx_valid [NPORTS], tx_ready [NPORTS];
  axis_beat_t       tx_beat  [NPORTS];
  logic             cmd_valid, cmd_ready, rsp_valid;
  cfg_cmd_e         cmd;
  key_t             cmd_value, cmd_mask;
  action_t          cmd_action;
  logic [IDX_W-1:0] cmd_index;
  cfg_status_e      rsp_status;
  logic [15:0]      rsp_data;
  logic [31:0]      cnt_hit, cnt_miss, cnt_drop, cnt_frag, cnt_pkt_out;

  nic_datapath dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ------------------------------------------------------ reference model
  key_t    r_value [DEPTH];
  key_t    r_mask  [DEPTH];
  action_t r_act   [DEPTH];
  bit      r_valid [DEPTH];

  // Expected packets per (output port, input port), in order.
  bytes_t exp_q [NPORTS][NPORTS][$];
  int n_expected = 0, n_received = 0;
  int exp_hit = 0, exp_miss = 0, exp_drop = 0, exp_frag = 0;
  int m_flow [4];                  // flow types sent (by K3 and K7)
  int m_drop = 0, m_mirror = 0, m_redirect = 0, m_hit = 0, m_miss = 0, m_frag = 0;
  int m_contend = 0, m_stall = 0, m_full = 0, m_delete = 0, m_clean = 0, m_frag_same = 0;

  function automatic port_mask_t model_dst(input key_t k, input int src, output int rule);
    rule = -1;
    for (int e = 0; e < DEPTH; e++) begin
      if (r_valid[e] && ((k ^ r_value[e]) & r_mask[e]) == '0) begin
        rule = e;
        case (r_act[e].act)
          ACT_DROP:     return '0;
          ACT_MIRROR:   return DEF_DST[src] | r_act[e].ports;
          ACT_REDIRECT: return r_act[e].ports;
          default:      return DEF_DST[src];
        endcase
      end
    end
    return DEF_DST[src];
  endfunction

  // -------------------------------------------------- control channel
  task automatic command(input cfg_cmd_e c, input key_t v, input key_t m,
                         input action_t a, input int idx,
                         output cfg_status_e st, output int data);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_value = v; cmd_mask = m; cmd_action = a; cmd_index = IDX_W'(idx);
    @(negedge clk);
    cmd_valid = 0;
    while (!rsp_valid) @(negedge clk);
    st = rsp_status; data = int'(rsp_data);
  endtask

  task automatic add_rule(input key_t v, input key_t m, input action_t a, output int idx);
    cfg_status_e st;
    command(CMD_ADD, v, m, a, 0, st, idx);
    check(st == ST_OK, "add accepted");
    r_value[idx] = v; r_mask[idx] = m; r_act[idx] = a; r_valid[idx] = 1;
  endtask

  // ------------------------------------------------------------ sources
  int seq [NPORTS];
  bytes_t src_q [NPORTS][$];

  // Queue one packet on a port and record where it must come out.
  // force_rule >= -1 replaces the rule lookup of the model (a later fragment
  // that inherits the decision of its first fragment).
  task automatic queue_pkt(input int port, input bytes_t q, input key_t k, input bit frag,
                           input int force_rule = -2);
    port_mask_t d;
    int rule;
    int n;
    n = q.size();
    q[n-4] = 8'(port); q[n-3] = 8'(seq[port] >> 8); q[n-2] = 8'(seq[port]); q[n-1] = 8'hA5;
    seq[port]++;
    d = model_dst(k, port, rule);
    if (force_rule >= -1) begin
      rule = force_rule;
      if (rule >= 0 && r_act[rule].act == ACT_DROP) d = '0;
    end
    if (rule >= 0) begin
      exp_hit++;
      if (r_act[rule].act == ACT_DROP)     m_drop++;
      if (r_act[rule].act == ACT_MIRROR)   m_mirror++;
      if (r_act[rule].act == ACT_REDIRECT) m_redirect++;
    end else exp_miss++;
    if (d == '0) exp_drop++;
    if (frag) exp_frag++;
    for (int o = 0; o < NPORTS; o++) if (d[o]) begin exp_q[o][port].push_back(q); n_expected++; end
    src_q[port].push_back(q);
  endtask

  task automatic queue_flow(input int port, input flow_cfg_t c);
    key_t k;
    k = expected_key(c);
    if (c.flow == FLOW_IP)  m_flow[0]++;
    if (c.flow == FLOW_MT)  m_flow[1]++;
    if (c.flow == FLOW_LTE) m_flow[2]++;
    if (c.flow == FLOW_5G)  m_flow[3]++;
    queue_pkt(port, build(c), k, c.frag_mf || c.frag_off != 0);
  endtask

  // Port drivers: one beat per port clock when the queue has room.
  for (genvar p = 0; p < NPORTS; p++) begin : g_drv
    int beat = 0;
    logic rdy_q = 1'b0;
    always @(posedge port_clk[p]) rdy_q <= rx_ready[p];
    always @(negedge port_clk[p]) begin
      if (rx_valid[p] && rdy_q) begin
        if (rx_beat[p].tlast) begin void'(src_q[p].pop_front()); beat = 0; end
        else beat++;
      end
      rx_valid[p] = port_rst_n[p] && src_q[p].size() > 0;
      if (src_q[p].size() > 0) rx_beat[p] = beat_of(src_q[p][0], beat);
    end
  end

  // ------------------------------------------------------------- sinks
  bit tx_hold [NPORTS];
  for (genvar p = 0; p < NPORTS; p++) begin : g_sink
    bytes_t cur;
    always @(negedge port_clk[p]) tx_ready[p] = !tx_hold[p] && ($urandom_range(0, 7) != 0);
    always @(posedge port_clk[p]) begin
      if (port_rst_n[p] && tx_valid[p] && tx_ready[p]) begin
        for (int i = 0; i < KEEP_W; i++) if (tx_beat[p].tkeep[i]) cur.push_back(tx_beat[p].tdata[8*i +: 8]);
        if (tx_beat[p].tlast) begin
          int s;
          bytes_t e;
          n_received++;
          checks++;
          s = int'(cur[cur.size() - 4]);
          if (s >= NPORTS || cur[cur.size() - 1] != 8'hA5 || exp_q[p][s].size() == 0) begin
            failures++; $display("FAIL: port %0d received an unexpected packet", p);
          end else begin
            e = exp_q[p][s].pop_front();
            if (e != cur) begin
              failures++;
              $display("FAIL: port %0d packet from port %0d differs (len %0d vs %0d)", p, s, cur.size(), e.size());
            end
          end
          cur = {};
        end
      end
    end
  end

  // ------------------------------------------------- mechanism monitors
  int busy_cycles = 0, beat_cycles = 0;
  bit measure = 0;
  // Pipeline delay: cycles from a packet's first beat leaving the input
  // arbiter to the same packet's first beat entering the deparser (its
  // decision is then known), taken while packets arrive one at a time.
  longint cyc = 0;
  longint t_in [$];
  bit sop_in = 1, sop_dp = 1, lat_phase = 0;
  int lat_min = 1 << 30, lat_max = 0, lat_n = 0;
  always @(posedge clk) begin
    int nv;
    cyc++;
    if (rst_n && dut.arb_valid && dut.arb_ready) begin
      if (sop_in) t_in.push_back(cyc);
      sop_in = dut.arb_beat.tlast;
    end
    if (rst_n && dut.buf_rd_valid && dut.buf_rd_ready) begin
      if (sop_dp && t_in.size() > 0) begin
        int l;
        l = int'(cyc - t_in.pop_front());
        if (lat_phase) begin
          lat_n++;
          if (l < lat_min) lat_min = l;
          if (l > lat_max) lat_max = l;
        end
      end
      sop_dp = dut.buf_rd_beat.tlast;
    end
    nv = 0;
    for (int p = 0; p < NPORTS; p++) nv += int'(dut.rxq_valid[p]);
    if (rst_n && nv >= 2 && !dut.u_in_arb.locked) m_contend++;
    if (rst_n && dut.dp_valid && !dut.dp_ready) m_stall++;
    if (measure) begin
      busy_cycles++;
      if (dut.arb_valid && dut.arb_ready) beat_cycles++;
    end
  end

  task automatic wait_drain();
    int guard;
    guard = 0;
    while ((n_received < n_expected || cnt_hit + cnt_miss < 32'(exp_hit + exp_miss)) && guard < 400000) begin
      @(negedge clk); guard++;
    end
    repeat (200) @(negedge clk);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (received %0d of %0d)", n_received, n_expected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_status_e st;
    int data, idx, r_mirror;
    flow_cfg_t c, c_mt, c_lte, c_ip;
    key_t v, m;
    action_t a;

    cmd_valid = 0; cmd = CMD_NUM_RULES; cmd_value = '0; cmd_mask = '0; cmd_action = '0; cmd_index = '0;
    for (int p = 0; p < NPORTS; p++) begin
      port_rst_n[p] = 0; rx_valid[p] = 0; rx_beat[p] = '0; tx_hold[p] = 0; seq[p] = 0;
    end
    for (int e = 0; e < DEPTH; e++) r_valid[e] = 0;
    for (int f = 0; f < 4; f++) m_flow[f] = 0;
    repeat (10) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPORTS; p++) port_rst_n[p] = 1;
    repeat (5) @(negedge clk);

    command(CMD_NUM_RULES, '0, '0, '0, 0, st, data);
    check(data == 0, "no rules after reset");

    // ---------------------------------------------------- rule set
    c_mt  = random_cfg(FLOW_MT, 600);
    c_lte = random_cfg(FLOW_LTE, 600);
    c_ip  = random_cfg(FLOW_IP, 600);
    // MIRROR the tenant's VXLAN traffic to port 2.
    v = '0; m = '0;
    v.flow_layer = 2'd1; m.flow_layer = '1;
    v.encap_type1 = ENC_VXLAN; m.encap_type1 = encap_t'(2'b11);
    v.encap_id1 = c_mt.vni[15:0]; m.encap_id1 = '1;
    a.rule_id = 16'd1; a.act = ACT_MIRROR; a.ports = 5'b00100;
    add_rule(v, m, a, r_mirror);
    // REDIRECT one UE's GTP traffic to port 3.
    v = '0; m = '0;
    v.encap_type1 = ENC_GTP; m.encap_type1 = encap_t'(2'b11);
    v.encap_id2 = c_lte.teid[15:0]; m.encap_id2 = '1;
    a.rule_id = 16'd2; a.act = ACT_REDIRECT; a.ports = 5'b01000;
    add_rule(v, m, a, idx);
    // Count one IP video flow.
    v = '0; m = '0;
    v.dst_ip = c_ip.dst_ip; m.dst_ip = '1; v.dst_port = c_ip.dport; m.dst_port = '1;
    a.rule_id = 16'd3; a.act = ACT_FORWARD; a.ports = '0;
    add_rule(v, m, a, idx);
    // One DROP rule per 5G multi-tenant video flow (TEID = flow number):
    // drop its enhancement layer (nuh_layer_id 1).
    for (int f = 0; f < DEPTH - 3; f++) begin
      v = '0; m = '0;
      v.flow_layer = 2'd2; m.flow_layer = '1;
      v.encap_id2 = 16'(f); m.encap_id2 = '1;
      v.hevc_layer = 6'd1; m.hevc_layer = '1;
      a.rule_id = 16'(100 + f); a.act = ACT_DROP; a.ports = '0;
      add_rule(v, m, a, idx);
    end
    command(CMD_ADD, '0, '0, a, 0, st, data);
    check(st == ST_FULL, "513th rule refused as FULL");
    if (st == ST_FULL) m_full++;
    command(CMD_NUM_RULES, '0, '0, '0, 0, st, data);
    check(data == DEPTH, $sformatf("numRules %0d, expected %0d", data, DEPTH));

    // ---------------------------------------- phase 1: mixed traffic
    for (int i = 0; i < 160; i++) begin
      for (int p = 0; p < NPORTS; p++) begin
        int kind, len;
        kind = $urandom_range(0, 9);
        len  = (i % 4 == 0) ? 1500 : $urandom_range(150, 700);
        if (p == PORT_DMA) kind = 9;
        if (kind <= 4) begin
          // 5G multi-tenant video, flows 0..511 (the last 3 have no rule)
          c = random_cfg(FLOW_5G, len);
          c.teid = 32'($urandom_range(0, DEPTH - 1));
          c.layer = 6'($urandom_range(0, 1));
        end else if (kind == 5) begin c = c_mt;  c.total_len = len; c.layer = 6'($urandom_range(0, 1)); end
        else if (kind == 6) begin c = c_lte; c.total_len = len; end
        else if (kind == 7) begin c = c_ip;  c.total_len = len; end
        else if (kind == 8) begin c = random_cfg(FLOW_IP, len); c.frag_mf = ($urandom_range(0, 3) == 0); end
        else c = random_cfg(flow_e'($urandom_range(0, 3)), len);
        queue_flow(p, c);
      end
    end
    measure = 1;
    repeat (2000) @(negedge clk);
    measure = 0;
    wait_drain();
    check(n_received == n_expected, $sformatf("phase 1: received %0d of %0d packets", n_received, n_expected));
    // Pipeline rate: one 256-bit beat per cycle while every port is sending.
    check(beat_cycles * 100 >= busy_cycles * 98,
          $sformatf("pipeline moved %0d beats in %0d cycles", beat_cycles, busy_cycles));

    // ------------------------------- phase 2: back-pressure from the host
    tx_hold[PORT_DMA] = 1;
    for (int i = 0; i < 40; i++)
      for (int p = 0; p < 4; p++) queue_flow(p, random_cfg(FLOW_IP, 1500));
    repeat (3000) @(negedge clk);
    check(m_stall > 0, "TX back-pressure reached the pipeline");
    tx_hold[PORT_DMA] = 0;
    wait_drain();
    check(n_received == n_expected, "phase 2: all packets delivered after the stall");

    // ---------------------------------------- phase 3: delete the mirror
    command(CMD_DELETE, '0, '0, '0, r_mirror, st, data);
    check(st == ST_OK, "delete mirror rule");
    if (st == ST_OK) begin r_valid[r_mirror] = 0; m_delete++; end
    command(CMD_NUM_RULES, '0, '0, '0, 0, st, data);
    check(data == DEPTH - 1, "numRules after delete");
    lat_phase = 1;
    for (int i = 0; i < 10; i++) begin
      c = c_mt; c.total_len = 300; queue_flow(i % 4, c);
      repeat (200) @(negedge clk);
    end
    wait_drain();
    lat_phase = 0;
    // The 5-beat header window is complete 5 cycles after the first beat
    // (the beats arrive at the 156.25 MHz port rate), the key leaves the
    // 12-stage walk 13 cycles later, and the TCAM lookup, action read,
    // decision FIFO and deparser take 4 more: 22 cycles, 110 ns at 200 MHz.
    check(lat_n == 10 && lat_min == 22 && lat_max == 22,
          $sformatf("pipeline delay %0d..%0d cycles over %0d packets, expected 22", lat_min, lat_max, lat_n));

    // -------------------------- phase 3b: fragments of dropped video layers
    // The first fragment of an enhancement-layer packet carries the H.265
    // header and is dropped by its flow's rule; the later fragment carries no
    // inner headers, matches no rule on its own, and must still be dropped.
    // A later fragment of a datagram never seen goes to the default port.
    for (int i = 0; i < 8; i++) begin
      int rule;
      key_t kf;
      c = random_cfg(FLOW_5G, 400); c.teid = 32'(i); c.layer = 6'd1; c.frag_mf = 1;
      kf = expected_key(c);
      void'(model_dst(kf, 1, rule));
      check(rule >= 0 && r_act[rule].act == ACT_DROP, "first fragment hits a DROP rule");
      queue_flow(1, c);
      c.frag_mf = 0; c.frag_off = 13'd47;
      kf = expected_key(c);
      void'(model_dst(kf, 1, idx));
      check(idx < 0, "later fragment matches no rule by itself");
      m_flow[3]++; m_frag_same++;
      queue_pkt(1, build(c), kf, 1'b1, rule);
      repeat (100) @(negedge clk);
    end
    c = random_cfg(FLOW_5G, 400); c.teid = 32'd3; c.layer = 6'd1; c.frag_off = 13'd47;
    queue_flow(1, c);
    wait_drain();
    check(n_received == n_expected, "phase 3b: fragments delivered as predicted");

    // ------------------------------------------- phase 4: clean the table
    command(CMD_CLEAN, '0, '0, '0, 0, st, data);
    check(st == ST_OK, "clean");
    if (st == ST_OK) begin for (int e = 0; e < DEPTH; e++) r_valid[e] = 0; m_clean++; end
    command(CMD_NUM_RULES, '0, '0, '0, 0, st, data);
    check(data == 0, "numRules after clean");
    for (int i = 0; i < 20; i++) begin
      c = random_cfg(FLOW_5G, 400); c.teid = 32'(i); c.layer = 6'd1;
      queue_flow(i % 4, c);
    end
    wait_drain();

    // --------------------------------------------------------- totals
    check(n_received == n_expected, $sformatf("received %0d of %0d packets", n_received, n_expected));
    for (int o = 0; o < NPORTS; o++)
      for (int s = 0; s < NPORTS; s++)
        check(exp_q[o][s].size() == 0, $sformatf("port %0d still waits for %0d packets from %0d", o, exp_q[o][s].size(), s));
    check(cnt_hit == 32'(exp_hit), $sformatf("hit counter %0d expected %0d", cnt_hit, exp_hit));
    check(cnt_miss == 32'(exp_miss), $sformatf("miss counter %0d expected %0d", cnt_miss, exp_miss));
    check(cnt_drop == 32'(exp_drop), $sformatf("drop counter %0d expected %0d", cnt_drop, exp_drop));
    check(cnt_frag == 32'(exp_frag), $sformatf("fragment counter %0d expected %0d", cnt_frag, exp_frag));
    m_hit = exp_hit; m_miss = exp_miss; m_frag = exp_frag;

    $display("mechanisms: IP %0d, VXLAN %0d, GTP %0d, GTP/VXLAN %0d, hit %0d, miss %0d, DROP %0d, MIRROR %0d, REDIRECT %0d",
             m_flow[0], m_flow[1], m_flow[2], m_flow[3], m_hit, m_miss, m_drop, m_mirror, m_redirect);
    $display("mechanisms: fragments %0d (later ones following their first: %0d), contention %0d, stall cycles %0d, FULL %0d, delete %0d, clean %0d",
             m_frag, m_frag_same, m_contend, m_stall, m_full, m_delete, m_clean);
    $display("pipeline: %0d beats in %0d cycles while all ports sent; delay %0d..%0d cycles",
             beat_cycles, busy_cycles, lat_min, lat_max);
    check(m_flow[0] > 0 && m_flow[1] > 0 && m_flow[2] > 0 && m_flow[3] > 0, "all four flow types sent");
    check(m_hit > 0 && m_miss > 0, "TCAM hit and miss");
    check(m_drop > 0 && m_mirror > 0 && m_redirect > 0, "DROP, MIRROR and REDIRECT applied");
    check(m_frag > 0 && m_frag_same > 0, "fragments detected and kept together");
    check(m_contend > 0, "input contention");
    check(m_stall > 0, "back-pressure");
    check(m_full > 0 && m_delete > 0 && m_clean > 0, "FULL, delete and clean");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
