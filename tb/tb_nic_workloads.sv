// tb_nic_workloads: the evaluation sweeps of the data path, run on the top
// at its default size (512-entry TCAM).
//
// One 10GbE port (port 0, 156.25 MHz) offers 5G multi-tenant video flows
// (GTP over VXLAN, RTP, H.265) at a set bandwidth; the pipeline (200 MHz)
// delivers them to the host (DMA port). For every combination of
//   rules installed : 0, 1, 2, 4, ..., 512 (one DROP rule per flow, matching
//                     the flow's TEID and the enhancement video layer),
//   packet size     : 144 (shortest double-encapsulated video packet), 150,
//                     500, 1000, 1500 bytes,
//   offered rate    : 1, 5, 10 Gb/s,
// it sends base- and enhancement-layer packets of as many flows as there are
// rules (one flow when there are none) and checks that
//   * every base-layer packet, and every enhancement-layer packet of a flow
//     without a rule, reaches the host unchanged and in order, and every
//     enhancement-layer packet of a flow with a rule is dropped: with rules,
//     half of the traffic is removed in the NIC;
//   * the pipeline delay is the same for every packet, whatever the number
//     of rules, the size or the rate: 17 cycles from the beat that completes
//     the header window (the 5th beat, or the last of a shorter packet)
//     leaving the input arbiter, to the packet's first beat entering the
//     deparser with its decision (13 cycles of header walk, 4 of lookup,
//     action read, decision FIFO and deparser);
//   * the host receives the non-dropped traffic at the rate it was offered.
// A last sweep repeats the 1500-byte, 10 Gb/s case for IP and VXLAN
// (multi-tenant) flows with a DROP rule on the enhancement layer.
module tb_nic_workloads;
  import nic_pkg::*;
  import tb_pkt_pkg::*;

  localparam int DEPTH = 512;
  localparam int IDX_W = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  logic port_clk [NPORTS];
  logic port_rst_n [NPORTS];
  always #2500 clk = ~clk;                      // 200 MHz pipeline (ps)
  for (genvar p = 0; p < NPORTS; p++) begin : g_clk
    initial port_clk[p] = 1'b0;
    if (p == PORT_DMA) begin : g_dma
      always #2000 port_clk[p] = ~port_clk[p];  // 250 MHz
    end else begin : g_eth
      always #3200 port_clk[p] = ~port_clk[p];  // 156.25 MHz
    end
  end

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

  // ------------------------------------------------------------- host side
  bytes_t exp_q [$];
  int n_rx = 0;
  longint rx_bytes = 0;
  realtime t_first_rx, t_last_rx;
  bytes_t cur;
  for (genvar p = 0; p < NPORTS; p++) begin : g_ready
    assign tx_ready[p] = 1'b1;
  end
  always @(posedge port_clk[PORT_DMA]) begin
    if (port_rst_n[PORT_DMA] && tx_valid[PORT_DMA]) begin
      for (int i = 0; i < KEEP_W; i++)
        if (tx_beat[PORT_DMA].tkeep[i]) cur.push_back(tx_beat[PORT_DMA].tdata[8*i +: 8]);
      if (tx_beat[PORT_DMA].tlast) begin
        checks++;
        if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected packet at the host"); end
        else begin
          bytes_t e;
          e = exp_q.pop_front();
          if (e != cur) begin failures++; $display("FAIL: packet differs (len %0d vs %0d)", cur.size(), e.size()); end
        end
        if (n_rx == 0) t_first_rx = $realtime;
        t_last_rx = $realtime;
        n_rx++;
        rx_bytes += longint'(cur.size());
        cur = {};
      end
    end
  end
  for (genvar p = 0; p < 4; p++) begin : g_other
    always @(posedge port_clk[p]) if (port_rst_n[p] && tx_valid[p]) begin
      failures++; $display("FAIL: packet left on port %0d", p);
    end
  end

  // ---------------------------------------------------------- delay monitor
  longint cyc = 0;
  longint t_in [$];
  int beat_in = 0;
  bit sop_dp = 1;
  int lat_bad = 0, lat_n = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && dut.arb_valid && dut.arb_ready) begin
      if (beat_in == 4 || (beat_in < 4 && dut.arb_beat.tlast)) t_in.push_back(cyc);
      beat_in = dut.arb_beat.tlast ? 0 : beat_in + 1;
    end
    if (rst_n && dut.buf_rd_valid && dut.buf_rd_ready) begin
      if (sop_dp && t_in.size() > 0) begin
        int l;
        l = int'(cyc - t_in.pop_front());
        lat_n++;
        if (l != 17) begin
          lat_bad++;
          if (lat_bad < 5) $display("FAIL: pipeline delay %0d cycles, expected 17", l);
        end
      end
      sop_dp = dut.buf_rd_beat.tlast;
    end
  end

  // ------------------------------------------------------------- commands
  task automatic command(input cfg_cmd_e c, input key_t v, input key_t m, input action_t a,
                         output cfg_status_e st, output int data);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_value = v; cmd_mask = m; cmd_action = a; cmd_index = '0;
    @(negedge clk);
    cmd_valid = 0;
    while (!rsp_valid) @(negedge clk);
    st = rsp_status; data = int'(rsp_data);
  endtask

  // Drop the enhancement layer of one flow of type f (flow number n).
  task automatic add_drop_rule(input flow_e f, input int n);
    key_t v, m;
    action_t a;
    cfg_status_e st;
    int data;
    v = '0; m = '0;
    v.hevc_layer = 6'd1; m.hevc_layer = '1;
    if (f == FLOW_5G) begin v.encap_id2 = 16'(n); m.encap_id2 = '1; end
    else if (f == FLOW_MT) begin v.encap_id1 = 16'(n); m.encap_id1 = '1; end
    else begin v.dst_port = 16'(6000 + n); m.dst_port = '1; end
    a.rule_id = 16'(n); a.act = ACT_DROP; a.ports = '0;
    command(CMD_ADD, v, m, a, st, data);
    check(st == ST_OK, "rule added");
  endtask

  // ------------------------------------------------------------ traffic
  // Sends the packets of one run on port 0, one beat per port clock, each
  // packet starting len*8/gbps ns after the previous one.
  task automatic run(input flow_e f, input int rules, input int len, input int gbps, input int npkt);
    int flows, n_fwd, n_drop0;
    longint bytes_fwd;
    realtime gap, t_next;
    flows = (rules == 0) ? 1 : rules;
    n_fwd = 0; bytes_fwd = 0;
    n_rx = 0; rx_bytes = 0;
    n_drop0 = int'(cnt_drop);
    gap = real'(len) * 8.0 / real'(gbps) * 1000.0;   // ps
    @(negedge port_clk[0]);
    t_next = $realtime;
    for (int i = 0; i < npkt; i++) begin
      flow_cfg_t c;
      bytes_t q;
      int n;
      c = random_cfg(f, len);
      n = (i / 2) % flows;
      c.layer = 6'(i % 2);
      c.teid = 32'(n); c.vni = 24'(n); c.dport = 16'(6000 + n);
      q = build(c);
      if (!(c.layer == 6'd1 && rules > 0)) begin
        exp_q.push_back(q); n_fwd++; bytes_fwd += longint'(q.size());
      end
      while ($realtime < t_next) @(negedge port_clk[0]);
      t_next = t_next + gap;
      for (int b = 0; b < num_beats(q); b++) begin
        rx_valid[0] = 1; rx_beat[0] = beat_of(q, b);
        @(posedge port_clk[0]);
        while (!rx_ready[0]) @(posedge port_clk[0]);
        @(negedge port_clk[0]);
      end
      rx_valid[0] = 0;
    end
    repeat (3000) @(negedge clk);
    check(n_rx == n_fwd && exp_q.size() == 0,
          $sformatf("%s, %0d rules, %0d B, %0d Gb/s: host got %0d of %0d packets",
                    f.name(), rules, len, gbps, n_rx, n_fwd));
    check(int'(cnt_drop) - n_drop0 == npkt - n_fwd,
          $sformatf("%0d packets dropped, expected %0d", int'(cnt_drop) - n_drop0, npkt - n_fwd));
    // Delivered rate, first to last packet at the host, against the offered
    // one (the packets are spaced by the offered rate): within 5%. With
    // rules, every other packet is dropped, so half the rate arrives.
    if (n_rx > 4) begin
      real rate, expect_rate;
      rate = real'(rx_bytes - longint'(len)) * 8.0 / ((t_last_rx - t_first_rx) / 1000.0);
      expect_rate = (rules > 0) ? real'(gbps) / 2.0 : real'(gbps);
      check(rate > expect_rate * 0.95 && rate < expect_rate * 1.05,
            $sformatf("host rate %0.2f Gb/s, expected %0.2f Gb/s", rate, expect_rate));
    end
    exp_q = {};
  endtask

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_status_e st;
    int data;
    int rule_counts [11] = '{0, 1, 2, 4, 8, 16, 32, 64, 128, 256, 512};
    int sizes [5] = '{144, 150, 500, 1000, 1500};
    int rates [3] = '{1, 5, 10};
    int runs;

    cmd_valid = 0; cmd = CMD_NUM_RULES; cmd_value = '0; cmd_mask = '0; cmd_action = '0; cmd_index = '0;
    for (int p = 0; p < NPORTS; p++) begin port_rst_n[p] = 0; rx_valid[p] = 0; rx_beat[p] = '0; end
    repeat (10) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPORTS; p++) port_rst_n[p] = 1;
    repeat (5) @(negedge clk);

    runs = 0;
    for (int r = 0; r < 11; r++) begin
      command(CMD_CLEAN, '0, '0, '0, st, data);
      for (int n = 0; n < rule_counts[r]; n++) add_drop_rule(FLOW_5G, n);
      command(CMD_NUM_RULES, '0, '0, '0, st, data);
      check(data == rule_counts[r], $sformatf("numRules %0d, expected %0d", data, rule_counts[r]));
      for (int s = 0; s < 5; s++)
        for (int b = 0; b < 3; b++) begin
          // Fewer packets at the slow rates keep the run short.
          run(FLOW_5G, rule_counts[r], sizes[s], rates[b], (rates[b] == 1) ? 6 : 12);
          runs++;
        end
    end
    // Flow types (Table of testing parameters: IP, multi-tenant, 5G).
    for (int f = 0; f < 3; f++) begin
      flow_e fl;
      fl = (f == 0) ? FLOW_IP : (f == 1) ? FLOW_MT : FLOW_5G;
      command(CMD_CLEAN, '0, '0, '0, st, data);
      for (int n = 0; n < 16; n++) add_drop_rule(fl, n);
      run(fl, 16, 1500, 10, 64);
      runs++;
    end

    check(lat_bad == 0, $sformatf("%0d of %0d packets had another pipeline delay than 17 cycles", lat_bad, lat_n));
    $display("workloads: %0d runs, %0d packets through the pipeline", runs, lat_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
