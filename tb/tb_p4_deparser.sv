// tb_p4_deparser: self-checking test of the deparser.
//
// Feeds packets of 1 to 5 beats together with one decision per packet (some
// of them drops), with random gaps on both inputs and random back-pressure
// on the output. Checks that every kept packet comes out whole with the
// decision's destination bitmap on every beat, that dropped packets never
// appear and are counted, that decisions are consumed once per packet, and
// that back-to-back packets leave without an idle cycle between them.
module tb_p4_deparser;
  import nic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       data_valid, data_ready, dec_valid, dec_ready, out_valid, out_ready;
  pipe_beat_t data_beat, out_beat;
  decision_t  dec;
  logic       stat_drop, stat_pkt;

  p4_deparser dut (.*);

  int checks = 0, failures = 0;
  // stimulus
  int        plen[$];
  decision_t decs[$];
  // expected output
  pipe_beat_t exp_q[$];
  int n_drop_exp = 0, n_drop = 0, n_pkt = 0;
  int pkt_i = 0, beat_i = 0, dec_i = 0;
  bit gaps_on = 1, bp_on = 1;
  int idle_between = 0;
  logic data_ready_q, dec_ready_q;

  always @(posedge clk) begin data_ready_q <= data_ready; dec_ready_q <= dec_ready; end

  always @(negedge clk) begin
    if (rst_n) begin
      if (data_valid && data_ready_q) begin
        if (data_beat.tlast) begin pkt_i++; beat_i = 0; end else beat_i++;
      end
      if (dec_valid && dec_ready_q) dec_i++;
      data_valid = pkt_i < plen.size() && (!gaps_on || $urandom_range(0, 3) != 0);
      if (pkt_i < plen.size()) begin
        data_beat.tdata = {224'(0), 16'(pkt_i), 16'(beat_i)};
        data_beat.tkeep = '1;
        data_beat.tlast = (beat_i == plen[pkt_i] - 1);
        data_beat.src   = 3'(pkt_i % 5);
        data_beat.dst   = '0;
      end
      dec_valid = dec_i < decs.size() && (!gaps_on || $urandom_range(0, 3) != 0);
      if (dec_i < decs.size()) dec = decs[dec_i];
      out_ready = bp_on ? ($urandom_range(0, 3) != 0) : 1'b1;
    end
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      pipe_beat_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: unexpected beat"); end
      else begin
        e = exp_q.pop_front();
        if (out_beat !== e) begin failures++; $display("FAIL: beat %h expected %h", out_beat[39:0], e[39:0]); end
      end
    end
    if (rst_n && !gaps_on && !bp_on && !out_valid && exp_q.size() != 0 && $time > 100) idle_between++;
    if (stat_drop) n_drop++;
    if (stat_pkt)  n_pkt++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make(input int n);
    for (int i = 0; i < n; i++) begin
      int p, l;
      decision_t d;
      p = plen.size();
      l = $urandom_range(1, 5);
      d.dst = ($urandom_range(0, 3) == 0) ? '0 : 5'($urandom_range(1, 31));
      d.hit = 1'b1; d.rule_id = 16'(p); d.act = (d.dst == '0) ? ACT_DROP : ACT_FORWARD;
      plen.push_back(l); decs.push_back(d);
      if (d.dst == '0) n_drop_exp++;
      else for (int b = 0; b < l; b++) begin
        pipe_beat_t x;
        x.tdata = {224'(0), 16'(p), 16'(b)}; x.tkeep = '1; x.tlast = (b == l - 1);
        x.src = 3'(p % 5); x.dst = d.dst;
        exp_q.push_back(x);
      end
    end
  endtask

  initial begin
    data_valid = 0; data_beat = '0; dec_valid = 0; dec = '0; out_ready = 1;
    data_ready_q = 0; dec_ready_q = 0;
    repeat (3) @(negedge clk);
    make(300);
    rst_n = 1;
    while (pkt_i < plen.size()) @(negedge clk);
    repeat (10) @(negedge clk);
    // Back to back, all kept: no idle cycle.
    gaps_on = 0; bp_on = 0;
    for (int i = 0; i < 50; i++) begin
      int p; pipe_beat_t x;
      p = plen.size();
      plen.push_back(2); decs.push_back('{dst: 5'b00011, hit: 1'b0, rule_id: '0, act: ACT_FORWARD});
      for (int b = 0; b < 2; b++) begin
        x.tdata = {224'(0), 16'(p), 16'(b)}; x.tkeep = '1; x.tlast = (b == 1);
        x.src = 3'(p % 5); x.dst = 5'b00011;
        exp_q.push_back(x);
      end
    end
    while (pkt_i < plen.size()) @(negedge clk);
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d beats missing", exp_q.size()); end
    checks++;
    if (n_drop != n_drop_exp || n_drop == 0) begin failures++; $display("FAIL: %0d drops counted, expected %0d", n_drop, n_drop_exp); end
    checks++;
    if (n_pkt + n_drop != plen.size() || dec_i != decs.size()) begin failures++; $display("FAIL: packet/decision count"); end
    checks++;
    if (idle_between != 0) begin failures++; $display("FAIL: %0d idle cycles between back-to-back packets", idle_between); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
