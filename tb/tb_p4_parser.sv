// tb_p4_parser: self-checking test of the 5G multi-tenant parser.
//
// Sends IP, VXLAN, GTP and GTP-over-VXLAN video packets of random lengths
// (including the 144-byte shortest double-encapsulated one and 1500-byte
// ones), plus packets that are not RTP, TCP, first and later IPv4 fragments
// and non-IPv4 frames, and compares every key, fragment flag and datagram
// identity with the ones worked out by tb_pkt_pkg. Part of
// the run applies random back-pressure. A separate phase checks the latency:
// a key leaves STAGES+1 cycles after the beat that completes its window.
module tb_p4_parser;
  import nic_pkg::*;
  import tb_pkt_pkg::*;

  localparam int STAGES = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready, out_valid, out_ready;
  pipe_beat_t in_beat;
  meta_t      out_meta;

  p4_parser #(.WIN_BEATS(5), .STAGES(STAGES)) dut (.*);

  int checks = 0, failures = 0;
  key_t exp_key[$];
  logic exp_frag[$];
  logic exp_first[$];
  frag_tag_t exp_tag[$];
  port_idx_t exp_src[$];
  int   cycle = 0;
  int   last_win_cycle, out_cycle;
  bit   bp_on = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  // Inputs change at the falling edge; in_ready is stable until the next
  // rising edge, which takes the beat when in_ready is high.
  task automatic send(input bytes_t q, input port_idx_t src);
    for (int n = 0; n < num_beats(q); n++) begin
      axis_beat_t b;
      b = beat_of(q, n);
      @(negedge clk);
      in_valid      = 1'b1;
      in_beat.tdata = b.tdata; in_beat.tkeep = b.tkeep; in_beat.tlast = b.tlast;
      in_beat.src   = src;     in_beat.dst   = '0;
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      if (n == 4 || (b.tlast && n < 4)) last_win_cycle = cycle + 1;  // edge that takes it
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic expect_pkt(input bytes_t q, input key_t k, input logic frag, input port_idx_t src,
                            input logic first = 1'b0, input frag_tag_t tag = '0);
    exp_key.push_back(k); exp_frag.push_back(frag); exp_src.push_back(src);
    exp_first.push_back(first); exp_tag.push_back(tag);
    send(q, src);
  endtask

  // Checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      checks++;
      out_cycle = cycle;
      if (exp_key.size() == 0) begin
        failures++; $display("FAIL: unexpected key");
      end else begin
        key_t k;
        logic f, fst;
        frag_tag_t tg;
        port_idx_t s;
        k = exp_key.pop_front();
        f = exp_frag.pop_front();
        s = exp_src.pop_front();
        fst = exp_first.pop_front();
        tg = exp_tag.pop_front();
        checks++;
        if (out_meta.frag_first !== fst || out_meta.frag_tag !== tg) begin
          failures++;
          $display("FAIL: fragment first %0d tag %h, expected %0d %h",
                   out_meta.frag_first, out_meta.frag_tag, fst, tg);
        end
        if (out_meta.key !== k || out_meta.frag !== f || out_meta.src !== s) begin
          failures++;
          $display("FAIL: key %h frag %0d src %0d, expected %h %0d %0d",
                   out_meta.key, out_meta.frag, out_meta.src, k, f, s);
        end
      end
    end
  end

  always @(posedge clk) out_ready <= bp_on ? ($urandom_range(0, 3) != 0) : 1'b1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flow_cfg_t c;
    bytes_t    q;
    key_t      k;
    in_valid = 1'b0; in_beat = '0; out_ready = 1'b1;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);

    // Latency: one 5G packet, no back-pressure.
    c = random_cfg(FLOW_5G, 144);
    expect_pkt(build(c), expected_key(c), 1'b0, 3'd1);
    repeat (STAGES + 4) @(posedge clk);
    checks++;
    if (out_cycle - last_win_cycle != STAGES + 1) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", out_cycle - last_win_cycle, STAGES + 1);
    end

    // All four flow types, various lengths, back to back.
    for (int i = 0; i < 200; i++) begin
      flow_e f;
      int len;
      f   = flow_e'($urandom_range(0, 3));
      len = (i % 3 == 0) ? 1500 : $urandom_range(144, 400);
      if (i == 100) bp_on = 1'b1;
      c = random_cfg(f, len);
      if (i % 17 == 5) c.rtp = 1'b0;        // UDP payload that is not RTP
      if (i % 23 == 7) c.frag_mf = 1'b1;    // first fragment of a datagram
      if (i % 29 == 11) begin               // a later fragment
        c.frag_off = 13'($urandom_range(1, 400));
        c.frag_mf  = 1'($urandom_range(0, 1));
      end
      k = expected_key(c);
      if (!c.rtp && c.frag_off == '0) begin
        // no RTP: no RTP type slot, no K6, no K10/K11
        k.encap_id3 = '0; k.hevc_layer = '0; k.hevc_tid = '0;
      end
      if (c.frag_mf || c.frag_off != '0)
        expect_pkt(build(c), k, 1'b1, 3'($urandom_range(0, 4)), c.frag_off == '0, expected_tag(c));
      else
        expect_pkt(build(c), k, 1'b0, 3'($urandom_range(0, 4)));
    end

    // TCP packet: ports only, no further parsing.
    q = {}; eth(q, 16'h0800);
    ipv4(q, 32'h01020304, 32'h05060708, 8'd6, 1'b0, 13'd0);
    put16(q, 16'd443); put16(q, 16'd8080);
    repeat (40) q.push_back(8'h80);
    k = '0; k.src_ip = 32'h01020304; k.dst_ip = 32'h05060708; k.src_port = 16'd443; k.dst_port = 16'd8080;
    expect_pkt(q, k, 1'b0, 3'd2);

    // Non-first fragment inside VXLAN: outer fields kept, walk ends at inner IP.
    q = {}; eth(q, 16'h0800);
    ipv4(q, 32'h0A000001, 32'h0A000002, 8'd17, 1'b0, 13'd0);
    udp(q, 16'd1, 16'd4789); vxlan(q, 24'h00ABCD); eth(q, 16'h0800);
    ipv4(q, 32'hAC100001, 32'hAC100002, 8'd17, 1'b0, 13'd185);
    repeat (60) q.push_back(8'h80);
    k = '0; k.src_ip = 32'hAC100001; k.dst_ip = 32'hAC100002; k.src_port = 16'd1; k.dst_port = 16'd4789;
    k.flow_layer = 2'd1; k.encap_id1 = 16'hABCD; k.encap_type1 = ENC_VXLAN;
    expect_pkt(q, k, 1'b1, 3'd0, 1'b0, {32'hAC100001, 32'hAC100002, 16'h1234});

    // Non-IPv4 frame (ARP): empty key.
    q = {}; eth(q, 16'h0806); repeat (50) q.push_back(8'h11);
    expect_pkt(q, '0, 1'b0, 3'd4);

    // Runt frame shorter than an Ethernet header.
    q = {}; repeat (10) q.push_back(8'h08);
    expect_pkt(q, '0, 1'b0, 3'd3);

    bp_on = 1'b0;
    repeat (200) @(posedge clk);
    checks++;
    if (exp_key.size() != 0) begin
      failures++; $display("FAIL: %0d keys missing", exp_key.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
