// tb_pkt_pkg: packet builder shared by the testbenches.
//
// Builds the four traffic patterns the data path classifies, byte by byte
// from the header definitions, and works out the key the parser should
// return for them from the rules of the key (innermost IP and ports win,
// VXLAN/GTP/RTP fill K4/K5/K6 and the next free type slot, K3 counts VXLAN
// and GTP), without using any design code:
//   FLOW_IP : MAC/IP/UDP/RTP/H.265
//   FLOW_MT : MAC/IP/UDP/VXLAN/MAC/IP/UDP/RTP/H.265
//   FLOW_LTE: MAC/IP/UDP/GTP/IP/UDP/RTP/H.265
//   FLOW_5G : MAC/IP/UDP/VXLAN/MAC/IP/UDP/GTP/IP/UDP/RTP/H.265
// and a few special packets (no RTP, TCP, first and later fragments of the
// innermost IPv4 datagram, non-IP).
package tb_pkt_pkg;
  import nic_pkg::*;

  typedef logic [7:0] bytes_t[$];

  typedef enum int {FLOW_IP, FLOW_MT, FLOW_LTE, FLOW_5G} flow_e;

  typedef struct {
    flow_e       flow;
    logic [31:0] src_ip, dst_ip;    // innermost addresses
    logic [15:0] sport, dport;      // innermost UDP ports
    logic [23:0] vni;
    logic [31:0] teid;
    logic [6:0]  pt;                // RTP payload type, 64..127
    logic [5:0]  layer;
    logic [2:0]  tid;
    int          total_len;         // bytes on the wire, padded with payload
    logic        rtp;               // 0: payload does not look like RTP
    logic        frag_mf;           // set MF on the innermost IPv4 header
    logic [12:0] frag_off;          // not 0: a later fragment of the datagram
    logic [15:0] ip_id;             // identification of the innermost IPv4
  } flow_cfg_t;

  function automatic void put16(ref bytes_t q, input logic [15:0] v);
    q.push_back(v[15:8]); q.push_back(v[7:0]);
  endfunction

  function automatic void put32(ref bytes_t q, input logic [31:0] v);
    put16(q, v[31:16]); put16(q, v[15:0]);
  endfunction

  function automatic void eth(ref bytes_t q, input logic [15:0] etype);
    for (int i = 0; i < 6; i++) q.push_back(8'h02);           // dst MAC
    for (int i = 0; i < 6; i++) q.push_back(8'h10 + 8'(i));   // src MAC
    put16(q, etype);
  endfunction

  function automatic void ipv4(ref bytes_t q, input logic [31:0] s, input logic [31:0] d,
                               input logic [7:0] proto, input logic mf,
                               input logic [12:0] off, input logic [15:0] id = 16'h1234);
    q.push_back(8'h45); q.push_back(8'h00);
    put16(q, 16'd1000);                     // total length (not checked)
    put16(q, id);                           // identification
    put16(q, {2'b00, mf, off});
    q.push_back(8'd64); q.push_back(proto);
    put16(q, 16'h0000);                     // checksum (not checked)
    put32(q, s); put32(q, d);
  endfunction

  function automatic void udp(ref bytes_t q, input logic [15:0] sp, input logic [15:0] dp);
    put16(q, sp); put16(q, dp); put16(q, 16'd100); put16(q, 16'd0);
  endfunction

  function automatic void vxlan(ref bytes_t q, input logic [23:0] vni);
    q.push_back(8'h08); q.push_back(8'h00); q.push_back(8'h00); q.push_back(8'h00);
    q.push_back(vni[23:16]); q.push_back(vni[15:8]); q.push_back(vni[7:0]); q.push_back(8'h00);
  endfunction

  function automatic void gtp(ref bytes_t q, input logic [31:0] teid);
    q.push_back(8'h30); q.push_back(8'hFF);  // version 1, PT=1, T-PDU
    put16(q, 16'd100);
    put32(q, teid);
  endfunction

  function automatic void rtp(ref bytes_t q, input logic [6:0] pt, input logic valid);
    q.push_back(valid ? 8'h80 : 8'h40);     // version 2 (or 1: not RTP)
    q.push_back({1'b1, pt});                // marker set, payload type
    put16(q, 16'h0101); put32(q, 32'h0000_1000); put32(q, 32'hCAFE_0001);
  endfunction

  function automatic void h265(ref bytes_t q, input logic [5:0] layer, input logic [2:0] tid);
    q.push_back({1'b0, 6'd1, layer[5]});
    q.push_back({layer[4:0], tid});
  endfunction

  function automatic bytes_t build(input flow_cfg_t c);
    bytes_t q;
    q = {};
    eth(q, 16'h0800);
    if (c.flow == FLOW_IP) begin
      ipv4(q, c.src_ip, c.dst_ip, 8'd17, c.frag_mf, c.frag_off, c.ip_id);
      if (c.frag_off == '0) udp(q, c.sport, c.dport);
    end else begin
      ipv4(q, 32'h0A0A_0764, 32'h0A0A_0765, 8'd17, 1'b0, 13'd0);
      if (c.flow == FLOW_LTE) begin
        udp(q, 16'd2152, 16'd2152);
        gtp(q, c.teid);
      end else begin
        udp(q, 16'd50000, 16'd4789);
        vxlan(q, c.vni);
        eth(q, 16'h0800);
        if (c.flow == FLOW_5G) begin
          ipv4(q, 32'hC0A8_0001, 32'hC0A8_0002, 8'd17, 1'b0, 13'd0);
          udp(q, 16'd2152, 16'd2152);
          gtp(q, c.teid);
        end
      end
      ipv4(q, c.src_ip, c.dst_ip, 8'd17, c.frag_mf, c.frag_off, c.ip_id);
      if (c.frag_off == '0) udp(q, c.sport, c.dport);
    end
    if (c.frag_off == '0) begin
      rtp(q, c.pt, c.rtp);
      h265(q, c.layer, c.tid);
    end
    while (q.size() < c.total_len) q.push_back(8'(q.size()));
    return q;
  endfunction

  function automatic key_t expected_key(input flow_cfg_t c);
    key_t k;
    int   slot;
    k = '0;
    k.src_ip   = c.src_ip;   k.dst_ip   = c.dst_ip;
    // A later fragment has no UDP header of its own: K2 keeps the ports of
    // the UDP header of the innermost tunnel (zero for a plain IP flow).
    if (c.frag_off == '0) begin
      k.src_port = c.sport;  k.dst_port = c.dport;
    end else if (c.flow == FLOW_MT) begin
      k.src_port = 16'd50000; k.dst_port = 16'd4789;
    end else if (c.flow != FLOW_IP) begin
      k.src_port = 16'd2152;  k.dst_port = 16'd2152;
    end
    slot = 0;
    if (c.flow == FLOW_MT || c.flow == FLOW_5G) begin
      k.encap_id1   = c.vni[15:0];
      k.encap_type1 = ENC_VXLAN;
      slot = 1;
      k.flow_layer = k.flow_layer + 2'd1;
    end
    if (c.flow == FLOW_LTE || c.flow == FLOW_5G) begin
      k.encap_id2 = c.teid[15:0];
      if (slot == 0) k.encap_type1 = ENC_GTP; else k.encap_type2 = ENC_GTP;
      slot++;
      k.flow_layer = k.flow_layer + 2'd1;
    end
    if (c.rtp && c.frag_off == '0) begin
      k.encap_id3 = c.pt;
      case (slot)
        0: k.encap_type1 = ENC_RTP;
        1: k.encap_type2 = ENC_RTP;
        default: k.encap_type3 = ENC_RTP;
      endcase
      k.hevc_layer = c.layer;
      k.hevc_tid   = c.tid;
    end
    return k;
  endfunction

  function automatic flow_cfg_t random_cfg(input flow_e f, input int len);
    flow_cfg_t c;
    c.flow      = f;
    c.src_ip    = $urandom;  c.dst_ip = $urandom;
    c.sport     = 16'(1024 + $urandom_range(0, 20000));
    c.dport     = 16'(5004 + $urandom_range(0, 1000));
    c.vni       = 24'($urandom);
    c.teid      = $urandom;
    c.pt        = 7'(96 + $urandom_range(0, 31));
    c.layer     = 6'($urandom_range(0, 1));
    c.tid       = 3'($urandom_range(1, 7));
    c.total_len = len;
    c.rtp       = 1'b1;
    c.frag_mf   = 1'b0;
    c.frag_off  = '0;
    c.ip_id     = 16'($urandom);
    return c;
  endfunction

  // Datagram identity the parser reports for a fragment of this flow (only
  // the innermost IPv4 header is ever fragmented here).
  function automatic frag_tag_t expected_tag(input flow_cfg_t c);
    return {c.src_ip, c.dst_ip, c.ip_id};
  endfunction

  // Slice a packet into beats: byte i of a beat is tdata[8*i +: 8].
  function automatic int num_beats(input bytes_t q);
    return (q.size() + KEEP_W - 1) / KEEP_W;
  endfunction

  function automatic axis_beat_t beat_of(input bytes_t q, input int n);
    axis_beat_t b;
    b = '0;
    for (int i = 0; i < KEEP_W; i++) begin
      if (n * KEEP_W + i < q.size()) begin
        b.tdata[8*i +: 8] = q[n * KEEP_W + i];
        b.tkeep[i]        = 1'b1;
      end
    end
    b.tlast = (n == num_beats(q) - 1);
    return b;
  endfunction
endpackage
