// nic_pkg: types and constants shared by the 5G multi-tenant NIC data path.
//
// The data path moves packets as 256-bit AXI4-Stream style beats. Byte i of
// a beat is tdata[8*i +: 8] and is the i-th byte on the wire; tkeep marks the
// valid bytes (contiguous from byte 0). The pipeline bus width of 256 bits is
// the document's; the byte order and the side-band fields are this design's
// choice.
//
// The match key is the 152-bit rule key K1..K11 of the match/action stage.
// The document fixes the key length (152 bits) and the list of fields; the
// width of each field is this design's choice, made so that the fields add up
// to exactly 152 bits (see key_t below).
package nic_pkg;

  // ---------------------------------------------------------------- ports
  // Four 10GbE ports (0..3) and one DMA port (4).
  localparam int unsigned NPORTS    = 5;
  localparam int unsigned PORT_DMA  = 4;
  localparam int unsigned PORT_IDX_W = 3;

  // ----------------------------------------------------------- data beats
  localparam int unsigned DATA_W = 256;
  localparam int unsigned KEEP_W = DATA_W / 8;

  typedef logic [NPORTS-1:0]     port_mask_t;  // one bit per output port
  typedef logic [PORT_IDX_W-1:0] port_idx_t;

  // Beat as it enters a port (from a MAC or the DMA engine).
  typedef struct packed {
    logic [DATA_W-1:0] tdata;
    logic [KEEP_W-1:0] tkeep;
    logic              tlast;
  } axis_beat_t;

  // Beat inside the pipeline: the port the packet came from and, after the
  // match/action stage, the set of ports it leaves through.
  typedef struct packed {
    logic [DATA_W-1:0] tdata;
    logic [KEEP_W-1:0] tkeep;
    logic              tlast;
    port_idx_t         src;
    port_mask_t        dst;
  } pipe_beat_t;

  // ------------------------------------------------------- well-known values
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IPPROTO_TCP    = 8'd6;
  localparam logic [7:0]  IPPROTO_UDP    = 8'd17;
  localparam logic [15:0] UDP_PORT_VXLAN = 16'd4789;
  localparam logic [15:0] UDP_PORT_GTPU  = 16'd2152;
  localparam logic [7:0]  GTP_MSG_TPDU   = 8'hFF;

  // Semantics of an encapsulation ID (key fields K7, K8, K9).
  typedef enum logic [1:0] {
    ENC_NONE  = 2'd0,
    ENC_VXLAN = 2'd1,
    ENC_GTP   = 2'd2,
    ENC_RTP   = 2'd3
  } encap_t;

  // Header the parser expects next.
  typedef enum logic [3:0] {
    H_ETH   = 4'd0,
    H_IPV4  = 4'd1,
    H_UDP   = 4'd2,
    H_TCP   = 4'd3,
    H_VXLAN = 4'd4,
    H_GTP   = 4'd5,
    H_RTP   = 4'd6,
    H_H265  = 4'd7,
    H_DONE  = 4'd8
  } hdr_t;

  // ------------------------------------------------------------ match key
  // 32+32+16+16+2+16+16+7+2+2+2+6+3 = 152 bits.
  typedef struct packed {
    logic [31:0] src_ip;      // K1 innermost IPv4 source
    logic [31:0] dst_ip;      // K1 innermost IPv4 destination
    logic [15:0] src_port;    // K2 innermost UDP/TCP source port
    logic [15:0] dst_port;    // K2 innermost UDP/TCP destination port
    logic [1:0]  flow_layer;  // K3 number of VXLAN/GTP headers seen
    logic [15:0] encap_id1;   // K4 VXLAN VNI, low 16 bits
    logic [15:0] encap_id2;   // K5 GTP TEID, low 16 bits
    logic [6:0]  encap_id3;   // K6 RTP payload type
    encap_t      encap_type1; // K7 first encapsulation met
    encap_t      encap_type2; // K8 second encapsulation met
    encap_t      encap_type3; // K9 third encapsulation met
    logic [5:0]  hevc_layer;  // K10 H.265 nuh_layer_id
    logic [2:0]  hevc_tid;    // K11 H.265 nuh_temporal_id_plus1
  } key_t;

  localparam int unsigned KEY_W = $bits(key_t);

  // Identity of a fragmented IPv4 datagram: source, destination and
  // identification field of the outermost fragmented IPv4 header.
  localparam int unsigned FRAG_TAG_W = 80;
  typedef logic [FRAG_TAG_W-1:0] frag_tag_t;

  // Parser result handed to the match/action stage.
  typedef struct packed {
    key_t      key;
    port_idx_t src;
    logic      frag;        // an IPv4 header at some layer was a fragment
    logic      frag_first;  // ... and it is the first fragment (offset 0)
    frag_tag_t frag_tag;    // ... of this datagram
  } meta_t;

  // RTP signature checked on the first 6 bytes after a UDP header whose port
  // names no tunnel. Byte 0 is the most significant byte. Bits set in the
  // mask are compared: byte 0 = 10x00000 (version 2, no extension, no CSRC),
  // byte 1 = 11xxxxxx; bytes 2..5 are not compared.
  localparam logic [47:0] RTP_SIG_VALUE = 48'h80C0_0000_0000;
  localparam logic [47:0] RTP_SIG_MASK  = 48'hDFC0_0000_0000;

  // Parser state carried from one header step to the next.
  typedef struct packed {
    hdr_t       nxt;    // header expected at byte 0 of the window
    logic [7:0] rem;    // bytes of the packet left in the window
    key_t       key;
    logic [1:0] depth;  // encapsulations (VXLAN/GTP/RTP) met so far
    logic       frag;
    logic       frag_first;
    frag_tag_t  frag_tag;
  } pstate_t;

  // ---------------------------------------------------------- rule actions
  typedef enum logic [1:0] {
    ACT_FORWARD  = 2'd0,  // default forwarding, rule only counted
    ACT_DROP     = 2'd1,
    ACT_MIRROR   = 2'd2,  // default forwarding plus a copy to 'ports'
    ACT_REDIRECT = 2'd3   // send to 'ports' instead of the default
  } action_e;

  localparam int unsigned RULE_ID_W = 16;

  // Value stored next to each TCAM entry.
  typedef struct packed {
    logic [RULE_ID_W-1:0] rule_id;
    action_e              act;
    port_mask_t           ports;
  } action_t;

  // Match/action result for one packet.
  typedef struct packed {
    port_mask_t           dst;     // empty: drop
    logic                 hit;
    logic [RULE_ID_W-1:0] rule_id;
    action_e              act;
  } decision_t;

  // ------------------------------------------------------- control channel
  typedef enum logic [1:0] {
    CMD_ADD       = 2'd0,
    CMD_DELETE    = 2'd1,
    CMD_CLEAN     = 2'd2,
    CMD_NUM_RULES = 2'd3
  } cfg_cmd_e;

  typedef enum logic [1:0] {
    ST_OK        = 2'd0,
    ST_FULL      = 2'd1,
    ST_BAD_INDEX = 2'd2
  } cfg_status_e;

endpackage
