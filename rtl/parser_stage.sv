// parser_stage: one step of the header walk of the 5G multi-tenant parser.
//
// Each step looks at the header that starts at byte 0 of the header window,
// copies the fields the match key needs, decides which header comes next and
// shifts the window so that the next header starts at byte 0 again. The
// transitions are the ones of the parse graph of the document: Ethernet goes
// to IPv4 on EtherType 0x0800; IPv4 goes to UDP (or TCP); after a UDP header
// destination port 4789 means VXLAN, 2152 means GTP-U, and otherwise the next
// 6 bytes are compared with the RTP signature; VXLAN carries Ethernet, GTP-U
// carries IPv4, RTP carries an H.265 payload header.
//
// Key rules (document): every IPv4 header overwrites K1 and every UDP/TCP
// header overwrites K2, so the innermost ones remain. VXLAN fills K4, GTP
// fills K5, RTP fills K6, and each of them writes its type into the next free
// slot of K7/K8/K9. K3 counts VXLAN and GTP headers (0 for an IP flow, 1 for a
// VXLAN or GTP flow, 2 for GTP over VXLAN). K10/K11 come from the H.265
// payload header.
// This design's choices: only IPv4; IP options are skipped using IHL; an IPv4
// header that is a non-first fragment ends the walk (it has no L4 header); the
// outermost fragmented IPv4 header sets the frag flag, says whether this is
// the first fragment and gives the datagram's identity (source, destination,
// identification) for the match/action stage; the GTP optional 4-byte field is skipped
// when E, S or PN is set, but a chain of GTP extension headers ends the walk;
// a GTP message other than a T-PDU ends the walk after K5 is taken; a header
// that does not lie wholly inside the window ends the walk.
//
// Purely combinational; the caller registers the result.
module parser_stage
  import nic_pkg::*;
#(
  parameter int unsigned WIN_BYTES = 160
) (
  input  logic [WIN_BYTES*8-1:0] win_in,
  input  pstate_t                st_in,
  output logic [WIN_BYTES*8-1:0] win_out,
  output pstate_t                st_out
);
  function automatic logic [7:0] b(input int unsigned i);
    return win_in[8*i +: 8];
  endfunction

  function automatic logic [15:0] be16(input int unsigned i);
    return {win_in[8*i +: 8], win_in[8*(i+1) +: 8]};
  endfunction

  function automatic logic [31:0] be32(input int unsigned i);
    return {be16(i), be16(i + 2)};
  endfunction

  logic [7:0]  shift;
  logic [7:0]  ihl_bytes;
  logic [12:0] frag_off;
  logic [47:0] sig;

  // Record an encapsulation in the next free type slot.
  function automatic pstate_t push_encap(input pstate_t s, input encap_t t);
    pstate_t r = s;
    case (s.depth)
      2'd0:    r.key.encap_type1 = t;
      2'd1:    r.key.encap_type2 = t;
      2'd2:    r.key.encap_type3 = t;
      default: ;
    endcase
    if (s.depth != 2'd3) r.depth = s.depth + 2'd1;
    return r;
  endfunction

  always_comb begin
    st_out    = st_in;
    shift     = '0;
    ihl_bytes = {2'b00, b(0)[3:0], 2'b00};
    frag_off  = {b(6)[4:0], b(7)};
    sig       = {b(8), b(9), b(10), b(11), b(12), b(13)};

    unique case (st_in.nxt)
      H_ETH: begin
        st_out.nxt = H_DONE;
        if (st_in.rem >= 8'd14) begin
          shift = 8'd14;
          if (be16(12) == ETHERTYPE_IPV4) st_out.nxt = H_IPV4;
        end
      end

      H_IPV4: begin
        st_out.nxt = H_DONE;
        if (st_in.rem >= 8'd20 && b(0)[7:4] == 4'd4 && b(0)[3:0] >= 4'd5 &&
            st_in.rem >= ihl_bytes) begin
          st_out.key.src_ip = be32(12);
          st_out.key.dst_ip = be32(16);
          if ((b(6)[5] || frag_off != '0) && !st_in.frag) begin
            st_out.frag       = 1'b1;
            st_out.frag_first = (frag_off == '0);
            st_out.frag_tag   = {be32(12), be32(16), be16(4)};
          end
          shift = ihl_bytes;
          if (frag_off == '0) begin
            if (b(9) == IPPROTO_UDP)      st_out.nxt = H_UDP;
            else if (b(9) == IPPROTO_TCP) st_out.nxt = H_TCP;
          end
        end
      end

      H_UDP: begin
        st_out.nxt = H_DONE;
        if (st_in.rem >= 8'd8) begin
          st_out.key.src_port = be16(0);
          st_out.key.dst_port = be16(2);
          shift = 8'd8;
          if (be16(2) == UDP_PORT_VXLAN)      st_out.nxt = H_VXLAN;
          else if (be16(2) == UDP_PORT_GTPU)  st_out.nxt = H_GTP;
          else if (st_in.rem >= 8'd14 &&
                   (sig & RTP_SIG_MASK) == RTP_SIG_VALUE) st_out.nxt = H_RTP;
        end
      end

      H_TCP: begin
        st_out.nxt = H_DONE;
        if (st_in.rem >= 8'd4) begin
          st_out.key.src_port = be16(0);
          st_out.key.dst_port = be16(2);
        end
      end

      H_VXLAN: begin
        st_out.nxt = H_DONE;
        if (st_in.rem >= 8'd8) begin
          st_out = push_encap(st_in, ENC_VXLAN);
          st_out.key.encap_id1 = be16(5);  // low 16 bits of the 24-bit VNI
          if (st_in.key.flow_layer != 2'd3)
            st_out.key.flow_layer = st_in.key.flow_layer + 2'd1;
          shift = 8'd8;
          st_out.nxt = H_ETH;
        end
      end

      H_GTP: begin
        st_out.nxt = H_DONE;
        if (st_in.rem >= 8'd8 && b(0)[7:5] == 3'd1) begin
          st_out = push_encap(st_in, ENC_GTP);
          st_out.key.encap_id2 = be16(6);  // low 16 bits of the TEID
          if (st_in.key.flow_layer != 2'd3)
            st_out.key.flow_layer = st_in.key.flow_layer + 2'd1;
          st_out.nxt = H_DONE;
          if (b(1) == GTP_MSG_TPDU) begin
            if (b(0)[2:0] == 3'd0) begin
              shift      = 8'd8;
              st_out.nxt = H_IPV4;
            end else if (st_in.rem >= 8'd12 && !(b(0)[2] && b(11) != 8'd0)) begin
              shift      = 8'd12;
              st_out.nxt = H_IPV4;
            end
          end
        end
      end

      H_RTP: begin
        st_out.nxt = H_DONE;
        if (st_in.rem >= 8'd12) begin
          st_out = push_encap(st_in, ENC_RTP);
          st_out.key.encap_id3 = b(1)[6:0];
          shift      = 8'd12;
          st_out.nxt = H_H265;
        end
      end

      H_H265: begin
        st_out.nxt = H_DONE;
        if (st_in.rem >= 8'd2) begin
          st_out.key.hevc_layer = {b(0)[0], b(1)[7:3]};
          st_out.key.hevc_tid   = b(1)[2:0];
        end
      end

      default: st_out.nxt = H_DONE;
    endcase

    st_out.rem = st_in.rem - shift;
    win_out    = win_in >> {shift, 3'b000};
  end
endmodule
