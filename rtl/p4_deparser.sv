// p4_deparser: last stage of the pipeline; re-emits each buffered packet with
// the destination ports that the match/action stage chose for it.
//
// The packet buffer delivers packets in the order they entered the pipeline
// and the match/action stage delivers one decision per packet in the same
// order, so the deparser pairs the head packet with the head decision. The
// document's deparser rebuilds the packet following the actions; none of the
// three actions changes a header, so here the rebuilding reduces to stamping
// dst on every beat, or, when the decision has no port (DROP), consuming the
// packet without emitting it.
//
// Interface: data_* in (pipe_beat_t), dec_* in (decision_t), out_* out
// (pipe_beat_t). Combinational from input to output, no idle cycle between
// packets: the head decision is taken together with the first beat of its
// packet and held until the last beat. stat_drop pulses once per packet
// discarded, stat_pkt once per packet emitted.
module p4_deparser
  import nic_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       data_valid,
  output logic       data_ready,
  input  pipe_beat_t data_beat,
  input  logic       dec_valid,
  output logic       dec_ready,
  input  decision_t  dec,
  output logic       out_valid,
  input  logic       out_ready,
  output pipe_beat_t out_beat,
  output logic       stat_drop,
  output logic       stat_pkt
);
  logic       active;   // inside a packet, cur_dst holds its decision
  port_mask_t cur_dst;
  port_mask_t dst;
  logic       have_dec;
  logic       drop;
  logic       take;

  assign have_dec = active || dec_valid;
  assign dst      = active ? cur_dst : dec.dst;
  assign drop     = (dst == '0);

  always_comb begin
    out_beat     = data_beat;
    out_beat.dst = dst;
  end

  assign out_valid  = data_valid && have_dec && !drop;
  assign data_ready = have_dec && (drop || out_ready);
  assign take       = data_valid && data_ready;
  assign dec_ready  = !active && take;

  assign stat_drop = take && data_beat.tlast && drop;
  assign stat_pkt  = take && data_beat.tlast && !drop;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active  <= 1'b0;
      cur_dst <= '0;
    end else if (take) begin
      if (data_beat.tlast) begin
        active <= 1'b0;
      end else if (!active) begin
        active  <= 1'b1;
        cur_dst <= dec.dst;
      end
    end
  end
endmodule
