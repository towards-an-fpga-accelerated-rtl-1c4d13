// output_arbiter: places each packet leaving the pipeline into the TX queue
// of every port named in its destination bitmap.
//
// Placing packets into the TX queues named by the deparser is the document's;
// the mechanism is this design's. A beat bound for several ports (a MIRROR)
// is offered to all of them at once; each port that takes it is marked done,
// and the beat is retired when every destination port has taken it, so a
// full queue holds up only the copies that go to it and no port sees a beat
// twice. Packets are not interleaved: a port receives the beats of one
// packet back to back.
//
// Interface: in_* (pipe_beat_t with dst), N outputs out_valid/out_ready with
// axis_beat_t. out_valid does not depend on out_ready. Synchronous
// active-low reset.
module output_arbiter
  import nic_pkg::*;
#(
  parameter int unsigned N = NPORTS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  pipe_beat_t in_beat,
  output logic       out_valid [N],
  input  logic       out_ready [N],
  output axis_beat_t out_beat  [N]
);
  logic [N-1:0] done;     // copies of the current beat already delivered
  logic [N-1:0] want;     // copies still to deliver
  logic [N-1:0] took;     // copies delivered this cycle

  always_comb begin
    for (int i = 0; i < N; i++) begin
      want[i]             = in_valid && in_beat.dst[i] && !done[i];
      out_valid[i]        = want[i];
      out_beat[i].tdata   = in_beat.tdata;
      out_beat[i].tkeep   = in_beat.tkeep;
      out_beat[i].tlast   = in_beat.tlast;
      took[i]             = want[i] && out_ready[i];
    end
    in_ready = ((want & ~took) == '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) done <= '0;
    else if (in_valid && in_ready) done <= '0;
    else if (in_valid) done <= done | took;
  end

  a_has_dst: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid |-> in_beat.dst != '0)
    else $error("output_arbiter: beat without destination");
endmodule
