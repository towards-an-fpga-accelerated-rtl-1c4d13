// input_arbiter: merges the RX queues of all ports into the single pipeline
// stream, serving them round-robin, one whole packet at a time.
//
// The round-robin service of the RX queues is the document's; the details are
// this design's. When no packet is in progress the arbiter looks at the
// queues with a beat waiting, starting with the one after the port served
// last, and forwards the first one it finds in the same cycle (no idle cycle
// between packets). It then stays on that port until the beat with tlast has
// been accepted downstream. Each output beat is tagged with the index of the
// port it came from (src); dst is left empty for the match/action stage.
//
// Interface: per-port valid/ready inputs of axis_beat_t, one valid/ready output
// of pipe_beat_t. Purely combinational from input to output; the grant state
// is registered. Synchronous active-low reset.
module input_arbiter
  import nic_pkg::*;
#(
  parameter int unsigned N = NPORTS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid [N],
  output logic       in_ready [N],
  input  axis_beat_t in_beat  [N],
  output logic       out_valid,
  input  logic       out_ready,
  output pipe_beat_t out_beat
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic          locked;     // a packet is in progress on port 'cur'
  logic [IW-1:0] cur;        // port of the packet in progress
  logic [IW-1:0] last;       // port served last
  logic [IW-1:0] sel;        // port forwarded this cycle
  logic          sel_valid;

  // Rotating-priority pick, starting after 'last'.
  always_comb begin
    logic [IW-1:0] idx;
    idx       = '0;
    sel       = cur;
    sel_valid = 1'b0;
    if (locked) begin
      sel_valid = in_valid[cur];
    end else begin
      for (int k = N; k >= 1; k--) begin
        idx = IW'((int'(last) + k) % N);
        if (in_valid[idx]) begin
          sel       = idx;
          sel_valid = 1'b1;
        end
      end
    end
  end

  always_comb begin
    out_valid              = sel_valid;
    out_beat.tdata         = in_beat[sel].tdata;
    out_beat.tkeep         = in_beat[sel].tkeep;
    out_beat.tlast         = in_beat[sel].tlast;
    out_beat.src           = port_idx_t'(sel);
    out_beat.dst           = '0;
    for (int i = 0; i < N; i++) in_ready[i] = (i == int'(sel)) && sel_valid && out_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      locked <= 1'b0;
      cur    <= '0;
      last   <= IW'(N - 1);
    end else if (out_valid && out_ready) begin
      if (out_beat.tlast) begin
        locked <= 1'b0;
        last   <= sel;
      end else begin
        locked <= 1'b1;
        cur    <= sel;
      end
    end
  end

  // The grant may only move at a packet boundary.
  a_no_switch: assert property (@(posedge clk) disable iff (!rst_n)
      locked |-> sel == cur)
    else $error("input_arbiter: grant moved inside a packet");
endmodule
