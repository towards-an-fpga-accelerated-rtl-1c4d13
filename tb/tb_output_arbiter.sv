// tb_output_arbiter: self-checking test of the output arbiter.
//
// Sends packets with random destination bitmaps (one port, or several for a
// mirrored packet) while every TX side stalls at random. Each port must
// receive exactly the packets addressed to it, each beat once, in order and
// unchanged; a beat for several ports is retired only when all have it.
module tb_output_arbiter;
  import nic_pkg::*;

  localparam int N = NPORTS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid, in_ready;
  pipe_beat_t in_beat;
  logic       out_valid [N], out_ready [N];
  axis_beat_t out_beat  [N];

  output_arbiter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  axis_beat_t exp_q [N][$];
  pipe_beat_t stim[$];
  int sent = 0, multi = 0;
  logic in_ready_q;
  always @(posedge clk) in_ready_q <= in_ready;

  always @(negedge clk) begin
    if (rst_n) begin
      if (in_valid && in_ready_q) sent++;
      in_valid = sent < stim.size() && $urandom_range(0, 4) != 0;
      if (sent < stim.size()) in_beat = stim[sent];
      for (int p = 0; p < N; p++) out_ready[p] = $urandom_range(0, 2) != 0;
    end
  end

  always @(posedge clk) begin
    for (int p = 0; p < N; p++) begin
      if (rst_n && out_valid[p] && out_ready[p]) begin
        axis_beat_t e;
        checks++;
        if (exp_q[p].size() == 0) begin failures++; $display("FAIL: port %0d got an extra beat", p); end
        else begin
          e = exp_q[p].pop_front();
          if (out_beat[p] !== e) begin failures++; $display("FAIL: port %0d beat differs", p); end
        end
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_beat = '0; in_ready_q = 0;
    for (int p = 0; p < N; p++) out_ready[p] = 0;
    for (int k = 0; k < 400; k++) begin
      int l;
      port_mask_t d;
      l = $urandom_range(1, 4);
      d = ($urandom_range(0, 1) == 0) ? port_mask_t'(1 << $urandom_range(0, N - 1))
                                      : port_mask_t'($urandom_range(1, 31));
      if ($countones(d) > 1) multi++;
      for (int b = 0; b < l; b++) begin
        pipe_beat_t x;
        axis_beat_t y;
        x.tdata = {192'(0), 32'($urandom), 16'(k), 16'(b)};
        x.tkeep = '1; x.tlast = (b == l - 1); x.src = 3'(k % 5); x.dst = d;
        stim.push_back(x);
        y.tdata = x.tdata; y.tkeep = x.tkeep; y.tlast = x.tlast;
        for (int p = 0; p < N; p++) if (d[p]) exp_q[p].push_back(y);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (sent < stim.size()) @(negedge clk);
    repeat (20) @(negedge clk);
    for (int p = 0; p < N; p++) begin
      checks++;
      if (exp_q[p].size() != 0) begin failures++; $display("FAIL: port %0d missing %0d beats", p, exp_q[p].size()); end
    end
    checks++;
    if (multi == 0) begin failures++; $display("FAIL: no multi-port packet sent"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
