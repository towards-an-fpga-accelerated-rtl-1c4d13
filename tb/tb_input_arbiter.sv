// tb_input_arbiter: self-checking test of the round-robin input arbiter.
//
// Five sources send packets of 1 to 6 beats whose data encode source,
// packet number and beat number. Checks that every packet arrives whole and
// uninterrupted, in order per source, with the right src tag; that with all
// sources busy the ports are served strictly in turn (0,1,2,3,4,0,...); that
// an idle port is skipped; and that no cycle is lost between packets.
module tb_input_arbiter;
  import nic_pkg::*;

  localparam int N = NPORTS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       in_valid [N], in_ready [N];
  axis_beat_t in_beat  [N];
  logic       out_valid, out_ready;
  pipe_beat_t out_beat;

  input_arbiter #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  int pkts_left [N];
  int next_pkt  [N];      // packet number the source sends next
  int beat_no   [N];
  int plen      [N];
  int exp_pkt   [N];      // packet number expected next from each source
  int cur_src = -1, cur_beat = 0, last_src = -1;
  int turn_errs = 0, turns = 0, gaps = 0;
  bit all_busy = 0, bp_on = 0;

  function automatic axis_beat_t mk(input int s, input int p, input int b, input bit last);
    axis_beat_t x;
    x = '0;
    x.tdata[7:0] = 8'(s); x.tdata[23:8] = 16'(p); x.tdata[31:24] = 8'(b);
    x.tkeep = '1; x.tlast = last;
    return x;
  endfunction

  // Sources: change at the falling edge, hold a beat until it is taken.
  always @(negedge clk) begin
    for (int s = 0; s < N; s++) begin
      if (in_valid[s] && in_ready_q[s]) begin
        if (in_beat[s].tlast) begin
          next_pkt[s]++; pkts_left[s]--; beat_no[s] = 0;
          plen[s] = $urandom_range(1, 6);
        end else beat_no[s]++;
      end
      in_valid[s] = rst_n && pkts_left[s] > 0;
      in_beat[s]  = mk(s, next_pkt[s], beat_no[s], beat_no[s] == plen[s] - 1);
    end
    out_ready = bp_on ? ($urandom_range(0, 3) != 0) : 1'b1;
  end
  logic in_ready_q [N];
  always @(posedge clk) for (int s = 0; s < N; s++) in_ready_q[s] <= in_ready[s];

  // Checker
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int s, p, b;
      s = int'(out_beat.tdata[7:0]); p = int'(out_beat.tdata[23:8]); b = int'(out_beat.tdata[31:24]);
      checks++;
      if (int'(out_beat.src) != s) begin failures++; $display("FAIL: src tag %0d for source %0d", out_beat.src, s); end
      if (cur_src < 0) begin
        // first beat of a packet
        if (p != exp_pkt[s] || b != 0) begin failures++; $display("FAIL: src %0d pkt %0d beat %0d, expected pkt %0d", s, p, b, exp_pkt[s]); end
        if (all_busy && last_src >= 0) begin
          turns++;
          if (s != (last_src + 1) % N) turn_errs++;
        end
        cur_src = s; cur_beat = 0;
      end else begin
        if (s != cur_src || b != cur_beat + 1) begin failures++; $display("FAIL: packet interleaved"); end
        cur_beat = b;
      end
      if (out_beat.tlast) begin exp_pkt[s]++; last_src = s; cur_src = -1; end
    end else if (rst_n && !bp_on && all_busy && out_ready && !out_valid) gaps++;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < N; s++) begin
      pkts_left[s] = 0; next_pkt[s] = 0; beat_no[s] = 0; exp_pkt[s] = 0;
      plen[s] = $urandom_range(1, 6); in_valid[s] = 0; in_beat[s] = '0; in_ready_q[s] = 0;
    end
    out_ready = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // All sources busy, no back-pressure: strict turns, no gaps.
    for (int s = 0; s < N; s++) pkts_left[s] = 40;
    all_busy = 1;
    repeat (300) @(negedge clk);
    all_busy = 0;
    checks++;
    if (turns < 50 || turn_errs != 0) begin failures++; $display("FAIL: %0d of %0d turns out of order", turn_errs, turns); end
    checks++;
    if (gaps != 0) begin failures++; $display("FAIL: %0d idle cycles while all ports had data", gaps); end
    // Port 2 idle, back-pressure: the others still served, port 2 skipped.
    for (int s = 0; s < N; s++) pkts_left[s] = (s == 2) ? 0 : pkts_left[s] + 30;
    bp_on = 1;
    repeat (3000) @(negedge clk);
    // Single source.
    pkts_left[4] = 20;
    repeat (500) @(negedge clk);
    bp_on = 0;
    repeat (200) @(negedge clk);
    for (int s = 0; s < N; s++) begin
      checks++;
      if (pkts_left[s] != 0 || exp_pkt[s] != next_pkt[s]) begin
        failures++; $display("FAIL: source %0d: %0d left, %0d sent, %0d received", s, pkts_left[s], next_pkt[s], exp_pkt[s]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
