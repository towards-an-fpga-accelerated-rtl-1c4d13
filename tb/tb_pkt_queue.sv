// tb_pkt_queue: self-checking test of the dual-clock queue.
//
// Writes random beats from a 156.25 MHz-like port clock and reads them in a
// faster, unrelated pipeline clock, and the other way round, with random
// stalls on both sides, and checks that every beat comes out once, in order
// and unchanged. Also checks that the queue refuses writes when it holds
// 2**ADDR_W words and becomes empty again.
module tb_pkt_queue;
  timeunit 1ns;
  timeprecision 1ps;
  import nic_pkg::*;

  localparam int ADDR_W = 4;

  logic wclk = 1'b0, rclk = 1'b0, wrst_n = 1'b0, rrst_n = 1'b0;
  real  wper = 3.2, rper = 2.5;
  always #(wper) wclk = ~wclk;
  always #(rper) rclk = ~rclk;

  logic       wr_valid, wr_ready, rd_valid, rd_ready;
  axis_beat_t wr_data, rd_data;

  pkt_queue #(.T(axis_beat_t), .ADDR_W(ADDR_W)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_valid, .wr_ready, .wr_data,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_valid, .rd_ready, .rd_data
  );

  int checks = 0, failures = 0;
  axis_beat_t sent[$];
  int n_written = 0, n_read = 0;
  bit read_en = 0, write_en = 0;
  int wr_stall_pct = 30, rd_stall_pct = 30;

  function automatic axis_beat_t rand_beat();
    axis_beat_t b;
    for (int i = 0; i < DATA_W; i += 32) b.tdata[i +: 32] = $urandom;
    b.tkeep = $urandom; b.tlast = 1'($urandom);
    return b;
  endfunction

  // Writer: drives at the falling edge of its clock.
  always @(negedge wclk) begin
    if (wrst_n) begin
      if (wr_valid && wr_ready_q) begin
        sent.push_back(wr_data);
        n_written++;
      end
      if (!wr_valid || wr_ready_q) begin
        wr_valid = write_en && ($urandom_range(0, 99) >= wr_stall_pct);
        wr_data  = rand_beat();
      end
    end
  end
  // wr_ready as the rising edge saw it
  logic wr_ready_q = 1'b0;
  always @(posedge wclk) wr_ready_q <= wr_ready;

  // Reader
  always @(posedge rclk) begin
    if (rrst_n && rd_valid && rd_ready) begin
      checks++;
      n_read++;
      if (sent.size() == 0) begin failures++; $display("FAIL: read from nothing"); end
      else begin
        axis_beat_t e;
        e = sent.pop_front();
        if (rd_data !== e) begin failures++; $display("FAIL: beat %0d differs", n_read); end
      end
    end
  end
  always @(negedge rclk) rd_ready = read_en && ($urandom_range(0, 99) >= rd_stall_pct);

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; wr_data = '0; rd_ready = 0;
    #20; wrst_n = 1; rrst_n = 1;
    // Fill without reading: exactly 2**ADDR_W words go in.
    write_en = 1; wr_stall_pct = 0;
    #300;
    write_en = 0;
    #50;
    checks++;
    if (n_written != (1 << ADDR_W)) begin
      failures++; $display("FAIL: %0d words accepted when full, expected %0d", n_written, 1 << ADDR_W);
    end
    // Drain.
    read_en = 1; rd_stall_pct = 0;
    #300;
    checks++;
    if (rd_valid || n_read != n_written) begin failures++; $display("FAIL: not empty after drain"); end
    // Streaming with stalls, write clock slower.
    write_en = 1; wr_stall_pct = 30; rd_stall_pct = 30;
    #20000;
    // Write clock faster than read clock.
    wper = 2.0; rper = 3.7;
    #20000;
    write_en = 0;
    #2000;
    checks++;
    if (n_read != n_written || sent.size() != 0) begin
      failures++; $display("FAIL: written %0d read %0d", n_written, n_read);
    end
    checks++;
    if (n_read < 2000) begin failures++; $display("FAIL: only %0d beats moved", n_read); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
