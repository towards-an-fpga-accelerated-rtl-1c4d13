// tb_tcam: self-checking test of the ternary CAM.
//
// Fills a reference model (value, care mask, valid per entry) and the TCAM
// with the same random rules, many with wildcards, and compares hit and index
// of the first matching entry for keys drawn from the rules (with the
// wildcard bits randomised) and for random keys. Checks the one-cycle lookup
// latency, the 16-cycle write time (old contents visible until the write takes
// effect), delete and clear-all.
module tb_tcam;
  localparam int KEY_W = 152;
  localparam int DEPTH = 512;
  localparam int WRC   = 16;
  localparam int IDX_W = $clog2(DEPTH);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             lk_valid, rs_valid, rs_hit;
  logic [KEY_W-1:0] lk_key;
  logic [IDX_W-1:0] rs_index;
  logic             wr_valid, wr_ready, wr_clear, wr_entry_valid, wr_done;
  logic [IDX_W-1:0] wr_index;
  logic [KEY_W-1:0] wr_value, wr_mask;
  logic [DEPTH-1:0] entry_valid;

  tcam #(.KEY_W(KEY_W), .DEPTH(DEPTH), .WRITE_CYCLES(WRC)) dut (.*);

  logic [KEY_W-1:0] m_value [DEPTH];
  logic [KEY_W-1:0] m_mask  [DEPTH];
  logic             m_valid [DEPTH];

  int checks = 0, failures = 0;

  function automatic logic [KEY_W-1:0] rand_key();
    logic [KEY_W-1:0] k;
    for (int i = 0; i < KEY_W; i += 32) k[i +: 32] = $urandom;
    return k;
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Write one entry; returns the number of cycles from acceptance to wr_done.
  task automatic write(input logic clear, input int idx, input logic [KEY_W-1:0] v,
                       input logic [KEY_W-1:0] m, input logic ev, output int took);
    @(negedge clk);
    while (!wr_ready) @(negedge clk);
    wr_valid = 1'b1; wr_clear = clear; wr_index = IDX_W'(idx);
    wr_value = v; wr_mask = m; wr_entry_valid = ev;
    @(negedge clk);
    wr_valid = 1'b0;
    took = 1;
    while (!wr_done) begin @(negedge clk); took++; end
    if (clear) begin
      for (int e = 0; e < DEPTH; e++) m_valid[e] = 1'b0;
    end else begin
      m_value[idx] = v; m_mask[idx] = m; m_valid[idx] = ev;
    end
    @(negedge clk);
  endtask

  function automatic int model_lookup(input logic [KEY_W-1:0] k);
    for (int e = 0; e < DEPTH; e++)
      if (m_valid[e] && ((k ^ m_value[e]) & m_mask[e]) == '0) return e;
    return -1;
  endfunction

  // Look up one key at a falling edge; result is checked one cycle later.
  task automatic lookup(input logic [KEY_W-1:0] k);
    int exp;
    exp = model_lookup(k);
    lk_valid = 1'b1; lk_key = k;
    @(negedge clk);
    lk_valid = 1'b0;
    check(rs_valid == 1'b1, "rs_valid one cycle after lookup");
    check(rs_hit == (exp >= 0), $sformatf("hit %0d expected %0d", rs_hit, exp >= 0));
    if (exp >= 0) check(int'(rs_index) == exp, $sformatf("index %0d expected %0d", rs_index, exp));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int took;
    logic [KEY_W-1:0] k, v, m;
    lk_valid = 0; lk_key = '0; wr_valid = 0; wr_clear = 0; wr_index = '0;
    wr_value = '0; wr_mask = '0; wr_entry_valid = 0;
    for (int e = 0; e < DEPTH; e++) begin m_valid[e] = 0; m_value[e] = '0; m_mask[e] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Empty table: no hit.
    lookup(rand_key());
    check(entry_valid == '0, "table empty after reset");

    // Write time, and the old contents stay visible until the write is done.
    v = rand_key(); m = '1;
    @(negedge clk);
    wr_valid = 1'b1; wr_clear = 0; wr_index = 9'd7; wr_value = v; wr_mask = m; wr_entry_valid = 1;
    @(negedge clk);
    wr_valid = 1'b0;
    check(!wr_ready, "write port busy during a write");
    lookup(v);   // still empty
    took = 2;
    while (!wr_done) begin @(negedge clk); took++; end
    check(took == WRC, $sformatf("write took %0d cycles, expected %0d", took, WRC));
    m_value[7] = v; m_mask[7] = m; m_valid[7] = 1;
    @(negedge clk);
    lookup(v);
    check(entry_valid[7], "entry_valid shows entry 7");

    // Fill with random ternary rules, some overlapping to test priority.
    for (int i = 0; i < 120; i++) begin
      int idx;
      idx = $urandom_range(0, DEPTH - 1);
      v = rand_key();
      m = rand_key() & rand_key();            // about 1/4 of the bits compared
      if (i % 4 == 0) m = '0;                 // match-all rule
      if (i % 4 == 1) m = '1;                 // exact rule
      write(0, idx, v, m, 1, took);
      check(took == WRC, "write time");
    end
    for (int i = 0; i < 600; i++) begin
      int e;
      e = $urandom_range(0, DEPTH - 1);
      k = rand_key();
      if (m_valid[e] && i % 2 == 0) k = (m_value[e] & m_mask[e]) | (k & ~m_mask[e]);
      lookup(k);
    end

    // Deletes.
    for (int e = 0; e < DEPTH; e++) begin
      if (m_valid[e] && $urandom_range(0, 1) == 1) write(0, e, '0, '0, 0, took);
    end
    for (int i = 0; i < 200; i++) begin
      int e;
      e = $urandom_range(0, DEPTH - 1);
      k = rand_key();
      if (i % 2 == 0) k = (m_value[e] & m_mask[e]) | (k & ~m_mask[e]);
      lookup(k);
    end

    // Last entry and first entry priority.
    write(0, DEPTH - 1, '0, '0, 1, took);
    write(0, 0, '1, '1, 1, took);
    lookup('1);
    lookup('0);

    // Clear all.
    write(1, 0, '0, '0, 0, took);
    check(entry_valid == '0, "table empty after clear");
    lookup('1);
    lookup(rand_key());

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
