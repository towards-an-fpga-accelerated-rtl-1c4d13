// tb_rule_config: self-checking test of the rule control channel.
//
// Connects rule_config to a real tcam and runs /add until the table is full
// (indices must come out 0, 1, 2, ... and the next add must report FULL),
// /numRules, /delete of some entries (freed entries are reused lowest first,
// a second delete of the same entry reports BAD_INDEX), and /clean. The
// index, status and count of every response are compared with a model, the
// table contents are checked through lookups, and the response time of an
// add is checked against the table's write time.
module tb_rule_config;
  import nic_pkg::*;

  localparam int DEPTH = 32;
  localparam int IDX_W = $clog2(DEPTH);
  localparam int WRC   = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             cmd_valid, cmd_ready, rsp_valid;
  cfg_cmd_e         cmd;
  key_t             cmd_value, cmd_mask;
  action_t          cmd_action;
  logic [IDX_W-1:0] cmd_index;
  cfg_status_e      rsp_status;
  logic [15:0]      rsp_data;
  logic             tbl_valid, tbl_ready, tbl_clear, tbl_entry_valid, tbl_done;
  logic [IDX_W-1:0] tbl_index;
  key_t             tbl_value, tbl_mask;
  action_t          tbl_action;
  logic [DEPTH-1:0] tbl_map;

  logic             lk_valid, rs_valid, rs_hit;
  key_t             lk_key;
  logic [IDX_W-1:0] rs_index;

  rule_config #(.DEPTH(DEPTH)) dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd, .cmd_value, .cmd_mask,
    .cmd_action, .cmd_index, .rsp_valid, .rsp_status, .rsp_data,
    .tbl_valid, .tbl_ready, .tbl_clear, .tbl_index, .tbl_value, .tbl_mask,
    .tbl_entry_valid, .tbl_action, .tbl_done, .tbl_entry_valid_map(tbl_map)
  );

  tcam #(.KEY_W(KEY_W), .DEPTH(DEPTH), .WRITE_CYCLES(WRC)) u_tcam (
    .clk, .rst_n, .lk_valid, .lk_key, .rs_valid, .rs_hit, .rs_index,
    .wr_valid(tbl_valid), .wr_ready(tbl_ready), .wr_clear(tbl_clear),
    .wr_index(tbl_index), .wr_value(tbl_value), .wr_mask(tbl_mask),
    .wr_entry_valid(tbl_entry_valid), .wr_done(tbl_done), .entry_valid(tbl_map)
  );

  int checks = 0, failures = 0;
  key_t keys [DEPTH];
  bit   used [DEPTH];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic issue(input cfg_cmd_e c, input key_t v, input int idx,
                       output cfg_status_e st, output int data, output int took);
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd = c; cmd_value = v; cmd_mask = '1; cmd_index = IDX_W'(idx);
    cmd_action.rule_id = 16'(idx + 1000); cmd_action.act = ACT_DROP; cmd_action.ports = '0;
    @(negedge clk);
    cmd_valid = 0;
    took = 1;
    while (!rsp_valid) begin @(negedge clk); took++; end
    st = rsp_status; data = int'(rsp_data);
  endtask

  task automatic lookup(input key_t k, output bit hit, output int idx);
    @(negedge clk);
    lk_valid = 1; lk_key = k;
    @(negedge clk);
    lk_valid = 0;
    hit = rs_hit; idx = int'(rs_index);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_status_e st;
    int data, took, idx;
    bit hit;
    cmd_valid = 0; cmd = CMD_NUM_RULES; cmd_value = '0; cmd_mask = '0; cmd_action = '0;
    cmd_index = '0; lk_valid = 0; lk_key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    issue(CMD_NUM_RULES, '0, 0, st, data, took);
    check(st == ST_OK && data == 0, "numRules 0 after reset");

    for (int i = 0; i < DEPTH; i++) begin
      for (int w = 0; w < KEY_W; w += 32) keys[i][w +: 32] = $urandom;
      issue(CMD_ADD, keys[i], 0, st, data, took);
      check(st == ST_OK && data == i, $sformatf("add %0d got index %0d status %0d", i, data, st));
      if (i == 0) check(took == WRC + 3, $sformatf("add answered after %0d cycles, expected %0d", took, WRC + 3));
      used[i] = 1;
    end
    issue(CMD_ADD, '1, 0, st, data, took);
    check(st == ST_FULL, "add on a full table reports FULL");
    issue(CMD_NUM_RULES, '0, 0, st, data, took);
    check(data == DEPTH, $sformatf("numRules %0d expected %0d", data, DEPTH));

    for (int i = 0; i < DEPTH; i += 3) begin
      lookup(keys[i], hit, idx);
      check(hit && idx == i, $sformatf("rule %0d found at %0d", i, idx));
    end

    // Delete entries 5 and 2, then add twice: 2 first, then 5.
    issue(CMD_DELETE, '0, 5, st, data, took);
    check(st == ST_OK, "delete 5");
    issue(CMD_DELETE, '0, 2, st, data, took);
    check(st == ST_OK, "delete 2");
    issue(CMD_DELETE, '0, 2, st, data, took);
    check(st == ST_BAD_INDEX, "second delete of 2 reports BAD_INDEX");
    lookup(keys[5], hit, idx);
    check(!hit, "deleted rule no longer matches");
    issue(CMD_NUM_RULES, '0, 0, st, data, took);
    check(data == DEPTH - 2, "numRules after deletes");
    keys[2] = ~keys[2];
    issue(CMD_ADD, keys[2], 0, st, data, took);
    check(st == ST_OK && data == 2, $sformatf("add reuses entry 2, got %0d", data));
    issue(CMD_ADD, keys[5], 0, st, data, took);
    check(st == ST_OK && data == 5, $sformatf("add reuses entry 5, got %0d", data));
    lookup(keys[2], hit, idx);
    check(hit && idx == 2, "new rule in entry 2 matches");

    issue(CMD_CLEAN, '0, 0, st, data, took);
    check(st == ST_OK, "clean");
    issue(CMD_NUM_RULES, '0, 0, st, data, took);
    check(data == 0, "numRules 0 after clean");
    lookup(keys[7], hit, idx);
    check(!hit, "no rule after clean");
    issue(CMD_ADD, keys[7], 0, st, data, took);
    check(st == ST_OK && data == 0, "add after clean starts at entry 0");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
