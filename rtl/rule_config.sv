// rule_config: control channel of the rule table.
//
// Carries out the four operations the host's configuration API offers on the
// ternary table: /add (new rule from value, care mask, rule ID and action),
// /delete (remove a rule), /clean (remove all rules) and /numRules (report
// how many rules are installed). The operations are the document's; how they
// map onto the table is this design's:
//   ADD       the rule goes into the lowest-numbered free entry, so rules
//             added earlier take priority; the response carries that entry's
//             index, or ST_FULL when all entries are in use.
//   DELETE    cmd_index names the entry (as returned by ADD); ST_BAD_INDEX
//             if it holds no rule.
//   CLEAN     invalidates every entry in one table write.
//   NUM_RULES answers from a rule counter that follows every completed ADD,
//             DELETE and CLEAN.
//
// Interface: cmd_valid/cmd_ready request; one response per command on
// rsp_valid (a one-cycle pulse) with rsp_status and rsp_data (entry index or
// rule count). tbl_* drives the write port of the table (match_action/tcam);
// ADD, DELETE and CLEAN answer once the table reports tbl_done: the response
// appears WRITE_CYCLES+2 clock edges after the edge that takes the command (18
// with the TCAM's 16-cycle write). NUM_RULES and refused commands answer at
// the edge after the command. One command at a time.
module rule_config
  import nic_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  localparam int unsigned IDX_W = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // requests
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  cfg_cmd_e         cmd,
  input  key_t             cmd_value,
  input  key_t             cmd_mask,
  input  action_t          cmd_action,
  input  logic [IDX_W-1:0] cmd_index,
  // responses
  output logic             rsp_valid,
  output cfg_status_e      rsp_status,
  output logic [15:0]      rsp_data,
  // table write port
  output logic             tbl_valid,
  input  logic             tbl_ready,
  output logic             tbl_clear,
  output logic [IDX_W-1:0] tbl_index,
  output key_t             tbl_value,
  output key_t             tbl_mask,
  output logic             tbl_entry_valid,
  output action_t          tbl_action,
  input  logic             tbl_done,
  input  logic [DEPTH-1:0] tbl_entry_valid_map
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_RESP} state_e;
  state_e state;

  // Lowest free entry.
  logic             have_free;
  logic [IDX_W-1:0] free_idx;
  always_comb begin
    have_free = 1'b0;
    free_idx  = '0;
    for (int e = DEPTH - 1; e >= 0; e--) begin
      if (!tbl_entry_valid_map[e]) begin
        have_free = 1'b1;
        free_idx  = IDX_W'(e);
      end
    end
  end

  logic [15:0] num_rules;
  cfg_cmd_e    cur_cmd;

  assign cmd_ready = (state == S_IDLE);
  assign tbl_valid = (state == S_ISSUE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      rsp_valid  <= 1'b0;
      rsp_status <= ST_OK;
      rsp_data   <= '0;
      num_rules  <= '0;
      cur_cmd    <= CMD_NUM_RULES;
      tbl_clear  <= 1'b0;
      tbl_entry_valid <= 1'b0;
      tbl_index  <= '0;
    end else begin
      rsp_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          cur_cmd    <= cmd;
          tbl_value  <= cmd_value;
          tbl_mask   <= cmd_mask;
          tbl_action <= cmd_action;
          unique case (cmd)
            CMD_ADD: begin
              if (have_free) begin
                tbl_index       <= free_idx;
                tbl_clear       <= 1'b0;
                tbl_entry_valid <= 1'b1;
                state           <= S_ISSUE;
              end else begin
                rsp_valid  <= 1'b1;
                rsp_status <= ST_FULL;
                rsp_data   <= '0;
              end
            end
            CMD_DELETE: begin
              if (tbl_entry_valid_map[cmd_index]) begin
                tbl_index       <= cmd_index;
                tbl_clear       <= 1'b0;
                tbl_entry_valid <= 1'b0;
                state           <= S_ISSUE;
              end else begin
                rsp_valid  <= 1'b1;
                rsp_status <= ST_BAD_INDEX;
                rsp_data   <= 16'(cmd_index);
              end
            end
            CMD_CLEAN: begin
              tbl_clear       <= 1'b1;
              tbl_entry_valid <= 1'b0;
              state           <= S_ISSUE;
            end
            default: begin  // CMD_NUM_RULES
              rsp_valid  <= 1'b1;
              rsp_status <= ST_OK;
              rsp_data   <= num_rules;
            end
          endcase
        end
        S_ISSUE: if (tbl_ready) state <= S_WAIT;
        S_WAIT:  if (tbl_done)  state <= S_RESP;
        S_RESP: begin
          state      <= S_IDLE;
          rsp_valid  <= 1'b1;
          rsp_status <= ST_OK;
          rsp_data   <= 16'(tbl_index);
          unique case (cur_cmd)
            CMD_ADD:    num_rules <= num_rules + 16'd1;
            CMD_DELETE: num_rules <= num_rules - 16'd1;
            CMD_CLEAN:  begin num_rules <= '0; rsp_data <= '0; end
            default: ;
          endcase
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_count: assert property (@(posedge clk) disable iff (!rst_n)
      num_rules <= 16'(DEPTH))
    else $error("rule_config: rule count out of range");
endmodule
