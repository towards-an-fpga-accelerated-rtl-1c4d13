// tcam: ternary content-addressable memory that holds the match part of the
// rules (the "rule storage/lookup" of the pipeline).
//
// Every entry has a value, a care mask (1 = bit is compared, 0 = wildcard) and
// a valid bit. A lookup compares the key with all entries at once and returns
// the lowest-numbered valid entry that matches, which makes a lower index a
// higher priority ("the first matching result provides the action").
// Document: ternary matching, first positive match, a 152-bit key and 512
// entries, a lookup in one clock cycle, and a TCAM built from SRL16E shift
// registers, which takes 16 clock cycles to write. This model keeps those
// times: a lookup result is registered one cycle after the key, and a write
// occupies the write port for WRITE_CYCLES cycles, after which the new entry
// takes effect at once (lookups meanwhile still see the old entry). The
// storage itself is plain registers here, not shift registers.
//
// Interface:
//   lookup: lk_valid/lk_key in, rs_valid/rs_hit/rs_index out one cycle later.
//   write:  wr_valid is accepted when wr_ready is high; wr_clear invalidates
//           every entry, otherwise entry wr_index gets wr_value/wr_mask and
//           valid bit wr_entry_valid (0 deletes). wr_done pulses in the cycle
//           the write takes effect; wr_ready is high again the cycle after.
// Synchronous active-low reset invalidates all entries.
module tcam #(
  parameter int unsigned KEY_W        = 152,
  parameter int unsigned DEPTH        = 512,
  parameter int unsigned WRITE_CYCLES = 16,
  localparam int unsigned IDX_W       = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic             lk_valid,
  input  logic [KEY_W-1:0] lk_key,
  output logic             rs_valid,
  output logic             rs_hit,
  output logic [IDX_W-1:0] rs_index,
  // write
  input  logic             wr_valid,
  output logic             wr_ready,
  input  logic             wr_clear,
  input  logic [IDX_W-1:0] wr_index,
  input  logic [KEY_W-1:0] wr_value,
  input  logic [KEY_W-1:0] wr_mask,
  input  logic             wr_entry_valid,
  output logic             wr_done,
  // occupancy, for the control channel
  output logic [DEPTH-1:0] entry_valid
);
  logic [KEY_W-1:0] value [DEPTH];
  logic [KEY_W-1:0] mask  [DEPTH];
  logic [DEPTH-1:0] valid;

  assign entry_valid = valid;

  // ---------------------------------------------------------------- lookup
  logic [DEPTH-1:0] match;
  logic             hit;
  logic [IDX_W-1:0] first;

  always_comb begin
    for (int e = 0; e < DEPTH; e++)
      match[e] = valid[e] && (((lk_key ^ value[e]) & mask[e]) == '0);
  end

  // Priority encoder: lowest index wins.
  always_comb begin
    hit   = 1'b0;
    first = '0;
    for (int e = DEPTH - 1; e >= 0; e--) begin
      if (match[e]) begin
        hit   = 1'b1;
        first = IDX_W'(e);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rs_valid <= 1'b0;
      rs_hit   <= 1'b0;
      rs_index <= '0;
    end else begin
      rs_valid <= lk_valid;
      rs_hit   <= lk_valid && hit;
      rs_index <= first;
    end
  end

  // ----------------------------------------------------------------- write
  localparam int unsigned CW = $clog2(WRITE_CYCLES + 1);

  logic             busy;
  logic [CW-1:0]    cnt;
  logic             p_clear, p_valid;
  logic [IDX_W-1:0] p_index;
  logic [KEY_W-1:0] p_value, p_mask;
  logic             commit;

  assign wr_ready = !busy;
  assign commit   = busy && (cnt == CW'(WRITE_CYCLES - 1));
  assign wr_done  = commit;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
    end else if (wr_valid && wr_ready) begin
      busy <= 1'b1;
      cnt  <= '0;
    end else if (commit) begin
      busy <= 1'b0;
    end else if (busy) begin
      cnt <= cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_valid && wr_ready) begin
      p_clear <= wr_clear;
      p_index <= wr_index;
      p_value <= wr_value;
      p_mask  <= wr_mask;
      p_valid <= wr_entry_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (commit && !p_clear) begin
      value[p_index] <= p_value;
      mask[p_index]  <= p_mask;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) valid <= '0;
    else if (commit) begin
      if (p_clear) valid <= '0;
      else         valid[p_index] <= p_valid;
    end
  end

  initial begin
    if (WRITE_CYCLES < 1) $error("tcam: WRITE_CYCLES must be at least 1");
  end
endmodule
