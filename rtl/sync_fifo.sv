// sync_fifo: single-clock FIFO used inside the pipeline clock domain.
//
// Holds 2**ADDR_W words of W bits in a memory array, with first-word
// fall-through on the read side. count reports the occupancy. Reads and writes
// may happen in the same cycle, also when the FIFO is full (the write is then
// refused) or empty (the read is then refused). Synchronous, active-low reset
// empties it. This is a helper of this design; the document only names the
// queues it is used to build.
module sync_fifo #(
  parameter int unsigned W      = 8,
  parameter int unsigned ADDR_W = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_valid,
  output logic            wr_ready,
  input  logic [W-1:0]    wr_data,
  output logic            rd_valid,
  input  logic            rd_ready,
  output logic [W-1:0]    rd_data,
  output logic [ADDR_W:0] count
);
  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [W-1:0]    mem [DEPTH];
  logic [ADDR_W:0] wr_ptr, rd_ptr;
  logic            do_wr, do_rd;

  assign count    = wr_ptr - rd_ptr;
  assign wr_ready = count != DEPTH[ADDR_W:0];
  assign rd_valid = count != '0;
  assign rd_data  = mem[rd_ptr[ADDR_W-1:0]];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr[ADDR_W-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= rd_ptr + 1'b1;
    end
  end
endmodule
