// External memory access recorder of the reporting module.
//
// While rec_en is high, every cycle with mem_valid high counts one external
// memory access and writes mem_addr into a circular buffer of DEPTH entries,
// so the buffer always holds the last DEPTH addresses accessed. clear empties
// the buffer and zeroes the count. The buffer is read through rd_idx, where
// index 0 is the oldest stored address and n_stored-1 the newest; rd_addr is
// combinational in rd_idx. access_count saturates at its maximum value.
//
// As in the original platform: the access count over the test period and the last 50
// addresses. Own choices: a circular buffer rather than a shifting FIFO, the
// saturating counter width and the oldest-first read order.
module addr_history
  import fi_pkg::*;
#(
  parameter int unsigned DEPTH   = HIST_DEPTH,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned COUNT_W = 32,
  localparam int unsigned IDX_W  = $clog2(DEPTH + 1)
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               clear,
  input  logic               rec_en,
  input  logic               mem_valid,
  input  logic [ADDR_W-1:0]  mem_addr,
  output logic [COUNT_W-1:0] access_count,
  output logic [IDX_W-1:0]   n_stored,
  input  logic [IDX_W-1:0]   rd_idx,
  output logic [ADDR_W-1:0]  rd_addr
);

  logic [ADDR_W-1:0] buf_q [DEPTH];
  logic [IDX_W-1:0]  wptr;   // next slot to write
  logic              full;   // DEPTH or more accesses seen

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      wptr         <= '0;
      full         <= 1'b0;
      access_count <= '0;
    end else if (rec_en && mem_valid) begin
      if (wptr == IDX_W'(DEPTH - 1)) begin
        wptr <= '0;
        full <= 1'b1;
      end else begin
        wptr <= wptr + 1'b1;
      end
      if (access_count != '1) access_count <= access_count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rec_en && mem_valid && !clear) buf_q[wptr] <= mem_addr;
  end

  assign n_stored = full ? IDX_W'(DEPTH) : wptr;

  // Physical slot of logical index rd_idx: oldest entry is at wptr when full.
  logic [IDX_W:0] phys_sum;
  logic [IDX_W-1:0] phys;
  always_comb begin
    phys_sum = (full ? {1'b0, wptr} : '0) + {1'b0, rd_idx};
    phys     = (phys_sum >= (IDX_W+1)'(DEPTH)) ? IDX_W'(phys_sum - (IDX_W+1)'(DEPTH))
                                               : IDX_W'(phys_sum);
    rd_addr  = (phys < IDX_W'(DEPTH)) ? buf_q[phys] : '0;
  end

endmodule
