// variable_set: the Variable Set (VS), the scheduler's register status table.
//
// One entry per variable (the variable ID is the address). An entry is either
// free, meaning the variable's latest value is in system memory, or holds the
// OU entry of the in-flight sub-flow that will produce the variable's newest
// value. The mapper points an entry at a new producer when a sub-flow that
// writes the variable is issued (this is the renaming step), and frees it when
// that producer retires from the OU head.
//
// Interface: asynchronous read (rd_addr -> rd_valid/rd_idx in the same cycle),
// one synchronous write port. Timing: a write is visible to reads from the next
// cycle on.
//
// DEPTH 256 and the 6-bit content follow the design. The design marks a free
// entry with a reserved value "N" inside the 6-bit field; since all 64 codes are
// valid OU indices, this implementation keeps a separate valid bit per entry
// (reset to free) instead.
module variable_set #(
  parameter int DEPTH = 256,
  parameter int IDX_W = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic                     rd_valid,
  output logic [IDX_W-1:0]         rd_idx,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic                     wr_valid,
  input  logic [IDX_W-1:0]         wr_idx
);
  logic [IDX_W-1:0] idx_mem [DEPTH];
  logic [DEPTH-1:0] valid;

  assign rd_valid = valid[rd_addr];
  assign rd_idx   = idx_mem[rd_addr];

  always_ff @(posedge clk) begin
    if (wr_en) idx_mem[wr_addr] <= wr_idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid <= '0;
    else if (wr_en) valid[wr_addr] <= wr_valid;
  end
endmodule
