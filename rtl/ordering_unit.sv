// ordering_unit: the Ordering Unit (OU), which keeps every executing sub-flow in
// the order it left the mapper and holds its results until it can be written
// to memory in that order.
//
// Each entry holds the sub-flow's write set (out_num variable IDs), a done flag
// and the 256-bit result row (MAX_WR x 32 bits). The Head and Tail registers
// that make the OU a FIFO live in the mapper, which drives every port here:
//   alloc_* : a new sub-flow at the tail records its write set, done = 0
//   cmpl_*  : a finished sub-flow stores its whole result row, done = 1
//   rel_*   : the retired head entry is cleared (done = 0)
//   rd_*    : asynchronous read of one entry (used to retire and to broadcast)
//   lk_*    : asynchronous lookup of the value one entry produced for one
//             variable (used to read an operand from a finished, unretired
//             producer); lk_hit says whether the entry writes that variable.
// All writes take effect at the next clock edge.
//
// The 64 x 256-bit result storage follows the design. Keeping the write-set
// IDs and out_num beside the result row (so that retirement knows which
// variables to write and which VS entries to free) is this design's choice.
module ordering_unit
  import mpt_pkg::*;
#(
  parameter int DEPTH = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // allocate
  input  logic                          alloc_en,
  input  logic [OU_IDX_W-1:0]           alloc_idx,
  input  logic [NUM_W-1:0]              alloc_out_num,
  input  logic [MAX_WR-1:0][VAR_W-1:0]  alloc_vars,
  // complete
  input  logic                          cmpl_en,
  input  logic [OU_IDX_W-1:0]           cmpl_idx,
  input  logic [MAX_WR-1:0][DATA_W-1:0] cmpl_values,
  // release
  input  logic                          rel_en,
  input  logic [OU_IDX_W-1:0]           rel_idx,
  // read one entry
  input  logic [OU_IDX_W-1:0]           rd_idx,
  output logic                          rd_done,
  output logic [NUM_W-1:0]              rd_out_num,
  output logic [MAX_WR-1:0][VAR_W-1:0]  rd_vars,
  output logic [MAX_WR-1:0][DATA_W-1:0] rd_values,
  // look up one variable of one entry
  input  logic [OU_IDX_W-1:0]           lk_idx,
  input  logic [VAR_W-1:0]              lk_var,
  output logic                          lk_done,
  output logic                          lk_hit,
  output logic [DATA_W-1:0]             lk_value
);
  logic [MAX_WR-1:0][DATA_W-1:0] val_mem  [DEPTH];
  logic [MAX_WR-1:0][VAR_W-1:0]  var_mem  [DEPTH];
  logic [NUM_W-1:0]              num_mem  [DEPTH];
  logic [DEPTH-1:0]              done;

  always_ff @(posedge clk) begin
    if (cmpl_en) val_mem[cmpl_idx] <= cmpl_values;
    if (alloc_en) begin
      var_mem[alloc_idx] <= alloc_vars;
      num_mem[alloc_idx] <= alloc_out_num;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) done <= '0;
    else begin
      if (rel_en)   done[rel_idx]   <= 1'b0;
      if (alloc_en) done[alloc_idx] <= 1'b0;
      if (cmpl_en)  done[cmpl_idx]  <= 1'b1;
    end
  end

  assign rd_done    = done[rd_idx];
  assign rd_out_num = num_mem[rd_idx];
  assign rd_vars    = var_mem[rd_idx];
  assign rd_values  = val_mem[rd_idx];

  // Lookup: the last matching slot among the first out_num wins, the same
  // order in which retirement writes memory.
  logic [MAX_WR-1:0][VAR_W-1:0]  lk_vars;
  logic [MAX_WR-1:0][DATA_W-1:0] lk_vals;
  logic [NUM_W-1:0]              lk_num;
  assign lk_vars = var_mem[lk_idx];
  assign lk_vals = val_mem[lk_idx];
  assign lk_num  = num_mem[lk_idx];
  assign lk_done = done[lk_idx];

  always_comb begin
    lk_hit   = 1'b0;
    lk_value = '0;
    for (int k = 0; k < MAX_WR; k++) begin
      if (NUM_W'(k) < lk_num && lk_vars[k] == lk_var) begin
        lk_hit   = 1'b1;
        lk_value = lk_vals[k];
      end
    end
  end

  a_cmpl_twice: assert property (@(posedge clk) disable iff (!rst_n) cmpl_en |-> !done[cmpl_idx]);
endmodule
