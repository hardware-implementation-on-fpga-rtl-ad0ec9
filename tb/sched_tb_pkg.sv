// sched_tb_pkg: helpers shared by the scheduler testbenches.
//
// pe_func is the reference "work" a PE model performs on a sub-flow: every
// result slot is a hash of the task type, the slot number and the used input
// operands. Because PE models and reference models call the same function, a
// testbench can compute the memory image a sequential run would produce and
// compare the scheduler's in-order write-back with it.
package sched_tb_pkg;
  import mpt_pkg::*;

  function automatic logic [MAX_WR-1:0][DATA_W-1:0] pe_func(
      input logic [TYPE_W-1:0] ttype, input logic [NUM_W-1:0] in_num,
      input logic [MAX_RD-1:0][DATA_W-1:0] args);
    logic [MAX_WR-1:0][DATA_W-1:0] r;
    for (int j = 0; j < MAX_WR; j++) begin
      logic [31:0] acc;
      acc = 32'h9E37_79B1 * (32'(ttype) + 1) + 32'h85EB_CA77 * 32'(j);
      for (int i = 0; i < MAX_RD; i++)
        if (i < int'(in_num)) acc = ((acc ^ args[i]) * 32'h0100_0193) + 32'(i);
      r[j] = acc;
    end
    return r;
  endfunction

  // Start word of a sub-flow.
  function automatic logic [31:0] start_word(input logic [TYPE_W-1:0] ttype);
    return {START_TAG, 8'h00, ttype};
  endfunction
endpackage
