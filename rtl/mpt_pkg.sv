// mpt_pkg: types and constants shared by the MP-Tomasulo task scheduler.
//
// A task ("sub-flow") has up to MAX_WR output variables (write set) and up to
// MAX_RD input variables (read set). Every variable is a 32-bit value named by
// an 8-bit ID, which is also its address in the Variable Set (VS). Sub-flows in
// flight are numbered by their 6-bit Ordering Unit (OU) entry.
//
// Widths follow the scheduler configuration of the design (8-bit parameter IDs,
// 6-bit OU index, 8 + 8 parameters of 32 bits, 4-entry map tables). The sub-flow
// word encoding (START/END flags, where the type sits) and the extra dispatch
// fields (type, in_num) are this design's own choices.
package mpt_pkg;

  localparam int DATA_W     = 32;  // width of a parameter value / DF word
  localparam int VAR_W      = 8;   // parameter ID = VS address
  localparam int OU_IDX_W   = 6;   // OU entry index
  localparam int MAX_WR     = 8;   // outputs per sub-flow
  localparam int MAX_RD     = 8;   // inputs per sub-flow
  localparam int NUM_W      = 4;   // holds 0..8
  localparam int TYPE_W     = 8;   // task type code
  localparam int MT_IDX_W   = 2;   // entry index in a 4-entry map table
  localparam int PART_W     = 3;   // selects one of 8 parameter slots

  // Dataflow word encoding.
  //   word 0      : {START_TAG, 8'h00, type}
  //   word 1      : out_num   (0..MAX_WR)
  //   word 2      : in_num    (0..MAX_RD)
  //   out_num words: write-set variable IDs in bits [7:0]
  //   in_num words : read-set variable IDs in bits [7:0]
  //   last word   : END_FLAG
  localparam logic [15:0] START_TAG = 16'h5F10;
  localparam logic [31:0] END_FLAG  = 32'hE0F1_0E0D;

  // One 9-bit Read_Set_Status field: parameter ID then a "prepared" bit.
  typedef struct packed {
    logic [VAR_W-1:0] var_id;
    logic             ready;
  } rs_status_t;

  // Sub-flow handed from a map table to its PE.
  typedef struct packed {
    logic [OU_IDX_W-1:0]           ou_id;
    logic [MT_IDX_W-1:0]           mt_entry;
    logic [TYPE_W-1:0]             ttype;
    logic [NUM_W-1:0]              in_num;
    logic [MAX_RD-1:0][DATA_W-1:0] args;
  } task_t;

  // Results a PE returns with its interrupt.
  typedef struct packed {
    logic [OU_IDX_W-1:0]           ou_id;
    logic [MT_IDX_W-1:0]           mt_entry;
    logic [MAX_WR-1:0][DATA_W-1:0] results;
  } result_t;

endpackage
