// map_table: one PE's Map Table (MT), a task-level reservation station.
//
// Each of the N_ENTRIES entries holds one sub-flow mapped to this PE: its OU
// entry (OU_ID), eight 9-bit Read_Set_Status fields {parameter ID, prepared}
// and eight 32-bit Parameters_Value slots. A prepared slot holds the operand
// itself; an unprepared slot holds (in its low bits) the OU entry that will
// produce the operand. Together the tables form an implicit dependence graph.
//
// Operations, all driven by the mapper and taking effect at the next edge:
//   alloc_*  open an entry: busy, OU_ID, type, in_num; every slot prepared
//            (unused slots stay so) and the entry not yet dispatchable.
//   wr_*     the design's MT address: {entry[1:0], tag, part[2:0]}; tag 0
//            writes Read_Set_Status[part] from wr_data[8:0], tag 1 writes
//            Parameters_Value[part].
//   commit_* the entry is complete and may be dispatched.
//   bc_*     result broadcast: every unprepared slot whose parameter ID equals
//            bc_var and that waits on OU entry bc_ou_id takes bc_value and
//            becomes prepared. This is how WAW/WAR hazards are avoided: a
//            consumer waits on a particular producer, not on the variable.
//   rel_*    free an entry after its PE has reported completion.
// Dispatch: the lowest-numbered committed, undispatched entry whose slots are
// all prepared is offered on task/task_valid; it is marked dispatched when the
// PE takes it (task_ready). free_valid/free_entry name the lowest free entry.
//
// Entry layout, the 6-bit address and the dependence-by-OU_ID scheme follow
// the design. The extra per-entry fields (busy, committed, dispatched, type,
// in_num), the valid/ready dispatch handshake and lowest-entry-first dispatch
// order are this design's choices.
module map_table
  import mpt_pkg::*;
#(
  parameter int N_ENTRIES = 4
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      alloc_en,
  input  logic [MT_IDX_W-1:0]       alloc_entry,
  input  logic [OU_IDX_W-1:0]       alloc_ou_id,
  input  logic [TYPE_W-1:0]         alloc_type,
  input  logic [NUM_W-1:0]          alloc_in_num,
  input  logic                      wr_en,
  input  logic [MT_IDX_W+PART_W:0]  wr_addr,
  input  logic [DATA_W-1:0]         wr_data,
  input  logic                      commit_en,
  input  logic [MT_IDX_W-1:0]       commit_entry,
  input  logic                      bc_en,
  input  logic [OU_IDX_W-1:0]       bc_ou_id,
  input  logic [VAR_W-1:0]          bc_var,
  input  logic [DATA_W-1:0]         bc_value,
  input  logic                      rel_en,
  input  logic [MT_IDX_W-1:0]       rel_entry,
  output logic                      task_valid,
  output task_t                     task_out,
  input  logic                      task_ready,
  output logic                      free_valid,
  output logic [MT_IDX_W-1:0]       free_entry
);
  typedef struct packed {
    logic                          busy;
    logic                          committed;
    logic                          dispatched;
    logic [OU_IDX_W-1:0]           ou_id;
    logic [TYPE_W-1:0]             ttype;
    logic [NUM_W-1:0]              in_num;
    rs_status_t [MAX_RD-1:0]       status;
    logic [MAX_RD-1:0][DATA_W-1:0] value;
  } mt_entry_t;

  mt_entry_t ent [N_ENTRIES];

  logic [MT_IDX_W-1:0] wr_entry;
  logic                wr_tag;
  logic [PART_W-1:0]   wr_part;
  assign {wr_entry, wr_tag, wr_part} = wr_addr;

  // Choose the entry to dispatch and the entry to fill next.
  logic                disp_any;
  logic [MT_IDX_W-1:0] disp_idx;
  always_comb begin
    disp_any   = 1'b0;
    disp_idx   = '0;
    free_valid = 1'b0;
    free_entry = '0;
    for (int e = N_ENTRIES - 1; e >= 0; e--) begin
      logic all_ready;
      all_ready = 1'b1;
      for (int k = 0; k < MAX_RD; k++) all_ready &= ent[e].status[k].ready;
      if (ent[e].busy && ent[e].committed && !ent[e].dispatched && all_ready) begin
        disp_any = 1'b1;
        disp_idx = MT_IDX_W'(e);
      end
      if (!ent[e].busy) begin
        free_valid = 1'b1;
        free_entry = MT_IDX_W'(e);
      end
    end
  end

  assign task_valid        = disp_any;
  assign task_out.ou_id    = ent[disp_idx].ou_id;
  assign task_out.mt_entry = disp_idx;
  assign task_out.ttype    = ent[disp_idx].ttype;
  assign task_out.in_num   = ent[disp_idx].in_num;
  assign task_out.args     = ent[disp_idx].value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < N_ENTRIES; e++) ent[e] <= '0;
    end else begin
      for (int e = 0; e < N_ENTRIES; e++) begin
        // broadcast capture
        if (bc_en && ent[e].busy) begin
          for (int k = 0; k < MAX_RD; k++) begin
            if (!ent[e].status[k].ready && ent[e].status[k].var_id == bc_var &&
                ent[e].value[k][OU_IDX_W-1:0] == bc_ou_id) begin
              ent[e].status[k].ready <= 1'b1;
              ent[e].value[k]        <= bc_value;
            end
          end
        end
        if (task_valid && task_ready && disp_idx == MT_IDX_W'(e))
          ent[e].dispatched <= 1'b1;
        if (commit_en && commit_entry == MT_IDX_W'(e))
          ent[e].committed <= 1'b1;
        if (wr_en && wr_entry == MT_IDX_W'(e)) begin
          if (wr_tag) ent[e].value[wr_part]  <= wr_data;
          else        ent[e].status[wr_part] <= rs_status_t'(wr_data[VAR_W:0]);
        end
        if (rel_en && rel_entry == MT_IDX_W'(e))
          ent[e].busy <= 1'b0;
        if (alloc_en && alloc_entry == MT_IDX_W'(e)) begin
          ent[e].busy       <= 1'b1;
          ent[e].committed  <= 1'b0;
          ent[e].dispatched <= 1'b0;
          ent[e].ou_id      <= alloc_ou_id;
          ent[e].ttype      <= alloc_type;
          ent[e].in_num     <= alloc_in_num;
          for (int k = 0; k < MAX_RD; k++) ent[e].status[k] <= '{var_id: '0, ready: 1'b1};
        end
      end
    end
  end

  a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
                                 alloc_en |-> !ent[alloc_entry].busy);
  a_rel_busy:   assert property (@(posedge clk) disable iff (!rst_n)
                                 rel_en |-> ent[rel_entry].busy && ent[rel_entry].dispatched);
endmodule
