// hw_scheduler: MP-Tomasulo task-level out-of-order scheduler, (N_IP,N_GPP)-
// channel, (4,4) by default.
//
// A processor streams sub-flows (tasks with a type, a write set and a read set
// of variable IDs) into the Dataflow FIFO. The Dataflow Mapper maps each one
// to an IP core that implements its type or else to the least-loaded
// general-purpose processor, renames its operands through the Variable Set and
// the Ordering Unit, and parks it in that PE's Map Table. A Map Table hands a
// sub-flow to its PE as soon as all inputs are known. PEs report completion by
// interrupt; the Interrupt Controller picks one at a time, the Mapper stores
// the results in the Ordering Unit and broadcasts them to every Map Table, and
// the Ordering Unit writes results back to memory in program order. Only true
// (read-after-write) dependences delay a sub-flow; write-after-write and
// write-after-read conflicts vanish because each consumer names its producer by
// OU entry and memory is only written at in-order retirement.
//
// PE numbering: 0..N_IP-1 are IP cores, N_IP..N_PE-1 are GPPs.
// PE side, per PE: pe_task_valid/pe_task/pe_task_ready is a valid/ready
// handshake (task_t); when done, the PE holds pe_irq high with pe_result
// (result_t, returning the task's ou_id and mt_entry) until pe_irq_ack pulses.
// Memory side: a read port with one cycle of latency and a write port.
// Reconfiguration: rcfg_offline_en takes IP core rcfg_ip out of mapping;
// when ip_drained shows it empty, its bitstream can be swapped and
// rcfg_load_en installs the new rcfg_type and brings it back.
// sched_idle is high when no sub-flow is queued, pending or in flight (the
// point at which a kernel's closing synchronisation can proceed). pe_load
// gives, per PE, how many Map Table entries it holds (the mapper's 3-bit
// counters), as a status view of every PE.
//
// Sizes follow the design's configuration: DF 64x32, VS 256x6, OU 64x256,
// eight 4-entry MTs. IP_TYPE_INIT, the reset contents of the IP-core
// decoder, is this design's choice.
module hw_scheduler
  import mpt_pkg::*;
#(
  parameter int N_IP       = 4,
  parameter int N_GPP      = 4,
  parameter int DF_DEPTH   = 64,
  parameter int OU_DEPTH   = 64,
  parameter int VS_DEPTH   = 256,
  parameter int MT_ENTRIES = 4,
  parameter logic [3:0][TYPE_W-1:0] IP_TYPE_INIT = {8'd4, 8'd3, 8'd2, 8'd1},
  localparam int N_PE      = N_IP + N_GPP
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // issuing processor -> Dataflow FIFO
  input  logic                    df_wr_en,
  input  logic [DATA_W-1:0]       df_wr_data,
  output logic                    df_not_full,
  // processing elements
  output logic [N_PE-1:0]         pe_task_valid,
  output task_t [N_PE-1:0]        pe_task,
  input  logic [N_PE-1:0]         pe_task_ready,
  input  logic [N_PE-1:0]         pe_irq,
  input  result_t [N_PE-1:0]      pe_result,
  output logic [N_PE-1:0]         pe_irq_ack,
  // system memory
  output logic                    mem_rd_en,
  output logic [VAR_W-1:0]        mem_rd_addr,
  input  logic [DATA_W-1:0]       mem_rd_data,
  output logic                    mem_wr_en,
  output logic [VAR_W-1:0]        mem_wr_addr,
  output logic [DATA_W-1:0]       mem_wr_data,
  // reconfiguration
  input  logic                    rcfg_offline_en,
  input  logic                    rcfg_load_en,
  input  logic [$clog2(N_IP)-1:0] rcfg_ip,
  input  logic [TYPE_W-1:0]       rcfg_type,
  output logic [N_IP-1:0]         ip_drained,
  // status
  output logic [N_PE-1:0][$clog2(MT_ENTRIES+1)-1:0] pe_load,
  output logic                    sched_idle,
  output logic                    mt_full,
  output logic [15:0]             frame_errors
);
  localparam int CNT_W = $clog2(MT_ENTRIES + 1);

  // DF <-> DM
  logic                    df_valid, df_pop;
  logic [DATA_W-1:0]       df_data;
  logic [$clog2(DF_DEPTH+1)-1:0] df_count;
  // VS
  logic [VAR_W-1:0]        vs_rd_addr, vs_wr_addr;
  logic                    vs_rd_valid, vs_wr_en, vs_wr_valid;
  logic [OU_IDX_W-1:0]     vs_rd_idx, vs_wr_idx;
  // OU
  logic                          ou_alloc_en, ou_cmpl_en, ou_rel_en;
  logic [OU_IDX_W-1:0]           ou_alloc_idx, ou_cmpl_idx, ou_rel_idx, ou_rd_idx, ou_lk_idx;
  logic [NUM_W-1:0]              ou_alloc_out_num, ou_rd_out_num;
  logic [MAX_WR-1:0][VAR_W-1:0]  ou_alloc_vars, ou_rd_vars;
  logic [MAX_WR-1:0][DATA_W-1:0] ou_cmpl_values, ou_rd_values;
  logic                          ou_rd_done, ou_lk_done, ou_lk_hit;
  logic [VAR_W-1:0]              ou_lk_var;
  logic [DATA_W-1:0]             ou_lk_value;
  logic [OU_IDX_W:0]             ou_count;
  // MT command bus
  logic [N_PE-1:0]               mt_alloc_en, mt_wr_en, mt_commit_en, mt_rel_en, mt_free_valid;
  logic [MT_IDX_W-1:0]           mt_alloc_entry, mt_commit_entry, mt_rel_entry;
  logic [OU_IDX_W-1:0]           mt_alloc_ou_id;
  logic [TYPE_W-1:0]             mt_alloc_type;
  logic [NUM_W-1:0]              mt_alloc_in_num;
  logic [MT_IDX_W+PART_W:0]      mt_wr_addr;
  logic [DATA_W-1:0]             mt_wr_data;
  logic                          bc_en;
  logic [OU_IDX_W-1:0]           bc_ou_id;
  logic [VAR_W-1:0]              bc_var;
  logic [DATA_W-1:0]             bc_value;
  logic [N_PE-1:0][MT_IDX_W-1:0] mt_free_entry;
  logic [N_PE-1:0][CNT_W-1:0]    mt_count;
  // ICtr
  logic                          irq_grant_valid, irq_ack;
  logic [N_PE-1:0]               irq_grant;
  logic [$clog2(N_PE)-1:0]       irq_grant_id;
  logic                          dm_idle;

  dataflow_fifo #(.DEPTH(DF_DEPTH), .WIDTH(DATA_W)) u_df (
    .clk, .rst_n, .wr_en(df_wr_en), .wr_data(df_wr_data), .df_not_full,
    .dm_enable(df_pop), .rd_valid(df_valid), .rd_data(df_data), .count(df_count));

  variable_set #(.DEPTH(VS_DEPTH), .IDX_W(OU_IDX_W)) u_vs (
    .clk, .rst_n, .rd_addr(vs_rd_addr), .rd_valid(vs_rd_valid), .rd_idx(vs_rd_idx),
    .wr_en(vs_wr_en), .wr_addr(vs_wr_addr), .wr_valid(vs_wr_valid), .wr_idx(vs_wr_idx));

  ordering_unit #(.DEPTH(OU_DEPTH)) u_ou (
    .clk, .rst_n,
    .alloc_en(ou_alloc_en), .alloc_idx(ou_alloc_idx), .alloc_out_num(ou_alloc_out_num), .alloc_vars(ou_alloc_vars),
    .cmpl_en(ou_cmpl_en), .cmpl_idx(ou_cmpl_idx), .cmpl_values(ou_cmpl_values),
    .rel_en(ou_rel_en), .rel_idx(ou_rel_idx),
    .rd_idx(ou_rd_idx), .rd_done(ou_rd_done), .rd_out_num(ou_rd_out_num), .rd_vars(ou_rd_vars), .rd_values(ou_rd_values),
    .lk_idx(ou_lk_idx), .lk_var(ou_lk_var), .lk_done(ou_lk_done), .lk_hit(ou_lk_hit), .lk_value(ou_lk_value));

  for (genvar p = 0; p < N_PE; p++) begin : g_mt
    map_table #(.N_ENTRIES(MT_ENTRIES)) u_mt (
      .clk, .rst_n,
      .alloc_en(mt_alloc_en[p]), .alloc_entry(mt_alloc_entry), .alloc_ou_id(mt_alloc_ou_id),
      .alloc_type(mt_alloc_type), .alloc_in_num(mt_alloc_in_num),
      .wr_en(mt_wr_en[p]), .wr_addr(mt_wr_addr), .wr_data(mt_wr_data),
      .commit_en(mt_commit_en[p]), .commit_entry(mt_commit_entry),
      .bc_en, .bc_ou_id, .bc_var, .bc_value,
      .rel_en(mt_rel_en[p]), .rel_entry(mt_rel_entry),
      .task_valid(pe_task_valid[p]), .task_out(pe_task[p]), .task_ready(pe_task_ready[p]),
      .free_valid(mt_free_valid[p]), .free_entry(mt_free_entry[p]));
  end

  interrupt_controller #(.N_PE(N_PE)) u_ictr (
    .clk, .rst_n, .irq(pe_irq), .ack(irq_ack),
    .grant_valid(irq_grant_valid), .grant(irq_grant), .grant_id(irq_grant_id));

  dataflow_mapper #(.N_IP(N_IP), .N_GPP(N_GPP), .OU_DEPTH(OU_DEPTH), .MT_ENTRIES(MT_ENTRIES),
                    .IP_TYPE_INIT(IP_TYPE_INIT)) u_dm (
    .clk, .rst_n,
    .df_valid, .df_data, .df_pop,
    .vs_rd_addr, .vs_rd_valid, .vs_rd_idx, .vs_wr_en, .vs_wr_addr, .vs_wr_valid, .vs_wr_idx,
    .ou_alloc_en, .ou_alloc_idx, .ou_alloc_out_num, .ou_alloc_vars,
    .ou_cmpl_en, .ou_cmpl_idx, .ou_cmpl_values, .ou_rel_en, .ou_rel_idx,
    .ou_rd_idx, .ou_rd_done, .ou_rd_out_num, .ou_rd_vars, .ou_rd_values,
    .ou_lk_idx, .ou_lk_var, .ou_lk_done, .ou_lk_hit, .ou_lk_value,
    .mt_alloc_en, .mt_alloc_entry, .mt_alloc_ou_id, .mt_alloc_type, .mt_alloc_in_num,
    .mt_wr_en, .mt_wr_addr, .mt_wr_data, .mt_commit_en, .mt_commit_entry,
    .bc_en, .bc_ou_id, .bc_var, .bc_value, .mt_rel_en, .mt_rel_entry,
    .mt_free_valid, .mt_free_entry,
    .irq_grant_valid, .irq_grant_id, .irq_ack, .pe_result, .pe_irq_ack,
    .mem_rd_en, .mem_rd_addr, .mem_rd_data, .mem_wr_en, .mem_wr_addr, .mem_wr_data,
    .rcfg_offline_en, .rcfg_load_en, .rcfg_ip, .rcfg_type, .ip_drained,
    .dm_idle, .mt_full, .ou_count, .mt_count, .frame_errors);

  assign sched_idle = dm_idle && !df_valid && (ou_count == '0);
  assign pe_load    = mt_count;

  // The granted PE must be the one whose request is still up.
  a_grant_irq: assert property (@(posedge clk) disable iff (!rst_n)
                                irq_grant_valid |-> (pe_irq & irq_grant) != '0);
endmodule
