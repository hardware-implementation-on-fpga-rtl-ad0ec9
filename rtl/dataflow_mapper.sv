// dataflow_mapper: the Dataflow Mapper (DM), control centre of the MP-Tomasulo
// scheduler. It is the only block that writes the Variable Set (VS), the
// Ordering Unit (OU) and the Map Tables (MT), so their updates never race.
//
// One finite-state machine serves three jobs, in this priority order whenever
// it is idle:
//  1. Interrupt (write results). The Interrupt Controller grants one finished
//     PE. The DM stores the PE's result row in the sub-flow's OU entry, then
//     broadcasts each written variable (OU entry, variable ID, value) to all
//     MTs, one per cycle, so every waiting consumer captures it (a slot whose
//     variable a later slot of the same sub-flow also writes is skipped). It then frees
//     the PE's MT entry, decrements that MT's 3-bit counter and acknowledges.
//  2. Retire. When the OU head entry is done, its write set is written to
//     system memory in order, one variable per cycle; each VS entry that still
//     names the head as producer is freed. Head Reg then advances.
//  3. Issue. The DM reads one sub-flow from the Dataflow FIFO (start word with
//     type, out_num, in_num, write-set IDs, read-set IDs, end flag), then maps
//     it with the design's Algorithm 2: the first IP core whose decoder entry
//     matches the type and whose MT has a free entry; otherwise the GPP with
//     the most free MT entries; otherwise the sub-flow stays pending (MT full)
//     while interrupts and retirement go on. It also waits while the OU is
//     full. A mapped sub-flow gets the OU entry at Tail Reg and an MT entry;
//     each read operand is resolved through the VS: no producer in flight ->
//     value read from memory; producer finished -> value taken from its OU
//     entry; producer still running -> the slot records the producer's OU
//     entry (renaming). Only then are the write-set VS entries pointed at the
//     new OU entry, so a task that reads and writes a variable sees the old
//     producer. Finally the MT entry is committed and Tail Reg and the MT's
//     counter advance.
//
// Reconfiguration: rcfg_offline marks an IP core as full so nothing more is
// mapped to it (ip_drained says when its MT is empty); rcfg_load writes the
// core's new type into the decoder and brings it back online.
//
// Timing: memory reads have one cycle of latency (mem_rd_en/addr, data on the
// next cycle). Issue of a sub-flow with w outputs and r inputs takes
// 3 + w + r + 1 cycles of parsing plus 1 (map) + 1 (alloc) + 2r + w + 1
// (commit); a 1-input, 1-output sub-flow is issued in 12 cycles. Interrupt
// service takes 3 + out_num cycles, retirement 2 + out_num.
//
// Algorithm 2, the counters, Head/Tail registers, IP-before-GPP priority and
// the three stages follow the design. The serial one-item-per-cycle schedule,
// the priority among the three jobs, the word format and the offline flag (the
// design instead loads the counter with the entry count) are this design's
// choices. Malformed sub-flows are dropped and counted in frame_errors.
module dataflow_mapper
  import mpt_pkg::*;
#(
  parameter int N_IP       = 4,
  parameter int N_GPP      = 4,
  parameter int OU_DEPTH   = 64,
  parameter int MT_ENTRIES = 4,
  parameter logic [3:0][TYPE_W-1:0] IP_TYPE_INIT = {8'd4, 8'd3, 8'd2, 8'd1},
  localparam int N_PE      = N_IP + N_GPP,
  localparam int PE_W      = $clog2(N_PE),
  localparam int CNT_W     = $clog2(MT_ENTRIES + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // Dataflow FIFO
  input  logic                          df_valid,
  input  logic [DATA_W-1:0]             df_data,
  output logic                          df_pop,
  // Variable Set
  output logic [VAR_W-1:0]              vs_rd_addr,
  input  logic                          vs_rd_valid,
  input  logic [OU_IDX_W-1:0]           vs_rd_idx,
  output logic                          vs_wr_en,
  output logic [VAR_W-1:0]              vs_wr_addr,
  output logic                          vs_wr_valid,
  output logic [OU_IDX_W-1:0]           vs_wr_idx,
  // Ordering Unit
  output logic                          ou_alloc_en,
  output logic [OU_IDX_W-1:0]           ou_alloc_idx,
  output logic [NUM_W-1:0]              ou_alloc_out_num,
  output logic [MAX_WR-1:0][VAR_W-1:0]  ou_alloc_vars,
  output logic                          ou_cmpl_en,
  output logic [OU_IDX_W-1:0]           ou_cmpl_idx,
  output logic [MAX_WR-1:0][DATA_W-1:0] ou_cmpl_values,
  output logic                          ou_rel_en,
  output logic [OU_IDX_W-1:0]           ou_rel_idx,
  output logic [OU_IDX_W-1:0]           ou_rd_idx,
  input  logic                          ou_rd_done,
  input  logic [NUM_W-1:0]              ou_rd_out_num,
  input  logic [MAX_WR-1:0][VAR_W-1:0]  ou_rd_vars,
  input  logic [MAX_WR-1:0][DATA_W-1:0] ou_rd_values,
  output logic [OU_IDX_W-1:0]           ou_lk_idx,
  output logic [VAR_W-1:0]              ou_lk_var,
  input  logic                          ou_lk_done,
  input  logic                          ou_lk_hit,
  input  logic [DATA_W-1:0]             ou_lk_value,
  // Map Tables (shared command bus, per-MT enables)
  output logic [N_PE-1:0]               mt_alloc_en,
  output logic [MT_IDX_W-1:0]           mt_alloc_entry,
  output logic [OU_IDX_W-1:0]           mt_alloc_ou_id,
  output logic [TYPE_W-1:0]             mt_alloc_type,
  output logic [NUM_W-1:0]              mt_alloc_in_num,
  output logic [N_PE-1:0]               mt_wr_en,
  output logic [MT_IDX_W+PART_W:0]      mt_wr_addr,
  output logic [DATA_W-1:0]             mt_wr_data,
  output logic [N_PE-1:0]               mt_commit_en,
  output logic [MT_IDX_W-1:0]           mt_commit_entry,
  output logic                          bc_en,
  output logic [OU_IDX_W-1:0]           bc_ou_id,
  output logic [VAR_W-1:0]              bc_var,
  output logic [DATA_W-1:0]             bc_value,
  output logic [N_PE-1:0]               mt_rel_en,
  output logic [MT_IDX_W-1:0]           mt_rel_entry,
  input  logic [N_PE-1:0]               mt_free_valid,
  input  logic [N_PE-1:0][MT_IDX_W-1:0] mt_free_entry,
  // Interrupt Controller and PE results
  input  logic                          irq_grant_valid,
  input  logic [PE_W-1:0]               irq_grant_id,
  output logic                          irq_ack,
  input  result_t [N_PE-1:0]            pe_result,
  output logic [N_PE-1:0]               pe_irq_ack,
  // System memory
  output logic                          mem_rd_en,
  output logic [VAR_W-1:0]              mem_rd_addr,
  input  logic [DATA_W-1:0]             mem_rd_data,
  output logic                          mem_wr_en,
  output logic [VAR_W-1:0]              mem_wr_addr,
  output logic [DATA_W-1:0]             mem_wr_data,
  // Reconfiguration of IP cores
  input  logic                          rcfg_offline_en,
  input  logic                          rcfg_load_en,
  input  logic [$clog2(N_IP)-1:0]       rcfg_ip,
  input  logic [TYPE_W-1:0]             rcfg_type,
  output logic [N_IP-1:0]               ip_drained,
  // Status
  output logic                          dm_idle,
  output logic                          mt_full,
  output logic [OU_IDX_W:0]             ou_count,
  output logic [N_PE-1:0][CNT_W-1:0]    mt_count,
  output logic [15:0]                   frame_errors
);
  typedef enum logic [4:0] {
    S_IDLE, S_HDR_OUT, S_HDR_IN, S_WVARS, S_RVARS, S_END,
    S_MAP, S_ALLOC, S_RD_STAT, S_RD_VAL, S_VS_UPD, S_COMMIT,
    S_IRQ_CAP, S_BCAST, S_IRQ_END, S_RETIRE, S_RET_END
  } state_t;

  state_t                        state;
  logic [3:0]                    k;          // parameter counter
  logic                          pending;    // a parsed sub-flow awaits mapping
  logic [TYPE_W-1:0]             type_q;
  logic [NUM_W-1:0]              out_num_q, in_num_q;
  logic [MAX_WR-1:0][VAR_W-1:0]  wvars_q;
  logic [MAX_RD-1:0][VAR_W-1:0]  rvars_q;
  logic [PE_W-1:0]               tgt_q;
  logic [MT_IDX_W-1:0]           tgt_entry_q;
  logic [OU_IDX_W-1:0]           head_q, tail_q;
  logic                          from_mem_q;
  logic [DATA_W-1:0]             rd_val_q;
  logic [PE_W-1:0]               g_q;
  result_t                       res_q;
  logic [N_IP-1:0][TYPE_W-1:0]   ip_type;
  logic [N_IP-1:0]               ip_offline;

  // ---------------------------------------------------------------- mapping
  logic            map_ok;
  logic [PE_W-1:0] map_pe;
  always_comb begin
    logic            ip_found, g_found;
    logic [PE_W-1:0] ip_sel, g_sel;
    logic [CNT_W-1:0] g_min;
    ip_found = 1'b0;
    ip_sel   = '0;
    for (int i = N_IP - 1; i >= 0; i--) begin
      if (!ip_offline[i] && ip_type[i] == type_q && mt_count[i] < CNT_W'(MT_ENTRIES)) begin
        ip_found = 1'b1;
        ip_sel   = PE_W'(i);
      end
    end
    g_found = 1'b0;
    g_sel   = '0;
    g_min   = CNT_W'(MT_ENTRIES);
    for (int i = N_IP; i < N_PE; i++) begin
      if (mt_count[i] < g_min) begin
        g_found = 1'b1;
        g_sel   = PE_W'(i);
        g_min   = mt_count[i];
      end
    end
    map_ok = ip_found || g_found;
    map_pe = ip_found ? ip_sel : g_sel;
  end

  assign mt_full = pending && !map_ok;
  assign dm_idle = (state == S_IDLE) && !pending;

  for (genvar i = 0; i < N_IP; i++) begin : g_drain
    assign ip_drained[i] = (mt_count[i] == '0);
  end

  // Operand resolution for the read slot k (used in S_RD_STAT).
  logic              rs_ready;
  logic [DATA_W-1:0] rs_value;
  always_comb begin
    if (!vs_rd_valid) begin
      rs_ready = 1'b1;            // latest value is in memory
      rs_value = '0;
    end else if (ou_lk_done) begin
      rs_ready = 1'b1;            // producer finished, not yet retired
      rs_value = ou_lk_value;
    end else begin
      rs_ready = 1'b0;            // wait for the producer's broadcast
      rs_value = DATA_W'(vs_rd_idx);
    end
  end

  logic retire_ready;
  assign retire_ready = (ou_count != '0) && ou_rd_done;

  // A write-set slot is not broadcast when a later slot of the same sub-flow
  // writes the same variable: the later value is the one that survives.
  logic bc_shadowed;
  always_comb begin
    bc_shadowed = 1'b0;
    for (int j = 0; j < MAX_WR; j++)
      if (j > int'(k) && NUM_W'(j) < ou_rd_out_num && ou_rd_vars[j] == ou_rd_vars[k[2:0]])
        bc_shadowed = 1'b1;
  end

  // ------------------------------------------------------- datapath muxing
  always_comb begin
    df_pop          = 1'b0;
    vs_rd_addr      = (state == S_RETIRE) ? ou_rd_vars[k[2:0]] : rvars_q[k[2:0]];
    vs_wr_en        = 1'b0;
    vs_wr_addr      = wvars_q[k[2:0]];
    vs_wr_valid     = 1'b1;
    vs_wr_idx       = tail_q;
    ou_alloc_en     = 1'b0;
    ou_alloc_idx    = tail_q;
    ou_alloc_out_num= out_num_q;
    ou_alloc_vars   = wvars_q;
    ou_cmpl_en      = 1'b0;
    ou_cmpl_idx     = pe_result[irq_grant_id].ou_id;
    ou_cmpl_values  = pe_result[irq_grant_id].results;
    ou_rel_en       = 1'b0;
    ou_rel_idx      = head_q;
    ou_rd_idx       = (state == S_RETIRE || state == S_RET_END || state == S_IDLE) ? head_q : res_q.ou_id;
    ou_lk_idx       = vs_rd_idx;
    ou_lk_var       = rvars_q[k[2:0]];
    mt_alloc_en     = '0;
    mt_alloc_entry  = mt_free_entry[tgt_q];
    mt_alloc_ou_id  = tail_q;
    mt_alloc_type   = type_q;
    mt_alloc_in_num = in_num_q;
    mt_wr_en        = '0;
    mt_wr_addr      = {tgt_entry_q, 1'b0, k[2:0]};
    mt_wr_data      = '0;
    mt_commit_en    = '0;
    mt_commit_entry = tgt_entry_q;
    bc_en           = 1'b0;
    bc_ou_id        = res_q.ou_id;
    bc_var          = ou_rd_vars[k[2:0]];
    bc_value        = res_q.results[k[2:0]];
    mt_rel_en       = '0;
    mt_rel_entry    = res_q.mt_entry;
    irq_ack         = 1'b0;
    pe_irq_ack      = '0;
    mem_rd_en       = 1'b0;
    mem_rd_addr     = rvars_q[k[2:0]];
    mem_wr_en       = 1'b0;
    mem_wr_addr     = ou_rd_vars[k[2:0]];
    mem_wr_data     = ou_rd_values[k[2:0]];

    unique case (state)
      S_IDLE:    df_pop = !irq_grant_valid && !retire_ready && !pending && df_valid;
      S_HDR_OUT, S_HDR_IN, S_WVARS, S_RVARS, S_END: df_pop = df_valid;
      S_ALLOC: begin
        ou_alloc_en         = 1'b1;
        mt_alloc_en[tgt_q]  = 1'b1;
      end
      S_RD_STAT: begin
        mt_wr_en[tgt_q] = 1'b1;
        mt_wr_addr      = {tgt_entry_q, 1'b0, k[2:0]};
        mt_wr_data      = DATA_W'({rvars_q[k[2:0]], rs_ready});
        mem_rd_en       = !vs_rd_valid;
      end
      S_RD_VAL: begin
        mt_wr_en[tgt_q] = 1'b1;
        mt_wr_addr      = {tgt_entry_q, 1'b1, k[2:0]};
        mt_wr_data      = from_mem_q ? mem_rd_data : rd_val_q;
      end
      S_VS_UPD:  vs_wr_en = 1'b1;
      S_COMMIT:  mt_commit_en[tgt_q] = 1'b1;
      S_IRQ_CAP: ou_cmpl_en = 1'b1;
      S_BCAST:   bc_en = (k < ou_rd_out_num) && !bc_shadowed;
      S_IRQ_END: begin
        mt_rel_en[g_q]  = 1'b1;
        pe_irq_ack[g_q] = 1'b1;
        irq_ack         = 1'b1;
      end
      S_RETIRE: begin
        if (k < ou_rd_out_num) begin
          mem_wr_en   = 1'b1;
          vs_wr_en    = vs_rd_valid && (vs_rd_idx == head_q);
          vs_wr_addr  = ou_rd_vars[k[2:0]];
          vs_wr_valid = 1'b0;
        end
      end
      S_RET_END: ou_rel_en = 1'b1;
      default: ;
    endcase
  end

  // ------------------------------------------------------------------ FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      k            <= '0;
      pending      <= 1'b0;
      type_q       <= '0;
      out_num_q    <= '0;
      in_num_q     <= '0;
      wvars_q      <= '0;
      rvars_q      <= '0;
      tgt_q        <= '0;
      tgt_entry_q  <= '0;
      head_q       <= '0;
      tail_q       <= '0;
      ou_count     <= '0;
      from_mem_q   <= 1'b0;
      rd_val_q     <= '0;
      g_q          <= '0;
      res_q        <= '0;
      mt_count     <= '0;
      frame_errors <= '0;
      ip_offline   <= '0;
      for (int i = 0; i < N_IP; i++) ip_type[i] <= IP_TYPE_INIT[i];
    end else begin
      if (rcfg_offline_en) ip_offline[rcfg_ip] <= 1'b1;
      if (rcfg_load_en) begin
        ip_type[rcfg_ip]    <= rcfg_type;
        ip_offline[rcfg_ip] <= 1'b0;
      end

      unique case (state)
        S_IDLE: begin
          k <= '0;
          if (irq_grant_valid) begin
            state <= S_IRQ_CAP;
          end else if (retire_ready) begin
            state <= S_RETIRE;
          end else if (pending) begin
            state <= S_MAP;
          end else if (df_valid) begin
            if (df_data[31:16] == START_TAG) begin
              type_q <= df_data[TYPE_W-1:0];
              state  <= S_HDR_OUT;
            end else begin
              frame_errors <= frame_errors + 1'b1;
            end
          end
        end
        S_HDR_OUT: if (df_valid) begin
          out_num_q <= df_data[NUM_W-1:0];
          if (df_data > DATA_W'(MAX_WR)) begin
            frame_errors <= frame_errors + 1'b1;
            state        <= S_IDLE;
          end else state <= S_HDR_IN;
        end
        S_HDR_IN: if (df_valid) begin
          in_num_q <= df_data[NUM_W-1:0];
          k        <= '0;
          if (df_data > DATA_W'(MAX_RD)) begin
            frame_errors <= frame_errors + 1'b1;
            state        <= S_IDLE;
          end else if (out_num_q != '0)    state <= S_WVARS;
          else if (df_data[NUM_W-1:0] != '0) state <= S_RVARS;
          else                               state <= S_END;
        end
        S_WVARS: if (df_valid) begin
          wvars_q[k[2:0]] <= df_data[VAR_W-1:0];
          if (k + 1'b1 == out_num_q) begin
            k     <= '0;
            state <= (in_num_q != '0) ? S_RVARS : S_END;
          end else k <= k + 1'b1;
        end
        S_RVARS: if (df_valid) begin
          rvars_q[k[2:0]] <= df_data[VAR_W-1:0];
          if (k + 1'b1 == in_num_q) begin
            k     <= '0;
            state <= S_END;
          end else k <= k + 1'b1;
        end
        S_END: if (df_valid) begin
          if (df_data == END_FLAG) begin
            pending <= 1'b1;
            state   <= S_MAP;
          end else begin
            frame_errors <= frame_errors + 1'b1;
            state        <= S_IDLE;
          end
        end
        S_MAP: begin
          if (map_ok && ou_count != (OU_IDX_W+1)'(OU_DEPTH) && !irq_grant_valid) begin
            tgt_q <= map_pe;
            state <= S_ALLOC;
          end else begin
            state <= S_IDLE;   // let interrupts and retirement free resources
          end
        end
        S_ALLOC: begin
          tgt_entry_q <= mt_free_entry[tgt_q];
          pending     <= 1'b0;
          k           <= '0;
          if (in_num_q != '0)       state <= S_RD_STAT;
          else if (out_num_q != '0) state <= S_VS_UPD;
          else                      state <= S_COMMIT;
        end
        S_RD_STAT: begin
          from_mem_q <= !vs_rd_valid;
          rd_val_q   <= rs_value;
          state      <= S_RD_VAL;
        end
        S_RD_VAL: begin
          if (k + 1'b1 == in_num_q) begin
            k     <= '0;
            state <= (out_num_q != '0) ? S_VS_UPD : S_COMMIT;
          end else begin
            k     <= k + 1'b1;
            state <= S_RD_STAT;
          end
        end
        S_VS_UPD: begin
          if (k + 1'b1 == out_num_q) begin
            k     <= '0;
            state <= S_COMMIT;
          end else k <= k + 1'b1;
        end
        S_COMMIT: begin
          tail_q          <= (tail_q == OU_IDX_W'(OU_DEPTH - 1)) ? '0 : tail_q + 1'b1;
          ou_count        <= ou_count + 1'b1;
          mt_count[tgt_q] <= mt_count[tgt_q] + 1'b1;
          state           <= S_IDLE;
        end
        S_IRQ_CAP: begin
          g_q   <= irq_grant_id;
          res_q <= pe_result[irq_grant_id];
          k     <= '0;
          state <= S_BCAST;
        end
        S_BCAST: begin
          if (k + 1'b1 >= ou_rd_out_num) begin
            k     <= '0;
            state <= S_IRQ_END;
          end else k <= k + 1'b1;
        end
        S_IRQ_END: begin
          mt_count[g_q] <= mt_count[g_q] - 1'b1;
          state         <= S_IDLE;
        end
        S_RETIRE: begin
          if (k + 1'b1 >= ou_rd_out_num) begin
            k     <= '0;
            state <= S_RET_END;
          end else k <= k + 1'b1;
        end
        S_RET_END: begin
          head_q   <= (head_q == OU_IDX_W'(OU_DEPTH - 1)) ? '0 : head_q + 1'b1;
          ou_count <= ou_count - 1'b1;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_free_entry: assert property (@(posedge clk) disable iff (!rst_n)
                                 state == S_ALLOC |-> mt_free_valid[tgt_q]);
  a_lookup_hit: assert property (@(posedge clk) disable iff (!rst_n)
                                 state == S_RD_STAT && vs_rd_valid && ou_lk_done |-> ou_lk_hit);
  a_cnt_range:  assert property (@(posedge clk) disable iff (!rst_n)
                                 state == S_IRQ_END |-> mt_count[g_q] != '0);
endmodule
