// tb_dataflow_mapper: directed test of the Dataflow Mapper with the real
// Variable Set, Ordering Unit, Map Tables and Interrupt Controller around it;
// the Dataflow FIFO is replaced by a word queue. PEs are pe_model instances
// that the test can hold (they then accept nothing), so it can fill Map
// Tables on purpose. Checked:
//  - Algorithm 2: a type served by an IP core goes there while its MT has
//    room, then to the GPP with the most free entries (lowest number on a
//    tie); a type no IP core serves goes to GPPs; with every candidate MT
//    full the sub-flow stays pending (mt_full) until an entry frees, while
//    the mapper keeps serving interrupts.
//  - renaming: an operand whose producer is running is written to the MT as
//    "not prepared" with the producer's OU entry as its value.
//  - issue timing: 2 outputs + 2 inputs are issued in 3+2+2+1+1+1+4+2+1 = 17
//    cycles from the start word to commit.
//  - malformed start words and out-of-range counts are counted and dropped.
//  - reconfiguration: an offline IP core gets nothing; after loading a new
//    type it serves that type.
//  - write-back: memory is written in program order with the right values.
module tb_dataflow_mapper;
  import mpt_pkg::*;
  import sched_tb_pkg::*;
  localparam int N_PE = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // words are fed through a Dataflow FIFO, written on the falling edge
  logic [31:0] words [$];
  logic df_valid, df_pop, df_wr_en = 0, df_not_full;
  logic [31:0] df_data, df_wr_data = 0;
  logic [6:0] df_count;
  dataflow_fifo u_df (.clk, .rst_n, .wr_en(df_wr_en), .wr_data(df_wr_data), .df_not_full,
                      .dm_enable(df_pop), .rd_valid(df_valid), .rd_data(df_data), .count(df_count));
  always @(negedge clk) begin
    if (rst_n && words.size() > 0 && df_not_full) begin
      df_wr_en <= 1; df_wr_data <= words.pop_front();
    end else df_wr_en <= 0;
  end

  // nets between the mapper and the storage blocks
  logic [VAR_W-1:0] vs_rd_addr, vs_wr_addr;
  logic vs_rd_valid, vs_wr_en, vs_wr_valid;
  logic [OU_IDX_W-1:0] vs_rd_idx, vs_wr_idx;
  logic ou_alloc_en, ou_cmpl_en, ou_rel_en, ou_rd_done, ou_lk_done, ou_lk_hit;
  logic [OU_IDX_W-1:0] ou_alloc_idx, ou_cmpl_idx, ou_rel_idx, ou_rd_idx, ou_lk_idx;
  logic [NUM_W-1:0] ou_alloc_out_num, ou_rd_out_num;
  logic [MAX_WR-1:0][VAR_W-1:0] ou_alloc_vars, ou_rd_vars;
  logic [MAX_WR-1:0][DATA_W-1:0] ou_cmpl_values, ou_rd_values;
  logic [VAR_W-1:0] ou_lk_var;
  logic [DATA_W-1:0] ou_lk_value;
  logic [N_PE-1:0] mt_alloc_en, mt_wr_en, mt_commit_en, mt_rel_en, mt_free_valid;
  logic [MT_IDX_W-1:0] mt_alloc_entry, mt_commit_entry, mt_rel_entry;
  logic [OU_IDX_W-1:0] mt_alloc_ou_id, bc_ou_id;
  logic [TYPE_W-1:0] mt_alloc_type;
  logic [NUM_W-1:0] mt_alloc_in_num;
  logic [MT_IDX_W+PART_W:0] mt_wr_addr;
  logic [DATA_W-1:0] mt_wr_data, bc_value;
  logic bc_en;
  logic [VAR_W-1:0] bc_var;
  logic [N_PE-1:0][MT_IDX_W-1:0] mt_free_entry;
  logic irq_grant_valid, irq_ack;
  logic [N_PE-1:0] irq_grant;
  logic [2:0] irq_grant_id;
  result_t [N_PE-1:0] pe_result;
  logic [N_PE-1:0] pe_irq_ack, pe_irq, pe_task_valid, pe_task_ready, pe_ready_raw;
  task_t [N_PE-1:0] pe_task;
  logic mem_rd_en, mem_wr_en;
  logic [VAR_W-1:0] mem_rd_addr, mem_wr_addr;
  logic [DATA_W-1:0] mem_rd_data, mem_wr_data;
  logic rcfg_offline_en = 0, rcfg_load_en = 0;
  logic [1:0] rcfg_ip = 0;
  logic [7:0] rcfg_type = 0;
  logic [3:0] ip_drained;
  logic dm_idle, mt_full;
  logic [6:0] ou_count;
  logic [N_PE-1:0][2:0] mt_count;
  logic [15:0] frame_errors;
  logic [N_PE-1:0] hold = '0;

  dataflow_mapper dut (.*);

  variable_set u_vs (.clk, .rst_n, .rd_addr(vs_rd_addr), .rd_valid(vs_rd_valid), .rd_idx(vs_rd_idx),
    .wr_en(vs_wr_en), .wr_addr(vs_wr_addr), .wr_valid(vs_wr_valid), .wr_idx(vs_wr_idx));
  ordering_unit u_ou (.clk, .rst_n,
    .alloc_en(ou_alloc_en), .alloc_idx(ou_alloc_idx), .alloc_out_num(ou_alloc_out_num), .alloc_vars(ou_alloc_vars),
    .cmpl_en(ou_cmpl_en), .cmpl_idx(ou_cmpl_idx), .cmpl_values(ou_cmpl_values),
    .rel_en(ou_rel_en), .rel_idx(ou_rel_idx),
    .rd_idx(ou_rd_idx), .rd_done(ou_rd_done), .rd_out_num(ou_rd_out_num), .rd_vars(ou_rd_vars), .rd_values(ou_rd_values),
    .lk_idx(ou_lk_idx), .lk_var(ou_lk_var), .lk_done(ou_lk_done), .lk_hit(ou_lk_hit), .lk_value(ou_lk_value));
  interrupt_controller u_ictr (.clk, .rst_n, .irq(pe_irq), .ack(irq_ack),
    .grant_valid(irq_grant_valid), .grant(irq_grant), .grant_id(irq_grant_id));

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    int nd; logic [7:0] lt;
    map_table u_mt (.clk, .rst_n,
      .alloc_en(mt_alloc_en[p]), .alloc_entry(mt_alloc_entry), .alloc_ou_id(mt_alloc_ou_id),
      .alloc_type(mt_alloc_type), .alloc_in_num(mt_alloc_in_num),
      .wr_en(mt_wr_en[p]), .wr_addr(mt_wr_addr), .wr_data(mt_wr_data),
      .commit_en(mt_commit_en[p]), .commit_entry(mt_commit_entry),
      .bc_en, .bc_ou_id, .bc_var, .bc_value, .rel_en(mt_rel_en[p]), .rel_entry(mt_rel_entry),
      .task_valid(pe_task_valid[p]), .task_out(pe_task[p]), .task_ready(pe_task_ready[p]),
      .free_valid(mt_free_valid[p]), .free_entry(mt_free_entry[p]));
    assign pe_task_ready[p] = pe_ready_raw[p] && !hold[p];
    pe_model #(.LAT_MIN(4), .LAT_MAX(4)) u_pe (.clk, .rst_n,
      .task_valid(pe_task_valid[p] && !hold[p]), .task_in(pe_task[p]), .task_ready(pe_ready_raw[p]),
      .irq(pe_irq[p]), .result(pe_result[p]), .irq_ack(pe_irq_ack[p]), .n_done(nd), .last_type(lt));
  end

  logic [31:0] mem [256];
  always_ff @(posedge clk) begin
    if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr];
    if (mem_wr_en) mem[mem_wr_addr] <= mem_wr_data;
  end

  // record of allocations: PE number per issued sub-flow
  int alloc_pe [$];
  always @(posedge clk) if (rst_n && mt_alloc_en != 0)
    for (int p = 0; p < N_PE; p++) if (mt_alloc_en[p]) alloc_pe.push_back(p);

  // rename writes: status writes with prepared = 0
  int n_wait_writes = 0;
  logic [31:0] last_wait_value;
  always @(posedge clk) if (rst_n && mt_wr_en != 0) begin
    if (!mt_wr_addr[3] && !mt_wr_data[0]) n_wait_writes++;
    if (mt_wr_addr[3]) last_wait_value = mt_wr_data;
  end

  // memory writes in order
  logic [7:0] exp_wa [$];
  logic [31:0] exp_wd [$];
  bit check_wb = 0;
  always @(posedge clk) if (rst_n && mem_wr_en && check_wb) begin
    chk(exp_wa.size() > 0 && mem_wr_addr == exp_wa[0] && mem_wr_data == exp_wd[0],
        $sformatf("write-back var %0d = %h", mem_wr_addr, mem_wr_data));
    if (exp_wa.size() > 0) begin void'(exp_wa.pop_front()); void'(exp_wd.pop_front()); end
  end

  task automatic send(input logic [7:0] t, input int no, input int ni,
                      input logic [7:0] wv [8], input logic [7:0] rv [8]);
    words.push_back(start_word(t));
    words.push_back(32'(no));
    words.push_back(32'(ni));
    for (int k = 0; k < no; k++) words.push_back(32'(wv[k]));
    for (int k = 0; k < ni; k++) words.push_back(32'(rv[k]));
    words.push_back(END_FLAG);
  endtask

  task automatic wait_alloc(input int n);
    int guard; guard = 0;
    while (alloc_pe.size() < n && guard < 2000) begin @(posedge clk); guard++; end
    #1;
  endtask

  initial begin
    logic [7:0] wv [8], rv [8];
    int t0, t1;
    for (int a = 0; a < 256; a++) mem[a] = 32'(a) * 32'h0101_0101;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // --- issue timing: 2 outputs, 2 inputs, type 5 (GPP only), PE held
    hold = '1;
    wv[0] = 10; wv[1] = 11; rv[0] = 20; rv[1] = 21;
    @(negedge clk);
    send(8'd5, 2, 2, wv, rv);
    @(posedge clk iff df_pop); t0 = $time;
    @(posedge clk iff mt_commit_en != 0); t1 = $time;
    chk((t1 - t0) / 10 + 1 == 17, $sformatf("issue took %0d cycles, expected 17", (t1 - t0) / 10 + 1));
    wait_alloc(1);
    chk(alloc_pe[0] == 4, "GPP-only type goes to first GPP");

    // --- Algorithm 2 with everything held: type 1 -> IP0 x4, then GPPs
    for (int i = 0; i < 4; i++) begin wv[0] = 8'(30 + i); rv[0] = 8'(40 + i); send(8'd1, 1, 1, wv, rv); end
    wait_alloc(5);
    for (int i = 1; i <= 4; i++) chk(alloc_pe[i] == 0, "type 1 to IP core 0 while it has room");
    wv[0] = 50; rv[0] = 51; send(8'd1, 1, 1, wv, rv);
    wait_alloc(6);
    chk(alloc_pe[5] == 5, "IP full: GPP with most free entries (GPP 5)");
    wv[0] = 52; rv[0] = 10; send(8'd1, 1, 1, wv, rv);   // reads var 10: producer running
    wait_alloc(7);
    chk(alloc_pe[6] == 6, "next GPP with most free entries (GPP 6)");
    chk(n_wait_writes == 1, "RAW operand written as not prepared");
    // 21 more of types 3/4: 8 fill IP cores 2 and 3, 13 fill the GPPs
    for (int i = 0; i < 21; i++) begin wv[0] = 8'(60 + i); rv[0] = 8'(70 + i); send(8'd3 + 8'(i % 2), 1, 1, wv, rv); end
    wait_alloc(28);
    chk(alloc_pe.size() == 28, "28 sub-flows mapped");
    begin
      int pe3, pe2; pe3 = 0; pe2 = 0;
      for (int i = 7; i < alloc_pe.size(); i++) begin
        if (alloc_pe[i] == 3) pe3++;
        if (alloc_pe[i] == 2) pe2++;
      end
      chk(pe3 == 4 && pe2 == 4, "types 3 and 4 fill IP cores 2 and 3");
    end
    // now one more type 5: every GPP MT holds 4 -> pending
    wv[0] = 90; rv[0] = 91; send(8'd5, 1, 1, wv, rv);
    begin
      int seen; seen = 0;
      repeat (100) begin @(posedge clk); if (mt_full) seen++; end
      chk(seen > 0, "mt_full raised while every candidate MT is full");
      chk(alloc_pe.size() == 28, "pending sub-flow not mapped");
    end
    // release GPP 7: its sub-flows finish, the pending one is mapped to GPP 7
    hold[7] = 0;
    wait_alloc(29);
    chk(alloc_pe.size() == 29 && alloc_pe[28] == 7, "pending sub-flow mapped after an entry freed");
    hold = '0;
    repeat (600) @(posedge clk);
    chk(dm_idle && ou_count == 0, "all retired");
    chk(last_wait_value != 0, "values written");

    // --- framing errors
    words.push_back(32'hDEAD_BEEF);
    words.push_back(start_word(8'd1)); words.push_back(32'd9);   // out_num 9: invalid
    repeat (20) @(posedge clk);
    chk(frame_errors >= 2, "malformed words counted");
    repeat (5) @(posedge clk);
    // flush what is left of the broken sub-flow (each word is a frame error)
    words.push_back(32'd0); words.push_back(32'd0);
    repeat (20) @(posedge clk);

    // --- reconfiguration: IP core 0 offline, then type 7
    @(negedge clk); rcfg_offline_en = 1; rcfg_ip = 0;
    @(negedge clk); rcfg_offline_en = 0;
    begin
      int n0; n0 = alloc_pe.size();
      wv[0] = 100; rv[0] = 101; send(8'd1, 1, 1, wv, rv);
      wait_alloc(n0 + 1);
      chk(alloc_pe[n0] >= 4, "offline IP core skipped");
      @(negedge clk); rcfg_load_en = 1; rcfg_type = 8'd7;
      @(negedge clk); rcfg_load_en = 0;
      wv[0] = 102; rv[0] = 103; send(8'd7, 1, 1, wv, rv);
      wait_alloc(n0 + 2);
      chk(alloc_pe[n0 + 1] == 0, "reloaded IP core serves its new type");
    end
    repeat (200) @(posedge clk);

    // --- write-back order and values: a chain with WAW on var 120
    begin
      logic [MAX_RD-1:0][DATA_W-1:0] a;
      logic [MAX_WR-1:0][DATA_W-1:0] r1, r2, r3;
      a = '0; a[0] = mem[121];
      r1 = pe_func(8'd2, 4'd1, a);               // T1: 120 <- f(121)
      a[0] = r1[0];
      r2 = pe_func(8'd3, 4'd1, a);               // T2: 122 <- f(120)  RAW
      a[0] = mem[123];
      r3 = pe_func(8'd4, 4'd1, a);               // T3: 120 <- f(123)  WAW with T1, WAR with T2
      exp_wa = {8'd120, 8'd122, 8'd120};
      exp_wd = {r1[0], r2[0], r3[0]};
      check_wb = 1;
      hold[1] = 1;                               // delay T1 so T3 finishes first
      wv[0] = 120; rv[0] = 121; send(8'd2, 1, 1, wv, rv);
      wv[0] = 122; rv[0] = 120; send(8'd3, 1, 1, wv, rv);
      wv[0] = 120; rv[0] = 123; send(8'd4, 1, 1, wv, rv);
      repeat (100) @(posedge clk);
      chk(mem[120] == 32'h7878_7878, "nothing written while the oldest sub-flow runs");
      hold[1] = 0;
      repeat (200) @(posedge clk);
      chk(exp_wa.size() == 0, "all three write-backs seen");
      chk(mem[120] == r3[0] && mem[122] == r2[0], "final memory values");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
