// tb_hw_scheduler: end-to-end test of the (4,4)-channel scheduler at its
// default sizes (DF 64, VS 256, OU 64, eight 4-entry MTs).
//
// Eight behavioural PEs (pe_model) and a behavioural memory surround the
// scheduler. A random program of sub-flows over a small pool of variables is
// generated; a sequential reference run of the same program (same PE
// function) gives the exact sequence of memory writes that in-order
// retirement must produce, and the final memory image. Both are checked.
//
// The program is arranged so that every mechanism occurs: RAW waits and
// result broadcasts, WAW renaming, WAR (a later sub-flow overwrites a
// variable an earlier, not yet started one still reads), operands taken from
// memory and from finished-but-unretired OU entries, out-of-order completion,
// mapping to IP cores and to GPPs, IP-full fallback to a GPP, MT-full
// stalls, OU-full stalls (a long-running sub-flow holds the OU head),
// simultaneous interrupts, one malformed word (frame error), and a run-time
// reconfiguration of IP core 0 from type 1 to type 5. Each is counted; a
// mechanism that never happened is a failure. The issue latency of a
// 1-input/1-output sub-flow on an idle scheduler is checked against 12 cycles
// (and against the design target of about 20).
module tb_hw_scheduler;
  import mpt_pkg::*;
  import sched_tb_pkg::*;

  localparam int N_IP = 4, N_GPP = 4, N_PE = 8;
  localparam int NT = 400;          // sub-flows in the random program
  localparam int LONG_AT = 12;      // index of the long-running sub-flow
  localparam int LONG2_AT = 250;   // long-running sub-flow nobody waits on
  localparam int RCFG_AT = 160;     // reconfigure once this many are issued

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic df_wr_en = 0, df_not_full;
  logic [31:0] df_wr_data = 0;
  logic [N_PE-1:0] pe_task_valid, pe_task_ready, pe_irq, pe_irq_ack;
  task_t   [N_PE-1:0] pe_task;
  result_t [N_PE-1:0] pe_result;
  logic mem_rd_en, mem_wr_en;
  logic [7:0] mem_rd_addr, mem_wr_addr;
  logic [31:0] mem_rd_data, mem_wr_data;
  logic rcfg_offline_en = 0, rcfg_load_en = 0;
  logic [1:0] rcfg_ip = 0;
  logic [7:0] rcfg_type = 0;
  logic [N_IP-1:0] ip_drained;
  logic [N_PE-1:0][2:0] pe_load;
  logic sched_idle, mt_full;
  logic [15:0] frame_errors;
  int n_done [N_PE];
  logic [7:0] last_type [N_PE];

  hw_scheduler dut (.*);

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    pe_model #(.LAT_MIN(p < N_IP ? 6 : 20), .LAT_MAX(p < N_IP ? 40 : 120),
               .LONG_TYPE(6), .LONG_LAT(4000)) u_pe (
      .clk, .rst_n, .task_valid(pe_task_valid[p]), .task_in(pe_task[p]),
      .task_ready(pe_task_ready[p]), .irq(pe_irq[p]), .result(pe_result[p]),
      .irq_ack(pe_irq_ack[p]), .n_done(n_done[p]), .last_type(last_type[p]));
  end

  // behavioural system memory: one-cycle read
  logic [31:0] mem [256];
  always_ff @(posedge clk) begin
    if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr];
    if (mem_wr_en) mem[mem_wr_addr] <= mem_wr_data;
  end

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ program
  typedef struct {
    logic [7:0] ttype;
    int         out_num, in_num;
    logic [7:0] wv [8];
    logic [7:0] rv [8];
  } sf_t;
  sf_t prog [NT];
  logic [31:0] ref_mem [256];
  logic [7:0]  exp_wa [$];
  logic [31:0] exp_wd [$];
  logic [31:0] words [$];

  function automatic logic [7:0] pick_var();
    return ($urandom_range(0, 9) == 0) ? 8'($urandom_range(24, 255)) : 8'($urandom_range(0, 23));
  endfunction

  task automatic gen_program();
    for (int i = 0; i < NT; i++) begin
      sf_t s;
      int r;
      r = $urandom_range(0, 99);
      s.ttype   = (r < 60) ? 8'($urandom_range(1, 4)) : 8'(5);
      s.out_num = $urandom_range(0, 9) == 0 ? 0 : $urandom_range(1, 3);
      s.in_num  = $urandom_range(0, 4);
      if ($urandom_range(0, 19) == 0) begin s.out_num = 8; s.in_num = 8; end
      for (int k = 0; k < 8; k++) begin s.wv[k] = pick_var(); s.rv[k] = pick_var(); end
      if (i == LONG_AT) begin
        s.ttype = 6; s.out_num = 1; s.in_num = 1; s.wv[0] = 8'd250; s.rv[0] = 8'd1;
      end
      if (i == LONG2_AT) begin
        s.ttype = 6; s.out_num = 1; s.in_num = 0; s.wv[0] = 8'd251;
      end
      // bursts waiting on the long sub-flow: fill IP core 1's MT, spill its
      // type onto GPPs, then fill every GPP MT
      if (i > LONG_AT && i <= LONG_AT + 30) begin
        s.ttype = (i <= LONG_AT + 8) ? 8'd2 : 8'd5;
        if (s.in_num == 0) s.in_num = 1;
        if (s.in_num == 8) s.out_num = 2;
        s.rv[0] = 8'd250;
      end
      prog[i] = s;
    end
  endtask

  task automatic reference();
    for (int a = 0; a < 256; a++) ref_mem[a] = mem[a];
    for (int i = 0; i < NT; i++) begin
      logic [MAX_RD-1:0][DATA_W-1:0] args;
      logic [MAX_WR-1:0][DATA_W-1:0] res;
      args = '0;
      for (int k = 0; k < prog[i].in_num; k++) args[k] = ref_mem[prog[i].rv[k]];
      res = pe_func(prog[i].ttype, 4'(prog[i].in_num), args);
      for (int k = 0; k < prog[i].out_num; k++) begin
        exp_wa.push_back(prog[i].wv[k]);
        exp_wd.push_back(res[k]);
        ref_mem[prog[i].wv[k]] = res[k];
      end
    end
  endtask

  task automatic encode(input sf_t s);
    words.push_back(start_word(s.ttype));
    words.push_back(32'(s.out_num));
    words.push_back(32'(s.in_num));
    for (int k = 0; k < s.out_num; k++) words.push_back(32'(s.wv[k]));
    for (int k = 0; k < s.in_num; k++)  words.push_back(32'(s.rv[k]));
    words.push_back(END_FLAG);
  endtask

  // DF feeder: pushes whatever is in words[]
  always @(negedge clk) begin
    if (rst_n && words.size() > 0 && df_not_full) begin
      df_wr_en   <= 1;
      df_wr_data <= words.pop_front();
    end else df_wr_en <= 0;
  end

  // memory write checking
  int n_wr = 0;
  always @(posedge clk) if (rst_n && mem_wr_en) begin
    if (exp_wa.size() == 0) chk(0, "unexpected memory write");
    else begin
      chk(mem_wr_addr == exp_wa[0] && mem_wr_data == exp_wd[0],
          $sformatf("write %0d: var %0d=%h, expected var %0d=%h", n_wr, mem_wr_addr,
                    mem_wr_data, exp_wa[0], exp_wd[0]));
      void'(exp_wa.pop_front()); void'(exp_wd.pop_front());
    end
    n_wr++;
  end

  // ---------------------------------------------------- mechanism counters
  int c_raw = 0, c_bcast = 0, c_waw = 0, c_war = 0, c_memop = 0, c_fwd = 0;
  int c_ooo = 0, c_ip = 0, c_gpp = 0, c_fallback = 0, c_mtfull = 0, c_oufull = 0;
  int c_badload = 0;
  int c_multi_irq = 0, c_rcfg = 0, n_commit = 0;
  int ou2prog [64];
  bit dispatched [NT];
  bit rcfg_done = 0;

  always @(posedge clk) if (rst_n && n_commit >= 1) begin
    if (dut.mt_wr_en != 0 && !dut.mt_wr_addr[3]) begin
      if (!dut.mt_wr_data[0]) c_raw++;
      else if (dut.vs_rd_valid) c_fwd++;
    end
    if (dut.mem_rd_en) c_memop++;
    if (dut.bc_en) c_bcast++;
    if (dut.vs_wr_en && dut.vs_wr_valid && dut.u_vs.valid[dut.vs_wr_addr]) c_waw++;
    if (dut.ou_cmpl_en && dut.ou_cmpl_idx != dut.u_dm.head_q) c_ooo++;
    if (dut.mt_full) c_mtfull++;
    if (dut.u_dm.ou_count == 7'd64) c_oufull++;
    if ($countones(pe_irq) > 1) c_multi_irq++;
    for (int p = 0; p < N_PE; p++) if (pe_load[p] > 3'd4) begin c_badload++; end
    if (dut.mt_alloc_en[N_PE-1:N_IP] != 0) begin
      c_gpp++;
      if (dut.mt_alloc_type inside {8'd2, 8'd3, 8'd4}) c_fallback++;
    end
    if (dut.mt_alloc_en[N_IP-1:0] != 0) c_ip++;
  end

  // program order bookkeeping: the n-th commit is program sub-flow n
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < N_PE; p++)
      if (pe_task_valid[p] && pe_task_ready[p]) begin
        int j; j = ou2prog[pe_task[p].ou_id];
        if (j >= 0) dispatched[j] = 1;
        // reconfigured core 0 must only run its new type
        if (p == 0 && rcfg_done) begin
          chk(pe_task[p].ttype == 8'd5, "IP core 0 runs only its new type");
          c_rcfg++;
        end
      end
    if (dut.mt_commit_en != 0) begin
      int i; i = n_commit - 1;     // program index (entry -1 is the latency probe)
      if (i >= 0) begin
        for (int j = 0; j < i; j++)
          if (!dispatched[j])
            for (int a = 0; a < prog[j].in_num; a++)
              for (int b = 0; b < prog[i].out_num; b++)
                if (prog[j].rv[a] == prog[i].wv[b]) c_war++;
      end
      ou2prog[dut.u_dm.tail_q] = i;
      n_commit++;
    end
    // IP core p only receives sub-flows of its decoder type
    for (int p = 0; p < N_IP; p++)
      if (dut.mt_alloc_en[p])
        chk(dut.mt_alloc_type == dut.u_dm.ip_type[p] && !dut.u_dm.ip_offline[p],
            "IP core gets only its type while online");
  end

  // reconfiguration of IP core 0: type 1 -> type 5
  initial begin
    wait (n_commit >= RCFG_AT);
    @(negedge clk); rcfg_offline_en = 1; rcfg_ip = 0;
    @(negedge clk); rcfg_offline_en = 0;
    wait (ip_drained[0]);
    repeat (50) @(negedge clk);   // bitstream swap
    rcfg_load_en = 1; rcfg_type = 8'd5;
    @(negedge clk); rcfg_load_en = 0;
    rcfg_done = 1;
  end

  // ------------------------------------------------------------- stimulus
  initial begin
    int t0, lat;
    for (int a = 0; a < 256; a++) mem[a] = $urandom;
    for (int j = 0; j < 64; j++) ou2prog[j] = -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    chk(sched_idle && df_not_full, "idle after reset");

    // 1) issue latency on an idle scheduler: 1 input, 1 output, type 1
    begin
      sf_t s;
      logic [MAX_RD-1:0][DATA_W-1:0] args;
      logic [MAX_WR-1:0][DATA_W-1:0] res;
      s.ttype = 1; s.out_num = 1; s.in_num = 1; s.wv[0] = 8'd240; s.rv[0] = 8'd241;
      args = '0; args[0] = mem[241];
      res = pe_func(8'd1, 4'd1, args);
      exp_wa.push_back(8'd240); exp_wd.push_back(res[0]);
      encode(s);
      @(posedge dut.df_pop); t0 = $time;
      @(posedge pe_task_valid[0]); lat = int'(($time - t0) / 10);
      $display("issue latency: %0d cycles", lat);
      chk(lat == 12, $sformatf("issue latency %0d, expected 12", lat));
      chk(lat <= 20, "issue latency within ~20 cycles");
      wait (sched_idle);
      @(posedge clk);
    end

    // 2) the random program, with one malformed word between two sub-flows
    gen_program();
    reference();
    for (int i = 0; i < NT; i++) begin
      if (i == 30) words.push_back(32'h1234_5678);
      encode(prog[i]);
    end
    wait (words.size() == 0);
    repeat (10) @(posedge clk);
    wait (sched_idle);
    repeat (20) @(posedge clk);

    chk(exp_wa.size() == 0, $sformatf("%0d expected writes missing", exp_wa.size()));
    for (int a = 0; a < 256; a++) chk(mem[a] == ref_mem[a], $sformatf("final value of var %0d", a));
    chk(frame_errors == 16'd1, "one frame error counted");
    chk(n_commit == NT + 1, "every sub-flow issued");

    $display("RAW waits %0d, broadcasts %0d, WAW renames %0d, WAR cases %0d", c_raw, c_bcast, c_waw, c_war);
    $display("memory operands %0d, forwarded from OU %0d, out-of-order completions %0d", c_memop, c_fwd, c_ooo);
    $display("to IP %0d, to GPP %0d (IP types on GPP %0d), MT-full cycles %0d, OU-full cycles %0d",
             c_ip, c_gpp, c_fallback, c_mtfull, c_oufull);
    $display("simultaneous interrupts %0d, reconfigured-core tasks %0d", c_multi_irq, c_rcfg);
    chk(c_raw > 0, "RAW wait occurred");
    chk(c_bcast > 0, "broadcast occurred");
    chk(c_waw > 0, "WAW renaming occurred");
    chk(c_war > 0, "WAR case occurred");
    chk(c_memop > 0, "operand from memory");
    chk(c_fwd > 0, "operand from finished OU entry");
    chk(c_ooo > 0, "out-of-order completion");
    chk(c_ip > 0 && c_gpp > 0, "both IP and GPP mapping");
    chk(c_fallback > 0, "IP type mapped to GPP");
    chk(c_mtfull > 0, "MT-full stall");
    chk(c_oufull > 0, "OU-full stall");
    chk(c_multi_irq > 0, "simultaneous interrupts");
    chk(c_rcfg > 0, "reconfigured core used");
    chk(c_badload == 0, "pe_load never above 4");
    chk(pe_load == '0, "pe_load back to zero when idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
