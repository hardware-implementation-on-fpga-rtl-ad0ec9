// tb_table3_sequence: runs the eleven-task "regular" sequence used to
// evaluate the scheduler (JPEG, IDCT, AES_ENC and DES_DEC tasks over
// variables a..i) on the default (4,4)-channel scheduler. IP cores 0-3 serve
// types JPEG=1, IDCT=2, AES_ENC=3, DES_DEC=4 (the decoder's reset contents);
// GPPs serve anything. Each PE has a fixed latency per type.
//
// Checked: memory is written in program order with the values a sequential
// run gives; T2, which overwrites T1's input a (WAR), starts before T1
// finishes; T4 and T6 start while T1 runs, while T3 (another JPEG task)
// queues behind T1 on the JPEG core; T7, which reads T2's output a (RAW), starts only after T2 has
// finished; the whole sequence finishes in less time than the sum of the task
// latencies (sequential execution). The time and the speed-up are printed.
//
// Sequence (destination <- sources):
//   T1  JPEG    c <- a        T7  JPEG    c <- a
//   T2  IDCT    a <- b        T8  DES_DEC g <- H, e
//   T3  JPEG    i <- I        T9  DES_DEC a <- H, e
//   T4  AES_ENC F <- d, e     T10 JPEG    e <- f
//   T5  AES_ENC d <- h, e     T11 IDCT    a <- b
//   T6  DES_DEC g <- E, e
// Upper- and lower-case letters are distinct variables.
module tb_table3_sequence;
  import mpt_pkg::*;
  import sched_tb_pkg::*;
  localparam int N_PE = 8, NT = 11;
  // task latencies per type in cycles (JPEG, IDCT, AES, DES), GPPs 2x
  localparam int LAT_IP = 400;

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
  logic [3:0] ip_drained;
  logic [N_PE-1:0][2:0] pe_load;
  logic sched_idle, mt_full;
  logic [15:0] frame_errors;
  int n_done [N_PE];
  logic [7:0] last_type [N_PE];

  hw_scheduler dut (.*);

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    pe_model #(.LAT_MIN(p < 4 ? LAT_IP - 50 * p : 2 * LAT_IP),
               .LAT_MAX(p < 4 ? LAT_IP - 50 * p : 2 * LAT_IP)) u_pe (
      .clk, .rst_n, .task_valid(pe_task_valid[p]), .task_in(pe_task[p]),
      .task_ready(pe_task_ready[p]), .irq(pe_irq[p]), .result(pe_result[p]),
      .irq_ack(pe_irq_ack[p]), .n_done(n_done[p]), .last_type(last_type[p]));
  end

  logic [31:0] mem [256];
  always_ff @(posedge clk) begin
    if (mem_rd_en) mem_rd_data <= mem[mem_rd_addr];
    if (mem_wr_en) mem[mem_wr_addr] <= mem_wr_data;
  end

  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // variable IDs: a..i = 0..8, E=20, F=21, H=22, I=23
  localparam logic [7:0] A = 0, B = 1, C = 2, D = 3, E_ = 4, F_ = 5, G = 6, H_ = 7, I_ = 8;
  localparam logic [7:0] EU = 20, FU = 21, HU = 22, IU = 23;
  logic [7:0] ttype [NT] = '{1, 2, 1, 3, 3, 4, 1, 4, 4, 1, 2};
  logic [7:0] dst   [NT] = '{C, A, I_, FU, D, G, C, G, A, E_, A};
  int         nsrc  [NT] = '{1, 1, 1, 2, 2, 2, 1, 2, 2, 1, 1};
  logic [7:0] src0  [NT] = '{A, B, IU, D, H_, EU, A, HU, HU, F_, B};
  logic [7:0] src1  [NT] = '{0, 0, 0, E_, E_, E_, 0, E_, E_, 0, 0};

  logic [31:0] ref_mem [256];
  logic [7:0]  exp_wa [$];
  logic [31:0] exp_wd [$];
  always @(posedge clk) if (rst_n && mem_wr_en) begin
    chk(exp_wa.size() > 0 && mem_wr_addr == exp_wa[0] && mem_wr_data == exp_wd[0],
        $sformatf("write-back var %0d", mem_wr_addr));
    if (exp_wa.size() > 0) begin void'(exp_wa.pop_front()); void'(exp_wd.pop_front()); end
  end

  // start / finish time of each task, by OU entry (ou id i = task i here)
  int t_start [NT], t_end [NT];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    for (int p = 0; p < N_PE; p++) begin
      if (pe_task_valid[p] && pe_task_ready[p] && pe_task[p].ou_id < NT) t_start[pe_task[p].ou_id] = cyc;
      if (pe_irq_ack[p] && pe_result[p].ou_id < NT) t_end[pe_result[p].ou_id] = cyc;
    end
  end

  logic [31:0] words [$];
  always @(negedge clk) begin
    if (rst_n && words.size() > 0 && df_not_full) begin
      df_wr_en <= 1; df_wr_data <= words.pop_front();
    end else df_wr_en <= 0;
  end

  initial begin
    int t0, total, seq;
    for (int v = 0; v < 256; v++) begin mem[v] = $urandom; ref_mem[v] = mem[v]; end
    seq = 0;
    for (int i = 0; i < NT; i++) begin
      logic [MAX_RD-1:0][DATA_W-1:0] args;
      logic [MAX_WR-1:0][DATA_W-1:0] res;
      args = '0;
      args[0] = ref_mem[src0[i]];
      if (nsrc[i] > 1) args[1] = ref_mem[src1[i]];
      res = pe_func(ttype[i], 4'(nsrc[i]), args);
      ref_mem[dst[i]] = res[0];
      exp_wa.push_back(dst[i]); exp_wd.push_back(res[0]);
      seq += LAT_IP - 50 * (int'(ttype[i]) - 1);
      words.push_back(start_word(ttype[i]));
      words.push_back(32'd1);
      words.push_back(32'(nsrc[i]));
      words.push_back(32'(dst[i]));
      words.push_back(32'(src0[i]));
      if (nsrc[i] > 1) words.push_back(32'(src1[i]));
      words.push_back(END_FLAG);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = cyc;
    repeat (5) @(posedge clk);
    wait (sched_idle);
    total = cyc - t0;
    repeat (5) @(posedge clk);
    for (int v = 0; v < 256; v++) chk(mem[v] == ref_mem[v], $sformatf("final var %0d", v));
    chk(exp_wa.size() == 0, "all write-backs done");
    chk(t_start[1] < t_end[0], "T2 (WAR on a with T1) starts before T1 ends");
    chk(t_start[6] > t_end[1], "T7 (RAW on a from T2) waits for T2");
    chk(t_start[3] < t_end[0] && t_start[5] < t_end[0], "T4 and T6 start while T1 runs");
    // T3 is also a JPEG task: Algorithm 2 queues it on the JPEG core's MT
    chk(t_start[2] >= t_end[0], "T3 queued behind T1 on the JPEG core");
    chk(total < seq, "out-of-order run beats sequential execution");
    $display("table 3 sequence: %0d cycles out of order, %0d cycles of task work in sequence, speed-up %0.2f",
             total, seq, real'(seq) / real'(total));
    for (int i = 0; i < NT; i++) $display("  T%0d start %0d end %0d", i + 1, t_start[i] - t0, t_end[i] - t0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
