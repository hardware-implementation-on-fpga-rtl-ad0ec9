// tb_jpeg_flow: the JPEG case study on a (2,2)-channel scheduler, the shape
// of the evaluation platform: two CC-DCT-Quant IP cores (PE 0 and 1, type 1)
// and two general-purpose processors (PE 2 and 3) that run the Huffman stage
// (type 5) and could also run CC-DCT-Quant, ten times slower.
//
// Each 8x8 block b becomes two sub-flows:
//   CDQ(b):  coef <- pixels_b            (IP core, 600 cycles)
//   HUF(b):  bits <- coef, bits          (GPP, 30 cycles)
// All blocks reuse one coefficient buffer variable, as sequential code does,
// so consecutive CDQ sub-flows are WAW hazards and each CDQ is a WAR hazard
// for the previous HUF. Renaming lets the two IP cores work on two blocks at
// once. Checked: write-back order and values against a sequential run, both
// IP cores busy in the same cycle, WAW renaming on the buffer, and a
// speed-up over running every sub-flow back to back. The speed-up is printed.
module tb_jpeg_flow;
  import mpt_pkg::*;
  import sched_tb_pkg::*;
  localparam int N_PE = 4, N_BLK = 40;
  localparam int LAT_CDQ = 600, LAT_HUF = 30;
  localparam logic [7:0] COEF = 8'd1, BITS = 8'd2, PIX0 = 8'd32;

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
  logic [0:0] rcfg_ip = 0;
  logic [7:0] rcfg_type = 0;
  logic [1:0] ip_drained;
  logic [N_PE-1:0][2:0] pe_load;
  logic sched_idle, mt_full;
  logic [15:0] frame_errors;
  int n_done [N_PE];
  logic [7:0] last_type [N_PE];

  hw_scheduler #(.N_IP(2), .N_GPP(2), .IP_TYPE_INIT({8'hFF, 8'hFF, 8'd1, 8'd1})) dut (.*);

  for (genvar p = 0; p < N_PE; p++) begin : g_pe
    pe_model #(.LAT_MIN(p < 2 ? LAT_CDQ : LAT_HUF), .LAT_MAX(p < 2 ? LAT_CDQ : LAT_HUF),
               .LONG_TYPE(p < 2 ? -1 : 1), .LONG_LAT(10 * LAT_CDQ)) u_pe (
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
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0]  exp_wa [$];
  logic [31:0] exp_wd [$];
  always @(posedge clk) if (rst_n && mem_wr_en) begin
    chk(exp_wa.size() > 0 && mem_wr_addr == exp_wa[0] && mem_wr_data == exp_wd[0],
        $sformatf("write-back var %0d", mem_wr_addr));
    if (exp_wa.size() > 0) begin void'(exp_wa.pop_front()); void'(exp_wd.pop_front()); end
  end

  int cyc = 0, both_busy = 0, waw = 0, on_gpp = 0;
  always @(posedge clk) begin
    cyc++;
    if (!pe_task_ready[0] && !pe_task_ready[1]) both_busy++;
    if (dut.vs_wr_en && dut.vs_wr_valid && dut.vs_wr_addr == COEF && dut.u_vs.valid[COEF]) waw++;
    for (int p = 2; p < 4; p++) if (pe_task_valid[p] && pe_task_ready[p] && pe_task[p].ttype == 8'd1) on_gpp++;
  end

  logic [31:0] words [$];
  always @(negedge clk) begin
    if (rst_n && words.size() > 0 && df_not_full) begin
      df_wr_en <= 1; df_wr_data <= words.pop_front();
    end else df_wr_en <= 0;
  end

  task automatic put(input logic [7:0] t, input logic [7:0] w, input int ni,
                     input logic [7:0] r0, input logic [7:0] r1);
    words.push_back(start_word(t)); words.push_back(32'd1); words.push_back(32'(ni));
    words.push_back(32'(w)); words.push_back(32'(r0));
    if (ni > 1) words.push_back(32'(r1));
    words.push_back(END_FLAG);
  endtask

  initial begin
    logic [31:0] rm [256];
    int t0, total, seq;
    for (int v = 0; v < 256; v++) begin mem[v] = $urandom; rm[v] = mem[v]; end
    for (int b = 0; b < N_BLK; b++) begin
      logic [MAX_RD-1:0][DATA_W-1:0] a;
      logic [MAX_WR-1:0][DATA_W-1:0] r;
      a = '0; a[0] = rm[PIX0 + 8'(b)];
      r = pe_func(8'd1, 4'd1, a); rm[COEF] = r[0];
      exp_wa.push_back(COEF); exp_wd.push_back(r[0]);
      a[0] = rm[COEF]; a[1] = rm[BITS];
      r = pe_func(8'd5, 4'd2, a); rm[BITS] = r[0];
      exp_wa.push_back(BITS); exp_wd.push_back(r[0]);
      put(8'd1, COEF, 1, PIX0 + 8'(b), 8'd0);
      put(8'd5, BITS, 2, COEF, BITS);
    end
    seq = N_BLK * (LAT_CDQ + LAT_HUF);
    repeat (3) @(posedge clk);
    rst_n = 1;
    t0 = cyc;
    repeat (5) @(posedge clk);
    wait (sched_idle && words.size() == 0);
    total = cyc - t0;
    repeat (5) @(posedge clk);
    chk(exp_wa.size() == 0, "all write-backs done");
    chk(mem[COEF] == rm[COEF] && mem[BITS] == rm[BITS], "final buffer and bitstream");
    chk(both_busy > 0, "both IP cores busy at once");
    chk(waw > 0, "buffer WAW renamed");
    chk(total < seq, "faster than back-to-back execution");
    $display("JPEG flow: %0d blocks in %0d cycles; back-to-back %0d; speed-up %0.2f (ideal with two IP cores about %0.2f); CDQ on GPP %0d",
             N_BLK, total, seq, real'(seq) / real'(total),
             real'(seq) / real'(N_BLK * LAT_CDQ / 2 + LAT_HUF), on_gpp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
