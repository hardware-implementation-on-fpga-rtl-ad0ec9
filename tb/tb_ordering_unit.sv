// tb_ordering_unit: self-checking test of the Ordering Unit at its full 64
// entries. It runs it as the mapper does: entries allocated at a tail pointer
// with random write sets, completed in random order with random result rows,
// released in order at the head. Every cycle the entry read port and the
// per-variable lookup are compared with a model, including the rule that the
// last matching write-set slot supplies the value.
module tb_ordering_unit;
  import mpt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic alloc_en = 0, cmpl_en = 0, rel_en = 0;
  logic [5:0] alloc_idx = 0, cmpl_idx = 0, rel_idx = 0, rd_idx = 0, lk_idx = 0;
  logic [3:0] alloc_out_num = 0, rd_out_num;
  logic [7:0][7:0]  alloc_vars = '0, rd_vars;
  logic [7:0][31:0] cmpl_values = '0, rd_values;
  logic rd_done, lk_done, lk_hit;
  logic [7:0] lk_var = 0;
  logic [31:0] lk_value;
  int checks = 0, failures = 0, n_hits = 0, n_dup = 0;

  ordering_unit #(.DEPTH(64)) dut (.*);
  always #5 clk = ~clk;

  // model
  bit               m_done[64];
  int               m_num[64];
  logic [7:0][7:0]  m_vars[64];
  logic [7:0][31:0] m_vals[64];
  int head = 0, tail = 0, used = 0;
  bit inflight[64];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      alloc_en = 0; cmpl_en = 0; rel_en = 0;
      // compare reads against the model (only for entries ever allocated)
      rd_idx = 6'($urandom);
      lk_idx = 6'($urandom);
      lk_var = 8'($urandom_range(0, 7));
      #1;
      chk(rd_done == m_done[rd_idx], "rd_done");
      if (m_num[rd_idx] > 0 || m_done[rd_idx]) begin
        chk(rd_out_num == 4'(m_num[rd_idx]), "rd_out_num");
        for (int k = 0; k < m_num[rd_idx]; k++) chk(rd_vars[k] == m_vars[rd_idx][k], "rd_vars");
        if (m_done[rd_idx])
          for (int k = 0; k < m_num[rd_idx]; k++) chk(rd_values[k] == m_vals[rd_idx][k], "rd_values");
      end
      begin
        bit hit; logic [31:0] v; int nm;
        hit = 0; v = 0; nm = 0;
        for (int k = 0; k < m_num[lk_idx]; k++)
          if (m_vars[lk_idx][k] == lk_var) begin hit = 1; v = m_vals[lk_idx][k]; nm++; end
        chk(lk_done == m_done[lk_idx], "lk_done");
        chk(lk_hit == hit, "lk_hit");
        if (hit && m_done[lk_idx]) begin
          chk(lk_value == v, "lk_value"); n_hits++;
          if (nm > 1) n_dup++;
        end
      end
      // drive one operation of each kind at random
      if (used < 64 && $urandom_range(0, 1)) begin
        alloc_en = 1; alloc_idx = 6'(tail);
        alloc_out_num = 4'($urandom_range(0, 8));
        for (int k = 0; k < 8; k++) alloc_vars[k] = 8'($urandom_range(0, 7));
      end
      begin
        int c; c = -1;
        for (int t = 0; t < 8; t++) begin
          int e; e = (head + int'($urandom_range(0, 63))) % 64;
          if (inflight[e] && !m_done[e] && !(alloc_en && e == tail)) begin c = e; break; end
        end
        if (c >= 0 && $urandom_range(0, 1)) begin
          cmpl_en = 1; cmpl_idx = 6'(c);
          for (int k = 0; k < 8; k++) cmpl_values[k] = $urandom;
        end
      end
      if (used > 0 && m_done[head] && !(cmpl_en && cmpl_idx == 6'(head))) begin
        rel_en = 1; rel_idx = 6'(head);
      end
      @(posedge clk); #1;
      if (rel_en) begin m_done[head] = 0; inflight[head] = 0; head = (head + 1) % 64; used--; end
      if (alloc_en) begin
        m_num[tail] = int'(alloc_out_num); m_vars[tail] = alloc_vars; m_done[tail] = 0;
        inflight[tail] = 1; tail = (tail + 1) % 64; used++;
      end
      if (cmpl_en) begin m_done[cmpl_idx] = 1; m_vals[cmpl_idx] = cmpl_values; end
    end
    chk(n_hits > 100 && n_dup > 0, "lookups hit, including duplicate write-set IDs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
