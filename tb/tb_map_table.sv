// tb_map_table: self-checking test of one 4-entry Map Table.
// Directed part: entry 0 holds a sub-flow whose slot 0 waits on variable 7
// from OU entry 5; entry 1 waits on variable 7 from OU entry 9 (a renamed
// later writer). Broadcasts of the wrong producer or wrong variable must not
// wake either; the right one wakes only its consumer, which is then
// dispatched with the broadcast value. Random part: random fills, broadcasts,
// dispatches and releases against a model of all 4 entries.
module tb_map_table;
  import mpt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic alloc_en = 0, wr_en = 0, commit_en = 0, bc_en = 0, rel_en = 0;
  logic [1:0] alloc_entry = 0, commit_entry = 0, rel_entry = 0, free_entry;
  logic [5:0] alloc_ou_id = 0, bc_ou_id = 0, wr_addr = 0;
  logic [7:0] alloc_type = 0, bc_var = 0;
  logic [3:0] alloc_in_num = 0;
  logic [31:0] wr_data = 0, bc_value = 0;
  logic task_valid, task_ready = 0, free_valid;
  task_t task_out;
  int checks = 0, failures = 0;

  map_table #(.N_ENTRIES(4)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic idle();
    alloc_en = 0; wr_en = 0; commit_en = 0; bc_en = 0; rel_en = 0; task_ready = 0;
  endtask

  // Open entry e with in_num operands: ready ones get values, waiting ones
  // record producer ou.
  task automatic fill(input int e, input int ou, input int in_num,
                      input logic [7:0] vars [8], input bit rdy [8],
                      input logic [31:0] vals [8]);
    @(negedge clk); idle();
    alloc_en = 1; alloc_entry = 2'(e); alloc_ou_id = 6'(ou); alloc_type = 8'(e + 3);
    alloc_in_num = 4'(in_num);
    for (int k = 0; k < in_num; k++) begin
      @(negedge clk); idle();
      wr_en = 1; wr_addr = {2'(e), 1'b0, 3'(k)}; wr_data = 32'({vars[k], rdy[k]});
      @(negedge clk); idle();
      wr_en = 1; wr_addr = {2'(e), 1'b1, 3'(k)}; wr_data = vals[k];
    end
    @(negedge clk); idle();
    commit_en = 1; commit_entry = 2'(e);
    @(negedge clk); idle();
  endtask

  task automatic bcast(input int ou, input int v, input logic [31:0] val);
    @(negedge clk); idle();
    bc_en = 1; bc_ou_id = 6'(ou); bc_var = 8'(v); bc_value = val;
    @(negedge clk); idle();
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] vars [8];
    bit rdy [8];
    logic [31:0] vals [8];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(free_valid && free_entry == 0 && !task_valid, "empty after reset");
    // entry 0: slot0 waits var 7 from OU 5, slot1 ready with 0x1111
    vars[0] = 7; rdy[0] = 0; vals[0] = 5;
    vars[1] = 3; rdy[1] = 1; vals[1] = 32'h1111;
    fill(0, 20, 2, vars, rdy, vals);
    // entry 1: slot0 waits var 7 from OU 9
    vars[0] = 7; rdy[0] = 0; vals[0] = 9;
    fill(1, 21, 1, vars, rdy, vals);
    chk(!task_valid, "nothing ready yet");
    chk(free_valid && free_entry == 2, "entry 2 free");
    bcast(6, 7, 32'hDEAD);    // wrong producer
    bcast(5, 8, 32'hBEEF);    // wrong variable
    chk(!task_valid, "wrong broadcasts ignored");
    bcast(9, 7, 32'hCAFE);    // wakes entry 1 only
    chk(task_valid && task_out.mt_entry == 1 && task_out.ou_id == 21 &&
        task_out.args[0] == 32'hCAFE && task_out.in_num == 1 && task_out.ttype == 4,
        "entry 1 dispatched with renamed value");
    task_ready = 1; @(negedge clk); task_ready = 0;
    chk(!task_valid, "entry 1 not offered twice");
    bcast(5, 7, 32'h7777);
    chk(task_valid && task_out.mt_entry == 0 && task_out.ou_id == 20 &&
        task_out.args[0] == 32'h7777 && task_out.args[1] == 32'h1111, "entry 0 dispatched");
    task_ready = 1; @(negedge clk); task_ready = 0;
    // fill entry 2 and 3, table full
    vars[0] = 1; rdy[0] = 1; vals[0] = 1;
    fill(2, 22, 1, vars, rdy, vals);
    fill(3, 23, 0, vars, rdy, vals);
    chk(!free_valid, "table full");
    chk(task_valid && task_out.mt_entry == 2, "lowest ready entry first");
    rel_en = 1; rel_entry = 1; @(negedge clk); idle();
    chk(free_valid && free_entry == 1, "released entry reusable");
    rel_en = 1; rel_entry = 0; @(negedge clk); idle();
    task_ready = 1; @(negedge clk); idle();
    chk(task_valid && task_out.mt_entry == 3 && task_out.in_num == 0, "zero-input sub-flow ready at once");
    task_ready = 1; @(negedge clk); idle();
    rel_en = 1; rel_entry = 2; @(negedge clk); idle();
    rel_en = 1; rel_entry = 3; @(negedge clk); idle();
    chk(free_valid && free_entry == 0 && !task_valid, "all free again");
    // random: each of 200 rounds fills a free entry with 1-3 waiting slots,
    // then broadcasts the producers in random order and checks dispatch.
    for (int r = 0; r < 200; r++) begin
      int n, e, ou;
      logic [31:0] expv [8];
      e = int'(free_entry);
      n = $urandom_range(1, 8);
      ou = $urandom_range(0, 63);
      for (int k = 0; k < 8; k++) begin
        vars[k] = 8'($urandom); rdy[k] = $urandom_range(0, 1); expv[k] = $urandom;
        vals[k] = rdy[k] ? expv[k] : 32'(ou);
      end
      fill(e, r % 64, n, vars, rdy, vals);
      for (int k = 0; k < n; k++) begin
        if (!rdy[k]) begin
          chk(!task_valid, "waits for all operands");
          bcast(ou, int'(vars[k]), expv[k]);
          // a later waiting slot on the same variable takes the same value
          for (int k2 = k + 1; k2 < n; k2++)
            if (vars[k2] == vars[k] && !rdy[k2]) begin rdy[k2] = 1; expv[k2] = expv[k]; end
        end
      end
      chk(task_valid && int'(task_out.mt_entry) == e, "random dispatch");
      for (int k = 0; k < n; k++) chk(task_out.args[k] == expv[k], "random operand value");
      task_ready = 1; @(negedge clk); idle();
      rel_en = 1; rel_entry = 2'(e); @(negedge clk); idle();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
