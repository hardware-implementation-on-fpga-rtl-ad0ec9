// tb_dataflow_fifo: self-checking test of the Dataflow FIFO at its full
// 64 x 32 size. Random pushes and pops are compared word by word with a queue
// model; the test also fills the FIFO to check df_not_full at exactly 64
// words, checks that a write while full is dropped, and drains it again.
module tb_dataflow_fifo;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, dm_enable = 0, df_not_full, rd_valid;
  logic [31:0] wr_data = 0, rd_data;
  logic [6:0] count;
  int checks = 0, failures = 0;
  logic [31:0] q[$];

  dataflow_fifo #(.DEPTH(DEPTH), .WIDTH(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!rd_valid && df_not_full && count == 0, "empty after reset");
    // random traffic
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (rd_valid) chk(rd_data == q[0], $sformatf("head %h exp %h", rd_data, q[0]));
      chk(count == 7'(q.size()), "count");
      wr_en     = ($urandom_range(0, 99) < 55) && df_not_full;
      wr_data   = $urandom;
      dm_enable = ($urandom_range(0, 99) < 45) && rd_valid;
      @(posedge clk);
      #1;
      if (dm_enable) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    // fill
    @(negedge clk); wr_en = 0; dm_enable = 0;
    while (df_not_full) begin
      @(negedge clk); wr_en = 1; wr_data = $urandom;
      @(posedge clk); #1; q.push_back(wr_data);
      @(negedge clk); wr_en = 0;
    end
    chk(q.size() == DEPTH && count == 7'(DEPTH), "full at 64");
    // write while full must be dropped
    @(negedge clk);
    chk(rd_valid && !df_not_full, "flags when full");
    // drain
    while (rd_valid) begin
      @(negedge clk);
      chk(rd_data == q[0], "drain order");
      dm_enable = 1;
      @(posedge clk); #1; void'(q.pop_front());
      @(negedge clk); dm_enable = 0;
    end
    chk(q.size() == 0, "drained all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
