// tb_variable_set: self-checking test of the Variable Set at its full 256
// entries. After reset every entry must read free; then random set/clear
// writes are mirrored in a model and every read is compared with it, both
// at random addresses and in a full sweep at the end.
module tb_variable_set;
  logic clk = 0, rst_n = 0;
  logic [7:0] rd_addr = 0, wr_addr = 0;
  logic rd_valid, wr_en = 0, wr_valid = 0;
  logic [5:0] rd_idx, wr_idx = 0;
  int checks = 0, failures = 0;
  bit m_valid[256];
  logic [5:0] m_idx[256];

  variable_set #(.DEPTH(256), .IDX_W(6)) dut (.*);
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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      rd_addr = 8'(a); #1;
      chk(!rd_valid, $sformatf("entry %0d free after reset", a));
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      rd_addr  = 8'($urandom);
      #1;
      chk(rd_valid == m_valid[rd_addr] && (!rd_valid || rd_idx == m_idx[rd_addr]),
          $sformatf("read %0d", rd_addr));
      wr_en    = $urandom_range(0, 1);
      wr_addr  = 8'($urandom_range(0, 31));   // keep collisions frequent
      wr_valid = $urandom_range(0, 2) != 0;
      wr_idx   = 6'($urandom);
      @(posedge clk); #1;
      if (wr_en) begin m_valid[wr_addr] = wr_valid; m_idx[wr_addr] = wr_idx; end
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < 256; a++) begin
      rd_addr = 8'(a); #1;
      chk(rd_valid == m_valid[a] && (!rd_valid || rd_idx == m_idx[a]), "sweep");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
