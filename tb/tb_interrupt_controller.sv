// tb_interrupt_controller: self-checking test of the Interrupt Controller
// with 8 PEs (0-3 IP cores, 4-7 GPPs). Random request patterns are applied;
// whenever a new grant is made it must be the lowest-numbered request, a held
// grant must not change before ack even when a higher-priority request
// arrives (no nesting), and the grant must be one-hot and match grant_id.
module tb_interrupt_controller;
  logic clk = 0, rst_n = 0;
  logic [7:0] irq = 0, grant;
  logic ack = 0, grant_valid;
  logic [2:0] grant_id;
  int checks = 0, failures = 0, preempt_tries = 0;

  interrupt_controller #(.N_PE(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int lowest(input logic [7:0] v);
    for (int i = 0; i < 8; i++) if (v[i]) return i;
    return -1;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] irq_at_edge;
    logic       held;
    logic [2:0] held_id;
    repeat (2) @(posedge clk);
    rst_n = 1;
    held = 0; held_id = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // pending requests stay until acked; new ones arrive at random
      irq = irq | 8'($urandom & $urandom);
      if (grant_valid && $urandom_range(0, 2) == 0) begin
        ack = 1;
      end else ack = 0;
      irq_at_edge = irq;
      @(posedge clk); #1;
      if (held) begin
        if (ack) begin
          chk(!grant_valid, "released after ack");
          irq[held_id] = 0;            // PE drops its request on ack
          held = 0;
        end else begin
          chk(grant_valid && grant_id == held_id, "grant held until ack");
          if (lowest(irq_at_edge) < int'(held_id)) preempt_tries++;
        end
      end else if (irq_at_edge != 0) begin
        chk(grant_valid && int'(grant_id) == lowest(irq_at_edge),
            $sformatf("grant %0d for irq %b", grant_id, irq_at_edge));
        chk(grant == (8'b1 << grant_id), "one-hot grant");
        held = 1; held_id = grant_id;
      end else chk(!grant_valid, "no grant without request");
    end
    chk(preempt_tries > 0, "a higher request arrived during a held grant");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
