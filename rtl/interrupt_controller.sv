// interrupt_controller: the scheduler's Interrupt Controller (ICtr).
//
// Each PE raises irq[i] when it has finished a sub-flow and holds it until it
// is acknowledged. The controller grants exactly one request: the lowest PE_ID
// wins, and since IP cores are numbered before the general-purpose processors,
// an IP core always beats a GPP. A grant is held (grant_valid, one-hot grant,
// binary grant_id) until the mapper pulses ack; requests that arrive meanwhile,
// even from a higher-priority PE, wait, because nesting is not supported.
// Timing: a request seen at a clock edge with no grant held is granted at that
// edge; after ack, a new grant can be made on the following edge.
//
// Fixed priority by PE_ID, IP before GPP and no nesting follow the design; the
// registered grant with explicit ack is this design's choice.
module interrupt_controller #(
  parameter int N_PE = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N_PE-1:0]         irq,
  input  logic                    ack,
  output logic                    grant_valid,
  output logic [N_PE-1:0]         grant,
  output logic [$clog2(N_PE)-1:0] grant_id
);
  logic [N_PE-1:0]         pick;
  logic [$clog2(N_PE)-1:0] pick_id;

  // Lowest-index request.
  always_comb begin
    pick    = '0;
    pick_id = '0;
    for (int i = N_PE - 1; i >= 0; i--) begin
      if (irq[i]) begin
        pick    = '0;
        pick[i] = 1'b1;
        pick_id = $clog2(N_PE)'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant_valid <= 1'b0;
      grant       <= '0;
      grant_id    <= '0;
    end else if (grant_valid) begin
      if (ack) begin
        grant_valid <= 1'b0;
        grant       <= '0;
      end
    end else if (irq != '0) begin
      grant_valid <= 1'b1;
      grant       <= pick;
      grant_id    <= pick_id;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) grant_valid |-> $onehot(grant));
  a_ack:    assert property (@(posedge clk) disable iff (!rst_n) ack |-> grant_valid);
endmodule
