// dataflow_fifo: the Dataflow FIFO (DF) between the issuing processor and the
// Dataflow Mapper.
//
// The processor pushes 32-bit sub-flow words while df_not_full is high; the
// mapper sees the head word on rd_data whenever rd_valid is high (first-word
// fall-through) and takes it by raising dm_enable for one cycle. A write and a
// read may happen in the same cycle. Storage is a DEPTH x WIDTH array with
// binary read/write pointers and an occupancy counter.
//
// Depth 64 and width 32, and the DF_not_full / DM_enable signal pair, follow
// the design; the fall-through read and the pointer scheme are this design's
// choice. Writes while full and reads while empty are ignored (and flagged by
// assertions).
module dataflow_fifo #(
  parameter int DEPTH = 64,
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             df_not_full,
  input  logic             dm_enable,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             do_wr, do_rd;

  assign df_not_full = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign rd_valid    = (count != '0);
  assign rd_data     = mem[rptr];
  assign do_wr       = wr_en && df_not_full;
  assign do_rd       = dm_enable && rd_valid;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_rd) rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      count <= count + $bits(count)'(do_wr) - $bits(count)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && !df_not_full));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(dm_enable && !rd_valid));
endmodule
