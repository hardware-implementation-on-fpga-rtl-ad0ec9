// pe_model: behavioural model of a processing element (an IP core or a
// general-purpose processor) as seen by the scheduler. Not synthesizable
// logic; testbench only.
//
// It accepts one sub-flow at a time (task_ready high while idle), works on it
// for a latency drawn from [LAT_MIN, LAT_MAX] (or LONG_LAT for type LONG_TYPE),
// then raises irq with the results of sched_tb_pkg::pe_func and holds them
// until irq_ack. n_done counts finished sub-flows; last_type is the type of
// the last one.
module pe_model
  import mpt_pkg::*;
  import sched_tb_pkg::*;
#(
  parameter int LAT_MIN   = 5,
  parameter int LAT_MAX   = 20,
  parameter int LONG_TYPE = -1,
  parameter int LONG_LAT  = 1000
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    task_valid,
  input  task_t   task_in,
  output logic    task_ready,
  output logic    irq,
  output result_t result,
  input  logic    irq_ack,
  output int      n_done,
  output logic [TYPE_W-1:0] last_type
);
  typedef enum logic [1:0] {IDLE, WORK, DONE} st_t;
  st_t st;
  int  cnt;

  assign task_ready = (st == IDLE);
  assign irq        = (st == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; cnt <= 0; result <= '0; n_done <= 0; last_type <= '0;
    end else begin
      case (st)
        IDLE: if (task_valid) begin
          result.ou_id    <= task_in.ou_id;
          result.mt_entry <= task_in.mt_entry;
          result.results  <= pe_func(task_in.ttype, task_in.in_num, task_in.args);
          last_type       <= task_in.ttype;
          if (int'(task_in.ttype) == LONG_TYPE) cnt <= LONG_LAT;
          else cnt <= LAT_MIN + int'($urandom_range(0, LAT_MAX - LAT_MIN));
          st <= WORK;
        end
        WORK: if (cnt <= 1) st <= DONE; else cnt <= cnt - 1;
        DONE: if (irq_ack) begin st <= IDLE; n_done <= n_done + 1; end
        default: st <= IDLE;
      endcase
    end
  end
endmodule
