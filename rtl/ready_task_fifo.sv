// ready_task_fifo: the Ready Task FIFO in the programmable logic.
//
// Holds task descriptors whose dependencies have been released, in order,
// until an execution unit can take them. A synchronous FIFO with
// valid/ready handshakes on both sides; the head is visible combinationally
// while pop_valid is high. A push into a full FIFO is held off (push_ready
// low). The FIFO itself follows the published design; its depth is not
// published and is this design's choice.
module ready_task_fifo
  import mf_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push_valid,
  output logic  push_ready,
  input  task_t push_task,
  output logic  pop_valid,
  input  logic  pop_ready,
  output task_t pop_task,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  task_t mem [DEPTH];
  logic [AW-1:0] rd_q, wr_q;
  logic do_push, do_pop;

  assign push_ready = (count != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign pop_valid  = (count != '0);
  assign pop_task   = mem[rd_q];
  assign do_push    = push_valid && push_ready;
  assign do_pop     = pop_valid && pop_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      count <= '0;
    end else begin
      if (do_push) begin
        mem[wr_q] <= push_task;
        wr_q      <= (wr_q == AW'(DEPTH - 1)) ? '0 : wr_q + 1'b1;
      end
      if (do_pop) rd_q <= (rd_q == AW'(DEPTH - 1)) ? '0 : rd_q + 1'b1;
      if (do_push && !do_pop)      count <= count + 1'b1;
      else if (do_pop && !do_push) count <= count - 1'b1;
    end
  end

endmodule
