// task_dispatcher: from the controller to the execution units' task buffers.
//
// Normal tasks enter a ready_task_fifo. Each execution unit has a local task
// buffer with two slots. The FIFO head is moved into the normal slot of the
// lowest-numbered unit that is idle and whose buffer is empty (one move per
// cycle). Immediate Successor: a task whose only predecessor just finished on
// unit U is sent by the controller straight into U's priority slot,
// bypassing the FIFO; a unit always takes its priority slot before its
// normal slot. The FIFO, the bypass path, the MUX in front of the task buffer
// and the per-unit task buffer follow the published dispatch path; the
// two-slot buffer and the fill rule are this design's choices.
//
//  sub_*:  valid/ready push into the FIFO.
//  imm_*:  valid/ready write into unit imm_unit's priority slot; ready is
//          low while that slot is occupied.
//  unit_*: unit_task_valid/unit_task show the slot the unit will take next,
//          unit_take (only while valid) empties it.
module task_dispatcher
  import mf_pkg::*;
#(
  parameter int unsigned NU         = 2,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned UW         = (NU > 1) ? $clog2(NU) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sub_valid,
  output logic          sub_ready,
  input  task_t         sub_task,
  input  logic          imm_valid,
  output logic          imm_ready,
  input  logic [UW-1:0] imm_unit,
  input  task_t         imm_task,
  input  logic          unit_idle       [NU],
  output logic          unit_task_valid [NU],
  output task_t         unit_task       [NU],
  input  logic          unit_take       [NU],
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count
);

  logic  f_valid, f_pop;
  task_t f_task;

  logic  nrm_v_q [NU];
  task_t nrm_q   [NU];
  logic  imm_v_q [NU];
  task_t imm_q   [NU];

  logic [NU-1:0] can_fill;
  logic          fill_any;
  logic [UW-1:0] fill_idx;

  ready_task_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .push_valid(sub_valid),
    .push_ready(sub_ready),
    .push_task (sub_task),
    .pop_valid (f_valid),
    .pop_ready (f_pop),
    .pop_task  (f_task),
    .count     (fifo_count)
  );

  always_comb begin
    for (int u = 0; u < NU; u++)
      can_fill[u] = unit_idle[u] && !nrm_v_q[u] && !imm_v_q[u];
  end

  idle_page_encoder #(.N(NU), .W(UW)) u_pick (
    .idle (can_fill),
    .found(fill_any),
    .index(fill_idx)
  );

  assign f_pop     = f_valid && fill_any;
  assign imm_ready = !imm_v_q[imm_unit];

  // MUX in front of each unit: the priority slot wins.
  always_comb begin
    for (int u = 0; u < NU; u++) begin
      unit_task_valid[u] = imm_v_q[u] || nrm_v_q[u];
      unit_task[u]       = imm_v_q[u] ? imm_q[u] : nrm_q[u];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int u = 0; u < NU; u++) begin
        nrm_v_q[u] <= 1'b0;
        imm_v_q[u] <= 1'b0;
        nrm_q[u]   <= '0;
        imm_q[u]   <= '0;
      end
    end else begin
      for (int u = 0; u < NU; u++) begin
        if (unit_take[u]) begin
          if (imm_v_q[u]) imm_v_q[u] <= 1'b0;
          else            nrm_v_q[u] <= 1'b0;
        end
      end
      if (f_pop) begin
        nrm_v_q[fill_idx] <= 1'b1;
        nrm_q[fill_idx]   <= f_task;
      end
      if (imm_valid && imm_ready) begin
        imm_v_q[imm_unit] <= 1'b1;
        imm_q[imm_unit]   <= imm_task;
      end
    end
  end

  for (genvar u = 0; u < NU; u++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) unit_take[u] |-> unit_task_valid[u])
      else $error("task_dispatcher: unit %0d took from an empty task buffer", u);
  end

endmodule
