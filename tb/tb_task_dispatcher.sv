// tb_task_dispatcher: ready-task FIFO plus Immediate Successor bypass.
// Three model execution units take tasks when idle and stay busy for a
// random time. Checks: every normal task runs once, in FIFO order; a normal
// task goes only to an idle unit; an immediate-successor task runs on the
// unit it was sent to and ahead of any normal task waiting in that unit's
// buffer; pushes are held off while the FIFO is full.
module tb_task_dispatcher;
  import mf_pkg::*;
  localparam int NU = 3;
  localparam int UW = 2;
  logic clk = 0, rst_n = 0;
  logic sub_valid = 0, sub_ready, imm_valid = 0, imm_ready;
  task_t sub_task = '0, imm_task = '0;
  logic [UW-1:0] imm_unit = '0;
  logic unit_idle [NU], unit_task_valid [NU], unit_take [NU];
  task_t unit_task [NU];
  logic [$clog2(4+1)-1:0] fifo_count;
  int checks = 0, failures = 0;
  int busy [NU];
  int next_tag = 0, exp_normal = 0, imm_done = 0, imm_sent = 0, fulls = 0, preempt = 0, normal_done = 0;
  int imm_target [256];

  task_dispatcher #(.NU(NU), .FIFO_DEPTH(4), .UW(UW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // normal tasks have tags 0..127 in order; immediate successors 128..255
  initial begin
    for (int u = 0; u < NU; u++) begin busy[u] = 0; unit_take[u] = 0; unit_idle[u] = 1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000 && (normal_done < 120 || imm_done < imm_sent); n++) begin
      @(negedge clk);
      // model units
      for (int u = 0; u < NU; u++) begin
        unit_take[u] = 0;
        if (busy[u] > 0) busy[u]--;
        unit_idle[u] = (busy[u] == 0);
      end
      #1;
      for (int u = 0; u < NU; u++) begin
        if (unit_idle[u] && unit_task_valid[u]) begin
          automatic int tg = int'(unit_task[u].tag);
          unit_take[u] = 1;
          busy[u] = $urandom_range(1, 12);
          if (dut.imm_v_q[u] && dut.nrm_v_q[u]) preempt++;
          checks++;
          if (tg >= 128) begin
            if (imm_target[tg-128] != u) begin failures++; $display("FAIL imm task on wrong unit"); end
            if (dut.nrm_v_q[u] && !dut.imm_v_q[u]) begin failures++; $display("FAIL imm not first"); end
            imm_done++;
          end else begin
            normal_done++;
          end
        end
      end
      // the FIFO hands out tasks in order, and only to an idle unit
      for (int u = 0; u < NU; u++) if (dut.f_pop && dut.fill_idx == UW'(u)) begin
        checks += 2;
        if (!unit_idle[u]) begin failures++; $display("FAIL fill of busy unit"); end
        if (int'(dut.f_task.tag) != exp_normal) begin failures++; $display("FAIL order got %0d exp %0d", dut.f_task.tag, exp_normal); end
        exp_normal++;
      end
      // submissions
      sub_valid = (next_tag < 120) && ($urandom_range(0, 1) == 0);
      sub_task = '0; sub_task.tag = tag_t'(next_tag);
      imm_valid = ($urandom_range(0, 6) == 0) && imm_sent < 100;
      imm_unit = UW'($urandom_range(0, NU-1));
      imm_task = '0; imm_task.tag = tag_t'(128 + imm_sent);
      #1;
      if (sub_valid && !sub_ready) fulls++;
      if (sub_valid && sub_ready) next_tag++;
      if (imm_valid && imm_ready) begin imm_target[imm_sent] = int'(imm_unit); imm_sent++; end
    end
    @(negedge clk);
    sub_valid = 0; imm_valid = 0;
    checks += 4;
    if (normal_done != 120) begin failures++; $display("FAIL normal tasks run %0d", normal_done); end
    if (imm_done != imm_sent || imm_sent == 0) begin failures++; $display("FAIL imm %0d of %0d", imm_done, imm_sent); end
    if (fulls == 0) begin failures++; $display("FAIL FIFO never full"); end
    if (preempt == 0) begin failures++; $display("FAIL bypass never overtook a waiting task"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
