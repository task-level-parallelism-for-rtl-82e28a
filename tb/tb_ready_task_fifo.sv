// tb_ready_task_fifo: random push/pop traffic against a queue model; checks
// order, count, and that pushes are held off when the FIFO is full.
module tb_ready_task_fifo;
  import mf_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0, rst_n = 0;
  logic push_valid = 0, push_ready, pop_valid, pop_ready = 0;
  task_t push_task = '0, pop_task;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, fulls = 0;
  task_t q [$];

  ready_task_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      automatic bit ph = (n % 1000) < 500;   // phases biased to fill, then to drain
      @(negedge clk);
      push_valid = ($urandom_range(0, 9) < (ph ? 8 : 3));
      pop_ready  = ($urandom_range(0, 9) < (ph ? 3 : 8));
      push_task  = task_t'({$urandom, $urandom, $urandom, $urandom});
      #1;
      checks++;
      if (count != q.size() || push_ready != (q.size() < DEPTH) || pop_valid != (q.size() > 0)) begin
        failures++; $display("FAIL flags count=%0d model=%0d", count, q.size());
      end
      if (!push_ready && push_valid) fulls++;
      if (pop_valid && pop_ready) begin
        checks++;
        if (pop_task !== q[0]) begin failures++; $display("FAIL order"); end
        void'(q.pop_front());
      end
      if (push_valid && push_ready) q.push_back(push_task);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
