// tb_extend_add: extend-add tasks with random one-to-one index maps.
// Checks the assembled frontal tile against a software scatter-add, and that
// the 64 additions of a tile take 4 beats (16 additions per cycle).
module tb_extend_add;
  import mf_pkg::*;
  localparam int N = SA_N;
  logic clk = 0, rst_n = 0;
  logic task_valid = 0, task_take, idle, done_valid, done_ready = 0, add_beat;
  task_t task_in;
  tag_t done_tag;
  logic br_req, br_we, br_gnt, br_rvalid;
  entry_t br_entry, br_rnext;
  tile_t br_wdata, br_rdata;
  int checks = 0, failures = 0;
  int beats;

  extend_add dut (.*);
  tb_page_mem mem (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (add_beat) beats <= beats + 1;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // random one-to-one partial map: pick a random permutation, drop some entries
  function automatic void rnd_map(output map_t m [N], input int drop_pct);
    int perm [N];
    for (int i = 0; i < N; i++) perm[i] = i;
    for (int i = N-1; i > 0; i--) begin
      int j = $urandom_range(0, i);
      int t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    for (int i = 0; i < N; i++) begin
      m[i].v   = ($urandom_range(0, 99) >= drop_pct);
      m[i].idx = 3'(perm[i]);
    end
  endfunction

  initial begin
    task_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 12; rep++) begin
      task_t tk;
      map_t rm [N], cm [N];
      tile_t f, c, exp_t;
      automatic int bad = 0;
      rnd_map(rm, (rep < 2) ? 0 : 30);
      rnd_map(cm, (rep < 2) ? 0 : 30);
      for (int e = 0; e < N*N; e++) begin
        f[e] = elem_t'($urandom);
        c[e] = elem_t'($urandom);
      end
      mem.mem[7] = f; mem.nxt[7] = 7;
      mem.mem[9] = c; mem.nxt[9] = 9;
      exp_t = f;
      for (int r = 0; r < N; r++) for (int cc = 0; cc < N; cc++)
        if (rm[r].v && cm[cc].v) exp_t[rm[r].idx*N + cm[cc].idx] += c[r*N+cc];
      tk = '0;
      tk.op = OP_EA; tk.tag = tag_t'(rep); tk.c_head = 7; tk.a_head = 9;
      for (int i = 0; i < N; i++) begin tk.row_map[i] = rm[i]; tk.col_map[i] = cm[i]; end
      @(negedge clk);
      beats = 0;
      task_in = tk; task_valid = 1;
      @(negedge clk);
      task_valid = 0;
      while (!done_valid) @(negedge clk);
      checks++;
      if (done_tag != tag_t'(rep)) begin failures++; $display("FAIL tag"); end
      checks++;
      if (beats != TILE_ELEMS / 16) begin failures++; $display("FAIL beats %0d", beats); end
      done_ready = 1;
      @(negedge clk);
      done_ready = 0;
      for (int e = 0; e < N*N; e++) begin
        checks++;
        if (mem.mem[7][e] !== exp_t[e]) begin
          failures++; bad++;
          if (bad < 4) $display("FAIL rep %0d elem %0d got %0h exp %0h", rep, e, mem.mem[7][e], exp_t[e]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
