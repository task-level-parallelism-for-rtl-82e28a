// tb_sa_engine: GEMM and blocked-TRSM tasks through one systolic-array engine.
// Operand tiles are placed in a model buffer as linked page lists; results
// are compared with a software model. With a buffer that never stalls, the
// task time must match the engine's cycle budget.
module tb_sa_engine;
  import mf_pkg::*;
  localparam int N = SA_N;
  localparam int PASS = 3*N - 2;
  logic clk = 0, rst_n = 0;
  logic task_valid = 0, task_take, idle, done_valid, done_ready = 0;
  task_t task_in;
  tag_t done_tag;
  logic br_req, br_we, br_gnt, br_rvalid;
  entry_t br_entry, br_rnext;
  tile_t br_wdata, br_rdata;
  int checks = 0, failures = 0;

  sa_engine dut (.*);
  tb_page_mem mem (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tile_t rnd_tile(input int span, input bit unit_lower);
    tile_t t;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      if (unit_lower) t[i*N+j] = (j < i) ? elem_t'($urandom_range(0, span)) - span/2 : ((i == j) ? 1 : 0);
      else            t[i*N+j] = elem_t'($urandom_range(0, span)) - span/2;
    end
    return t;
  endfunction

  // model: acc - A*B
  function automatic tile_t mm_sub(input tile_t acc, input tile_t a, input tile_t b);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      for (int k = 0; k < N; k++) acc[i*N+j] -= a[i*N+k] * b[k*N+j];
    return acc;
  endfunction

  function automatic tile_t fwd_sub(input tile_t l, input tile_t b);
    tile_t x = b;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      for (int k = 0; k < i; k++) x[i*N+j] -= l[i*N+k] * x[k*N+j];
    return x;
  endfunction

  // build a list of kt pages starting at page `base`, stride 3 (not contiguous)
  function automatic entry_t build_list(input int base, input int kt, input int span);
    for (int k = 0; k < kt; k++) begin
      mem.mem[base + 3*k] = rnd_tile(span, 0);
      mem.nxt[base + 3*k] = (k == kt-1) ? entry_t'(base + 3*k) : entry_t'(base + 3*(k+1));
    end
    return entry_t'(base);
  endfunction

  task automatic run(input op_e op, input int kt, input bit nostall);
    tile_t exp_t;
    entry_t a, b;
    int t0, cyc, budget, bad;
    task_t tk;
    mem.mem[200] = rnd_tile(4000, 0);
    mem.nxt[200] = 200;
    mem.mem[201] = rnd_tile(6, 1);
    mem.nxt[201] = 201;
    a = build_list(10, kt, 30);
    b = build_list(11, kt, 30);
    exp_t = mem.mem[200];
    for (int k = 0; k < kt; k++) exp_t = mm_sub(exp_t, mem.mem[10+3*k], mem.mem[11+3*k]);
    if (op == OP_TRSM) exp_t = fwd_sub(mem.mem[201], exp_t);
    tk = '0;
    tk.op = op; tk.tag = tag_t'($urandom); tk.c_head = 200; tk.a_head = a; tk.b_head = b;
    tk.l_page = 201; tk.k_tiles = KT_W'(kt);
    if (nostall) mem.wait_cnt = 0;
    @(negedge clk);
    task_in = tk; task_valid = 1;
    t0 = $time;
    @(negedge clk);
    task_valid = 0;
    checks++;
    if (idle) begin failures++; $display("FAIL engine did not take task"); end
    while (!done_valid) @(negedge clk);
    cyc = ($time - t0) / 10;
    checks++;
    if (done_tag != tk.tag) begin failures++; $display("FAIL tag"); end
    done_ready = 1;
    @(negedge clk);
    done_ready = 0;
    bad = 0;
    for (int e = 0; e < N*N; e++) begin
      checks++;
      if (mem.mem[200][e] !== exp_t[e]) begin
        failures++; bad++;
        if (bad < 4) $display("FAIL op=%0d kt=%0d elem %0d got %0d exp %0d", op, kt, e, mem.mem[200][e], exp_t[e]);
      end
    end
    // budget: take + 2 (C) + kt*(4 + PASS) + TRSM (2 + PASS) + 1 write
    budget = 1 + 2 + kt * (4 + PASS) + ((op == OP_TRSM) ? 2 + PASS : 0) + 1;
    if (nostall) begin
      checks++;
      if (cyc != budget) begin failures++; $display("FAIL cycles %0d expected %0d", cyc, budget); end
    end
  endtask

  initial begin
    task_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(OP_GEMM, 1, 0);
    run(OP_GEMM, 3, 0);
    run(OP_TRSM, 0, 0);
    run(OP_TRSM, 2, 0);
    run(OP_GEMM, 0, 0);
    // cycle budget with a buffer that always grants at once
    force mem.wait_cnt = 0;
    run(OP_GEMM, 2, 1);
    run(OP_TRSM, 1, 1);
    release mem.wait_cnt;
    checks++;
    if (mem.stalls == 0) begin failures++; $display("FAIL no buffer stall was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
