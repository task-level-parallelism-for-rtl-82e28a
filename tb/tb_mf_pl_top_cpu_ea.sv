// tb_mf_pl_top_cpu_ea: the configuration with extend-add on the processor:
// 9 systolic-array units and no Extend Add unit (NUM_SA = 9, NUM_EA = 0).
// Runs 30 independent GEMM tasks and a two-block-row TRSM whose second row is
// an Immediate Successor, checks every result against a software model,
// checks that all nine units did work and that an extend-add task is refused.
module tb_mf_pl_top_cpu_ea;
  import mf_pkg::*;
  localparam int N = SA_N;
  localparam int NSA = 9;
  localparam int UW = 4;

  logic clk = 0, rst_n = 0;
  logic alloc_valid = 0, alloc_link = 0, alloc_ready, free_valid = 0, free_ready;
  entry_t alloc_prev = '0, alloc_entry, free_head = '0;
  logic [PAGE_W:0] free_count;
  logic hb_req = 0, hb_we = 0, hb_gnt, hb_rvalid;
  entry_t hb_entry = '0, hb_rnext;
  tile_t hb_wdata = '0, hb_rdata;
  logic sub_valid = 0, sub_ready, sub_imm = 0;
  task_t sub_task = '0;
  logic [UW-1:0] sub_unit = '0;
  logic done_valid, done_ready = 1;
  logic [UW-1:0] done_unit;
  tag_t done_tag;

  mf_pl_top #(.NUM_SA(NSA), .NUM_EA(0)) dut (.*);

  int checks = 0, failures = 0, next_tag = 0;
  tile_t model [NUM_PAGES];
  bit    seen  [256];
  int    unit_of [256];
  bit    used  [NSA];

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && done_valid && done_ready) begin
    seen[done_tag]    <= 1'b1;
    unit_of[done_tag] <= int'(done_unit);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic alloc_page(input bit link, input entry_t prev, output entry_t e);
    @(negedge clk);
    alloc_valid = 1; alloc_link = link; alloc_prev = prev;
    #1;
    e = alloc_entry;
    @(negedge clk);
    alloc_valid = 0; alloc_link = 0;
  endtask

  task automatic host_write(input entry_t e, input tile_t t);
    @(negedge clk);
    hb_req = 1; hb_we = 1; hb_entry = e; hb_wdata = t;
    #1;
    while (!hb_gnt) begin @(negedge clk); #1; end
    model[e] = t;
    @(negedge clk);
    hb_req = 0; hb_we = 0;
  endtask

  task automatic host_check(input entry_t e, input string what);
    @(negedge clk);
    hb_req = 1; hb_we = 0; hb_entry = e;
    #1;
    while (!hb_gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    hb_req = 0;
    #1;
    chk(hb_rvalid && hb_rdata === model[e], what);
  endtask

  task automatic submit(input task_t t, input bit imm, input int unit);
    @(negedge clk);
    sub_valid = 1; sub_task = t; sub_imm = imm; sub_unit = UW'(unit);
    #1;
    while (!sub_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    sub_valid = 0; sub_imm = 0;
  endtask

  function automatic tile_t rnd_tile(input int span);
    tile_t t;
    for (int e = 0; e < N*N; e++) t[e] = elem_t'($urandom_range(0, span)) - span/2;
    return t;
  endfunction

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

  initial begin
    entry_t a, b, c [30], l0, l1, l10, x0, x1;
    task_t t;
    int nused = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // extend-add is not accepted in this configuration
    @(negedge clk);
    t = '0; t.op = OP_EA;
    sub_valid = 1; sub_task = t;
    #1;
    chk(!sub_ready, "extend-add task refused without Extend Add units");
    @(negedge clk);
    sub_valid = 0;
    // 30 GEMM tasks
    alloc_page(0, '0, a);
    alloc_page(0, '0, b);
    host_write(a, rnd_tile(20));
    host_write(b, rnd_tile(20));
    for (int n = 0; n < 30; n++) begin
      alloc_page(0, '0, c[n]);
      host_write(c[n], rnd_tile(2000));
    end
    for (int n = 0; n < 30; n++) begin
      t = '0; t.op = OP_GEMM; t.c_head = c[n]; t.a_head = a; t.b_head = b; t.k_tiles = 1;
      t.tag = tag_t'(next_tag++);
      model[c[n]] = mm_sub(model[c[n]], model[a], model[b]);
      submit(t, 0, 0);
    end
    for (int n = 0; n < 30; n++) begin
      while (!seen[n]) @(negedge clk);
      if (!used[unit_of[n]]) nused++;
      used[unit_of[n]] = 1;
      host_check(c[n], "GEMM tile");
    end
    chk(nused == NSA, "all nine systolic units ran tasks");
    // blocked TRSM: X0 = L0^-1 B0; X1 = L1^-1 (B1 - L10 X0) as immediate successor
    alloc_page(0, '0, l0);  alloc_page(0, '0, l1);  alloc_page(0, '0, l10);
    alloc_page(0, '0, x0);  alloc_page(0, '0, x1);
    begin
      tile_t lt;
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
        lt[i*N+j] = (j < i) ? elem_t'($urandom_range(0, 6)) - 3 : ((i == j) ? 1 : 0);
      host_write(l0, lt);
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
        lt[i*N+j] = (j < i) ? elem_t'($urandom_range(0, 6)) - 3 : ((i == j) ? 1 : 0);
      host_write(l1, lt);
    end
    host_write(l10, rnd_tile(6));
    host_write(x0, rnd_tile(200));
    host_write(x1, rnd_tile(200));
    t = '0; t.op = OP_TRSM; t.c_head = x0; t.l_page = l0; t.tag = tag_t'(next_tag++);
    model[x0] = fwd_sub(model[l0], model[x0]);
    submit(t, 0, 0);
    while (!seen[t.tag]) @(negedge clk);
    begin
      int u0 = unit_of[t.tag];
      t = '0; t.op = OP_TRSM; t.c_head = x1; t.a_head = l10; t.b_head = x0; t.l_page = l1;
      t.k_tiles = 1; t.tag = tag_t'(next_tag++);
      model[x1] = fwd_sub(model[l1], mm_sub(model[x1], model[l10], model[x0]));
      submit(t, 1, u0);
      while (!seen[t.tag]) @(negedge clk);
      chk(unit_of[t.tag] == u0, "immediate successor on its predecessor's unit");
    end
    host_check(x0, "TRSM block row 0");
    host_check(x1, "TRSM block row 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
