// tb_task_graph: the data-centric task graph of a six-node elimination tree
// (leaves 1, 2, 3 under node 5; leaf 4 and node 5 under the root 6), run
// through mf_pl_top at its default configuration.
//
// Every node has a 2x2-tile frontal matrix stored as one page list
// [F11, F12, F21, F22]. Per node, in task-graph order:
//   DR    host writes the original matrix, then one extend-add task per child
//         adds the child's contribution tile (its F22) into one tile of this
//         front through random index maps;
//   PANEL host (standing in for the CPU) writes a unit-lower L11 and an F21;
//   TRSM  F12 = L11^-1 F12 on a systolic unit;
//   GEMM  F22 = F22 - F21 F12, sent as Immediate Successor of the TRSM (its
//         only predecessor) to the same unit;
//   DW    host reads F11, F12, F21 back and checks them.
// Independent nodes run concurrently: all leaves are issued before any
// completion is awaited. Contribution pages of a child are freed after the
// parent's extend-add consumed them. All tiles are checked against a
// software model.
module tb_task_graph;
  import mf_pkg::*;
  localparam int N = SA_N;
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

  mf_pl_top dut (.*);

  int checks = 0, failures = 0, next_tag = 0, n_bypass = 0, n_ea = 0;
  tile_t model [NUM_PAGES];
  bit    seen  [256];
  int    unit_of [256];

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
    while (!alloc_ready) begin @(negedge clk); #1; end
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
    if (imm) n_bypass++;
    @(negedge clk);
    sub_valid = 0; sub_imm = 0;
  endtask

  task automatic free_list(input entry_t head);
    @(negedge clk);
    while (!free_ready) @(negedge clk);
    free_valid = 1; free_head = head;
    @(negedge clk);
    free_valid = 0;
  endtask

  function automatic tile_t rnd_tile(input int span);
    tile_t t;
    for (int e = 0; e < N*N; e++) t[e] = elem_t'($urandom_range(0, span)) - span/2;
    return t;
  endfunction

  function automatic tile_t unit_lower();
    tile_t t;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      t[i*N+j] = (j < i) ? elem_t'($urandom_range(0, 6)) - 3 : ((i == j) ? 1 : 0);
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

  // tree: parent of nodes 1..6 (index 0 unused); 0 = root
  int parent [7] = '{0, 5, 5, 5, 6, 6, 0};
  // which tile of the parent's front receives this child's contribution
  int dest_tile [7] = '{0, 0, 1, 3, 0, 3, 0};
  entry_t F [7][4];
  int tg_t [7], tg_g [7];

  // DR + PANEL + TRSM issue for node n (children must be done)
  task automatic start_node(input int n);
    entry_t prev;
    task_t t;
    for (int k = 0; k < 4; k++) begin
      alloc_page(k != 0, prev, F[n][k]);
      prev = F[n][k];
    end
    for (int k = 0; k < 4; k++) host_write(F[n][k], rnd_tile(400));
    // extend-add of every child's contribution tile
    for (int c = 1; c <= 6; c++) if (parent[c] == n) begin
      entry_t d = F[n][dest_tile[c]];
      int perm_r [N], perm_c [N];
      tile_t exp_t;
      t = '0; t.op = OP_EA; t.c_head = d; t.a_head = F[c][3]; t.tag = tag_t'(next_tag++);
      for (int i = 0; i < N; i++) begin perm_r[i] = i; perm_c[i] = i; end
      for (int i = N-1; i > 0; i--) begin
        int j = $urandom_range(0, i), tmp = perm_r[i];
        perm_r[i] = perm_r[j]; perm_r[j] = tmp;
        j = $urandom_range(0, i); tmp = perm_c[i]; perm_c[i] = perm_c[j]; perm_c[j] = tmp;
      end
      for (int i = 0; i < N; i++) begin
        t.row_map[i].v = ($urandom_range(0, 4) != 0); t.row_map[i].idx = 3'(perm_r[i]);
        t.col_map[i].v = ($urandom_range(0, 4) != 0); t.col_map[i].idx = 3'(perm_c[i]);
      end
      exp_t = model[d];
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
        if (t.row_map[i].v && t.col_map[j].v) exp_t[t.row_map[i].idx*N + t.col_map[j].idx] += model[F[c][3]][i*N+j];
      model[d] = exp_t;
      submit(t, 0, 0);
      n_ea++;
      while (!seen[t.tag]) @(negedge clk);
      free_list(F[c][0]);   // child's front fully consumed
    end
    for (int k = 0; k < 4; k++) host_check(F[n][k], "assembled frontal tile");
    // PANEL on the processing system
    host_write(F[n][0], unit_lower());
    host_write(F[n][2], rnd_tile(20));
    // TRSM
    t = '0; t.op = OP_TRSM; t.c_head = F[n][1]; t.l_page = F[n][0]; t.tag = tag_t'(next_tag++);
    model[F[n][1]] = fwd_sub(model[F[n][0]], model[F[n][1]]);
    tg_t[n] = int'(t.tag);
    submit(t, 0, 0);
  endtask

  // GEMM as Immediate Successor of the node's TRSM, then DW
  task automatic finish_node(input int n);
    task_t t;
    while (!seen[tg_t[n]]) @(negedge clk);
    t = '0; t.op = OP_GEMM; t.c_head = F[n][3]; t.a_head = F[n][2]; t.b_head = F[n][1];
    t.k_tiles = 1; t.tag = tag_t'(next_tag++);
    model[F[n][3]] = mm_sub(model[F[n][3]], model[F[n][2]], model[F[n][1]]);
    tg_g[n] = int'(t.tag);
    submit(t, 1, unit_of[tg_t[n]]);
    // DW: factorized part goes back to DRAM
    for (int k = 0; k < 3; k++) host_check(F[n][k], "factorized tile");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // leaves 1..4 are independent: issue them all, then finish them
    for (int n = 1; n <= 4; n++) start_node(n);
    for (int n = 1; n <= 4; n++) finish_node(n);
    for (int n = 1; n <= 4; n++) begin
      while (!seen[tg_g[n]]) @(negedge clk);
      chk(unit_of[tg_g[n]] == unit_of[tg_t[n]], "GEMM ran on its TRSM's unit");
      host_check(F[n][3], "contribution tile");
    end
    start_node(5);
    finish_node(5);
    while (!seen[tg_g[5]]) @(negedge clk);
    host_check(F[5][3], "contribution tile");
    start_node(6);
    finish_node(6);
    while (!seen[tg_g[6]]) @(negedge clk);
    host_check(F[6][3], "root Schur complement tile");
    free_list(F[6][0]);
    @(negedge clk);
    while (!free_ready) @(negedge clk);
    @(negedge clk);
    chk(free_count == (PAGE_W+1)'(NUM_PAGES), "every page idle after the tree");
    chk(n_bypass == 6, "one immediate successor per node");
    chk(n_ea == 5, "one extend-add per child");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
