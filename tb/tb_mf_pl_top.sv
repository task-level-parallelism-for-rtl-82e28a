// tb_mf_pl_top: one frontal matrix through the programmable logic, end to end,
// with the top at its default configuration (8 systolic-array units, 7 Extend
// Add units, 256 pages).
//
// The testbench plays the processing system: it allocates pages, writes the
// original matrix and two children's contribution matrices into the buffer
// (DRAM Read by DMA), submits extend-add tasks, stands in for the CPU's
// PANEL by writing the panel results, submits the blocked TRSM (the second
// block row as Immediate Successor of the first, on the same unit), submits
// the GEMM updates of the contribution matrix, reads the results back
// (DRAM Write) and frees every list. A 4x4-tile frontal matrix with a
// 2-tile pivot block is used. All results are checked against a software
// model. A stress phase then floods the TRSM & GEMM FIFO. Each mechanism is
// counted and must occur at least once: linked allocation, list freeing,
// page exhaustion, extend-add, TRSM and GEMM passes, a unit switching
// between TRSM and GEMM, the immediate-successor bypass, FIFO backpressure,
// buffer-port contention and simultaneous completion messages.
module tb_mf_pl_top;
  import mf_pkg::*;
  localparam int N = SA_N;
  localparam int NU = 15;
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
  logic done_valid, done_ready = 0;
  logic [UW-1:0] done_unit;
  tag_t done_tag;

  mf_pl_top dut (.*);

  int checks = 0, failures = 0;
  tile_t  model [NUM_PAGES];
  entry_t mnext [NUM_PAGES];
  bit     seen  [256];
  int     unit_of [256];
  int     n_alloc = 0, n_free = 0, n_exhaust = 0, n_ea = 0, n_trsm = 0, n_gemm = 0;
  int     n_switch = 0, n_bypass = 0, n_backpressure = 0, n_contention = 0, n_multi_done = 0;
  bit     did_trsm [NU], did_gemm [NU];
  int     next_tag = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------- monitors ----------------
  always @(posedge clk) if (rst_n) begin
    int nreq = 0, ndone = 0;
    for (int r = 0; r < NU + 1; r++) nreq += dut.rq_req[r];
    for (int u = 0; u < NU; u++) ndone += dut.u_done[u];
    if (nreq > 1) n_contention++;
    if (ndone > 1) n_multi_done++;
    if (done_valid && done_ready) begin
      seen[done_tag]    <= 1'b1;
      unit_of[done_tag] <= int'(done_unit);
    end
    done_ready <= ($urandom_range(0, 3) != 0);
  end

  // ---------------- host helpers ----------------
  task automatic alloc_page(input bit link, input entry_t prev, output entry_t e);
    @(negedge clk);
    alloc_valid = 1; alloc_link = link; alloc_prev = prev;
    #1;
    while (!alloc_ready) begin @(negedge clk); #1; end
    e = alloc_entry;
    mnext[e] = e;
    if (link) mnext[prev] = e;
    n_alloc++;
    @(negedge clk);
    alloc_valid = 0; alloc_link = 0;
  endtask

  // allocate a list of len pages, return the entries
  task automatic alloc_list(input int len, output entry_t es [4]);
    entry_t e;
    for (int k = 0; k < len; k++) begin
      alloc_page(k != 0, (k != 0) ? es[k-1] : entry_t'(0), e);
      es[k] = e;
    end
  endtask

  task automatic free_list(input entry_t head);
    @(negedge clk);
    while (!free_ready) @(negedge clk);
    free_valid = 1; free_head = head;
    @(negedge clk);
    free_valid = 0;
    n_free++;
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

  task automatic host_read(input entry_t e, output tile_t t, output entry_t nx);
    @(negedge clk);
    hb_req = 1; hb_we = 0; hb_entry = e;
    #1;
    while (!hb_gnt) begin @(negedge clk); #1; end
    @(negedge clk);
    hb_req = 0;
    #1;
    chk(hb_rvalid, "host read returns one cycle after the grant");
    t = hb_rdata; nx = hb_rnext;
  endtask

  task automatic submit(input task_t t, input bit imm, input int unit);
    @(negedge clk);
    sub_valid = 1; sub_task = t; sub_imm = imm; sub_unit = UW'(unit);
    #1;
    while (!sub_ready) begin n_backpressure++; @(negedge clk); #1; end
    if (imm) n_bypass++;
    @(negedge clk);
    sub_valid = 0; sub_imm = 0;
  endtask

  task automatic wait_tag(input int tg);
    while (!seen[tg]) @(negedge clk);
  endtask

  function automatic tile_t rnd_tile(input int span);
    tile_t t;
    for (int e = 0; e < N*N; e++) t[e] = elem_t'($urandom_range(0, span)) - span/2;
    return t;
  endfunction

  function automatic tile_t unit_lower(input int span);
    tile_t t;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
      t[i*N+j] = (j < i) ? elem_t'($urandom_range(0, span)) - span/2 : ((i == j) ? 1 : 0);
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

  function automatic task_t mk(input op_e op, input entry_t c, input entry_t a, input entry_t b,
                               input entry_t l, input int kt);
    task_t t = '0;
    t.op = op; t.c_head = c; t.a_head = a; t.b_head = b; t.l_page = l; t.k_tiles = KT_W'(kt);
    t.tag = tag_t'(next_tag);
    next_tag++;
    return t;
  endfunction

  task automatic compare_tile(input entry_t e, input tile_t exp_t, input string what);
    tile_t got;
    entry_t nx;
    host_read(e, got, nx);
    chk(got === exp_t, what);
    chk(nx == mnext[e], {what, ": next entry"});
  endtask

  // ---------------- the scenario ----------------
  // frontal tiles F[r][c], r,c in 0..3; rows 0..1 / cols 0..1 are the pivot block.
  // Storage: every block row of the frontal matrix is one linked list; block
  // column j of the TRSM result rows is the list F[0][j+2] -> F[1][j+2].
  entry_t F [4][4];
  entry_t Ch [2][4];   // two children, 2x2 contribution tiles each, one list per child

  initial begin
    entry_t es [4];
    tile_t  exp_t;
    task_t  t;
    int     tg_x0 [2], tg_x1 [2], tg_g [2][2], tg_ea [8];
    int     first_start;

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(free_count == (PAGE_W+1)'(NUM_PAGES), "all pages idle after reset");

    // --- DR: original matrix (block rows as lists) and children's contributions
    for (int r = 0; r < 4; r++) begin
      alloc_list(4, es);
      for (int c = 0; c < 4; c++) F[r][c] = es[c];
    end
    for (int ch = 0; ch < 2; ch++) begin
      alloc_list(4, es);
      for (int k = 0; k < 4; k++) Ch[ch][k] = es[k];
    end
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) host_write(F[r][c], rnd_tile(200));
    for (int ch = 0; ch < 2; ch++) for (int k = 0; k < 4; k++) host_write(Ch[ch][k], rnd_tile(200));
    chk(free_count == (PAGE_W+1)'(NUM_PAGES - 24), "24 pages in use");

    // --- Extend-add: child tile k goes to a frontal tile with random partial maps
    for (int ch = 0; ch < 2; ch++) for (int k = 0; k < 4; k++) begin
      automatic int fr = (ch == 0) ? k / 2 + 2 : k / 2 + (k % 2) * 2;
      automatic int fc = (ch == 0) ? k % 2 + 2 : (k % 2) + 1;
      automatic int perm_r [N], perm_c [N];
      t = mk(OP_EA, F[fr][fc], Ch[ch][k], '0, '0, 0);
      for (int i = 0; i < N; i++) begin perm_r[i] = i; perm_c[i] = i; end
      for (int i = N-1; i > 0; i--) begin
        automatic int j = $urandom_range(0, i), tmp = perm_r[i];
        perm_r[i] = perm_r[j]; perm_r[j] = tmp;
        j = $urandom_range(0, i); tmp = perm_c[i]; perm_c[i] = perm_c[j]; perm_c[j] = tmp;
      end
      for (int i = 0; i < N; i++) begin
        t.row_map[i].v = ($urandom_range(0, 3) != 0); t.row_map[i].idx = 3'(perm_r[i]);
        t.col_map[i].v = ($urandom_range(0, 3) != 0); t.col_map[i].idx = 3'(perm_c[i]);
      end
      exp_t = model[F[fr][fc]];
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
        if (t.row_map[i].v && t.col_map[j].v)
          exp_t[t.row_map[i].idx*N + t.col_map[j].idx] += model[Ch[ch][k]][i*N+j];
      // tiles hit twice (F[2][2], F[3][3]... ) are serialised: wait for the first
      if (ch == 1) for (int p = 0; p < 4; p++) if (F[p/2+2][p%2+2] == F[fr][fc]) wait_tag(tg_ea[p]);
      model[F[fr][fc]] = exp_t;
      tg_ea[ch*4+k] = int'(t.tag);
      submit(t, 0, 0);
      n_ea++;
    end
    for (int k = 0; k < 8; k++) wait_tag(tg_ea[k]);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      compare_tile(F[r][c], model[F[r][c]], $sformatf("assembled frontal tile %0d,%0d", r, c));
    for (int k = 0; k < 8; k++) chk(unit_of[tg_ea[k]] >= 8, "extend-add ran on an Extend Add unit");
    // contributions are consumed: free the children's lists
    free_list(Ch[0][0]);
    free_list(Ch[1][0]);

    // --- PANEL (processing system): unit lower-triangular diagonal blocks in
    //     F[0][0] and F[1][1]; F[1][0] holds L10; F[2..3][0..1] hold L21.
    host_write(F[0][0], unit_lower(6));
    host_write(F[1][1], unit_lower(6));
    host_write(F[1][0], rnd_tile(6));
    for (int r = 2; r < 4; r++) for (int c = 0; c < 2; c++) host_write(F[r][c], rnd_tile(20));

    // --- TRSM block row 0 (X0j = L00^-1 F[0][j+2]), normal path
    for (int j = 0; j < 2; j++) begin
      t = mk(OP_TRSM, F[0][j+2], '0, '0, F[0][0], 0);
      model[F[0][j+2]] = fwd_sub(model[F[0][0]], model[F[0][j+2]]);
      tg_x0[j] = int'(t.tag);
      submit(t, 0, 0);
      n_trsm++;
    end
    // --- TRSM block row 1 depends only on X0j: Immediate Successor on the same unit.
    //     X1j = L11^-1 (F[1][j+2] - L10 X0j); A list = [F[1][0]], B list = [F[0][j+2]]
    for (int j = 0; j < 2; j++) begin
      wait_tag(tg_x0[j]);
      t = mk(OP_TRSM, F[1][j+2], F[1][0], F[0][j+2], F[1][1], 1);
      model[F[1][j+2]] = fwd_sub(model[F[1][1]], mm_sub(model[F[1][j+2]], model[F[1][0]], model[F[0][j+2]]));
      tg_x1[j] = int'(t.tag);
      submit(t, 1, unit_of[tg_x0[j]]);
      n_trsm++;
    end
    for (int j = 0; j < 2; j++) begin
      wait_tag(tg_x1[j]);
      chk(unit_of[tg_x1[j]] == unit_of[tg_x0[j]], "immediate successor ran on its predecessor's unit");
      did_trsm[unit_of[tg_x0[j]]] = 1;
    end

    // --- GEMM: F22[i][j] -= sum_k L21[i][k] * X[k][j]
    //     A list = block row i+2 starting at F[i+2][0] (2 tiles used)
    //     B list = column list: relink not needed, X column j is F[0][j+2] -> ? ;
    //     block column lists are built by the host as a separate 2-page copy.
    for (int j = 0; j < 2; j++) begin
      entry_t xc [4];
      tile_t tmp_t; entry_t nx;
      alloc_list(2, xc);
      for (int k = 0; k < 2; k++) begin
        host_read(F[k][j+2], tmp_t, nx);
        chk(tmp_t === model[F[k][j+2]], "TRSM result tile");
        host_write(xc[k], tmp_t);
      end
      for (int i = 0; i < 2; i++) begin
        t = mk(OP_GEMM, F[i+2][j+2], F[i+2][0], xc[0], '0, 2);
        model[F[i+2][j+2]] = mm_sub(mm_sub(model[F[i+2][j+2]], model[F[i+2][0]], model[xc[0]]),
                                    model[F[i+2][1]], model[xc[1]]);
        tg_g[i][j] = int'(t.tag);
        submit(t, 0, 0);
        n_gemm++;
      end
      Ch[j][0] = xc[0];
    end
    for (int i = 0; i < 2; i++) for (int j = 0; j < 2; j++) begin
      wait_tag(tg_g[i][j]);
      did_gemm[unit_of[tg_g[i][j]]] = 1;
      compare_tile(F[i+2][j+2], model[F[i+2][j+2]], "contribution matrix tile (GEMM)");
    end
    for (int u = 0; u < 8; u++) if (did_trsm[u] && did_gemm[u]) n_switch++;

    // --- DW: the factorized rows go back to DRAM (read out), lists freed
    for (int r = 0; r < 2; r++) begin
      for (int c = 0; c < 4; c++) compare_tile(F[r][c], model[F[r][c]], "factorized tile");
      free_list(F[r][0]);
    end
    free_list(Ch[0][0]);
    free_list(Ch[1][0]);

    // --- stress: 40 independent GEMM tasks (one result tile each) flood the
    //     FIFO; a unit that ran TRSM above also runs GEMM here
    begin
      entry_t sa [4], sc [40];
      int tg0 = next_tag;
      alloc_list(2, sa);
      host_write(sa[0], rnd_tile(20));
      host_write(sa[1], rnd_tile(20));
      for (int n = 0; n < 40; n++) begin
        alloc_page(0, '0, sc[n]);
        host_write(sc[n], rnd_tile(2000));
      end
      for (int n = 0; n < 40; n++) begin
        t = mk(OP_GEMM, sc[n], sa[0], sa[1], '0, 1);
        submit(t, 0, 0);
        n_gemm++;
        model[sc[n]] = mm_sub(model[sc[n]], model[sa[0]], model[sa[1]]);
      end
      for (int n = 0; n < 40; n++) begin
        wait_tag(tg0 + n);
        if (did_trsm[unit_of[tg0 + n]] && !did_gemm[unit_of[tg0 + n]]) begin
          did_gemm[unit_of[tg0 + n]] = 1;
          n_switch++;
        end
      end
      for (int n = 0; n < 40; n++) begin
        compare_tile(sc[n], model[sc[n]], "stress GEMM tile");
        free_list(sc[n]);
      end
      free_list(sa[0]);
    end
    free_list(F[2][0]);
    free_list(F[3][0]);
    @(negedge clk);
    while (!free_ready) @(negedge clk);
    @(negedge clk);
    chk(free_count == (PAGE_W+1)'(NUM_PAGES), "every page idle again");

    // --- exhaustion of the page table
    begin
      entry_t e, head, prev;
      for (int k = 0; k < NUM_PAGES; k++) begin
        alloc_page(k != 0, prev, e);
        if (k == 0) head = e;
        prev = e;
      end
      @(negedge clk);
      alloc_valid = 1;
      #1;
      if (!alloc_ready) n_exhaust++;
      @(negedge clk);
      alloc_valid = 0;
      free_list(head);
      @(negedge clk);
      while (!free_ready) @(negedge clk);
      @(negedge clk);
      chk(free_count == (PAGE_W+1)'(NUM_PAGES), "list of every page freed");
    end

    $display("mechanisms: alloc=%0d free=%0d exhaust=%0d ea=%0d trsm=%0d gemm=%0d switch=%0d bypass=%0d backpressure=%0d contention=%0d multi_done=%0d",
             n_alloc, n_free, n_exhaust, n_ea, n_trsm, n_gemm, n_switch, n_bypass, n_backpressure, n_contention, n_multi_done);
    chk(n_alloc > 0, "linked allocation happened");
    chk(n_free > 0, "list freeing happened");
    chk(n_exhaust > 0, "page exhaustion happened");
    chk(n_ea > 0, "extend-add happened");
    chk(n_trsm > 0, "TRSM happened");
    chk(n_gemm > 0, "GEMM happened");
    chk(n_switch > 0, "a unit switched between TRSM and GEMM");
    chk(n_bypass > 0, "immediate-successor bypass happened");
    chk(n_backpressure > 0, "FIFO backpressure happened");
    chk(n_contention > 0, "buffer contention happened");
    chk(n_multi_done > 0, "simultaneous completion messages happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
