// tb_buffer_manager: allocation into linked lists, lookups, list freeing and
// exhaustion of the page table, against a model of the Status bits and links.
module tb_buffer_manager;
  import mf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic alloc_valid = 0, alloc_link = 0, alloc_ready, free_valid = 0, free_ready;
  entry_t alloc_prev = '0, alloc_entry, free_head = '0;
  entry_t lk_entry [1];
  pte_t lk_pte [1];
  logic [PAGE_W:0] free_count;
  int checks = 0, failures = 0;

  bit     m_used [NUM_PAGES];
  entry_t m_next [NUM_PAGES];

  buffer_manager #(.NLOOK(1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int lowest_idle();
    for (int i = 0; i < NUM_PAGES; i++) if (!m_used[i]) return i;
    return -1;
  endfunction

  function automatic int model_free();
    int n = 0;
    for (int i = 0; i < NUM_PAGES; i++) n += !m_used[i];
    return n;
  endfunction

  // allocate one page, optionally linked after prev; returns the entry
  task automatic alloc(input bit link, input entry_t prev, output entry_t e);
    int exp_e = lowest_idle();
    @(negedge clk);
    alloc_valid = 1; alloc_link = link; alloc_prev = prev;
    #1;
    chk(alloc_ready == (exp_e >= 0), "alloc_ready");
    e = alloc_entry;
    if (exp_e >= 0) begin
      chk(alloc_entry == entry_t'(exp_e), "encoder picks lowest idle page");
      m_used[exp_e] = 1; m_next[exp_e] = entry_t'(exp_e);
      if (link) m_next[prev] = entry_t'(exp_e);
    end
    @(negedge clk);
    alloc_valid = 0; alloc_link = 0;
  endtask

  task automatic alloc_list(input int len, output entry_t head);
    entry_t e, prev;
    for (int k = 0; k < len; k++) begin
      alloc(k != 0, prev, e);
      if (k == 0) head = e;
      prev = e;
    end
  endtask

  task automatic free_list(input entry_t head);
    entry_t e = head;
    int len = 1, cyc = 0;
    while (m_next[e] != e) begin m_used[e] = 0; e = m_next[e]; len++; end
    m_used[e] = 0;
    @(negedge clk);
    free_valid = 1; free_head = head;
    @(negedge clk);
    free_valid = 0;
    while (!free_ready) begin @(negedge clk); cyc++; end
    chk(cyc == len, "free walks one entry per cycle");
  endtask

  task automatic check_table();
    for (int i = 0; i < NUM_PAGES; i++) begin
      lk_entry[0] = entry_t'(i);
      #1;
      chk(lk_pte[0].status == m_used[i], "status bit");
      chk(lk_pte[0].page_addr == paddr_t'(i * TILE_ELEMS), "page address");
      if (m_used[i]) chk(lk_pte[0].next == m_next[i], "next entry");
    end
    chk(free_count == (PAGE_W+1)'(model_free()), "free count");
  endtask

  initial begin
    entry_t h1, h2, h3, dummy;
    lk_entry[0] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_table();
    alloc_list(5, h1);
    alloc_list(3, h2);
    alloc_list(4, h3);
    check_table();
    free_list(h2);
    check_table();
    alloc_list(6, h2);   // reuses the freed pages first, then fresh ones
    check_table();
    free_list(h1);
    free_list(h3);
    free_list(h2);
    check_table();
    // exhaustion
    alloc_list(NUM_PAGES, h1);
    chk(free_count == 0, "all pages in use");
    alloc(0, '0, dummy);
    chk(!alloc_ready, "no page available");
    free_list(h1);
    check_table();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
