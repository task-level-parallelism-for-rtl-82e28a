// tb_buffer_arbiter: four requesters with random reads and writes sharing one
// buffer through the arbiter. Checks that each grant is one-hot, that page
// entries are translated through the (test-supplied) page table, that read
// data and Next Entry come back one cycle after the grant to the right
// requester, and that round-robin serves every waiting requester within
// NREQ grants.
module tb_buffer_arbiter;
  import mf_pkg::*;
  localparam int NREQ = 4;
  logic clk = 0, rst_n = 0;
  logic req [NREQ], we [NREQ], gnt [NREQ], rvalid [NREQ];
  entry_t entry [NREQ];
  tile_t wdata [NREQ];
  tile_t rdata;
  entry_t rnext, lk_entry;
  pte_t lk_pte;
  logic buf_en, buf_we;
  logic [PAGE_W-1:0] buf_page;
  tile_t buf_wdata, buf_rdata;
  int checks = 0, failures = 0;

  buffer_arbiter #(.NREQ(NREQ)) dut (.*);
  pl_buffer u_buf (.clk(clk), .en(buf_en), .we(buf_we), .page(buf_page), .wdata(buf_wdata), .rdata(buf_rdata));

  // page table model: entry e lives in page (e*7+3) mod 256, next = e+1
  always_comb begin
    lk_pte.status    = 1'b1;
    lk_pte.page_addr = paddr_t'(((32'(lk_entry) * 7 + 3) % NUM_PAGES) * TILE_ELEMS);
    lk_pte.next      = lk_entry + 1'b1;
  end

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tile_t model [NUM_PAGES];
  bit    known [NUM_PAGES];
  int    waited [NREQ];
  int    pend_r = -1;
  bit    drop [NREQ];
  entry_t pend_e;

  initial begin
    for (int r = 0; r < NREQ; r++) begin req[r] = 0; we[r] = 0; entry[r] = '0; wdata[r] = '0; waited[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      automatic int ng = 0, g = -1;
      @(negedge clk);
      // check read return for last cycle's grant
      for (int r = 0; r < NREQ; r++) begin
        checks++;
        if (rvalid[r] != (pend_r == r)) begin failures++; $display("FAIL rvalid r%0d", r); end
      end
      if (pend_r >= 0) begin
        checks++;
        if (rnext != pend_e + 1'b1) begin failures++; $display("FAIL rnext"); end
        if (known[(32'(pend_e)*7+3) % NUM_PAGES]) begin
          checks++;
          if (rdata !== model[(32'(pend_e)*7+3) % NUM_PAGES]) begin failures++; $display("FAIL rdata"); end
        end
      end
      pend_r = -1;
      for (int r = 0; r < NREQ; r++) if (drop[r]) begin req[r] = 0; drop[r] = 0; end
      // new requests for idle requesters
      for (int r = 0; r < NREQ; r++) if (!req[r] && $urandom_range(0, 2) != 0) begin
        req[r] = 1; we[r] = $urandom_range(0, 1); entry[r] = entry_t'($urandom_range(0, 20));
        for (int e = 0; e < TILE_ELEMS; e++) wdata[r][e] = elem_t'($urandom);
      end
      #1;
      for (int r = 0; r < NREQ; r++) if (gnt[r]) begin ng++; g = r; end
      checks++;
      if (ng > 1 || (ng == 0 && (req[0] || req[1] || req[2] || req[3]))) begin failures++; $display("FAIL grant not one-hot ng=%0d req=%b%b%b%b any=%b win=%0d gv=%b g=%b%b%b%b", ng, req[0],req[1],req[2],req[3], dut.any, dut.win, dut.gnt_v, gnt[0],gnt[1],gnt[2],gnt[3]); end
      if (g >= 0) begin
        automatic int p = (32'(entry[g]) * 7 + 3) % NUM_PAGES;
        checks++;
        if (buf_page != PAGE_W'(p)) begin failures++; $display("FAIL translation"); end
        if (we[g]) begin model[p] = wdata[g]; known[p] = 1; end
        else begin pend_r = g; pend_e = entry[g]; end
      end
      for (int r = 0; r < NREQ; r++) begin
        if (req[r] && !gnt[r]) waited[r]++;
        if (gnt[r]) begin
          checks++;
          if (waited[r] >= NREQ) begin failures++; $display("FAIL r%0d waited %0d grants", r, waited[r]); end
          waited[r] = 0;
          drop[r] = 1;   // the requester lowers req after the clock edge
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
