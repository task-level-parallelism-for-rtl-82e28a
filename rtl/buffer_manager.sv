// buffer_manager: page-table based management of the PL buffer.
//
// Every matrix in the buffer is a linked list of pages. The page table has
// one entry per page with three fields: a Status bit (page in use), the Page
// Address (first word of the page in the buffer) and the Next Entry of the
// list. An entry whose Next Entry points to itself ends its list. Idle pages
// are picked by a hardware priority encoder over the Status bits, so an
// allocation is answered in the same cycle it is requested. This structure
// follows the published scheme; the interface below, the self-pointer as end
// of list, the one-entry-per-cycle freeing walk and the reset state (all
// pages idle, entry i mapped to page i) are this design's choices.
//
// Interface
//  alloc:  alloc_valid/alloc_ready handshake. alloc_entry is the page that is
//          handed out when both are high. With alloc_link set, the new page
//          is appended after entry alloc_prev (which must be the end of a
//          list); otherwise it starts a new list.
//  free:   free_valid/free_ready handshake with the head of a list; the
//          manager then walks the list, clearing one Status bit per cycle,
//          and free_ready stays low until it has reached the end.
//  lookup: NLOOK combinational read ports returning a whole entry.
module buffer_manager
  import mf_pkg::*;
#(
  parameter int unsigned NLOOK = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  // allocation
  input  logic   alloc_valid,
  input  logic   alloc_link,
  input  entry_t alloc_prev,
  output logic   alloc_ready,
  output entry_t alloc_entry,
  // freeing a whole list
  input  logic   free_valid,
  input  entry_t free_head,
  output logic   free_ready,
  // lookup
  input  entry_t lk_entry [NLOOK],
  output pte_t   lk_pte   [NLOOK],
  // status
  output logic [PAGE_W:0] free_count
);

  pte_t pt_q [NUM_PAGES];
  logic [NUM_PAGES-1:0] idle;
  logic   found;
  entry_t pick;
  logic   walking_q;
  entry_t walk_q;
  logic   do_alloc;

  always_comb begin
    for (int i = 0; i < NUM_PAGES; i++) idle[i] = ~pt_q[i].status;
  end

  idle_page_encoder #(.N(NUM_PAGES), .W(PAGE_W)) u_enc (
    .idle (idle),
    .found(found),
    .index(pick)
  );

  assign alloc_ready = found;
  assign alloc_entry = pick;
  assign do_alloc    = alloc_valid && found;
  assign free_ready  = !walking_q;

  always_comb begin
    free_count = '0;
    for (int i = 0; i < NUM_PAGES; i++) free_count += (PAGE_W+1)'(idle[i]);
  end

  for (genvar p = 0; p < NLOOK; p++) begin : g_lk
    assign lk_pte[p] = pt_q[lk_entry[p]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_PAGES; i++) begin
        pt_q[i].status    <= 1'b0;
        pt_q[i].page_addr <= paddr_t'(i * TILE_ELEMS);
        pt_q[i].next      <= entry_t'(i);
      end
      walking_q <= 1'b0;
      walk_q    <= '0;
    end else begin
      // free walk: one entry per cycle
      if (walking_q) begin
        pt_q[walk_q].status <= 1'b0;
        if (pt_q[walk_q].next == walk_q) walking_q <= 1'b0;
        else                             walk_q    <= pt_q[walk_q].next;
      end else if (free_valid) begin
        walking_q <= 1'b1;
        walk_q    <= free_head;
      end
      // allocation
      if (do_alloc) begin
        pt_q[pick].status <= 1'b1;
        pt_q[pick].next   <= pick;
        if (alloc_link) pt_q[alloc_prev].next <= pick;
      end
    end
  end

  // A page is appended only after the last entry of a list that is in use.
  assert property (@(posedge clk) disable iff (!rst_n)
    (do_alloc && alloc_link) |-> (pt_q[alloc_prev].status && pt_q[alloc_prev].next == alloc_prev))
    else $error("buffer_manager: append after an entry that is not the end of a live list");

endmodule
