// buffer_arbiter: shares the PL buffer among its users.
//
// NREQ requesters (the host/DMA side, the systolic-array engines and the
// Extend Add units) each raise req with a page-table entry, a write flag and,
// for writes, a tile. A round-robin arbiter grants one request per cycle
// (gnt is combinational; a requester holds its request until granted). The
// granted entry is translated through the page table into a page address
// and the buffer is accessed. For a read, rvalid rises for the granted
// requester one cycle later together with the tile and the entry's Next
// Entry, so a unit can walk a linked list of pages read by read. The sharing
// of one buffer by all units follows the published architecture; the
// arbitration scheme is this design's choice.
module buffer_arbiter
  import mf_pkg::*;
#(
  parameter int unsigned NREQ = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req    [NREQ],
  input  logic   we     [NREQ],
  input  entry_t entry  [NREQ],
  input  tile_t  wdata  [NREQ],
  output logic   gnt    [NREQ],
  output logic   rvalid [NREQ],
  output tile_t  rdata,
  output entry_t rnext,
  // page-table lookup
  output entry_t lk_entry,
  input  pte_t   lk_pte,
  // buffer port
  output logic               buf_en,
  output logic               buf_we,
  output logic [PAGE_W-1:0]  buf_page,
  output tile_t              buf_wdata,
  input  tile_t              buf_rdata
);

  localparam int unsigned IW = (NREQ > 1) ? $clog2(NREQ) : 1;

  logic [NREQ-1:0] req_v, gnt_v;
  logic            any;
  logic [IW-1:0]   win;
  logic [NREQ-1:0] rd_q;
  entry_t          next_q;

  always_comb begin
    for (int i = 0; i < NREQ; i++) req_v[i] = req[i];
  end

  rr_arbiter #(.N(NREQ), .W(IW)) u_rr (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (req_v),
    .advance(1'b1),
    .valid  (any),
    .idx    (win),
    .gnt    (gnt_v)
  );

  always_comb begin
    for (int i = 0; i < NREQ; i++) gnt[i] = gnt_v[i];
  end
  assign lk_entry  = entry[win];
  assign buf_en    = any;
  assign buf_we    = we[win];
  assign buf_page  = lk_pte.page_addr[PADDR_W-1 -: PAGE_W];
  assign buf_wdata = wdata[win];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q   <= '0;
      next_q <= '0;
    end else begin
      rd_q   <= (any && !we[win]) ? gnt_v : '0;
      next_q <= lk_pte.next;
    end
  end

  always_comb begin
    for (int i = 0; i < NREQ; i++) rvalid[i] = rd_q[i];
  end
  assign rdata = buf_rdata;
  assign rnext = next_q;

  // Only pages that are in use may be accessed.
  assert property (@(posedge clk) disable iff (!rst_n) any |-> lk_pte.status)
    else $error("buffer_arbiter: access to an idle page");

endmodule
