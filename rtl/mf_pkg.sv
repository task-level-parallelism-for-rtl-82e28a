// mf_pkg: sizes and types shared by the programmable-logic side of the
// multifrontal accelerator.
//
// Matrices live in the on-chip buffer as linked lists of pages. One page holds
// one SA_N x SA_N tile, stored row-major (element r*SA_N+c), so a systolic
// array pass and an extend-add task each work on whole pages. The 8x8 array
// size, the 16 additions per cycle of the Extend Add module and the unit
// counts of the main configuration (8 systolic arrays, 7 Extend Add modules,
// one buffer manager) follow the published design. The element format, the
// page size (one tile), the number of pages and the task descriptor layout
// are this design's own choices.
package mf_pkg;

  // Systolic array edge (8x8 array).
  localparam int unsigned SA_N = 8;
  // Element width. Elements are two's-complement integers in this RTL.
  localparam int unsigned DATA_W = 32;
  // Elements per page (one tile).
  localparam int unsigned TILE_ELEMS = SA_N * SA_N;
  // Extend Add lanes: additions per cycle.
  localparam int unsigned EA_LANES = 16;
  // Pages in the PL buffer and page-table entries.
  localparam int unsigned NUM_PAGES = 256;
  localparam int unsigned PAGE_W = $clog2(NUM_PAGES);
  // Width of a page's first word address (page number * TILE_ELEMS).
  localparam int unsigned PADDR_W = PAGE_W + $clog2(TILE_ELEMS);
  localparam int unsigned TAG_W = 8;
  localparam int unsigned KT_W = 8;

  typedef logic signed [DATA_W-1:0] elem_t;
  typedef elem_t [TILE_ELEMS-1:0] tile_t;
  typedef logic [PAGE_W-1:0] entry_t;   // page-table entry index (matrix handle)
  typedef logic [PADDR_W-1:0] paddr_t;  // first word address of a page
  typedef logic [TAG_W-1:0] tag_t;

  // Page-table entry: Status bit, Page Address, Next Entry.
  // A list ends at an entry whose Next Entry points to itself.
  typedef struct packed {
    logic   status;   // 1: page in use
    paddr_t page_addr;
    entry_t next;
  } pte_t;

  typedef enum logic [1:0] {
    OP_GEMM = 2'd0,   // C = C - sum_k A_k * B_k
    OP_TRSM = 2'd1,   // X = L^-1 (B - sum_k A_k * X_k)
    OP_EA   = 2'd2    // frontal tile += scattered contribution tile
  } op_e;

  // Index map entry for extend-add: valid bit and destination row/column.
  typedef struct packed {
    logic                    v;
    logic [$clog2(SA_N)-1:0] idx;
  } map_t;

  // Task descriptor handed to an execution unit.
  //  GEMM/TRSM: c_head = accumulated/result tile, a_head/b_head = lists of
  //             k_tiles operand tiles, l_page = unit lower-triangular diagonal
  //             block (TRSM only).
  //  EA:        c_head = frontal tile, a_head = contribution tile,
  //             row_map/col_map place contribution rows/columns in the frontal tile.
  typedef struct packed {
    op_e                 op;
    tag_t                tag;
    entry_t              c_head;
    entry_t              a_head;
    entry_t              b_head;
    entry_t              l_page;
    logic [KT_W-1:0]     k_tiles;
    map_t [SA_N-1:0]     row_map;
    map_t [SA_N-1:0]     col_map;
  } task_t;

endpackage
