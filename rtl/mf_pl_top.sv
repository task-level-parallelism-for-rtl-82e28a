// mf_pl_top: programmable-logic side of the CPU-FPGA multifrontal solver.
//
// The processing system (ARM cores, memory controller, DMA) runs the task
// controller and the PANEL tasks; this block accelerates the rest. It holds
// NUM_SA execution units built around 8x8 TRSM/GEMM systolic arrays, NUM_EA
// Extend Add units, the page-table buffer manager and the on-chip PL buffer
// that holds every frontal, original and contribution matrix as linked lists
// of one-tile pages. Defaults are the main published configuration
// (8 systolic arrays, 7 Extend Add modules, one buffer manager). The second
// published configuration, with extend-add done on the processor, is
// NUM_SA = 9, NUM_EA = 0: no Extend Add unit or FIFO is built and EA tasks
// are refused (sub_ready stays low for them).
//
// Host side (driven by the processing system over AXI and by the DMA, which
// are outside this block; here they are plain ports):
//  alloc_*/free_*: allocate pages (optionally appended to a list) and free
//                  whole lists in the page table.
//  hb_*:           host buffer port, used by the DRAM Read/Write (DMA)
//                  tasks and by PANEL: whole-tile reads and writes by
//                  page-table entry, with the Next Entry of each read page.
//  sub_*:          task submission. GEMM/TRSM go to the Ready Task FIFO for
//                  TRSM & GEMM, EA tasks to a second FIFO for the Extend Add
//                  units. With sub_imm set, the task is an Immediate
//                  Successor and goes straight to the task buffer of unit
//                  sub_unit (systolic units 0..NUM_SA-1, Extend Add units
//                  NUM_SA..NUM_SA+NUM_EA-1).
//  done_*:         completion messages, one per cycle, round-robin among
//                  the units (the controller receives them serially).
// The unit mix and the buffer sharing follow the published architecture;
// the separate Extend Add FIFO and all port protocols are this design's
// choices.
module mf_pl_top
  import mf_pkg::*;
#(
  parameter int unsigned NUM_SA     = 8,
  parameter int unsigned NUM_EA     = 7,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned NU         = NUM_SA + NUM_EA,
  parameter int unsigned UW         = $clog2(NU)
) (
  input  logic   clk,
  input  logic   rst_n,
  // page allocation / freeing
  input  logic   alloc_valid,
  input  logic   alloc_link,
  input  entry_t alloc_prev,
  output logic   alloc_ready,
  output entry_t alloc_entry,
  input  logic   free_valid,
  input  entry_t free_head,
  output logic   free_ready,
  output logic [PAGE_W:0] free_count,
  // host buffer port
  input  logic   hb_req,
  input  logic   hb_we,
  input  entry_t hb_entry,
  input  tile_t  hb_wdata,
  output logic   hb_gnt,
  output logic   hb_rvalid,
  output tile_t  hb_rdata,
  output entry_t hb_rnext,
  // task submission
  input  logic          sub_valid,
  output logic          sub_ready,
  input  task_t         sub_task,
  input  logic          sub_imm,
  input  logic [UW-1:0] sub_unit,
  // completion messages
  output logic          done_valid,
  input  logic          done_ready,
  output logic [UW-1:0] done_unit,
  output tag_t          done_tag
);

  localparam int unsigned NREQ = NU + 1;  // requester 0 is the host
  localparam int unsigned SW = (NUM_SA > 1) ? $clog2(NUM_SA) : 1;
  localparam int unsigned EW = (NUM_EA > 1) ? $clog2(NUM_EA) : 1;
  // array size for the Extend Add side; with NUM_EA = 0 nothing of it is built
  localparam int unsigned EA_N = (NUM_EA > 0) ? NUM_EA : 1;

  // ---------------- buffer, page table, arbitration ----------------
  logic   rq_req [NREQ], rq_we [NREQ], rq_gnt [NREQ], rq_rvalid [NREQ];
  entry_t rq_entry [NREQ];
  tile_t  rq_wdata [NREQ];
  tile_t  rdata;
  entry_t rnext;
  entry_t lk_entry [1];
  pte_t   lk_pte   [1];
  logic              buf_en, buf_we;
  logic [PAGE_W-1:0] buf_page;
  tile_t             buf_wdata, buf_rdata;

  buffer_manager #(.NLOOK(1)) u_bm (
    .clk        (clk),
    .rst_n      (rst_n),
    .alloc_valid(alloc_valid),
    .alloc_link (alloc_link),
    .alloc_prev (alloc_prev),
    .alloc_ready(alloc_ready),
    .alloc_entry(alloc_entry),
    .free_valid (free_valid),
    .free_head  (free_head),
    .free_ready (free_ready),
    .lk_entry   (lk_entry),
    .lk_pte     (lk_pte),
    .free_count (free_count)
  );

  buffer_arbiter #(.NREQ(NREQ)) u_arb (
    .clk      (clk),
    .rst_n    (rst_n),
    .req      (rq_req),
    .we       (rq_we),
    .entry    (rq_entry),
    .wdata    (rq_wdata),
    .gnt      (rq_gnt),
    .rvalid   (rq_rvalid),
    .rdata    (rdata),
    .rnext    (rnext),
    .lk_entry (lk_entry[0]),
    .lk_pte   (lk_pte[0]),
    .buf_en   (buf_en),
    .buf_we   (buf_we),
    .buf_page (buf_page),
    .buf_wdata(buf_wdata),
    .buf_rdata(buf_rdata)
  );

  pl_buffer u_buf (
    .clk  (clk),
    .en   (buf_en),
    .we   (buf_we),
    .page (buf_page),
    .wdata(buf_wdata),
    .rdata(buf_rdata)
  );

  assign rq_req[0]   = hb_req;
  assign rq_we[0]    = hb_we;
  assign rq_entry[0] = hb_entry;
  assign rq_wdata[0] = hb_wdata;
  assign hb_gnt      = rq_gnt[0];
  assign hb_rvalid   = rq_rvalid[0];
  assign hb_rdata    = rdata;
  assign hb_rnext    = rnext;

  // ---------------- task routing ----------------
  logic to_ea;
  logic sa_sub_v, sa_sub_r, sa_imm_v, sa_imm_r;
  logic ea_sub_v, ea_sub_r, ea_imm_v, ea_imm_r;
  logic [SW-1:0] sa_unit;
  logic [EW-1:0] ea_unit;

  assign to_ea    = (sub_task.op == OP_EA);
  assign sa_sub_v = sub_valid && !sub_imm && !to_ea;
  assign ea_sub_v = sub_valid && !sub_imm &&  to_ea;
  assign sa_imm_v = sub_valid &&  sub_imm && !to_ea;
  assign ea_imm_v = sub_valid &&  sub_imm &&  to_ea;
  assign sa_unit  = SW'(sub_unit);
  assign ea_unit  = EW'(32'(sub_unit) - NUM_SA);
  always_comb begin
    if (sub_imm) sub_ready = to_ea ? ea_imm_r : sa_imm_r;
    else         sub_ready = to_ea ? ea_sub_r : sa_sub_r;
  end

  // unit-side signals, systolic units first
  logic  u_idle [NU], u_tv [NU], u_take [NU], u_done [NU], u_dack [NU];
  task_t u_task [NU];
  tag_t  u_tag  [NU];
  logic  sa_idle [NUM_SA], sa_tv [NUM_SA], sa_take [NUM_SA];
  task_t sa_task [NUM_SA];
  logic  ea_idle [EA_N], ea_tv [EA_N], ea_take [EA_N];
  task_t ea_task [EA_N];
  logic [$clog2(FIFO_DEPTH+1)-1:0] sa_fifo_count, ea_fifo_count;

  for (genvar u = 0; u < NUM_SA; u++) begin : g_sa_map
    assign sa_idle[u] = u_idle[u];
    assign u_tv[u]    = sa_tv[u];
    assign u_task[u]  = sa_task[u];
    assign sa_take[u] = u_take[u];
  end
  for (genvar u = 0; u < NUM_EA; u++) begin : g_ea_map
    assign ea_idle[u]       = u_idle[NUM_SA+u];
    assign u_tv[NUM_SA+u]   = ea_tv[u];
    assign u_task[NUM_SA+u] = ea_task[u];
    assign ea_take[u]       = u_take[NUM_SA+u];
  end

  task_dispatcher #(.NU(NUM_SA), .FIFO_DEPTH(FIFO_DEPTH), .UW(SW)) u_sa_disp (
    .clk            (clk),
    .rst_n          (rst_n),
    .sub_valid      (sa_sub_v),
    .sub_ready      (sa_sub_r),
    .sub_task       (sub_task),
    .imm_valid      (sa_imm_v),
    .imm_ready      (sa_imm_r),
    .imm_unit       (sa_unit),
    .imm_task       (sub_task),
    .unit_idle      (sa_idle),
    .unit_task_valid(sa_tv),
    .unit_task      (sa_task),
    .unit_take      (sa_take),
    .fifo_count     (sa_fifo_count)
  );

  if (NUM_EA > 0) begin : g_ea_disp
    task_dispatcher #(.NU(NUM_EA), .FIFO_DEPTH(FIFO_DEPTH), .UW(EW)) u_ea_disp (
      .clk            (clk),
      .rst_n          (rst_n),
      .sub_valid      (ea_sub_v),
      .sub_ready      (ea_sub_r),
      .sub_task       (sub_task),
      .imm_valid      (ea_imm_v),
      .imm_ready      (ea_imm_r),
      .imm_unit       (ea_unit),
      .imm_task       (sub_task),
      .unit_idle      (ea_idle),
      .unit_task_valid(ea_tv),
      .unit_task      (ea_task),
      .unit_take      (ea_take),
      .fifo_count     (ea_fifo_count)
    );
  end else begin : g_no_ea
    // Extend-add runs on the processor in this configuration: EA tasks are
    // not accepted.
    assign ea_sub_r      = 1'b0;
    assign ea_imm_r      = 1'b0;
    assign ea_fifo_count = '0;
    for (genvar u = 0; u < EA_N; u++) begin : g_tie
      assign ea_tv[u]   = 1'b0;
      assign ea_task[u] = '0;
    end
  end

  // ---------------- execution units ----------------
  for (genvar u = 0; u < NUM_SA; u++) begin : g_sa
    sa_engine u_eng (
      .clk       (clk),
      .rst_n     (rst_n),
      .task_valid(u_tv[u]),
      .task_in   (u_task[u]),
      .task_take (u_take[u]),
      .idle      (u_idle[u]),
      .done_valid(u_done[u]),
      .done_ready(u_dack[u]),
      .done_tag  (u_tag[u]),
      .br_req    (rq_req[1+u]),
      .br_we     (rq_we[1+u]),
      .br_entry  (rq_entry[1+u]),
      .br_wdata  (rq_wdata[1+u]),
      .br_gnt    (rq_gnt[1+u]),
      .br_rvalid (rq_rvalid[1+u]),
      .br_rdata  (rdata),
      .br_rnext  (rnext)
    );
  end

  for (genvar u = 0; u < NUM_EA; u++) begin : g_ea
    extend_add u_ea (
      .clk       (clk),
      .rst_n     (rst_n),
      .task_valid(u_tv[NUM_SA+u]),
      .task_in   (u_task[NUM_SA+u]),
      .task_take (u_take[NUM_SA+u]),
      .idle      (u_idle[NUM_SA+u]),
      .done_valid(u_done[NUM_SA+u]),
      .done_ready(u_dack[NUM_SA+u]),
      .done_tag  (u_tag[NUM_SA+u]),
      .br_req    (rq_req[1+NUM_SA+u]),
      .br_we     (rq_we[1+NUM_SA+u]),
      .br_entry  (rq_entry[1+NUM_SA+u]),
      .br_wdata  (rq_wdata[1+NUM_SA+u]),
      .br_gnt    (rq_gnt[1+NUM_SA+u]),
      .br_rvalid (rq_rvalid[1+NUM_SA+u]),
      .br_rdata  (rdata),
      .br_rnext  (rnext),
      .add_beat  ()
    );
  end

  // ---------------- completion messages ----------------
  logic [NU-1:0] done_v;
  logic [NU-1:0] done_g;

  always_comb begin
    for (int u = 0; u < NU; u++) done_v[u] = u_done[u];
  end

  rr_arbiter #(.N(NU), .W(UW)) u_done_arb (
    .clk    (clk),
    .rst_n  (rst_n),
    .req    (done_v),
    .advance(done_ready),
    .valid  (done_valid),
    .idx    (done_unit),
    .gnt    (done_g)
  );

  assign done_tag = u_tag[done_unit];
  always_comb begin
    for (int u = 0; u < NU; u++) u_dack[u] = done_g[u] && done_ready;
  end

endmodule
