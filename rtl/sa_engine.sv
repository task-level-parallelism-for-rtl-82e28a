// sa_engine: execution unit for TRSM and GEMM tasks around one systolic array.
//
// The engine takes a task from its task buffer, reads its operand pages from
// the PL buffer, runs the systolic array and writes the result page back.
//  GEMM: acc <- C; for each of k_tiles pairs (A_k, B_k), walked along their
//        page lists: acc <- acc - A_k * B_k; C <- acc.
//  TRSM: as GEMM (the off-diagonal updates B - sum L_ik X_k, with
//        k_tiles = 0 for the first block row), followed by one triangular
//        pass with the unit lower-triangular diagonal block: C <- L^-1 acc.
// Operands are read whole-page; the engine then skews them into the array
// (row i of A delayed by i cycles, column j of B by j cycles) during a pass
// of 3*SA_N-2 cycles. Reading operands straight from the on-chip buffer and
// writing results back to it follows the published dataflow; the
// read/pass sequence, the blocked-TRSM form and the handshakes are this
// design's choices.
//
// Timing per task (no buffer contention): 2 cycles to read C, then per tile
// pair 4 read cycles + (3*SA_N-2) pass cycles, plus 2 + (3*SA_N-2) for the
// TRSM pass, 1 write cycle, and the done handshake.
module sa_engine
  import mf_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // task buffer
  input  logic   task_valid,
  input  task_t  task_in,
  output logic   task_take,
  output logic   idle,
  // completion message
  output logic   done_valid,
  input  logic   done_ready,
  output tag_t   done_tag,
  // buffer port (via buffer_arbiter)
  output logic   br_req,
  output logic   br_we,
  output entry_t br_entry,
  output tile_t  br_wdata,
  input  logic   br_gnt,
  input  logic   br_rvalid,
  input  tile_t  br_rdata,
  input  entry_t br_rnext
);

  localparam int unsigned N = SA_N;
  localparam int unsigned PASS_LEN = 3 * N - 2;
  localparam int unsigned TW = $clog2(PASS_LEN);

  typedef enum logic [3:0] {
    S_IDLE, S_RD_C, S_WT_C, S_RD_A, S_WT_A, S_RD_B, S_WT_B,
    S_PASS, S_RD_L, S_WT_L, S_WR, S_DONE
  } state_e;

  state_e          state_q;
  task_t           t_q;
  tile_t           a_q, b_q;
  entry_t          cur_a_q, cur_b_q;
  logic [KT_W-1:0] kleft_q;
  logic [TW-1:0]   t_cnt_q;
  logic            trsm_pass_q;

  logic            arr_en, arr_load;
  elem_t [N-1:0]   west, north;
  logic  [N-1:0]   ctrl;
  tile_t           acc;

  systolic_array #(.N(N)) u_array (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (arr_en),
    .acc_load(arr_load),
    .acc_in  (br_rdata),
    .west_in (west),
    .north_in(north),
    .ctrl_in (ctrl),
    .acc_out (acc)
  );

  assign idle       = (state_q == S_IDLE);
  assign task_take  = idle && task_valid;
  assign done_valid = (state_q == S_DONE);
  assign done_tag   = t_q.tag;
  assign arr_en     = (state_q == S_PASS);
  assign arr_load   = (state_q == S_WT_C) && br_rvalid;

  always_comb begin
    br_req   = 1'b0;
    br_we    = 1'b0;
    br_entry = t_q.c_head;
    br_wdata = acc;
    unique case (state_q)
      S_RD_C: br_req = 1'b1;
      S_RD_A: begin br_req = 1'b1; br_entry = cur_a_q; end
      S_RD_B: begin br_req = 1'b1; br_entry = cur_b_q; end
      S_RD_L: begin br_req = 1'b1; br_entry = t_q.l_page; end
      S_WR:   begin br_req = 1'b1; br_we = 1'b1; end
      default: ;
    endcase
  end

  // Input skew: element k of row i enters at pass cycle i+k, element k of
  // column j at pass cycle k+j. In the triangular pass the west operand is
  // the strictly lower part of L, the north input is zero and column j gets
  // its control token at pass cycle j.
  for (genvar i = 0; i < N; i++) begin : g_west
    // k = t - i selects element k of row i
    logic [TW:0] k;
    assign k       = {1'b0, t_cnt_q} - (TW+1)'(i);
    assign west[i] = (t_cnt_q >= TW'(i) && k < (TW+1)'(N) && (!trsm_pass_q || k < (TW+1)'(i)))
                     ? a_q[i*N + int'(k[$clog2(N)-1:0])] : '0;
  end
  for (genvar j = 0; j < N; j++) begin : g_north
    logic [TW:0] k;
    assign k        = {1'b0, t_cnt_q} - (TW+1)'(j);
    assign north[j] = (t_cnt_q >= TW'(j) && k < (TW+1)'(N) && !trsm_pass_q)
                      ? b_q[int'(k[$clog2(N)-1:0])*N + j] : '0;
    assign ctrl[j]  = trsm_pass_q && (t_cnt_q == TW'(j));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      t_q         <= '0;
      a_q         <= '0;
      b_q         <= '0;
      cur_a_q     <= '0;
      cur_b_q     <= '0;
      kleft_q     <= '0;
      t_cnt_q     <= '0;
      trsm_pass_q <= 1'b0;
    end else begin
      unique case (state_q)
        S_IDLE: if (task_valid) begin
          t_q         <= task_in;
          cur_a_q     <= task_in.a_head;
          cur_b_q     <= task_in.b_head;
          kleft_q     <= task_in.k_tiles;
          trsm_pass_q <= 1'b0;
          state_q     <= S_RD_C;
        end
        S_RD_C: if (br_gnt) state_q <= S_WT_C;
        S_WT_C: if (br_rvalid) begin
          if (kleft_q != '0)             state_q <= S_RD_A;
          else if (t_q.op == OP_TRSM)    state_q <= S_RD_L;
          else                           state_q <= S_WR;
        end
        S_RD_A: if (br_gnt) state_q <= S_WT_A;
        S_WT_A: if (br_rvalid) begin
          a_q     <= br_rdata;
          cur_a_q <= br_rnext;
          state_q <= S_RD_B;
        end
        S_RD_B: if (br_gnt) state_q <= S_WT_B;
        S_WT_B: if (br_rvalid) begin
          b_q     <= br_rdata;
          cur_b_q <= br_rnext;
          t_cnt_q <= '0;
          state_q <= S_PASS;
        end
        S_PASS: begin
          if (t_cnt_q == TW'(PASS_LEN - 1)) begin
            t_cnt_q <= '0;
            if (trsm_pass_q) begin
              state_q <= S_WR;
            end else begin
              kleft_q <= kleft_q - 1'b1;
              if (kleft_q != KT_W'(1))     state_q <= S_RD_A;
              else if (t_q.op == OP_TRSM)  state_q <= S_RD_L;
              else                         state_q <= S_WR;
            end
          end else begin
            t_cnt_q <= t_cnt_q + 1'b1;
          end
        end
        S_RD_L: if (br_gnt) state_q <= S_WT_L;
        S_WT_L: if (br_rvalid) begin
          a_q         <= br_rdata;
          trsm_pass_q <= 1'b1;
          t_cnt_q     <= '0;
          state_q     <= S_PASS;
        end
        S_WR:   if (br_gnt) state_q <= S_DONE;
        S_DONE: if (done_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
