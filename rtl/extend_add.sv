// extend_add: the Extend Add module (assembly of the frontal matrix).
//
// An extend-add task adds one contribution tile into one frontal tile. Row r
// and column c of the contribution tile land at row row_map[r].idx and
// column col_map[c].idx of the frontal tile; rows or columns whose map entry
// is not valid belong to another frontal tile and are skipped (the
// controller splits a contribution matrix into such tile pairs). The unit
// reads the frontal tile (which starts as the original matrix) and the
// contribution tile from the PL buffer, then performs EA_LANES = 16
// additions per cycle, two contribution rows per beat, and writes the
// frontal tile back. The 16 additions per cycle follow the published
// module; the tile-pair task form and the index-map encoding are this
// design's choices.
//
// Timing per task (no buffer contention): 2 cycles per read, then
// TILE_ELEMS/EA_LANES = 4 add beats, 1 write cycle, then the done handshake.
module extend_add
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
  input  entry_t br_rnext,
  // one pulse per beat of EA_LANES additions
  output logic   add_beat
);

  localparam int unsigned N     = SA_N;
  localparam int unsigned BEATS = TILE_ELEMS / EA_LANES;
  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1;

  typedef enum logic [2:0] {S_IDLE, S_RD_F, S_WT_F, S_RD_C, S_WT_C, S_ADD, S_WR, S_DONE} state_e;

  state_e        state_q;
  task_t         t_q;
  tile_t         f_q, c_q;
  logic [BW-1:0] beat_q;

  // lane datapath: destination index, enable and sum per lane
  logic [$clog2(TILE_ELEMS)-1:0] dst  [EA_LANES];
  logic                          lane_en [EA_LANES];
  elem_t                         sum  [EA_LANES];

  // lane l of beat b handles contribution element b*EA_LANES + l
  for (genvar l = 0; l < EA_LANES; l++) begin : g_lane
    logic [$clog2(TILE_ELEMS)-1:0] e;
    logic [$clog2(N)-1:0]          r, c;
    assign e          = ($clog2(TILE_ELEMS))'(beat_q) * ($clog2(TILE_ELEMS))'(EA_LANES) + ($clog2(TILE_ELEMS))'(l);
    assign r          = e[$clog2(TILE_ELEMS)-1 -: $clog2(N)];
    assign c          = e[$clog2(N)-1:0];
    assign lane_en[l] = t_q.row_map[r].v && t_q.col_map[c].v;
    assign dst[l]     = {t_q.row_map[r].idx, t_q.col_map[c].idx};
    assign sum[l]     = f_q[dst[l]] + c_q[e];
  end

  assign idle       = (state_q == S_IDLE);
  assign task_take  = idle && task_valid;
  assign done_valid = (state_q == S_DONE);
  assign done_tag   = t_q.tag;
  assign add_beat   = (state_q == S_ADD);

  always_comb begin
    br_req   = 1'b0;
    br_we    = 1'b0;
    br_entry = t_q.c_head;
    br_wdata = f_q;
    unique case (state_q)
      S_RD_F: br_req = 1'b1;
      S_RD_C: begin br_req = 1'b1; br_entry = t_q.a_head; end
      S_WR:   begin br_req = 1'b1; br_we = 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      t_q     <= '0;
      f_q     <= '0;
      c_q     <= '0;
      beat_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (task_valid) begin
          t_q     <= task_in;
          state_q <= S_RD_F;
        end
        S_RD_F: if (br_gnt) state_q <= S_WT_F;
        S_WT_F: if (br_rvalid) begin f_q <= br_rdata; state_q <= S_RD_C; end
        S_RD_C: if (br_gnt) state_q <= S_WT_C;
        S_WT_C: if (br_rvalid) begin
          c_q     <= br_rdata;
          beat_q  <= '0;
          state_q <= S_ADD;
        end
        S_ADD: begin
          for (int l = 0; l < EA_LANES; l++)
            if (lane_en[l]) f_q[dst[l]] <= sum[l];
          beat_q <= beat_q + 1'b1;
          if (beat_q == BW'(BEATS - 1)) state_q <= S_WR;
        end
        S_WR:   if (br_gnt) state_q <= S_DONE;
        S_DONE: if (done_ready) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The index maps must be one-to-one, or two lanes would hit one element.
  always_ff @(posedge clk) begin
    if (rst_n && state_q == S_ADD) begin
      for (int a = 0; a < N; a++)
        for (int b = a + 1; b < N; b++) begin
          assert (!(t_q.row_map[a].v && t_q.row_map[b].v && t_q.row_map[a].idx == t_q.row_map[b].idx))
            else $error("extend_add: row map not one-to-one");
          assert (!(t_q.col_map[a].v && t_q.col_map[b].v && t_q.col_map[a].idx == t_q.col_map[b].idx))
            else $error("extend_add: column map not one-to-one");
        end
    end
  end

endmodule
