// rr_arbiter: round-robin arbiter.
//
// Grants one of N requests combinationally. The search starts just after the
// requester granted last (two priority encoders: one over the requests above
// the last winner, one over all requests), so every requester that keeps its request up is
// served within N grants. The pointer moves only when `advance` is high in a
// cycle with a grant (the grant was used).
module rr_arbiter #(
  parameter int unsigned N = 4,
  parameter int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic         valid,
  output logic [W-1:0] idx,
  output logic [N-1:0] gnt
);

  logic [W-1:0] last_q;

  // Requests above the last winner take precedence; if there are none, the
  // lowest request overall wins.
  logic [N-1:0] upper;
  logic         up_any, lo_any;
  logic [W-1:0] up_idx, lo_idx;

  always_comb begin
    for (int i = 0; i < N; i++) upper[i] = req[i] && (i > int'(last_q));
  end

  idle_page_encoder #(.N(N), .W(W)) u_up (.idle(upper), .found(up_any), .index(up_idx));
  idle_page_encoder #(.N(N), .W(W)) u_lo (.idle(req),   .found(lo_any), .index(lo_idx));

  always_comb begin
    valid = up_any || lo_any;
    idx   = up_any ? up_idx : lo_idx;
    gnt   = '0;
    if (valid) gnt[idx] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                last_q <= W'(N - 1);
    else if (valid && advance) last_q <= idx;
  end

endmodule
