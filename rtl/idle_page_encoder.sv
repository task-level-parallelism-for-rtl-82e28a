// idle_page_encoder: the hardware encoder that picks an idle page.
//
// A purely combinational priority encoder: out of a vector with one bit per
// page (1 = idle) it returns the lowest-numbered idle page and whether any
// page is idle at all. Selecting idle pages with an encoder in hardware, in
// the same cycle as the request, follows the published buffer management;
// "lowest index wins" is this design's choice.
module idle_page_encoder #(
  parameter int unsigned N = 256,
  parameter int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] idle,
  output logic         found,
  output logic [W-1:0] index
);

  always_comb begin
    found = 1'b0;
    index = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (idle[i]) begin
        found = 1'b1;
        index = W'(i);
      end
    end
  end

endmodule
