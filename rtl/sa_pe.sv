// sa_pe: one processing element of the TRSM/GEMM systolic array.
//
// The PE keeps an output-stationary accumulator. Each enabled cycle it
// computes acc <= acc - west_in * north_in, forwards west_in to the east and
// sends one value south. A MUX chooses what goes south: the operand that came
// from the north (classical GEMM pattern) or the PE's own accumulator (TRSM
// pattern, where each row passes its finished result to the rows below). The
// MUX is steered by a control bit that travels down the column beside the
// data. The multiplier, subtractor, accumulator, MUX and the separate control
// path follow the published PE; the control path here has two register
// stages per PE so that a single token launched at the top of a column
// reaches row i exactly when that row's result is final. That delay, the
// integer arithmetic and the parallel accumulator load are this design's
// choices.
//
// Timing: all outputs are registered; a value presented on west_in/north_in
// in cycle t appears on east_out/south_out in cycle t+1, ctrl_in appears on
// ctrl_out in cycle t+2. acc_load (priority over en) loads acc and clears the
// pipeline registers.
module sa_pe
  import mf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,        // advance one step
  input  logic  acc_load,  // load acc_in, clear pipeline registers
  input  elem_t acc_in,
  input  elem_t west_in,
  input  elem_t north_in,
  input  logic  ctrl_in,   // 1: send acc south instead of north_in
  output elem_t east_out,
  output elem_t south_out,
  output logic  ctrl_out,
  output elem_t acc_out
);

  elem_t acc_q, a_q, b_q;
  logic  c1_q, c2_q;
  elem_t prod, diff, south_d;

  always_comb begin
    prod    = elem_t'(west_in * north_in);
    diff    = acc_q - prod;
    south_d = ctrl_in ? acc_q : north_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q <= '0;
      a_q   <= '0;
      b_q   <= '0;
      c1_q  <= 1'b0;
      c2_q  <= 1'b0;
    end else if (acc_load) begin
      acc_q <= acc_in;
      a_q   <= '0;
      b_q   <= '0;
      c1_q  <= 1'b0;
      c2_q  <= 1'b0;
    end else if (en) begin
      acc_q <= diff;
      a_q   <= west_in;
      b_q   <= south_d;
      c1_q  <= ctrl_in;
      c2_q  <= c1_q;
    end
  end

  assign east_out  = a_q;
  assign south_out = b_q;
  assign ctrl_out  = c2_q;
  assign acc_out   = acc_q;

endmodule
