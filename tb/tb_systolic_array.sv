// tb_systolic_array: GEMM and TRSM on the 8x8 array against a software model.
// The testbench skews the operands itself: row i of A enters i cycles late,
// column j of B j cycles late; for TRSM the strictly lower part of a unit
// lower-triangular L goes in from the west and column j gets its control
// token in pass cycle j. A pass must be complete after 3N-2 cycles.
module tb_systolic_array;
  import mf_pkg::*;
  localparam int N = SA_N;
  logic clk = 0, rst_n = 0, en = 0, acc_load = 0;
  elem_t [N*N-1:0] acc_in, acc_out;
  elem_t [N-1:0] west_in, north_in;
  logic [N-1:0] ctrl_in;
  int checks = 0, failures = 0;

  systolic_array #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  elem_t A [N][N], B [N][N], C [N][N], R [N][N];

  task automatic run_pass(input bit trsm);
    for (int t = 0; t < 3*N-2; t++) begin
      for (int i = 0; i < N; i++) begin
        int k = t - i;
        west_in[i] = (k >= 0 && k < N && (!trsm || k < i)) ? A[i][k] : '0;
      end
      for (int j = 0; j < N; j++) begin
        int k = t - j;
        north_in[j] = (!trsm && k >= 0 && k < N) ? B[k][j] : '0;
        ctrl_in[j]  = trsm && (t == j);
      end
      en = 1;
      @(negedge clk);
    end
    en = 0; west_in = '0; north_in = '0; ctrl_in = '0;
  endtask

  task automatic load(input elem_t M [N][N]);
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) acc_in[i*N+j] = M[i][j];
    acc_load = 1;
    @(negedge clk);
    acc_load = 0;
  endtask

  task automatic compare(input string what);
    int bad = 0;
    for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
      checks++;
      if (acc_out[i*N+j] !== R[i][j]) begin
        failures++; bad++;
        if (bad < 4) $display("FAIL %s [%0d][%0d] got %0d exp %0d", what, i, j, acc_out[i*N+j], R[i][j]);
      end
    end
  endtask

  initial begin
    west_in = '0; north_in = '0; ctrl_in = '0; acc_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int rep = 0; rep < 4; rep++) begin
      // GEMM: R = C - A*B
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        A[i][j] = elem_t'($urandom_range(0, 40)) - 20;
        B[i][j] = elem_t'($urandom_range(0, 40)) - 20;
        C[i][j] = elem_t'($urandom_range(0, 4000)) - 2000;
      end
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        R[i][j] = C[i][j];
        for (int k = 0; k < N; k++) R[i][j] -= A[i][k] * B[k][j];
      end
      load(C);
      run_pass(0);
      compare("gemm");
      // second GEMM pass accumulates on top (K = 2N)
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        A[i][j] = elem_t'($urandom_range(0, 40)) - 20;
        B[i][j] = elem_t'($urandom_range(0, 40)) - 20;
      end
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
        for (int k = 0; k < N; k++) R[i][j] -= A[i][k] * B[k][j];
      run_pass(0);
      compare("gemm k=2N");
      // TRSM: X = L^-1 C, L unit lower triangular (A holds L)
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++)
        A[i][j] = (j < i) ? elem_t'($urandom_range(0, 6)) - 3 : ((i == j) ? 1 : 0);
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        R[i][j] = C[i][j];
        for (int k = 0; k < i; k++) R[i][j] -= A[i][k] * R[k][j];
      end
      load(C);
      run_pass(1);
      compare("trsm");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
