// tb_idle_page_encoder: random and corner idle vectors against a loop model.
module tb_idle_page_encoder;
  localparam int N = 256;
  logic [N-1:0] idle;
  logic found;
  logic [7:0] index;
  int checks = 0, failures = 0;

  idle_page_encoder #(.N(N)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      int exp_i = -1;
      logic [N-1:0] v = '0;
      if (n == 1) v = '1;
      else if (n >= 2 && n < 258) v[n-2] = 1'b1;
      else if (n >= 258) begin
        // sparse random vectors
        for (int w = 0; w < N/32; w++) if ($urandom_range(0, 3) == 0) v[w*32 +: 32] = $urandom & $urandom;
      end
      idle = v;
      #1;
      for (int i = N-1; i >= 0; i--) if (idle[i]) exp_i = i;
      checks++;
      if (found != (exp_i >= 0) || (exp_i >= 0 && index != 8'(exp_i))) begin
        failures++;
        $display("FAIL n=%0d found=%0b index=%0d exp=%0d", n, found, index, exp_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
