// tb_sa_pe: self-checking test of one processing element.
// Drives random operands and checks the subtract-accumulate, the east and
// south forwarding, the MUX that sends the accumulator south when the control
// bit is set, the two-cycle control delay, hold when disabled and the load.
module tb_sa_pe;
  import mf_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, acc_load = 0, ctrl_in = 0;
  elem_t acc_in = '0, west_in = '0, north_in = '0;
  elem_t east_out, south_out, acc_out;
  logic ctrl_out;
  int checks = 0, failures = 0;

  sa_pe dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    elem_t acc_m, a, b, exp_south;
    logic c_hist [3];
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    acc_in = 32'sd1000; acc_load = 1;
    @(negedge clk);
    acc_load = 0;
    chk(acc_out == 32'sd1000, "load");
    chk(south_out == 0 && east_out == 0, "load clears pipeline");
    acc_m = 1000;
    c_hist = '{0, 0, 0};
    for (int n = 0; n < 200; n++) begin
      a = elem_t'($urandom_range(0, 200)) - 100;
      b = elem_t'($urandom_range(0, 200)) - 100;
      west_in = a; north_in = b;
      ctrl_in = ($urandom_range(0, 3) == 0);
      en = ($urandom_range(0, 4) != 0);
      exp_south = ctrl_in ? acc_m : b;
      @(negedge clk);
      if (en) begin
        chk(east_out == a, "east forward");
        chk(south_out == exp_south, "south mux");
        acc_m = acc_m - a * b;
        c_hist[2] = c_hist[1];
        c_hist[1] = c_hist[0];
        c_hist[0] = ctrl_in;
        chk(ctrl_out == c_hist[1], "control delayed two steps");
      end
      chk(acc_out == acc_m, "accumulate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
