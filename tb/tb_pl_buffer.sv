// tb_pl_buffer: random whole-tile writes and reads against a model array;
// a read returns its tile one cycle after the request.
module tb_pl_buffer;
  import mf_pkg::*;
  logic clk = 0, en = 0, we = 0;
  logic [PAGE_W-1:0] page = '0;
  tile_t wdata = '0, rdata;
  tile_t model [NUM_PAGES];
  bit    written [NUM_PAGES];
  int checks = 0, failures = 0;

  pl_buffer dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      automatic int p = $urandom_range(0, 31);
      @(negedge clk);
      en = ($urandom_range(0, 5) != 0);
      page = PAGE_W'(p);
      we = ($urandom_range(0, 1) == 0) || !written[p];
      for (int e = 0; e < TILE_ELEMS; e++) wdata[e] = elem_t'($urandom);
      @(negedge clk);
      if (en && we) begin model[p] = wdata; written[p] = 1; end
      else if (en) begin
        checks++;
        if (rdata !== model[p]) begin failures++; $display("FAIL read page %0d", p); end
      end
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
