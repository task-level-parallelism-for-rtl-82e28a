// tb_page_mem: testbench model of the buffer port seen by one execution unit.
// Grants a request after a random 0..2 cycle wait (to exercise stalls),
// returns read data and the page's next entry one cycle after the grant.
// Pages and list links are set by the testbench through `mem` and `nxt`.
module tb_page_mem
  import mf_pkg::*;
(
  input  logic   clk,
  input  logic   br_req,
  input  logic   br_we,
  input  entry_t br_entry,
  input  tile_t  br_wdata,
  output logic   br_gnt,
  output logic   br_rvalid,
  output tile_t  br_rdata,
  output entry_t br_rnext
);
  tile_t  mem [NUM_PAGES];
  entry_t nxt [NUM_PAGES];
  int     wait_cnt = 0;
  int     stalls = 0;

  initial begin
    br_rvalid = 0;
    br_rdata  = '0;
    br_rnext  = '0;
  end

  assign br_gnt = br_req && (wait_cnt == 0);

  always @(posedge clk) begin
    br_rvalid <= 1'b0;
    if (br_req && wait_cnt != 0) begin
      wait_cnt <= wait_cnt - 1;
      stalls   <= stalls + 1;
    end
    if (br_gnt) begin
      wait_cnt <= $urandom_range(0, 2);
      if (br_we) mem[br_entry] <= br_wdata;
      else begin
        br_rvalid <= 1'b1;
        br_rdata  <= mem[br_entry];
        br_rnext  <= nxt[br_entry];
      end
    end
  end
endmodule
