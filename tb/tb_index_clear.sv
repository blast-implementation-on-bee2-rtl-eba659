// tb_index_clear - fills a memory region with nonzero pairs, clears a sub-range of it with
// index_clear over 4 ports, and checks that exactly the range is zero, that the pairs around it
// are untouched, and that the clear keeps the ports busy (at least 2 pairs per cycle).
module tb_index_clear;
  import blast_pkg::*;
  localparam int NP = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mem_req_t [NP-1:0] req, clr_req;
  mem_rsp_t [NP-1:0] rsp;
  logic     [NP-1:0] idle;
  mem_req_t host_req;
  mem_rsp_t host_rsp;
  logic start = 1'b0, done, own = 1'b1;
  addr_t base;
  logic [POS_W-1:0] npairs;

  mem_subsystem #(.NPORTS(NP), .ROW_BITS(5)) u_mem (.clk, .rst_n, .user_req(req), .user_rsp(rsp),
    .port_idle(idle), .stat_forced(), .stat_skipped());
  index_clear #(.NPORTS(NP)) dut (.clk, .rst_n, .start, .base, .npairs, .port_req(clr_req),
    .port_rsp(rsp), .port_idle(idle), .done);

  always_comb begin
    req = own ? '0 : clr_req;
    if (own) req[0] = host_req;
    host_rsp = rsp[0];
  end

  `include "tb_util.svh"
  `include "tb_host.svh"

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    finish_tb();
  end

  initial begin
    logic [127:0] q;
    int t0, t1;
    host_req = REQ_IDLE;
    base = 48'h40; npairs = 173;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int p = 0; p < 200; p++) mwrite(48'h3c + addr_t'(2*p), {32'h0, 32'(p + 1), 32'h0, 32'(p + 7)});
    @(negedge clk); own = 1'b0; start = 1'b1; @(negedge clk); start = 1'b0;
    t0 = 0;
    while (!done) begin @(posedge clk); t0++; end
    check(t0 <= 173 / 2 + 20, $sformatf("clear of 173 pairs took %0d cycles", t0));
    @(negedge clk); own = 1'b1;
    for (int p = 0; p < 200; p++) begin
      addr_t a;
      a = 48'h3c + addr_t'(2*p);
      mread(a, q);
      if (a >= base && a < base + addr_t'(2*npairs))
        check(q == '0, $sformatf("pair at %h not cleared: %h", a, q));
      else
        check(q == {32'h0, 32'(p + 1), 32'h0, 32'(p + 7)}, $sformatf("pair at %h changed", a));
    end
    finish_tb();
  end
endmodule
