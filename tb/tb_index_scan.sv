// tb_index_scan - writes random histogram counts into 150 index pairs, runs index_scan, and
// checks that every pair became {start, start} with start the sum of all earlier counts, that
// total is the sum of all counts, and that the two lanes (reads on ports 0 and 2, writes on
// ports 1 and 3, as in the engine) keep the scan at or below SCAN_BOUND cycles a pair.
module tb_index_scan;
  import blast_pkg::*;
  localparam int NP = 4, N = 150;
  localparam real SCAN_BOUND = 1.5;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mem_req_t [NP-1:0] req;
  mem_rsp_t [NP-1:0] rsp;
  logic     [NP-1:0] idle;
  mem_req_t host_req;
  mem_req_t [1:0] rd_req, wr_req;
  mem_rsp_t host_rsp;
  logic start = 1'b0, done, own = 1'b1;
  logic [WORD_W-1:0] total;
  int cnt [N];

  mem_subsystem #(.NPORTS(NP), .ROW_BITS(5)) u_mem (.clk, .rst_n, .user_req(req), .user_rsp(rsp),
    .port_idle(idle), .stat_forced(), .stat_skipped());
  index_scan dut (.clk, .rst_n, .start, .base(48'h100), .npairs(POS_W'(N)), .rd_req,
    .rd_rsp({rsp[2], rsp[0]}), .wr_req, .wr_rsp({rsp[3], rsp[1]}), .wr_idle({idle[3], idle[1]}),
    .done, .total);

  always_comb begin
    req[0] = own ? host_req : rd_req[0];
    req[1] = own ? REQ_IDLE : wr_req[0];
    req[2] = own ? REQ_IDLE : rd_req[1];
    req[3] = own ? REQ_IDLE : wr_req[1];
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
    longint sum;
    int t0;
    host_req = REQ_IDLE;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int p = 0; p < N; p++) begin
      cnt[p] = (p % 7 == 0) ? 0 : $urandom % 50;
      mwrite(48'h100 + addr_t'(2*p), {64'(cnt[p]), 64'(cnt[p])});
    end
    @(negedge clk); own = 1'b0; start = 1'b1; @(negedge clk); start = 1'b0;
    t0 = 0;
    while (!done) begin @(posedge clk); t0++; end
    $display("scan of %0d pairs took %0d cycles", N, t0);
    check(real'(t0) <= SCAN_BOUND * real'(N), $sformatf("scan of %0d pairs took %0d cycles", N, t0));
    @(negedge clk); own = 1'b1;
    sum = 0;
    for (int p = 0; p < N; p++) begin
      mread(48'h100 + addr_t'(2*p), q);
      check(q == {64'(sum), 64'(sum)}, $sformatf("pair %0d = %h, expected start %0d", p, q, sum));
      sum += 64'(cnt[p]);
    end
    check(total == 64'(sum), $sformatf("total %0d expected %0d", total, sum));
    finish_tb();
  end
endmodule
