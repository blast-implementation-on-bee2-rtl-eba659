// tb_seq_streamer - loads a random 2-bit sequence of 301 symbols, streams it with k = 5 under a
// randomly stalling consumer, and checks every k-mer job (position, value, symbol in front and
// its valid flag) against the sequence, the number of jobs, and done.
module tb_seq_streamer;
  import blast_pkg::*;
  localparam int K = 5, S = 2, L = 301;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mem_req_t [0:0] req;
  mem_rsp_t [0:0] rsp;
  mem_req_t host_req, sreq;
  mem_rsp_t host_rsp;
  logic start = 1'b0, done, own = 1'b1, jv, jr, jpv;
  logic [POS_W-1:0] jpos;
  logic [S*K-1:0] jk;
  logic [S-1:0] jps;
  int seq [L];
  int njobs = 0;

  mem_subsystem #(.NPORTS(1), .ROW_BITS(4)) u_mem (.clk, .rst_n, .user_req(req), .user_rsp(rsp),
    .port_idle(), .stat_forced(), .stat_skipped());
  seq_streamer #(.K(K), .S(S)) dut (.clk, .rst_n, .start, .base(48'h20), .len(POS_W'(L)),
    .port_req(sreq), .port_rsp(rsp[0]), .job_valid(jv), .job_ready(jr), .job_pos(jpos),
    .job_kmer(jk), .job_prev_sym(jps), .job_prev_valid(jpv), .done);

  assign req[0] = own ? host_req : sreq;
  assign host_rsp = rsp[0];

  `include "tb_util.svh"
  `include "tb_host.svh"

  always @(posedge clk) jr <= ($urandom % 3) != 0;

  always @(posedge clk) if (rst_n && jv && jr) begin
    int p, v;
    p = int'(jpos);
    v = 0;
    for (int t = 0; t < K; t++) v = (v << S) | seq[p + t];
    check(p == njobs, $sformatf("job %0d has position %0d", njobs, p));
    check(int'(jk) == v, $sformatf("k-mer at %0d = %h, expected %h", p, jk, v));
    check(jpv == (p != 0) && (p == 0 || int'(jps) == seq[p-1]), $sformatf("symbol in front of %0d", p));
    njobs++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    finish_tb();
  end

  initial begin
    logic [127:0] blk;
    host_req = REQ_IDLE;
    for (int p = 0; p < L; p++) seq[p] = $urandom % 4;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int w = 0; w < (L + 63) / 64; w++) begin
      blk = '0;
      for (int t = 0; t < 64; t++) if (w*64 + t < L) blk[2*t +: 2] = 2'(seq[w*64 + t]);
      mwrite(48'h20 + addr_t'(2*w), blk);
    end
    @(negedge clk); own = 1'b0; start = 1'b1; @(negedge clk); start = 1'b0;
    while (!done) @(posedge clk);
    repeat (3) @(posedge clk);
    check(njobs == L - K + 1, $sformatf("%0d jobs, expected %0d", njobs, L - K + 1));
    finish_tb();
  end
endmodule
