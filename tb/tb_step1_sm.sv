// tb_step1_sm - drives two step1_sm machines on ports 1 and 2 with the k-mers of a random
// sequence (k = 3). Histogram phase: checks that both words of every index pair hold the k-mer's
// count. The testbench then writes the pointers itself; fill phase: checks each k-mer's array
// entries (position and symbol in front) and its end pointer.
module tb_step1_sm;
  import blast_pkg::*;
  localparam int K = 3, S = 2, L = 120, NK = 64;
  localparam addr_t IDX = 48'h200, ARR = 48'h400;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mem_req_t [2:0] req;
  mem_rsp_t [2:0] rsp;
  logic     [2:0] pidle;
  mem_req_t host_req;
  mem_rsp_t host_rsp;
  logic fill = 1'b0;
  logic [1:0] jv, jr, sidle;
  logic [POS_W-1:0] jpos;
  logic [S*K-1:0] jk;
  logic [S-1:0] jps;
  logic jpv;
  int seq [L];
  int cnt [NK], st [NK];

  mem_subsystem #(.NPORTS(3), .ROW_BITS(4)) u_mem (.clk, .rst_n, .user_req(req), .user_rsp(rsp),
    .port_idle(pidle), .stat_forced(), .stat_skipped());
  for (genvar m = 0; m < 2; m++) begin : g_dut
    step1_sm #(.K(K), .S(S)) dut (.clk, .rst_n, .fill, .index_base(IDX), .array_base(ARR),
      .job_valid(jv[m]), .job_ready(jr[m]), .job_pos(jpos), .job_kmer(jk), .job_prev_sym(jps),
      .job_prev_valid(jpv), .port_req(req[m+1]), .port_rsp(rsp[m+1]), .idle(sidle[m]));
  end
  assign req[0] = host_req;
  assign host_rsp = rsp[0];

  `include "tb_util.svh"
  `include "tb_host.svh"

  function automatic int kmer(int p);
    int v = 0;
    for (int t = 0; t < K; t++) v = (v << S) | seq[p + t];
    return v;
  endfunction

  task automatic run_jobs();
    for (int p = 0; p + K <= L; p++) begin
      @(negedge clk);
      jpos = POS_W'(p); jk = (S*K)'(kmer(p)); jpv = p != 0; jps = (p != 0) ? S'(seq[p-1]) : '0;
      while (jr == '0) @(negedge clk);
      jv = jr[0] ? 2'b01 : 2'b10;
      @(negedge clk);
      jv = '0;
    end
    while (sidle != '1 || pidle != '1) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    finish_tb();
  end

  initial begin
    logic [127:0] q;
    int s;
    host_req = REQ_IDLE; jv = '0;
    for (int p = 0; p < L; p++) seq[p] = $urandom % 4;
    for (int k = 0; k < NK; k++) cnt[k] = 0;
    for (int p = 0; p + K <= L; p++) cnt[kmer(p)]++;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int k = 0; k < NK; k++) mwrite(IDX + addr_t'(2*k), '0);
    fill = 1'b0;
    run_jobs();
    s = 0;
    for (int k = 0; k < NK; k++) begin
      mread(IDX + addr_t'(2*k), q);
      check(q == {64'(cnt[k]), 64'(cnt[k])}, $sformatf("count of k-mer %0d: %h expected %0d", k, q, cnt[k]));
      st[k] = s;
      mwrite(IDX + addr_t'(2*k), {64'(s), 64'(s)});
      s += cnt[k];
    end
    fill = 1'b1;
    run_jobs();
    for (int k = 0; k < NK; k++) begin
      mread(IDX + addr_t'(2*k), q);
      check(q == {64'(st[k] + cnt[k]), 64'(st[k])}, $sformatf("pointers of k-mer %0d: %h", k, q));
      for (int e = st[k]; e < st[k] + cnt[k]; e++) begin
        logic [63:0] ent;
        int pos;
        mread(ARR + addr_t'(e), q);
        ent = e[0] ? q[127:64] : q[63:0];
        pos = int'(ent[31:0]);
        check(pos + K <= L && kmer(pos) == k, $sformatf("entry %0d of k-mer %0d: position %0d", e, k, pos));
        check(ent[48] == (pos != 0) && (pos == 0 || int'(ent[33:32]) == seq[pos-1]),
              $sformatf("entry %0d front symbol", e));
      end
    end
    finish_tb();
  end
endmodule
