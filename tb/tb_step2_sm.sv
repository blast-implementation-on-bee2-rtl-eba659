// tb_step2_sm - builds index A and array A of a random sequence A (k = 3) in memory, then drives
// two step2_sm machines with the k-mers of a sequence B that shares stretches with A.
// Histogram phase: checks the hit count of every diagonal, with hits that continue a hit one
// row above left out, and that such hits were dropped. The testbench then writes the pointers;
// fill phase: checks the {i, j} entries of every diagonal and its end pointer.
module tb_step2_sm;
  import blast_pkg::*;
  localparam int K = 3, S = 2, LA = 60, LB = 80, NK = 64, ND = LA + LB;
  localparam addr_t IA = 48'h200, AA = 48'h300, IB = 48'h400, AB = 48'h800;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mem_req_t [2:0] req;
  mem_rsp_t [2:0] rsp;
  logic     [2:0] pidle;
  mem_req_t host_req;
  mem_rsp_t host_rsp;
  logic fill = 1'b0;
  logic [1:0] jv, jr, sidle, dropped;
  logic [POS_W-1:0] jpos;
  logic [S*K-1:0] jk;
  logic [S-1:0] jps;
  logic jpv;
  int a [LA], b [LB];
  int dcnt [ND], dst [ND];
  int n_drop_seen = 0, n_drop_exp = 0;

  mem_subsystem #(.NPORTS(3), .ROW_BITS(5)) u_mem (.clk, .rst_n, .user_req(req), .user_rsp(rsp),
    .port_idle(pidle), .stat_forced(), .stat_skipped());
  for (genvar m = 0; m < 2; m++) begin : g_dut
    step2_sm #(.K(K), .S(S)) dut (.clk, .rst_n, .fill, .index_a_base(IA), .array_a_base(AA),
      .index_b_base(IB), .array_b_base(AB), .len_a(POS_W'(LA)),
      .job_valid(jv[m]), .job_ready(jr[m]), .job_pos(jpos), .job_kmer(jk), .job_prev_sym(jps),
      .job_prev_valid(jpv), .port_req(req[m+1]), .port_rsp(rsp[m+1]), .idle(sidle[m]),
      .hit_dropped(dropped[m]));
  end
  assign req[0] = host_req;
  assign host_rsp = rsp[0];

  always @(posedge clk) if (rst_n && !fill) n_drop_seen += $countones(dropped);

  `include "tb_util.svh"
  `include "tb_host.svh"

  function automatic int km(input int s [], input int p);
    int v = 0;
    for (int t = 0; t < K; t++) v = (v << S) | s[p + t];
    return v;
  endfunction

  function automatic bit is_hit(int i, int j);
    return km(a, j) == km(b, i) && !(i > 0 && j > 0 && a[j-1] == b[i-1]);
  endfunction

  task automatic run_jobs();
    for (int p = 0; p + K <= LB; p++) begin
      @(negedge clk);
      jpos = POS_W'(p); jk = (S*K)'(km(b, p)); jpv = p != 0; jps = (p != 0) ? S'(b[p-1]) : '0;
      while (jr == '0) @(negedge clk);
      jv = jr[0] ? 2'b01 : 2'b10;
      @(negedge clk);
      jv = '0;
    end
    while (sidle != '1 || pidle != '1) @(negedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    finish_tb();
  end

  initial begin
    logic [127:0] q;
    int s, e;
    host_req = REQ_IDLE; jv = '0;
    for (int p = 0; p < LA; p++) a[p] = $urandom % 4;
    for (int p = 0; p < LB; p++) b[p] = $urandom % 4;
    for (int t = 0; t < 15; t++) b[20 + t] = a[10 + t];
    for (int t = 0; t < 10; t++) b[60 + t] = a[40 + t];
    repeat (2) @(posedge clk); rst_n = 1'b1;
    // index A / array A
    e = 0;
    for (int k = 0; k < NK; k++) begin
      int c;
      c = 0;
      for (int p = 0; p + K <= LA; p++) if (km(a, p) == k) begin
        logic [63:0] ent;
        ent = '0; ent[31:0] = 32'(p); ent[33:32] = (p != 0) ? 2'(a[p-1]) : 2'b0; ent[48] = p != 0;
        host_op(OP_WRITE, AA + addr_t'(e + c), (e + c) % 2 ? 2'b10 : 2'b01, {ent, ent}, q);
        c++;
      end
      mwrite(IA + addr_t'(2*k), {64'(e + c), 64'(e)});
      e += c;
    end
    for (int d = 0; d < ND; d++) begin dcnt[d] = 0; mwrite(IB + addr_t'(2*d), '0); end
    for (int i = 0; i + K <= LB; i++)
      for (int j = 0; j + K <= LA; j++) begin
        if (is_hit(i, j)) dcnt[i - j + LA]++;
        else if (km(a, j) == km(b, i)) n_drop_exp++;
      end
    fill = 1'b0;
    run_jobs();
    check(n_drop_seen == n_drop_exp, $sformatf("%0d hits dropped, expected %0d", n_drop_seen, n_drop_exp));
    s = 0;
    for (int d = 0; d < ND; d++) begin
      mread(IB + addr_t'(2*d), q);
      check(q == {64'(dcnt[d]), 64'(dcnt[d])}, $sformatf("diagonal %0d count %h expected %0d", d, q, dcnt[d]));
      dst[d] = s;
      mwrite(IB + addr_t'(2*d), {64'(s), 64'(s)});
      s += dcnt[d];
    end
    fill = 1'b1;
    run_jobs();
    for (int d = 0; d < ND; d++) begin
      mread(IB + addr_t'(2*d), q);
      check(q == {64'(dst[d] + dcnt[d]), 64'(dst[d])}, $sformatf("pointers of diagonal %0d: %h", d, q));
      for (int x = dst[d]; x < dst[d] + dcnt[d]; x++) begin
        int i, j;
        mread(AB + addr_t'(2*x), q);
        i = int'(q[31:0]); j = int'(q[95:64]);
        check(i - j + LA == d && i + K <= LB && j + K <= LA && is_hit(i, j),
              $sformatf("diagonal %0d entry %0d = (%0d, %0d)", d, x, i, j));
      end
    end
    finish_tb();
  end
endmodule
