// tb_step3_sm - places two sequences with shared stretches, a hit index and a hit array (k = 4,
// every k-mer match, one hit list per diagonal; stretches with score ties included) in memory, then hands all diagonals to three
// step3_sm machines and checks the reported segments against an independent X-drop model
// (+1/-3, x-drop 20, score threshold 10) as a multiset. It also checks that extensions ended both
// by x-drop and at a sequence edge, and that results waited under back-pressure.
module tb_step3_sm;
  import blast_pkg::*;
  localparam int K = 4, LA = 150, LB = 180, ND = LA + LB, NSM = 3, MINSC = 10;
  localparam addr_t SA = 48'h0, SB = 48'h20, IB = 48'h100, AB = 48'h400;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mem_req_t [NSM:0] req;
  mem_rsp_t [NSM:0] rsp;
  mem_req_t host_req;
  mem_rsp_t host_rsp;
  logic [NSM-1:0] jv, jr, sidle, rv, rr, sx, se;
  result_t [NSM-1:0] rs;
  logic [POS_W-1:0] jd;
  int a [LA], b [LB];
  int n_x = 0, n_e = 0, n_bp = 0;
  result_t got [$];
  int esc [$], ea [$], eb [$], el [$];

  mem_subsystem #(.NPORTS(NSM + 1), .ROW_BITS(5)) u_mem (.clk, .rst_n, .user_req(req), .user_rsp(rsp),
    .port_idle(), .stat_forced(), .stat_skipped());
  for (genvar m = 0; m < NSM; m++) begin : g_dut
    step3_sm #(.K(K), .S(2)) dut (.clk, .rst_n, .index_b_base(IB), .array_b_base(AB),
      .seq_a_base(SA), .seq_b_base(SB), .len_a(POS_W'(LA)), .len_b(POS_W'(LB)),
      .x_drop(16'd20), .min_score(16'(MINSC)), .job_valid(jv[m]), .job_ready(jr[m]), .job_diag(jd),
      .port_req(req[m+1]), .port_rsp(rsp[m+1]), .idle(sidle[m]), .res_valid(rv[m]),
      .res_ready(rr[m]), .res(rs[m]), .stop_xdrop(sx[m]), .stop_edge(se[m]));
    always @(posedge clk) rr[m] <= ($urandom % 3) != 0;
    always @(posedge clk) if (rst_n) begin
      if (rv[m] && rr[m]) got.push_back(rs[m]);
      if (rv[m] && !rr[m]) n_bp++;
      n_x += int'(sx[m]);
      n_e += int'(se[m]);
    end
  end
  assign req[0] = host_req;
  assign host_rsp = rsp[0];

  `include "tb_util.svh"
  `include "tb_host.svh"

  function automatic void ext(input int i, input int j, output int sc, output int a0, output int b0,
                              output int ln);
    int cur, best, bl, lb, ll, n;
    cur = 0; best = 0; bl = 0; n = (i < j) ? i : j;
    for (int s = 0; s < n; s++) begin
      cur += (a[j-1-s] == b[i-1-s]) ? 1 : -3;
      if (cur > best) begin best = cur; bl = s + 1; end
      if (best - cur >= 20) break;
    end
    lb = best; ll = bl; cur = 0; best = 0; bl = 0;
    n = ((LA - j - K) < (LB - i - K)) ? LA - j - K : LB - i - K;
    for (int s = 0; s < n; s++) begin
      cur += (a[j+K+s] == b[i+K+s]) ? 1 : -3;
      if (cur > best) begin best = cur; bl = s + 1; end
      if (best - cur >= 20) break;
    end
    sc = K + lb + best; a0 = j - ll; b0 = i - ll; ln = ll + K + bl;
  endfunction

  task automatic load(input int s [], input int n, input addr_t base);
    logic [127:0] blk;
    for (int w = 0; w < (n + 63) / 64; w++) begin
      blk = '0;
      for (int t = 0; t < 64; t++) if (w*64 + t < n) blk[2*t +: 2] = 2'(s[w*64 + t]);
      mwrite(base + addr_t'(2*w), blk);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    finish_tb();
  end

  initial begin
    int e;
    bit used [];
    host_req = REQ_IDLE; jv = '0;
    for (int p = 0; p < LA; p++) a[p] = $urandom % 4;
    for (int p = 0; p < LB; p++) b[p] = $urandom % 4;
    for (int t = 0; t < 50; t++) b[30 + t] = (t % 17 == 5) ? (a[20 + t] + 1) % 4 : a[20 + t];
    for (int t = 0; t < 10; t++) b[LB - 10 + t] = a[LA - 10 + t];
    // score ties: 12 matches, a mismatch and 3 matches bring the score back to its best, so the
    // segment must end at the first best (downstream case, then the mirrored upstream case)
    for (int t = 0; t < 16; t++) b[100 + t] = (t == 12) ? (a[60 + t] + 1) % 4 : a[60 + t];
    b[116] = (a[76] + 2) % 4;
    for (int t = 0; t < 16; t++) b[130 + t] = (t == 3) ? (a[110 + t] + 1) % 4 : a[110 + t];
    b[129] = (a[109] + 2) % 4;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    load(a, LA, SA);
    load(b, LB, SB);
    e = 0;
    for (int d = 0; d < ND; d++) begin
      int c;
      c = 0;
      for (int i = 0; i + K <= LB; i++) begin
        int j;
        bit m;
        j = i + LA - d;
        m = j >= 0 && j + K <= LA;
        for (int t = 0; t < K && m; t++) if (a[j+t] != b[i+t]) m = 0;
        if (m) begin
          int sc, a0, b0, ln;
          mwrite(AB + addr_t'(2*(e + c)), {64'(j), 64'(i)});
          c++;
          ext(i, j, sc, a0, b0, ln);
          if (sc >= MINSC) begin esc.push_back(sc); ea.push_back(a0); eb.push_back(b0); el.push_back(ln); end
        end
      end
      mwrite(IB + addr_t'(2*d), {64'(e + c), 64'(e)});
      e += c;
    end
    for (int d = 0; d < ND; d++) begin
      @(negedge clk);
      jd = POS_W'(d);
      while (jr == '0) @(negedge clk);
      jv = jr & ~(jr - 1'b1);
      @(negedge clk);
      jv = '0;
    end
    @(negedge clk);
    while (sidle != '1) @(negedge clk);
    check(got.size() == esc.size(), $sformatf("%0d results, expected %0d", got.size(), esc.size()));
    used = new [esc.size()];
    foreach (got[g]) begin
      bit f;
      f = 0;
      foreach (esc[r])
        if (!f && !used[r] && int'(got[g].a_pos) == ea[r] && int'(got[g].b_pos) == eb[r] &&
            int'(got[g].len) == el[r] && int'(got[g].score) == esc[r]) begin
          used[r] = 1; f = 1;
        end
      check(f, $sformatf("unexpected result a=%0d b=%0d len=%0d score=%0d", got[g].a_pos, got[g].b_pos,
                         got[g].len, got[g].score));
    end
    $display("hits=%0d results=%0d xdrop=%0d edge=%0d backpressure=%0d", e, got.size(), n_x, n_e, n_bp);
    check(n_x > 0 && n_e > 0 && n_bp > 0 && esc.size() > 0, "a mechanism never occurred");
    finish_tb();
  end
endmodule
