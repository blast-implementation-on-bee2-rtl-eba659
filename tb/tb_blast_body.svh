// Body shared by the end-to-end BLAST testbenches. The including module defines TB_K, TB_S,
// TB_LA, TB_LB, TB_MINSC, TB_WATCHDOG and builds the design under test (blast_bce_top, or the
// engine and memory joined as in the top) before including this file; it also declares the
// design's signals (see tb_blast_bce_top.sv) and mem_grants, the number of memory accesses
// issued in the current cycle, which it uses to print the memory efficiency of each phase.
//
// Flow: generate two random DNA sequences, copy stretches of A into B with a few point
// mutations, load both through the host port, run the engine, then compare
//  - every position list of index A / array A with the k-mer positions of A,
//  - the number of recorded hits with the reference (continuing hits dropped),
//  - the set of reported segments with an independent X-drop model,
// and check that each mechanism the design has occurred at least once.

  localparam int SPW = 64 / TB_S;
  localparam longint NKM = 64'd1 << (TB_S * TB_K);

  int checks = 0, failures = 0;
  longint cycles = 0;
  int a_seq [TB_LA];
  int b_seq [TB_LB];

  // event counters
  int n_forced = 0, n_skipped = 0, n_dropped = 0, n_xdrop = 0, n_edge = 0, n_backpr = 0;
  int phase_seen [16];
  longint phase_acc [16];   // memory accesses issued during each phase
  logic [3:0] last_phase = 0;

  // results collected from the DUT
  result_t got [$];

  always @(posedge clk) begin
    cycles++;
    if (rst_n) begin
      for (int c = 0; c < NCHAN; c++) begin
        n_forced  += int'(stat_forced[c]);
        n_skipped += int'(stat_skipped[c]);
      end
      n_dropped += int'(stat_hit_dropped);
      n_xdrop   += int'(stat_stop_xdrop);
      n_edge    += int'(stat_stop_edge);
      if (res_valid && !res_ready) n_backpr++;
      if (res_valid && res_ready) got.push_back(res);
      phase_seen[phase]++;
      phase_acc[phase] += longint'(mem_grants);
      if (phase != last_phase) $display("cycle %0d phase %0d", cycles, phase);
      last_phase = phase;
    end
  end

  // random backpressure on the result stream
  always @(posedge clk) res_ready <= ($urandom % 4) != 0;

  initial begin
    repeat (TB_WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired at cycle %0d, phase %0d", cycles, phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic host_op(input mem_op_e op, input addr_t a, input logic [127:0] d,
                         output logic [127:0] q);
    @(negedge clk);
    host_req = '{opcode: op, addr: a, mask: 2'b11, din: d};
    #1;
    while (host_rsp.busy) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1 host_req = REQ_IDLE;
    q = '0;
    if (op == OP_READ) begin
      while (!host_rsp.ready) @(posedge clk);
      q = host_rsp.dout;
    end
  endtask

  function automatic longint kmer_of(input int s [], input int p);
    longint v = 0;
    for (int t = 0; t < TB_K; t++) v = (v << TB_S) | longint'(s[p+t]);
    return v;
  endfunction

  // reference X-drop extension of one hit
  function automatic void ref_extend(input int i, input int j, output int sc, output int a0,
                                     output int b0, output int ln);
    int cur, best, bl, lb, ll, nmax;
    cur = 0; best = 0; bl = 0; nmax = (i < j) ? i : j;
    for (int s = 0; s < nmax; s++) begin
      cur += (a_seq[j-1-s] == b_seq[i-1-s]) ? 1 : -3;
      if (cur > best) begin best = cur; bl = s + 1; end
      if (best - cur >= 20) break;
    end
    lb = best; ll = bl;
    cur = 0; best = 0; bl = 0;
    nmax = ((TB_LA - j - TB_K) < (TB_LB - i - TB_K)) ? (TB_LA - j - TB_K) : (TB_LB - i - TB_K);
    for (int s = 0; s < nmax; s++) begin
      cur += (a_seq[j+TB_K+s] == b_seq[i+TB_K+s]) ? 1 : -3;
      if (cur > best) begin best = cur; bl = s + 1; end
      if (best - cur >= 20) break;
    end
    sc = TB_K + lb + best;
    a0 = j - ll; b0 = i - ll; ln = ll + TB_K + bl;
  endfunction

  localparam addr_t SEQA = 48'h0, SEQB = 48'h1000, IDXA = 48'h2000;
  localparam addr_t ARRA = IDXA + addr_t'(2 * NKM) + 48'h100;
  localparam addr_t IDXB = ARRA + addr_t'(TB_LA) + 48'h100;
  localparam addr_t ARRB = IDXB + addr_t'(2 * (TB_LA + TB_LB)) + 48'h100;

  task automatic load_seq(input int s [], input int n, input addr_t base);
    logic [127:0] blk, q;
    for (int w = 0; w < (n + 2*SPW - 1) / (2*SPW); w++) begin
      blk = '0;
      for (int t = 0; t < 2*SPW; t++)
        if (w*2*SPW + t < n) blk[t*TB_S +: TB_S] = TB_S'(s[w*2*SPW + t]);
      host_op(OP_WRITE, base + addr_t'(2*w), blk, q);
    end
  endtask

  initial begin : main
    int exp_hits;
    int ref_sc [$], ref_a [$], ref_b [$], ref_l [$];
    bit used [];
    logic [127:0] q;
    host_req  = REQ_IDLE;
    start     = 1'b0;
    rst_n     = 1'b0;
    seq_a_base = SEQA; seq_b_base = SEQB; len_a = TB_LA; len_b = TB_LB;
    index_a_base = IDXA; array_a_base = ARRA; index_b_base = IDXB; array_b_base = ARRB;
    x_drop = 16'd20; min_score = 16'(TB_MINSC);

    // sequences: random, with mutated copies of stretches of A planted in B
    for (int p = 0; p < TB_LA; p++) a_seq[p] = $urandom % (1 << TB_S);
    for (int p = 0; p < TB_LB; p++) b_seq[p] = $urandom % (1 << TB_S);
    for (int r = 0; r < 3; r++) begin
      int sa, sb, ln;
      ln = 40 + r * 10;
      sa = $urandom % (TB_LA - ln);
      sb = r * (TB_LB / 3) + ($urandom % (TB_LB / 3 - ln));
      for (int t = 0; t < ln; t++) b_seq[sb+t] = (($urandom % 12) == 0) ? $urandom % (1 << TB_S) : a_seq[sa+t];
    end
    // a sequence ending inside a match exercises the boundary stop
    for (int t = 0; t < 12; t++) b_seq[TB_LB-12+t] = a_seq[TB_LA-12+t];

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    load_seq(a_seq, TB_LA, SEQA);
    load_seq(b_seq, TB_LB, SEQB);

    @(posedge clk); start <= 1'b1; @(posedge clk); start <= 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    repeat (4) @(posedge clk);
    $display("run finished at cycle %0d", cycles);

    // ---- step 1 result: position lists of a sample of k-mers (all of them when small)
    for (longint km = 0; km < NKM; km += (NKM > 1024 ? NKM / 512 + 1 : 1)) begin
      longint st_, en_;
      int expn, gotn;
      host_op(OP_READ, IDXA + addr_t'(2*km), '0, q);
      st_ = q[63:0]; en_ = q[127:64];
      expn = 0;
      for (int p = 0; p + TB_K <= TB_LA; p++) if (kmer_of(a_seq, p) == km) expn++;
      check(en_ - st_ == longint'(expn), $sformatf("k-mer %0d count %0d expected %0d", km, en_ - st_, expn));
      gotn = 0;
      for (longint e = st_; e < en_ && e < st_ + 64; e++) begin
        logic [63:0] ent;
        int pos;
        host_op(OP_READ, ARRA + addr_t'(e), '0, q);
        ent = e[0] ? q[127:64] : q[63:0];
        pos = int'(ent[31:0]);
        check(pos + TB_K <= TB_LA && kmer_of(a_seq, pos) == km, $sformatf("array A entry %0d pos %0d", e, pos));
        check(ent[48] == (pos != 0) && (pos == 0 || int'(ent[32 +: TB_S]) == a_seq[pos-1]),
              $sformatf("array A entry %0d front symbol", e));
      end
    end

    // ---- step 2: recorded hits
    exp_hits = 0;
    for (int i = 0; i + TB_K <= TB_LB; i++)
      for (int j = 0; j + TB_K <= TB_LA; j++) begin
        bit m;
        m = 1;
        for (int t = 0; t < TB_K; t++) if (a_seq[j+t] != b_seq[i+t]) m = 0;
        if (m && !(i > 0 && j > 0 && a_seq[j-1] == b_seq[i-1])) begin
          int sc, a0, b0, ln;
          exp_hits++;
          ref_extend(i, j, sc, a0, b0, ln);
          if (sc >= TB_MINSC) begin
            ref_sc.push_back(sc); ref_a.push_back(a0); ref_b.push_back(b0); ref_l.push_back(ln);
          end
        end
      end
    check(n_hits == 64'(exp_hits), $sformatf("hits %0d expected %0d", n_hits, exp_hits));

    // ---- step 3: reported segments, as a multiset
    check(got.size() == ref_sc.size(), $sformatf("%0d results, expected %0d", got.size(), ref_sc.size()));
    used = new [ref_sc.size()];
    foreach (got[g]) begin
      bit found;
      found = 0;
      foreach (ref_sc[r])
        if (!found && !used[r] && int'(got[g].a_pos) == ref_a[r] && int'(got[g].b_pos) == ref_b[r] &&
            int'(got[g].len) == ref_l[r] && int'(got[g].score) == ref_sc[r]) begin
          used[r] = 1; found = 1;
        end
      check(found, $sformatf("unexpected result a=%0d b=%0d len=%0d score=%0d",
                             got[g].a_pos, got[g].b_pos, got[g].len, got[g].score));
    end

    // ---- mechanisms
    $display("hits=%0d results=%0d forced=%0d skipped=%0d dropped=%0d xdrop=%0d edge=%0d backpressure=%0d",
             exp_hits, got.size(), n_forced, n_skipped, n_dropped, n_xdrop, n_edge, n_backpr);
    // memory efficiency: accesses issued / (4 channels x cycles), per phase
    for (int ph = 1; ph <= 9; ph++)
      if (phase_seen[ph] > 0)
        $display("phase %0d: %0d cycles, %0d accesses, efficiency %0.1f%%", ph, phase_seen[ph], phase_acc[ph],
                 100.0 * real'(phase_acc[ph]) / (4.0 * real'(phase_seen[ph])));
    for (int ph = 1; ph <= 10; ph++) check(phase_seen[ph] > 0, $sformatf("phase %0d never ran", ph));
    check(n_skipped > 0, "no request was skipped for a busy bank");
    check(n_forced  > 0, "skip bound never forced a request");
    check(n_dropped > 0, "no continuing hit was dropped");
    check(n_xdrop   > 0, "no extension ended by x-drop");
    check(n_edge    > 0, "no extension ended at a sequence edge");
    check(n_backpr  > 0, "result stream never back-pressured");
    check(ref_sc.size() > 0, "no segment reached the score threshold");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
