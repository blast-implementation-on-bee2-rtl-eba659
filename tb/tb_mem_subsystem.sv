// tb_mem_subsystem - exercises the 8-port, 4-channel memory subsystem.
//  1. Random reads, writes, test&sets and atomic increments from all ports at once, each port in
//     its own address range, checked against a per-port shadow copy (results in order, data
//     right, writes before reads of the same port honoured).
//  2. All ports increment the same four counters 40 times each with atomic increment; the
//     counters must end at exactly 8*10 in both words, showing the increments are indivisible.
//  3. Constant-stride reads from all ports: a stride of 4 words (one burst, an odd multiple)
//     must reach at least 3 accesses per cycle out of 4 (all ports start on the same channel, so
//     this includes the start-up and drain); a stride of 8 words uses only two channels and must
//     stay at or below 2; a stride of 128 words sends every
//     access to the same bank and must stay below 0.2 per cycle.
//  4. Random addresses from all ports, reads and then atomic increments. Each port has one
//     queue entry, so a request to a busy bank holds its port; this design reaches about 1.3
//     (reads) and 1.1 (atomics, which hold a bank 10 cycles instead of 8) accesses per cycle,
//     checked against floors of 1.2 and 1.0.
// It also checks a read latency of 8 cycles on an idle system and that skipped and forced
// requests occurred.
module tb_mem_subsystem;
  import blast_pkg::*;
  localparam int NP = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mem_req_t [NP-1:0] req;
  mem_rsp_t [NP-1:0] rsp;
  logic [NP-1:0] idle;
  logic [3:0] sf, ss;
  int n_forced = 0, n_skipped = 0;

  mem_subsystem #(.NPORTS(NP), .ROW_BITS(5)) dut (.clk, .rst_n, .user_req(req), .user_rsp(rsp),
    .port_idle(idle), .stat_forced(sf), .stat_skipped(ss));

  `include "tb_util.svh"

  always @(posedge clk) if (rst_n) begin
    n_forced += $countones(sf);
    n_skipped += $countones(ss);
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL: watchdog expired");
    failures++;
    finish_tb();
  end

  // per-port driver: issues a list of requests back to back, collects results in order
  mem_req_t plist [NP][$];
  logic [127:0] results [NP][$];

  for (genvar p = 0; p < NP; p++) begin : g_drv
    int k = 0;
    bit taken = 0;
    // a request is taken at a rising edge when it is presented and Busy is low
    always @(posedge clk) taken = req[p].opcode != OP_NOP && !rsp[p].busy;
    always @(negedge clk) begin
      #1;
      if (taken || req[p].opcode == OP_NOP) begin
        if (k < plist[p].size() && rst_n) begin
          req[p] = plist[p][k];
          k++;
        end else req[p] = REQ_IDLE;
      end
    end
    always @(posedge clk) if (rsp[p].ready) results[p].push_back(rsp[p].dout);
  end

  task automatic run_lists(output int cycles);
    int t;
    for (int p = 0; p < NP; p++) begin results[p].delete(); g_drv_k_reset(p); end
    t = 0;
    @(negedge clk);
    while (1) begin
      bit busy_any;
      @(negedge clk); #2;
      t++;
      busy_any = 0;
      for (int p = 0; p < NP; p++) if (!idle[p] || req[p].opcode != OP_NOP) busy_any = 1;
      if (!busy_any && all_sent()) break;
    end
    repeat (2) @(negedge clk);  // Output_ready follows the last result by one cycle
    cycles = t;
  endtask

  function automatic bit all_sent();
    return g_drv[0].k >= plist[0].size() && g_drv[1].k >= plist[1].size() && g_drv[2].k >= plist[2].size() &&
           g_drv[3].k >= plist[3].size() && g_drv[4].k >= plist[4].size() && g_drv[5].k >= plist[5].size() &&
           g_drv[6].k >= plist[6].size() && g_drv[7].k >= plist[7].size();
  endfunction

  task automatic g_drv_k_reset(int p);
    case (p)
      0: g_drv[0].k = 0; 1: g_drv[1].k = 0; 2: g_drv[2].k = 0; 3: g_drv[3].k = 0;
      4: g_drv[4].k = 0; 5: g_drv[5].k = 0; 6: g_drv[6].k = 0; default: g_drv[7].k = 0;
    endcase
  endtask

  initial begin
    int cyc, lat;
    real rate4;
    logic [127:0] shadow [int];
    logic [127:0] expq [NP][$];
    for (int p = 0; p < NP; p++) req[p] = REQ_IDLE;
    repeat (2) @(posedge clk); rst_n = 1'b1;

    // ---- 1. random traffic, private ranges: port p owns word addresses with bits 9:7 == p
    for (int p = 0; p < NP; p++) begin
      for (int n = 0; n < 300; n++) begin
        addr_t a;
        mem_op_e op;
        logic [1:0] m;
        logic [127:0] d, old, nw;
        int key;
        a = addr_t'({p[2:0], 7'($urandom % 128)});
        a[0] = 1'b0;
        key = int'(a >> 1);
        if (n < 64) begin op = OP_WRITE; a = addr_t'({p[2:0], 7'(2*n)}); key = int'(a >> 1); m = 2'b11; end
        else begin
          case ($urandom % 4) 0: op = OP_READ; 1: op = OP_WRITE; 2: op = OP_TEST_SET; default: op = OP_ATOMIC_INC; endcase
          m = 2'($urandom % 3 + 1);
          if (!shadow.exists(key)) begin op = OP_WRITE; m = 2'b11; end
        end
        d = {$urandom, $urandom, $urandom % 3 == 0 ? 32'h0 : $urandom, $urandom % 2 == 0 ? 32'h0 : $urandom};
        plist[p].push_back('{opcode: op, addr: a, mask: m, din: d});
        old = shadow.exists(key) ? shadow[key] : '0;
        nw = old;
        for (int w = 0; w < 2; w++) if (m[w]) case (op)
          OP_WRITE: nw[64*w +: 64] = d[64*w +: 64];
          OP_TEST_SET: if (old[64*w +: 64] == 0) nw[64*w +: 64] = 1;
          OP_ATOMIC_INC: nw[64*w +: 64] = old[64*w +: 64] + 1;
          default: ;
        endcase
        shadow[key] = nw;
        if (has_response(op)) expq[p].push_back(old);
      end
    end
    run_lists(cyc);
    for (int p = 0; p < NP; p++) begin
      check(results[p].size() == expq[p].size(), $sformatf("port %0d: %0d results, expected %0d", p, results[p].size(), expq[p].size()));
      foreach (expq[p][i]) if (i < results[p].size())
        check(results[p][i] == expq[p][i], $sformatf("port %0d result %0d: %h expected %h", p, i, results[p][i], expq[p][i]));
    end

    // ---- 2. shared counters, cleared first (memory starts with unknown contents)
    for (int p = 0; p < NP; p++) plist[p].delete();
    for (int c = 0; c < 4; c++) plist[0].push_back('{opcode: OP_WRITE, addr: addr_t'(48'h400 + 2*c), mask: 2'b11, din: '0});
    run_lists(cyc);
    for (int p = 0; p < NP; p++) begin
      plist[p].delete();
      for (int n = 0; n < 40; n++) plist[p].push_back('{opcode: OP_ATOMIC_INC, addr: addr_t'(48'h400 + 2*(n % 4)), mask: 2'b11, din: '0});
    end
    run_lists(cyc);
    for (int p = 1; p < NP; p++) plist[p].delete();
    plist[0].delete();
    for (int c = 0; c < 4; c++) plist[0].push_back('{opcode: OP_READ, addr: addr_t'(48'h400 + 2*c), mask: 2'b11, din: '0});
    run_lists(cyc);
    for (int c = 0; c < 4; c++)
      check(results[0][c] == {64'(NP*10), 64'(NP*10)}, $sformatf("counter %0d = %h, expected %0d", c, results[0][c], NP*10));

    // ---- idle read latency
    plist[0].delete();
    plist[0].push_back('{opcode: OP_READ, addr: 48'h400, mask: 2'b11, din: '0});
    run_lists(cyc);
    begin
      int t0;
      plist[0].delete();
      plist[0].push_back('{opcode: OP_READ, addr: 48'h402, mask: 2'b11, din: '0});
      g_drv_k_reset(0);
      wait (req[0].opcode != OP_NOP);
      #1;
      t0 = 0;
      while (!rsp[0].ready) begin @(negedge clk); #2; t0++; end
      check(t0 == 9, $sformatf("idle read: Output_ready %0d cycles after the request, expected 9 (1 queued + 8)", t0));
      repeat (3) @(negedge clk);
    end

    // ---- 3. constant stride
    foreach (int_strides[s]) begin
      int stride;
      real rate;
      stride = int_strides[s];
      for (int p = 0; p < NP; p++) begin
        plist[p].delete();
        for (int n = 0; n < 100; n++)
          plist[p].push_back('{opcode: OP_READ, addr: addr_t'((p * 100 + n) * stride % 2048), mask: 2'b11, din: '0});
      end
      run_lists(cyc);
      rate = real'(NP * 100) / real'(cyc);
      $display("stride %0d: %0d accesses in %0d cycles, %0.2f per cycle", stride, NP * 100, cyc, rate);
      if (stride == 4)   begin check(rate >= 3.0, $sformatf("stride 4 reached only %0.2f accesses per cycle", rate)); rate4 = rate; end
      if (stride == 8)   check(rate <= 2.0 && rate < rate4, $sformatf("stride 8 reached %0.2f accesses per cycle", rate));
      if (stride == 128) check(rate < 0.2,  $sformatf("stride 128 reached %0.2f accesses per cycle", rate));
    end
    // ---- 4. random addresses, all ports: reads, then atomic increments
    for (int kind = 0; kind < 2; kind++) begin
      real rate;
      for (int p = 0; p < NP; p++) begin
        plist[p].delete();
        for (int n = 0; n < 200; n++)
          plist[p].push_back('{opcode: kind == 0 ? OP_READ : OP_ATOMIC_INC, addr: addr_t'($urandom % 4096),
                               mask: 2'b11, din: '0});
      end
      run_lists(cyc);
      rate = real'(NP * 200) / real'(cyc);
      $display("random %s: %0d accesses in %0d cycles, %0.2f per cycle", kind == 0 ? "reads" : "atomics",
               NP * 200, cyc, rate);
      if (kind == 0) check(rate >= 1.2, $sformatf("random reads reached only %0.2f accesses per cycle", rate));
      else           check(rate >= 1.0, $sformatf("random atomics reached only %0.2f accesses per cycle", rate));
    end
    $display("forced=%0d skipped=%0d", n_forced, n_skipped);
    check(n_forced > 0 && n_skipped > 0, "skip bound or greedy skip never used");
    finish_tb();
  end

  int int_strides [3] = '{4, 8, 128};
endmodule
