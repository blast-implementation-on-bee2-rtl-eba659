// tb_chan_sched - drives one channel scheduler (channel 1 of 4, 8 ports) with random pending
// requests, channels, banks, order flags and busy banks, and compares every cycle's grant with
// a model of the rules: serve a port skipped 3 times first (and nothing else while its bank is
// busy), otherwise the first ready port in round-robin order from the shared pointer. It also
// checks that both the greedy skip and the forced grant occurred.
module tb_chan_sched;
  import blast_pkg::*;
  localparam int NP = 8, MS = 3, CH = 1;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NP-1:0] pend, ci;
  logic [NP-1:0][1:0] rc;
  logic [NP-1:0][2:0] rb;
  logic [7:0] bb;
  logic [2:0] rr;
  logic gv, forced, skipped;
  logic [2:0] gp;
  int sk [NP];
  int n_forced = 0, n_skipped = 0;

  chan_sched #(.NPORTS(NP), .MAX_SKIP(MS), .CHAN_ID(CH)) dut (.clk, .rst_n, .pending(pend),
    .can_issue(ci), .req_chan(rc), .req_bank(rb), .bank_busy(bb), .rr_start(rr), .grant_valid(gv),
    .grant_port(gp), .forced, .skipped);

  `include "tb_util.svh"

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    finish_tb();
  end

  initial begin
    pend = '0; ci = '0; rc = '0; rb = '0; bb = '0; rr = '0;
    foreach (sk[p]) sk[p] = 0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      int ev, ep, st;
      bit here [NP], rdy [NP], ef;
      @(negedge clk);
      // requests change only when served or occasionally withdrawn, like a real port queue
      for (int p = 0; p < NP; p++) begin
        if (!pend[p] && ($urandom % 3) == 0) begin
          pend[p] = 1'b1; rc[p] = 2'($urandom % 2 ? CH : $urandom % 4); rb[p] = 3'($urandom % 8);
        end
        ci[p] = ($urandom % 8) != 0;
      end
      bb = 8'($urandom) & 8'($urandom);
      rr = 3'($urandom % NP);
      #1;
      // model
      ev = 0; ep = 0; st = -1; ef = 0;
      for (int p = 0; p < NP; p++) begin
        here[p] = pend[p] && rc[p] == 2'(CH);
        rdy[p]  = here[p] && ci[p] && !bb[rb[p]];
        if (!here[p]) sk[p] = 0;
      end
      for (int k = 0; k < NP; k++) begin
        int p;
        p = (int'(rr) + k) % NP;
        if (st < 0 && here[p] && sk[p] >= MS) st = p;
        if (!ev && rdy[p]) begin ev = 1; ep = p; end
      end
      if (st >= 0) begin ev = rdy[st]; ep = st; ef = rdy[st]; end
      check(gv == ev && (!ev || int'(gp) == ep) && forced == ef,
            $sformatf("cycle %0d: grant %b/%0d forced %b, model %0d/%0d forced %b", n, gv, gp, forced, ev, ep, ef));
      for (int p = 0; p < NP; p++) begin
        if (here[p] && ev && p != ep) begin
          sk[p]++;
        end
        if (ev && p == ep) sk[p] = 0;
      end
      n_forced += int'(forced);
      n_skipped += int'(skipped);
      @(posedge clk);
      #1;
      if (gv) pend[gp] = 1'b0;
      for (int p = 0; p < NP; p++) if (pend[p] && rc[p] != 2'(CH) && ($urandom % 2)) pend[p] = 1'b0;
    end
    $display("forced=%0d skipped=%0d", n_forced, n_skipped);
    check(n_forced > 0 && n_skipped > 0, "forced grant or greedy skip never happened");
    finish_tb();
  end
endmodule
