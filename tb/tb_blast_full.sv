// tb_blast_full - end-to-end test of blast_bce_top with every parameter at its default: k = 11
// nucleotides, a 4M-pair index A, 8 ports, 128 MB of memory; sequences of 3000 x 4000 symbols.
// See tb_blast_body.svh for what it checks.
module tb_blast_full;
  import blast_pkg::*;

  localparam int TB_K = 11, TB_S = 2, TB_LA = 3000, TB_LB = 4000, TB_MINSC = 20;
  localparam int TB_WATCHDOG = 40000000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, start, busy, done, res_valid, res_ready;
  mem_req_t host_req;
  mem_rsp_t host_rsp;
  addr_t seq_a_base, seq_b_base, index_a_base, array_a_base, index_b_base, array_b_base;
  logic [POS_W-1:0] len_a, len_b;
  logic [SCORE_W-1:0] x_drop, min_score;
  logic [3:0] phase;
  result_t res;
  logic [WORD_W-1:0] n_hits;
  logic [NCHAN-1:0] stat_forced, stat_skipped;
  logic stat_hit_dropped, stat_stop_xdrop, stat_stop_edge;

  blast_bce_top dut (.*);

  // accesses issued this cycle (grants of the memory subsystem's schedulers)
  int mem_grants;
  assign mem_grants = $countones(dut.u_mem.grant);

  `include "tb_blast_body.svh"
endmodule
