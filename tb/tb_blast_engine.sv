// tb_blast_engine - end-to-end test of blast_engine on a smaller machine than the top's default:
// 4 virtual ports (3 state machines per set), k = 5, skip bound 2, a 1024-entry index A and
// 2^8 rows per channel, 300 x 400 symbols. The testbench joins the engine to mem_subsystem
// with the same host multiplexer on port 0 as blast_bce_top, so the shared body
// (tb_blast_body.svh) drives and checks it exactly as it does the top.
module tb_blast_engine;
  import blast_pkg::*;

  localparam int TB_K = 5, TB_S = 2, TB_LA = 300, TB_LB = 400, TB_MINSC = 14;
  localparam int TB_WATCHDOG = 400000;
  localparam int NP = 4;

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

  mem_req_t [NP-1:0] eng_req, mem_req;
  mem_rsp_t [NP-1:0] mem_rsp;
  logic     [NP-1:0] port_idle;

  blast_engine #(.NPORTS(NP), .K(TB_K), .S(TB_S)) dut (
    .clk, .rst_n, .start,
    .seq_a_base, .len_a, .seq_b_base, .len_b,
    .index_a_base, .array_a_base, .index_b_base, .array_b_base,
    .x_drop, .min_score,
    .port_req(eng_req), .port_rsp(mem_rsp), .port_idle,
    .busy, .done, .phase,
    .res_valid, .res_ready, .res, .n_hits,
    .ev_hit_dropped(stat_hit_dropped), .ev_stop_xdrop(stat_stop_xdrop), .ev_stop_edge(stat_stop_edge)
  );

  always_comb begin
    mem_req = eng_req;
    if (!busy && !start) mem_req[0] = host_req;
    host_rsp = mem_rsp[0];
    if (busy) host_rsp.busy = 1'b1;
  end

  mem_subsystem #(.NPORTS(NP), .MAX_SKIP(2), .ROW_BITS(8)) u_mem (
    .clk, .rst_n, .user_req(mem_req), .user_rsp(mem_rsp), .port_idle,
    .stat_forced, .stat_skipped
  );

  // accesses issued this cycle (grants of the memory subsystem's schedulers)
  int mem_grants;
  assign mem_grants = $countones(u_mem.grant);

  `include "tb_blast_body.svh"
endmodule
