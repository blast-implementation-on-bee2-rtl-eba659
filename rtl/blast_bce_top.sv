// blast_bce_top - BLAST on one basic computing element: the BLAST engine on the FPGA and the
// four-channel DDR2 memory subsystem it works in.
//
// The host loads the two sequences into memory, and may read any memory back, through the host
// port, which is the user port of virtual port 0 whenever the engine is not running (Busy is held
// high while it runs). It then sets the layout and score inputs and pulses start; the engine runs
// steps 1-3 and streams one result per extended hit that reaches min_score on res_valid/res.
// done stays high from the end of the run until the next start; phase shows the running phase
// (1..4 step 1 phases 1-4, 5..8 step 2 phases 1-4, 9 step 3, 10 done).
//
// Defaults: 8 virtual ports (7 state machines per set), k = 11 nucleotides at 2 bits each, skip
// bound 3, and 2^17 rows of 128 words per channel (128 MB in all). The stat_* outputs pulse on
// scheduler and engine events and are meant for performance counters.
module blast_bce_top
  import blast_pkg::*;
#(
  parameter int unsigned NPORTS   = 8,
  parameter int unsigned K        = 11,
  parameter int unsigned S        = 2,
  parameter int unsigned MAX_SKIP = 3,
  parameter int unsigned ROW_BITS = 17,
  parameter int          MATCH    = 1,
  parameter int          MISMATCH = -3
)(
  input  logic               clk,
  input  logic               rst_n,
  // host port
  input  mem_req_t           host_req,
  output mem_rsp_t           host_rsp,
  // run control and layout
  input  logic               start,
  input  addr_t              seq_a_base,
  input  logic [POS_W-1:0]   len_a,
  input  addr_t              seq_b_base,
  input  logic [POS_W-1:0]   len_b,
  input  addr_t              index_a_base,
  input  addr_t              array_a_base,
  input  addr_t              index_b_base,
  input  addr_t              array_b_base,
  input  logic [SCORE_W-1:0] x_drop,
  input  logic [SCORE_W-1:0] min_score,
  output logic               busy,
  output logic               done,
  output logic [3:0]         phase,
  // results
  output logic               res_valid,
  input  logic               res_ready,
  output result_t            res,
  output logic [WORD_W-1:0]  n_hits,
  // event pulses
  output logic [NCHAN-1:0]   stat_forced,
  output logic [NCHAN-1:0]   stat_skipped,
  output logic               stat_hit_dropped,
  output logic               stat_stop_xdrop,
  output logic               stat_stop_edge
);

  mem_req_t [NPORTS-1:0] eng_req, mem_req;
  mem_rsp_t [NPORTS-1:0] mem_rsp;
  logic     [NPORTS-1:0] port_idle;

  blast_engine #(.NPORTS(NPORTS), .K(K), .S(S), .MATCH(MATCH), .MISMATCH(MISMATCH)) u_engine (
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

  mem_subsystem #(.NPORTS(NPORTS), .MAX_SKIP(MAX_SKIP), .ROW_BITS(ROW_BITS)) u_mem (
    .clk, .rst_n,
    .user_req(mem_req), .user_rsp(mem_rsp), .port_idle,
    .stat_forced, .stat_skipped
  );

endmodule
