// blast_engine - runs the three BLAST steps on two sequences held in memory.
//
// Step 1 indexes the k-mers of sequence A, step 2 indexes the hits of sequence B against that
// index by diagonal, step 3 expands the hits of every diagonal. Steps 1 and 2 each have four
// phases: clear the index (index_clear), build a histogram (phase 2), turn it into pointers
// (index_scan, phase 3) and fill the packed array (phase 4). In phases 2 and 4 the sequence shift
// register (seq_streamer, on port 0) hands k-mers to the first free one of NPORTS-1 identical state
// machines (step1_sm or step2_sm), each with its own port 1..NPORTS-1. In step 3 an index
// counter hands diagonals 0 .. len_a+len_b-1 to the first free step3_sm, again one per port.
// Clearing uses every port; the scan runs two lanes, reading through ports 0 and 2 and writing
// through ports 1 and 3 (so NPORTS must be at least 4). A phase
// ends when its unit is done and every port has drained. Results of step 3 leave on a
// valid/ready stream, one per cycle, lowest machine first.
//
// Memory layout (word addresses, all given by the inputs): index A has 2^(S*K) pairs of
// 64-bit words, array A one word per k-mer of A, index B len_a+len_b pairs (diagonal
// d = i - j + len_a), array B one pair {i, j} per hit. Sequences are packed 64/S symbols per word.
// start is taken in IDLE; done is high from the end of the run to the next start.
//
// The steps, phases, state-machine sets and their port use follow the document; the port
// assignment, the dispatching and the handshakes are this design's.
module blast_engine
  import blast_pkg::*;
#(
  parameter int unsigned NPORTS   = 8,
  parameter int unsigned K        = 11,
  parameter int unsigned S        = 2,
  parameter int          MATCH    = 1,
  parameter int          MISMATCH = -3
)(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  addr_t                  seq_a_base,
  input  logic [POS_W-1:0]       len_a,
  input  addr_t                  seq_b_base,
  input  logic [POS_W-1:0]       len_b,
  input  addr_t                  index_a_base,
  input  addr_t                  array_a_base,
  input  addr_t                  index_b_base,
  input  addr_t                  array_b_base,
  input  logic [SCORE_W-1:0]     x_drop,
  input  logic [SCORE_W-1:0]     min_score,
  output mem_req_t [NPORTS-1:0]  port_req,
  input  mem_rsp_t [NPORTS-1:0]  port_rsp,
  input  logic     [NPORTS-1:0]  port_idle,
  output logic                   busy,
  output logic                   done,
  output logic [3:0]             phase,
  output logic                   res_valid,
  input  logic                   res_ready,
  output result_t                res,
  output logic [WORD_W-1:0]      n_hits,        // hits recorded in array B
  output logic                   ev_hit_dropped,
  output logic                   ev_stop_xdrop,
  output logic                   ev_stop_edge
);

  localparam int unsigned NSM = NPORTS - 1;

  typedef enum logic [3:0] {IDLE, S1_CLR, S1_HIST, S1_SCAN, S1_FILL,
                            S2_CLR, S2_HIST, S2_SCAN, S2_FILL, S3, DONE} phase_e;
  phase_e st;
  logic   go;   // first cycle of a phase

  assign phase = st;
  assign busy  = st != IDLE && st != DONE;
  assign done  = st == DONE;

  // ---------------------------------------------------------------- units
  logic     step2, fill;
  assign step2 = st inside {S2_HIST, S2_FILL};
  assign fill  = st inside {S1_FILL, S2_FILL};

  // clear
  mem_req_t [NPORTS-1:0] clr_req;
  logic clr_done;
  index_clear #(.NPORTS(NPORTS)) u_clear (
    .clk, .rst_n,
    .start (go && st inside {S1_CLR, S2_CLR}),
    .base  (st == S1_CLR ? index_a_base : index_b_base),
    .npairs(st == S1_CLR ? POS_W'(2**(S*K)) : len_a + len_b),
    .port_req(clr_req), .port_rsp, .port_idle, .done(clr_done)
  );

  // scan
  mem_req_t [1:0] scan_rd, scan_wr;
  logic scan_done;
  logic [WORD_W-1:0] scan_total;
  index_scan u_scan (
    .clk, .rst_n,
    .start (go && st inside {S1_SCAN, S2_SCAN}),
    .base  (st == S1_SCAN ? index_a_base : index_b_base),
    .npairs(st == S1_SCAN ? POS_W'(2**(S*K)) : len_a + len_b),
    .rd_req(scan_rd), .rd_rsp({port_rsp[2], port_rsp[0]}),
    .wr_req(scan_wr), .wr_rsp({port_rsp[3], port_rsp[1]}), .wr_idle({port_idle[3], port_idle[1]}),
    .done(scan_done), .total(scan_total)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            n_hits <= '0;
    else if (st == S2_SCAN && scan_done)   n_hits <= scan_total;
  end

  // sequence shift register
  mem_req_t            str_req;
  logic                job_valid, job_ready, str_done;
  logic [POS_W-1:0]    job_pos;
  logic [S*K-1:0]      job_kmer;
  logic [S-1:0]        job_psym;
  logic                job_pval;
  seq_streamer #(.K(K), .S(S)) u_stream (
    .clk, .rst_n,
    .start (go && st inside {S1_HIST, S1_FILL, S2_HIST, S2_FILL}),
    .base  (st inside {S1_HIST, S1_FILL} ? seq_a_base : seq_b_base),
    .len   (st inside {S1_HIST, S1_FILL} ? len_a : len_b),
    .port_req(str_req), .port_rsp(port_rsp[0]),
    .job_valid, .job_ready, .job_pos, .job_kmer,
    .job_prev_sym(job_psym), .job_prev_valid(job_pval), .done(str_done)
  );

  // state machine sets
  mem_req_t [NSM-1:0] sm1_req, sm2_req, sm3_req;
  logic     [NSM-1:0] sm1_rdy, sm2_rdy, sm3_rdy, sm1_idle, sm2_idle, sm3_idle;
  logic     [NSM-1:0] sm1_go, sm2_go, sm3_go, drop_ev, sx_ev, se_ev;
  logic     [NSM-1:0] sm3_rv, sm3_rr;
  result_t  [NSM-1:0] sm3_res;
  logic     [NSM-1:0] first_rdy1, first_rdy2, first_rdy3, first_res;
  logic [POS_W-1:0]   dctr;
  logic               s1_on, s2_on, s3_on;

  assign s1_on = st inside {S1_HIST, S1_FILL};
  assign s2_on = step2;
  assign s3_on = st == S3;

  // lowest set bit of each request vector
  assign first_rdy1 = sm1_rdy & ~(sm1_rdy - 1'b1);
  assign first_rdy2 = sm2_rdy & ~(sm2_rdy - 1'b1);
  assign first_rdy3 = sm3_rdy & ~(sm3_rdy - 1'b1);
  assign first_res  = sm3_rv  & ~(sm3_rv  - 1'b1);

  assign sm1_go = (s1_on && job_valid) ? first_rdy1 : '0;
  assign sm2_go = (s2_on && job_valid) ? first_rdy2 : '0;
  assign sm3_go = (s3_on && !go && dctr < len_a + len_b) ? first_rdy3 : '0;
  assign job_ready = s1_on ? (sm1_rdy != '0) : s2_on ? (sm2_rdy != '0) : 1'b0;

  for (genvar m = 0; m < NSM; m++) begin : g_sm
    step1_sm #(.K(K), .S(S)) u_s1 (
      .clk, .rst_n, .fill, .index_base(index_a_base), .array_base(array_a_base),
      .job_valid(sm1_go[m]), .job_ready(sm1_rdy[m]), .job_pos, .job_kmer,
      .job_prev_sym(job_psym), .job_prev_valid(job_pval),
      .port_req(sm1_req[m]), .port_rsp(port_rsp[m+1]), .idle(sm1_idle[m])
    );
    step2_sm #(.K(K), .S(S)) u_s2 (
      .clk, .rst_n, .fill, .index_a_base, .array_a_base, .index_b_base, .array_b_base, .len_a,
      .job_valid(sm2_go[m]), .job_ready(sm2_rdy[m]), .job_pos, .job_kmer,
      .job_prev_sym(job_psym), .job_prev_valid(job_pval),
      .port_req(sm2_req[m]), .port_rsp(port_rsp[m+1]), .idle(sm2_idle[m]),
      .hit_dropped(drop_ev[m])
    );
    step3_sm #(.K(K), .S(S), .MATCH(MATCH), .MISMATCH(MISMATCH)) u_s3 (
      .clk, .rst_n, .index_b_base, .array_b_base, .seq_a_base, .seq_b_base, .len_a, .len_b,
      .x_drop, .min_score,
      .job_valid(sm3_go[m]), .job_ready(sm3_rdy[m]), .job_diag(dctr),
      .port_req(sm3_req[m]), .port_rsp(port_rsp[m+1]), .idle(sm3_idle[m]),
      .res_valid(sm3_rv[m]), .res_ready(sm3_rr[m]), .res(sm3_res[m]),
      .stop_xdrop(sx_ev[m]), .stop_edge(se_ev[m])
    );
  end

  assign ev_hit_dropped = |drop_ev;
  assign ev_stop_xdrop  = |sx_ev;
  assign ev_stop_edge   = |se_ev;

  // result stream
  always_comb begin
    res_valid = sm3_rv != '0;
    res       = '0;
    for (int m = 0; m < NSM; m++) if (first_res[m]) res = sm3_res[m];
    sm3_rr = res_ready ? first_res : '0;
  end

  // port routing
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      port_req[p] = REQ_IDLE;
      unique case (st)
        S1_CLR, S2_CLR: port_req[p] = clr_req[p];
        S1_SCAN, S2_SCAN: begin
          if (p == 0) port_req[p] = scan_rd[0];
          if (p == 1) port_req[p] = scan_wr[0];
          if (p == 2) port_req[p] = scan_rd[1];
          if (p == 3) port_req[p] = scan_wr[1];
        end
        S1_HIST, S1_FILL: port_req[p] = (p == 0) ? str_req : sm1_req[p-1];
        S2_HIST, S2_FILL: port_req[p] = (p == 0) ? str_req : sm2_req[p-1];
        S3:               if (p != 0) port_req[p] = sm3_req[p-1];
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------------------- sequencer
  logic drained;
  assign drained = port_idle == '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= IDLE;
      go   <= 1'b0;
      dctr <= '0;
    end else begin
      go <= 1'b0;
      if (sm3_go != '0) dctr <= dctr + 1'b1;
      if (!go) begin
        unique case (st)
          IDLE, DONE: if (start) begin st <= S1_CLR; go <= 1'b1; end
          S1_CLR:  if (clr_done)  begin st <= S1_HIST; go <= 1'b1; end
          S1_HIST: if (str_done && sm1_idle == '1 && drained) begin st <= S1_SCAN; go <= 1'b1; end
          S1_SCAN: if (scan_done) begin st <= S1_FILL; go <= 1'b1; end
          S1_FILL: if (str_done && sm1_idle == '1 && drained) begin st <= S2_CLR; go <= 1'b1; end
          S2_CLR:  if (clr_done)  begin st <= S2_HIST; go <= 1'b1; end
          S2_HIST: if (str_done && sm2_idle == '1 && drained) begin st <= S2_SCAN; go <= 1'b1; end
          S2_SCAN: if (scan_done) begin st <= S2_FILL; go <= 1'b1; end
          S2_FILL: if (str_done && sm2_idle == '1 && drained) begin st <= S3; go <= 1'b1; dctr <= '0; end
          S3:      if (dctr == len_a + len_b && sm3_go == '0 && sm3_idle == '1 && drained) st <= DONE;
          default: st <= IDLE;
        endcase
      end
    end
  end

endmodule
