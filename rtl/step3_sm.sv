// step3_sm - one hit expansion state machine of step 3, with its own port.
//
// A job is one diagonal d of the hit index. The machine reads index-B pair d (word 0 = first,
// word 1 = end of the diagonal's hits in array B) and then, for each hit {i, j} (k-mer at
// position j of sequence A and i of sequence B), runs an ungapped X-drop extension:
//  - upstream, comparing a[j-1-s] with b[i-1-s] for s = 0, 1, ..., and then
//  - downstream, comparing a[j+K+s] with b[i+K+s],
// adding MATCH or MISMATCH per symbol pair to a running score and keeping the best score and
// the number of symbols at which it was reached. A direction ends when the best score minus the
// running score reaches x_drop or a sequence boundary is met. The hit's score is
// K*MATCH + best upstream + best downstream; when it is at least min_score the segment
// {a start, b start, length, score} is offered on res_valid and held until res_ready.
// Sequences are packed as for seq_streamer. The machine keeps the last 128-bit block it read of
// each sequence and reads a new block only when the next symbol lies outside it, so a random hit,
// which usually dies within a few symbols, costs one read per sequence.
// One symbol pair is compared per cycle. stop_xdrop / stop_edge pulse when a direction ends.
//
// Reading the index, walking the diagonal's hits and X-drop extension in both directions are the
// document's. Running the upstream extension to its end before the downstream one, the
// match/mismatch scores (+1/-3, the usual nucleotide scores) and reporting by a score threshold
// in place of an e-value are this design's choices.
module step3_sm
  import blast_pkg::*;
#(
  parameter int unsigned K        = 11,
  parameter int unsigned S        = 2,
  parameter int          MATCH    = 1,
  parameter int          MISMATCH = -3
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  addr_t                index_b_base,
  input  addr_t                array_b_base,
  input  addr_t                seq_a_base,
  input  addr_t                seq_b_base,
  input  logic [POS_W-1:0]     len_a,
  input  logic [POS_W-1:0]     len_b,
  input  logic [SCORE_W-1:0]   x_drop,
  input  logic [SCORE_W-1:0]   min_score,
  input  logic                 job_valid,
  output logic                 job_ready,
  input  logic [POS_W-1:0]     job_diag,
  output mem_req_t             port_req,
  input  mem_rsp_t             port_rsp,
  output logic                 idle,
  output logic                 res_valid,
  input  logic                 res_ready,
  output result_t              res,
  output logic                 stop_xdrop,
  output logic                 stop_edge
);

  localparam int unsigned SPB = 2 * (WORD_W / S);

  typedef enum logic [3:0] {IDLE, RD_IDX, W_IDX, NEXT, RD_HIT, W_HIT, EXT, RD_A, W_A, RD_B, W_B,
                            REPORT} state_e;
  typedef logic signed [SCORE_W-1:0] score_t;

  state_e            state;
  logic [POS_W-1:0]  diag, i_pos, j_pos;
  logic [WORD_W-1:0] ptr, ptr_end;
  logic              dir;               // 0 upstream, 1 downstream
  logic [POS_W-1:0]  s, n_max;
  score_t            cur, best, l_best;
  logic [POS_W-1:0]  best_len, l_len;
  logic              a_ok, b_ok;
  logic [POS_W-1:0]  a_tag, b_tag;
  logic [PORT_W-1:0] a_blk, b_blk;
  logic [POS_W-1:0]  pa, pb, ba, bb;
  logic [S-1:0]      sa, sb;
  score_t            nxt;
  logic              hit_a, hit_b, end_x, end_e;
  score_t            total;
  logic [POS_W-1:0]  ii, jj, ra, rb, fl;
  score_t            fb;

  assign ii = port_rsp.dout[POS_W-1:0];
  assign jj = port_rsp.dout[WORD_W +: POS_W];
  assign ra = len_a - j_pos - POS_W'(K);
  assign rb = len_b - i_pos - POS_W'(K);
  // best score and length of a direction, including the pair compared in its last cycle
  assign fb = (s != n_max && hit_a && hit_b && nxt > best) ? nxt : best;
  assign fl = (s != n_max && hit_a && hit_b && nxt > best) ? s + 1'b1 : best_len;

  assign job_ready = state == IDLE;
  assign idle      = state == IDLE;

  assign pa = dir ? j_pos + POS_W'(K) + s : j_pos - 1'b1 - s;
  assign pb = dir ? i_pos + POS_W'(K) + s : i_pos - 1'b1 - s;
  assign ba = pa / POS_W'(SPB);
  assign bb = pb / POS_W'(SPB);
  assign hit_a = a_ok && a_tag == ba;
  assign hit_b = b_ok && b_tag == bb;
  assign sa  = a_blk[32'(pa % POS_W'(SPB)) * S +: S];
  assign sb  = b_blk[32'(pb % POS_W'(SPB)) * S +: S];
  assign nxt = cur + score_t'((sa == sb) ? MATCH : MISMATCH);
  // a direction ends on the x-drop rule or at the last symbol pair inside both sequences
  assign end_x = state == EXT && s != n_max && hit_a && hit_b &&
                 ((nxt > best ? nxt : best) - nxt) >= score_t'(x_drop);
  assign end_e = state == EXT && (s == n_max || (hit_a && hit_b && !end_x && s + 1'b1 == n_max));
  assign stop_xdrop = end_x;
  assign stop_edge  = end_e && !end_x;
  assign total = score_t'(K * MATCH) + l_best + best;

  always_comb begin
    port_req = REQ_IDLE;
    case (state)
      RD_IDX: port_req = '{opcode: OP_READ, addr: index_b_base + addr_t'({diag, 1'b0}), mask: '1, din: '0};
      RD_HIT: port_req = '{opcode: OP_READ, addr: array_b_base + addr_t'({ptr, 1'b0}), mask: '1, din: '0};
      RD_A:   port_req = '{opcode: OP_READ, addr: seq_a_base + addr_t'({ba, 1'b0}), mask: '1, din: '0};
      RD_B:   port_req = '{opcode: OP_READ, addr: seq_b_base + addr_t'({bb, 1'b0}), mask: '1, din: '0};
      default: ;
    endcase
    res_valid = state == REPORT && total >= score_t'(min_score);
    res.a_pos = j_pos - l_len;
    res.b_pos = i_pos - l_len;
    res.len   = l_len + POS_W'(K) + best_len;
    res.score = total;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; diag <= '0; i_pos <= '0; j_pos <= '0; ptr <= '0; ptr_end <= '0;
      dir <= 1'b0; s <= '0; n_max <= '0; cur <= '0; best <= '0; l_best <= '0;
      best_len <= '0; l_len <= '0; a_ok <= 1'b0; b_ok <= 1'b0; a_tag <= '0; b_tag <= '0;
      a_blk <= '0; b_blk <= '0;
    end else begin
      case (state)
        IDLE: if (job_valid) begin
          diag  <= job_diag;
          a_ok  <= 1'b0;
          b_ok  <= 1'b0;
          state <= RD_IDX;
        end
        RD_IDX: if (!port_rsp.busy) state <= W_IDX;
        W_IDX: if (port_rsp.ready) begin
          ptr     <= port_rsp.dout[WORD_W-1:0];
          ptr_end <= port_rsp.dout[2*WORD_W-1:WORD_W];
          state   <= NEXT;
        end
        NEXT: state <= (ptr == ptr_end) ? IDLE : RD_HIT;
        RD_HIT: if (!port_rsp.busy) state <= W_HIT;
        W_HIT: if (port_rsp.ready) begin
          i_pos <= ii;
          j_pos <= jj;
          dir   <= 1'b0;
          s     <= '0;
          n_max <= (ii < jj) ? ii : jj;
          cur   <= '0;
          best  <= '0;
          best_len <= '0;
          state <= EXT;
        end
        EXT: begin
          if (s == n_max || end_x || end_e) begin
            if (!dir) begin
              // upstream done: keep its result, start downstream
              l_best <= fb;
              l_len  <= fl;
              dir   <= 1'b1;
              s     <= '0;
              n_max <= (ra < rb) ? ra : rb;
              cur   <= '0;
              best  <= '0;
              best_len <= '0;
            end else begin
              best     <= fb;
              best_len <= fl;
              state    <= REPORT;
            end
          end else if (!hit_a) begin
            state <= RD_A;
          end else if (!hit_b) begin
            state <= RD_B;
          end else begin
            cur <= nxt;
            if (nxt > best) begin
              best     <= nxt;
              best_len <= s + 1'b1;
            end
            s <= s + 1'b1;
          end
        end
        RD_A: if (!port_rsp.busy) state <= W_A;
        W_A: if (port_rsp.ready) begin
          a_blk <= port_rsp.dout; a_tag <= ba; a_ok <= 1'b1; state <= EXT;
        end
        RD_B: if (!port_rsp.busy) state <= W_B;
        W_B: if (port_rsp.ready) begin
          b_blk <= port_rsp.dout; b_tag <= bb; b_ok <= 1'b1; state <= EXT;
        end
        REPORT: if (!res_valid || res_ready) begin
          ptr   <= ptr + 1'b1;
          state <= NEXT;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
