// step2_sm - one hit indexing state machine of step 2 (phases 2 and 4), with its own port.
//
// A job is a k-mer of sequence B at position i, with the symbol in front of it. The machine
// reads the k-mer's index pair in index A (word 0 = first, word 1 = end of its locations in
// array A), then reads each array-A entry in turn. Each entry is a location j in sequence A where
// the same k-mer occurs, i.e. a hit at (j, i) on diagonal d = i - j + len_a (offset so that d is
// never negative). A hit whose previous symbols also match (the entry's stored symbol in front of
// j equals the symbol in front of i) continues a hit one row above and is dropped, so a match
// longer than k is recorded once.
//  fill = 0 (phase 2): one atomic increment of both words of index-B pair d, result dropped.
//  fill = 1 (phase 4): an atomic increment of word 1 of pair d returns the fill pointer; the hit
//    {word 0 = i, word 1 = j} is written to array B at array_b_base + 2*pointer.
// n_dropped counts hits dropped as continuations.
//
// The lookups, the diagonal key, the one-row-back test and the update order follow the document.
// Carrying the symbol in front of j inside the array-A entry is this design's way to make that
// test without an extra memory access.
module step2_sm
  import blast_pkg::*;
#(
  parameter int unsigned K = 11,
  parameter int unsigned S = 2
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               fill,
  input  addr_t              index_a_base,
  input  addr_t              array_a_base,
  input  addr_t              index_b_base,
  input  addr_t              array_b_base,
  input  logic [POS_W-1:0]   len_a,
  input  logic               job_valid,
  output logic               job_ready,
  input  logic [POS_W-1:0]   job_pos,
  input  logic [S*K-1:0]     job_kmer,
  input  logic [S-1:0]       job_prev_sym,
  input  logic               job_prev_valid,
  output mem_req_t           port_req,
  input  mem_rsp_t           port_rsp,
  output logic               idle,
  output logic               hit_dropped
);

  typedef enum logic [3:0] {IDLE, RD_IDX, W_IDX, NEXT, RD_ARR, W_ARR, INC, W_INC, WR} state_e;
  state_e            state;
  logic [POS_W-1:0]  i_pos, j_pos, diag;
  logic [S*K-1:0]    kmer;
  logic [S-1:0]      psym;
  logic              pval;
  logic [WORD_W-1:0] ptr, ptr_end, hptr;
  logic [3:0]        drop;
  word_t             aent;
  logic              is_cont;

  logic inc_take;
  assign inc_take  = state == INC && !port_rsp.busy;
  assign job_ready = state == IDLE;
  assign idle      = state == IDLE && drop == 0;
  assign aent      = ptr[0] ? port_rsp.dout[2*WORD_W-1:WORD_W] : port_rsp.dout[WORD_W-1:0];
  assign is_cont   = pval && aent[AENT_PVAL_BIT] && aent[AENT_PSYM_LSB +: S] == psym;
  assign hit_dropped = state == W_ARR && port_rsp.ready && drop == 0 && is_cont;

  always_comb begin
    port_req = REQ_IDLE;
    case (state)
      RD_IDX: port_req = '{opcode: OP_READ, addr: index_a_base + addr_t'({kmer, 1'b0}),
                           mask: '1, din: '0};
      RD_ARR: port_req = '{opcode: OP_READ, addr: array_a_base + addr_t'(ptr), mask: '1, din: '0};
      INC:    port_req = '{opcode: OP_ATOMIC_INC, addr: index_b_base + addr_t'({diag, 1'b0}),
                           mask: fill ? 2'b10 : 2'b11, din: '0};
      WR:     port_req = '{opcode: OP_WRITE, addr: array_b_base + addr_t'({hptr, 1'b0}),
                           mask: '1, din: {WORD_W'(j_pos), WORD_W'(i_pos)}};
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; i_pos <= '0; j_pos <= '0; diag <= '0; kmer <= '0; psym <= '0; pval <= 1'b0;
      ptr <= '0; ptr_end <= '0; hptr <= '0; drop <= '0;
    end else begin
      case (state)
        IDLE: if (job_valid) begin
          i_pos <= job_pos; kmer <= job_kmer; psym <= job_prev_sym; pval <= job_prev_valid;
          state <= RD_IDX;
        end
        RD_IDX: if (!port_rsp.busy) state <= W_IDX;
        W_IDX: if (port_rsp.ready && drop == 0) begin
          ptr     <= port_rsp.dout[WORD_W-1:0];
          ptr_end <= port_rsp.dout[2*WORD_W-1:WORD_W];
          state   <= NEXT;
        end
        NEXT: state <= (ptr == ptr_end) ? IDLE : RD_ARR;
        RD_ARR: if (!port_rsp.busy) state <= W_ARR;
        W_ARR: if (port_rsp.ready && drop == 0) begin
          j_pos <= aent[POS_W-1:0];
          diag  <= i_pos - aent[POS_W-1:0] + len_a;
          if (is_cont) begin
            ptr   <= ptr + 1'b1;
            state <= NEXT;
          end else begin
            state <= INC;
          end
        end
        INC: if (!port_rsp.busy) begin
          if (fill) state <= W_INC;
          else begin
            ptr   <= ptr + 1'b1;
            state <= NEXT;
          end
        end
        W_INC: if (port_rsp.ready && drop == 0) begin
          hptr  <= port_rsp.dout[2*WORD_W-1:WORD_W];
          state <= WR;
        end
        WR: if (!port_rsp.busy) begin
          ptr   <= ptr + 1'b1;
          state <= NEXT;
        end
        default: state <= IDLE;
      endcase
      drop <= drop + 4'(inc_take && !fill) - 4'(port_rsp.ready && drop != 0);
    end
  end

endmodule
