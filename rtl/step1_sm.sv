// step1_sm - one k-mer indexing state machine of step 1 (phases 2 and 4), with its own port.
//
// It takes one k-mer job at a time from the sequence shift register.
//  fill = 0 (histogram, phase 2): one atomic increment of both words of the k-mer's index pair
//    at index_base + 2*kmer. Its result is not needed, so the machine is free again as soon as
//    the port accepts the request; the returned result is dropped when it arrives.
//  fill = 1 (packed array, phase 4): an atomic increment of word 1 of the pair (the fill pointer)
//    returns the pointer before the increment; the machine then writes the array-A entry for
//    the k-mer to word address array_base + pointer. The entry holds the k-mer's position in
//    bits 31:0, the symbol in front of it in bits 32 +: S and a valid flag for that symbol in
//    bit 48.
// idle is high when the machine holds no job and expects no result. Because the memory
// controller increments atomically, any number of these machines may update the same counters.
//
// Both sequences of operations are the document's; the entry layout is this design's.
// Only the low 48 bits of a returned pointer are used, the width of a word address.
module step1_sm
  import blast_pkg::*;
#(
  parameter int unsigned K = 11,
  parameter int unsigned S = 2
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               fill,
  input  addr_t              index_base,
  input  addr_t              array_base,
  input  logic               job_valid,
  output logic               job_ready,
  input  logic [POS_W-1:0]   job_pos,
  input  logic [S*K-1:0]     job_kmer,
  input  logic [S-1:0]       job_prev_sym,
  input  logic               job_prev_valid,
  output mem_req_t           port_req,
  input  mem_rsp_t           port_rsp,
  output logic               idle
);

  typedef enum logic [1:0] {IDLE, INC, WAIT, WR} state_e;
  state_e            state;
  logic [POS_W-1:0]  pos;
  logic [S*K-1:0]    kmer;
  logic [S-1:0]      psym;
  logic              pval;
  logic [WORD_W-1:0] ptr;
  logic [3:0]        drop;       // results still to come that nobody waits for
  word_t             entry;

  logic inc_take;
  assign inc_take  = state == INC && !port_rsp.busy;
  assign job_ready = state == IDLE;
  assign idle      = state == IDLE && drop == 0;

  always_comb begin
    entry = '0;
    entry[POS_W-1:0]           = pos;
    entry[AENT_PSYM_LSB +: S]  = psym;
    entry[AENT_PVAL_BIT]       = pval;
    port_req = REQ_IDLE;
    case (state)
      INC: port_req = '{opcode: OP_ATOMIC_INC, addr: index_base + addr_t'({kmer, 1'b0}),
                        mask: fill ? 2'b10 : 2'b11, din: '0};
      WR:  port_req = '{opcode: OP_WRITE, addr: array_base + addr_t'(ptr),
                        mask: ptr[0] ? 2'b10 : 2'b01, din: {entry, entry}};
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; pos <= '0; kmer <= '0; psym <= '0; pval <= 1'b0; ptr <= '0; drop <= '0;
    end else begin
      case (state)
        IDLE: if (job_valid) begin
          pos <= job_pos; kmer <= job_kmer; psym <= job_prev_sym; pval <= job_prev_valid;
          state <= INC;
        end
        INC:  if (!port_rsp.busy) state <= fill ? WAIT : IDLE;
        WAIT: if (port_rsp.ready && drop == 0) begin
          ptr   <= port_rsp.dout[2*WORD_W-1:WORD_W];
          state <= WR;
        end
        WR:   if (!port_rsp.busy) state <= IDLE;
        default: state <= IDLE;
      endcase
      // results of histogram increments are dropped in order
      drop <= drop + 4'(inc_take && !fill) - 4'(port_rsp.ready && drop != 0);
    end
  end

endmodule
