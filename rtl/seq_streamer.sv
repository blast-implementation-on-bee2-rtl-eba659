// seq_streamer - pulls a packed sequence through one user port into a shift register and
// issues the k-mers at its head.
//
// A sequence is stored from word address base upward, SPW = 64/S symbols per 64-bit word,
// symbol n of a word in bits [n*S +: S]. The streamer reads it in 128-bit blocks (two words),
// keeping up to FIFO_DEPTH reads in flight, and shifts one symbol per cycle into a register of
// K+1 symbols. Once K symbols are in, every shifted symbol completes the k-mer starting at
// pos = n-K+1 (first symbol most significant), which is offered on job_valid together with the
// symbol just in front of it (prev_sym, prev_valid = pos > 0). The shift register stalls while
// job_ready is low. done rises after the last k-mer (pos = len-K) has been taken.
//
// The shift register fed from a user port is the document's; the block FIFO, the credit scheme and
// the symbol packing are this design's.
module seq_streamer
  import blast_pkg::*;
#(
  parameter int unsigned K          = 11,
  parameter int unsigned S          = 2,
  parameter int unsigned FIFO_DEPTH = 4
)(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  addr_t              base,
  input  logic [POS_W-1:0]   len,
  output mem_req_t           port_req,
  input  mem_rsp_t           port_rsp,
  output logic               job_valid,
  input  logic               job_ready,
  output logic [POS_W-1:0]   job_pos,
  output logic [S*K-1:0]     job_kmer,
  output logic [S-1:0]       job_prev_sym,
  output logic               job_prev_valid,
  output logic               done
);

  localparam int unsigned SPW = WORD_W / S;
  localparam int unsigned SPB = 2 * SPW;
  localparam int unsigned CW  = $clog2(FIFO_DEPTH + 1);
  localparam int unsigned FW  = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;

  logic               active;
  logic [POS_W-1:0]   nblocks, rd_blk, sh_n;   // blocks to read, next block to read, symbols shifted
  logic [CW-1:0]      credit;                   // reads in flight + blocks in the FIFO
  logic [PORT_W-1:0]  fifo [FIFO_DEPTH];
  logic [FW-1:0]      wr_ptr, rd_ptr;
  logic [CW-1:0]      fcount;
  logic [PORT_W-1:0]  cur;                      // block being shifted out
  logic               cur_valid;
  logic [$clog2(SPB)-1:0] cur_sym;
  logic [S*(K+1)-1:0] shreg;
  logic               shift, job_pending, take_block, issue;
  logic [S-1:0]       sym;

  assign nblocks = (len + POS_W'(SPB - 1)) / POS_W'(SPB);
  assign issue   = active && rd_blk < nblocks && 32'(credit) < FIFO_DEPTH && !port_rsp.busy;
  assign port_req = '{opcode: (active && rd_blk < nblocks && 32'(credit) < FIFO_DEPTH) ? OP_READ : OP_NOP,
                      addr:   base + addr_t'({rd_blk, 1'b0}),
                      mask:   '1, din: '0};

  // a k-mer is waiting for job_ready
  assign job_valid      = job_pending;
  assign job_kmer       = shreg[S*K-1:0];
  assign job_prev_sym   = shreg[S*K +: S];
  assign job_prev_valid = job_pos != 0;
  assign job_pos        = sh_n - POS_W'(K);

  assign sym        = cur[32'(cur_sym)*S +: S];
  assign shift      = active && cur_valid && sh_n < len && (!job_pending || job_ready);
  assign take_block = (!cur_valid || (shift && 32'(cur_sym) == SPB - 1)) && fcount != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; done <= 1'b0;
      rd_blk <= '0; sh_n <= '0; credit <= '0;
      wr_ptr <= '0; rd_ptr <= '0; fcount <= '0;
      cur <= '0; cur_valid <= 1'b0; cur_sym <= '0;
      shreg <= '0; job_pending <= 1'b0;
    end else begin
      if (start) begin
        active <= 1'b1; done <= 1'b0;
        rd_blk <= '0; sh_n <= '0; credit <= '0;
        wr_ptr <= '0; rd_ptr <= '0; fcount <= '0;
        cur_valid <= 1'b0; cur_sym <= '0; job_pending <= 1'b0;
      end else if (active) begin
        if (issue) rd_blk <= rd_blk + 1'b1;
        if (port_rsp.ready) begin
          fifo[wr_ptr] <= port_rsp.dout;
          wr_ptr <= (32'(wr_ptr) == FIFO_DEPTH - 1) ? '0 : wr_ptr + 1'b1;
        end
        fcount <= fcount + CW'(port_rsp.ready) - CW'(take_block);
        credit <= credit + CW'(issue) - CW'(take_block);

        if (job_pending && job_ready) job_pending <= 1'b0;

        if (shift) begin
          shreg   <= {shreg[S*K-1:0], sym};
          sh_n    <= sh_n + 1'b1;
          cur_sym <= cur_sym + 1'b1;
          if (32'(sh_n) >= K - 1) job_pending <= 1'b1;
          if (32'(cur_sym) == SPB - 1) cur_valid <= 1'b0;
        end
        if (take_block) begin
          cur       <= fifo[rd_ptr];
          cur_valid <= 1'b1;
          cur_sym   <= '0;
          rd_ptr    <= (32'(rd_ptr) == FIFO_DEPTH - 1) ? '0 : rd_ptr + 1'b1;
        end
        if (sh_n == len && !(job_pending && !job_ready) && !port_rsp.busy && credit == CW'(fcount)) begin
          active <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

endmodule
