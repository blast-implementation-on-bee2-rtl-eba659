// index_scan - phase 3 of steps 1 and 2: turns a histogram index into packed-array pointers.
//
// Entry pair i (word address base + 2*i) holds the count of its key in word 0 after the
// histogram phase. The scan streams the pairs in with read address counters, keeps a running
// sum in an accumulator register, and writes each pair back with write address counters as
// {start, start}, where start is the sum of the counts of all earlier keys (an exclusive prefix
// sum, relative to the array base). In phase 4 word 1 serves as the fill pointer of the key and
// ends as its end pointer, so the key's locations are array entries [word 0, word 1). total is
// the sum of all counts.
//
// Two neighbouring pairs share one 4-word burst block and so one DRAM bank. Through a single
// in-order port the second would always wait for the first's bank. The scan therefore works in
// two lanes: lane 0 reads and writes the even pairs, lane 1 the odd ones, each through its own
// read port and write port (rd_req[l]/wr_req[l]). Each lane has a read FIFO of FIFO_DEPTH counts
// (a read is issued only with room reserved) and a write FIFO of FIFO_DEPTH pointers. The
// accumulator takes counts alternately from the two read FIFOs, in pair order, and hands each
// result to the write FIFO of the same lane, so the four ports run independently of each other.
// done rises once every pair has been written and both write ports are idle.
//
// The counters, adder and accumulator are the document's. The exclusive sum relative to the
// array base is this design's reading of the listed pseudo-code, which writes the running sum
// including the key's own count; the two lanes and the FIFOs are this design's.
// Only the Busy bit of the write ports' responses is used: those ports never read.
module index_scan
  import blast_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
)(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  addr_t                base,
  input  logic [POS_W-1:0]     npairs,
  output mem_req_t [1:0]       rd_req,
  input  mem_rsp_t [1:0]       rd_rsp,
  output mem_req_t [1:0]       wr_req,
  input  mem_rsp_t [1:0]       wr_rsp,
  input  logic     [1:0]       wr_idle,
  output logic                 done,
  output logic [WORD_W-1:0]    total
);

  localparam int unsigned FW = $clog2(FIFO_DEPTH);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic                     active;
  logic [WORD_W-1:0]        acc;
  logic [POS_W-1:0]         acc_ctr;                 // next pair to accumulate
  logic [1:0][POS_W-1:0]    rd_ctr, wr_ctr;          // pairs read / written per lane
  logic [WORD_W-1:0]        rfifo [2][FIFO_DEPTH];
  logic [WORD_W-1:0]        wfifo [2][FIFO_DEPTH];
  logic [1:0][FW-1:0]       rwp, rrp, wwp, wrp;
  logic [1:0][CW-1:0]       credit, rcount, wcount;
  logic [1:0]               rd_go, wr_go, rd_take, wr_take;
  logic                     lane, acc_go;
  logic [POS_W-1:0]         rd_pair [2];
  logic [POS_W-1:0]         wr_pair [2];

  assign lane   = acc_ctr[0];
  assign acc_go = active && acc_ctr < npairs && rcount[lane] != 0 && 32'(wcount[lane]) < FIFO_DEPTH;
  assign total  = acc;

  for (genvar l = 0; l < 2; l++) begin : g_lane
    assign rd_pair[l] = {rd_ctr[l][POS_W-2:0], 1'(l)};
    assign wr_pair[l] = {wr_ctr[l][POS_W-2:0], 1'(l)};
    assign rd_go[l]   = active && rd_pair[l] < npairs && 32'(credit[l]) < FIFO_DEPTH;
    assign wr_go[l]   = active && wcount[l] != 0;
    assign rd_req[l]  = '{opcode: rd_go[l] ? OP_READ : OP_NOP, addr: base + addr_t'({rd_pair[l], 1'b0}),
                          mask: '1, din: '0};
    assign wr_req[l]  = '{opcode: wr_go[l] ? OP_WRITE : OP_NOP, addr: base + addr_t'({wr_pair[l], 1'b0}),
                          mask: '1, din: {wfifo[l][wrp[l]], wfifo[l][wrp[l]]}};
    assign rd_take[l] = rd_go[l] && !rd_rsp[l].busy;
    assign wr_take[l] = wr_go[l] && !wr_rsp[l].busy;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; done <= 1'b0;
      acc <= '0; acc_ctr <= '0; rd_ctr <= '0; wr_ctr <= '0;
      rwp <= '0; rrp <= '0; wwp <= '0; wrp <= '0;
      credit <= '0; rcount <= '0; wcount <= '0;
    end else if (start) begin
      active <= 1'b1; done <= 1'b0;
      acc <= '0; acc_ctr <= '0; rd_ctr <= '0; wr_ctr <= '0;
      rwp <= '0; rrp <= '0; wwp <= '0; wrp <= '0;
      credit <= '0; rcount <= '0; wcount <= '0;
    end else if (active) begin
      for (int l = 0; l < 2; l++) begin
        if (rd_take[l]) rd_ctr[l] <= rd_ctr[l] + 1'b1;
        if (rd_rsp[l].ready) begin
          rfifo[l][rwp[l]] <= rd_rsp[l].dout[WORD_W-1:0];
          rwp[l] <= rwp[l] + 1'b1;
        end
        if (wr_take[l]) begin
          wrp[l]    <= wrp[l] + 1'b1;
          wr_ctr[l] <= wr_ctr[l] + 1'b1;
        end
        rcount[l] <= rcount[l] + CW'(rd_rsp[l].ready) - CW'(acc_go && lane == 1'(l));
        credit[l] <= credit[l] + CW'(rd_take[l])     - CW'(acc_go && lane == 1'(l));
        wcount[l] <= wcount[l] + CW'(acc_go && lane == 1'(l)) - CW'(wr_take[l]);
      end
      if (acc_go) begin
        wfifo[lane][wwp[lane]] <= acc;
        wwp[lane] <= wwp[lane] + 1'b1;
        rrp[lane] <= rrp[lane] + 1'b1;
        acc       <= acc + rfifo[lane][rrp[lane]];
        acc_ctr   <= acc_ctr + 1'b1;
      end
      if (acc_ctr == npairs && wcount == '0 && wr_idle == 2'b11) begin
        active <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

endmodule
