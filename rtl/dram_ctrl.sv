// dram_ctrl - controller of one DDR2 channel with its eight banks, plus the cells behind it.
//
// The scheduler issues at most one access per cycle. An access occupies its bank for the DDR2
// access time: LAT_RW = 8 cycles (3 RAS, 3 CAS, 2 data) for a read or write, and LAT_ATOMIC = 10
// for an atomic access, which reads and then writes the same location with one extra 2-cycle
// data transfer and no second RAS. A bank takes no new access while it is busy; with eight banks
// and eight-cycle accesses the channel sustains one access per cycle when consecutive accesses go
// to different banks (the additive-latency pipelining of DDR2). Read, test&set and atomic
// increment return the old contents of the two addressed words LAT-1 cycles after issue on the
// result slot of their bank, tagged with the port that asked; writes return nothing.
//
// The cells are an array of 128-bit entries indexed by {row, bank, word pair}, updated in the
// cycle of issue; only the result is delayed. This keeps one read and one write per cycle on the
// array and makes every atomic operation indivisible. The DIMM itself and the DDR2 command and
// pin protocol are not modelled; ROW_BITS sets how much of the row/column address is stored.
// Timing numbers and the operations follow the document; the storage model is this design's.
// The assertion uses rst_n synchronously (disable iff) while the flops reset asynchronously;
// lint notes this mixed use, which is intended.
module dram_ctrl
  import blast_pkg::*;
#(
  parameter int unsigned NPORTS   = 8,
  parameter int unsigned ROW_BITS = 17,
  localparam int unsigned PW      = (NPORTS > 1) ? $clog2(NPORTS) : 1
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    issue,
  input  logic [PW-1:0]           issue_port,
  input  mem_req_t                issue_req,
  output logic [NBANK-1:0]        bank_busy,
  output logic [NBANK-1:0]        rsp_valid,
  output logic [NBANK-1:0][PW-1:0]     rsp_port,
  output logic [NBANK-1:0][PORT_W-1:0] rsp_data
);

  localparam int unsigned IDX_W = ROW_BITS + BANK_W + 1;

  logic [PORT_W-1:0] cells [2**IDX_W];

  logic [NBANK-1:0][LAT_W-1:0] cnt;
  logic [NBANK-1:0]            want_rsp;

  logic [BANK_W-1:0]   bank;
  logic [IDX_W-1:0]    idx;
  logic [PORT_W-1:0]   old_data, new_data;

  assign bank = issue_req.addr[BANK_LSB +: BANK_W];
  assign idx  = {issue_req.addr[ROW_LSB +: ROW_BITS], bank, issue_req.addr[BLOCK_LSB + 1]};
  assign old_data = cells[idx];

  always_comb begin
    new_data = old_data;
    for (int w = 0; w < PORT_WORDS; w++) begin
      if (issue_req.mask[w]) begin
        unique case (issue_req.opcode)
          OP_WRITE:      new_data[w*WORD_W +: WORD_W] = issue_req.din[w*WORD_W +: WORD_W];
          OP_TEST_SET:   if (old_data[w*WORD_W +: WORD_W] == '0) new_data[w*WORD_W +: WORD_W] = WORD_W'(1);
          OP_ATOMIC_INC: new_data[w*WORD_W +: WORD_W] = old_data[w*WORD_W +: WORD_W] + 1'b1;
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (issue && issue_req.opcode != OP_READ) cells[idx] <= new_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      want_rsp <= '0;
      rsp_port <= '0;
      rsp_data <= '0;
    end else begin
      for (int b = 0; b < NBANK; b++) begin
        if (issue && bank == BANK_W'(b)) begin
          cnt[b]      <= op_latency(issue_req.opcode) - 1'b1;
          want_rsp[b] <= has_response(issue_req.opcode);
          rsp_port[b] <= issue_port;
          rsp_data[b] <= old_data;
        end else if (cnt[b] != 0) begin
          cnt[b] <= cnt[b] - 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      bank_busy[b] = cnt[b] != 0;
      rsp_valid[b] = want_rsp[b] && cnt[b] == 1;
    end
  end

  a_bank_free: assert property (@(posedge clk) disable iff (!rst_n) issue |-> !bank_busy[bank]);

endmodule
