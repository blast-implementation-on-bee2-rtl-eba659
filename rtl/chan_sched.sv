// chan_sched - request scheduler of one DRAM channel (the crossbar's channel side).
//
// Every cycle it picks at most one virtual port whose queued request targets this channel and
// issues it to the channel's DRAM controller. Ports are scanned in round-robin order starting at
// rr_start, a pointer shared by all channels. The choice is greedy: a request whose bank is still
// busy with an earlier access is skipped and the next port in the order is served, so the banks
// are kept busy. To bound latency, each port has a skip counter that counts the cycles in which
// its request was passed over while another port was served; once it reaches MAX_SKIP the port
// is served next, before any other request on this channel, as soon as its bank frees up.
// A request that may not issue yet because of the port's result ordering counts as blocked
// like a busy bank.
//
// Round robin, greedy bank skipping and the skip bound of 3 are the document's; counting a skip
// per served cycle and the shared pointer input are this design's reading of them.
// The assertion uses rst_n synchronously (disable iff) while the flops reset asynchronously;
// lint notes this mixed use, which is intended.
module chan_sched
  import blast_pkg::*;
#(
  parameter int unsigned NPORTS   = 8,
  parameter int unsigned MAX_SKIP = 3,
  parameter int unsigned CHAN_ID  = 0,
  localparam int unsigned PW      = (NPORTS > 1) ? $clog2(NPORTS) : 1
)(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NPORTS-1:0]        pending,
  input  logic [NPORTS-1:0]        can_issue,
  input  logic [NPORTS-1:0][CHAN_W-1:0] req_chan,
  input  logic [NPORTS-1:0][BANK_W-1:0] req_bank,
  input  logic [NBANK-1:0]         bank_busy,
  input  logic [PW-1:0]            rr_start,
  output logic                     grant_valid,
  output logic [PW-1:0]            grant_port,
  output logic                     forced,      // this grant was made under the skip bound
  output logic                     skipped      // a request was passed over this cycle
);

  logic [NPORTS-1:0] here, ready;
  logic [NPORTS-1:0][3:0] skip_cnt;
  logic              starving;
  logic [PW-1:0]     starve_port;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      here[p]  = pending[p] && req_chan[p] == CHAN_W'(CHAN_ID);
      ready[p] = here[p] && can_issue[p] && !bank_busy[req_bank[p]];
    end
  end

  // first starving port, then first ready port, both in round-robin order
  always_comb begin
    int unsigned idx;
    starving    = 1'b0;
    starve_port = '0;
    grant_valid = 1'b0;
    grant_port  = '0;
    for (int unsigned k = 0; k < NPORTS; k++) begin
      idx = (int'(rr_start) + k) % NPORTS;
      if (!starving && here[idx] && 32'(skip_cnt[idx]) >= MAX_SKIP) begin
        starving    = 1'b1;
        starve_port = PW'(idx);
      end
      if (!grant_valid && ready[idx]) begin
        grant_valid = 1'b1;
        grant_port  = PW'(idx);
      end
    end
    if (starving) begin
      grant_valid = ready[starve_port];
      grant_port  = starve_port;
    end
    forced  = starving && grant_valid;
    skipped = grant_valid && ((here & ~(NPORTS'(1) << grant_port)) != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      skip_cnt <= '0;
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        if (!here[p] || (grant_valid && grant_port == PW'(p)))
          skip_cnt[p] <= '0;
        else if (grant_valid && skip_cnt[p] != 4'hf)
          skip_cnt[p] <= skip_cnt[p] + 1'b1;
      end
    end
  end

  a_one_channel: assert property (@(posedge clk) disable iff (!rst_n)
                                  grant_valid |-> here[grant_port] && ready[grant_port]);

endmodule
