// mem_subsystem - the memory subsystem of one FPGA: NPORTS virtual ports, a crossbar and four
// DDR2 channels.
//
// Users see NPORTS independent SRAM-like ports (see mem_vport). A request's channel and bank come
// from its word address: bits 3:2 pick one of four channels and bits 6:4 one of eight banks, so
// consecutive 4-word bursts go to different channels and banks. Each channel has a scheduler
// (chan_sched) that picks one ready port per cycle in a round-robin order that is global to all
// channels, skips requests whose bank is busy, and forces a request that was skipped MAX_SKIP
// times. Results return to the port that asked, in the order that port issued. The access-type
// bits 47:45 are not decoded: every address is local memory.
//
// Peak throughput is one access per channel per cycle, four per cycle in all. The read latency
// from the cycle a request is issued to its Output_ready is 8 cycles, 10 for an atomic access;
// a request waits in its port's queue for at least one cycle before it is issued.
// stat_forced and stat_skipped pulse when a channel served a request under the skip bound or
// passed a request over.
module mem_subsystem
  import blast_pkg::*;
#(
  parameter int unsigned NPORTS   = 8,
  parameter int unsigned MAX_SKIP = 3,
  parameter int unsigned ROW_BITS = 17,
  localparam int unsigned PW      = (NPORTS > 1) ? $clog2(NPORTS) : 1
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  mem_req_t [NPORTS-1:0]   user_req,
  output mem_rsp_t [NPORTS-1:0]   user_rsp,
  output logic     [NPORTS-1:0]   port_idle,
  output logic     [NCHAN-1:0]    stat_forced,
  output logic     [NCHAN-1:0]    stat_skipped
);

  logic     [NPORTS-1:0]              pending, can_issue, grant;
  mem_req_t [NPORTS-1:0]              q_req;
  logic     [NPORTS-1:0][CHAN_W-1:0]  req_chan;
  logic     [NPORTS-1:0][BANK_W-1:0]  req_bank;
  logic     [NPORTS-1:0]              p_rsp_valid;
  logic     [NPORTS-1:0][PORT_W-1:0]  p_rsp_data;
  logic     [PW-1:0]                  rr;

  logic [NCHAN-1:0]                   c_grant;
  logic [NCHAN-1:0][PW-1:0]           c_port;
  mem_req_t [NCHAN-1:0]               c_req;
  logic [NCHAN-1:0][NBANK-1:0]        c_busy, c_rsp_valid;
  logic [NCHAN-1:0][NBANK-1:0][PW-1:0]     c_rsp_port;
  logic [NCHAN-1:0][NBANK-1:0][PORT_W-1:0] c_rsp_data;

  // global round-robin pointer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        rr <= '0;
    else if (32'(rr) == NPORTS - 1)    rr <= '0;
    else                               rr <= rr + 1'b1;
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    mem_vport u_vport (
      .clk, .rst_n,
      .user_req (user_req[p]),
      .user_rsp (user_rsp[p]),
      .pending  (pending[p]),
      .q_req    (q_req[p]),
      .can_issue(can_issue[p]),
      .grant    (grant[p]),
      .rsp_valid(p_rsp_valid[p]),
      .rsp_data (p_rsp_data[p]),
      .idle     (port_idle[p])
    );
    assign req_chan[p] = q_req[p].addr[CHAN_LSB +: CHAN_W];
    assign req_bank[p] = q_req[p].addr[BANK_LSB +: BANK_W];
  end

  for (genvar c = 0; c < NCHAN; c++) begin : g_chan
    chan_sched #(.NPORTS(NPORTS), .MAX_SKIP(MAX_SKIP), .CHAN_ID(c)) u_sched (
      .clk, .rst_n,
      .pending, .can_issue, .req_chan, .req_bank,
      .bank_busy  (c_busy[c]),
      .rr_start   (rr),
      .grant_valid(c_grant[c]),
      .grant_port (c_port[c]),
      .forced     (stat_forced[c]),
      .skipped    (stat_skipped[c])
    );
    assign c_req[c] = q_req[c_port[c]];
    dram_ctrl #(.NPORTS(NPORTS), .ROW_BITS(ROW_BITS)) u_dram (
      .clk, .rst_n,
      .issue     (c_grant[c]),
      .issue_port(c_port[c]),
      .issue_req (c_req[c]),
      .bank_busy (c_busy[c]),
      .rsp_valid (c_rsp_valid[c]),
      .rsp_port  (c_rsp_port[c]),
      .rsp_data  (c_rsp_data[c])
    );
  end

  // crossbar: grants back to ports, results back to the port that asked
  always_comb begin
    grant       = '0;
    p_rsp_valid = '0;
    p_rsp_data  = '0;
    for (int c = 0; c < NCHAN; c++) begin
      if (c_grant[c]) grant[c_port[c]] = 1'b1;
      for (int b = 0; b < NBANK; b++) begin
        if (c_rsp_valid[c][b]) begin
          p_rsp_valid[c_rsp_port[c][b]] = 1'b1;
          p_rsp_data[c_rsp_port[c][b]]  = c_rsp_data[c][b];
        end
      end
    end
  end

endmodule
