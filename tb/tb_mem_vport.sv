// tb_mem_vport - a user issues 3000 random requests to one virtual port while the testbench
// plays scheduler and DRAM: it grants the queued request at random when the port allows it and
// returns each result LAT-1 cycles after its grant, tagged with the request's number. Checks:
// requests reach the scheduler once each, in order and unchanged; can_issue follows the ordering
// rule (an access may issue only if its result would come after the last outstanding one);
// results reach Dout with Output_ready one cycle later, in order; idle is right at the end.
module tb_mem_vport;
  import blast_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  mem_req_t ureq, qreq;
  mem_rsp_t ursp;
  logic pend, ci, grant, rv, idle;
  logic [PORT_W-1:0] rd;

  mem_vport dut (.clk, .rst_n, .user_req(ureq), .user_rsp(ursp), .pending(pend), .q_req(qreq),
    .can_issue(ci), .grant, .rsp_valid(rv), .rsp_data(rd), .idle);

  `include "tb_util.svh"

  mem_req_t sent [$];     // accepted by the port, not yet granted
  int       exp_rsp [$];  // tags of results still to come, in order
  int       due [int];    // cycle -> tag of the result the DRAM returns then
  int       cyc = 0, rem = 0, n_sent = 0, n_got = 0, n_order_block = 0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    finish_tb();
  end

  // scheduler and DRAM side
  always @(negedge clk) if (rst_n) begin
    bit model_ci;
    model_ci = pend && (!has_response(qreq.opcode) || int'(op_latency(qreq.opcode)) > rem);
    check(ci == model_ci, $sformatf("can_issue %b, model %b (rem %0d)", ci, model_ci, rem));
    if (pend && !ci) n_order_block++;
    grant = ci && ($urandom % 3 != 0);
    rv = due.exists(cyc);
    rd = rv ? PORT_W'(due[cyc]) : '0;
    if (rv) due.delete(cyc);
  end

  always @(posedge clk) if (rst_n) begin
    // request accepted by the port
    if (ureq.opcode != OP_NOP && !ursp.busy) sent.push_back(ureq);
    if (grant) begin
      mem_req_t s;
      s = sent.pop_front();
      check(qreq == s, "granted request differs from the one accepted");
      if (has_response(qreq.opcode)) begin
        due[cyc + int'(op_latency(qreq.opcode)) - 1] = int'(qreq.din[31:0]);
        exp_rsp.push_back(int'(qreq.din[31:0]));
        rem = int'(op_latency(qreq.opcode)) - 1;
      end else if (rem > 0) rem--;
    end else if (rem > 0) rem--;
    cyc++;
  end

  // user side: results
  always @(posedge clk) if (rst_n && ursp.ready) begin
    int e;
    e = exp_rsp.pop_front();
    check(int'(ursp.dout) == e, $sformatf("result %0d, expected %0d", ursp.dout, e));
    n_got++;
  end

  initial begin
    ureq = REQ_IDLE; grant = 0; rv = 0; rd = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    while (n_sent < 3000) begin
      @(negedge clk);
      #1;
      if (ureq.opcode == OP_NOP || !ursp.busy) begin
        // the previous request (if any) is taken at this edge; offer a new one or nothing
        if ($urandom % 4 != 0) begin
          mem_op_e op;
          case ($urandom % 4) 0: op = OP_READ; 1: op = OP_WRITE; 2: op = OP_TEST_SET; default: op = OP_ATOMIC_INC; endcase
          ureq = '{opcode: op, addr: addr_t'({$urandom, $urandom}), mask: 2'($urandom), din: PORT_W'(n_sent)};
          n_sent++;
        end else ureq = REQ_IDLE;
      end
    end
    @(negedge clk); #1;
    while (ursp.busy) begin @(negedge clk); #1; end
    ureq = REQ_IDLE;
    repeat (20) @(posedge clk);
    check(exp_rsp.size() == 0 && sent.size() == 0, "requests or results left over");
    check(idle, "port not idle at the end");
    check(n_order_block > 0, "ordering rule never held a request back");
    $display("results=%0d order_blocks=%0d", n_got, n_order_block);
    finish_tb();
  end
endmodule
