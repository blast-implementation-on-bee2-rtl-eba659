// mem_vport - one virtual port of the memory subsystem.
//
// The user side is the SRAM-like port of the memory subsystem: Opcode/Addr/Word_mask/Din in,
// Dout/Busy/Output_ready out. The queue holds exactly one request. A request is accepted in a
// cycle where the opcode is not OP_NOP and Busy is low; Busy is high while the queue holds a
// request that the channel scheduler does not take this cycle, so a port can accept one request
// per cycle when the scheduler keeps up. Requests leave the queue in order, and results come back
// in issue order: the port only lets its queued request be issued when its latency is longer than
// the time left for its last outstanding result (a plain read behind an atomic waits up to two
// cycles). Writes produce no result. Results arrive on rsp_valid/rsp_data and appear on Dout one
// cycle later with a one-cycle Output_ready pulse.
//
// The one-entry queue and in-order service follow the document; the ordering rule based on
// latency and the registered Dout are this design's choices.
// The assertions use rst_n synchronously (disable iff) while the flops reset asynchronously;
// lint notes this mixed use, which is intended.
module mem_vport
  import blast_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // user side
  input  mem_req_t  user_req,
  output mem_rsp_t  user_rsp,
  // scheduler side
  output logic      pending,     // queue holds a request
  output mem_req_t  q_req,       // the queued request
  output logic      can_issue,   // issuing it now keeps results in order
  input  logic      grant,       // scheduler takes the queued request this cycle
  // result side
  input  logic               rsp_valid,
  input  logic [PORT_W-1:0]  rsp_data,
  output logic               idle        // nothing queued, nothing outstanding
);

  logic              full;
  mem_req_t          q;
  logic [LAT_W-1:0]  rem;          // cycles until the last outstanding result arrives
  logic [3:0]        outstanding;  // results still to come
  logic              accept;

  assign pending   = full;
  assign q_req     = q;
  assign can_issue = full && (!has_response(q.opcode) || op_latency(q.opcode) > rem);
  assign user_rsp.busy = full && !grant;
  assign accept    = (user_req.opcode != OP_NOP) && !user_rsp.busy;
  assign idle      = !full && outstanding == 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full           <= 1'b0;
      q              <= REQ_IDLE;
      rem            <= '0;
      outstanding    <= '0;
      user_rsp.ready <= 1'b0;
      user_rsp.dout  <= '0;
    end else begin
      if (accept) begin
        full <= 1'b1;
        q    <= user_req;
      end else if (grant) begin
        full <= 1'b0;
      end

      if (grant && has_response(q.opcode)) rem <= op_latency(q.opcode) - 1'b1;
      else if (rem != 0)                   rem <= rem - 1'b1;

      case ({grant && has_response(q.opcode), rsp_valid})
        2'b10:   outstanding <= outstanding + 1'b1;
        2'b01:   outstanding <= outstanding - 1'b1;
        default: ;
      endcase

      user_rsp.ready <= rsp_valid;
      if (rsp_valid) user_rsp.dout <= rsp_data;
    end
  end

  // a granted request must be one that may issue
  a_grant_ok: assert property (@(posedge clk) disable iff (!rst_n) grant |-> can_issue);
  a_no_stray: assert property (@(posedge clk) disable iff (!rst_n) rsp_valid |-> outstanding != 0 || (grant && has_response(q.opcode)));

endmodule
