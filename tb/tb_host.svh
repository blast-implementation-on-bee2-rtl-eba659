// Host access to a memory subsystem port (host_req / host_rsp) for the unit testbenches.

  task automatic host_op(input mem_op_e op, input addr_t a, input logic [1:0] m,
                         input logic [127:0] d, output logic [127:0] q);
    @(negedge clk);
    host_req = '{opcode: op, addr: a, mask: m, din: d};
    #1;
    while (host_rsp.busy) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1 host_req = REQ_IDLE;
    q = '0;
    if (has_response(op)) begin
      while (!host_rsp.ready) @(posedge clk);
      q = host_rsp.dout;
    end
  endtask

  task automatic mwrite(input addr_t a, input logic [127:0] d);
    logic [127:0] q;
    host_op(OP_WRITE, a, 2'b11, d, q);
  endtask

  task automatic mread(input addr_t a, output logic [127:0] q);
    host_op(OP_READ, a, 2'b11, '0, q);
  endtask
