// tb_dram_ctrl - issues writes, reads, test&set and atomic increments to one channel controller
// and checks: the result data against a shadow copy of the cells, the result arriving exactly
// LAT-1 cycles after issue (7 for read, 9 for atomic) on the bank's slot with the right port, the
// bank staying busy for exactly LAT cycles, and eight back-to-back accesses to eight banks.
module tb_dram_ctrl;
  import blast_pkg::*;
  localparam int RB = 3;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic issue = 1'b0;
  logic [2:0] port;
  mem_req_t r;
  logic [NBANK-1:0] busy, rv;
  logic [NBANK-1:0][2:0] rp;
  logic [NBANK-1:0][PORT_W-1:0] rd;
  logic [PORT_W-1:0] shadow [2**(RB+4)];

  dram_ctrl #(.NPORTS(8), .ROW_BITS(RB)) dut (.clk, .rst_n, .issue, .issue_port(port), .issue_req(r),
    .bank_busy(busy), .rsp_valid(rv), .rsp_port(rp), .rsp_data(rd));

  `include "tb_util.svh"

  function automatic int idx(addr_t a);
    return {a[ROW_LSB +: RB], a[BANK_LSB +: 3], a[1]};
  endfunction

  // issue one access at the next edge and check its result and bank timing
  task automatic access(input mem_op_e op, input addr_t a, input logic [1:0] m, input logic [127:0] d,
                        input logic [2:0] pt);
    logic [127:0] old, nw;
    int b, lat;
    b = int'(a[BANK_LSB +: 3]);
    lat = int'(op_latency(op));
    old = shadow[idx(a)];
    nw = old;
    for (int w = 0; w < 2; w++) if (m[w]) case (op)
      OP_WRITE:      nw[64*w +: 64] = d[64*w +: 64];
      OP_TEST_SET:   if (old[64*w +: 64] == 0) nw[64*w +: 64] = 1;
      OP_ATOMIC_INC: nw[64*w +: 64] = old[64*w +: 64] + 1;
      default: ;
    endcase
    shadow[idx(a)] = nw;
    @(negedge clk);
    while (busy[b]) @(negedge clk);
    issue = 1'b1; r = '{opcode: op, addr: a, mask: m, din: d}; port = pt;
    @(negedge clk);
    issue = 1'b0; r = REQ_IDLE;
    for (int t = 1; t <= lat; t++) begin
      check(busy[b] == (t < lat), $sformatf("bank %0d busy=%b %0d cycles after issue", b, busy[b], t));
      if (has_response(op))
        check(rv[b] == (t == lat - 1), $sformatf("result valid=%b %0d cycles after issue", rv[b], t));
      if (t == lat - 1 && has_response(op))
        check(rd[b] == old && rp[b] == pt, $sformatf("result %h port %0d, expected %h", rd[b], rp[b], old));
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    finish_tb();
  end

  initial begin
    r = REQ_IDLE; port = '0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int i = 0; i < 2**(RB+4); i++) begin
      addr_t a;
      logic [127:0] d;
      a = addr_t'({i[RB+3:4], 3'(i[3:1]), 4'(i[0] * 2)});
      d = {$urandom, $urandom, $urandom, $urandom};
      access(OP_WRITE, a, 2'b11, d, 3'(i % 8));
    end
    for (int n = 0; n < 150; n++) begin
      addr_t a;
      mem_op_e op;
      a = addr_t'($urandom % 2**(RB+7));
      case ($urandom % 4)
        0: op = OP_READ; 1: op = OP_WRITE; 2: op = OP_TEST_SET; default: op = OP_ATOMIC_INC;
      endcase
      if (op == OP_TEST_SET && n % 2 == 0) begin
        logic [127:0] q;
        access(OP_WRITE, a, 2'b11, '0, 3'd1);   // make some test&set find a zero
      end
      access(op, a, 2'($urandom % 3 + 1), {$urandom, $urandom, $urandom, $urandom}, 3'($urandom % 8));
    end
    // eight banks back to back: one issue per cycle
    @(negedge clk);
    for (int b = 0; b < 8; b++) begin
      check(!busy[b], $sformatf("bank %0d busy before burst", b));
      issue = 1'b1; r = '{opcode: OP_READ, addr: addr_t'(b << BANK_LSB), mask: 2'b11, din: '0}; port = 3'(b);
      @(negedge clk);
    end
    issue = 1'b0; r = REQ_IDLE;
    check(busy == 8'hfe, "banks 1-7 busy and bank 0 free again eight cycles after its read");
    finish_tb();
  end
endmodule
