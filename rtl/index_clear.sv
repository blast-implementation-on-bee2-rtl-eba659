// index_clear - phase 1 of steps 1 and 2: zeroes an index of npairs entry pairs.
//
// An index entry pair is two 64-bit words, one 128-bit port access, at word address
// base + 2*pair. Every one of the NPORTS user ports runs its own address counter: port p writes
// pairs p, p+NPORTS, p+2*NPORTS, ... and stops at the boundary npairs. Writes have no result,
// so a port moves to its next pair as soon as its current write is accepted. done rises once
// every counter has passed the boundary and every port has drained.
//
// The counter with a boundary check is the document's; spreading the pairs over all ports is
// this design's choice.
module index_clear
  import blast_pkg::*;
#(
  parameter int unsigned NPORTS = 8
)(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  addr_t                   base,
  input  logic [POS_W-1:0]        npairs,
  output mem_req_t [NPORTS-1:0]   port_req,
  input  mem_rsp_t [NPORTS-1:0]   port_rsp,
  input  logic     [NPORTS-1:0]   port_idle,
  output logic                    done
);

  logic                         active;
  logic [NPORTS-1:0][POS_W-1:0] ctr;
  logic [NPORTS-1:0]            left;

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      left[p] = active && ctr[p] < npairs;
      port_req[p] = '{opcode: left[p] ? OP_WRITE : OP_NOP,
                      addr:   base + addr_t'({ctr[p], 1'b0}),
                      mask:   '1, din: '0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      done   <= 1'b0;
      ctr    <= '0;
    end else if (start) begin
      active <= 1'b1;
      done   <= 1'b0;
      for (int p = 0; p < NPORTS; p++) ctr[p] <= POS_W'(p);
    end else if (active) begin
      for (int p = 0; p < NPORTS; p++)
        if (left[p] && !port_rsp[p].busy) ctr[p] <= ctr[p] + POS_W'(NPORTS);
      if (left == '0 && port_idle == '1) begin
        active <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

endmodule
