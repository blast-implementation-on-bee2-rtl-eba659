// blast_pkg - types and constants shared by the BLAST engine and its memory subsystem.
//
// The memory side follows the user port of the memory subsystem: a 48-bit word address,
// a per-word mask, a 128-bit (two 64-bit words) data path, a 3-bit opcode, a Busy flag and an
// Output_ready strobe. The physical word address is split, from the least significant bit, into
// a 2-bit word-in-burst field, a 2-bit channel field, a 3-bit bank field and the row above it;
// the top three bits carry the access type. DRAM timing is counted in 100 MHz circuit cycles:
// 3 for RAS, 3 for CAS and 2 for data, and an atomic read-modify-write adds one 2-cycle data
// transfer to the 8 of a plain access.
//
// Opcode encoding, the array-A entry layout and the scoring constants are this design's choices.
package blast_pkg;

  localparam int unsigned ADDR_W     = 48;
  localparam int unsigned WORD_W     = 64;
  localparam int unsigned PORT_WORDS = 2;
  localparam int unsigned PORT_W     = PORT_WORDS * WORD_W;
  localparam int unsigned OP_W       = 3;

  // physical address fields (word address)
  localparam int unsigned BLOCK_LSB = 0;   // word within a 4-word burst
  localparam int unsigned CHAN_LSB  = 2;   // channel
  localparam int unsigned BANK_LSB  = 4;   // bank
  localparam int unsigned ROW_LSB   = 7;   // row / column bits start here
  localparam int unsigned TYPE_LSB  = 45;  // access type, bits 47:45
  localparam int unsigned NCHAN     = 4;
  localparam int unsigned NBANK     = 8;
  localparam int unsigned CHAN_W    = 2;
  localparam int unsigned BANK_W    = 3;

  // DRAM timing in circuit cycles
  localparam int unsigned T_RAS       = 3;
  localparam int unsigned T_CAS       = 3;
  localparam int unsigned T_DATA      = 2;
  localparam int unsigned LAT_RW      = T_RAS + T_CAS + T_DATA;  // 8
  localparam int unsigned LAT_ATOMIC  = LAT_RW + T_DATA;         // 10
  localparam int unsigned LAT_W       = 4;

  typedef enum logic [OP_W-1:0] {
    OP_NOP        = 3'd0,
    OP_READ       = 3'd1,
    OP_WRITE      = 3'd2,
    OP_TEST_SET   = 3'd3,   // per masked word: return old value, write 1 if it was 0
    OP_ATOMIC_INC = 3'd4    // per masked word: return old value, write old + 1
  } mem_op_e;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [WORD_W-1:0] word_t;

  // request from a user to a virtual port; opcode OP_NOP means no request
  typedef struct packed {
    mem_op_e                 opcode;
    addr_t                   addr;
    logic [PORT_WORDS-1:0]   mask;
    logic [PORT_W-1:0]       din;
  } mem_req_t;

  // what a virtual port returns to its user
  typedef struct packed {
    logic                    busy;
    logic                    ready;   // Output_ready: dout holds a read/atomic result
    logic [PORT_W-1:0]       dout;
  } mem_rsp_t;

  localparam mem_req_t REQ_IDLE = '{opcode: OP_NOP, addr: '0, mask: '0, din: '0};

  function automatic logic has_response(mem_op_e op);
    return op == OP_READ || op == OP_TEST_SET || op == OP_ATOMIC_INC;
  endfunction

  function automatic logic [LAT_W-1:0] op_latency(mem_op_e op);
    return (op == OP_TEST_SET || op == OP_ATOMIC_INC) ? LAT_W'(LAT_ATOMIC) : LAT_W'(LAT_RW);
  endfunction

  // ---------------------------------------------------------------- BLAST data layout
  localparam int unsigned POS_W   = 32;   // sequence positions and array pointers
  localparam int unsigned SCORE_W = 16;

  // array-A entry: location of a k-mer in sequence A plus the symbol in front of it,
  // which step 2 uses to drop hits that continue a hit one row above
  localparam int unsigned AENT_PSYM_LSB = 32;
  localparam int unsigned AENT_PVAL_BIT = 48;

  typedef struct packed {
    logic [POS_W-1:0]   a_pos;   // start of the extended segment in sequence A
    logic [POS_W-1:0]   b_pos;   // start of the extended segment in sequence B
    logic [POS_W-1:0]   len;     // symbols in the segment
    logic [SCORE_W-1:0] score;
  } result_t;

endpackage
