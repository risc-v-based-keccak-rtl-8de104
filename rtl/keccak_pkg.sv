// keccak_pkg: sizes, types and constants shared by the Keccak co-processor.
//
// The Keccak-f[1600] state is 25 lanes of 64 bits (a 5x5 matrix). A lane at
// column x and row y sits at index x + 5*y, so lane 0 occupies state bits
// [63:0]; this is the usual FIPS 202 ordering. The 50 32-bit words read back
// by store_state are the lanes split in two, low half first (word 2*i is
// lane i bits [31:0], word 2*i+1 is lane i bits [63:32]).
//
// The round constants and the rho rotation offsets are the FIPS 202 values,
// kept here as tables. The custom instruction encoding follows the R-type
// form ".insn r 0x4b, 0x04, beta, rd, rs1, rs2": opcode 0x4b, funct3 4 and
// funct7 = beta. Which beta selects which instruction is not fixed by the
// description this design follows; the order 0 = load_state,
// 1 = store_state, 2 = start_keccak is this design's choice.
package keccak_pkg;

  localparam int unsigned LANES    = 25;   // 5x5 lanes
  localparam int unsigned LANE_W   = 64;   // bits per lane
  localparam int unsigned STATE_W  = LANES * LANE_W;  // 1600
  localparam int unsigned WORD_W   = 32;   // width of a store_state result
  localparam int unsigned WORDS    = STATE_W / WORD_W; // 50
  localparam int unsigned NR       = 24;   // rounds of Keccak-f[1600]

  typedef logic [LANE_W-1:0]            lane_t;
  typedef logic [LANES-1:0][LANE_W-1:0] state_t;
  typedef logic [$clog2(LANES)-1:0]     lane_idx_t;
  typedef logic [$clog2(WORDS)-1:0]     word_idx_t;
  typedef logic [$clog2(NR)-1:0]        round_idx_t;

  // Custom instruction encoding (R-type).
  localparam logic [6:0] OPC_KECCAK    = 7'h4B;
  localparam logic [2:0] FUNCT3_KECCAK = 3'h4;

  typedef enum logic [6:0] {
    F7_LOAD_STATE   = 7'd0,
    F7_STORE_STATE  = 7'd1,
    F7_START_KECCAK = 7'd2
  } keccak_funct7_e;

  typedef enum logic [1:0] {
    OP_LOAD  = 2'd0,
    OP_STORE = 2'd1,
    OP_START = 2'd2
  } keccak_op_e;

  // Iota round constants RC[0..23].
  localparam lane_t RC [NR] = '{
    64'h0000000000000001, 64'h0000000000008082, 64'h800000000000808A,
    64'h8000000080008000, 64'h000000000000808B, 64'h0000000080000001,
    64'h8000000080008081, 64'h8000000000008009, 64'h000000000000008A,
    64'h0000000000000088, 64'h0000000080008009, 64'h000000008000000A,
    64'h000000008000808B, 64'h800000000000008B, 64'h8000000000008089,
    64'h8000000000008003, 64'h8000000000008002, 64'h8000000000000080,
    64'h000000000000800A, 64'h800000008000000A, 64'h8000000080008081,
    64'h8000000000008080, 64'h0000000080000001, 64'h8000000080008008
  };

  // Rho rotation offsets, indexed by lane x + 5*y.
  localparam int unsigned RHO [LANES] = '{
     0,  1, 62, 28, 27,
    36, 44,  6, 55, 20,
     3, 10, 43, 25, 39,
    41, 45, 15, 21,  8,
    18,  2, 61, 56, 14
  };

  function automatic lane_t rol64(lane_t v, int unsigned n);
    return (n == 0) ? v : ((v << n) | (v >> (LANE_W - n)));
  endfunction

endpackage
