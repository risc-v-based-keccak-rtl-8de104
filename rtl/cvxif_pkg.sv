// cvxif_pkg: the subset of the CORE-V eXtension Interface (CV-X-IF) used by
// the Keccak co-processor, as packed structs.
//
// Four channels connect the core and the co-processor: issue (the core
// offers an instruction with its source operands; valid/ready handshake, the
// response comes back in the same cycle), commit (the core later tells
// whether an issued instruction may take effect or is killed), and result
// (the co-processor returns the value for rd; valid/ready handshake). The
// field names follow the public CV-X-IF specification; only the fields this
// co-processor needs are kept (no memory, exception or dual-register
// fields). The id width of 4 bits and the 32-bit register width (RV32)
// are this design's choices.
package cvxif_pkg;

  localparam int unsigned X_ID_WIDTH  = 4;
  localparam int unsigned X_NUM_RS    = 2;
  localparam int unsigned X_RFR_WIDTH = 32;
  localparam int unsigned X_RFW_WIDTH = 32;

  typedef logic [X_ID_WIDTH-1:0] x_id_t;

  typedef struct packed {
    logic [31:0]                           instr;     // offloaded instruction
    x_id_t                                 id;        // instruction id
    logic [X_NUM_RS-1:0][X_RFR_WIDTH-1:0]  rs;        // rs[0] = rs1, rs[1] = rs2
    logic [X_NUM_RS-1:0]                   rs_valid;  // operands valid
  } x_issue_req_t;

  typedef struct packed {
    logic accept;     // instruction taken by the co-processor
    logic writeback;  // it will write rd
  } x_issue_resp_t;

  typedef struct packed {
    x_id_t id;
    logic  commit_kill;  // 1: drop the instruction, 0: let it take effect
  } x_commit_t;

  typedef struct packed {
    x_id_t                  id;
    logic [X_RFW_WIDTH-1:0] data;
    logic [4:0]             rd;
    logic                   we;
  } x_result_t;

endpackage
