// cvxif_decoder: CV-X-IF front end and controller of the Keccak co-processor.
//
// It watches the issue channel for the three custom R-type instructions
// (opcode 0x4b, funct3 4, funct7 0/1/2 = load_state / store_state /
// start_keccak), accepts them, remembers the instruction id, the destination
// register and the two source operands, waits for the core to commit the
// instruction, carries it out on the state register and the Keccak-f engine,
// and returns a result on the result channel. Any other instruction is
// answered with accept = 0 and left to the core.
//
//   load_state   writes {rs2, rs1} (rs1 in the low half) into the next lane
//                of Keccak_reg; 25 calls fill the state. No register write.
//   store_state  returns the next 32-bit word of the state in rd; 50 calls
//                read it out.
//   start_keccak runs the 24 rounds; its result (no register write) is
//                returned when the permutation is finished, so the core can
//                use it to wait for the engine. It also rewinds both the
//                lane and the word pointer to 0.
// The lane and word pointers advance by one per committed instruction and
// wrap at 25 and 50; they are this design's way of addressing the state,
// since the instruction format carries only the operands.
//
// One instruction is handled at a time: issue_ready_o is low from the
// accepting handshake until its result has been taken or it was killed, and
// while the permutation runs. Timing of one instruction: issue handshake in
// cycle T, commit in T or later (Tc); the state is updated at the end of Tc;
// result_valid_o rises in Tc + 1 (Tc + 25 for start_keccak) and is held,
// with a stable payload, until result_ready_i. A killed instruction
// (commit_kill) leaves no trace and returns no result. Commits with an id
// other than that of the pending instruction are ignored. Source operands
// are taken only when both rs_valid bits are set.
module cvxif_decoder
  import keccak_pkg::*;
  import cvxif_pkg::*;
(
  input  logic          clk_i,
  input  logic          rst_ni,
  // CV-X-IF issue channel
  input  logic          issue_valid_i,
  output logic          issue_ready_o,
  input  x_issue_req_t  issue_req_i,
  output x_issue_resp_t issue_resp_o,
  // CV-X-IF commit channel
  input  logic          commit_valid_i,
  input  x_commit_t     commit_i,
  // CV-X-IF result channel
  output logic          result_valid_o,
  input  logic          result_ready_i,
  output x_result_t     result_o,
  // to Keccak_reg
  output logic          lane_we_o,
  output lane_idx_t     lane_idx_o,
  output lane_t         lane_wdata_o,
  output word_idx_t     word_idx_o,
  input  logic [WORD_W-1:0] word_rdata_i,
  // to Keccak-f
  output logic          kf_start_o,
  input  logic          kf_done_i
);

  typedef enum logic [1:0] {S_IDLE, S_COMMIT, S_PERM, S_RESULT} state_e;

  state_e     state_q, state_d;
  keccak_op_e op_q;
  x_id_t      id_q;
  logic [4:0] rd_q;
  lane_t      operand_q;
  lane_idx_t  ld_ptr_q;
  word_idx_t  st_ptr_q;
  x_result_t  result_q;

  // ---- decode of the instruction on the issue channel ----
  logic       dec_match;
  keccak_op_e dec_op;
  logic [6:0] funct7;

  assign funct7 = issue_req_i.instr[31:25];

  always_comb begin
    dec_match = (issue_req_i.instr[6:0] == OPC_KECCAK) &&
                (issue_req_i.instr[14:12] == FUNCT3_KECCAK);
    dec_op    = OP_LOAD;
    unique case (funct7)
      F7_LOAD_STATE:   dec_op = OP_LOAD;
      F7_STORE_STATE:  dec_op = OP_STORE;
      F7_START_KECCAK: dec_op = OP_START;
      default:         dec_match = 1'b0;
    endcase
  end

  // Foreign instructions are refused at once; ours wait for their operands.
  assign issue_ready_o = (state_q == S_IDLE) && (!dec_match || (&issue_req_i.rs_valid));

  logic issue_hs, accept;
  assign issue_hs = issue_valid_i && issue_ready_o;
  assign accept   = issue_hs && dec_match;

  assign issue_resp_o.accept    = dec_match;
  assign issue_resp_o.writeback = dec_match && (dec_op == OP_STORE);

  // ---- the instruction being executed: just issued or waiting for commit ----
  keccak_op_e cur_op;
  x_id_t      cur_id;
  logic [4:0] cur_rd;
  lane_t      cur_operand;
  logic       cur_pending;

  always_comb begin
    if (state_q == S_IDLE) begin
      cur_op      = dec_op;
      cur_id      = issue_req_i.id;
      cur_rd      = issue_req_i.instr[11:7];
      cur_operand = {issue_req_i.rs[1], issue_req_i.rs[0]};
      cur_pending = accept;
    end else begin
      cur_op      = op_q;
      cur_id      = id_q;
      cur_rd      = rd_q;
      cur_operand = operand_q;
      cur_pending = (state_q == S_COMMIT);
    end
  end

  logic commit_hit, exec, kill;
  assign commit_hit = cur_pending && commit_valid_i && (commit_i.id == cur_id);
  assign exec       = commit_hit && !commit_i.commit_kill;
  assign kill       = commit_hit &&  commit_i.commit_kill;

  // ---- effects on the state register and the engine ----
  assign lane_we_o    = exec && (cur_op == OP_LOAD);
  assign lane_idx_o   = ld_ptr_q;
  assign lane_wdata_o = cur_operand;
  assign word_idx_o   = st_ptr_q;
  assign kf_start_o   = exec && (cur_op == OP_START);

  // ---- next state ----
  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S_IDLE, S_COMMIT: begin
        if (exec)       state_d = (cur_op == OP_START) ? S_PERM : S_RESULT;
        else if (kill)  state_d = S_IDLE;
        else if (accept) state_d = S_COMMIT;
      end
      S_PERM:   if (kf_done_i)      state_d = S_RESULT;
      S_RESULT: if (result_ready_i) state_d = S_IDLE;
      default:  state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q   <= S_IDLE;
      op_q      <= OP_LOAD;
      id_q      <= '0;
      rd_q      <= '0;
      operand_q <= '0;
      ld_ptr_q  <= '0;
      st_ptr_q  <= '0;
      result_q  <= '0;
    end else begin
      state_q <= state_d;
      if (accept) begin
        op_q      <= dec_op;
        id_q      <= issue_req_i.id;
        rd_q      <= issue_req_i.instr[11:7];
        operand_q <= {issue_req_i.rs[1], issue_req_i.rs[0]};
      end
      if (exec) begin
        result_q.id   <= cur_id;
        result_q.rd   <= cur_rd;
        result_q.we   <= (cur_op == OP_STORE);
        result_q.data <= (cur_op == OP_STORE) ? word_rdata_i : '0;
        unique case (cur_op)
          OP_LOAD:  ld_ptr_q <= (ld_ptr_q == lane_idx_t'(LANES - 1)) ? '0 : ld_ptr_q + 1'b1;
          OP_STORE: st_ptr_q <= (st_ptr_q == word_idx_t'(WORDS - 1)) ? '0 : st_ptr_q + 1'b1;
          OP_START: begin
            ld_ptr_q <= '0;
            st_ptr_q <= '0;
          end
          default: ;
        endcase
      end
    end
  end

  assign result_valid_o = (state_q == S_RESULT);
  assign result_o       = result_q;

  // ---- protocol rules ----
  // The result payload holds still while it waits for the core.
  a_result_stable: assert property (@(posedge clk_i) disable iff (!rst_ni)
    result_valid_o && !result_ready_i |=> result_valid_o && $stable(result_o));
  // The engine only finishes while the controller waits for it.
  a_done_in_perm: assert property (@(posedge clk_i) disable iff (!rst_ni)
    kf_done_i |-> state_q == S_PERM);
  // Nothing is issued while an instruction is in flight.
  a_one_in_flight: assert property (@(posedge clk_i) disable iff (!rst_ni)
    state_q != S_IDLE |-> !issue_ready_o);

endmodule
