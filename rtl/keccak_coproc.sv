// keccak_coproc: Keccak co-processor for a RISC-V core with a CORE-V
// eXtension Interface (CV-X-IF); the top of this design (the "Keccak
// wrapper").
//
// Hashing on a small RV32 core is slow mostly because the 1600-bit Keccak
// state does not fit in its register file and must be shuffled between
// memory and registers all the time. This co-processor keeps the state in
// its own register and exposes three custom instructions to the core:
// load_state (25 calls, 64 bits each, from rs1/rs2), start_keccak (the 24
// rounds of Keccak-f[1600], one round per cycle) and store_state (50 calls,
// 32 bits each, into rd). The core needs no change: instructions reach the
// co-processor through the CV-X-IF issue channel, the core commits or kills
// them on the commit channel, and results come back on the result channel.
//
// Blocks: cvxif_decoder (decode, id/rd tracking, control), keccak_reg (the
// state register) and keccak_f (the round engine, which rewrites keccak_reg
// once per cycle). The ports are the CV-X-IF channels as packed structs of
// cvxif_pkg; see cvxif_decoder for the timing of each instruction. Clock
// and active-low asynchronous reset are shared by all blocks. The split into
// decoder, state register and round engine, the three instructions and the
// one-round-per-cycle permutation follow the design described; the CV-X-IF
// field subset, the state pointers and the reset are this design's choices.
module keccak_coproc
  import keccak_pkg::*;
  import cvxif_pkg::*;
(
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          issue_valid_i,
  output logic          issue_ready_o,
  input  x_issue_req_t  issue_req_i,
  output x_issue_resp_t issue_resp_o,
  input  logic          commit_valid_i,
  input  x_commit_t     commit_i,
  output logic          result_valid_o,
  input  logic          result_ready_i,
  output x_result_t     result_o
);

  logic              lane_we;
  lane_idx_t         lane_idx;
  lane_t             lane_wdata;
  word_idx_t         word_idx;
  logic [WORD_W-1:0] word_rdata;
  logic              kf_start, kf_done, kf_we, kf_busy;
  state_t            state, state_next;

  cvxif_decoder u_decoder (
    .clk_i          (clk_i),
    .rst_ni         (rst_ni),
    .issue_valid_i  (issue_valid_i),
    .issue_ready_o  (issue_ready_o),
    .issue_req_i    (issue_req_i),
    .issue_resp_o   (issue_resp_o),
    .commit_valid_i (commit_valid_i),
    .commit_i       (commit_i),
    .result_valid_o (result_valid_o),
    .result_ready_i (result_ready_i),
    .result_o       (result_o),
    .lane_we_o      (lane_we),
    .lane_idx_o     (lane_idx),
    .lane_wdata_o   (lane_wdata),
    .word_idx_o     (word_idx),
    .word_rdata_i   (word_rdata),
    .kf_start_o     (kf_start),
    .kf_done_i      (kf_done)
  );

  keccak_reg u_keccak_reg (
    .clk_i         (clk_i),
    .rst_ni        (rst_ni),
    .lane_we_i     (lane_we),
    .lane_idx_i    (lane_idx),
    .lane_wdata_i  (lane_wdata),
    .state_we_i    (kf_we),
    .state_wdata_i (state_next),
    .word_idx_i    (word_idx),
    .word_rdata_o  (word_rdata),
    .state_o       (state)
  );

  keccak_f u_keccak_f (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .start_i    (kf_start),
    .state_i    (state),
    .state_o    (state_next),
    .state_we_o (kf_we),
    .busy_o     (kf_busy),
    .done_o     (kf_done)
  );

  // kf_busy is kept for visibility in simulation; the controller tracks the
  // permutation through kf_done.
  logic unused_busy;
  assign unused_busy = kf_busy;

endmodule
