// keccak_reg: the 1600-bit co-processor state register (Keccak_reg).
//
// It keeps the Keccak state inside the co-processor so that the core only
// moves data in and out once per permutation instead of once per step.
// Three ports reach it:
//   - a 64-bit lane write port, used by load_state (lane_we_i, lane_idx_i),
//   - a full-state write port, used by Keccak-f once per round (state_we_i),
//   - a 32-bit word read port, used by store_state (word_idx_i), plus the
//     whole state on state_o for Keccak-f.
// Word k is lane k/2, low half when k is even. The register is cleared by
// the active-low reset. If both write ports are enabled in the same cycle,
// the full-state write wins (the controller never does this). Reads are
// combinational; writes take effect at the clock edge. The register, its
// 64-bit loads and 32-bit stores follow the design described; the word order,
// the write priority and the reset value are this design's choices.
module keccak_reg
  import keccak_pkg::*;
(
  input  logic      clk_i,
  input  logic      rst_ni,
  input  logic      lane_we_i,
  input  lane_idx_t lane_idx_i,
  input  lane_t     lane_wdata_i,
  input  logic      state_we_i,
  input  state_t    state_wdata_i,
  input  word_idx_t word_idx_i,
  output logic [WORD_W-1:0] word_rdata_o,
  output state_t    state_o
);

  state_t state_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      state_q <= '0;
    end else if (state_we_i) begin
      state_q <= state_wdata_i;
    end else if (lane_we_i && (lane_idx_i < lane_idx_t'(LANES))) begin
      state_q[lane_idx_i] <= lane_wdata_i;
    end
  end

  logic [WORDS-1:0][WORD_W-1:0] words;
  assign words = state_q;

  assign word_rdata_o = (word_idx_i < word_idx_t'(WORDS)) ? words[word_idx_i] : '0;
  assign state_o      = state_q;

endmodule
