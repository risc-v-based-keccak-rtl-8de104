// keccak_f: iterative Keccak-f[1600] engine, one round per clock cycle.
//
// The engine holds no copy of the state: it reads the state from the
// co-processor register (keccak_reg) on state_i, passes it through one
// keccak_round and hands the result back on state_o with state_we_o set, so
// the register is rewritten once per round, as in the block diagram where
// Keccak-f and Keccak_reg form a loop. A 5-bit round counter selects the
// iota constant.
//
// Timing: a one-cycle pulse on start_i (while not busy) arms the engine; the
// NR rounds are then written on the following NR clock edges, with busy_o
// high throughout. done_o is high in the cycle whose edge writes the last
// round, so from the start pulse to the final state takes NR + 1 = 25
// cycles, matching the 25 cycles given for the transformation. The round
// count NR defaults to the 24 rounds of Keccak-f[1600]. start_i while busy
// is ignored. The active-low asynchronous reset clears the counter.
module keccak_f
  import keccak_pkg::*;
#(
  parameter int unsigned ROUNDS = NR
) (
  input  logic   clk_i,
  input  logic   rst_ni,
  input  logic   start_i,
  input  state_t state_i,
  output state_t state_o,
  output logic   state_we_o,
  output logic   busy_o,
  output logic   done_o
);

  logic       busy_q;
  logic [4:0] round_q;

  keccak_round u_round (
    .state_i (state_i),
    .rc_i    (RC[round_q]),
    .state_o (state_o)
  );

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      busy_q  <= 1'b0;
      round_q <= '0;
    end else if (busy_q) begin
      if (round_q == 5'(ROUNDS - 1)) begin
        busy_q  <= 1'b0;
        round_q <= '0;
      end else begin
        round_q <= round_q + 5'd1;
      end
    end else if (start_i) begin
      busy_q  <= 1'b1;
      round_q <= '0;
    end
  end

  assign busy_o     = busy_q;
  assign state_we_o = busy_q;
  assign done_o     = busy_q && (round_q == 5'(ROUNDS - 1));

  initial begin
    assert (ROUNDS >= 1 && ROUNDS <= NR)
      else $error("keccak_f: ROUNDS must be between 1 and %0d", NR);
  end

endmodule
