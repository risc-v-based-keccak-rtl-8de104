// keccak_reg_tb: self-checking test of the 1600-bit state register.
//
// It checks the cleared state after reset, 64-bit lane writes in random
// order against a model kept in the testbench, the 32-bit word read port
// for all 50 words (low half of a lane first), the full-state write port,
// and that the full-state write wins over a lane write in the same cycle.
module keccak_reg_tb;
  import keccak_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              lane_we, state_we;
  lane_idx_t         lane_idx;
  lane_t             lane_wdata;
  state_t            state_wdata, state_o, model;
  word_idx_t         word_idx;
  logic [WORD_W-1:0] word_rdata;
  int                checks = 0, failures = 0;

  always #5 clk = ~clk;

  keccak_reg dut (
    .clk_i(clk), .rst_ni(rst_n),
    .lane_we_i(lane_we), .lane_idx_i(lane_idx), .lane_wdata_i(lane_wdata),
    .state_we_i(state_we), .state_wdata_i(state_wdata),
    .word_idx_i(word_idx), .word_rdata_o(word_rdata), .state_o(state_o)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic check_words();
    for (int k = 0; k < 50; k++) begin
      logic [63:0] l;
      word_idx = word_idx_t'(k);
      #1;
      l = model[k / 2];
      check(word_rdata == ((k % 2 == 0) ? l[31:0] : l[63:32]),
            $sformatf("word %0d = %h", k, word_rdata));
    end
    check(state_o == model, "whole state");
  endtask

  initial begin
    lane_we = 0; state_we = 0; lane_idx = '0; lane_wdata = '0;
    state_wdata = '0; word_idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model = '0;
    @(negedge clk);
    check_words();

    // Lane writes, each lane in a random order, several passes.
    for (int pass = 0; pass < 3; pass++) begin
      for (int n = 0; n < 40; n++) begin
        int i = $urandom_range(0, 24);
        lane_we    = 1'b1;
        lane_idx   = lane_idx_t'(i);
        lane_wdata = {$urandom, $urandom};
        model[i]   = lane_wdata;
        @(negedge clk);
      end
      lane_we = 1'b0;
      check_words();
    end

    // Full-state write.
    for (int k = 0; k < 50; k++) state_wdata[k / 2][32 * (k % 2) +: 32] = $urandom;
    state_we = 1'b1;
    model    = state_wdata;
    @(negedge clk);
    state_we = 1'b0;
    check_words();

    // Both in the same cycle: the full-state write is kept.
    for (int k = 0; k < 50; k++) state_wdata[k / 2][32 * (k % 2) +: 32] = $urandom;
    state_we   = 1'b1;
    lane_we    = 1'b1;
    lane_idx   = lane_idx_t'(7);
    lane_wdata = ~state_wdata[7];
    model      = state_wdata;
    @(negedge clk);
    state_we = 1'b0;
    lane_we  = 1'b0;
    check_words();

    // Reset clears the register.
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    model = '0;
    check_words();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
