// cvxif_decoder_tb: self-checking test of the CV-X-IF decoder/controller.
//
// The testbench plays the core on the issue, commit and result channels and
// stands in for the state register (a 50-word array read by word_idx_o) and
// for the Keccak-f engine (kf_done_i pulses a fixed number of cycles after
// kf_start_o). It checks: which encodings are accepted and which are
// refused; the writeback flag; lane writes with {rs2, rs1} and the lane
// pointer stepping 0..24 and wrapping; store results taken from the word
// pointer 0..49 with rd and id; start_keccak's start pulse, its result after
// the engine finishes and the pointer rewind; commit_kill leaving no effect;
// commit in the issue cycle; result held stable under back-pressure; and the
// one-cycle commit-to-result latency of load_state and store_state.
module cvxif_decoder_tb;
  import keccak_pkg::*;
  import cvxif_pkg::*;

  localparam int ENGINE_CYCLES = NR + 1;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  logic              issue_valid, issue_ready, commit_valid, result_valid, result_ready;
  x_issue_req_t      issue_req;
  x_issue_resp_t     issue_resp;
  x_commit_t         commit;
  x_result_t         result;
  logic              lane_we, kf_start, kf_done;
  lane_idx_t         lane_idx;
  lane_t             lane_wdata;
  word_idx_t         word_idx;
  logic [WORD_W-1:0] word_rdata;
  logic [WORD_W-1:0] words [WORDS];
  int                checks = 0, failures = 0;

  // bookkeeping from the monitors
  int                lane_writes = 0, starts = 0;
  lane_idx_t         last_lane_idx;
  lane_t             last_lane_data;
  int                engine_cnt = -1;

  always #5 clk = ~clk;

  cvxif_decoder dut (
    .clk_i(clk), .rst_ni(rst_n),
    .issue_valid_i(issue_valid), .issue_ready_o(issue_ready),
    .issue_req_i(issue_req), .issue_resp_o(issue_resp),
    .commit_valid_i(commit_valid), .commit_i(commit),
    .result_valid_o(result_valid), .result_ready_i(result_ready), .result_o(result),
    .lane_we_o(lane_we), .lane_idx_o(lane_idx), .lane_wdata_o(lane_wdata),
    .word_idx_o(word_idx), .word_rdata_i(word_rdata),
    .kf_start_o(kf_start), .kf_done_i(kf_done)
  );

  assign word_rdata = (int'(word_idx) < WORDS) ? words[word_idx] : 32'hDEAD_BEEF;

  // Engine stand-in: done in the last of ENGINE_CYCLES - 1 busy cycles.
  assign kf_done = (engine_cnt == 1);
  always_ff @(posedge clk) begin
    if (kf_start) begin
      engine_cnt <= ENGINE_CYCLES - 1;
      starts     <= starts + 1;
    end else if (engine_cnt > 0) engine_cnt <= engine_cnt - 1;
    if (lane_we) begin
      lane_writes    <= lane_writes + 1;
      last_lane_idx  <= lane_idx;
      last_lane_data <= lane_wdata;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] insn(logic [6:0] f7, logic [4:0] rd,
                                        logic [2:0] f3 = FUNCT3_KECCAK,
                                        logic [6:0] opc = OPC_KECCAK);
    return {f7, 5'd11, 5'd10, f3, rd, opc};
  endfunction

  // Offer one instruction; returns accept. Drives at the falling edge and
  // samples just before the rising edge on which the handshake happens.
  task automatic issue(input logic [31:0] instr, input logic [31:0] rs1, rs2,
                       input x_id_t id, output bit acc, input bit commit_now = 0,
                       input bit kill_now = 0);
    @(negedge clk);
    issue_valid        = 1'b1;
    issue_req.instr    = instr;
    issue_req.id       = id;
    issue_req.rs[0]    = rs1;
    issue_req.rs[1]    = rs2;
    issue_req.rs_valid = 2'b11;
    commit_valid       = commit_now;
    commit.id          = id;
    commit.commit_kill = kill_now;
    #4;
    while (!issue_ready) begin
      @(negedge clk);
      #4;
    end
    acc = issue_resp.accept;
    @(negedge clk);
    issue_valid  = 1'b0;
    commit_valid = 1'b0;
  endtask

  task automatic do_commit(input x_id_t id, input bit kill);
    commit_valid       = 1'b1;
    commit.id          = id;
    commit.commit_kill = kill;
    @(negedge clk);
    commit_valid = 1'b0;
  endtask

  // Wait for the result; returns it and the cycles waited (0 = valid right away).
  task automatic get_result(output x_result_t r, output int waited, input int hold = 0);
    waited = 0;
    #1;
    while (!result_valid) begin
      @(negedge clk);
      #1;
      waited++;
      if (waited > 100) break;
    end
    r = result;
    for (int h = 0; h < hold; h++) begin
      @(negedge clk);
      #1;
      check(result_valid && result == r, "result held stable under back-pressure");
      check(!issue_ready, "no issue while a result waits");
    end
    result_ready = 1'b1;
    @(negedge clk);
    result_ready = 1'b0;
  endtask

  initial begin
    bit        acc;
    x_result_t r;
    int        w, lw, st0;
    logic [31:0] a, b;

    issue_valid = 0; commit_valid = 0; result_ready = 0;
    issue_req = '0; commit = '0;
    for (int k = 0; k < WORDS; k++) words[k] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---- refused encodings ----
    issue(insn(7'd3, 5'd5), 1, 2, 4'd1, acc);
    check(!acc, "funct7 3 refused");
    issue(insn(7'd0, 5'd5, 3'd0), 1, 2, 4'd1, acc);
    check(!acc, "funct3 0 refused");
    issue(insn(7'd0, 5'd5, FUNCT3_KECCAK, 7'h33), 1, 2, 4'd1, acc);
    check(!acc, "OP opcode refused");
    issue(insn(7'd1, 5'd5, FUNCT3_KECCAK, 7'h0B), 1, 2, 4'd1, acc);
    check(!acc, "custom-0 opcode refused");
    repeat (2) @(negedge clk);
    check(!result_valid && lane_writes == 0, "refused instructions leave no trace");

    // ---- writeback flags ----
    issue_req.instr = insn(F7_STORE_STATE, 5'd3);
    #1 check(issue_resp.accept && issue_resp.writeback, "store_state: accept, writeback");
    issue_req.instr = insn(F7_LOAD_STATE, 5'd0);
    #1 check(issue_resp.accept && !issue_resp.writeback, "load_state: accept, no writeback");
    issue_req.instr = insn(F7_START_KECCAK, 5'd0);
    #1 check(issue_resp.accept && !issue_resp.writeback, "start_keccak: accept, no writeback");

    // ---- 27 loads: pointer 0..24 then wraps ----
    for (int i = 0; i < 27; i++) begin
      a = $urandom; b = $urandom;
      lw = lane_writes;
      issue(insn(F7_LOAD_STATE, 5'd0), a, b, x_id_t'(i), acc);
      check(acc, "load_state accepted");
      check(!issue_ready, "issue blocked until commit");
      check(lane_writes == lw, "no lane write before commit");
      do_commit(x_id_t'(i), 1'b0);
      check(lane_writes == lw + 1, "one lane write at commit");
      check(int'(last_lane_idx) == i % 25, $sformatf("lane index %0d", last_lane_idx));
      check(last_lane_data == {b, a}, "lane data is {rs2, rs1}");
      get_result(r, w);
      check(w == 0, "load result one cycle after commit");
      check(r.id == x_id_t'(i) && !r.we, "load result: id, no write");
    end

    // ---- start_keccak: pointers rewind, result after the engine ----
    st0 = starts;
    issue(insn(F7_START_KECCAK, 5'd0), 0, 0, 4'd9, acc);
    check(acc, "start_keccak accepted");
    do_commit(4'd9, 1'b0);
    check(starts == st0 + 1, "one start pulse");
    get_result(r, w);
    check(w == ENGINE_CYCLES - 1, $sformatf("start result after %0d cycles", w));
    check(r.id == 4'd9 && !r.we, "start result: id, no write");

    // ---- 52 stores: word pointer 0..49 then wraps; back-pressure on some ----
    for (int k = 0; k < 52; k++) begin
      logic [4:0] rd = 5'(1 + $urandom_range(0, 30));
      issue(insn(F7_STORE_STATE, rd), 0, 0, x_id_t'(k), acc);
      check(acc, "store_state accepted");
      do_commit(x_id_t'(k), 1'b0);
      get_result(r, w, (k % 7 == 3) ? 3 : 0);
      check(w == 0, "store result one cycle after commit");
      check(r.we && r.rd == rd && r.id == x_id_t'(k), "store result: we, rd, id");
      check(r.data == words[k % 50], $sformatf("store word %0d", k));
    end

    // ---- commit_kill: no lane write, no result, pointer unchanged ----
    lw = lane_writes;
    issue(insn(F7_LOAD_STATE, 5'd0), 32'h1111, 32'h2222, 4'd3, acc);
    do_commit(4'd5, 1'b0);  // other id: ignored
    check(!result_valid && lane_writes == lw, "commit for another id ignored");
    do_commit(4'd3, 1'b1);
    #1;
    check(issue_ready && !result_valid && lane_writes == lw, "killed load has no effect");
    st0 = starts;
    issue(insn(F7_START_KECCAK, 5'd0), 0, 0, 4'd4, acc);
    do_commit(4'd4, 1'b1);
    repeat (3) @(negedge clk);
    check(starts == st0 && !result_valid, "killed start has no effect");

    // ---- commit in the issue cycle ----
    a = $urandom; b = $urandom;
    issue(insn(F7_LOAD_STATE, 5'd0), a, b, 4'd6, acc, 1'b1);
    check(lane_writes == lw + 1 && last_lane_data == {b, a}, "same-cycle commit writes lane");
    check(last_lane_idx == lane_idx_t'(0), "lane pointer rewound by start, kept across kill");
    get_result(r, w);
    check(w == 0 && r.id == 4'd6, "same-cycle commit result");
    issue(insn(F7_LOAD_STATE, 5'd0), a, b, 4'd7, acc, 1'b1, 1'b1);
    #1 check(issue_ready && !result_valid && lane_writes == lw + 1, "same-cycle kill");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
