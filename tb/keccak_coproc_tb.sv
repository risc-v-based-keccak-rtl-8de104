// keccak_coproc_tb: end-to-end test of the Keccak co-processor at its
// default parameters.
//
// A small core model drives the CV-X-IF channels the way a RISC-V core runs
// the software sequence for one Keccak-f[1600] call: 25 x load_state (64
// bits from rs1/rs2), 1 x start_keccak, 50 x store_state (32 bits into rd).
// The 50 returned words are compared with the reference model in
// keccak_ref_pkg. Around that, the core model mixes in what the interface
// allows: foreign instructions (refused), commits in the issue cycle and
// later, killed instructions (which must leave the state untouched), result
// back-pressure, and issue attempts while the permutation runs (which must
// stall). Each of these mechanisms is counted and must occur at least once.
// It also checks the 25-cycle latency of start_keccak from its commit to its
// result, and a chained call that permutes the previous result again
// without reloading. Every result must carry the id and rd it was issued
// with.
module keccak_coproc_tb;
  import keccak_pkg::*;
  import cvxif_pkg::*;
  import keccak_ref_pkg::*;

  logic          clk = 1'b0;
  logic          rst_n = 1'b0;
  logic          issue_valid, issue_ready, commit_valid, result_valid, result_ready;
  x_issue_req_t  issue_req;
  x_issue_resp_t issue_resp;
  x_commit_t     commit;
  x_result_t     result;
  int            checks = 0, failures = 0;
  int            cycle = 0;
  x_id_t         next_id = '0;

  // mechanism counters
  int n_refused = 0, n_kill = 0, n_commit_same = 0, n_commit_late = 0;
  int n_backpressure = 0, n_issue_stall = 0, n_permutations = 0, n_chained = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  keccak_coproc dut (
    .clk_i(clk), .rst_ni(rst_n),
    .issue_valid_i(issue_valid), .issue_ready_o(issue_ready),
    .issue_req_i(issue_req), .issue_resp_o(issue_resp),
    .commit_valid_i(commit_valid), .commit_i(commit),
    .result_valid_o(result_valid), .result_ready_i(result_ready), .result_o(result)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [31:0] insn(logic [6:0] f7, logic [4:0] rd);
    return {f7, 5'd11, 5'd10, FUNCT3_KECCAK, rd, OPC_KECCAK};
  endfunction

  // Offer an instruction until the handshake; returns accept and the cycle of
  // the handshake. If commit_now, the commit is given in the same cycle.
  task automatic offer(input logic [31:0] instr, input logic [31:0] rs1, rs2,
                       input x_id_t id, input bit commit_now, input bit kill,
                       output bit acc, output int hs_cycle);
    @(negedge clk);
    issue_valid        = 1'b1;
    issue_req.instr    = instr;
    issue_req.id       = id;
    issue_req.rs[0]    = rs1;
    issue_req.rs[1]    = rs2;
    issue_req.rs_valid = 2'b11;
    commit_valid       = commit_now;
    commit.id          = id;
    commit.commit_kill = kill;
    #4;
    while (!issue_ready) begin
      n_issue_stall++;
      @(negedge clk);
      #4;
    end
    acc      = issue_resp.accept;
    hs_cycle = cycle;
    @(negedge clk);
    issue_valid  = 1'b0;
    commit_valid = 1'b0;
  endtask

  // Execute one custom instruction the way the core would: issue, commit
  // (same cycle or 1-2 cycles later), then take the result, sometimes late.
  // Returns the result and the cycles from the commit to result_valid.
  task automatic exec(input keccak_funct7_e f7, input logic [31:0] rs1, rs2,
                      input logic [4:0] rd, output x_result_t r, output int lat,
                      input bit kill = 1'b0);
    bit    acc;
    int    hs, commit_cycle, hold;
    bit    now = ($urandom_range(0, 2) == 0);
    x_id_t id = next_id;
    next_id++;
    offer(insn(f7, rd), rs1, rs2, id, now, kill, acc, hs);
    check(acc, "custom instruction accepted");
    if (now) begin
      n_commit_same++;
      commit_cycle = hs;
    end else begin
      n_commit_late++;
      repeat ($urandom_range(0, 1)) @(negedge clk);
      commit_valid       = 1'b1;
      commit.id          = id;
      commit.commit_kill = kill;
      #4 commit_cycle = cycle;
      @(negedge clk);
      commit_valid = 1'b0;
    end
    if (kill) begin
      n_kill++;
      repeat (2) @(negedge clk);
      check(!result_valid, "killed instruction returns no result");
      lat = -1;
      r   = '0;
      return;
    end
    // Wait for the result while also trying to issue (must stall).
    #1;
    while (!result_valid) begin
      @(negedge clk);
      #1;
      if (cycle - commit_cycle > 200) break;
    end
    lat = cycle - commit_cycle;
    r   = result;
    hold = ($urandom_range(0, 4) == 0) ? $urandom_range(1, 3) : 0;
    for (int h = 0; h < hold; h++) begin
      n_backpressure++;
      @(negedge clk);
      #1 check(result_valid && result == r, "result stable under back-pressure");
    end
    result_ready = 1'b1;
    @(negedge clk);
    result_ready = 1'b0;
    check(r.id == id, "result id");
    check(r.rd == rd, "result rd");
  endtask

  // During the permutation, offer the next instruction early: it must stall.
  task automatic start_with_stall(output int lat);
    bit    acc;
    int    hs;
    x_id_t id = next_id;
    next_id++;
    offer(insn(F7_START_KECCAK, 5'd0), 0, 0, id, 1'b1, 1'b0, acc, hs);
    check(acc, "start_keccak accepted");
    n_commit_same++;
    // offer a store right away; it may only be taken after the result
    fork
      begin
        #1;
        while (!result_valid) begin
          @(negedge clk);
          #1;
        end
        lat = cycle - hs;
        check(!result.we && result.id == id, "start_keccak result");
        repeat (2) begin
          @(negedge clk);
          #1 check(issue_valid && !issue_ready, "issue stalls while a result waits");
          n_backpressure++;
        end
        result_ready = 1'b1;
        @(negedge clk);
        result_ready = 1'b0;
      end
      begin
        @(negedge clk);
        issue_valid     = 1'b1;
        issue_req.instr = insn(F7_STORE_STATE, 5'd1);
        repeat (5) begin
          #4;
          check(!issue_ready, "issue stalls during the permutation");
          n_issue_stall++;
          @(negedge clk);
        end
      end
    join
    issue_valid = 1'b0;
  endtask

  task automatic load_state(input flat_t s);
    x_result_t r;
    int        lat;
    for (int i = 0; i < LANES; i++) begin
      // a killed load now and then: must not disturb the state or the pointer
      if ($urandom_range(0, 9) == 0) begin
        exec(F7_LOAD_STATE, ~s[64 * i +: 32], ~s[64 * i + 32 +: 32], 5'd0, r, lat, 1'b1);
      end
      exec(F7_LOAD_STATE, s[64 * i +: 32], s[64 * i + 32 +: 32], 5'd0, r, lat);
      check(!r.we && lat == 1, "load_state result one cycle after commit, no write");
    end
  endtask

  task automatic store_state(output flat_t s);
    x_result_t r;
    int        lat;
    for (int k = 0; k < WORDS; k++) begin
      logic [4:0] rd = 5'(1 + (k % 31));
      if ($urandom_range(0, 9) == 0) begin
        bit acc;
        int hs;
        offer(32'h0000_0033, 1, 2, next_id, 1'b0, 1'b0, acc, hs);  // add x0,x0,x0
        check(!acc, "foreign instruction refused");
        n_refused++;
      end
      exec(F7_STORE_STATE, 0, 0, rd, r, lat);
      check(r.we && lat == 1, "store_state result one cycle after commit, writes rd");
      s[32 * k +: 32] = r.data;
    end
  endtask

  task automatic keccak_call(input flat_t s, input bit reload);
    flat_t got;
    int    lat;
    if (reload) load_state(s);
    start_with_stall(lat);
    check(lat == NR + 1, $sformatf("start_keccak commit-to-result %0d cycles, expected %0d",
                                   lat, NR + 1));
    n_permutations++;
    store_state(got);
    check(got == keccak_f1600(s), "Keccak-f[1600] result matches the reference");
    if (!reload) n_chained++;
  endtask

  initial begin
    flat_t s, prev;
    issue_valid = 0; commit_valid = 0; result_ready = 0;
    issue_req = '0; commit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    s = '0;
    keccak_call(s, 1'b1);
    for (int n = 0; n < 4; n++) begin
      s = random_state();
      keccak_call(s, 1'b1);
    end
    // chained: the state register still holds f(s); permute it again
    prev = keccak_f1600(s);
    keccak_call(prev, 1'b0);
    // a killed start_keccak must not permute
    begin
      x_result_t r;
      int        lat;
      flat_t     got;
      s = random_state();
      load_state(s);
      exec(F7_START_KECCAK, 0, 0, 5'd0, r, lat, 1'b1);
      store_state(got);
      check(got == s, "killed start_keccak leaves the state as loaded");
    end

    check(n_refused > 0,      $sformatf("foreign instructions refused: %0d", n_refused));
    check(n_kill > 0,         $sformatf("killed instructions: %0d", n_kill));
    check(n_commit_same > 0,  $sformatf("same-cycle commits: %0d", n_commit_same));
    check(n_commit_late > 0,  $sformatf("late commits: %0d", n_commit_late));
    check(n_backpressure > 0, $sformatf("back-pressure cycles: %0d", n_backpressure));
    check(n_issue_stall > 0,  $sformatf("issue stall cycles: %0d", n_issue_stall));
    check(n_permutations > 0, $sformatf("permutations: %0d", n_permutations));
    check(n_chained > 0,      $sformatf("chained permutations: %0d", n_chained));
    $display("refused=%0d kill=%0d commit_same=%0d commit_late=%0d backpressure=%0d stall=%0d perms=%0d chained=%0d",
             n_refused, n_kill, n_commit_same, n_commit_late, n_backpressure, n_issue_stall,
             n_permutations, n_chained);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
