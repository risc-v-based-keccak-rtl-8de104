// keccak_hash_tb: SHA-3 and SHAKE hashing through the co-processor.
//
// The post-quantum schemes this co-processor serves (ML-KEM, ML-DSA,
// SLH-DSA, FN-DSA) use Keccak through the FIPS 202 sponge: software keeps
// the state in memory, XORs each message block into it, and calls the
// permutation. Here the testbench is that software: it absorbs and pads
// the message itself and, for every permutation, sends the state with 25
// load_state, runs start_keccak and reads it back with 50 store_state, using
// the simplest core timing (commit in the issue cycle, results taken at
// once). It checks published digests (SHA3-256 of "" and "abc", SHAKE128
// and SHAKE256 of "") and a multi-block SHAKE128 absorb and squeeze of 27
// permutations (the Keccak call count of a Kyber512 key generation) against
// the reference model. It also reports the co-processor cycles per call.
module keccak_hash_tb;
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
  int            cycle = 0, calls = 0, call_cycles = 0;
  x_id_t         next_id = '0;

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

  // One instruction: issue with commit in the same cycle, then take the result.
  task automatic run(input keccak_funct7_e f7, input logic [31:0] rs1, rs2,
                     output logic [31:0] data);
    @(negedge clk);
    issue_valid        = 1'b1;
    issue_req.instr    = {f7, 5'd11, 5'd10, FUNCT3_KECCAK, 5'd10, OPC_KECCAK};
    issue_req.id       = next_id;
    issue_req.rs[0]    = rs1;
    issue_req.rs[1]    = rs2;
    issue_req.rs_valid = 2'b11;
    commit_valid       = 1'b1;
    commit.id          = next_id;
    commit.commit_kill = 1'b0;
    next_id++;
    #4;
    while (!issue_ready) begin
      @(negedge clk);
      #4;
    end
    @(negedge clk);
    issue_valid  = 1'b0;
    commit_valid = 1'b0;
    result_ready = 1'b1;
    #1;
    while (!result_valid) begin
      @(negedge clk);
      #1;
    end
    data = result.data;
    @(negedge clk);
    result_ready = 1'b0;
  endtask

  // The Keccak-f[1600] call that software makes for every permutation.
  task automatic coproc_keccak_f(inout flat_t s);
    logic [31:0] d;
    int c0 = cycle;
    for (int i = 0; i < LANES; i++) run(F7_LOAD_STATE, s[64 * i +: 32], s[64 * i + 32 +: 32], d);
    run(F7_START_KECCAK, 0, 0, d);
    for (int k = 0; k < WORDS; k++) begin
      run(F7_STORE_STATE, 0, 0, d);
      s[32 * k +: 32] = d;
    end
    calls++;
    call_cycles += cycle - c0;
  endtask

  // Sponge with the co-processor as permutation. Byte i of the state is bits
  // [8i+7:8i]. suffix is 0x06 for SHA-3 and 0x1F for SHAKE.
  task automatic sponge(input byte msg[], input int rate, input byte suffix,
                        input int out_len, output byte out[], input bit use_ref = 1'b0);
    flat_t s = '0;
    int    n = 0;
    out = new[out_len];
    for (int i = 0; i < msg.size(); i++) begin
      s[8 * n +: 8] ^= msg[i];
      n++;
      if (n == rate) begin
        if (use_ref) s = keccak_f1600(s); else coproc_keccak_f(s);
        n = 0;
      end
    end
    s[8 * n +: 8]          ^= suffix;
    s[8 * (rate - 1) +: 8] ^= 8'h80;
    if (use_ref) s = keccak_f1600(s); else coproc_keccak_f(s);
    n = 0;
    for (int i = 0; i < out_len; i++) begin
      if (n == rate) begin
        if (use_ref) s = keccak_f1600(s); else coproc_keccak_f(s);
        n = 0;
      end
      out[i] = s[8 * n +: 8];
      n++;
    end
  endtask

  function automatic string hex(byte b[]);
    string h = "";
    foreach (b[i]) h = {h, $sformatf("%02x", b[i])};
    return h;
  endfunction

  initial begin
    byte msg[], out[], ref_out[];
    issue_valid = 0; commit_valid = 0; result_ready = 0;
    issue_req = '0; commit = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    msg = new[0];
    sponge(msg, 136, 8'h06, 32, out);
    check(hex(out) == "a7ffc6f8bf1ed76651c14756a061d662f580ff4de43b49fa82d80a4b80f8434a",
          {"SHA3-256(\"\") = ", hex(out)});
    msg = new[3];
    msg[0] = 8'h61; msg[1] = 8'h62; msg[2] = 8'h63;
    sponge(msg, 136, 8'h06, 32, out);
    check(hex(out) == "3a985da74fe225b2045c172d6bd390bd855f086e3e9d525b46bfe24511431532",
          {"SHA3-256(\"abc\") = ", hex(out)});
    msg = new[0];
    sponge(msg, 168, 8'h1F, 32, out);
    check(hex(out) == "7f9c2ba4e88f827d616045507605853ed73b8093f6efbc88eb1a6eacfa66ef26",
          {"SHAKE128(\"\") = ", hex(out)});
    sponge(msg, 136, 8'h1F, 32, out);
    check(hex(out) == "46b9dd2b0ba88d13233b3feb743eeb243fcd52ea62b81b82b50c27646ed5762f",
          {"SHAKE256(\"\") = ", hex(out)});
    check(calls == 4, "one permutation per short hash");

    // SHAKE128 stream: 34-byte seed absorbed, 27 blocks of 168 bytes squeezed
    // (the first comes with the absorbing call) = 27 calls.
    calls = 0;
    call_cycles = 0;
    msg = new[34];
    foreach (msg[i]) msg[i] = byte'($urandom);
    sponge(msg, 168, 8'h1F, 27 * 168, out);
    sponge(msg, 168, 8'h1F, 27 * 168, ref_out, 1'b1);
    check(calls == 27, $sformatf("%0d permutations in the stream", calls));
    check(out == ref_out, "SHAKE128 stream against the reference model");
    $display("co-processor cycles per Keccak-f call (25 load, start, 50 store): %0d",
             call_cycles / calls);
    check(call_cycles / calls < 400, "call cost");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
