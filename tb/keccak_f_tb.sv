// keccak_f_tb: self-checking test of the Keccak-f[1600] round engine.
//
// The testbench plays the state register: it writes state_o back whenever
// state_we_o is set. It checks the all-zero input against the published
// first lane of Keccak-f[1600](0), random states against the reference
// model in keccak_ref_pkg, the 25-cycle latency from the start pulse to the
// final state, that busy_o covers exactly the 24 round cycles, and that a
// start pulse during a permutation is ignored.
module keccak_f_tb;
  import keccak_pkg::*;
  import keccak_ref_pkg::*;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  logic   start;
  state_t st, st_next;
  logic   we, busy, done;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  keccak_f dut (
    .clk_i(clk), .rst_ni(rst_n), .start_i(start),
    .state_i(st), .state_o(st_next), .state_we_o(we),
    .busy_o(busy), .done_o(done)
  );

  always_ff @(posedge clk) if (we) st <= st_next;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run one permutation on s; returns the result and the cycles from the
  // start pulse to the last state write (inclusive).
  task automatic permute(input flat_t s, output flat_t r, output int cycles,
                         input bit poke_start = 1'b0);
    int busy_cycles = 0;
    st = state_t'(s);
    @(negedge clk);
    start = 1'b1;
    cycles = 0;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (busy) begin
      busy_cycles++;
      if (poke_start && busy_cycles == 5) start = 1'b1;  // must be ignored
      @(negedge clk);
      start = 1'b0;
      cycles++;
    end
    r = flat_t'(st);
    check(busy_cycles == NR, $sformatf("busy for %0d cycles, expected %0d", busy_cycles, NR));
  endtask

  initial begin
    flat_t s, r, e;
    int    cyc;
    start = 1'b0;
    st    = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !we && !done, "idle after reset");

    // Known answer: first lanes of Keccak-f[1600] applied to the zero state.
    permute('0, r, cyc);
    check(r[63:0] == 64'hF1258F7940E1DDE7,
          $sformatf("zero state lane 0 = %h", r[63:0]));
    check(r[127:64] == 64'h84D5CCF933C0478A,
          $sformatf("zero state lane 1 = %h", r[127:64]));
    check(cyc == NR + 1, $sformatf("latency %0d cycles, expected %0d", cyc, NR + 1));
    e = keccak_f1600('0);
    check(r == e, "zero state against reference model");

    // Chaining: permuting the result again.
    s = r;
    permute(s, r, cyc);
    check(r == keccak_f1600(s), "second permutation against reference model");

    for (int n = 0; n < 20; n++) begin
      s = random_state();
      permute(s, r, cyc, n == 3);
      check(r == keccak_f1600(s), $sformatf("random state %0d against reference model", n));
      check(cyc == NR + 1, $sformatf("latency %0d cycles", cyc));
    end

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
