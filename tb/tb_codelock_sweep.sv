// tb_codelock_sweep: end-to-end test of the code lock at its default
// parameters, built around an exhaustive sweep of the keypad.
//
// The keypad has 3 column and 4 row lines, so 2^7 = 128 input combinations.
// Phase 1 steps through all of them in nested loops, columns outer and rows
// inner, one combination per 20 ns clock cycle, and watches the state output:
// every time the lock reaches S1 ("about to open") the combination that took
// it there must be key "1" (K=001, R=0001); any other one is a wrong opening.
// Phase 2 presses each of the 128 combinations for two cycles from S0 and
// then releases all keys: the lock must open (UNLOCK high for exactly 30
// cycles, then back to S0) for key "1" only. Phase 3 enters S1 with key "1"
// and then applies each of the 128 combinations: the code key must keep the
// lock in S1, no key must open it, and anything else must return it to S0.
// Each mechanism of the lock is counted when it happens, and one that never
// happens counts as a failure: hold in S1, release and open, abort from S1,
// rejected key in S0, full 30-cycle open period, wrap from S31 to S0.
module tb_codelock_sweep;
  import codelock_pkg::*;

  localparam int OPEN_CYCLES = 30;

  logic       clk = 1'b0;
  keycol_t    K   = NO_COL;
  keyrow_t    R   = NO_ROW;
  logic [4:0] q;
  logic       unlock;

  int checks   = 0;
  int failures = 0;

  // Mechanism counters.
  int n_right_open  = 0;  // S1 reached with key "1"
  int n_wrong_open  = 0;  // S1 reached with any other combination
  int n_hold        = 0;  // S1 -> S1 while the key is held
  int n_release     = 0;  // S1 -> S2 on release
  int n_abort       = 0;  // S1 -> S0 on another key
  int n_reject      = 0;  // S0 -> S0 on a non-code combination
  int n_full_open   = 0;  // a complete 30-cycle open period
  int n_wrap        = 0;  // S31 -> S0

  always #10ns clk = ~clk;

  codelock dut (.clk(clk), .K(K), .R(R), .q(q), .UNLOCK(unlock));

  // Monitor: classify every transition from the state before the edge, the
  // inputs sampled at the edge and the state after it.
  logic [4:0] q_before;
  logic [6:0] kr_sampled;
  always @(posedge clk) begin
    q_before   = q;
    kr_sampled = {K, R};
    #1ns;
    if (q == 1 && q_before != 1) begin
      if (kr_sampled == {KEY1_COL, KEY1_ROW}) n_right_open++;
      else begin
        n_wrong_open++;
        failures++;
        $display("FAIL: lock tries to open with the wrong combination K=%03b R=%04b",
                 kr_sampled[6:4], kr_sampled[3:0]);
      end
    end
    if (q_before == 1 && q == 1) n_hold++;
    if (q_before == 1 && q == 2) n_release++;
    if (q_before == 1 && q == 0) n_abort++;
    if (q_before == 0 && q == 0 && kr_sampled != {KEY1_COL, KEY1_ROW}) n_reject++;
    if (q_before == 31 && q == 0) n_wrap++;
  end

  task automatic step(input logic [6:0] kr);
    @(negedge clk);
    {K, R} = kr;
    @(posedge clk);
    #2ns;
  endtask

  task automatic expect_eq(input int got, input int want, input string what);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d, expected %0d", what, got, want);
    end
  endtask

  task automatic idle_to_s0();
    int n = 0;
    while (q != 0 && n < 40) begin step(7'b0); n++; end
    expect_eq(q, 0, "back in S0");
  endtask

  int open_len;
  logic [6:0] code;

  initial begin
    code = {KEY1_COL, KEY1_ROW};
    #1ns;
    expect_eq(q, 0, "power-up state");
    expect_eq(unlock, 0, "power-up UNLOCK");

    // Phase 1: the nested-loop sweep over all 128 combinations.
    for (int k = 0; k < 8; k++)
      for (int r = 0; r < 16; r++) begin
        step({3'(k), 4'(r)});
        expect_eq(unlock, 0, "no opening during the sweep");
      end
    expect_eq(n_right_open, 1, "S1 reached by key 1 during the sweep");
    idle_to_s0();

    // Phase 2: press each combination, release, see whether the lock opens.
    for (int c = 0; c < 128; c++) begin
      idle_to_s0();
      step(7'(c));
      step(7'(c));
      step(7'b0);
      expect_eq(unlock, (7'(c) == code), "opens after press and release");
      if (unlock) begin
        open_len = 1;
        while (open_len < 100) begin
          step(7'(open_len % 128)); // keys pressed while open are ignored
          if (!unlock) break;
          open_len++;
        end
        expect_eq(open_len, OPEN_CYCLES, "open period length");
        expect_eq(q, 0, "S0 after the open period");
        if (open_len == OPEN_CYCLES) n_full_open++;
      end
    end

    // Phase 3: each combination applied in S1.
    for (int c = 0; c < 128; c++) begin
      idle_to_s0();
      step(code);
      expect_eq(q, 1, "S1 after key 1");
      step(7'(c));
      expect_eq(q, (7'(c) == code) ? 1 : (c == 0) ? 2 : 0, "state after combination in S1");
    end
    idle_to_s0();

    expect_eq(n_wrong_open, 0, "wrong openings");
    checks += 6;
    if (n_hold == 0)      begin failures++; $display("FAIL: hold in S1 never happened"); end
    if (n_release == 0)   begin failures++; $display("FAIL: release to S2 never happened"); end
    if (n_abort == 0)     begin failures++; $display("FAIL: abort from S1 never happened"); end
    if (n_reject == 0)    begin failures++; $display("FAIL: rejected key in S0 never happened"); end
    if (n_full_open == 0) begin failures++; $display("FAIL: full open period never happened"); end
    if (n_wrap == 0)      begin failures++; $display("FAIL: wrap S31->S0 never happened"); end
    $display("mechanisms: right_open=%0d wrong_open=%0d hold=%0d release=%0d abort=%0d reject=%0d full_open=%0d wrap=%0d",
             n_right_open, n_wrong_open, n_hold, n_release, n_abort, n_reject, n_full_open, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
