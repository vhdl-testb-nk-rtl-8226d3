// tb_codelock: self-checking unit testbench for the code lock.
//
// It runs the lock on a 20 ns clock and compares it, cycle by cycle, with a
// reference model written here from the lock's specification: S0 -> S1 on the
// code key, S1 holds on the code key, S1 -> S2 on release, any other input in
// S0/S1 -> S0, S2..S31 count up with UNLOCK high, S31 -> S0.
// Directed parts: the power-up state, a press held for several cycles, the
// open time (UNLOCK must stay high for exactly 30 cycles), every one of the
// 128 key combinations applied in S0 and in S1, and key presses while open.
// Then a stretch of random key traffic, biased towards the code key and
// towards "no key", checked against the model. Inputs change on the falling
// clock edge; outputs are checked just before the next rising edge.
module tb_codelock;
  import codelock_pkg::*;

  localparam int OPEN_CYCLES = 30;

  logic       clk = 1'b0;
  keycol_t    K   = NO_COL;
  keyrow_t    R   = NO_ROW;
  logic [4:0] q;
  logic       unlock;

  int checks   = 0;
  int failures = 0;

  always #10ns clk = ~clk;

  codelock dut (.clk(clk), .K(K), .R(R), .q(q), .UNLOCK(unlock));

  // Reference model.
  int model_state = 0;
  always @(posedge clk) begin
    if (model_state == 0)
      model_state <= (K == 3'b001 && R == 4'b0001) ? 1 : 0;
    else if (model_state == 1)
      model_state <= (K == 3'b001 && R == 4'b0001) ? 1 :
                     (K == 3'b000 && R == 4'b0000) ? 2 : 0;
    else if (model_state == 31)
      model_state <= 0;
    else
      model_state <= model_state + 1;
  end

  task automatic check_outputs(string what);
    checks++;
    if (q != 5'(model_state) || unlock != (model_state >= 2)) begin
      failures++;
      $display("FAIL %s: q=%0d UNLOCK=%0b, expected q=%0d UNLOCK=%0b",
               what, q, unlock, model_state, model_state >= 2);
    end
  endtask

  // Apply one key combination for one clock cycle, then check.
  task automatic apply(input logic [6:0] kr, input string what);
    @(negedge clk);
    {K, R} = kr;
    @(posedge clk);
    #1ns;
    check_outputs(what);
  endtask

  task automatic idle_to_s0();
    while (model_state != 0) apply(7'b000_0000, "return to S0");
  endtask

  int open_len;
  int sel;

  initial begin
    // Power-up state.
    #1ns;
    check_outputs("power-up");
    checks++;
    if (q != 0 || unlock != 0) begin
      failures++;
      $display("FAIL power-up: q=%0d UNLOCK=%0b", q, unlock);
    end

    // Press key 1 for three cycles, release, count the open time.
    for (int i = 0; i < 3; i++) apply({KEY1_COL, KEY1_ROW}, "key 1 held");
    checks++;
    if (q != 1) begin failures++; $display("FAIL: not in S1 while key held"); end
    apply({NO_COL, NO_ROW}, "release");
    checks++;
    if (unlock != 1 || q != 2) begin
      failures++; $display("FAIL: lock not open one cycle after release");
    end
    open_len = 1;
    while (unlock && open_len < 100) begin
      apply({NO_COL, NO_ROW}, "open");
      if (unlock) open_len++;
    end
    checks++;
    if (open_len != OPEN_CYCLES) begin
      failures++; $display("FAIL: open for %0d cycles, expected %0d", open_len, OPEN_CYCLES);
    end

    // Every key combination in S0.
    for (int c = 0; c < 128; c++) begin
      idle_to_s0();
      apply(7'(c), "combination in S0");
    end

    // Every key combination in S1.
    for (int c = 0; c < 128; c++) begin
      idle_to_s0();
      apply({KEY1_COL, KEY1_ROW}, "enter S1");
      apply(7'(c), "combination in S1");
    end

    // Keys pressed while the lock is open are ignored.
    idle_to_s0();
    apply({KEY1_COL, KEY1_ROW}, "enter S1");
    apply({NO_COL, NO_ROW}, "open");
    for (int i = 0; i < 40; i++) apply(7'($urandom_range(0, 127)), "keys while open");

    // Random traffic.
    for (int i = 0; i < 3000; i++) begin
      sel = $urandom_range(0, 3);
      case (sel)
        0:       apply({KEY1_COL, KEY1_ROW}, "random");
        1, 2:    apply({NO_COL, NO_ROW}, "random");
        default: apply(7'($urandom_range(0, 127)), "random");
      endcase
    end

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
