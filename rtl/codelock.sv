// codelock: a one-digit code lock built as a Moore state machine on a 5-bit
// state counter.
//
// The lock waits in state S0 for the code key (key "1" by default). While the
// key is pressed it moves to, and stays in, S1. When every key is released in
// S1 it moves to S2, and from there the state simply counts S2, S3, ... S31
// and wraps back to S0. UNLOCK is 1 in every state from S2 to S31, so the lock
// stays open for 30 clock cycles. Any other key, or any combination of keys,
// seen in S0 or S1 sends the machine back to S0. Keys are not looked at while
// the lock is open.
//
// Interface:
//   clk     rising-edge clock (a 50 MHz, 20 ns clock in the reference bench)
//   K[1:3]  keypad column lines, R[1:4] keypad row lines (see codelock_pkg);
//           sampled on each rising edge, expected synchronous to clk
//   q[4:0]  the current state number, a debug output: S0 = 0 ... S31 = 31
//   UNLOCK  1 while the lock is open (states S2..S31), decoded from the state
//           register alone, so it changes only after a clock edge
//
// Timing: the key press is seen at the edge that loads S1; the release at the
// edge that loads S2, which is when UNLOCK rises. It falls at the edge that
// loads S0, OPEN_CYCLES edges later.
//
// The state sequence, the key encoding, the 30-cycle open time, the port list
// and the split into next-state decoder, output decoder and state register all
// follow the original design. The parameters (code key and open time) are
// this implementation's generalisation; their defaults give the original lock.
// The original has no reset input: its state register powers up in S0, which
// is modelled here by the register's initial value. Should it start anywhere
// else, it counts through to S0 within 32 clock cycles, with UNLOCK high on
// the way unless it started in S0. Lint tools note
// that a register with an initial value is also assigned in a clocked
// process; that is intended here, as it is how a power-up value is given to
// the flip-flops of an FPGA or CPLD.
module codelock
  import codelock_pkg::*;
#(
  parameter keycol_t CODE_COL    = KEY1_COL, // column lines of the code key
  parameter keyrow_t CODE_ROW    = KEY1_ROW, // row lines of the code key
  parameter int      OPEN_CYCLES = 30        // clock cycles UNLOCK stays high
) (
  input  logic                clk,
  input  keycol_t             K,
  input  keyrow_t             R,
  output logic [4:0]          q,
  output logic                UNLOCK
);

  // States: S0 waits for the key, S1 waits for its release, S2..S_LAST are
  // the open states.
  localparam int          STATE_W = $clog2(OPEN_CYCLES + 2);
  localparam logic [STATE_W-1:0] S_WAIT = '0;
  localparam logic [STATE_W-1:0] S_HELD = STATE_W'(1);
  localparam logic [STATE_W-1:0] S_OPEN = STATE_W'(2);
  localparam logic [STATE_W-1:0] S_LAST = STATE_W'(OPEN_CYCLES + 1);

  logic [STATE_W-1:0] state = S_WAIT;
  logic [STATE_W-1:0] nextstate;

  logic code_pressed, none_pressed;
  assign code_pressed = (K == CODE_COL) && (R == CODE_ROW);
  assign none_pressed = (K == NO_COL)   && (R == NO_ROW);

  // Next-state decoder.
  always_comb begin
    if (state == S_WAIT) begin
      nextstate = code_pressed ? S_HELD : S_WAIT;
    end else if (state == S_HELD) begin
      if (code_pressed)      nextstate = S_HELD;
      else if (none_pressed) nextstate = S_OPEN;
      else                   nextstate = S_WAIT;
    end else if (state >= S_LAST) begin
      nextstate = S_WAIT;
    end else begin
      nextstate = state + 1'b1;
    end
  end

  // State register.
  always_ff @(posedge clk) begin
    state <= nextstate;
  end

  // Output decoder and debug output.
  assign UNLOCK = (state >= S_OPEN);
  assign q      = 5'(state);

endmodule
