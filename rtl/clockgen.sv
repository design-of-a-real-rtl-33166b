// clockgen: two-phase non-overlapping clock generator (behavioural model).
//
// This is a behavioural model of a board-level circuit, not synthesizable logic: the
// non-overlap comes from the propagation delay of the gates. DOTCLOCK_L drives a
// buffer (74ACT244) into one NOR gate and an inverter (74ACT240) into the other; the
// two NOR gates (74HC02) are cross-coupled, each taking the other's output as its
// second input. PHASE1 = NOR(buffered DOTCLOCK_L, PHASE2) is high while DOTCLOCK_L
// is low, PHASE2 = NOR(inverted DOTCLOCK_L, PHASE1) while it is high. Whichever
// phase is ending must fall before the other can rise, so the two are never high
// together; the gap between them is one NOR delay.
//
// The two NOR gates form a combinational loop on purpose: it is the set-reset
// latch that keeps the phases apart. Synthesis tools report it as a logic loop.
//
// Parameters are delays in the simulation time unit (1 ns): BUF_DELAY for the buffer
// and inverter, NOR_DELAY for each NOR gate. Their values are this model's own;
// the document gives only the logic and a 10 MHz clock.
module clockgen #(
  parameter int unsigned BUF_DELAY = 3,
  parameter int unsigned NOR_DELAY = 4
) (
  input  logic dotclock_l,
  output logic phase1,
  output logic phase2
);

  logic dot_buf, dot_inv;

  assign #(BUF_DELAY) dot_buf = dotclock_l;
  assign #(BUF_DELAY) dot_inv = ~dotclock_l;
  assign #(NOR_DELAY) phase1  = ~(dot_buf | phase2);
  assign #(NOR_DELAY) phase2  = ~(dot_inv | phase1);

endmodule
