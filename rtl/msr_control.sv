// msr_control: operation codes that drive the MSR cells in test mode.
//
// For each present state and input value the machine has a functional next
// state and, in the modified test-mode table, a wanted next state. This block
// gives every state bit the MSR operation that turns the first into the
// second: BYPASS where the bits agree, HOLD0 or HOLD1 (the wanted value) where
// they differ. The two tables come from the source description; the rule is
// this design's own (it matches the operational table's entries for
// (RISING, LOW) -> HOLD0 and (FALLING, HIGH) -> HOLD1). In hardware it is a
// 16-entry read-only table of 3 x 3-bit codes, fixed when the test is
// planned.
//
// Interface: ps, x -> ops[i] for state bit i. Combinational.
module msr_control
  import osc_ring_pkg::*;
(
  input  logic [STATE_W-1:0]    ps,
  input  logic                  x,
  output msr_op_e [STATE_W-1:0] ops
);

  logic [STATE_W-1:0] ns_normal;
  logic [STATE_W-1:0] ns_test;

  always_comb begin
    ns_normal = next_normal(ps, x);
    ns_test   = next_test(ps, x);
    for (int i = 0; i < STATE_W; i++) begin
      ops[i] = msr_op_for(ns_normal[i], ns_test[i]);
    end
  end

endmodule
