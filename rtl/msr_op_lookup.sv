// msr_op_lookup: bit transition classifier and MSR operational table.
//
// For one state bit it classifies the normal-mode transition (present bit ->
// functional next bit) and the test-mode transition (present bit -> test
// next bit) as LOW, RISING, FALLING or HIGH, and looks the pair up in the MSR
// operational table, operand 1 being the normal-mode class and operand 2 the
// test-mode class. The result is BYPASS, INV, HOLD0, HOLD1 or FAIL. Both
// tables are reproduced as printed in the source description. In the top
// level it observes the running state register and reports, per bit, which
// entry of the table each transition falls into.
//
// Interface: ps_bit, ns_normal_bit, ns_test_bit -> op1, op2, op.
// Combinational.
module msr_op_lookup
  import osc_ring_pkg::*;
(
  input  logic    ps_bit,
  input  logic    ns_normal_bit,
  input  logic    ns_test_bit,
  output trans_e  op1,
  output trans_e  op2,
  output msr_op_e op
);

  always_comb begin
    op1 = classify(ps_bit, ns_normal_bit);
    op2 = classify(ps_bit, ns_test_bit);
    op  = msr_table(op1, op2);
  end

endmodule
