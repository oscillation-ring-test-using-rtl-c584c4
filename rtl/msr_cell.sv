// msr_cell: one modified state register (MSR) cell, i.e. one state bit.
//
// In normal mode the cell is an ordinary D flip-flop that stores the
// next-state bit d from the machine's combinational logic. In test mode it
// stores op(d) instead, where op is one of the operations of the MSR
// operational table: BYPASS (d), INV (~d), HOLD0 (0) or HOLD1 (1). The fifth
// result of that table, FAIL, marks a conflict between the two operands: the
// cell then keeps its value and raises the sticky fail flag. The operation
// set follows the source description; the scan path, the reset value, the
// priority scan > test > normal and the behaviour on FAIL are this design's
// own choices.
//
// Interface: op and d are sampled at the rising clock edge; q is the stored
// bit (present-state bit) and also the scan output towards the next cell.
// rst_n is an active-low asynchronous reset that loads RESET_VAL and clears
// fail. scan_en loads scan_in regardless of mode.
module msr_cell
  import osc_ring_pkg::*;
#(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    test_mode,
  input  logic    scan_en,
  input  logic    scan_in,
  input  logic    d,
  input  msr_op_e op,
  output logic    q,
  output logic    fail
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q    <= RESET_VAL;
      fail <= 1'b0;
    end else if (scan_en) begin
      q <= scan_in;
    end else if (test_mode) begin
      if (op == OP_FAIL) fail <= 1'b1;
      else               q    <= msr_apply(op, d);
    end else begin
      q <= d;
    end
  end

endmodule
