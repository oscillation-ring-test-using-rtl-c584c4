// osc_ring_top: example finite state machine prepared for the oscillation
// ring test.
//
// The machine is its combinational logic (fsm_comb_logic) closed into a ring
// through a state register of modified state register cells (msr_register).
// With test_mode low it runs its functional table. With test_mode high the
// cells rewrite the next state with the operations supplied by msr_control,
// so that the machine follows the modified table: for a fixed input x it then
// moves back and forth between two states with different outputs (A and D
// for x = 0, B and F for x = 1), and z toggles every clock. A tester holds x,
// clocks the machine at speed and watches z: a missing or stopped toggle
// points to a stuck fault, a wrong rate to a delay fault. The structure (logic
// cloud, MSR register in the feedback, x in and z out) and all tables follow
// the source description.
//
// The following are this design's own: the scan path used to load a start
// state (scan_en, scan_in, scan_out, MSB first), the asynchronous active-low
// reset to state A, and the per-bit monitor outputs: normal_class and
// taken_class give the bit transition class (LOW/RISING/FALLING/HIGH) of the
// functional transition and of the one the register actually makes at the
// coming edge, and table_op the entry of the MSR operational table
// (msr_op_lookup) for that pair.
//
// Timing: one state transition per rising clock edge; z is combinational from
// the present state and x (Mealy output); msr_fail is sticky until reset.
module osc_ring_top
  import osc_ring_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  test_mode,
  input  logic                  x,
  input  logic                  scan_en,
  input  logic                  scan_in,
  output logic                  scan_out,
  output logic                  z,
  output logic [STATE_W-1:0]    state,
  output logic                  msr_fail,
  output trans_e  [STATE_W-1:0] normal_class,
  output trans_e  [STATE_W-1:0] taken_class,
  output msr_op_e [STATE_W-1:0] table_op
);

  logic [STATE_W-1:0]    ns_normal;
  logic [STATE_W-1:0]    ns_taken;
  msr_op_e [STATE_W-1:0] ops;

  fsm_comb_logic u_logic (
    .ps (state),
    .x  (x),
    .ns (ns_normal),
    .z  (z)
  );

  msr_control u_control (
    .ps  (state),
    .x   (x),
    .ops (ops)
  );

  msr_register #(.W(STATE_W), .RESET_STATE(ST_A)) u_register (
    .clk       (clk),
    .rst_n     (rst_n),
    .test_mode (test_mode),
    .scan_en   (scan_en),
    .scan_in   (scan_in),
    .d         (ns_normal),
    .ops       (ops),
    .q         (state),
    .scan_out  (scan_out),
    .fail      (msr_fail)
  );

  // Next state the register will take at the coming edge (scan aside).
  always_comb begin
    for (int i = 0; i < STATE_W; i++) begin
      ns_taken[i] = test_mode ? msr_apply(ops[i], ns_normal[i]) : ns_normal[i];
    end
  end

  for (genvar i = 0; i < STATE_W; i++) begin : g_monitor
    msr_op_lookup u_lookup (
      .ps_bit        (state[i]),
      .ns_normal_bit (ns_normal[i]),
      .ns_test_bit   (ns_taken[i]),
      .op1           (normal_class[i]),
      .op2           (taken_class[i]),
      .op            (table_op[i])
    );
  end

endmodule
