// fsm_comb_logic: combinational logic of the example six-state machine.
//
// This is the "combinational logic" cloud of the oscillation ring test: from
// the present state held in the MSR register and the primary input x it forms
// the functional next state and the primary output z (a Mealy output). The
// table is the machine's functional transition and output table, state codes
// A=000 B=001 C=010 D=011 E=100 F=111; the two unused codes 101 and 110 are
// this design's own choice: they lead to A with z = 0.
//
// Interface: ps (present state), x (primary input) -> ns (normal-mode next
// state), z (primary output). Purely combinational, no clock.
module fsm_comb_logic
  import osc_ring_pkg::*;
(
  input  logic [STATE_W-1:0] ps,
  input  logic               x,
  output logic [STATE_W-1:0] ns,
  output logic               z
);

  always_comb begin
    ns = next_normal(ps, x);
    z  = out_z(ps, x);
  end

endmodule
