// osc_ring_pkg: types, constants and tables shared by the oscillation ring
// test design.
//
// The design is a small Mealy machine (six states, one input x, one output z)
// whose state register is built from modified state register (MSR) cells. In
// normal mode the machine follows its functional transition table. In test
// mode every MSR cell rewrites its next-state bit with one of four operations
// (bypass, invert, hold 0, hold 1) so that, for a fixed input, the machine
// bounces between two states whose outputs differ: the primary output then
// oscillates at half the clock rate and can be observed directly.
//
// Taken from the source description:
//   * the state codes A=000 B=001 C=010 D=011 E=100 F=111,
//   * the functional (normal mode) transition and output table,
//   * the modified (test mode) transition table,
//   * the bit transition classes LOW/RISING/FALLING/HIGH,
//   * the MSR operational table over two transition classes, with its five
//     results BYPASS, INV, HOLD0, HOLD1 and FAIL.
// Own choices:
//   * the two unused codes 101 and 110 go to state A with output 0,
//   * the encodings of the enums below,
//   * the rule that turns a (normal bit, test bit) pair into an MSR operation
//     (msr_op_for): equal bits bypass, differing bits hold the test value.
package osc_ring_pkg;

  // Width of the state register (three MSR cells).
  localparam int unsigned STATE_W = 3;

  typedef enum logic [STATE_W-1:0] {
    ST_A = 3'b000,
    ST_B = 3'b001,
    ST_C = 3'b010,
    ST_D = 3'b011,
    ST_E = 3'b100,
    ST_F = 3'b111
  } state_e;

  // Bit transition class of one state bit between present and next state.
  typedef enum logic [1:0] {
    TR_LOW     = 2'b00,  // 0 -> 0
    TR_RISING  = 2'b01,  // 0 -> 1
    TR_FALLING = 2'b10,  // 1 -> 0
    TR_HIGH    = 2'b11   // 1 -> 1
  } trans_e;

  // Operation an MSR cell applies to its next-state input in test mode.
  typedef enum logic [2:0] {
    OP_BYPASS = 3'd0,  // output = input
    OP_INV    = 3'd1,  // output = inverted input
    OP_HOLD0  = 3'd2,  // output = 0
    OP_HOLD1  = 3'd3,  // output = 1
    OP_FAIL   = 3'd4   // conflicting operands: the cell flags a failure
  } msr_op_e;

  // Bit transition class: the encoding above is simply {present, next}.
  function automatic trans_e classify(input logic ps_bit, input logic ns_bit);
    return trans_e'({ps_bit, ns_bit});
  endfunction

  // MSR operational table. Operand 1 is the transition class of the bit in
  // normal mode, operand 2 its class in test mode.
  function automatic msr_op_e msr_table(input trans_e op1, input trans_e op2);
    unique case (op1)
      TR_LOW:
        unique case (op2)
          TR_LOW:     return OP_BYPASS;
          TR_HIGH:    return OP_INV;
          TR_RISING:  return OP_HOLD0;
          TR_FALLING: return OP_FAIL;
        endcase
      TR_HIGH:
        unique case (op2)
          TR_LOW:     return OP_INV;
          TR_HIGH:    return OP_BYPASS;
          TR_RISING:  return OP_FAIL;
          TR_FALLING: return OP_HOLD1;
        endcase
      TR_RISING:
        unique case (op2)
          TR_LOW:     return OP_HOLD0;
          TR_HIGH:    return OP_FAIL;
          TR_RISING:  return OP_INV;
          TR_FALLING: return OP_BYPASS;
        endcase
      TR_FALLING:
        unique case (op2)
          TR_LOW:     return OP_FAIL;
          TR_HIGH:    return OP_HOLD1;
          TR_RISING:  return OP_BYPASS;
          TR_FALLING: return OP_INV;
        endcase
    endcase
    return OP_FAIL;
  endfunction

  // Effect of an operation on a next-state bit. FAIL leaves the bit as it is.
  function automatic logic msr_apply(input msr_op_e op, input logic d);
    unique case (op)
      OP_BYPASS: return d;
      OP_INV:    return ~d;
      OP_HOLD0:  return 1'b0;
      OP_HOLD1:  return 1'b1;
      default:   return d;
    endcase
  endfunction

  // Functional (normal mode) next state.
  function automatic logic [STATE_W-1:0] next_normal(input logic [STATE_W-1:0] ps,
                                                     input logic x);
    unique case (ps)
      ST_A:    return x ? ST_F : ST_C;
      ST_B:    return x ? ST_E : ST_D;
      ST_C:    return x ? ST_D : ST_F;
      ST_D:    return x ? ST_A : ST_C;
      ST_E:    return x ? ST_B : ST_E;
      ST_F:    return x ? ST_B : ST_A;
      default: return ST_A;
    endcase
  endfunction

  // Output z of the machine; the test mode table keeps the same outputs.
  function automatic logic out_z(input logic [STATE_W-1:0] ps, input logic x);
    unique case (ps)
      ST_A:    return ~x;
      ST_B:    return ~x;
      ST_C:    return 1'b1;
      ST_D:    return x;
      ST_E:    return 1'b0;
      ST_F:    return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  // Test mode next state: the modified transition table.
  function automatic logic [STATE_W-1:0] next_test(input logic [STATE_W-1:0] ps,
                                                   input logic x);
    unique case (ps)
      ST_A:    return x ? ST_F : ST_D;
      ST_B:    return x ? ST_F : ST_D;
      ST_C:    return x ? ST_E : ST_F;
      ST_D:    return x ? ST_C : ST_A;
      ST_E:    return x ? ST_B : ST_E;
      ST_F:    return x ? ST_B : ST_A;
      default: return ST_A;
    endcase
  endfunction

  // Operation that turns a normal-mode next-state bit into the test-mode one.
  // Equal bits pass through; where they differ the cell holds the test value.
  // This agrees with the operational table's HOLD0 entry for (RISING, LOW)
  // and HOLD1 entry for (FALLING, HIGH).
  function automatic msr_op_e msr_op_for(input logic normal_bit, input logic test_bit);
    if (normal_bit == test_bit) return OP_BYPASS;
    return test_bit ? OP_HOLD1 : OP_HOLD0;
  endfunction

endpackage
