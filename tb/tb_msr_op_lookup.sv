// tb_msr_op_lookup: exhaustive check of the bit transition classifier and of
// the MSR operational table.
//
// All eight (present, normal next, test next) bit combinations are applied to
// the unit under test. The classes are checked against the bit transition
// truth table (00 LOW, 01 RISING, 10 FALLING, 11 HIGH) and the operation
// against the 4 x 4 operational table, both typed in here as strings.
module tb_msr_op_lookup;
  import osc_ring_pkg::*;

  logic    ps_bit, nn_bit, nt_bit;
  trans_e  op1, op2;
  msr_op_e op;
  int checks = 0, failures = 0;

  // Rows: operand 1, columns: operand 2, both in the order L H R F.
  string op_table [4][4] = '{
    '{"BYPASS", "INV",    "HOLD0",  "FAIL"},
    '{"INV",    "BYPASS", "FAIL",   "HOLD1"},
    '{"HOLD0",  "FAIL",   "INV",    "BYPASS"},
    '{"FAIL",   "HOLD1",  "BYPASS", "INV"}
  };
  string class_name [4] = '{"L", "H", "R", "F"};

  msr_op_lookup dut (
    .ps_bit(ps_bit), .ns_normal_bit(nn_bit), .ns_test_bit(nt_bit),
    .op1(op1), .op2(op2), .op(op)
  );

  // Index L=0 H=1 R=2 F=3 of a (present, next) bit pair.
  function automatic int class_index(logic p, logic n);
    if (!p && !n) return 0;
    if (p && n)   return 1;
    if (!p && n)  return 2;
    return 3;
  endfunction

  function automatic string trans_name(trans_e t);
    case (t)
      TR_LOW:     return "L";
      TR_HIGH:    return "H";
      TR_RISING:  return "R";
      TR_FALLING: return "F";
      default:    return "?";
    endcase
  endfunction

  function automatic string op_name(msr_op_e o);
    case (o)
      OP_BYPASS: return "BYPASS";
      OP_INV:    return "INV";
      OP_HOLD0:  return "HOLD0";
      OP_HOLD1:  return "HOLD1";
      OP_FAIL:   return "FAIL";
      default:   return "?";
    endcase
  endfunction

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int c1, c2;
      {ps_bit, nn_bit, nt_bit} = 3'(v);
      #1;
      c1 = class_index(ps_bit, nn_bit);
      c2 = class_index(ps_bit, nt_bit);
      checks += 3;
      if (trans_name(op1) != class_name[c1]) begin
        failures++;
        $display("op1 for %b%b is %s, expected %s", ps_bit, nn_bit, trans_name(op1), class_name[c1]);
      end
      if (trans_name(op2) != class_name[c2]) begin
        failures++;
        $display("op2 for %b%b is %s, expected %s", ps_bit, nt_bit, trans_name(op2), class_name[c2]);
      end
      if (op_name(op) != op_table[c1][c2]) begin
        failures++;
        $display("op for (%s,%s) is %s, expected %s", class_name[c1], class_name[c2],
                 op_name(op), op_table[c1][c2]);
      end
    end
    // The table also covers class pairs with different present bits, which
    // a single running bit cannot produce: check them through the package
    // function the lookup uses.
    for (int a = 0; a < 4; a++) begin
      for (int b = 0; b < 4; b++) begin
        trans_e t1, t2;
        t1 = trans_e'(a == 0 ? 2'b00 : a == 1 ? 2'b11 : a == 2 ? 2'b01 : 2'b10);
        t2 = trans_e'(b == 0 ? 2'b00 : b == 1 ? 2'b11 : b == 2 ? 2'b01 : 2'b10);
        checks++;
        if (op_name(msr_table(t1, t2)) != op_table[a][b]) begin
          failures++;
          $display("table(%s,%s) = %s, expected %s", class_name[a], class_name[b],
                   op_name(msr_table(t1, t2)), op_table[a][b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
