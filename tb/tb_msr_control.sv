// tb_msr_control: checks the test-mode operation codes for every present
// state and input value.
//
// Applying each bit's operation to the functional next state must give the
// modified (test-mode) next state; both tables are typed in here. The
// operation itself must be BYPASS where the two bits agree and HOLD0/HOLD1
// (the wanted value) where they differ.
module tb_msr_control;
  import osc_ring_pkg::*;

  logic [2:0]      ps;
  logic            x;
  msr_op_e [2:0]   ops;
  int checks = 0, failures = 0;

  // Functional and modified next states, index {ps, x}.
  logic [2:0] ns_fun [16];
  logic [2:0] ns_mod [16];

  msr_control dut (.ps(ps), .x(x), .ops(ops));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      ns_fun[i] = 3'b000;
      ns_mod[i] = 3'b000;
    end
    // state      x=0                         x=1
    ns_fun[0]  = 3'b010; ns_fun[1]  = 3'b111;   // A
    ns_fun[2]  = 3'b011; ns_fun[3]  = 3'b100;   // B
    ns_fun[4]  = 3'b111; ns_fun[5]  = 3'b011;   // C
    ns_fun[6]  = 3'b010; ns_fun[7]  = 3'b000;   // D
    ns_fun[8]  = 3'b100; ns_fun[9]  = 3'b001;   // E
    ns_fun[14] = 3'b000; ns_fun[15] = 3'b001;   // F
    ns_mod[0]  = 3'b011; ns_mod[1]  = 3'b111;   // A
    ns_mod[2]  = 3'b011; ns_mod[3]  = 3'b111;   // B
    ns_mod[4]  = 3'b111; ns_mod[5]  = 3'b100;   // C
    ns_mod[6]  = 3'b000; ns_mod[7]  = 3'b010;   // D
    ns_mod[8]  = 3'b100; ns_mod[9]  = 3'b001;   // E
    ns_mod[14] = 3'b000; ns_mod[15] = 3'b001;   // F

    for (int i = 0; i < 16; i++) begin
      {ps, x} = 4'(i);
      #1;
      for (int b = 0; b < 3; b++) begin
        logic f, m, got;
        msr_op_e want;
        f = ns_fun[i][b];
        m = ns_mod[i][b];
        case (ops[b])
          OP_BYPASS: got = f;
          OP_INV:    got = ~f;
          OP_HOLD0:  got = 1'b0;
          OP_HOLD1:  got = 1'b1;
          default:   got = ~m;
        endcase
        want = (f == m) ? OP_BYPASS : (m ? OP_HOLD1 : OP_HOLD0);
        checks += 2;
        if (got !== m) begin
          failures++;
          $display("ps=%b x=%b bit %0d: op %0d gives %b, modified table has %b",
                   ps, x, b, ops[b], got, m);
        end
        if (ops[b] != want) begin
          failures++;
          $display("ps=%b x=%b bit %0d: op %0d, expected %0d", ps, x, b, ops[b], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
