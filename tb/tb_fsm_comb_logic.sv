// tb_fsm_comb_logic: exhaustive check of the machine's combinational logic.
//
// Drives all eight 3-bit present-state codes with x = 0 and x = 1 and
// compares next state and output with the functional transition table,
// written out here as literal constants. The unused codes 101 and 110 are
// expected to go to A (000) with z = 0.
module tb_fsm_comb_logic;
  logic [2:0] ps, ns;
  logic       x, z;
  int checks = 0, failures = 0;

  // {next state for x=0, next state for x=1, z for x=0, z for x=1}
  // indexed by present-state code.
  logic [7:0] table_row [8] = '{
    {3'b010, 3'b111, 1'b1, 1'b0},  // A 000 -> C / F
    {3'b011, 3'b100, 1'b1, 1'b0},  // B 001 -> D / E
    {3'b111, 3'b011, 1'b1, 1'b1},  // C 010 -> F / D
    {3'b010, 3'b000, 1'b0, 1'b1},  // D 011 -> C / A
    {3'b100, 3'b001, 1'b0, 1'b0},  // E 100 -> E / B
    {3'b000, 3'b000, 1'b0, 1'b0},  // 101 unused
    {3'b000, 3'b000, 1'b0, 1'b0},  // 110 unused
    {3'b000, 3'b001, 1'b1, 1'b1}   // F 111 -> A / B
  };

  fsm_comb_logic dut (.ps(ps), .x(x), .ns(ns), .z(z));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 8; s++) begin
      for (int xi = 0; xi < 2; xi++) begin
        logic [2:0] exp_ns;
        logic       exp_z;
        ps = 3'(s);
        x  = 1'(xi);
        #1;
        exp_ns = (xi == 0) ? table_row[s][7:5] : table_row[s][4:2];
        exp_z  = (xi == 0) ? table_row[s][1]   : table_row[s][0];
        checks += 2;
        if (ns !== exp_ns) begin
          failures++;
          $display("ps=%b x=%0d: ns=%b expected %b", ps, x, ns, exp_ns);
        end
        if (z !== exp_z) begin
          failures++;
          $display("ps=%b x=%0d: z=%b expected %b", ps, x, z, exp_z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
