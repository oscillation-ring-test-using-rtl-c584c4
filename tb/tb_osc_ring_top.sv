// tb_osc_ring_top: end-to-end test of the machine under the oscillation ring
// test.
//
// The testbench keeps its own copies of the functional and of the modified
// transition/output tables and of the MSR operational table, and checks the
// design cycle by cycle against them:
//   1. reset puts the machine in A;
//   2. normal mode with random x follows the functional table;
//   3. for every state and both input values the start state is shifted in
//      through the scan path (the old state must leave on scan_out), test mode
//      is switched on with x held, and the machine must follow the modified
//      table; where it settles on the A/D pair (x = 0) or the B/F pair
//      (x = 1) the output z must toggle on every clock, i.e. oscillate at
//      half the clock rate;
//   4. test mode is switched off again mid-run and the functional table must
//      apply from the next edge.
// Each mechanism (reset, scan load, mode switch both ways, each oscillation
// pair, each MSR operation in use, the functional B/E loop) is counted and
// must happen at least once. msr_fail must stay low.
module tb_osc_ring_top;
  import osc_ring_pkg::*;

  logic            clk = 1'b0;
  logic            rst_n, test_mode, x, scan_en, scan_in;
  logic            scan_out, z, msr_fail;
  logic [2:0]      state;
  trans_e  [2:0]   normal_class, taken_class;
  msr_op_e [2:0]   table_op;
  int checks = 0, failures = 0;

  osc_ring_top dut (
    .clk(clk), .rst_n(rst_n), .test_mode(test_mode), .x(x), .scan_en(scan_en),
    .scan_in(scan_in), .scan_out(scan_out), .z(z), .state(state),
    .msr_fail(msr_fail), .normal_class(normal_class), .taken_class(taken_class),
    .table_op(table_op)
  );

  always #5 clk = ~clk;

  // ---------------- reference tables ----------------
  // Index {state code, x}. Unused codes 101/110 go to A with z = 0.
  logic [2:0] fun_ns [16];
  logic [2:0] mod_ns [16];
  logic       tab_z  [16];
  // MSR operational table, rows operand 1, columns operand 2, order L H R F.
  string op_table [4][4] = '{
    '{"BYPASS", "INV",    "HOLD0",  "FAIL"},
    '{"INV",    "BYPASS", "FAIL",   "HOLD1"},
    '{"HOLD0",  "FAIL",   "INV",    "BYPASS"},
    '{"FAIL",   "HOLD1",  "BYPASS", "INV"}
  };

  // ---------------- mechanism counters ----------------
  int n_reset, n_scan_load, n_to_test, n_to_normal;
  int n_osc_ad, n_osc_bf, n_fun_be;
  int n_op_bypass, n_op_hold0, n_op_hold1;

  function automatic int cls(logic p, logic n);
    if (!p && !n) return 0;
    if (p && n)   return 1;
    if (!p && n)  return 2;
    return 3;
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

  function automatic string sname(logic [2:0] s);
    case (s)
      3'b000: return "A";
      3'b001: return "B";
      3'b010: return "C";
      3'b011: return "D";
      3'b100: return "E";
      3'b111: return "F";
      default: return "?";
    endcase
  endfunction

  task automatic check(string what, logic [3:0] got, logic [3:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%0t %s: got %b expected %b", $time, what, got, want);
    end
  endtask

  // Checks made just before an active edge: z and the monitor outputs for
  // the present state, and the next state the register should take.
  task automatic check_cycle(output logic [2:0] expect_next);
    logic [2:0] fn, tn;
    int i;
    i  = int'({state, x});
    fn = fun_ns[i];
    tn = test_mode ? mod_ns[i] : fn;
    check("z", {3'b0, z}, {3'b0, tab_z[i]});
    for (int b = 0; b < 3; b++) begin
      int c1, c2;
      c1 = cls(state[b], fn[b]);
      c2 = cls(state[b], tn[b]);
      checks++;
      if (op_name(table_op[b]) != op_table[c1][c2]) begin
        failures++;
        $display("%0t bit %0d: table_op %s expected %s", $time, b,
                 op_name(table_op[b]), op_table[c1][c2]);
      end
      if (test_mode) begin
        if (fn[b] == tn[b]) n_op_bypass++;
        else if (tn[b])     n_op_hold1++;
        else                n_op_hold0++;
      end
    end
    expect_next = tn;
  endtask

  // One clock with x held and no scan; checks the transition taken.
  task automatic step();
    logic [2:0] nxt, prev;
    logic       zprev;
    @(negedge clk);
    scan_en = 1'b0;
    prev  = state;
    zprev = z;
    check_cycle(nxt);
    @(posedge clk);
    #1;
    check("next state", {1'b0, state}, {1'b0, nxt});
    if (!test_mode && x && ((prev == ST_B && state == ST_E) || (prev == ST_E && state == ST_B)))
      n_fun_be++;
    if (test_mode && !x && ((prev == ST_A && state == ST_D) || (prev == ST_D && state == ST_A))) begin
      n_osc_ad++;
      check("A/D oscillation: z toggles", {3'b0, z}, {3'b0, ~zprev});
    end
    if (test_mode && x && ((prev == ST_B && state == ST_F) || (prev == ST_F && state == ST_B))) begin
      n_osc_bf++;
      check("B/F oscillation: z toggles", {3'b0, z}, {3'b0, ~zprev});
    end
  endtask

  // Shift a state code in, MSB first, checking the old one leaves.
  task automatic scan_load(logic [2:0] code);
    logic [2:0] old;
    for (int b = 2; b >= 0; b--) begin
      @(negedge clk);
      if (b == 2) old = state;
      check("scan_out", {3'b0, scan_out}, {3'b0, old[b]});
      scan_en = 1'b1;
      scan_in = code[b];
      @(posedge clk);
    end
    #1;
    check("scan-loaded state", {1'b0, state}, {1'b0, code});
    n_scan_load++;
    @(negedge clk);
    scan_en = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] states [6] = '{ST_A, ST_B, ST_C, ST_D, ST_E, ST_F};

  initial begin
    for (int i = 0; i < 16; i++) begin
      fun_ns[i] = 3'b000; mod_ns[i] = 3'b000; tab_z[i] = 1'b0;
    end
    //            x=0                      x=1
    fun_ns[0]  = 3'b010; fun_ns[1]  = 3'b111;   // A -> C / F
    fun_ns[2]  = 3'b011; fun_ns[3]  = 3'b100;   // B -> D / E
    fun_ns[4]  = 3'b111; fun_ns[5]  = 3'b011;   // C -> F / D
    fun_ns[6]  = 3'b010; fun_ns[7]  = 3'b000;   // D -> C / A
    fun_ns[8]  = 3'b100; fun_ns[9]  = 3'b001;   // E -> E / B
    fun_ns[14] = 3'b000; fun_ns[15] = 3'b001;   // F -> A / B
    mod_ns[0]  = 3'b011; mod_ns[1]  = 3'b111;   // A -> D / F
    mod_ns[2]  = 3'b011; mod_ns[3]  = 3'b111;   // B -> D / F
    mod_ns[4]  = 3'b111; mod_ns[5]  = 3'b100;   // C -> F / E
    mod_ns[6]  = 3'b000; mod_ns[7]  = 3'b010;   // D -> A / C
    mod_ns[8]  = 3'b100; mod_ns[9]  = 3'b001;   // E -> E / B
    mod_ns[14] = 3'b000; mod_ns[15] = 3'b001;   // F -> A / B
    tab_z[0]  = 1; tab_z[1]  = 0;   // A
    tab_z[2]  = 1; tab_z[3]  = 0;   // B
    tab_z[4]  = 1; tab_z[5]  = 1;   // C
    tab_z[6]  = 0; tab_z[7]  = 1;   // D
    tab_z[8]  = 0; tab_z[9]  = 0;   // E
    tab_z[14] = 1; tab_z[15] = 1;   // F

    n_reset = 0; n_scan_load = 0; n_to_test = 0; n_to_normal = 0;
    n_osc_ad = 0; n_osc_bf = 0; n_fun_be = 0;
    n_op_bypass = 0; n_op_hold0 = 0; n_op_hold1 = 0;

    // 1. reset
    rst_n = 1'b0; test_mode = 1'b0; x = 1'b0; scan_en = 1'b0; scan_in = 1'b0;
    @(posedge clk);
    #1 check("reset state", {1'b0, state}, {1'b0, ST_A});
    n_reset++;
    @(negedge clk) rst_n = 1'b1;

    // 2. normal mode, random input
    for (int n = 0; n < 300; n++) begin
      @(negedge clk) x = ($urandom_range(0, 3) != 0);
      step();
    end

    // 3. every start state, both input values, in test mode
    foreach (states[s]) begin
      for (int xi = 0; xi < 2; xi++) begin
        int zchanges;
        logic zlast;
        test_mode = 1'b0;
        scan_load(states[s]);
        x = 1'(xi);
        test_mode = 1'b1;
        n_to_test++;
        zchanges = 0;
        zlast = z;
        for (int n = 0; n < 24; n++) begin
          step();
          if (n >= 8) begin
            if (z != zlast) zchanges++;
          end
          zlast = z;
        end
        // Whatever the start state, with x = 0 or x = 1 held the modified
        // machine ends on a pair (A/D, B/F) or on E (x = 0), where z sticks.
        @(negedge clk);
        checks++;
        if (xi == 1 || (state == ST_A || state == ST_D)) begin
          if (zchanges != 16) begin
            failures++;
            $display("start %s x=%0d: z changed %0d times in 16 clocks, expected 16",
                     sname(states[s]), xi, zchanges);
          end
        end else if (zchanges != 0) begin
          failures++;
          $display("start %s x=0: z changed %0d times on E, expected 0",
                   sname(states[s]), zchanges);
        end
        // 4. switch back to normal mode mid-run
        test_mode = 1'b0;
        n_to_normal++;
        for (int n = 0; n < 4; n++) begin
          x = 1'($urandom);
          step();
        end
      end
    end

    // reset once more from a non-A state
    @(negedge clk);
    rst_n = 1'b0;
    #1 check("asynchronous reset", {1'b0, state}, {1'b0, ST_A});
    n_reset++;
    @(negedge clk) rst_n = 1'b1;

    check("msr_fail stays low", {3'b0, msr_fail}, 4'b0);

    $display("mechanisms: reset=%0d scan_load=%0d to_test=%0d to_normal=%0d osc_AD=%0d osc_BF=%0d functional_BE=%0d bypass=%0d hold0=%0d hold1=%0d",
             n_reset, n_scan_load, n_to_test, n_to_normal, n_osc_ad, n_osc_bf, n_fun_be,
             n_op_bypass, n_op_hold0, n_op_hold1);
    checks += 10;
    if (n_reset == 0)     begin failures++; $display("reset never happened"); end
    if (n_scan_load == 0) begin failures++; $display("scan load never happened"); end
    if (n_to_test == 0)   begin failures++; $display("switch to test mode never happened"); end
    if (n_to_normal == 0) begin failures++; $display("switch to normal mode never happened"); end
    if (n_osc_ad == 0)    begin failures++; $display("A/D oscillation never happened"); end
    if (n_osc_bf == 0)    begin failures++; $display("B/F oscillation never happened"); end
    if (n_fun_be == 0)    begin failures++; $display("functional B/E loop never happened"); end
    if (n_op_bypass == 0) begin failures++; $display("BYPASS never used"); end
    if (n_op_hold0 == 0)  begin failures++; $display("HOLD0 never used"); end
    if (n_op_hold1 == 0)  begin failures++; $display("HOLD1 never used"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
