// tb_stuck_at_coverage: the oscillation test applied to single stuck-at
// faults of the example machine.
//
// Two oscillation tests are run: start in A with x = 0 held (A/D loop) and
// start in B with x = 1 held (B/F loop), 16 clocks each in test mode. A test
// detects a fault when z does not toggle on every clock. Faults are forced
// onto the three functional next-state lines, the three state lines and the
// output z, stuck at 0 and at 1 (14 faults). For every fault the testbench
// predicts from its own copy of the tables whether each test detects it and
// compares with what the design does; it also reports the fault coverage.
// Fault-free runs must oscillate in both tests.
module tb_stuck_at_coverage;
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

  logic [2:0] fun_ns [16];
  logic [2:0] mod_ns [16];
  logic       tab_z  [16];

  // Fault sites: 0..2 next-state line bit, 3..5 state line bit, 6 output z.
  task automatic apply_fault(int site, logic v);
    case (site)
      0: force dut.ns_normal[0] = v;
      1: force dut.ns_normal[1] = v;
      2: force dut.ns_normal[2] = v;
      3: force dut.state[0] = v;
      4: force dut.state[1] = v;
      5: force dut.state[2] = v;
      default: force dut.z = v;
    endcase
  endtask

  task automatic clear_fault(int site);
    case (site)
      0: release dut.ns_normal[0];
      1: release dut.ns_normal[1];
      2: release dut.ns_normal[2];
      3: release dut.state[0];
      4: release dut.state[1];
      5: release dut.state[2];
      default: release dut.z;
    endcase
  endtask

  function automatic logic [2:0] stuck3(logic [2:0] v, int site, int first, logic sv, bit on);
    if (on && site >= first && site < first + 3) v[site-first] = sv;
    return v;
  endfunction

  // Reference: does the test (start state, x) see z toggle on all 16 clocks?
  function automatic bit model_oscillates(logic [2:0] start, logic xv, int site, logic sv, bit on);
    logic [2:0] s, seen, fn, tn, nx;
    logic zp, zc;
    bit ok;
    int i;
    s  = start;
    ok = 1'b1;
    seen = stuck3(s, site, 3, sv, on);
    i  = int'({seen, xv});
    zp = (on && site == 6) ? sv : tab_z[i];
    for (int n = 0; n < 16; n++) begin
      seen = stuck3(s, site, 3, sv, on);
      i  = int'({seen, xv});
      fn = stuck3(fun_ns[int'({seen, xv})], site, 0, sv, on);
      tn = mod_ns[i];
      // Per bit: bits where functional and test tables agree pass the
      // (possibly faulty) functional line through; others are held.
      for (int b = 0; b < 3; b++)
        nx[b] = (fun_ns[i][b] == mod_ns[i][b]) ? fn[b] : tn[b];
      s  = nx;
      seen = stuck3(s, site, 3, sv, on);
      zc = (on && site == 6) ? sv : tab_z[int'({seen, xv})];
      if (zc == zp) ok = 1'b0;
      zp = zc;
    end
    return ok;
  endfunction

  // Scan the start state in fault-free, insert the fault (if any), switch
  // to test mode with x held and watch z for 16 clocks.
  task automatic run_test(logic [2:0] start, logic xv, int site, logic sv, bit on,
                          output bit osc);
    logic zp;
    test_mode = 1'b0;
    x = xv;
    for (int b = 2; b >= 0; b--) begin
      @(negedge clk);
      scan_en = 1'b1;
      scan_in = start[b];
    end
    @(negedge clk);
    scan_en = 1'b0;
    checks++;
    if (state !== start) begin
      failures++;
      $display("start state %b not loaded (%b)", start, state);
    end
    if (on) apply_fault(site, sv);
    test_mode = 1'b1;
    #1;
    osc = 1'b1;
    zp = z;
    for (int n = 0; n < 16; n++) begin
      @(negedge clk);
      #1;
      if (z == zp) osc = 1'b0;
      zp = z;
    end
    test_mode = 1'b0;
    if (on) clear_fault(site);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [2:0] starts [2] = '{ST_A, ST_B};

  initial begin
    int detected, total;
    bit osc;
    for (int i = 0; i < 16; i++) begin
      fun_ns[i] = 3'b000; mod_ns[i] = 3'b000; tab_z[i] = 1'b0;
    end
    fun_ns[0]  = 3'b010; fun_ns[1]  = 3'b111;
    fun_ns[2]  = 3'b011; fun_ns[3]  = 3'b100;
    fun_ns[4]  = 3'b111; fun_ns[5]  = 3'b011;
    fun_ns[6]  = 3'b010; fun_ns[7]  = 3'b000;
    fun_ns[8]  = 3'b100; fun_ns[9]  = 3'b001;
    fun_ns[14] = 3'b000; fun_ns[15] = 3'b001;
    mod_ns[0]  = 3'b011; mod_ns[1]  = 3'b111;
    mod_ns[2]  = 3'b011; mod_ns[3]  = 3'b111;
    mod_ns[4]  = 3'b111; mod_ns[5]  = 3'b100;
    mod_ns[6]  = 3'b000; mod_ns[7]  = 3'b010;
    mod_ns[8]  = 3'b100; mod_ns[9]  = 3'b001;
    mod_ns[14] = 3'b000; mod_ns[15] = 3'b001;
    tab_z[0]  = 1; tab_z[1]  = 0;
    tab_z[2]  = 1; tab_z[3]  = 0;
    tab_z[4]  = 1; tab_z[5]  = 1;
    tab_z[6]  = 0; tab_z[7]  = 1;
    tab_z[8]  = 0; tab_z[9]  = 0;
    tab_z[14] = 1; tab_z[15] = 1;

    rst_n = 1'b0; test_mode = 1'b0; x = 1'b0; scan_en = 1'b0; scan_in = 1'b0;
    @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // Fault-free: both tests oscillate.
    for (int t = 0; t < 2; t++) begin
      run_test(starts[t], 1'(t), 0, 1'b0, 1'b0, osc);
      checks++;
      if (!osc) begin
        failures++;
        $display("fault-free test %0d does not oscillate", t);
      end
    end

    detected = 0;
    total = 0;
    for (int site = 0; site < 7; site++) begin
      for (int v = 0; v < 2; v++) begin
        bit det_dut, det_model;
        det_dut = 1'b0;
        det_model = 1'b0;
        for (int t = 0; t < 2; t++) begin
          bit want;
          run_test(starts[t], 1'(t), site, 1'(v), 1'b1, osc);
          want = model_oscillates(starts[t], 1'(t), site, 1'(v), 1'b1);
          checks++;
          if (osc != want) begin
            failures++;
            $display("site %0d stuck-at-%0d, test %0d: design oscillates=%0d, model=%0d",
                     site, v, t, osc, want);
          end
          if (!osc) det_dut = 1'b1;
          if (!want) det_model = 1'b1;
        end
        total++;
        if (det_dut) detected++;
      end
    end
    $display("stuck-at faults detected by the two oscillation tests: %0d of %0d", detected, total);
    checks++;
    if (detected == 0) begin
      failures++;
      $display("no fault detected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
