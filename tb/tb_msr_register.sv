// tb_msr_register: checks the three-cell MSR state register.
//
// Covers: reset to the chosen reset state; the scan path (three bits shifted
// MSB first load a code, and the old code leaves on scan_out MSB first);
// normal-mode parallel load of d; test-mode per-bit operations, each bit
// with its own operation; and the fail flag as the OR of the cells.
module tb_msr_register;
  import osc_ring_pkg::*;

  localparam logic [2:0] RST = 3'b101;

  logic            clk = 1'b0;
  logic            rst_n, test_mode, scan_en, scan_in;
  logic [2:0]      d, q;
  msr_op_e [2:0]   ops;
  logic            scan_out, fail;
  int checks = 0, failures = 0;

  msr_register #(.W(3), .RESET_STATE(RST)) dut (
    .clk(clk), .rst_n(rst_n), .test_mode(test_mode), .scan_en(scan_en),
    .scan_in(scan_in), .d(d), .ops(ops), .q(q), .scan_out(scan_out), .fail(fail)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [3:0] got, logic [3:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("%s: got %b expected %b", what, got, want);
    end
  endtask

  function automatic logic apply(msr_op_e o, logic b, logic keep);
    case (o)
      OP_BYPASS: return b;
      OP_INV:    return ~b;
      OP_HOLD0:  return 1'b0;
      OP_HOLD1:  return 1'b1;
      default:   return keep;
    endcase
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; test_mode = 1'b0; scan_en = 1'b0; scan_in = 1'b0; d = '0;
    ops = {OP_BYPASS, OP_BYPASS, OP_BYPASS};
    #7;
    check("reset state", {1'b0, q}, {1'b0, RST});
    #5 rst_n = 1'b1;

    // Scan: shift codes in, MSB first, and watch the previous code leave.
    for (int n = 0; n < 20; n++) begin
      logic [2:0] code, old;
      code = 3'($urandom);
      for (int b = 2; b >= 0; b--) begin
        @(negedge clk);
        if (b == 2) old = q;
        scan_en = 1'b1;
        test_mode = 1'($urandom);
        check("scan_out", {3'b0, scan_out}, {3'b0, old[b]});
        scan_in = code[b];
        d = 3'($urandom);
        @(posedge clk);
      end
      #1 check("scanned code", {1'b0, q}, {1'b0, code});
    end
    scan_en = 1'b0;

    // Normal mode: parallel load.
    test_mode = 1'b0;
    for (int n = 0; n < 50; n++) begin
      @(negedge clk);
      d = 3'($urandom);
      ops = {msr_op_e'($urandom_range(0, 4)), msr_op_e'($urandom_range(0, 4)),
             msr_op_e'($urandom_range(0, 4))};
      @(posedge clk);
      #1 check("normal load", {fail, q}, {1'b0, d});
    end

    // Test mode without FAIL: per-bit operations.
    test_mode = 1'b1;
    for (int n = 0; n < 200; n++) begin
      logic [2:0] want;
      @(negedge clk);
      d = 3'($urandom);
      for (int b = 0; b < 3; b++) ops[b] = msr_op_e'($urandom_range(0, 3));
      for (int b = 0; b < 3; b++) want[b] = apply(ops[b], d[b], q[b]);
      @(posedge clk);
      #1 check("test-mode operation", {fail, q}, {1'b0, want});
    end

    // One cell given FAIL: it keeps its bit, the others proceed, fail rises
    // and stays.
    for (int n = 0; n < 20; n++) begin
      logic [2:0] want;
      int fb;
      @(negedge clk);
      fb = $urandom_range(0, 2);
      d = 3'($urandom);
      for (int b = 0; b < 3; b++) ops[b] = (b == fb) ? OP_FAIL : OP_INV;
      for (int b = 0; b < 3; b++) want[b] = apply(ops[b], d[b], q[b]);
      @(posedge clk);
      #1 check("fail cycle", {fail, q}, {1'b1, want});
    end
    rst_n = 1'b0;
    #1 check("reset clears fail", {fail, q}, {1'b0, RST});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
