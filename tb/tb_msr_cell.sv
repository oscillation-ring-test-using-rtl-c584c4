// tb_msr_cell: random-stimulus check of one MSR cell against a reference
// model.
//
// Each cycle draws random reset, scan, mode, data and operation values and
// predicts the stored bit and the sticky fail flag: reset loads 0 and clears
// fail, scan loads scan_in, normal mode stores d, test mode stores d, ~d, 0
// or 1 for BYPASS, INV, HOLD0, HOLD1 and keeps the bit while setting fail for
// FAIL. Every operation and mode is counted and must occur.
module tb_msr_cell;
  import osc_ring_pkg::*;

  logic    clk = 1'b0;
  logic    rst_n, test_mode, scan_en, scan_in, d;
  msr_op_e op;
  logic    q, fail;
  logic    exp_q, exp_fail;
  int checks = 0, failures = 0;
  int seen [5];

  msr_cell dut (
    .clk(clk), .rst_n(rst_n), .test_mode(test_mode), .scan_en(scan_en),
    .scan_in(scan_in), .d(d), .op(op), .q(q), .fail(fail)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[i]) seen[i] = 0;
    rst_n = 1'b0; test_mode = 1'b0; scan_en = 1'b0; scan_in = 1'b0; d = 1'b0;
    op = OP_BYPASS;
    exp_q = 1'b0; exp_fail = 1'b0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      test_mode = ($urandom_range(0, 3) != 0);
      scan_en   = ($urandom_range(0, 7) == 0);
      scan_in   = 1'($urandom);
      d         = 1'($urandom);
      op        = msr_op_e'($urandom_range(0, 4));
      if ($urandom_range(0, 63) == 0) begin
        rst_n = 1'b0;
        #1;
        exp_q = 1'b0; exp_fail = 1'b0;
        checks += 2;
        if (q !== 1'b0 || fail !== 1'b0) begin
          failures++;
          $display("asynchronous reset not applied: q=%b fail=%b", q, fail);
        end
        rst_n = 1'b1;
      end
      if (scan_en) exp_q = scan_in;
      else if (!test_mode) exp_q = d;
      else begin
        seen[op]++;
        case (op)
          OP_BYPASS: exp_q = d;
          OP_INV:    exp_q = ~d;
          OP_HOLD0:  exp_q = 1'b0;
          OP_HOLD1:  exp_q = 1'b1;
          default:   exp_fail = 1'b1;
        endcase
      end
      @(posedge clk);
      #1;
      checks += 2;
      if (q !== exp_q) begin
        failures++;
        $display("cycle %0d: q=%b expected %b (scan=%b test=%b op=%0d d=%b)",
                 n, q, exp_q, scan_en, test_mode, op, d);
      end
      if (fail !== exp_fail) begin
        failures++;
        $display("cycle %0d: fail=%b expected %b", n, fail, exp_fail);
      end
    end
    foreach (seen[i]) begin
      checks++;
      if (seen[i] == 0) begin
        failures++;
        $display("operation %0d never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
