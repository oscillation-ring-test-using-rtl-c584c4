// msr_register: the machine's state register, built from STATE_W MSR cells.
//
// Cell i stores state bit i. In test mode each cell applies its own operation
// ops[i] to its next-state bit, so the register as a whole rewrites the
// machine's next state. The cells are also chained into a scan path, most
// significant bit first: scan_in enters cell 0, each shift moves bit i to
// bit i+1, and scan_out is cell W-1, so shifting W bits MSB first loads a
// state code while the old code leaves MSB first. The chain and its
// order are this design's own choice. fail is the OR of the cells' flags.
//
// Interface: d/ops sampled on the rising clock edge; q is the present state.
// Latency one clock from d to q; rst_n is asynchronous, active low, and loads
// RESET_STATE.
module msr_register
  import osc_ring_pkg::*;
#(
  parameter int unsigned            W           = STATE_W,
  parameter logic [W-1:0]           RESET_STATE = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              test_mode,
  input  logic              scan_en,
  input  logic              scan_in,
  input  logic [W-1:0]      d,
  input  msr_op_e [W-1:0]   ops,
  output logic [W-1:0]      q,
  output logic              scan_out,
  output logic              fail
);

  logic [W-1:0] cell_fail;
  logic [W-1:0] chain_in;

  for (genvar i = 0; i < W; i++) begin : g_cell
    if (i == 0) begin : g_head
      assign chain_in[i] = scan_in;
    end else begin : g_link
      assign chain_in[i] = q[i-1];
    end

    msr_cell #(.RESET_VAL(RESET_STATE[i])) u_cell (
      .clk       (clk),
      .rst_n     (rst_n),
      .test_mode (test_mode),
      .scan_en   (scan_en),
      .scan_in   (chain_in[i]),
      .d         (d[i]),
      .op        (ops[i]),
      .q         (q[i]),
      .fail      (cell_fail[i])
    );
  end

  assign scan_out = q[W-1];
  assign fail     = |cell_fail;

endmodule
