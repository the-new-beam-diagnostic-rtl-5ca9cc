// preamp_chain_model: behavioural model (not synthesizable) of a daisy chain
// of BPM preamplifier boards. Each board multiplexes its 40 wire signals onto
// one output. Board b sees the BPM clock (b+1)*HOP_NS after the FPGA drives
// it; on that rising edge it moves to the next wire (to the first wire when
// bpm_sync is high). For SETTLE_NS after the edge its output is meaningless
// (JUNK); then it shows the selected wire's value, taken from `level`,
// indexed [board][wire], in ADC counts.
module preamp_chain_model #(
  parameter int unsigned N_BOARDS  = 8,
  parameter int unsigned N_WIRES   = 40,
  parameter int unsigned HOP_NS    = 300,
  parameter int unsigned SETTLE_NS = 1000,
  parameter int          JUNK      = 30000
) (
  input  logic bpm_clk,
  input  logic bpm_sync,
  input  int   level [N_BOARDS][N_WIRES],
  output int   out   [N_BOARDS],
  output int   sel   [N_BOARDS]
);
  for (genvar b = 0; b < N_BOARDS; b++) begin : g_board
    logic clk_b, sync_b;
    assign #((b + 1) * HOP_NS) clk_b  = bpm_clk;
    assign #((b + 1) * HOP_NS) sync_b = bpm_sync;
    initial begin
      sel[b] = 0;
      out[b] = JUNK;
    end
    always @(posedge clk_b) begin
      sel[b] = sync_b ? 0 : (sel[b] + 1) % N_WIRES;
      out[b] = JUNK;
      #(SETTLE_NS);
      out[b] = level[b][sel[b]];
    end
  end
endmodule
