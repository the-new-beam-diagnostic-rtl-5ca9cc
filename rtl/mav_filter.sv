// mav_filter: multiple-pass moving average filter for one channel.
//
// The filter is a cascade of up to MAX_STAGES averaging stages. Each stage
// accumulates 2**log2n consecutive inputs, then emits their mean (arithmetic
// shift right by log2n) and starts over, so stage k produces one value for
// every (2**log2n)**k input samples. The number of active stages (n_stages)
// and the samples per stage (2**log2n) are set at run time; the output is that
// of the last active stage. The latency, counted in input samples, is
// therefore (samples per stage)**(number of stages), which is the latency the
// described filter has. That each pass is a block average that restarts after
// every output, and that the samples per stage are a power of two so that the
// division is a shift, are this design's choices.
//
// Interface: in_valid/in_data carry one signed sample; out_valid pulses for
// one cycle with the new average on out_data. clear empties every stage (use it
// when the settings change or to align the averaging window). n_stages of 0 is
// treated as 1, values above MAX_STAGES as MAX_STAGES.
// Timing: each stage adds one register, so out_valid follows the sample that
// completes the window by n_stages cycles.
module mav_filter #(
  parameter int unsigned DW         = 20,
  parameter int unsigned MAX_STAGES = 4,
  parameter int unsigned MAX_LOG2N  = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 clear,
  input  logic [2:0]           n_stages,
  input  logic [3:0]           log2n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_data,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_data
);
  localparam int unsigned AW = DW + MAX_LOG2N;   // accumulator width
  localparam int unsigned CW = MAX_LOG2N + 1;    // sample counter width

  logic [3:0] l2n;
  logic [2:0] last;         // index of last active stage

  always_comb begin
    l2n = (log2n > 4'(MAX_LOG2N)) ? 4'(MAX_LOG2N) : log2n;
    if (n_stages == 3'd0)                    last = 3'd0;
    else if (n_stages > 3'(MAX_STAGES))      last = 3'(MAX_STAGES - 1);
    else                                     last = n_stages - 3'd1;
  end

  logic signed [AW-1:0]  acc   [MAX_STAGES];
  logic [CW-1:0]         cnt   [MAX_STAGES];
  logic                  sv    [MAX_STAGES];   // stage output valid
  logic signed [DW-1:0]  sd    [MAX_STAGES];   // stage output data

  for (genvar s = 0; s < MAX_STAGES; s++) begin : g_stage
    logic                 iv;
    logic signed [DW-1:0] id;
    logic signed [AW-1:0] sum;
    logic [CW-1:0]        nsamp;

    if (s == 0) begin : g_first
      assign iv = in_valid;
      assign id = in_data;
    end else begin : g_next
      assign iv = sv[s-1];
      assign id = sd[s-1];
    end

    always_comb begin
      sum   = acc[s] + AW'(id);
      nsamp = CW'(1) << l2n;
    end

    always_ff @(posedge clk) begin
      if (!rst_n || clear) begin
        acc[s] <= '0;
        cnt[s] <= '0;
        sv[s]  <= 1'b0;
        sd[s]  <= '0;
      end else begin
        sv[s] <= 1'b0;
        if (iv) begin
          if (cnt[s] == nsamp - CW'(1)) begin
            acc[s] <= '0;
            cnt[s] <= '0;
            sv[s]  <= 1'b1;
            sd[s]  <= DW'(sum >>> l2n);
          end else begin
            acc[s] <= sum;
            cnt[s] <= cnt[s] + CW'(1);
          end
        end
      end
    end
  end

  always_comb begin
    out_valid = 1'b0;
    out_data  = '0;
    for (int s = 0; s < MAX_STAGES; s++) begin
      if (3'(s) == last) begin
        out_valid = sv[s];
        out_data  = sd[s];
      end
    end
  end

endmodule
