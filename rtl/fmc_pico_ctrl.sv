// fmc_pico_ctrl: control core of the 4-channel FMC picoampere meter.
//
// While `run` is high the core converts all Faraday-cup channels continuously
// at one conversion every `period` clock cycles (116 cycles at 100 MHz, about
// 864 ksps). Every sample feeds one multi-pass MAV filter per channel, whose
// number of stages and samples per stage come from the configuration space;
// each filter output updates that channel's DC current value (sign-extended
// to 32 bits) and increments dc_count. With raw_en high the raw samples are
// also streamed: for each conversion one 32-bit word per channel
//   [31:30] channel, [29:20] conversion sequence number, [19:0] sample
// is pushed into the stream FIFO, one word per cycle. A word that meets a full
// FIFO is dropped and sets the sticky `overflow` flag, which clears when
// raw_en is taken low. Changing the MAV settings, or stopping, empties the
// filters so that no average mixes two settings.
//
// The channel count, 20-bit resolution, continuous mode, raw stream and
// filtered-value access follow the published description of the system; the raw word layout, the
// drop-on-full policy and the ADC serial protocol are this design's choices.
module fmc_pico_ctrl #(
  parameter int unsigned N_CH       = 4,
  parameter int unsigned BITS       = 20,
  parameter int unsigned MAX_STAGES = 4,
  parameter int unsigned MAX_LOG2N  = 10,
  parameter int unsigned CNV_CYCLES = 50
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        run,
  input  logic                        raw_en,
  input  logic [15:0]                 period,
  input  logic [2:0]                  mav_stages,
  input  logic [3:0]                  mav_log2n,
  // ADCs of the mezzanine card
  output logic                        adc_cnv,
  output logic                        adc_sck,
  input  logic [N_CH-1:0]             adc_sdo,
  // filtered DC current
  output logic [N_CH-1:0][31:0]       dc_value,
  output logic [31:0]                 dc_count,
  // raw stream to the FIFO
  output logic                        raw_push,
  output logic [31:0]                 raw_data,
  input  logic                        raw_ready,
  output logic                        overflow
);
  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1;

  logic                        smp_valid;
  logic [N_CH-1:0][BITS-1:0]   smp;
  logic [N_CH-1:0]             f_valid;
  logic signed [BITS-1:0]      f_data [N_CH];
  logic [2:0]                  stages_q;
  logic [3:0]                  log2n_q;
  logic                        f_clear;

  serial_adc_reader #(.N_CH(N_CH), .BITS(BITS), .CNV_CYCLES(CNV_CYCLES)) u_adc (
    .clk, .rst_n,
    .enable       (run),
    .period       (period),
    .adc_cnv, .adc_sck, .adc_sdo,
    .sample_valid (smp_valid),
    .samples      (smp)
  );

  // settings change detection
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      stages_q <= '0;
      log2n_q  <= '0;
    end else begin
      stages_q <= mav_stages;
      log2n_q  <= mav_log2n;
    end
  end
  always_comb f_clear = !run || (stages_q != mav_stages) || (log2n_q != mav_log2n);

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    mav_filter #(.DW(BITS), .MAX_STAGES(MAX_STAGES), .MAX_LOG2N(MAX_LOG2N)) u_mav (
      .clk, .rst_n,
      .clear     (f_clear),
      .n_stages  (mav_stages),
      .log2n     (mav_log2n),
      .in_valid  (smp_valid),
      .in_data   (smp[c]),
      .out_valid (f_valid[c]),
      .out_data  (f_data[c])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dc_value <= '0;
      dc_count <= '0;
    end else begin
      for (int c = 0; c < int'(N_CH); c++)
        if (f_valid[c]) dc_value[c] <= 32'(f_data[c]);
      if (f_valid[0]) dc_count <= dc_count + 32'd1;
    end
  end

  // raw stream serializer
  logic [N_CH-1:0][BITS-1:0] hold;
  logic [CHW-1:0]            ch;
  logic                      sending;
  logic [9:0]                seq;

  always_comb begin
    raw_push = sending;
    raw_data = {2'(ch), seq, 20'(signed'(hold[ch]))};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hold     <= '0;
      ch       <= '0;
      sending  <= 1'b0;
      seq      <= '0;
      overflow <= 1'b0;
    end else begin
      if (!raw_en) overflow <= 1'b0;
      if (sending) begin
        if (!raw_ready) overflow <= 1'b1;
        if (ch == CHW'(N_CH - 1)) begin
          sending <= 1'b0;
          seq     <= seq + 10'd1;
        end else begin
          ch <= ch + 1'b1;
        end
      end
      if (smp_valid && raw_en) begin
        hold    <= smp;
        ch      <= '0;
        sending <= 1'b1;
      end
    end
  end

endmodule
