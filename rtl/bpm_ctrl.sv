// bpm_ctrl: BPM scan control core.
//
// After a start command the core drives the BPM clock to the daisy chain of
// preamplifier boards: bunches of N_WIRES consecutive clock periods of
// `pulse_cycles` each (200 us by default), separated by pauses of
// `pause_cycles`. Each clock period selects one wire in every grid of the
// chain; bpm_sync is high during the first period of a bunch so that the
// boards restart at the first wire. Within each period the core waits
// `delay_cycles` (the bpm delay: the time the last board of the chain needs to
// see the clock edge and settle), then averages 2**LOG2_AVG (64) consecutive
// samples of each of the N_ADC simultaneously converting ADCs in a single-pass
// MAV filter and writes the results, sign-extended to 32 bits, into the BPM
// data memory at that wire's index, all banks in one cycle. A stop command
// ends scanning after the current bunch.
//
// The bunch/pause pattern, the 200 us clock, the bpm delay, the 8 ADCs and the
// 64-sample average follow the published description of the system. The clock duty cycle (high for the
// first half), the sync signal, the stop command and the `missed` flag (set
// when a period ends before its average was complete) are this design's own.
// Timing: bpm_clk/bpm_sync are registered; the memory write strobe wr_en is a
// one-cycle pulse per wire.
module bpm_ctrl #(
  parameter int unsigned N_ADC      = 8,
  parameter int unsigned BITS       = 16,
  parameter int unsigned N_WIRES    = 40,
  parameter int unsigned LOG2_AVG   = 6,
  parameter int unsigned CNV_CYCLES = 50
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             start,
  input  logic                             stop,
  input  logic [31:0]                      pulse_cycles,
  input  logic [31:0]                      delay_cycles,
  input  logic [31:0]                      pause_cycles,
  input  logic [15:0]                      adc_period,
  // BPM control signals to the preamplifier daisy chain
  output logic                             bpm_clk,
  output logic                             bpm_sync,
  // on-board ADCs
  output logic                             adc_cnv,
  output logic                             adc_sck,
  input  logic [N_ADC-1:0]                 adc_sdo,
  // BPM data memory write port
  output logic                             wr_en,
  output logic [$clog2(N_WIRES)-1:0]       wr_wire,
  output logic [N_ADC-1:0][31:0]           wr_data,
  // status
  output logic                             busy,
  output logic                             missed,
  output logic [31:0]                      scans
);
  localparam int unsigned WW = $clog2(N_WIRES);

  typedef enum logic [1:0] {S_IDLE, S_PULSE, S_PAUSE} state_e;
  state_e state;

  logic [31:0]   tcnt;
  logic [WW-1:0] wire_idx;
  logic          acq, got, stop_req;
  logic          mav_clear;
  logic          smp_valid;
  logic [N_ADC-1:0][BITS-1:0] smp;
  logic [N_ADC-1:0]           avg_valid;
  logic signed [BITS-1:0]     avg [N_ADC];

  serial_adc_reader #(.N_CH(N_ADC), .BITS(BITS), .CNV_CYCLES(CNV_CYCLES)) u_adc (
    .clk, .rst_n,
    .enable       (state != S_IDLE),
    .period       (adc_period),
    .adc_cnv, .adc_sck, .adc_sdo,
    .sample_valid (smp_valid),
    .samples      (smp)
  );

  always_comb mav_clear = (state == S_PULSE) && (tcnt == delay_cycles);

  for (genvar b = 0; b < N_ADC; b++) begin : g_avg
    mav_filter #(.DW(BITS), .MAX_STAGES(1), .MAX_LOG2N(LOG2_AVG)) u_mav (
      .clk, .rst_n,
      .clear     (mav_clear),
      .n_stages  (3'd1),
      .log2n     (4'(LOG2_AVG)),
      .in_valid  (smp_valid && acq && !got),
      .in_data   (smp[b]),
      .out_valid (avg_valid[b]),
      .out_data  (avg[b])
    );
    assign wr_data[b] = 32'(avg[b]);   // sign-extended
  end

  always_comb begin
    busy    = (state != S_IDLE);
    wr_en   = (state == S_PULSE) && avg_valid[0];
    wr_wire = wire_idx;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      tcnt     <= '0;
      wire_idx     <= '0;
      acq      <= 1'b0;
      got      <= 1'b0;
      stop_req <= 1'b0;
      missed   <= 1'b0;
      scans    <= '0;
      bpm_clk  <= 1'b0;
      bpm_sync <= 1'b0;
    end else begin
      bpm_clk  <= (state == S_PULSE) && (tcnt < (pulse_cycles >> 1));
      bpm_sync <= (state == S_PULSE) && (wire_idx == '0);
      if (stop) stop_req <= 1'b1;
      unique case (state)
        S_IDLE: begin
          stop_req <= 1'b0;
          if (start && !stop) begin
            state  <= S_PULSE;
            tcnt   <= '0;
            wire_idx   <= '0;
            missed <= 1'b0;
          end
        end
        S_PULSE: begin
          tcnt <= tcnt + 32'd1;
          if (mav_clear) acq <= 1'b1;
          if (wr_en) begin
            got <= 1'b1;
            acq <= 1'b0;
          end
          if (tcnt >= pulse_cycles - 32'd1) begin
            if (!got && !wr_en) missed <= 1'b1;
            acq  <= 1'b0;
            got  <= 1'b0;
            tcnt <= '0;
            if (wire_idx == WW'(N_WIRES - 1)) begin
              state <= S_PAUSE;
              scans <= scans + 32'd1;   // bunch complete
            end else begin
              wire_idx <= wire_idx + 1'b1;
            end
          end
        end
        S_PAUSE: begin
          tcnt <= tcnt + 32'd1;
          if (tcnt + 32'd1 >= pause_cycles) begin
            tcnt  <= '0;
            wire_idx  <= '0;
            if (stop_req || stop) state <= S_IDLE;
            else                  state <= S_PULSE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_wire_range: assert property (@(posedge clk) disable iff (!rst_n)
                                 int'(wire_idx) < int'(N_WIRES));

endmodule
