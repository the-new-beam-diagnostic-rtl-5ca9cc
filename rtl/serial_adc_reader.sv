// serial_adc_reader: drives a group of simultaneously sampling serial ADCs.
//
// While enable is high the reader starts a conversion every `period` clock
// cycles. A conversion is CNV high for CNV_CYCLES cycles (the ADC's conversion
// time); then BITS serial clock periods shift the results in, MSB first, from
// every ADC of the group in parallel (one SDO line per ADC, shared CNV and
// SCK). SCK runs at half the system clock: one cycle low, one cycle high. The
// reader samples SDO in the cycle that raises SCK; the ADC is expected to move
// to the next bit on the falling SCK edge, and to present the MSB once CNV
// falls. After the last bit, sample_valid pulses for one cycle with every
// channel's two's-complement result on `samples`.
//
// The published description says only that the FPGA performs the ADC conversions; the
// CNV/SCK/SDO protocol, the conversion time and the SCK rate are this design's
// choices, typical of successive-approximation converters. A period shorter
// than one complete conversion plus readout is stretched to that minimum.
module serial_adc_reader #(
  parameter int unsigned N_CH       = 4,
  parameter int unsigned BITS       = 20,
  parameter int unsigned CNV_CYCLES = 50
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        enable,
  input  logic [15:0]                 period,
  output logic                        adc_cnv,
  output logic                        adc_sck,
  input  logic [N_CH-1:0]             adc_sdo,
  output logic                        sample_valid,
  output logic [N_CH-1:0][BITS-1:0]   samples
);
  localparam int unsigned MIN_PERIOD = CNV_CYCLES + 2 * BITS + 2;

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_SHIFT, S_WAIT} state_e;
  state_e state;

  logic [15:0]              tcnt;      // cycles since conversion start
  logic [15:0]              per_eff;
  logic [$clog2(BITS+1)-1:0] bitn;     // bits still to read
  logic [N_CH-1:0][BITS-1:0] shreg;

  always_comb per_eff = (period < 16'(MIN_PERIOD)) ? 16'(MIN_PERIOD) : period;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      tcnt         <= '0;
      bitn         <= '0;
      shreg        <= '0;
      samples      <= '0;
      sample_valid <= 1'b0;
      adc_cnv      <= 1'b0;
      adc_sck      <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      tcnt         <= tcnt + 16'd1;
      unique case (state)
        S_IDLE: begin
          adc_sck <= 1'b0;
          if (enable) begin
            state   <= S_CONV;
            adc_cnv <= 1'b1;
            tcnt    <= 16'd1;
          end
        end
        S_CONV: begin
          if (tcnt == 16'(CNV_CYCLES)) begin
            adc_cnv <= 1'b0;
            state   <= S_SHIFT;
            bitn    <= ($clog2(BITS+1))'(BITS);
          end
        end
        S_SHIFT: begin
          if (!adc_sck) begin
            adc_sck <= 1'b1;
            for (int c = 0; c < N_CH; c++)
              shreg[c] <= {shreg[c][BITS-2:0], adc_sdo[c]};
            bitn <= bitn - 1'b1;
          end else begin
            adc_sck <= 1'b0;
            if (bitn == '0) begin
              state        <= S_WAIT;
              samples      <= shreg;
              sample_valid <= 1'b1;
            end
          end
        end
        S_WAIT: begin
          if (tcnt >= per_eff) begin
            if (enable) begin
              state   <= S_CONV;
              adc_cnv <= 1'b1;
              tcnt    <= 16'd1;
            end else begin
              state <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // SCK only toggles while the result is being shifted in.
  a_sck_in_shift: assert property (@(posedge clk) disable iff (!rst_n)
                                   adc_sck |-> state == S_SHIFT);

endmodule
