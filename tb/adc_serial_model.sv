// adc_serial_model: behavioural model of a serial successive-approximation ADC
// (not synthesizable). On the falling edge of CNV it latches `value` (an
// integer, two's complement, BITS wide) and presents its MSB on SDO; each
// falling edge of SCK moves to the next bit. This is the converter protocol
// the FPGA's serial ADC reader expects.
module adc_serial_model #(
  parameter int unsigned BITS = 20
) (
  input  logic cnv,
  input  logic sck,
  input  int   value,
  output logic sdo
);
  logic [BITS-1:0] word = '0;
  int              idx  = 0;

  initial sdo = 1'b0;

  always @(negedge cnv) begin
    word = BITS'(value);
    idx  = BITS - 1;
    sdo  <= word[BITS-1];
  end

  always @(negedge sck) begin
    if (idx > 0) idx = idx - 1;
    sdo <= word[idx];
  end
endmodule
