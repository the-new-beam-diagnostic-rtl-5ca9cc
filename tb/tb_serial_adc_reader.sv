// tb_serial_adc_reader: self-checking test of the serial ADC reader.
// Four behavioural ADCs convert random values; every sample_valid must carry
// the values the models latched at the end of that conversion, and the
// conversion starts must be exactly `period` cycles apart (and stretched to
// the minimum when the period is too short).
module tb_serial_adc_reader;
  localparam int unsigned N_CH = 4, BITS = 20, CNV = 50;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [15:0] period;
  logic cnv, sck, valid;
  logic [N_CH-1:0] sdo;
  logic [N_CH-1:0][BITS-1:0] samples;
  int   value [N_CH];
  int   latched [N_CH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  serial_adc_reader #(.N_CH(N_CH), .BITS(BITS), .CNV_CYCLES(CNV)) dut (
    .clk, .rst_n, .enable, .period, .adc_cnv(cnv), .adc_sck(sck), .adc_sdo(sdo),
    .sample_valid(valid), .samples);

  for (genvar c = 0; c < N_CH; c++) begin : g_adc
    adc_serial_model #(.BITS(BITS)) m (.cnv, .sck, .value(value[c]), .sdo(sdo[c]));
  end

  // Values change every cycle; the reference is what was there when CNV fell.
  always @(posedge clk) for (int c = 0; c < N_CH; c++) value[c] <= int'($urandom);
  always @(negedge cnv) for (int c = 0; c < N_CH; c++) latched[c] = value[c];

  int cyc = 0, last_rise = -1, expect_per = 0, n_valid = 0;
  logic cnv_d = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    cnv_d <= cnv;
    if (cnv && !cnv_d) begin
      if (last_rise >= 0 && expect_per != 0) begin
        checks++;
        if (cyc - last_rise != expect_per) begin
          failures++;
          $display("FAIL period %0d expected %0d", cyc - last_rise, expect_per);
        end
      end
      last_rise <= cyc;
    end
    if (valid) begin
      n_valid++;
      for (int c = 0; c < N_CH; c++) begin
        checks++;
        if (samples[c] != BITS'(latched[c])) begin
          failures++;
          $display("FAIL ch%0d got %h expected %h", c, samples[c], BITS'(latched[c]));
        end
      end
    end
  end

  initial begin
    period = 16'd116;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    enable = 1;
    expect_per = 116;
    repeat (116 * 20) @(posedge clk);
    // too short: stretched to CNV + 2*BITS + 2
    @(posedge cnv); period = 16'd10; expect_per = 0;
    @(posedge cnv); @(posedge cnv); expect_per = CNV + 2 * BITS + 2;
    repeat (92 * 10) @(posedge clk);
    enable = 0;
    repeat (300) @(posedge clk);
    checks++;
    if (n_valid < 25) begin failures++; $display("FAIL only %0d samples", n_valid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
