// tb_bpm_ctrl: self-checking test of the BPM scan control core with a model
// of eight daisy-chained preamplifier boards and eight serial ADCs.
// Each wire carries a known level; the ADC input adds +/-37 counts of
// alternating noise, which a correct 64-sample average cancels, and the
// preamplifier outputs a junk value until the clock has crossed the chain and
// settled, which only a correct bpm delay keeps out of the average. Checked:
// every wire of every bank is written once per bunch with its level, the BPM
// clock period and bunch length (40 pulses), the pause between bunches,
// bpm_sync on the first pulse only, the scan counter, the stop command and
// the missed flag when the pulse is too short for 64 samples.
module tb_bpm_ctrl;
  localparam int unsigned NA = 8, NW = 40, BITS = 16;
  localparam int unsigned PULSE = 4000, DELAY = 500, PAUSE = 1000, ADCPER = 50;
  logic clk = 0, rst_n = 0, start = 0, stop = 0;
  logic [31:0] pulse_cycles = PULSE, delay_cycles = DELAY, pause_cycles = PAUSE;
  logic [15:0] adc_period = 16'(ADCPER);
  logic bpm_clk, bpm_sync, adc_cnv, adc_sck, wr_en, busy, missed;
  logic [NA-1:0] adc_sdo;
  logic [5:0] wr_wire;
  logic [NA-1:0][31:0] wr_data;
  logic [31:0] scans;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;   // 100 MHz

  bpm_ctrl #(.N_ADC(NA), .BITS(BITS), .N_WIRES(NW), .LOG2_AVG(6), .CNV_CYCLES(10)) dut (.*);

  int level [NA][NW];
  int pout [NA];
  int psel [NA];
  int adc_in [NA];
  int noise = 37;
  preamp_chain_model #(.N_BOARDS(NA), .N_WIRES(NW)) u_chain (
    .bpm_clk, .bpm_sync, .level, .out(pout), .sel(psel));
  always @(posedge adc_cnv) noise = -noise;
  always_comb for (int b = 0; b < NA; b++) adc_in[b] = pout[b] + noise;
  for (genvar b = 0; b < NA; b++) begin : g_adc
    adc_serial_model #(.BITS(BITS)) m (.cnv(adc_cnv), .sck(adc_sck), .value(adc_in[b]), .sdo(adc_sdo[b]));
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", what, got, exp); end
  endtask

  task automatic set_levels(int offs);
    for (int b = 0; b < NA; b++) for (int w = 0; w < NW; w++)
      level[b][w] = b * 1500 + w * 23 - 6000 + offs;
  endtask

  // memory writes
  int nwr [NW];
  int bad_wr = 0, total_wr = 0;
  always @(posedge clk) if (rst_n && wr_en) begin
    total_wr++;
    nwr[wr_wire]++;
    for (int b = 0; b < NA; b++)
      if (wr_data[b] != 32'(level[b][wr_wire])) begin
        bad_wr++;
        if (bad_wr < 5) $display("FAIL bank %0d wire %0d got %0d expected %0d", b, wr_wire,
                                 $signed(wr_data[b]), level[b][wr_wire]);
      end
  end

  // BPM clock timing
  int cyc = 0, last_rise = -1, n_rise = 0, bad_per = 0, n_pause = 0, bad_pause = 0, n_sync = 0, bad_sync = 0;
  logic clk_d = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1; clk_d <= bpm_clk;
    if (rst_n && bpm_clk && !clk_d) begin
      n_rise++;
      if (bpm_sync) n_sync++;
      if ((bpm_sync) != (n_rise % NW == 1)) bad_sync++;
      if (last_rise >= 0) begin
        if (n_rise % NW == 1) begin
          n_pause++;
          if (cyc - last_rise != int'(PULSE + PAUSE)) bad_pause++;
        end else if (cyc - last_rise != int'(PULSE)) bad_per++;
      end
      last_rise <= cyc;
    end
  end

  initial begin
    set_levels(0);
    for (int w = 0; w < NW; w++) nwr[w] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (500) @(posedge clk);   // let the idle clock level cross the chain
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    chk(32'(busy), 1, "busy after start");
    // first bunch
    wait (scans == 1);
    chk(32'(total_wr), NA == 0 ? 0 : NW, "writes in bunch 1");
    for (int w = 0; w < NW; w++) chk(32'(nwr[w]), 1, $sformatf("wire %0d written once", w));
    // change the beam between bunches, second bunch, then stop
    set_levels(777);
    wait (scans == 2);
    @(posedge bpm_sync);            // stop during the third bunch
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    wait (scans == 3);
    wait (!busy);
    repeat (10) @(negedge clk);
    chk(32'(busy), 0, "idle after stop");
    chk(32'(total_wr), 3 * NW, "writes in three bunches");
    chk(32'(bad_wr), 0, "averaged wire values");
    chk(32'(n_rise), 3 * NW, "BPM clock pulses");
    chk(32'(bad_per), 0, "BPM clock period");
    chk(32'(n_pause), 2, "pauses seen");
    chk(32'(bad_pause), 0, "pause length");
    chk(32'(n_sync), 3, "sync pulses");
    chk(32'(bad_sync), 0, "sync on first pulse only");
    chk(32'(missed), 0, "no missed average");
    // a pulse too short for 64 samples sets missed
    pulse_cycles = 2000;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    @(negedge clk); stop = 1; @(negedge clk); stop = 0;
    wait (scans == 4);
    wait (!busy);
    repeat (10) @(negedge clk);
    chk(32'(missed), 1, "missed with short pulse");
    chk(32'(busy), 0, "idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
