// tb_fmc_pico_ctrl: self-checking test of the picoammeter control core.
// Four behavioural 20-bit ADCs convert random signed currents. The test
// checks the conversion rate (one CNV every `period` cycles, 116 cycles =
// about 864 ksps at 100 MHz), the raw stream words (channel, sequence,
// sample), the overflow flag when the FIFO side refuses words, and the
// MAV-filtered DC value and its update count for several stage/sample
// settings against a reference average of the converted values.
module tb_fmc_pico_ctrl;
  localparam int unsigned N_CH = 4, BITS = 20;
  logic clk = 0, rst_n = 0;
  logic run = 0, raw_en = 0, raw_ready = 1;
  logic [15:0] period = 16'd116;
  logic [2:0] mav_stages = 3'd1;
  logic [3:0] mav_log2n = 4'd2;
  logic adc_cnv, adc_sck;
  logic [N_CH-1:0] adc_sdo;
  logic [N_CH-1:0][31:0] dc_value;
  logic [31:0] dc_count;
  logic raw_push, overflow;
  logic [31:0] raw_data;
  int value [N_CH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  fmc_pico_ctrl #(.N_CH(N_CH), .BITS(BITS), .MAX_STAGES(4), .MAX_LOG2N(10)) dut (.*);

  for (genvar c = 0; c < N_CH; c++) begin : g_adc
    adc_serial_model #(.BITS(BITS)) m (.cnv(adc_cnv), .sck(adc_sck), .value(value[c]), .sdo(adc_sdo[c]));
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", what, got, exp); end
  endtask

  // converted values, per channel, in order; new random value per conversion
  int hist [N_CH][$];
  int amp = 300000;
  always @(posedge adc_cnv) for (int c = 0; c < N_CH; c++)
    value[c] = int'($urandom_range(2 * amp)) - amp;
  always @(negedge adc_cnv) for (int c = 0; c < N_CH; c++) hist[c].push_back(value[c]);

  // conversion period
  int cyc = 0, last_rise = -1, n_per_bad = 0, n_per = 0;
  bit per_chk = 1;
  logic cnv_d = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1; cnv_d <= adc_cnv;
    if (rst_n && adc_cnv && !cnv_d) begin
      if (last_rise >= 0 && per_chk) begin n_per++; if (cyc - last_rise != int'(period)) n_per_bad++; end
      last_rise <= cyc;
    end
  end

  // raw stream checker: words of conversion k, channel c
  int raw_k = 0, raw_c = 0, raw_words = 0, raw_bad = 0;
  always @(posedge clk) if (raw_push && raw_ready) begin
    int exp;
    exp = hist[raw_c][raw_k];
    raw_words++;
    if (raw_data[31:30] != 2'(raw_c) || raw_data[19:0] != 20'(exp) || raw_data[29:20] != 10'(raw_k))
      raw_bad++;
    if (raw_c == N_CH - 1) begin raw_c = 0; raw_k++; end else raw_c++;
  end

  // reference cascaded block average of hist[c] starting at index first
  function automatic int ref_avg(int c, int first, int unsigned ns, int l2, int idx);
    // value of output number idx (0-based) of the last stage
    longint v [$];
    longint nv [$];
    for (int i = first; i < hist[c].size(); i++) v.push_back(longint'(hist[c][i]));
    for (int s = 0; s < int'(ns); s++) begin
      nv.delete();
      for (int j = 0; j + (1 << l2) <= v.size(); j += (1 << l2)) begin
        longint acc = 0;
        for (int k = 0; k < (1 << l2); k++) acc += v[j + k];
        nv.push_back(acc >>> l2);
      end
      v = nv;
    end
    return (idx < v.size()) ? int'(v[idx]) : 32'h7FFF_FFFF;
  endfunction

  task automatic mav_case(int unsigned ns, int l2, int n_out);
    int first;
    int unsigned cnt0;
    run = 0;
    @(negedge clk);
    mav_stages = 3'(ns); mav_log2n = 4'(l2);
    repeat (300) @(negedge clk);   // let a conversion in flight finish
    first = hist[0].size();
    cnt0 = dc_count;
    run = 1;
    for (int o = 0; o < n_out; o++) begin
      @(posedge clk);
      while (dc_count == cnt0 + 32'(o)) @(posedge clk);
      @(negedge clk);
      for (int c = 0; c < N_CH; c++)
        chk(dc_value[c], 32'(ref_avg(c, first, ns, l2, o)), $sformatf("dc ch%0d ns%0d l2%0d out%0d", c, ns, l2, o));
      // latency: the o-th output needs (o+1) * 2**(l2*ns) conversions
      chk(32'(hist[0].size() - first), 32'((o + 1) * (1 << (l2 * ns))), "latency in samples");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < N_CH; c++) hist[c].delete();
    // raw streaming with continuous conversion
    @(negedge clk); raw_en = 1; run = 1;
    repeat (116 * 30) @(posedge clk);
    @(negedge clk); run = 0; per_chk = 0;
    repeat (200) @(posedge clk);
    chk(32'(raw_words), 32'(hist[0].size() * N_CH), "raw word count");
    chk(32'(raw_bad), 0, "raw words wrong");
    chk(32'(overflow), 0, "no overflow yet");
    chk(32'(n_per_bad), 0, "conversion period 116");
    chk(32'(n_per > 20), 1, "enough conversions");
    // refused words set overflow, raw_en low clears it
    @(negedge clk); raw_ready = 0; run = 1;
    repeat (300) @(posedge clk);
    chk(32'(overflow), 1, "overflow set");
    @(negedge clk); raw_en = 0; run = 0; raw_ready = 1;
    @(negedge clk);
    chk(32'(overflow), 0, "overflow cleared");
    // MAV settings
    period = 16'd92;
    mav_case(1, 2, 3);
    mav_case(2, 2, 2);
    mav_case(4, 1, 2);
    mav_case(3, 2, 1);
    mav_case(1, 6, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
