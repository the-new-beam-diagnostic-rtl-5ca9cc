// tb_workload_faraday_cup: Faraday-cup sensitivity workload on the whole
// firmware at default parameters. The four picoammeter channels carry small
// DC currents (a few ADC codes) buried in uniform random noise of +/-3000
// codes, converted at the default rate of 116 cycles (about 864 ksps). The
// host selects a four-pass MAV with 16 samples per pass, starts acquisition
// and reads the DC current registers through frames. Checked: the first
// filtered value appears after exactly 16^4 = 65536 conversions (eq. latency
// = samples_per_stage ^ stages, here 65536 x 116 cycles = 76 ms), and every
// channel's value equals the cascade of block averages of the converted
// samples, computed here independently. The published setting, 64
// samples and 4 passes, takes 19 s of beam time and is only scaled in size.
module tb_workload_faraday_cup;
  import diag_pkg::*;
  localparam int unsigned NP = 4, NA = 8;
  localparam int unsigned L2N = 4, NS = 4, PER = 116;

  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 1, irq;
  logic [31:0] rx_data = '0, tx_data;
  logic pico_cnv, pico_sck, adc_cnv, adc_sck, bpm_clk, bpm_sync;
  logic [NP-1:0] pico_sdo, pico_range;
  logic [NA-1:0] adc_sdo = '0;
  logic [1:0] preamp_gain;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  diag_fpga_top dut (.*);

  int dc [NP];
  int pico_in [NP];
  int hist [NP][$];
  always @(posedge pico_cnv) for (int c = 0; c < NP; c++)
    pico_in[c] = dc[c] + int'($urandom_range(6000)) - 3000;
  always @(negedge pico_cnv) if (rst_n) for (int c = 0; c < NP; c++) hist[c].push_back(pico_in[c]);
  for (genvar c = 0; c < NP; c++) begin : g_pico
    adc_serial_model #(.BITS(20)) m (.cnv(pico_cnv), .sck(pico_sck), .value(pico_in[c]), .sdo(pico_sdo[c]));
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %0d expected %0d", what, $signed(got), $signed(exp)); end
  endtask

  task automatic send(logic [31:0] w);
    @(negedge clk); rx_valid = 1; rx_data = w;
    @(posedge clk); while (!rx_ready) @(posedge clk);
    @(negedge clk); rx_valid = 0;
  endtask
  task automatic recv(output logic [31:0] w);
    @(posedge clk); while (!(tx_valid && tx_ready)) @(posedge clk);
    w = tx_data;
  endtask
  function automatic logic [31:0] mkhdr(logic [3:0] port, logic rd);
    frame_hdr_t h;
    h = '0; h.dst_port = port; h.dir_rd = rd; h.xtype = XFER_MEM; h.size = 16'd1;
    return 32'(h);
  endfunction
  task automatic reg_wr(logic [15:0] a, logic [31:0] d);
    logic [31:0] w;
    send(mkhdr(PORT_CFG, 0)); send(32'(a)); send(d); recv(w);
  endtask
  task automatic reg_rd(logic [15:0] a, output logic [31:0] d);
    logic [31:0] w;
    send(mkhdr(PORT_CFG, 1)); send(32'(a)); recv(w); recv(d);
  endtask

  function automatic int ref_cascade(int c);
    longint v [$];
    longint nv [$];
    for (int i = 0; i < (1 << (L2N * NS)); i++) v.push_back(longint'(hist[c][i]));
    for (int s = 0; s < int'(NS); s++) begin
      nv.delete();
      for (int j = 0; j < v.size(); j += (1 << L2N)) begin
        longint acc = 0;
        for (int k = 0; k < (1 << L2N); k++) acc += v[j + k];
        nv.push_back(acc >>> L2N);
      end
      v = nv;
    end
    return int'(v[0]);
  endfunction

  logic [31:0] d;
  initial begin
    dc[0] = 3; dc[1] = -2; dc[2] = 40; dc[3] = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    reg_wr(16'(CSR_MAV), {20'd0, 4'(L2N), 5'd0, 3'(NS)});
    reg_rd(16'(CSR_PICO_PER), d);
    chk(d, PER, "default conversion period");
    reg_wr(16'(CSR_CTRL), 32'h1);             // run
    // latency: nothing before 65536 conversions, one value just after
    repeat ((1 << (L2N * NS)) * PER - 3000) @(posedge clk);
    reg_rd(16'(CSR_DC_CNT), d);
    chk(d, 0, "no output before 16^4 samples");
    repeat (3000) @(posedge clk);
    reg_rd(16'(CSR_DC_CNT), d);
    chk(d, 1, "one output after 16^4 samples");
    for (int c = 0; c < NP; c++) begin
      reg_rd(16'(CSR_DC_BASE) + 16'(c), d);
      chk(d, 32'(ref_cascade(c)), $sformatf("filtered current ch%0d", c));
      // noise +/-3000 codes averaged over 65536 samples: sigma about 7 codes
      checks++;
      if ($signed(d) > dc[c] + 40 || $signed(d) < dc[c] - 40) begin
        failures++; $display("FAIL ch%0d %0d far from %0d", c, $signed(d), dc[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
