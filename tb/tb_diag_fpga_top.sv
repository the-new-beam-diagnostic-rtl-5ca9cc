// tb_diag_fpga_top: end-to-end test of the diagnostic firmware at its default
// parameters. Around the top are behavioural models of the four picoammeter
// ADCs (constant currents plus alternating noise), of the eight BPM ADCs and of
// the daisy chain of eight preamplifier boards, and a host that talks to the
// firmware only through frames on the 32-bit bus, with random back-pressure.
// The host configures the chain through the configuration space and then:
//  - reads the MAV-filtered DC current of all four Faraday-cup channels, for
//    the reset setting (one pass of 64 samples) and after switching to two
//    passes of 16 samples;
//  - streams raw samples, checks their format and values, lets the FIFO fill
//    until the almost-full interrupt and the overflow flag appear, and drains it;
//  - runs BPM scans with the default 200 us clock period and bpm delay, reads
//    all 8 x 40 wire averages from memory port 2 after each bunch, changes
//    the beam between bunches and stops the scan;
//  - sends a frame to a port that does not exist.
// Each of these mechanisms is counted and must have happened at least once.
module tb_diag_fpga_top;
  import diag_pkg::*;
  localparam int unsigned NP = 4, NA = 8, NW = 40;

  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 0, irq;
  logic [31:0] rx_data = '0, tx_data;
  logic pico_cnv, pico_sck, adc_cnv, adc_sck, bpm_clk, bpm_sync;
  logic [NP-1:0] pico_sdo, pico_range;
  logic [NA-1:0] adc_sdo;
  logic [1:0] preamp_gain;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;   // 100 MHz

  diag_fpga_top dut (.*);

  // ---------------------------------------------------------------- models
  int pico_level [NP];
  int pico_in [NP];
  int pnoise = 41;
  always @(posedge pico_cnv) pnoise = -pnoise;
  always_comb for (int c = 0; c < NP; c++) pico_in[c] = pico_level[c] + pnoise;
  for (genvar c = 0; c < NP; c++) begin : g_pico
    adc_serial_model #(.BITS(20)) m (.cnv(pico_cnv), .sck(pico_sck), .value(pico_in[c]), .sdo(pico_sdo[c]));
  end

  int level [NA][NW];
  int pout [NA];
  int psel [NA];
  int adc_in [NA];
  int bnoise = 29;
  preamp_chain_model #(.N_BOARDS(NA), .N_WIRES(NW)) u_chain (
    .bpm_clk, .bpm_sync, .level, .out(pout), .sel(psel));
  always @(posedge adc_cnv) bnoise = -bnoise;
  always_comb for (int b = 0; b < NA; b++) adc_in[b] = pout[b] + bnoise;
  for (genvar b = 0; b < NA; b++) begin : g_adc
    adc_serial_model #(.BITS(16)) m (.cnv(adc_cnv), .sck(adc_sck), .value(adc_in[b]), .sdo(adc_sdo[b]));
  end

  // ------------------------------------------------------------------ host
  int n_tx_stall = 0, n_irq = 0, n_err_reply = 0, n_stream_wait = 0;
  always @(negedge clk) tx_ready = ($urandom_range(4) != 0);
  always @(posedge clk) if (rst_n) begin
    if (tx_valid && !tx_ready) n_tx_stall++;
    if (irq) n_irq++;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", what, got, exp); end
  endtask

  task automatic send(logic [31:0] w);
    @(negedge clk);
    rx_valid = 1; rx_data = w;
    @(posedge clk);
    while (!rx_ready) @(posedge clk);
    @(negedge clk); rx_valid = 0;
  endtask

  task automatic recv(output logic [31:0] w);
    @(posedge clk);
    while (!(tx_valid && tx_ready)) @(posedge clk);
    w = tx_data;
  endtask

  function automatic logic [31:0] mkhdr(logic [3:0] port, logic rd, xfer_e t, logic [15:0] sz);
    frame_hdr_t h;
    h = '0; h.src_id = 4'd3; h.dst_port = port; h.dir_rd = rd; h.xtype = t; h.size = sz;
    return 32'(h);
  endfunction

  function automatic frame_hdr_t hdr_of(logic [31:0] w);
    return frame_hdr_t'(w);
  endfunction

  task automatic reg_wr(logic [3:0] port, logic [15:0] a, logic [31:0] d);
    logic [31:0] w;
    send(mkhdr(port, 0, XFER_MEM, 1)); send(32'(a)); send(d);
    recv(w);
    chk(32'(hdr_of(w).err), 32'(ERR_OK), "write reply");
  endtask

  task automatic reg_rd(logic [3:0] port, logic [15:0] a, output logic [31:0] d);
    logic [31:0] w;
    send(mkhdr(port, 1, XFER_MEM, 1)); send(32'(a));
    recv(w);
    chk(32'(hdr_of(w).size), 32'd1, "read reply size");
    recv(d);
  endtask

  task automatic stream_rd(int n, output logic [31:0] words [$]);
    logic [31:0] w;
    int waited;
    send(mkhdr(PORT_STREAM, 1, XFER_STREAM, 16'(n))); send(32'd0);
    recv(w);
    chk(32'(hdr_of(w).size), 32'(n), "stream reply size");
    words.delete();
    waited = 0;
    for (int i = 0; i < n; i++) begin
      if (dut.st_empty) waited = 1;
      recv(w); words.push_back(w);
    end
    if (waited) n_stream_wait++;
  endtask

  task automatic set_levels(int offs);
    for (int b = 0; b < NA; b++) for (int w = 0; w < NW; w++)
      level[b][w] = b * 1200 - w * 31 + ((w == 19 || w == 20) ? 4000 : 0) - 3000 + offs;
  endtask

  task automatic check_bpm_mem(string what);
    logic [31:0] d;
    int bad = 0;
    for (int b = 0; b < NA; b++) for (int w = 0; w < NW; w++) begin
      reg_rd(PORT_BPM, 16'(b * NW + w), d);
      if (d != 32'(level[b][w])) begin
        bad++;
        if (bad < 4) $display("FAIL %s bank %0d wire %0d got %0d expected %0d", what, b, w, $signed(d), level[b][w]);
      end
    end
    chk(32'(bad), 0, what);
  endtask

  task automatic wait_reg(logic [15:0] a, logic [31:0] atleast);
    logic [31:0] d;
    do begin
      repeat (2000) @(posedge clk);
      reg_rd(PORT_CFG, a, d);
    end while (d < atleast);
  endtask

  logic [31:0] d, cnt0;
  logic [31:0] words [$];
  int n_dc_checks = 0, n_mode_switch = 0, n_overflow = 0, n_bpm_bunch = 0, n_bpm_stop = 0;
  initial begin
    pico_level[0] = 12345; pico_level[1] = -5000; pico_level[2] = 300000; pico_level[3] = -1;
    set_levels(0);
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (500) @(posedge clk);

    reg_rd(PORT_CFG, 16'(CSR_ID), d);       chk(d, DIAG_ID, "id");
    reg_rd(PORT_CFG, 16'(CSR_BPM_PULSE), d);chk(d, 32'd20000, "200 us BPM clock period");
    // a port with nothing behind it
    send(mkhdr(4'd9, 1, XFER_MEM, 1)); send(32'd0);
    recv(d);
    if (hdr_of(d).err == ERR_BAD_PORT) n_err_reply++;

    // run the picoammeter, ranges and gain to the analogue side, interrupt on
    reg_wr(PORT_CFG, 16'(CSR_CTRL), 32'(ctrl_reg_t'{irq_en: 1'b1, preamp_gain: 2'd2,
                                                    pico_range: 4'b1010, raw_en: 1'b0, pico_run: 1'b1}));
    chk(32'(pico_range), 32'hA, "range pins");
    chk(32'(preamp_gain), 32'd2, "gain pins");
    // BPM scan: default pulse and delay, short pause to keep the run brief
    reg_wr(PORT_CFG, 16'(CSR_BPM_PAUSE), 32'd100000);  // 1 ms
    reg_wr(PORT_CFG, 16'(CSR_BPM_CMD), 32'd1);

    // DC current, reset setting: one pass of 64 samples
    wait_reg(16'(CSR_DC_CNT), 2);
    for (int c = 0; c < NP; c++) begin
      reg_rd(PORT_CFG, 16'(CSR_DC_BASE) + 16'(c), d);
      chk(d, 32'(pico_level[c]), $sformatf("DC current ch%0d, 1x64", c));
      n_dc_checks++;
    end
    // mode switch: two passes of 16 samples
    reg_wr(PORT_CFG, 16'(CSR_MAV), 32'h0000_0402);
    n_mode_switch++;
    pico_level[0] = 777; pico_level[3] = -200000;
    reg_rd(PORT_CFG, 16'(CSR_DC_CNT), cnt0);
    wait_reg(16'(CSR_DC_CNT), cnt0 + 2);
    for (int c = 0; c < NP; c++) begin
      reg_rd(PORT_CFG, 16'(CSR_DC_BASE) + 16'(c), d);
      chk(d, 32'(pico_level[c]), $sformatf("DC current ch%0d, 2x16", c));
      n_dc_checks++;
    end

    // raw stream
    reg_wr(PORT_CFG, 16'(CSR_CTRL), 32'(ctrl_reg_t'{irq_en: 1'b1, preamp_gain: 2'd2,
                                                    pico_range: 4'b1010, raw_en: 1'b1, pico_run: 1'b1}));
    stream_rd(64, words);
    begin
      int bad = 0;
      for (int i = 0; i < 64; i++) begin
        int c, s;
        c = int'(words[i][31:30]);
        s = int'($signed(words[i][19:0]));
        if (c != i % 4) bad++;
        if (s != pico_level[c] + 41 && s != pico_level[c] - 41) bad++;
        if (i >= 4 && words[i][29:20] != words[i-4][29:20] + 10'd1) bad++;
      end
      chk(32'(bad), 0, "raw stream words");
    end
    // stop reading: FIFO fills, interrupt, then overflow
    wait (irq == 1'b1);
    repeat (30000) @(posedge clk);
    reg_rd(PORT_CFG, 16'(CSR_STATUS), d);
    if (d[3]) n_overflow++;
    chk(32'(d[2]), 1, "status almost full");
    chk(32'(d[31:16]), 32'd1024, "status FIFO level full");
    reg_wr(PORT_CFG, 16'(CSR_CTRL), 32'(ctrl_reg_t'{irq_en: 1'b1, preamp_gain: 2'd2,
                                                    pico_range: 4'b1010, raw_en: 1'b0, pico_run: 1'b1}));
    stream_rd(1024, words);
    repeat (4) @(posedge clk);
    chk(32'(irq), 0, "interrupt cleared after draining");
    reg_rd(PORT_CFG, 16'(CSR_STATUS), d);
    chk(32'(d[31:16]), 32'd0, "FIFO empty");

    // BPM: the scan counter counts complete bunches
    wait_reg(16'(CSR_BPM_SCANS), 1);
    n_bpm_bunch++;
    check_bpm_mem("BPM bunch 1");
    set_levels(-555);
    wait_reg(16'(CSR_BPM_SCANS), 2);
    n_bpm_bunch++;
    check_bpm_mem("BPM bunch 2");
    reg_wr(PORT_CFG, 16'(CSR_BPM_CMD), 32'd2);
    repeat (100_100) @(posedge clk);   // past the pause that follows
    reg_rd(PORT_CFG, 16'(CSR_STATUS), d);
    if (d[0] == 1'b0) n_bpm_stop++;
    chk(32'(d[1]), 0, "no missed BPM average");
    reg_rd(PORT_CFG, 16'(CSR_BPM_SCANS), d);
    chk(d, 32'd2, "no bunch after stop");

    // every mechanism happened
    chk(32'(n_err_reply > 0), 1, "error reply seen");
    chk(32'(n_tx_stall > 0), 1, "host back-pressure seen");
    chk(32'(n_stream_wait > 0), 1, "stream read waited for data");
    chk(32'(n_irq > 0), 1, "almost-full interrupt seen");
    chk(32'(n_overflow > 0), 1, "raw overflow seen");
    chk(32'(n_mode_switch > 0 && n_dc_checks == 8), 1, "MAV mode switch");
    chk(32'(n_bpm_bunch == 2), 1, "BPM bunches");
    chk(32'(n_bpm_stop > 0), 1, "BPM stop");
    $display("mechanisms: err=%0d stall=%0d stream_wait=%0d irq=%0d overflow=%0d mode_switch=%0d bunches=%0d stop=%0d",
             n_err_reply, n_tx_stall, n_stream_wait, n_irq, n_overflow, n_mode_switch, n_bpm_bunch, n_bpm_stop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
