// tb_workload_bpm_scan: BPM sensitivity workload on the whole firmware with
// default parameters and every BPM register at its reset value (200 us per
// wire, 20 us bpm delay, 64-sample averages, one scan every 100 ms). All wires
// of the eight planes sit at the readout noise floor (zero current, +/-25 codes
// of alternating noise) except one: in the first scan a current is injected
// into vertical wire 17 of diagnostic point 0 (bank 0), in the second into the
// corresponding horizontal wire (bank 1), as in the bench test with a precise
// current source. The host reads all 320 values through frames during the
// pause after each scan. Checked: every value, the 10 Hz scan period, 40 BPM
// clock pulses per scan and no missed average.
module tb_workload_bpm_scan;
  import diag_pkg::*;
  localparam int unsigned NP = 4, NA = 8, NW = 40;

  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 1, irq;
  logic [31:0] rx_data = '0, tx_data;
  logic pico_cnv, pico_sck, adc_cnv, adc_sck, bpm_clk, bpm_sync;
  logic [NP-1:0] pico_sdo = '0, pico_range;
  logic [NA-1:0] adc_sdo;
  logic [1:0] preamp_gain;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  diag_fpga_top dut (.*);

  int level [NA][NW];
  int pout [NA];
  int psel [NA];
  int adc_in [NA];
  int bnoise = 25;
  preamp_chain_model #(.N_BOARDS(NA), .N_WIRES(NW)) u_chain (
    .bpm_clk, .bpm_sync, .level, .out(pout), .sel(psel));
  always @(posedge adc_cnv) bnoise = -bnoise;
  always_comb for (int b = 0; b < NA; b++) adc_in[b] = pout[b] + bnoise;
  for (genvar b = 0; b < NA; b++) begin : g_adc
    adc_serial_model #(.BITS(16)) m (.cnv(adc_cnv), .sck(adc_sck), .value(adc_in[b]), .sdo(adc_sdo[b]));
  end

  // scan period and pulse count
  int cyc = 0, last_sync = -1, n_sync = 0, bad_period = 0, n_pulse = 0;
  logic sync_d = 0, clk_d = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1; sync_d <= bpm_sync; clk_d <= bpm_clk;
    if (rst_n && bpm_clk && !clk_d) n_pulse++;
    if (rst_n && bpm_sync && !sync_d) begin
      n_sync++;
      if (last_sync >= 0 && cyc - last_sync != 10_000_000) bad_period++;
      last_sync <= cyc;
    end
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
  task automatic reg_wr(logic [3:0] p, logic [15:0] a, logic [31:0] d);
    logic [31:0] w;
    send(mkhdr(p, 0)); send(32'(a)); send(d); recv(w);
  endtask
  task automatic reg_rd(logic [3:0] p, logic [15:0] a, output logic [31:0] d);
    logic [31:0] w;
    send(mkhdr(p, 1)); send(32'(a)); recv(w); recv(d);
  endtask

  task automatic inject(int bank, int wi, int codes);
    for (int b = 0; b < NA; b++) for (int w = 0; w < NW; w++) level[b][w] = 0;
    level[bank][wi] = codes;
  endtask

  task automatic read_scan(string what);
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

  task automatic wait_scans(logic [31:0] n);
    logic [31:0] d;
    do begin
      repeat (20000) @(posedge clk);
      reg_rd(PORT_CFG, 16'(CSR_BPM_SCANS), d);
    end while (d < n);
  endtask

  logic [31:0] d;
  initial begin
    inject(0, 17, 900);
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (500) @(posedge clk);
    reg_wr(PORT_CFG, 16'(CSR_BPM_CMD), 32'd1);
    wait_scans(1);
    read_scan("scan 1, vertical wire 17");
    inject(1, 17, 900);
    wait_scans(2);
    read_scan("scan 2, horizontal wire 17");
    reg_wr(PORT_CFG, 16'(CSR_BPM_CMD), 32'd2);
    reg_rd(PORT_CFG, 16'(CSR_STATUS), d);
    chk(32'(d[1]), 0, "no missed average");
    chk(32'(n_sync), 2, "two scans");
    chk(32'(bad_period), 0, "scan period 100 ms");
    chk(32'(n_pulse), 2 * NW, "40 BPM clock pulses per scan");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
