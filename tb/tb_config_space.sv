// tb_config_space: self-checking test of the configuration space. Checks the
// reset values, writes and reads back every read-write register, checks that
// the command register yields one-cycle start/stop pulses, that status inputs
// appear at their addresses and that unmapped addresses read zero.
module tb_config_space;
  import diag_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [15:0] addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  cfg_t cfg;
  status_t status;
  int checks = 0, failures = 0;
  int n_start = 0, n_stop = 0;

  always #5 clk = ~clk;
  config_space #(.CLK_HZ(100_000_000)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (cfg.bpm_start) n_start++;
    if (cfg.bpm_stop)  n_stop++;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", what, got, exp); end
  endtask

  task automatic wr(logic [7:0] a, logic [31:0] d);
    @(negedge clk); wr_en = 1; addr = {8'h00, a}; wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  task automatic rd(logic [7:0] a, output logic [31:0] d);
    @(negedge clk); rd_en = 1; addr = {8'h00, a};
    @(negedge clk); rd_en = 0; d = rd_data;
  endtask

  logic [31:0] d;
  initial begin
    status = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // reset values for a 100 MHz clock
    rd(CSR_ID, d);        chk(d, DIAG_ID, "id");
    rd(CSR_PICO_PER, d);  chk(d, 32'd116, "pico period");
    rd(CSR_BPM_PULSE, d); chk(d, 32'd20000, "bpm pulse 200 us");
    rd(CSR_BPM_DELAY, d); chk(d, 32'd2000, "bpm delay");
    rd(CSR_BPM_PAUSE, d); chk(d, 32'd10_000_000 - 32'd800_000, "bpm pause");
    rd(CSR_MAV, d);       chk(d, 32'h0000_0601, "mav reset");
    // read-write registers
    wr(CSR_CTRL, 32'h1FF);     rd(CSR_CTRL, d);      chk(d, 32'h1FF, "ctrl");
    chk(32'(cfg.ctrl.pico_range), 32'hF, "ctrl range field");
    chk(32'(cfg.ctrl.preamp_gain), 32'h3, "ctrl gain field");
    wr(CSR_CTRL, 32'h0A5);     rd(CSR_CTRL, d);      chk(d, 32'h0A5, "ctrl 2");
    chk(32'(cfg.ctrl.raw_en), 32'h0, "raw_en field");
    chk(32'(cfg.ctrl.pico_run), 32'h1, "run field");
    wr(CSR_MAV, 32'h0000_0604); rd(CSR_MAV, d);      chk(d, 32'h0000_0604, "mav");
    chk(32'(cfg.mav_stages), 32'd4, "mav stages");
    chk(32'(cfg.mav_log2n), 32'd6, "mav log2n");
    wr(CSR_PICO_PER, 32'd200); rd(CSR_PICO_PER, d);  chk(d, 32'd200, "period");
    wr(CSR_BPM_DELAY, 32'd77); rd(CSR_BPM_DELAY, d); chk(d, 32'd77, "delay");
    wr(CSR_BPM_PAUSE, 32'd99); rd(CSR_BPM_PAUSE, d); chk(d, 32'd99, "pause");
    wr(CSR_BPM_PULSE, 32'd555);rd(CSR_BPM_PULSE, d); chk(d, 32'd555, "pulse");
    wr(CSR_BPM_ADCPER, 32'd60);rd(CSR_BPM_ADCPER, d);chk(d, 32'd60, "adc period");
    chk(cfg.bpm_pulse, 32'd555, "pulse output");
    // command pulses
    wr(CSR_BPM_CMD, 32'd1);
    wr(CSR_BPM_CMD, 32'd2);
    repeat (3) @(posedge clk);
    chk(32'(n_start), 32'd1, "start pulses");
    chk(32'(n_stop), 32'd1, "stop pulses");
    // status
    status.dc_current[0] = 32'h1111_1111;
    status.dc_current[3] = 32'hFFFF_FFF0;
    status.dc_count      = 32'd42;
    status.bpm_busy      = 1'b1;
    status.fifo_afull    = 1'b1;
    status.fifo_level    = 16'd300;
    status.bpm_scans     = 32'd5;
    rd(CSR_DC_BASE, d);          chk(d, 32'h1111_1111, "dc0");
    rd(CSR_DC_BASE + 8'd3, d);   chk(d, 32'hFFFF_FFF0, "dc3");
    rd(CSR_DC_CNT, d);           chk(d, 32'd42, "dc count");
    rd(CSR_STATUS, d);           chk(d, {16'd300, 12'd0, 4'b0101}, "status");
    rd(CSR_BPM_SCANS, d);        chk(d, 32'd5, "scans");
    rd(8'h3F, d);                chk(d, 32'd0, "unmapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
