// diag_fpga_top: FPGA firmware of the beam diagnostic readout controller.
//
// One IOC board serves up to four diagnostic points. Each point has a Faraday
// cup, read by one channel of a 4-channel FMC picoampere meter, and a beam
// profile monitor (40 horizontal and 40 vertical wires), read through
// preamplifier boards that multiplex one wire at a time onto the eight
// on-board ADCs. This top wires together:
//   usb_if_core    frame endpoint of the host bus (words to/from the USB bridge)
//   config_space   memory port 1: control/status registers and DC currents
//   bpm_mem        memory port 2: 8 banks x 40 averaged wire values
//   stream_fifo    stream port 1: raw picoammeter samples
//   fmc_pico_ctrl  picoammeter acquisition with multi-pass MAV filters
//   bpm_ctrl       BPM clock generation, wire scan and 64-sample averaging
// The interrupt line reports the stream FIFO almost full (back-pressure) when
// enabled in the control register. pico_range and preamp_gain carry the range
// and gain choices of the control register to the analogue parts.
//
// The block structure and data paths follow the described firmware; the host
// bus handshake, the serial ADC pins and the 100 MHz clock are this design's
// own. All outputs are registered or come straight from registers, except the
// rx_ready/tx_valid/tx_data handshake of the host bus.
module diag_fpga_top
  import diag_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned N_PICO       = N_PICO_CH,
  parameter int unsigned PICO_ADC_BITS= PICO_BITS,
  parameter int unsigned N_ADC        = N_BPM_ADC,
  parameter int unsigned ADC_BITS     = BPM_ADC_BITS,
  parameter int unsigned WIRES        = N_WIRES,
  parameter int unsigned FIFO_WORDS   = FIFO_DEPTH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host bus (USB bridge)
  input  logic                 rx_valid,
  output logic                 rx_ready,
  input  logic [31:0]          rx_data,
  output logic                 tx_valid,
  input  logic                 tx_ready,
  output logic [31:0]          tx_data,
  output logic                 irq,
  // FMC picoampere meter
  output logic                 pico_cnv,
  output logic                 pico_sck,
  input  logic [N_PICO-1:0]    pico_sdo,
  output logic [N_PICO-1:0]    pico_range,
  // on-board ADCs for the BPM signals
  output logic                 adc_cnv,
  output logic                 adc_sck,
  input  logic [N_ADC-1:0]     adc_sdo,
  // BPM control signals to the preamplifier daisy chain
  output logic                 bpm_clk,
  output logic                 bpm_sync,
  output logic [1:0]           preamp_gain
);
  cfg_t    cfg;
  status_t status;

  // ------------------------------------------------------------ host endpoint
  logic [1:0]        mem_wr_en, mem_rd_en;
  logic [15:0]       mem_addr;
  logic [31:0]       mem_wr_data;
  logic [1:0][31:0]  mem_rd_data;
  logic [31:0]       st_data;
  logic              st_empty, st_pop;

  usb_if_core #(.N_MEM(2)) u_usb (
    .clk, .rst_n,
    .rx_valid, .rx_ready, .rx_data,
    .tx_valid, .tx_ready, .tx_data,
    .mem_wr_en, .mem_rd_en, .mem_addr, .mem_wr_data, .mem_rd_data,
    .st_data, .st_empty, .st_pop
  );

  // ------------------------------------------------ memory port 1: registers
  config_space #(.CLK_HZ(CLK_HZ)) u_cfg (
    .clk, .rst_n,
    .wr_en   (mem_wr_en[0]),
    .rd_en   (mem_rd_en[0]),
    .addr    (mem_addr),
    .wr_data (mem_wr_data),
    .rd_data (mem_rd_data[0]),
    .cfg,
    .status
  );

  // ------------------------------------------------- memory port 2: BPM banks
  logic                         bpm_we;
  logic [$clog2(WIRES)-1:0]     bpm_wire;
  logic [N_ADC-1:0][31:0]       bpm_wdata;

  bpm_mem #(.N_BANKS(N_ADC), .N_WORDS(WIRES), .DW(32)) u_bpm_mem (
    .clk, .rst_n,
    .wr_en   (bpm_we),
    .wr_wire (bpm_wire),
    .wr_data (bpm_wdata),
    .rd_en   (mem_rd_en[1]),
    .rd_addr (mem_addr),
    .rd_data (mem_rd_data[1])
  );

  // ------------------------------------------------- stream port: raw samples
  logic        raw_push, raw_ready;
  logic [31:0] raw_data;
  logic [$clog2(FIFO_WORDS):0] fifo_level;
  logic        fifo_afull;

  stream_fifo #(.DW(32), .DEPTH(FIFO_WORDS), .AFULL(FIFO_WORDS * 3 / 4)) u_fifo (
    .clk, .rst_n,
    .push        (raw_push),
    .wr_data     (raw_data),
    .wr_ready    (raw_ready),
    .pop         (st_pop),
    .rd_data     (st_data),
    .empty       (st_empty),
    .almost_full (fifo_afull),
    .level       (fifo_level)
  );

  // ------------------------------------------------------- FMC picoammeter
  logic [N_PICO-1:0][31:0] dc_value;
  logic [31:0]             dc_count;
  logic                    overflow;

  fmc_pico_ctrl #(.N_CH(N_PICO), .BITS(PICO_ADC_BITS),
                  .MAX_STAGES(MAV_MAX_STAGES), .MAX_LOG2N(MAV_MAX_LOG2N)) u_pico (
    .clk, .rst_n,
    .run        (cfg.ctrl.pico_run),
    .raw_en     (cfg.ctrl.raw_en),
    .period     (cfg.pico_period),
    .mav_stages (cfg.mav_stages),
    .mav_log2n  (cfg.mav_log2n),
    .adc_cnv    (pico_cnv),
    .adc_sck    (pico_sck),
    .adc_sdo    (pico_sdo),
    .dc_value,
    .dc_count,
    .raw_push,
    .raw_data,
    .raw_ready,
    .overflow
  );

  // ------------------------------------------------------------ BPM control
  logic        bpm_busy, bpm_missed;
  logic [31:0] bpm_scans;

  bpm_ctrl #(.N_ADC(N_ADC), .BITS(ADC_BITS), .N_WIRES(WIRES),
             .LOG2_AVG(BPM_LOG2_AVG)) u_bpm (
    .clk, .rst_n,
    .start        (cfg.bpm_start),
    .stop         (cfg.bpm_stop),
    .pulse_cycles (cfg.bpm_pulse),
    .delay_cycles (cfg.bpm_delay),
    .pause_cycles (cfg.bpm_pause),
    .adc_period   (cfg.bpm_adc_period),
    .bpm_clk,
    .bpm_sync,
    .adc_cnv,
    .adc_sck,
    .adc_sdo,
    .wr_en        (bpm_we),
    .wr_wire      (bpm_wire),
    .wr_data      (bpm_wdata),
    .busy         (bpm_busy),
    .missed       (bpm_missed),
    .scans        (bpm_scans)
  );

  // ------------------------------------------------------------ status, pins
  always_comb begin
    status               = '0;
    for (int c = 0; c < int'(N_PICO) && c < int'(N_PICO_CH); c++)
      status.dc_current[c] = dc_value[c];
    status.dc_count      = dc_count;
    status.bpm_busy      = bpm_busy;
    status.bpm_missed    = bpm_missed;
    status.fifo_afull    = fifo_afull;
    status.fifo_overflow = overflow;
    status.fifo_level    = 16'(fifo_level);
    status.bpm_scans     = bpm_scans;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) irq <= 1'b0;
    else        irq <= fifo_afull && cfg.ctrl.irq_en;
  end

  always_comb begin
    pico_range  = N_PICO'(cfg.ctrl.pico_range);
    preamp_gain = cfg.ctrl.preamp_gain;
  end

endmodule
