// diag_pkg: constants and types shared by the beam diagnostic FPGA firmware.
//
// It holds the sizes of the acquisition chain (four picoammeter channels with
// 20-bit ADCs, eight BPM ADCs, forty wires per grid, eight memory banks), the
// layout of the host frame header, the memory/stream port numbers and the
// register map of the configuration space. The channel counts, ADC resolution,
// wire count and bank organisation follow the described system; the header bit
// layout, port numbering, register addresses and the 100 MHz system clock are
// this design's own choices.
package diag_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_PICO_CH    = 4;   // FMC picoammeter channels
  localparam int unsigned PICO_BITS    = 20;  // picoammeter ADC resolution
  localparam int unsigned N_BPM_ADC    = 8;   // on-board ADCs = memory banks
  localparam int unsigned BPM_ADC_BITS = 16;  // on-board ADC resolution (chosen)
  localparam int unsigned N_WIRES      = 40;  // wires per grid plane
  localparam int unsigned BPM_LOG2_AVG = 6;   // 64 samples averaged per wire
  localparam int unsigned MAV_MAX_STAGES = 4; // multi-pass MAV depth
  localparam int unsigned MAV_MAX_LOG2N  = 10;// up to 1024 samples per stage
  localparam int unsigned FIFO_DEPTH   = 1024;
  localparam int unsigned FIFO_AFULL   = 768; // almost-full threshold (3/4)

  // ---------------------------------------------------------------- frames
  typedef enum logic [1:0] {
    XFER_MEM    = 2'd0,   // single double-word register access
    XFER_STREAM = 2'd1    // block access to a stream port
  } xfer_e;

  typedef enum logic [4:0] {
    ERR_OK       = 5'd0,
    ERR_BAD_PORT = 5'd1,  // no slave behind the destination port
    ERR_BAD_TYPE = 5'd2,  // transfer type not supported on that port
    ERR_BAD_SIZE = 5'd3   // memory transfer with size other than 1
  } err_e;

  // Header word of every frame, host to FPGA and back.
  typedef struct packed {
    logic [3:0]  src_id;   // issuer, echoed in the reply
    logic [3:0]  dst_port; // memory or stream port number
    logic        dir_rd;   // 1 = read, 0 = write
    xfer_e       xtype;
    err_e        err;      // zero in requests, status in replies
    logic [15:0] size;     // data words following the address (request)
                           // or following the header (reply)
  } frame_hdr_t;

  localparam logic [3:0] PORT_CFG    = 4'd1;  // memory port 1: configuration space
  localparam logic [3:0] PORT_BPM    = 4'd2;  // memory port 2: BPM banks
  localparam logic [3:0] PORT_STREAM = 4'd1;  // stream port 1: raw sample FIFO

  // ------------------------------------------------- configuration space map
  localparam logic [7:0] CSR_ID        = 8'h00; // RO identification
  localparam logic [7:0] CSR_CTRL      = 8'h01; // RW control bits
  localparam logic [7:0] CSR_MAV       = 8'h02; // RW [2:0] stages, [11:8] log2 samples/stage
  localparam logic [7:0] CSR_PICO_PER  = 8'h03; // RW picoammeter conversion period (cycles)
  localparam logic [7:0] CSR_BPM_CMD   = 8'h04; // WO [0] start, [1] stop
  localparam logic [7:0] CSR_BPM_DELAY = 8'h05; // RW bpm delay (cycles)
  localparam logic [7:0] CSR_BPM_PAUSE = 8'h06; // RW pause between bunches (cycles)
  localparam logic [7:0] CSR_BPM_PULSE = 8'h07; // RW BPM clock period (cycles)
  localparam logic [7:0] CSR_BPM_ADCPER= 8'h08; // RW BPM ADC conversion period (cycles)
  localparam logic [7:0] CSR_STATUS    = 8'h09; // RO status flags and FIFO level
  localparam logic [7:0] CSR_BPM_SCANS = 8'h0A; // RO completed BPM scans
  localparam logic [7:0] CSR_DC_BASE   = 8'h10; // RO filtered DC current, channel 0..3
  localparam logic [7:0] CSR_DC_CNT    = 8'h14; // RO number of filter outputs so far

  localparam logic [31:0] DIAG_ID = 32'hD1A6_0001;

  // Control register fields
  typedef struct packed {
    logic                  irq_en;     // [8]
    logic [1:0]            preamp_gain;// [7:6] 0..3 = 1e6..1e9 V/A
    logic [N_PICO_CH-1:0]  pico_range; // [5:2] 1 = 1 uA range, 0 = 1 mA range
    logic                  raw_en;     // [1] raw samples into the stream FIFO
    logic                  pico_run;   // [0] continuous conversion
  } ctrl_reg_t;

  // Everything the configuration space drives into the datapath.
  typedef struct packed {
    ctrl_reg_t   ctrl;
    logic [2:0]  mav_stages;
    logic [3:0]  mav_log2n;
    logic [15:0] pico_period;
    logic        bpm_start;   // one-cycle pulse
    logic        bpm_stop;    // one-cycle pulse
    logic [31:0] bpm_delay;
    logic [31:0] bpm_pause;
    logic [31:0] bpm_pulse;
    logic [15:0] bpm_adc_period;
  } cfg_t;

  // Everything the datapath reports to the configuration space.
  typedef struct packed {
    logic [N_PICO_CH-1:0][31:0] dc_current; // sign-extended MAV outputs
    logic [31:0]                dc_count;
    logic                       bpm_busy;
    logic                       bpm_missed;  // sticky: a wire got no average
    logic                       fifo_afull;
    logic                       fifo_overflow; // sticky: raw samples dropped
    logic [15:0]                fifo_level;
    logic [31:0]                bpm_scans;
  } status_t;

endpackage
