// config_space: control and status registers on memory port 1.
//
// A small register file that maps every process variable of the acquisition
// chain into the host's address space: the control bits (acquisition run,
// raw streaming, picoammeter ranges, preamplifier gain, interrupt enable), the
// multi-pass MAV settings, the picoammeter and BPM timing, the BPM start/stop
// command, and read-only status such as the MAV-filtered DC current of each
// Faraday-cup channel. Addresses are word addresses (see diag_pkg).
// Writing CSR_BPM_CMD produces one-cycle bpm_start/bpm_stop pulses and stores
// nothing. Reads are registered: rd_data is valid the cycle after rd_en.
// Unmapped addresses read as zero and ignore writes.
//
// The published description gives the register file's role and its contents in broad terms
// (MAV stages and samples per stage, DC current results); the address map,
// field layout and reset values are this design's choices. Reset values give a
// 862 ksps picoammeter rate, a single 64-sample MAV pass, a 200 us BPM clock
// period, a 20 us bpm delay and a 10 Hz BPM scan rate for CLK_HZ.
module config_space
  import diag_pkg::*;
#(
  parameter int unsigned CLK_HZ = 100_000_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  logic        rd_en,
  input  logic [15:0] addr,
  input  logic [31:0] wr_data,
  output logic [31:0] rd_data,
  output cfg_t        cfg,
  input  status_t     status
);
  localparam int unsigned PICO_PER_RST = (CLK_HZ + 432_000) / 864_000;  // ~864 ksps
  localparam int unsigned PULSE_RST    = CLK_HZ / 5_000;                // 200 us
  localparam int unsigned DELAY_RST    = CLK_HZ / 50_000;               // 20 us
  localparam int unsigned PAUSE_RST    = CLK_HZ / 10 - N_WIRES * PULSE_RST; // 10 Hz scans
  localparam int unsigned ADCPER_RST   = CLK_HZ / 400_000;              // 400 ksps

  logic [7:0] a;
  always_comb a = addr[7:0];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cfg.ctrl           <= '0;
      cfg.mav_stages     <= 3'd1;
      cfg.mav_log2n      <= 4'(BPM_LOG2_AVG);
      cfg.pico_period    <= 16'(PICO_PER_RST);
      cfg.bpm_start      <= 1'b0;
      cfg.bpm_stop       <= 1'b0;
      cfg.bpm_delay      <= 32'(DELAY_RST);
      cfg.bpm_pause      <= 32'(PAUSE_RST);
      cfg.bpm_pulse      <= 32'(PULSE_RST);
      cfg.bpm_adc_period <= 16'(ADCPER_RST);
    end else begin
      cfg.bpm_start <= 1'b0;
      cfg.bpm_stop  <= 1'b0;
      if (wr_en && addr[15:8] == 8'h00) begin
        unique case (a)
          CSR_CTRL:      cfg.ctrl           <= ctrl_reg_t'(wr_data[$bits(ctrl_reg_t)-1:0]);
          CSR_MAV: begin
                         cfg.mav_stages     <= wr_data[2:0];
                         cfg.mav_log2n      <= wr_data[11:8];
          end
          CSR_PICO_PER:  cfg.pico_period    <= wr_data[15:0];
          CSR_BPM_CMD: begin
                         cfg.bpm_start      <= wr_data[0];
                         cfg.bpm_stop       <= wr_data[1];
          end
          CSR_BPM_DELAY: cfg.bpm_delay      <= wr_data;
          CSR_BPM_PAUSE: cfg.bpm_pause      <= wr_data;
          CSR_BPM_PULSE: cfg.bpm_pulse      <= wr_data;
          CSR_BPM_ADCPER:cfg.bpm_adc_period <= wr_data[15:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_data <= '0;
    end else if (rd_en) begin
      rd_data <= '0;
      if (addr[15:8] == 8'h00) begin
        unique case (a)
          CSR_ID:        rd_data <= DIAG_ID;
          CSR_CTRL:      rd_data <= 32'(cfg.ctrl);
          CSR_MAV:       rd_data <= {20'd0, cfg.mav_log2n, 5'd0, cfg.mav_stages};
          CSR_PICO_PER:  rd_data <= 32'(cfg.pico_period);
          CSR_BPM_DELAY: rd_data <= cfg.bpm_delay;
          CSR_BPM_PAUSE: rd_data <= cfg.bpm_pause;
          CSR_BPM_PULSE: rd_data <= cfg.bpm_pulse;
          CSR_BPM_ADCPER:rd_data <= 32'(cfg.bpm_adc_period);
          CSR_STATUS:    rd_data <= {status.fifo_level, 12'd0, status.fifo_overflow,
                                     status.fifo_afull, status.bpm_missed, status.bpm_busy};
          CSR_BPM_SCANS: rd_data <= status.bpm_scans;
          CSR_DC_CNT:    rd_data <= status.dc_count;
          default: begin
            for (int c = 0; c < int'(N_PICO_CH); c++)
              if (a == CSR_DC_BASE + 8'(c)) rd_data <= status.dc_current[c];
          end
        endcase
      end
    end
  end

endmodule
