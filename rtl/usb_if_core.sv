// usb_if_core: host endpoint of the 32-bit parallel bus behind the USB bridge.
//
// The host talks to the FPGA in frames of 32-bit words: a header (frame_hdr_t
// in diag_pkg: source ID, destination port, direction, transfer type, error
// code, size), an address word, and for writes the data words. The core decodes
// each request and routes it:
//   memory, single register: one double word read from or written to memory
//     port dst_port (1 = configuration space, 2 = BPM banks, up to N_MEM);
//   stream, block read: `size` words popped from the stream port (the raw
//     sample FIFO), waiting for data while the FIFO is empty.
// Every request gets a reply frame: the request header with err filled in and
// size set to the number of data words that follow (1 for a register read,
// `size` for a stream read, 0 for writes and errors). Bad requests (unknown
// port or type, a register access with size other than 1, stream writes, for
// which this design has no sink) are answered with an error code; the data
// words of a bad write are consumed and discarded.
//
// Both word channels use valid/ready handshakes. Memory ports share address
// and write data, have one strobe each and return read data one cycle after
// the read strobe. The published description names the frame fields and the two transfer
// types; the bit layout, port numbers, handshake and error codes are this
// design's choices.
module usb_if_core
  import diag_pkg::*;
#(
  parameter int unsigned N_MEM = 2
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // host to FPGA words
  input  logic                        rx_valid,
  output logic                        rx_ready,
  input  logic [31:0]                 rx_data,
  // FPGA to host words
  output logic                        tx_valid,
  input  logic                        tx_ready,
  output logic [31:0]                 tx_data,
  // memory ports 1..N_MEM (index 0 is port 1)
  output logic [N_MEM-1:0]            mem_wr_en,
  output logic [N_MEM-1:0]            mem_rd_en,
  output logic [15:0]                 mem_addr,
  output logic [31:0]                 mem_wr_data,
  input  logic [N_MEM-1:0][31:0]      mem_rd_data,
  // stream port (FIFO, first word fall through)
  input  logic [31:0]                 st_data,
  input  logic                        st_empty,
  output logic                        st_pop
);
  typedef enum logic [3:0] {
    S_HDR, S_ADDR, S_MWR, S_MRD, S_MWAIT, S_DRAIN, S_RHDR, S_RDATA, S_STREAM
  } state_e;
  state_e state;

  frame_hdr_t hdr, rhdr;
  logic [15:0] cnt;
  logic [31:0] rdata_q;
  logic [3:0]  port;       // dst_port - 1
  frame_hdr_t  rx_hdr;

  always_comb begin
    rx_hdr = frame_hdr_t'(rx_data);
    port   = hdr.dst_port - 4'd1;
  end

  // request classification, evaluated while the address word is accepted
  logic mem_port_ok;
  err_e req_err;
  always_comb begin
    mem_port_ok = (hdr.dst_port >= 4'd1) && (hdr.dst_port <= 4'(N_MEM));
    req_err     = ERR_OK;
    unique case (hdr.xtype)
      XFER_MEM: begin
        if (!mem_port_ok)            req_err = ERR_BAD_PORT;
        else if (hdr.size != 16'd1)  req_err = ERR_BAD_SIZE;
      end
      XFER_STREAM: begin
        if (hdr.dst_port != PORT_STREAM) req_err = ERR_BAD_PORT;
        else if (!hdr.dir_rd)            req_err = ERR_BAD_TYPE;
      end
      default:                       req_err = ERR_BAD_TYPE;
    endcase
  end

  always_comb begin
    rx_ready    = (state == S_HDR) || (state == S_ADDR) || (state == S_MWR) ||
                  (state == S_DRAIN);
    tx_valid    = (state == S_RHDR) || (state == S_RDATA) ||
                  ((state == S_STREAM) && !st_empty);
    tx_data     = (state == S_RHDR)  ? 32'(rhdr) :
                  (state == S_RDATA) ? rdata_q : st_data;
    st_pop      = (state == S_STREAM) && !st_empty && tx_ready;
    mem_wr_en   = '0;
    mem_rd_en   = '0;
    for (int p = 0; p < int'(N_MEM); p++) begin
      if (state == S_MWR && rx_valid && port == 4'(p)) mem_wr_en[p] = 1'b1;
      if (state == S_MRD && port == 4'(p))             mem_rd_en[p] = 1'b1;
    end
    mem_wr_data = rx_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_HDR;
      hdr      <= '0;
      rhdr     <= '0;
      cnt      <= '0;
      rdata_q  <= '0;
      mem_addr <= '0;
    end else begin
      unique case (state)
        S_HDR: if (rx_valid) begin
          hdr   <= rx_hdr;
          state <= S_ADDR;
        end
        S_ADDR: if (rx_valid) begin
          mem_addr     <= rx_data[15:0];
          rhdr         <= hdr;
          rhdr.err     <= req_err;
          rhdr.size    <= '0;
          cnt          <= hdr.size;
          if (req_err != ERR_OK) begin
            state <= (!hdr.dir_rd && hdr.size != 16'd0) ? S_DRAIN : S_RHDR;
          end else if (hdr.xtype == XFER_STREAM) begin
            rhdr.size <= hdr.size;
            state     <= S_RHDR;
          end else begin
            state <= hdr.dir_rd ? S_MRD : S_MWR;
          end
        end
        S_MWR: if (rx_valid) state <= S_RHDR;
        S_MRD: state <= S_MWAIT;
        S_MWAIT: begin
          for (int p = 0; p < int'(N_MEM); p++)
            if (port == 4'(p)) rdata_q <= mem_rd_data[p];
          rhdr.size <= 16'd1;
          state     <= S_RHDR;
        end
        S_DRAIN: if (rx_valid) begin
          cnt <= cnt - 16'd1;
          if (cnt == 16'd1) state <= S_RHDR;
        end
        S_RHDR: if (tx_ready) begin
          if (rhdr.size == 16'd0)      state <= S_HDR;
          else if (rhdr.xtype == XFER_STREAM) state <= S_STREAM;
          else                         state <= S_RDATA;
        end
        S_RDATA: if (tx_ready) state <= S_HDR;
        S_STREAM: if (st_pop) begin
          cnt <= cnt - 16'd1;
          if (cnt == 16'd1) state <= S_HDR;
        end
        default: state <= S_HDR;
      endcase
    end
  end

  // A word offered to the host stays on the bus until it is taken.
  a_tx_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));

endmodule
