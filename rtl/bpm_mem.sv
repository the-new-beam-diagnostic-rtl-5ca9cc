// bpm_mem: BPM data memory behind memory port 2.
//
// Eight consecutive banks of dual-port RAM, one per on-board ADC (one BPM
// plane), each holding one 32-bit register per wire (40). The BPM control core
// writes the averaged value of one wire into all banks at once (wr_en,
// wr_wire, one data word per bank); the host reads any register through the
// second port. Host word address = bank * N_WORDS + wire, so the banks follow
// each other without gaps; addresses past the last bank read as zero.
// The bank count and size follow the published description of the system; the address arithmetic and the
// one-cycle registered read are this design's choices.
module bpm_mem #(
  parameter int unsigned N_BANKS = 8,
  parameter int unsigned N_WORDS = 40,
  parameter int unsigned DW      = 32
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // write side (BPM control core)
  input  logic                              wr_en,
  input  logic [$clog2(N_WORDS)-1:0]        wr_wire,
  input  logic [N_BANKS-1:0][DW-1:0]        wr_data,
  // read side (memory port 2)
  input  logic                              rd_en,
  input  logic [15:0]                       rd_addr,
  output logic [DW-1:0]                     rd_data
);
  localparam int unsigned WA = $clog2(N_WORDS);
  localparam int unsigned BA = $clog2(N_BANKS);

  logic [15:0]        bank_full;
  logic [WA-1:0]      word;
  logic               in_range;
  logic [BA-1:0]      bank_q;
  logic               in_range_q;
  logic [DW-1:0]      bank_rdata [N_BANKS];

  always_comb begin
    bank_full = rd_addr / 16'(N_WORDS);
    word      = WA'(rd_addr - bank_full * 16'(N_WORDS));
    in_range  = (bank_full < 16'(N_BANKS));
  end

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    dp_ram #(.DW(DW), .WORDS(N_WORDS)) u_bank (
      .clk,
      .we    (wr_en),
      .waddr (wr_wire),
      .wdata (wr_data[b]),
      .re    (rd_en && in_range && (bank_full == 16'(b))),
      .raddr (word),
      .rdata (bank_rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bank_q     <= '0;
      in_range_q <= 1'b0;
    end else if (rd_en) begin
      bank_q     <= BA'(bank_full);
      in_range_q <= in_range;
    end
  end

  always_comb rd_data = in_range_q ? bank_rdata[bank_q] : '0;

endmodule
