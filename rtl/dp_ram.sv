// dp_ram: simple dual-port RAM, one write port and one read port on the same
// clock, read data registered (one cycle latency). A read of the address being
// written returns the old contents. Contents start at zero so that a bank that
// has not been written reads as no current. Used for the BPM data banks.
module dp_ram #(
  parameter int unsigned DW    = 32,
  parameter int unsigned WORDS = 40
) (
  input  logic                      clk,
  input  logic                      we,
  input  logic [$clog2(WORDS)-1:0]  waddr,
  input  logic [DW-1:0]             wdata,
  input  logic                      re,
  input  logic [$clog2(WORDS)-1:0]  raddr,
  output logic [DW-1:0]             rdata
);
  logic [DW-1:0] mem [WORDS];

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < int'(WORDS))) mem[waddr] <= wdata;
    if (re) rdata <= (int'(raddr) < int'(WORDS)) ? mem[raddr] : '0;
  end
endmodule
