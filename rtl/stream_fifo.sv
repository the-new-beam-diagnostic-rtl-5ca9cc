// stream_fifo: synchronous first-word-fall-through FIFO for the raw sample
// stream.
//
// Raw picoammeter samples are pushed here and drained by block (stream) reads
// from the host. The head word is always visible on rd_data while empty is
// low; pop removes it. A push into a full FIFO is refused (wr_ready low), and
// almost_full rises once `level` reaches AFULL words: it is the back-pressure
// condition the host interrupt reports. Depth and threshold are this design's
// choices; the published description has an internal FIFO with an almost-full
// interrupt but gives no sizes.
// Timing: a word pushed in cycle n can be popped from cycle n+1.
module stream_fifo #(
  parameter int unsigned DW    = 32,
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AFULL = 768
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [DW-1:0]            wr_data,
  output logic                     wr_ready,
  input  logic                     pop,
  output logic [DW-1:0]            rd_data,
  output logic                     empty,
  output logic                     almost_full,
  output logic [$clog2(DEPTH):0]   level
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [DW-1:0] mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          do_push, do_pop;

  always_comb begin
    wr_ready    = (level != (AW+1)'(DEPTH));
    empty       = (level == '0);
    almost_full = (level >= (AW+1)'(AFULL));
    do_push     = push && wr_ready;
    do_pop      = pop && !empty;
    rd_data     = mem[rptr];
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      level <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
      case ({do_push, do_pop})
        2'b10:   level <= level + 1'b1;
        2'b01:   level <= level - 1'b1;
        default: level <= level;
      endcase
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                   empty |-> !do_pop);

endmodule
