// tb_stream_fifo: self-checking test of the stream FIFO. Random pushes and
// pops against a queue model; checks the head word, level, empty, the
// almost-full threshold and that pushes into a full FIFO are refused.
module tb_stream_fifo;
  localparam int unsigned DEPTH = 16, AFULL = 12;
  logic clk = 0, rst_n = 0, push = 0, pop = 0;
  logic [31:0] wr_data = '0, rd_data;
  logic wr_ready, empty, almost_full;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0;
  logic [31:0] q [$];
  int n_full = 0, n_afull = 0;

  always #5 clk = ~clk;
  stream_fifo #(.DW(32), .DEPTH(DEPTH), .AFULL(AFULL)) dut (.*);

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int bias = (i / 500) % 2;         // alternate fill and drain phases
      @(negedge clk);
      chk(int'(level) == q.size(), "level");
      chk(empty == (q.size() == 0), "empty");
      chk(almost_full == (q.size() >= AFULL), "almost_full");
      chk(wr_ready == (q.size() < DEPTH), "wr_ready");
      if (q.size() > 0) chk(rd_data == q[0], "head word");
      if (q.size() == DEPTH) n_full++;
      if (almost_full) n_afull++;
      push = ($urandom_range(99) < (bias ? 30 : 70));
      pop  = ($urandom_range(99) < (bias ? 70 : 30));
      wr_data = $urandom;
      @(posedge clk);
      #1;
    end
    chk(n_full > 0, "FIFO never filled");
    chk(n_afull > 0, "almost full never seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model, updated at the clock edge with the values the DUT sees
  always @(posedge clk) if (rst_n) begin
    logic was_empty, was_full;
    was_empty = (q.size() == 0);
    was_full  = (q.size() == DEPTH);
    if (pop && !was_empty) void'(q.pop_front());
    if (push && !was_full) q.push_back(wr_data);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
