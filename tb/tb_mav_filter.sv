// tb_mav_filter: self-checking test of the multiple-pass moving average.
// Random signed samples are fed; a reference model in the testbench computes
// the cascaded block averages and the test compares every output, checks that
// the first output arrives after exactly (2**log2n)**n_stages samples, and
// exercises clear and several stage/sample settings.
module tb_mav_filter;
  localparam int unsigned DW = 20;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [2:0] n_stages;
  logic [3:0] log2n;
  logic in_valid = 0;
  logic signed [DW-1:0] in_data = '0;
  logic out_valid;
  logic signed [DW-1:0] out_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mav_filter #(.DW(DW), .MAX_STAGES(4), .MAX_LOG2N(10)) dut (.*);

  // reference: queue of expected outputs
  longint ref_acc [4];
  int     ref_cnt [4];
  int     expq [$];
  int     n_in, first_out_at;

  task automatic ref_push(int s, int unsigned ns, int l2, longint v);
    longint m;
    ref_acc[s] += v;
    ref_cnt[s]++;
    if (ref_cnt[s] == (1 << l2)) begin
      m = ref_acc[s] >>> l2;
      ref_acc[s] = 0; ref_cnt[s] = 0;
      if (s == int'(ns) - 1) expq.push_back(int'(m));
      else ref_push(s + 1, ns, l2, m);
    end
  endtask

  always @(posedge clk) if (rst_n && out_valid) begin
    int e;
    checks++;
    if (first_out_at < 0) first_out_at = n_in;
    if (expq.size() == 0) begin
      failures++; $display("FAIL unexpected output %0d", out_data);
    end else begin
      e = expq.pop_front();
      if (int'(out_data) != e) begin
        failures++; $display("FAIL out %0d expected %0d", out_data, e);
      end
    end
  end

  task automatic run(int unsigned ns, int l2, int nsamp, int amp);
    @(posedge clk);
    n_stages = 3'(ns); log2n = 4'(l2);
    clear = 1; @(posedge clk); clear = 0;
    for (int s = 0; s < 4; s++) begin ref_acc[s] = 0; ref_cnt[s] = 0; end
    expq.delete(); n_in = 0; first_out_at = -1;
    for (int i = 0; i < nsamp; i++) begin
      int v = int'($urandom_range(2 * amp)) - amp;
      in_valid = 1; in_data = DW'(v);
      n_in++;
      ref_push(0, ns, l2, longint'(v));
      @(posedge clk);
      in_valid = 0;
      repeat ($urandom_range(2)) @(posedge clk);
    end
    repeat (8) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d outputs missing", expq.size()); end
    checks++;
    // the output register of each pass may let up to ns more samples in
    if (first_out_at < (1 << (l2 * ns)) || first_out_at > (1 << (l2 * ns)) + int'(ns)) begin
      failures++; $display("FAIL latency %0d samples, expected %0d", first_out_at, 1 << (l2 * ns));
    end
  endtask

  initial begin
    n_stages = 1; log2n = 6;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, 6, 64 * 5, 500000);     // BPM setting: 64 samples, one stage
    run(2, 3, 64 * 4, 500000);
    run(4, 2, 256 * 3, 500000);    // four passes of 4 samples
    run(3, 4, 4096 + 100, 1000);
    run(1, 0, 20, 500000);         // one sample per stage: pass-through
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
