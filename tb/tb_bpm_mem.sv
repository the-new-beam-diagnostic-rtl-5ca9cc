// tb_bpm_mem: self-checking test of the BPM data memory. All eight banks are
// written wire by wire with distinct random words, then every host address
// bank*40+wire is read back and compared, including out-of-range addresses
// (zero) and a rewrite of single wires. Read latency is one cycle.
module tb_bpm_mem;
  localparam int unsigned NB = 8, NW = 40;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic [5:0] wr_wire = '0;
  logic [NB-1:0][31:0] wr_data = '0;
  logic [15:0] rd_addr = '0;
  logic [31:0] rd_data;
  logic [31:0] ref_mem [NB][NW];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  bpm_mem #(.N_BANKS(NB), .N_WORDS(NW), .DW(32)) dut (.*);

  task automatic rd(int a, logic [31:0] exp);
    @(negedge clk); rd_en = 1; rd_addr = 16'(a);
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_data !== exp) begin
      failures++; $display("FAIL addr %0d got %h expected %h", a, rd_data, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      wr_en = 1; wr_wire = 6'(w);
      for (int b = 0; b < NB; b++) begin
        wr_data[b] = $urandom; ref_mem[b][w] = wr_data[b];
      end
    end
    @(negedge clk); wr_en = 0;
    for (int a = 0; a < NB * NW; a++) rd(a, ref_mem[a / NW][a % NW]);
    rd(NB * NW, 32'd0);
    rd(1000, 32'd0);
    // rewrite wire 7 in all banks, reading during the write returns old data
    @(negedge clk);
    wr_en = 1; wr_wire = 6'd7;
    for (int b = 0; b < NB; b++) wr_data[b] = 32'hA000_0000 + 32'(b);
    rd_en = 1; rd_addr = 16'(3 * NW + 7);
    @(negedge clk); wr_en = 0; rd_en = 0;
    checks++;
    if (rd_data !== ref_mem[3][7]) begin failures++; $display("FAIL read during write"); end
    for (int b = 0; b < NB; b++) rd(b * NW + 7, 32'hA000_0000 + 32'(b));
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
