// tb_usb_if_core: self-checking test of the host frame endpoint.
// Two memory slaves (arrays with one-cycle read latency) sit on memory ports 1
// and 2 and a queue acts as the stream FIFO. The host side sends frames with
// random gaps and accepts replies with random back-pressure. Checked: register
// writes land in the right slave, register reads return its data, reply
// headers (error code, size), stream block reads that must wait for data,
// and the error replies for bad port, bad size, bad type and stream writes.
module tb_usb_if_core;
  import diag_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rx_valid = 0, rx_ready, tx_valid, tx_ready = 0;
  logic [31:0] rx_data = '0, tx_data;
  logic [1:0] mem_wr_en, mem_rd_en;
  logic [15:0] mem_addr;
  logic [31:0] mem_wr_data;
  logic [1:0][31:0] mem_rd_data;
  logic [31:0] st_data;
  logic st_empty, st_pop;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  usb_if_core #(.N_MEM(2)) dut (.*);

  // memory slaves
  logic [31:0] slave [2][256];
  initial for (int p = 0; p < 2; p++) for (int i = 0; i < 256; i++) slave[p][i] = 32'(p * 1000 + i);
  always @(posedge clk) for (int p = 0; p < 2; p++) begin
    if (mem_wr_en[p]) slave[p][mem_addr[7:0]] <= mem_wr_data;
    if (mem_rd_en[p]) mem_rd_data[p] <= slave[p][mem_addr[7:0]];
  end
  // stream source
  logic [31:0] sq [$];
  always_comb begin
    st_empty = (sq.size() == 0);
    st_data  = st_empty ? 32'd0 : sq[0];
  end
  always @(posedge clk) if (st_pop) void'(sq.pop_front());

  // random back-pressure on the reply side
  always @(negedge clk) tx_ready = ($urandom_range(3) != 0);

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h expected %h", what, got, exp); end
  endtask

  task automatic send(logic [31:0] w);
    @(negedge clk);
    while ($urandom_range(3) == 0) begin rx_valid = 0; @(negedge clk); end
    rx_valid = 1; rx_data = w;
    @(posedge clk);
    while (!rx_ready) @(posedge clk);
    @(negedge clk); rx_valid = 0;
  endtask

  task automatic recv(output logic [31:0] w);
    @(posedge clk);
    while (!(tx_valid && tx_ready)) @(posedge clk);
    w = tx_data;
  endtask

  function automatic logic [31:0] mkhdr(logic [3:0] port, logic rd, xfer_e t, logic [15:0] sz);
    frame_hdr_t h;
    h = '0; h.src_id = 4'd5; h.dst_port = port; h.dir_rd = rd; h.xtype = t; h.size = sz;
    return 32'(h);
  endfunction

  task automatic expect_reply(logic [3:0] port, logic rd, xfer_e t, err_e e, logic [15:0] sz,
                              string what);
    logic [31:0] w;
    frame_hdr_t h;
    recv(w); h = frame_hdr_t'(w);
    chk(32'(h.err), 32'(e), {what, " err"});
    chk(32'(h.size), 32'(sz), {what, " size"});
    chk(32'({h.src_id, h.dst_port, h.dir_rd, h.xtype}), 32'({4'd5, port, rd, t}), {what, " echo"});
  endtask

  logic [31:0] w;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // register write to port 1 and 2
    send(mkhdr(4'd1, 0, XFER_MEM, 1)); send(32'h10); send(32'hCAFE_0001);
    expect_reply(4'd1, 0, XFER_MEM, ERR_OK, 0, "wr1");
    send(mkhdr(4'd2, 0, XFER_MEM, 1)); send(32'h20); send(32'hBEEF_0002);
    expect_reply(4'd2, 0, XFER_MEM, ERR_OK, 0, "wr2");
    chk(slave[0][8'h10], 32'hCAFE_0001, "port1 written");
    chk(slave[1][8'h20], 32'hBEEF_0002, "port2 written");
    chk(slave[1][8'h10], 32'd1016, "port2 untouched");
    // register reads
    send(mkhdr(4'd1, 1, XFER_MEM, 1)); send(32'h10);
    expect_reply(4'd1, 1, XFER_MEM, ERR_OK, 1, "rd1"); recv(w); chk(w, 32'hCAFE_0001, "rd1 data");
    send(mkhdr(4'd2, 1, XFER_MEM, 1)); send(32'h33);
    expect_reply(4'd2, 1, XFER_MEM, ERR_OK, 1, "rd2"); recv(w); chk(w, 32'd1051, "rd2 data");
    // errors
    send(mkhdr(4'd7, 1, XFER_MEM, 1)); send(32'h0);
    expect_reply(4'd7, 1, XFER_MEM, ERR_BAD_PORT, 0, "bad port");
    send(mkhdr(4'd1, 0, XFER_MEM, 3)); send(32'h11); send(1); send(2); send(3);
    expect_reply(4'd1, 0, XFER_MEM, ERR_BAD_SIZE, 0, "bad size");
    chk(slave[0][8'h11], 32'd17, "bad write discarded");
    send(mkhdr(4'd1, 0, XFER_STREAM, 2)); send(32'h0); send(9); send(9);
    expect_reply(4'd1, 0, XFER_STREAM, ERR_BAD_TYPE, 0, "stream write");
    send(mkhdr(4'd1, 1, xfer_e'(2'd3), 1)); send(32'h0);
    expect_reply(4'd1, 1, xfer_e'(2'd3), ERR_BAD_TYPE, 0, "bad type");
    // stream block read: 3 words ready, 5 more arrive later
    for (int i = 0; i < 3; i++) sq.push_back(32'h5000_0000 + 32'(i));
    send(mkhdr(4'd1, 1, XFER_STREAM, 8)); send(32'h0);
    expect_reply(4'd1, 1, XFER_STREAM, ERR_OK, 8, "stream");
    for (int i = 0; i < 8; i++) begin
      if (i == 3) fork begin
        repeat (20) @(posedge clk);
        @(negedge clk);
        for (int k = 3; k < 8; k++) sq.push_back(32'h5000_0000 + 32'(k));
      end join_none
      recv(w); chk(w, 32'h5000_0000 + 32'(i), "stream word");
    end
    // the endpoint is idle again: one more register read
    send(mkhdr(4'd1, 1, XFER_MEM, 1)); send(32'h05);
    expect_reply(4'd1, 1, XFER_MEM, ERR_OK, 1, "rd3"); recv(w); chk(w, 32'd5, "rd3 data");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
