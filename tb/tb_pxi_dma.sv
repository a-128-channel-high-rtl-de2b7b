// tb_pxi_dma: programs DMA transfers of several lengths through the target
// registers of pxi_dma and plays the PCI core (request acknowledge and a
// random ready signal) and the FO FIFO (one-cycle read latency, words
// arriving at random). Checks: the request carries the programmed address and
// length; exactly the programmed number of words is handed over, in FIFO
// order; irq pulses once and STATUS shows done; with data and a ready core
// the stream runs at one word per cycle (a 1024-word burst, 4 kB, within
// 1024 + 4 cycles of the acknowledge); with FO empty the stream pauses.
module tb_pxi_dma;
  logic clk = 0, rst_n = 0;
  always #15 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic tgt_we = 0, fo_rd_en, fo_rempty, mst_req, mst_ack = 0, mst_valid, mst_ready = 0, irq;
  logic [3:0] tgt_addr = 0;
  logic [31:0] tgt_wdata = 0, tgt_rdata, fo_rdata = 0, mst_addr, mst_data;
  logic [12:0] fo_rdusedw;
  logic [15:0] mst_len;

  pxi_dma dut (.clk, .rst_n, .tgt_we, .tgt_addr, .tgt_wdata, .tgt_rdata, .fo_rd_en, .fo_rdata,
    .fo_rempty, .fo_rdusedw, .mst_req, .mst_addr, .mst_len, .mst_ack, .mst_valid, .mst_data,
    .mst_ready, .irq);

  // FO model
  int unsigned fo_next = 0, fo_count = 0, exp_next = 0, n_irq = 0, got = 0;
  int fill_prob = 100, ready_prob = 100, pauses = 0;
  assign fo_rempty  = (fo_count == 0);
  assign fo_rdusedw = 13'(fo_count);
  always @(posedge clk) if (rst_n) begin
    if (fo_rd_en) begin
      check(fo_count > 0, "read from empty FO");
      fo_rdata <= fo_next; fo_next++; fo_count--;
    end
    if (fo_count < 4000 && $urandom_range(99, 0) < fill_prob) fo_count++;
    if (mst_valid && mst_ready) begin
      check(mst_data == exp_next, $sformatf("word %0d got %0d", exp_next, mst_data));
      exp_next++; got++;
    end
    if (irq) n_irq++;
    if (got > 0 && n_irq == 0 && !mst_valid && fo_rempty) pauses++;
    mst_ready <= ($urandom_range(99, 0) < ready_prob);
  end

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(posedge clk); tgt_we <= 1; tgt_addr <= a; tgt_wdata <= d;
    @(posedge clk); tgt_we <= 0;
  endtask

  task automatic xfer(input int bytes, input logic [31:0] addr, input bit timed);
    int t0, t;
    got = 0; n_irq = 0;
    wr(4'd0, addr);
    wr(4'd1, 32'(bytes));
    wr(4'd2, 32'h1);
    while (!mst_req) @(posedge clk);
    check(mst_addr == addr && mst_len == 16'(bytes / 4), "request address and length");
    repeat ($urandom_range(5, 1)) @(posedge clk);
    mst_ack <= 1; @(posedge clk); mst_ack <= 0;
    t0 = 0;
    while (n_irq == 0) begin @(posedge clk); t0++; end
    check(got == bytes / 4, $sformatf("%0d words moved, expected %0d", got, bytes / 4));
    if (timed) check(t0 <= bytes / 4 + 4, $sformatf("burst took %0d cycles", t0));
    repeat (3) @(posedge clk);
    check(n_irq == 1, "one irq");
    tgt_addr = 4'd3; #1;
    check(tgt_rdata[1:0] == 2'b10, "STATUS done, not busy");
    wr(4'd3, 32'h2);
    #1 check(tgt_rdata[1] == 1'b0, "done cleared");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    fill_prob = 100; ready_prob = 100;
    xfer(4096, 32'h1000_0000, 1);
    fill_prob = 30; ready_prob = 60;
    xfer(256, 32'h2000_0000, 0);
    xfer(16384, 32'h3000_0000, 0);
    fill_prob = 100; ready_prob = 30;
    xfer(64, 32'h4000_0000, 0);
    check(pauses > 0, "stream paused for an empty FO");
    check(exp_next == (4096 + 256 + 16384 + 64) / 4, "total words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
