// tb_dma_burst_rate: transfer speed of the PXI DMA path against the DMA
// burst length, the measurement behind the module's speed curve.
//
// The real FO FIFO (async_fifo, 4096 x 32) is kept filled from the 100 MHz
// side with a running count, and read at 33 MHz by pxi_dma. A model of the
// PCI core acknowledges each burst request after ACK_LAT cycles and then
// takes one word per cycle. Between transfers the PC needs time to service
// the interrupt and start the next transfer; that time is not part of the
// hardware and is modelled as a fixed PC_GAP (10 us, an assumed figure).
// For burst lengths from 256 bytes to 64 kB the testbench runs several
// back-to-back transfers and measures:
//   * the engine's own rate (start to irq): must approach the PCI limit of
//     4 bytes x 33 MHz = 133 MB/s, at least 110 MB/s from 4 kB on;
//   * the average rate including PC_GAP: must grow with the burst length
//     and be above 40 MB/s from 4 kB on.
// Every word must arrive in FIFO order, with none lost or repeated.
module tb_dma_burst_rate;
  localparam int ACK_LAT = 4;
  localparam int PC_GAP  = 330;   // 33 MHz cycles, 10 us
  localparam int NXFER   = 3;

  logic clk = 0, clk100 = 0, rst_n = 0;
  always #15 clk = ~clk;          // 33 MHz
  always #5  clk100 = ~clk100;    // 100 MHz
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // FO FIFO, written as fast as it accepts words
  logic        fo_wr_en, fo_wfull, fo_rd_en, fo_rempty;
  logic [31:0] fo_wdata = 0, fo_rdata;
  logic [12:0] fo_wrusedw, fo_rdusedw;
  assign fo_wr_en = rst_n && !fo_wfull;
  always_ff @(posedge clk100) if (fo_wr_en) fo_wdata <= fo_wdata + 1;

  async_fifo #(.DW(32), .AW(12)) fo (
    .wclk(clk100), .wrst_n(rst_n), .wr_en(fo_wr_en), .wdata(fo_wdata), .wfull(fo_wfull),
    .wrusedw(fo_wrusedw), .rclk(clk), .rrst_n(rst_n), .rd_en(fo_rd_en), .rdata(fo_rdata),
    .rempty(fo_rempty), .rdusedw(fo_rdusedw));

  logic        tgt_we = 0, mst_req, mst_ack = 0, mst_valid, mst_ready = 0, irq;
  logic [3:0]  tgt_addr = 0;
  logic [31:0] tgt_wdata = 0, tgt_rdata, mst_addr, mst_data;
  logic [15:0] mst_len;

  pxi_dma dut (.clk, .rst_n, .tgt_we, .tgt_addr, .tgt_wdata, .tgt_rdata, .fo_rd_en, .fo_rdata,
    .fo_rempty, .fo_rdusedw, .mst_req, .mst_addr, .mst_len, .mst_ack, .mst_valid, .mst_data,
    .mst_ready, .irq);

  // PCI core model: word stream taken whenever offered
  logic [31:0] exp_word = 0;
  int unsigned got = 0, n_irq = 0, order_err = 0;
  always_ff @(posedge clk) begin
    if (mst_valid && mst_ready) begin
      if (mst_data != exp_word) order_err <= order_err + 1;
      exp_word <= mst_data + 1;
      got <= got + 1;
    end
    if (irq) n_irq <= n_irq + 1;
  end

  task automatic wr(input logic [3:0] a, input logic [31:0] d);
    @(posedge clk); tgt_we <= 1; tgt_addr <= a; tgt_wdata <= d;
    @(posedge clk); tgt_we <= 0;
  endtask

  // one transfer; returns the cycles from the start command to irq
  task automatic xfer(input int bytes, output int cycles);
    int irq0, got0;
    irq0 = n_irq; got0 = got;
    cycles = 0;
    wr(4'd0, 32'h1000_0000);
    wr(4'd1, 32'(bytes));
    cycles = 2;
    wr(4'd2, 32'h1);
    cycles += 2;
    while (!mst_req) begin @(posedge clk); cycles++; end
    repeat (ACK_LAT) begin @(posedge clk); cycles++; end
    mst_ack <= 1; mst_ready <= 1;
    @(posedge clk); cycles++;
    mst_ack <= 0;
    while (n_irq == irq0) begin @(posedge clk); cycles++; end
    mst_ready <= 0;
    check(got - got0 == bytes / 4, $sformatf("%0d bytes: %0d words moved", bytes, got - got0));
    wr(4'd3, 32'h2);
  endtask

  initial begin
    int cyc, tot_cyc, tot_bytes, rate_engine, rate_avg, prev_avg;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // let FO fill before the first transfer
    repeat (2000) @(posedge clk);
    prev_avg = 0;
    for (int bytes = 256; bytes <= 65536; bytes *= 2) begin
      tot_cyc = 0; tot_bytes = 0;
      for (int n = 0; n < NXFER; n++) begin
        xfer(bytes, cyc);
        tot_cyc += cyc; tot_bytes += bytes;
        repeat (PC_GAP) @(posedge clk);
      end
      // MB/s = bytes / (cycles x 30.3 ns) = bytes x 33 / cycles
      rate_engine = tot_bytes * 33 / tot_cyc;
      rate_avg    = tot_bytes * 33 / (tot_cyc + NXFER * PC_GAP);
      $display("burst %6d bytes: engine %0d MB/s, with PC gap %0d MB/s", bytes, rate_engine, rate_avg);
      check(rate_engine <= 133, "engine rate within the PCI limit");
      if (bytes >= 4096) begin
        check(rate_engine >= 110, $sformatf("engine rate %0d MB/s at %0d bytes", rate_engine, bytes));
        check(rate_avg >= 40, $sformatf("average rate %0d MB/s at %0d bytes", rate_avg, bytes));
      end
      check(rate_avg > prev_avg, "average rate grows with the burst length");
      prev_avg = rate_avg;
    end
    check(order_err == 0, $sformatf("%0d words out of order", order_err));
    check(n_irq == 9 * NXFER, "one irq per transfer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
