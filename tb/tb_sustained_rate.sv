// tb_sustained_rate: the whole module at its default parameters under a
// sustained data rate of more than 40 MB/s, the rate the module is built
// to deliver to the PC.
//
// The HPTDC model sends events of 2 to 130 words (up to 32 hits per chip);
// a trigger every 6 us gives about 44 MB/s of TDC data for 3 ms. The PC
// model meanwhile runs back-to-back 4 kB DMA transfers and spends an assumed
// 10 us between the interrupt and the next start, as a PC driver would. The
// data flow through FI, SDRAM and FO while they are being read.
// Checks:
//   * the incoming rate really is above 40 MB/s;
//   * no word is lost (no FI overflow, status "data lost" clear) and every
//     word reaches the PC in order with its INL correction;
//   * the PC keeps up: the words delivered during the triggered period
//     amount to at least 40 MB/s, and the backlog at its end is less than
//     the 8192 words of the two FIFOs.
module tb_sustained_rate;
  localparam int    TRIG_NS = 6000;
  localparam int    RUN_NS  = 3000000;
  localparam int    PC_GAP_NS = 10000;
  logic clk40 = 0, clk100 = 0, clk33 = 0, rst_n = 0;
  always #12.5 clk40 = ~clk40;
  always #5 clk100 = ~clk100;
  always #15 clk33 = ~clk33;
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

  logic trig_front = 0, trig_pxi = 0, tck, tms, tdi, trst_n, trigger, data_ready, get_data;
  logic [31:0] data, sd_dq_out, sd_dq_in;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe;
  logic [1:0] sd_ba;
  logic [11:0] sd_addr;
  logic [3:0] sd_dqm;
  logic tgt_we = 0, mst_req, mst_ack = 0, mst_valid, mst_ready = 0, irq;
  logic [5:0] tgt_addr = 0;
  logic [31:0] tgt_wdata = 0, tgt_rdata, mst_addr, mst_data;
  logic [15:0] mst_len;
  logic cs_n, sclk, mosi, miso, nconfig, nstatus, conf_done, dclk, data0;
  logic ev_wr_block, ev_rd_block, ev_refresh, ev_fo_hold, ev_fi_drop;
  logic [4:0] chain;

  tdc128_module dut (.clk40, .clk100, .clk33, .rst_n, .trig_front, .trig_pxi,
    .hptdc_tck(tck), .hptdc_tms(tms), .hptdc_tdi(tdi), .hptdc_trst_n(trst_n), .hptdc_tdo(chain[4]),
    .hptdc_trigger(trigger), .hptdc_data_ready(data_ready), .hptdc_data(data),
    .hptdc_get_data(get_data), .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba,
    .sd_addr, .sd_dqm, .sd_dq_out, .sd_dq_oe, .sd_dq_in,
    .tgt_we, .tgt_addr, .tgt_wdata, .tgt_rdata, .mst_req, .mst_addr, .mst_len, .mst_ack,
    .mst_valid, .mst_data, .mst_ready, .irq,
    .spi_cs_n(cs_n), .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso),
    .ps_nconfig(nconfig), .ps_nstatus(nstatus), .ps_conf_done(conf_done), .ps_dclk(dclk),
    .ps_data0(data0), .ev_wr_block, .ev_rd_block, .ev_refresh, .ev_fo_hold, .ev_fi_drop);

  assign chain[0] = tdi;
  for (genvar i = 0; i < 4; i++) begin : g_chip
    hptdc_jtag_model #(.SETUP_BITS(647)) u_chip (.tck, .tms, .tdi(chain[i]), .trst_n, .tdo(chain[i+1]));
  end
  hptdc_bus_model #(.MAX_HITS(32)) u_tdc (.clk(clk40), .trigger(trigger && rst_n), .get_data, .data_ready, .data);
  sdram_model u_mem (.clk(clk100), .cs_n(sd_cs_n || !rst_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .addr(sd_addr), .dq_in(sd_dq_out), .dq_out(sd_dq_in));
  spi_flash_model u_fl (.cs_n, .sclk, .mosi, .miso);
  fpga_ps_model #(.IMAGE_BYTES(512)) u_fpga (.nconfig, .nstatus, .conf_done, .dclk, .data0);

  logic signed [7:0] lut [256];
  function automatic logic [31:0] corrected(logic [31:0] w);
    if (w[31:28] == 4'h4 || w[31:28] == 4'h5) return {w[31:19], 19'(w[18:0] - 19'(lut[w[7:0]]))};
    return w;
  endfunction

  // mechanism counters
  int n_trig_front = 0, n_trig_pxi = 0, n_trig_sw = 0, n_inl_changed = 0, n_irq = 0;
  int n_wr_block = 0, n_rd_block = 0, n_refresh = 0, n_fo_hold = 0, n_drop = 0;
  int n_chip_words [4];
  int n_pc = 0;
  initial for (int i = 0; i < 4; i++) n_chip_words[i] = 0;

  always @(posedge clk100) if (rst_n) begin
    if (ev_wr_block) n_wr_block++;
    if (ev_rd_block) n_rd_block++;
    if (ev_refresh)  n_refresh++;
    if (ev_fo_hold)  n_fo_hold++;
  end
  always @(posedge clk40) if (rst_n && ev_fi_drop) n_drop++;

  // PCI core model: accepts requests, takes words with a random ready
  always @(posedge clk33) if (rst_n) begin
    mst_ack <= mst_req && !mst_ack;
    mst_ready <= 1'b1;
    if (irq) n_irq++;
    if (mst_valid && mst_ready) begin
      logic [31:0] raw, e;
      raw = u_tdc.exp_q.pop_front();
      e = corrected(raw);
      if (e != raw) n_inl_changed++;
      if (raw[31:28] == 4'h4 || raw[31:28] == 4'h5) n_chip_words[raw[25:24]]++;
      check(mst_data == e, $sformatf("PC word %0d got %h exp %h", n_pc, mst_data, e));
      n_pc++;
    end
  end

  task automatic wr(input logic [5:0] a, input logic [31:0] d);
    @(posedge clk33); tgt_we <= 1; tgt_addr <= a; tgt_wdata <= d;
    @(posedge clk33); tgt_we <= 0;
  endtask
  task automatic rd(input logic [5:0] a, output logic [31:0] d);
    @(posedge clk33); tgt_addr <= a; @(posedge clk33); #1 d = tgt_rdata;
  endtask
  task automatic fpga_cmd(input logic [3:0] a, input logic [31:0] d);
    logic [31:0] s;
    wr(6'h20 | 6'(a), d);
    do rd(6'h21, s); while (s[0]);
  endtask
  task automatic wait_cpld(input int bitn);
    logic [31:0] s;
    do rd(6'h10, s); while (s[bitn]);
  endtask
  task automatic dma(input int bytes);
    int n_before;
    n_before = n_irq;
    wr(6'h00, 32'h1000_0000);
    wr(6'h01, 32'(bytes));
    wr(6'h02, 32'h1);
    while (n_irq == n_before) @(posedge clk33);
  endtask

  bit running = 0, pc_busy = 0;
  // PC side: back-to-back 4 kB transfers while data keep coming; exp_q holds
  // the words not yet at the PC, and only complete blocks reach FO
  initial begin
    wait (running);
    while (running) begin
      if (u_tdc.exp_q.size() >= 1024 + 256) begin
        pc_busy = 1;
        dma(4096);
        pc_busy = 0;
        #(PC_GAP_NS);
      end else @(posedge clk33);
    end
  end

  initial begin
    logic [31:0] s;
    real t_start, t_end, mb_in, mb_out;
    int total, avail, at_end;
    repeat (4) @(posedge clk33);
    rst_n = 1;
    repeat (4) @(posedge clk33);
    wait_cpld(1);
    for (int i = 0; i < 256; i++) begin
      lut[i] = 8'($signed($urandom_range(30, 0)) - 15);
      fpga_cmd(4'd4, {16'(i), 8'd0, lut[i]});
    end
    do begin fpga_cmd(4'd5, 0); rd(6'h20, s); end while (!s[27]);
    fpga_cmd(4'd0, 32'h3);
    running = 1;
    t_start = $realtime;
    while ($realtime - t_start < RUN_NS) begin
      trig_front = 1; #60 trig_front = 0;
      #(TRIG_NS - 60);
    end
    #3000;
    t_end = $realtime;
    at_end = n_pc;
    running = 0;
    wait (!pc_busy);
    total = u_tdc.exp_q.size() + n_pc;
    mb_in  = real'(total) * 4.0 / ((t_end - t_start) * 1.0e-9) / 1.0e6;
    mb_out = real'(at_end) * 4.0 / ((t_end - t_start) * 1.0e-9) / 1.0e6;
    $display("%0d events, %0d words: %0.1f MB/s in, %0.1f MB/s delivered, backlog %0d words",
             u_tdc.event_id, total, mb_in, mb_out, total - at_end);
    check(mb_in >= 40.0, "TDC data rate above 40 MB/s");
    check(mb_out >= 40.0, "PC receives at least 40 MB/s");
    check(total - at_end < 8192, "backlog within the FIFOs");
    // drain every complete block
    #20000;
    avail = (total / 256) * 256;
    while (avail - n_pc >= 1024) dma(4096);
    if (avail - n_pc > 0) dma((avail - n_pc) * 4);
    repeat (10) @(posedge clk33);
    check(n_pc == avail, $sformatf("%0d words at the PC, %0d expected", n_pc, avail));
    fpga_cmd(4'd5, 0); rd(6'h20, s);
    check(!s[28], "no data lost");
    check(n_drop == 0, "FI never overflowed");
    check(u_mem.err_count == 0, "SDRAM protocol");
    check(u_tdc.proto_err == 0, "HPTDC readout protocol");
    check(n_wr_block > 0 && n_rd_block > 0, "data went through the SDRAM");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
