// tb_tdc128_module: end-to-end test of the whole module at its default
// parameters, with models of the four HPTDCs (JTAG chain and readout bus),
// the SDRAM, the serial flash, the FPGA configuration port and the PCI core.
// Everything is driven the way the PC would, through the PCI target
// registers of the CPLD:
//   1. the FPGA is configured from the flash after reset;
//   2. the HPTDC configuration is loaded over JTAG, the INL table is filled,
//      readout and correction are enabled;
//   3. 450 triggers (front panel, PXI and software) are fired while no DMA
//      runs, so FO fills up to its limit and data waits in the SDRAM;
//   4. DMA transfers of 4 kB (and a final shorter one) move every complete
//      256-word block to the PC model, which checks each word against the
//      HPTDC words with the INL subtracted;
//   5. a new FPGA image is written into the flash and loaded.
// Each mechanism of the design is counted and must have happened at least
// once: JTAG load, each trigger source, token passing to every HPTDC, INL
// correction, FI -> SDRAM and SDRAM -> FO blocks, FO hold, SDRAM refresh,
// DMA bursts with irq, flash erase and program, FPGA (re)configuration.
module tb_tdc128_module;
  localparam int SB = 647, NW = (4 * SB + 31) / 32, NEV = 450, IMG = 512;
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
    #60000000;
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
    hptdc_jtag_model #(.SETUP_BITS(SB)) u_chip (.tck, .tms, .tdi(chain[i]), .trst_n, .tdo(chain[i+1]));
  end
  hptdc_bus_model u_tdc (.clk(clk40), .trigger(trigger && rst_n), .get_data, .data_ready, .data);
  sdram_model u_mem (.clk(clk100), .cs_n(sd_cs_n || !rst_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .addr(sd_addr), .dq_in(sd_dq_out), .dq_out(sd_dq_in));
  spi_flash_model u_fl (.cs_n, .sclk, .mosi, .miso);
  fpga_ps_model #(.IMAGE_BYTES(IMG)) u_fpga (.nconfig, .nstatus, .conf_done, .dclk, .data0);

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
    mst_ready <= ($urandom_range(9, 0) < 8);
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

  initial begin
    logic [31:0] s, words [NW];
    logic [4*SB-1:0] stream;
    logic [7:0] img_b [IMG];
    int total, avail, t0;
    for (int i = 0; i < IMG; i++) begin u_fl.mem[i] = 8'(i * 3); img_b[i] = 8'($urandom); end
    for (int w = 0; w < NW; w++) words[w] = $urandom;
    for (int b = 0; b < 4 * SB; b++) stream[b] = words[b/32][b%32];
    repeat (4) @(posedge clk33);
    rst_n = 1;
    repeat (4) @(posedge clk33);
    // 1. FPGA configuration at power-up
    wait_cpld(1);
    rd(6'h10, s);
    check(s[3] && u_fpga.rx.size() == IMG && u_fpga.rx[100] == 8'(300), "FPGA configured at power-up");
    // 2. HPTDC configuration and INL table
    fpga_cmd(4'd2, 0);
    for (int w = 0; w < NW; w++) fpga_cmd(4'd3, words[w]);
    fpga_cmd(4'd1, 32'h2);
    for (int i = 0; i < 256; i++) begin
      lut[i] = 8'($signed($urandom_range(30, 0)) - 15);
      fpga_cmd(4'd4, {16'(i), 8'd0, lut[i]});
    end
    t0 = 0;
    do begin fpga_cmd(4'd5, 0); rd(6'h20, s); t0++; end while (!s[30] && t0 < 1000);
    check(s[30], "JTAG configuration done");
    check(g_chip[0].u_chip.setup_reg == stream[3 * SB +: SB] && g_chip[0].u_chip.ir == 5'h18, "HPTDC 0 configured");
    check(g_chip[1].u_chip.setup_reg == stream[2 * SB +: SB] && g_chip[1].u_chip.ir == 5'h18, "HPTDC 1 configured");
    check(g_chip[2].u_chip.setup_reg == stream[1 * SB +: SB] && g_chip[2].u_chip.ir == 5'h18, "HPTDC 2 configured");
    check(g_chip[3].u_chip.setup_reg == stream[0 +: SB] && g_chip[3].u_chip.ir == 5'h18, "HPTDC 3 configured");
    // wait for the SDRAM initialisation (200 us)
    do begin fpga_cmd(4'd5, 0); rd(6'h20, s); end while (!s[27]);
    fpga_cmd(4'd0, 32'h3);
    // 3. triggers, no DMA yet
    for (int e = 0; e < NEV; e++) begin
      case (e % 3)
        0: begin trig_front = 1; #60 trig_front = 0; n_trig_front++; end
        1: begin trig_pxi = 1; #60 trig_pxi = 0; n_trig_pxi++; end
        default: begin fpga_cmd(4'd1, 32'h1); n_trig_sw++; end
      endcase
      #($urandom_range(1500, 700));
    end
    #50000;
    fpga_cmd(4'd5, 0); rd(6'h20, s);
    check(s[15:0] == 16'(NEV), $sformatf("%0d events read out", s[15:0]));
    check(!s[28], "no data lost");
    rd(6'h04, s);
    check(s >= 3700, $sformatf("FO filled to %0d words before any DMA", s));
    check(u_mem.n_wr > u_mem.n_rd, "data waiting in the SDRAM");
    // 4. DMA everything that forms complete blocks
    total = u_tdc.exp_q.size();
    avail = (total / 256) * 256;
    while (avail - n_pc >= 1024) dma(4096);
    if (avail - n_pc > 0) dma((avail - n_pc) * 4);
    repeat (10) @(posedge clk33);
    check(n_pc == avail && avail > 3 * 4096 / 4, $sformatf("%0d words at the PC, %0d expected", n_pc, avail));
    // 5. on-line update of the FPGA image
    wr(6'h12, 0);
    wait_cpld(0);
    for (int p = 0; p < IMG / 256; p++) begin
      for (int i = 0; i < 256; i++) wr(6'h10, {16'd0, 8'(i), img_b[p*256 + i]});
      wr(6'h11, 32'(p * 256));
      wait_cpld(0);
    end
    wr(6'h13, 0);
    repeat (3) @(posedge clk33);
    wait_cpld(1);
    rd(6'h10, s);
    check(s[3] && !s[2], "FPGA reconfigured");
    t0 = 0;
    for (int i = 0; i < IMG; i++) if (u_fpga.rx[i] != img_b[i]) t0++;
    check(t0 == 0, $sformatf("new image loaded (%0d bytes differ)", t0));
    // mechanisms
    check(u_mem.err_count == 0, "SDRAM protocol");
    check(u_tdc.proto_err == 0, "HPTDC readout protocol");
    check(n_trig_front > 0 && n_trig_pxi > 0 && n_trig_sw > 0, "all trigger sources used");
    for (int c = 0; c < 4; c++) check(n_chip_words[c] > 0, $sformatf("token reached HPTDC %0d", c));
    check(n_inl_changed > 0, "INL correction applied");
    check(n_wr_block > 0 && n_rd_block > 0, "FI->SDRAM and SDRAM->FO blocks");
    check(n_fo_hold > 0, "FO hold");
    check(n_refresh > 0, "SDRAM refresh");
    check(n_irq > 1, "DMA bursts");
    check(u_fl.n_erase == 1 && u_fl.n_program == IMG / 256, "flash erase and program");
    check(n_drop == 0, "FI never overflowed");
    $display("mechanisms: trig front/pxi/sw %0d/%0d/%0d, words per HPTDC %0d/%0d/%0d/%0d, INL changed %0d,",
             n_trig_front, n_trig_pxi, n_trig_sw, n_chip_words[0], n_chip_words[1], n_chip_words[2],
             n_chip_words[3], n_inl_changed);
    $display("  blocks in/out %0d/%0d, FO holds %0d, refreshes %0d, DMA irqs %0d, flash erase/program %0d/%0d, PS loads %0d",
             n_wr_block, n_rd_block, n_fo_hold, n_refresh, n_irq, u_fl.n_erase, u_fl.n_program,
             u_fpga.n_cfg_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
