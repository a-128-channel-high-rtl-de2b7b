// tb_cpld_logic: exercises the CPLD through its PCI target registers.
//  1. After reset the FPGA (PS model) is configured from the flash image A.
//  2. The PC erases the flash and writes image B page by page; the FPGA is
//     reconfigured on request and must receive B.
//  3. A DMA transfer of 2 kB moves FO words (FIFO model) to the PCI core
//     model in order, with irq.
//  4. Register writes to 0x20-0x2F appear on the FPGA command link with the
//     right address and data; the FPGA status word reads back at 0x20.
module tb_cpld_logic;
  localparam int IMG = 512;
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

  logic tgt_we = 0, mst_req, mst_ack = 0, mst_valid, mst_ready = 1, irq;
  logic [5:0] tgt_addr = 0;
  logic [31:0] tgt_wdata = 0, tgt_rdata, mst_addr, mst_data, fo_rdata = 0;
  logic [15:0] mst_len;
  logic fo_rd_en, fo_rempty, cmd_we, cmd_busy = 0;
  logic [12:0] fo_rdusedw;
  logic [3:0] cmd_addr;
  logic [31:0] cmd_data, cmd_status = 32'h5A5A_0003;
  logic cs_n, sclk, mosi, miso, nconfig, nstatus, conf_done, dclk, data0;

  cpld_logic #(.INIT_CLKS(10)) dut (.clk, .rst_n, .tgt_we, .tgt_addr, .tgt_wdata, .tgt_rdata,
    .mst_req, .mst_addr, .mst_len, .mst_ack, .mst_valid, .mst_data, .mst_ready, .irq,
    .fo_rd_en, .fo_rdata, .fo_rempty, .fo_rdusedw, .cmd_we, .cmd_addr, .cmd_data, .cmd_busy,
    .cmd_status, .spi_cs_n(cs_n), .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso),
    .ps_nconfig(nconfig), .ps_nstatus(nstatus), .ps_conf_done(conf_done), .ps_dclk(dclk),
    .ps_data0(data0));
  spi_flash_model u_fl (.cs_n, .sclk, .mosi, .miso);
  fpga_ps_model #(.IMAGE_BYTES(IMG)) u_fpga (.nconfig, .nstatus, .conf_done, .dclk, .data0);

  // FO model and PCI master model
  int unsigned fo_next = 0, fo_count = 3000, exp_next = 0, n_irq = 0;
  logic [3:0] cmd_addr_seen [$];
  logic [31:0] cmd_data_seen [$];
  assign fo_rempty  = (fo_count == 0);
  assign fo_rdusedw = 13'(fo_count);
  always @(posedge clk) if (rst_n) begin
    if (fo_rd_en) begin fo_rdata <= fo_next; fo_next++; fo_count--; end
    if (mst_valid && mst_ready) begin
      check(mst_data == exp_next, "DMA word order");
      exp_next++;
    end
    if (mst_req) mst_ack <= 1; else mst_ack <= 0;
    if (irq) n_irq++;
    if (cmd_we) begin cmd_addr_seen.push_back(cmd_addr); cmd_data_seen.push_back(cmd_data); end
  end

  task automatic wr(input logic [5:0] a, input logic [31:0] d);
    @(posedge clk); tgt_we <= 1; tgt_addr <= a; tgt_wdata <= d;
    @(posedge clk); tgt_we <= 0;
  endtask
  task automatic rd(input logic [5:0] a, output logic [31:0] d);
    @(posedge clk); tgt_addr <= a; @(posedge clk); #1 d = tgt_rdata;
  endtask
  task automatic wait_status(input int bitn);
    logic [31:0] s;
    do rd(6'h10, s); while (s[bitn]);
  endtask

  initial begin
    logic [31:0] s;
    logic [7:0] img_b [IMG];
    for (int i = 0; i < IMG; i++) begin u_fl.mem[i] = 8'(i ^ 8'h55); img_b[i] = 8'($urandom); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1. configuration after reset
    repeat (5) @(posedge clk);
    wait_status(1);
    rd(6'h10, s);
    check(s[3] && !s[2], "FPGA configured after reset");
    check(u_fpga.rx.size() == IMG && u_fpga.rx[7] == 8'(7 ^ 8'h55) && u_fpga.rx[IMG-1] == 8'((IMG-1) ^ 8'h55),
          "image A loaded");
    // 2. on-line update: erase, program, reconfigure
    wr(6'h12, 0);
    wait_status(0);
    check(u_fl.n_erase == 1, "flash erased");
    for (int p = 0; p < IMG / 256; p++) begin
      for (int i = 0; i < 256; i++) wr(6'h10, {16'd0, 8'(i), img_b[p*256 + i]});
      wr(6'h11, 32'(p * 256));
      wait_status(0);
    end
    rd(6'h10, s);
    check(s[4], "flash operation done");
    check(u_fl.n_program == IMG / 256 && u_fl.err_count == 0, "pages programmed");
    wr(6'h13, 0);
    repeat (3) @(posedge clk);
    wait_status(1);
    rd(6'h10, s);
    check(s[3] && !s[2], "FPGA reconfigured");
    check(u_fpga.n_cfg_starts >= 2 && u_fpga.rx.size() == IMG, "image B size");
    for (int i = 0; i < IMG; i++) check(u_fpga.rx[i] == img_b[i], $sformatf("image B byte %0d", i));
    // 3. DMA
    wr(6'h00, 32'h8000_0000);
    wr(6'h01, 32'd2048);
    wr(6'h02, 32'h1);
    wait (n_irq == 1);
    repeat (2) @(posedge clk);
    check(exp_next == 512, $sformatf("DMA moved %0d words", exp_next));
    rd(6'h03, s);
    check(s[1:0] == 2'b10, "DMA done");
    // 4. command forwarding and status
    wr(6'h23, 32'hDEAD_0001);
    wr(6'h21, 32'h2);
    @(posedge clk);
    check(cmd_addr_seen.size() == 2 && cmd_addr_seen[0] == 4'h3 && cmd_data_seen[0] == 32'hDEAD_0001
          && cmd_addr_seen[1] == 4'h1 && cmd_data_seen[1] == 32'h2, $sformatf("commands forwarded %0d", cmd_addr_seen.size()));
    rd(6'h20, s);
    check(s == 32'h5A5A_0003, "FPGA status readable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
