// cpld_logic: the CPLD between the PXI bus and the FPGA.
//
// It holds the DMA engine that sends FO data to the PC (pxi_dma), forwards
// register commands from the PC to the FPGA (to host_cmd_if), and handles
// the FPGA configuration: the Sflash controller (sflash_ctrl) writes a new
// image received over PXI into the serial flash, and the timing generator
// (ps_timing_gen) loads the FPGA from the flash in passive-serial mode, once
// after reset and again on request. The two share the flash; the timing
// generator owns it while it is busy. The PCI core itself is outside this
// RTL: its target register accesses arrive on tgt_* and its master burst
// interface is mst_*.
//
// Target register map (tgt_addr, this design's choice):
//   0x00-0x0F  DMA engine registers (see pxi_dma)
//   0x10 write: flash page buffer, bits [15:8] byte index, [7:0] byte
//   0x11 write: program the buffered page at byte address tgt_wdata[23:0]
//   0x12 write: erase the flash
//   0x13 write: reconfigure the FPGA from the flash
//   0x10 read : bit0 flash busy, bit1 configuration busy, bit2 configuration
//               error, bit3 FPGA configured, bit4 last flash operation done
//   0x20-0x2F  write: FPGA command (address = low 4 bits), see host_cmd_if
//   0x20 read : bits [31:0] FPGA status snapshot; 0x21 read: bit0 command busy
// All of it runs on the 33 MHz PCI clock.
module cpld_logic #(
  parameter int unsigned FAW         = 12,
  parameter int unsigned NCONFIG_LOW = 80,
  parameter int unsigned ST2CK       = 80,
  parameter int unsigned INIT_CLKS   = 299
) (
  input  logic          clk,
  input  logic          rst_n,
  // PCI core target side
  input  logic          tgt_we,
  input  logic [5:0]    tgt_addr,
  input  logic [31:0]   tgt_wdata,
  output logic [31:0]   tgt_rdata,
  // PCI core master side
  output logic          mst_req,
  output logic [31:0]   mst_addr,
  output logic [15:0]   mst_len,
  input  logic          mst_ack,
  output logic          mst_valid,
  output logic [31:0]   mst_data,
  input  logic          mst_ready,
  output logic          irq,
  // FO read side (FIFO in the FPGA)
  output logic          fo_rd_en,
  input  logic [31:0]   fo_rdata,
  input  logic          fo_rempty,
  input  logic [FAW:0]  fo_rdusedw,
  // command link to the FPGA
  output logic          cmd_we,
  output logic [3:0]    cmd_addr,
  output logic [31:0]   cmd_data,
  input  logic          cmd_busy,
  input  logic [31:0]   cmd_status,
  // serial flash
  output logic          spi_cs_n,
  output logic          spi_sclk,
  output logic          spi_mosi,
  input  logic          spi_miso,
  // FPGA passive-serial configuration
  output logic          ps_nconfig,
  input  logic          ps_nstatus,
  input  logic          ps_conf_done,
  output logic          ps_dclk,
  output logic          ps_data0
);

  logic [31:0] dma_rdata;
  logic        dma_we;
  logic        fl_busy, fl_done, cfg_busy, cfg_done, cfg_error;
  logic        pb_we, op_program, op_erase, cfg_start;
  logic        por_done;
  logic        fl_cs_n, fl_sclk, fl_mosi, cg_cs_n, cg_sclk, cg_mosi;

  assign dma_we     = tgt_we && (tgt_addr[5:4] == 2'b00);
  assign pb_we      = tgt_we && (tgt_addr == 6'h10);
  assign op_program = tgt_we && (tgt_addr == 6'h11);
  assign op_erase   = tgt_we && (tgt_addr == 6'h12);
  assign cmd_we     = tgt_we && (tgt_addr[5:4] == 2'b10);
  assign cmd_addr   = tgt_addr[3:0];
  assign cmd_data   = tgt_wdata;

  // configuration once after reset, then on request
  logic cfg_ok, fl_ok;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      por_done <= 1'b0;
      cfg_ok   <= 1'b0;
      fl_ok    <= 1'b0;
    end else begin
      por_done <= 1'b1;
      if (cfg_start)         cfg_ok <= 1'b0;
      else if (cfg_done)     cfg_ok <= 1'b1;
      if (op_erase || op_program) fl_ok <= 1'b0;
      else if (fl_done)      fl_ok  <= 1'b1;
    end
  end
  assign cfg_start = !por_done || (tgt_we && tgt_addr == 6'h13);

  always_comb begin
    unique case (tgt_addr[5:4])
      2'b00:   tgt_rdata = dma_rdata;
      2'b01:   tgt_rdata = {27'd0, fl_ok, cfg_ok, cfg_error, cfg_busy, fl_busy};
      2'b10:   tgt_rdata = tgt_addr[0] ? {31'd0, cmd_busy} : cmd_status;
      default: tgt_rdata = '0;
    endcase
  end

  pxi_dma #(.FAW(FAW)) u_dma (
    .clk, .rst_n,
    .tgt_we(dma_we), .tgt_addr(tgt_addr[3:0]), .tgt_wdata, .tgt_rdata(dma_rdata),
    .fo_rd_en, .fo_rdata, .fo_rempty, .fo_rdusedw,
    .mst_req, .mst_addr, .mst_len, .mst_ack, .mst_valid, .mst_data, .mst_ready, .irq
  );

  sflash_ctrl u_flash (
    .clk, .rst_n,
    .op_erase(op_erase && !cfg_busy), .op_program(op_program && !cfg_busy),
    .prog_addr(tgt_wdata[23:0]),
    .pb_we, .pb_addr(tgt_wdata[15:8]), .pb_wdata(tgt_wdata[7:0]),
    .busy(fl_busy), .done(fl_done),
    .spi_cs_n(fl_cs_n), .spi_sclk(fl_sclk), .spi_mosi(fl_mosi), .spi_miso
  );

  ps_timing_gen #(.NCONFIG_LOW(NCONFIG_LOW), .ST2CK(ST2CK), .INIT_CLKS(INIT_CLKS)) u_cfg (
    .clk, .rst_n, .start(cfg_start && !fl_busy),
    .busy(cfg_busy), .done(cfg_done), .error(cfg_error),
    .ps_nconfig, .ps_nstatus, .ps_conf_done, .ps_dclk, .ps_data0,
    .spi_cs_n(cg_cs_n), .spi_sclk(cg_sclk), .spi_mosi(cg_mosi), .spi_miso
  );

  // flash pins: the timing generator owns the flash while it is busy
  assign spi_cs_n = cfg_busy ? cg_cs_n : fl_cs_n;
  assign spi_sclk = cfg_busy ? cg_sclk : fl_sclk;
  assign spi_mosi = cfg_busy ? cg_mosi : fl_mosi;

endmodule
