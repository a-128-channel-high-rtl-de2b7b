// tdc128_module: digital logic of the 128-channel time measurement module.
//
// 128 drift-chamber channels are digitised by 4 HPTDC chips (32 channels
// each, high resolution mode, about 100 ps bins). This top joins the two
// programmable devices of the board:
//  * fpga_logic: configures the HPTDC chain over JTAG, triggers and reads
//    the chips through their token-ring parallel bus, corrects the INL with
//    a 256-entry look-up table and buffers the data through FI, the external
//    SDRAM and FO;
//  * cpld_logic: the PXI side; a DMA engine drains FO to the PC in bursts,
//    PC commands are forwarded to the FPGA, and the FPGA is configured from
//    a serial flash that the PC can rewrite.
// Chips outside the RTL (HPTDCs, SDRAM, serial flash, the PCI core and the
// FPGA's own configuration port) connect to the ports. The SDRAM data bus is
// split into in/out/enable; the board-level tri-state buffer is outside.
//
// Clocks: clk40 (system clock, also fed to the HPTDCs), clk100 (SDRAM),
// clk33 (PCI). rst_n is asynchronous, active low.
module tdc128_module
  import tdc_pkg::*;
#(
  parameter int unsigned N_CHIPS    = N_HPTDC,
  parameter int unsigned SETUP_BITS = 647,
  parameter int unsigned N_TABLES   = 1,
  parameter int unsigned FAW        = 12,
  parameter int unsigned INIT_WAIT  = 20000,
  parameter int unsigned NCONFIG_LOW = 80,
  parameter int unsigned ST2CK       = 80,
  parameter int unsigned INIT_CLKS   = 299
) (
  input  logic         clk40,
  input  logic         clk100,
  input  logic         clk33,
  input  logic         rst_n,
  input  logic         trig_front,
  input  logic         trig_pxi,
  // HPTDC chain
  output logic         hptdc_tck,
  output logic         hptdc_tms,
  output logic         hptdc_tdi,
  output logic         hptdc_trst_n,
  input  logic         hptdc_tdo,
  output logic         hptdc_trigger,
  input  logic         hptdc_data_ready,
  input  logic [31:0]  hptdc_data,
  output logic         hptdc_get_data,
  // SDRAM
  output logic         sd_cke,
  output logic         sd_cs_n,
  output logic         sd_ras_n,
  output logic         sd_cas_n,
  output logic         sd_we_n,
  output logic [1:0]   sd_ba,
  output logic [11:0]  sd_addr,
  output logic [3:0]   sd_dqm,
  output logic [31:0]  sd_dq_out,
  output logic         sd_dq_oe,
  input  logic [31:0]  sd_dq_in,
  // PCI core target side
  input  logic         tgt_we,
  input  logic [5:0]   tgt_addr,
  input  logic [31:0]  tgt_wdata,
  output logic [31:0]  tgt_rdata,
  // PCI core master side
  output logic         mst_req,
  output logic [31:0]  mst_addr,
  output logic [15:0]  mst_len,
  input  logic         mst_ack,
  output logic         mst_valid,
  output logic [31:0]  mst_data,
  input  logic         mst_ready,
  output logic         irq,
  // serial flash
  output logic         spi_cs_n,
  output logic         spi_sclk,
  output logic         spi_mosi,
  input  logic         spi_miso,
  // FPGA passive-serial configuration
  output logic         ps_nconfig,
  input  logic         ps_nstatus,
  input  logic         ps_conf_done,
  output logic         ps_dclk,
  output logic         ps_data0,
  // monitoring of the buffer path
  output logic         ev_wr_block,
  output logic         ev_rd_block,
  output logic         ev_refresh,
  output logic         ev_fo_hold,
  output logic         ev_fi_drop
);

  logic         fo_rd_en, fo_rempty, cmd_we, cmd_busy;
  logic [31:0]  fo_rdata, cmd_data, cmd_status;
  logic [FAW:0] fo_rdusedw;
  logic [3:0]   cmd_addr;

  fpga_logic #(.N_CHIPS(N_CHIPS), .SETUP_BITS(SETUP_BITS), .N_TABLES(N_TABLES),
               .FAW(FAW), .INIT_WAIT(INIT_WAIT)) u_fpga (
    .clk40, .clk100, .clk33, .rst_n, .trig_front, .trig_pxi,
    .hptdc_tck, .hptdc_tms, .hptdc_tdi, .hptdc_trst_n, .hptdc_tdo,
    .hptdc_trigger, .hptdc_data_ready, .hptdc_data, .hptdc_get_data,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_addr, .sd_dqm,
    .sd_dq_out, .sd_dq_oe, .sd_dq_in,
    .fo_rd_en, .fo_rdata, .fo_rempty, .fo_rdusedw,
    .cmd_we, .cmd_addr, .cmd_data, .cmd_busy, .cmd_status,
    .ev_wr_block, .ev_rd_block, .ev_refresh, .ev_fo_hold, .ev_fi_drop
  );

  logic rst33_n;
  rst_sync u_rs33 (.clk(clk33), .rst_n, .rst_n_sync(rst33_n));

  cpld_logic #(.FAW(FAW), .NCONFIG_LOW(NCONFIG_LOW), .ST2CK(ST2CK),
               .INIT_CLKS(INIT_CLKS)) u_cpld (
    .clk(clk33), .rst_n(rst33_n),
    .tgt_we, .tgt_addr, .tgt_wdata, .tgt_rdata,
    .mst_req, .mst_addr, .mst_len, .mst_ack, .mst_valid, .mst_data, .mst_ready, .irq,
    .fo_rd_en, .fo_rdata, .fo_rempty, .fo_rdusedw,
    .cmd_we, .cmd_addr, .cmd_data, .cmd_busy, .cmd_status,
    .spi_cs_n, .spi_sclk, .spi_mosi, .spi_miso,
    .ps_nconfig, .ps_nstatus, .ps_conf_done, .ps_dclk, .ps_data0
  );

endmodule
