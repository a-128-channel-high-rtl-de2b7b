// fpga_logic: the FPGA of the time measurement module.
//
// Data path (all from the module's description): the readout controller
// collects the words of the 4 HPTDCs after each trigger, the INL corrector
// subtracts the look-up-table INL from each time, the FI FIFO (4096 x 32)
// carries the words from the 40 MHz domain to the 100 MHz SDRAM controller,
// which buffers them in the external SDRAM, and the FO FIFO (4096 x 32)
// hands them to the CPLD, which reads FO with its 33 MHz clock. The
// configuration path: commands from the PC arrive from the CPLD (host_cmd_if)
// and load the JTAG configuration buffer, which hptdc_jtag_cfg shifts into
// the HPTDC chain, and the INL table.
//
// Clocks: clk40 (HPTDCs, readout, INL correction, FI write), clk100 (SDRAM
// controller, FI read, FO write), clk33 (CPLD side: FO read and commands).
// rst_n is asynchronous and is released per domain by a synchroniser.
//
// Status word returned with every command (this design's layout):
//   [31] JTAG configuration running   [30] JTAG configuration done
//   [29] inside an event              [28] data lost (FI full)
//   [27] SDRAM initialised            [23:16] HPTDC error words (low 8 bits)
//   [15:0] events read out
//
// Lint reports some unused outputs of the sub-blocks: the trigger and word
// counters and tdo_last of the readout and JTAG blocks, the upper bits of
// the error counter, and FIFO flags and counts that the moving rules do not
// need. They are left in the sub-blocks for monitoring and are not part of
// the status word.
module fpga_logic
  import tdc_pkg::*;
#(
  parameter int unsigned N_CHIPS      = N_HPTDC,
  parameter int unsigned SETUP_BITS   = 647,
  parameter int unsigned N_TABLES     = 1,
  parameter int unsigned FAW          = 12,
  parameter int unsigned FI_THRESH    = 256,
  parameter int unsigned FO_LIMIT     = 3700,
  parameter int unsigned INIT_WAIT    = 20000,
  parameter int unsigned REF_INTERVAL = 1560,
  localparam int unsigned CAW = $clog2((N_CHIPS * SETUP_BITS + 31) / 32),
  localparam int unsigned LAW = $clog2(256 * N_TABLES)
) (
  input  logic         clk40,
  input  logic         clk100,
  input  logic         clk33,
  input  logic         rst_n,
  // triggers
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
  // CPLD side
  input  logic         fo_rd_en,
  output logic [31:0]  fo_rdata,
  output logic         fo_rempty,
  output logic [FAW:0] fo_rdusedw,
  input  logic         cmd_we,
  input  logic [3:0]   cmd_addr,
  input  logic [31:0]  cmd_data,
  output logic         cmd_busy,
  output logic [31:0]  cmd_status,
  // monitoring
  output logic         ev_wr_block,
  output logic         ev_rd_block,
  output logic         ev_refresh,
  output logic         ev_fo_hold,
  output logic         ev_fi_drop
);

  logic rst40_n, rst100_n, rst33_n;
  rst_sync u_rs40  (.clk(clk40),  .rst_n, .rst_n_sync(rst40_n));
  rst_sync u_rs100 (.clk(clk100), .rst_n, .rst_n_sync(rst100_n));
  rst_sync u_rs33  (.clk(clk33),  .rst_n, .rst_n_sync(rst33_n));

  // ---------------- commands ----------------
  logic ro_enable, corr_en, sw_trig, jtag_start;
  logic cfg_we, lut_we;
  logic [CAW-1:0] cfg_addr;
  logic [31:0] cfg_wdata, status;
  logic [LAW-1:0] lut_addr;
  logic [7:0] lut_wdata;

  host_cmd_if #(.CAW(CAW), .LAW(LAW), .INL_W(8)) u_cmd (
    .cmd_clk(clk33), .cmd_rst_n(rst33_n), .cmd_we, .cmd_addr, .cmd_data,
    .cmd_busy, .cmd_status,
    .clk(clk40), .rst_n(rst40_n), .ro_enable, .corr_en, .sw_trig, .jtag_start,
    .cfg_we, .cfg_addr, .cfg_wdata, .lut_we, .lut_addr, .lut_wdata,
    .status_in(status)
  );

  // ---------------- HPTDC configuration ----------------
  logic jtag_busy, jtag_done, jtag_ok;
  logic [31:0] tdo_last;

  hptdc_jtag_cfg #(.N_CHIPS(N_CHIPS), .SETUP_BITS(SETUP_BITS)) u_jtag (
    .clk(clk40), .rst_n(rst40_n), .cfg_we, .cfg_addr, .cfg_wdata,
    .start(jtag_start), .busy(jtag_busy), .done(jtag_done), .tdo_last,
    .tck(hptdc_tck), .tms(hptdc_tms), .tdi(hptdc_tdi), .trst_n(hptdc_trst_n),
    .tdo(hptdc_tdo)
  );

  // ---------------- readout and correction ----------------
  logic        ro_valid, in_event;
  logic [31:0] ro_word;
  logic [15:0] trig_count, event_count, err_count;
  logic [31:0] word_count;
  logic        cor_valid;
  logic [31:0] cor_word;

  hptdc_readout u_ro (
    .clk(clk40), .rst_n(rst40_n), .enable(ro_enable),
    .trig_front, .trig_pxi, .trig_sw(sw_trig), .hptdc_trigger,
    .data_ready(hptdc_data_ready), .data(hptdc_data), .get_data(hptdc_get_data),
    .out_valid(ro_valid), .out_word(ro_word),
    .in_event, .trig_count, .event_count, .word_count, .err_count
  );

  inl_corrector #(.N_TABLES(N_TABLES)) u_inl (
    .clk(clk40), .rst_n(rst40_n), .corr_en,
    .lut_we, .lut_addr, .lut_wdata,
    .in_valid(ro_valid), .in_word(ro_word),
    .out_valid(cor_valid), .out_word(cor_word)
  );

  // ---------------- FI -> SDRAM -> FO ----------------
  logic         fi_full, fi_rd_en, fi_rempty, fo_wfull, fo_wr_en;
  logic [FAW:0] fi_wrusedw, fi_rdusedw, fo_wrusedw;
  logic [31:0]  fi_rdata, fo_wdata;
  logic         sd_init_done, sd_init_s1, sd_init_s2, lost;
  logic [FAW+2:0] stored_pages;

  async_fifo #(.DW(32), .AW(FAW)) u_fi (
    .wclk(clk40), .wrst_n(rst40_n), .wr_en(cor_valid), .wdata(cor_word),
    .wfull(fi_full), .wrusedw(fi_wrusedw),
    .rclk(clk100), .rrst_n(rst100_n), .rd_en(fi_rd_en), .rdata(fi_rdata),
    .rempty(fi_rempty), .rdusedw(fi_rdusedw)
  );

  sdram_ctrl #(.FI_THRESH(FI_THRESH), .FO_LIMIT(FO_LIMIT), .FAW(FAW),
               .INIT_WAIT(INIT_WAIT), .REF_INTERVAL(REF_INTERVAL)) u_sdc (
    .clk(clk100), .rst_n(rst100_n),
    .fi_rdusedw, .fi_rd_en, .fi_rdata,
    .fo_wrusedw, .fo_wr_en, .fo_wdata,
    .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba, .sd_addr, .sd_dqm,
    .sd_dq_out, .sd_dq_oe, .sd_dq_in,
    .init_done(sd_init_done), .stored_pages,
    .ev_wr_block, .ev_rd_block, .ev_refresh, .ev_fo_hold
  );

  async_fifo #(.DW(32), .AW(FAW)) u_fo (
    .wclk(clk100), .wrst_n(rst100_n), .wr_en(fo_wr_en), .wdata(fo_wdata),
    .wfull(fo_wfull), .wrusedw(fo_wrusedw),
    .rclk(clk33), .rrst_n(rst33_n), .rd_en(fo_rd_en), .rdata(fo_rdata),
    .rempty(fo_rempty), .rdusedw(fo_rdusedw)
  );

  // ---------------- status ----------------
  assign ev_fi_drop = cor_valid && fi_full;

  always_ff @(posedge clk40 or negedge rst40_n) begin
    if (!rst40_n) begin
      jtag_ok    <= 1'b0;
      lost       <= 1'b0;
      sd_init_s1 <= 1'b0;
      sd_init_s2 <= 1'b0;
    end else begin
      sd_init_s1 <= sd_init_done;
      sd_init_s2 <= sd_init_s1;
      if (jtag_start)     jtag_ok <= 1'b0;
      else if (jtag_done) jtag_ok <= 1'b1;
      if (ev_fi_drop) lost <= 1'b1;
    end
  end

  assign status = {jtag_busy, jtag_ok, in_event, lost, sd_init_s2, 3'd0,
                   err_count[7:0], event_count};

endmodule
