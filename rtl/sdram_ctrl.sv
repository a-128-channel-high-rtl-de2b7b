// sdram_ctrl: SDRAM buffer between the FI and FO FIFOs, at 100 MHz.
//
// The external SDRAM (MT48LC4M32B2: 4 banks x 4096 rows x 256 columns x 32
// bits) is used as one large ring buffer so that no TDC data is lost while the
// PCI side is slow. The rules come from the module's description:
//  * when FI holds FI_THRESH (256) words, a block is read from FI and
//    written to the SDRAM;
//  * when the SDRAM holds a block and the write-used-word of FO is below
//    FO_LIMIT (3700), a block is read from the SDRAM and written to FO.
// This design's choices: a block is BURST = 256 words, exactly one SDRAM row,
// so each transfer is ACTIVATE, 256 single-word WRITE or READ commands on
// consecutive cycles (burst length 1, CAS latency CL), PRECHARGE. Blocks are
// placed at consecutive pages (page = {row, bank}); wr_page and rd_page
// count pages and the difference is the fill level. Moving FI data into the
// SDRAM has priority over moving data out, so FI cannot overflow while the
// SDRAM has room. "Holds 256 words" is taken as "at least one complete
// block", because only whole blocks are ever stored.
// After reset the controller waits INIT_WAIT cycles (200 us), precharges all
// banks, issues two auto refreshes and loads the mode register. Auto refresh
// is issued between blocks every REF_INTERVAL cycles (4096 rows per 64 ms).
//
// Interface: fi_rd_en/fi_rdata follow async_fifo's normal-mode read (data one
// cycle after the request); fo_wr_en/fo_wdata write FO. The SDRAM DQ bus is
// split into sd_dq_out, sd_dq_oe and sd_dq_in; all SDRAM outputs are
// registered. Read data is sampled CL+1 edges after the edge that registers
// the READ command. ev_* are one-cycle event pulses for monitoring.
// pg_bank and pg_row each take their own bits of a page counter, whose top
// bit only tells a full ring from an empty one; lint reports the bits that
// each function leaves unused.
module sdram_ctrl #(
  parameter int unsigned FI_THRESH    = 256,
  parameter int unsigned FO_LIMIT     = 3700,
  parameter int unsigned BURST        = 256,
  parameter int unsigned FAW          = 12,     // FIFO address width
  parameter int unsigned ROW_W        = 12,
  parameter int unsigned COL_W        = 8,
  parameter int unsigned BANK_W       = 2,
  parameter int unsigned CL           = 2,
  parameter int unsigned T_RCD        = 2,
  parameter int unsigned T_RP         = 2,
  parameter int unsigned T_RFC        = 7,
  parameter int unsigned T_WR         = 2,
  parameter int unsigned T_MRD        = 2,
  parameter int unsigned REF_INTERVAL = 1560,
  parameter int unsigned INIT_WAIT    = 20000,
  localparam int unsigned PW          = ROW_W + BANK_W   // page address bits
) (
  input  logic             clk,
  input  logic             rst_n,
  // FI read side
  input  logic [FAW:0]     fi_rdusedw,
  output logic             fi_rd_en,
  input  logic [31:0]      fi_rdata,
  // FO write side
  input  logic [FAW:0]     fo_wrusedw,
  output logic             fo_wr_en,
  output logic [31:0]      fo_wdata,
  // SDRAM
  output logic             sd_cke,
  output logic             sd_cs_n,
  output logic             sd_ras_n,
  output logic             sd_cas_n,
  output logic             sd_we_n,
  output logic [BANK_W-1:0] sd_ba,
  output logic [ROW_W-1:0] sd_addr,
  output logic [3:0]       sd_dqm,
  output logic [31:0]      sd_dq_out,
  output logic             sd_dq_oe,
  input  logic [31:0]      sd_dq_in,
  // status
  output logic             init_done,
  output logic [PW:0]      stored_pages,
  output logic             ev_wr_block,
  output logic             ev_rd_block,
  output logic             ev_refresh,
  output logic             ev_fo_hold
);

  typedef enum logic [3:0] {
    S_INIT, S_INIT_PRE, S_INIT_REF1, S_INIT_REF2, S_INIT_MRS,
    S_IDLE, S_REF, S_W_ACT, S_W_DATA, S_W_REC, S_R_ACT, S_R_DATA, S_R_REC, S_PRE
  } state_e;

  typedef enum logic [3:0] {
    C_MRS = 4'b0000, C_REF = 4'b0001, C_PRE = 4'b0010, C_ACT = 4'b0011,
    C_WR  = 4'b0100, C_RD  = 4'b0101, C_NOP = 4'b0111
  } cmd_e;

  state_e      state;
  logic [15:0] wcnt;                 // wait counter
  logic [COL_W:0] rd_cnt, cmd_cnt;   // words requested / commands issued
  logic        fi_vld;               // fi_rdata holds a requested word
  logic [PW:0] wr_page, rd_page;
  logic [15:0] ref_cnt;
  logic        ref_due;
  logic [CL:0] rd_pipe;
  cmd_e        cmd;

  assign stored_pages = wr_page - rd_page;

  logic sd_full, can_write, can_read;
  assign sd_full   = stored_pages[PW];
  assign can_write = (32'(fi_rdusedw) >= FI_THRESH) && !sd_full;
  assign can_read  = (stored_pages != '0) && (32'(fo_wrusedw) < FO_LIMIT);

  assign fi_rd_en = (state == S_W_DATA) && (32'(rd_cnt) < BURST);
  assign {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} = cmd;
  assign sd_cke = 1'b1;
  assign sd_dqm = 4'b0000;

  // bank in the low page bits, row above
  function automatic logic [BANK_W-1:0] pg_bank(logic [PW:0] p);
    return p[BANK_W-1:0];
  endfunction
  function automatic logic [ROW_W-1:0] pg_row(logic [PW:0] p);
    return p[PW-1:BANK_W];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_INIT;
      wcnt        <= 16'(INIT_WAIT);
      cmd         <= C_NOP;
      sd_ba       <= '0;
      sd_addr     <= '0;
      sd_dq_out   <= '0;
      sd_dq_oe    <= 1'b0;
      rd_cnt      <= '0;
      cmd_cnt     <= '0;
      fi_vld      <= 1'b0;
      wr_page     <= '0;
      rd_page     <= '0;
      ref_cnt     <= '0;
      ref_due     <= 1'b0;
      rd_pipe     <= '0;
      fo_wr_en    <= 1'b0;
      fo_wdata    <= '0;
      init_done   <= 1'b0;
      ev_wr_block <= 1'b0;
      ev_rd_block <= 1'b0;
      ev_refresh  <= 1'b0;
      ev_fo_hold  <= 1'b0;
    end else begin
      cmd         <= C_NOP;
      sd_dq_oe    <= 1'b0;
      ev_wr_block <= 1'b0;
      ev_rd_block <= 1'b0;
      ev_refresh  <= 1'b0;
      ev_fo_hold  <= 1'b0;
      fi_vld      <= fi_rd_en;

      // read data return path
      rd_pipe  <= {rd_pipe[CL-1:0], 1'b0};
      fo_wr_en <= rd_pipe[CL];
      if (rd_pipe[CL]) fo_wdata <= sd_dq_in;

      // refresh timer
      if (init_done) begin
        if (32'(ref_cnt) >= REF_INTERVAL - 1) begin
          ref_cnt <= '0;
          ref_due <= 1'b1;
        end else begin
          ref_cnt <= ref_cnt + 16'd1;
        end
      end

      if (wcnt != '0) wcnt <= wcnt - 16'd1;

      unique case (state)
        S_INIT: if (wcnt == '0) begin
          cmd         <= C_PRE;
          sd_addr     <= '0;
          sd_addr[10] <= 1'b1;                 // all banks
          wcnt        <= 16'(T_RP);
          state       <= S_INIT_PRE;
        end
        S_INIT_PRE: if (wcnt == '0) begin
          cmd   <= C_REF;
          wcnt  <= 16'(T_RFC);
          state <= S_INIT_REF1;
        end
        S_INIT_REF1: if (wcnt == '0) begin
          cmd   <= C_REF;
          wcnt  <= 16'(T_RFC);
          state <= S_INIT_REF2;
        end
        S_INIT_REF2: if (wcnt == '0) begin
          cmd     <= C_MRS;
          sd_ba   <= '0;
          // burst length 1, sequential, CAS latency CL, programmed burst writes
          sd_addr <= ROW_W'({3'(CL), 4'b0000});
          wcnt    <= 16'(T_MRD);
          state   <= S_INIT_MRS;
        end
        S_INIT_MRS: if (wcnt == '0) begin
          init_done <= 1'b1;
          state     <= S_IDLE;
        end
        S_IDLE: begin
          if (ref_due) begin
            cmd        <= C_REF;
            ref_due    <= 1'b0;
            ev_refresh <= 1'b1;
            wcnt       <= 16'(T_RFC);
            state      <= S_REF;
          end else if (can_write) begin
            cmd     <= C_ACT;
            sd_ba   <= pg_bank(wr_page);
            sd_addr <= pg_row(wr_page);
            wcnt    <= 16'(T_RCD - 1);
            state   <= S_W_ACT;
          end else if (can_read) begin
            cmd     <= C_ACT;
            sd_ba   <= pg_bank(rd_page);
            sd_addr <= pg_row(rd_page);
            wcnt    <= 16'(T_RCD - 1);
            state   <= S_R_ACT;
          end else if (stored_pages != '0) begin
            ev_fo_hold <= 1'b1;                // data waiting, FO too full
          end
        end
        S_REF: if (wcnt == '0) state <= S_IDLE;
        S_W_ACT: if (wcnt == '0) begin
          rd_cnt  <= '0;
          cmd_cnt <= '0;
          state   <= S_W_DATA;
        end
        S_W_DATA: begin
          if (fi_rd_en) rd_cnt <= rd_cnt + 1'b1;
          if (fi_vld) begin
            cmd       <= C_WR;
            sd_addr   <= ROW_W'(cmd_cnt[COL_W-1:0]);
            sd_dq_out <= fi_rdata;
            sd_dq_oe  <= 1'b1;
            cmd_cnt   <= cmd_cnt + 1'b1;
            if (32'(cmd_cnt) == BURST - 1) begin
              wcnt  <= 16'(T_WR);
              state <= S_W_REC;
            end
          end
        end
        S_W_REC: if (wcnt == '0) begin
          cmd         <= C_PRE;
          sd_addr[10] <= 1'b0;
          wr_page     <= wr_page + 1'b1;
          ev_wr_block <= 1'b1;
          wcnt        <= 16'(T_RP);
          state       <= S_PRE;
        end
        S_R_ACT: if (wcnt == '0) begin
          cmd_cnt <= '0;
          state   <= S_R_DATA;
        end
        S_R_DATA: begin
          cmd        <= C_RD;
          sd_addr    <= ROW_W'(cmd_cnt[COL_W-1:0]);
          rd_pipe[0] <= 1'b1;
          cmd_cnt    <= cmd_cnt + 1'b1;
          if (32'(cmd_cnt) == BURST - 1) begin
            rd_page     <= rd_page + 1'b1;
            ev_rd_block <= 1'b1;
            state       <= S_R_REC;
          end
        end
        S_R_REC: begin
          cmd         <= C_PRE;
          sd_addr[10] <= 1'b0;
          wcnt        <= 16'(T_RP);
          state       <= S_PRE;
        end
        S_PRE: if (wcnt == '0 && rd_pipe == '0) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
