// tb_sdram_ctrl: runs sdram_ctrl against the SDRAM model with a FIFO-like
// source on the FI side and a FIFO-like sink on the FO side.
// Phase 1: words arrive, FO is not read, so FO fills and the controller has
// to hold data in the SDRAM (FO write-used-word >= 3700 blocks transfers out).
// Phase 2: FO is drained. Checks: all words come out in order; the SDRAM
// model sees no timing or protocol violation and regular refreshes; a block
// is only taken from FI when FI holds 256 words; a block is only moved to FO
// when FO holds fewer than 3700 words, so FO never exceeds 3700 + 255; the
// FO hold condition was seen; every block moves 256 words.
module tb_sdram_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
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

  logic [12:0] fi_rdusedw, fo_wrusedw;
  logic fi_rd_en, fo_wr_en;
  logic [31:0] fi_rdata, fo_wdata, sd_dq_out, sd_dq_in;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe, init_done;
  logic [1:0] sd_ba;
  logic [11:0] sd_addr;
  logic [3:0] sd_dqm;
  logic [14:0] stored_pages;
  logic ev_wr_block, ev_rd_block, ev_refresh, ev_fo_hold;

  sdram_ctrl #(.INIT_WAIT(200)) dut (.clk, .rst_n, .fi_rdusedw, .fi_rd_en, .fi_rdata,
    .fo_wrusedw, .fo_wr_en, .fo_wdata, .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n,
    .sd_ba, .sd_addr, .sd_dqm, .sd_dq_out, .sd_dq_oe, .sd_dq_in, .init_done, .stored_pages,
    .ev_wr_block, .ev_rd_block, .ev_refresh, .ev_fo_hold);

  sdram_model u_mem (.clk, .cs_n(sd_cs_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .addr(sd_addr), .dq_in(sd_dq_out), .dq_out(sd_dq_in));

  // FI side: a source of numbered words
  int unsigned next_in = 0, avail = 0, fed = 0, total_in = 0;
  int unsigned next_out = 0, fo_level = 0, max_fo = 0, holds = 0, rd_blocks = 0;
  int unsigned burst_words = 0;
  bit drain = 0;
  assign fi_rdusedw = 13'(avail > 4096 ? 4096 : avail);
  assign fo_wrusedw = 13'(fo_level);

  always @(posedge clk) if (rst_n) begin
    if (fi_rd_en && burst_words == 0) check(avail >= 256, "FI holds 256 words at block start");
    if (fi_rd_en) begin
      check(avail > 0, "read from empty FI");
      avail--;
      fi_rdata <= next_in; next_in++;
      burst_words++;
    end
    if (ev_wr_block) begin
      check(burst_words == 256, $sformatf("block of %0d words", burst_words));
      burst_words = 0;
    end
    if (fed < total_in && $urandom_range(9, 0) < 4) begin avail++; fed++; end
    // FO side
    if (fo_wr_en) begin
      check(fo_wdata == next_out, $sformatf("FO word %0d got %0d", next_out, fo_wdata));
      next_out++;
      fo_level++;
    end
    if (fo_level > max_fo) max_fo = fo_level;
    if (drain && fo_level > 0 && $urandom_range(2, 0) == 0) fo_level--;
    if (ev_fo_hold) holds++;
    if (ev_rd_block) rd_blocks++;
  end

  initial begin
    fi_rdata = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    check(u_mem.mode_set && u_mem.cl == 2, "mode register loaded with CL 2");
    check(u_mem.n_ref >= 2, "two refreshes during initialisation");
    total_in = 40 * 256;
    // phase 1: FO not read
    wait (fed == total_in);
    repeat (3000) @(posedge clk);
    check(holds > 0, "FO hold seen");
    check(stored_pages > 0, "data held in SDRAM while FO is full");
    // phase 2: drain
    drain = 1;
    wait (next_out == total_in);
    repeat (100) @(posedge clk);
    check(stored_pages == 0, "SDRAM empty at the end");
    check(max_fo <= 3700 + 255, $sformatf("FO peak %0d", max_fo));
    check(max_fo >= 3700, "FO reached its limit");
    check(u_mem.err_count == 0, "no SDRAM protocol violation");
    check(u_mem.n_ref > 10, "periodic refresh");
    check(u_mem.cyc / (u_mem.n_ref - 1) <= 1562, "average refresh interval 15.6 us or less");
    check(u_mem.n_wr == total_in && u_mem.n_rd == total_in, "SDRAM word counts");
    check(rd_blocks == 40, "40 blocks moved to FO");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
