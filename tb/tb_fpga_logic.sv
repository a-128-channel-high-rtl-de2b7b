// tb_fpga_logic: the FPGA with four HPTDC JTAG models, the HPTDC readout bus
// model and the SDRAM model. Over the command link it loads a random HPTDC
// configuration and starts the JTAG load, loads a random INL table and
// enables readout with correction, then fires triggers from the front panel,
// the PXI line and software. The FO FIFO is read at 33 MHz. Checks: each
// HPTDC holds its part of the configuration; every complete 256-word block
// of data comes out of FO, in order, equal to the words the HPTDCs sent with
// the INL of each measurement subtracted; the status word reports the event
// count, JTAG done and SDRAM ready; no SDRAM protocol error.
module tb_fpga_logic;
  localparam int SB = 647, NW = (4 * SB + 31) / 32, NEV = 150;
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
    #30000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic trig_front = 0, trig_pxi = 0, tck, tms, tdi, trst_n, trigger, data_ready, get_data;
  logic [31:0] data, sd_dq_out, sd_dq_in, fo_rdata, cmd_status, cmd_data = 0;
  logic sd_cke, sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_dq_oe, fo_rd_en = 0, fo_rempty;
  logic [1:0] sd_ba;
  logic [11:0] sd_addr;
  logic [3:0] sd_dqm, cmd_addr = 0;
  logic [12:0] fo_rdusedw;
  logic cmd_we = 0, cmd_busy, ev_wr_block, ev_rd_block, ev_refresh, ev_fo_hold, ev_fi_drop;
  logic [4:0] chain;

  fpga_logic #(.INIT_WAIT(500)) dut (.clk40, .clk100, .clk33, .rst_n, .trig_front, .trig_pxi,
    .hptdc_tck(tck), .hptdc_tms(tms), .hptdc_tdi(tdi), .hptdc_trst_n(trst_n), .hptdc_tdo(chain[4]),
    .hptdc_trigger(trigger), .hptdc_data_ready(data_ready), .hptdc_data(data),
    .hptdc_get_data(get_data), .sd_cke, .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_ba,
    .sd_addr, .sd_dqm, .sd_dq_out, .sd_dq_oe, .sd_dq_in, .fo_rd_en, .fo_rdata, .fo_rempty,
    .fo_rdusedw, .cmd_we, .cmd_addr, .cmd_data, .cmd_busy, .cmd_status, .ev_wr_block,
    .ev_rd_block, .ev_refresh, .ev_fo_hold, .ev_fi_drop);

  assign chain[0] = tdi;
  for (genvar i = 0; i < 4; i++) begin : g_chip
    hptdc_jtag_model #(.SETUP_BITS(SB)) u_chip (.tck, .tms, .tdi(chain[i]), .trst_n, .tdo(chain[i+1]));
  end
  hptdc_bus_model u_tdc (.clk(clk40), .trigger(trigger && rst_n), .get_data, .data_ready, .data);
  sdram_model u_mem (.clk(clk100), .cs_n(sd_cs_n || !rst_n), .ras_n(sd_ras_n), .cas_n(sd_cas_n),
    .we_n(sd_we_n), .ba(sd_ba), .addr(sd_addr), .dq_in(sd_dq_out), .dq_out(sd_dq_in));

  logic signed [7:0] lut [256];
  function automatic logic [31:0] corrected(logic [31:0] w);
    if (w[31:28] == 4'h4 || w[31:28] == 4'h5) return {w[31:19], 19'(w[18:0] - 19'(lut[w[7:0]]))};
    return w;
  endfunction

  // FO reader
  logic rd_pend = 0;
  int n_out = 0;
  always @(posedge clk33) if (rst_n) begin
    if (rd_pend) begin
      logic [31:0] e;
      e = corrected(u_tdc.exp_q.pop_front());
      check(fo_rdata == e, $sformatf("FO word %0d got %h exp %h", n_out, fo_rdata, e));
      n_out++;
    end
    rd_pend = fo_rd_en && !fo_rempty;
    fo_rd_en <= 1;
  end

  task automatic cmd(input logic [3:0] a, input logic [31:0] d);
    @(posedge clk33); cmd_we <= 1; cmd_addr <= a; cmd_data <= d;
    @(posedge clk33); cmd_we <= 0;
    @(posedge clk33);
    while (cmd_busy) @(posedge clk33);
  endtask

  initial begin
    logic [31:0] words [NW];
    logic [4*SB-1:0] stream;
    int total;
    for (int w = 0; w < NW; w++) words[w] = $urandom;
    for (int b = 0; b < 4 * SB; b++) stream[b] = words[b/32][b%32];
    repeat (4) @(posedge clk33);
    rst_n = 1;
    repeat (4) @(posedge clk33);
    cmd(4'd2, 0);
    for (int w = 0; w < NW; w++) cmd(4'd3, words[w]);
    cmd(4'd1, 32'h2);
    for (int i = 0; i < 256; i++) begin
      lut[i] = 8'($signed($urandom_range(30, 0)) - 15);
      cmd(4'd4, {16'(i), 8'd0, lut[i]});
    end
    repeat (6000) @(posedge clk33);
    cmd(4'd5, 0);
    check(cmd_status[30] && !cmd_status[31], "JTAG configuration done");
    check(cmd_status[27], "SDRAM initialised");
    check(g_chip[3].u_chip.setup_reg == stream[0 +: SB] && g_chip[0].u_chip.setup_reg == stream[3*SB +: SB],
          "HPTDC setup data in the chain");
    cmd(4'd0, 32'h3);
    for (int e = 0; e < NEV; e++) begin
      case (e % 3)
        0: begin trig_front = 1; #60 trig_front = 0; end
        1: begin trig_pxi = 1; #60 trig_pxi = 0; end
        default: cmd(4'd1, 32'h1);
      endcase
      #($urandom_range(3000, 1000));
    end
    #20000;
    cmd(4'd5, 0);
    check(cmd_status[15:0] == 16'(NEV), $sformatf("%0d events", cmd_status[15:0]));
    check(!cmd_status[28], "no data lost");
    total = u_tdc.exp_q.size() + n_out;
    check(n_out == (total / 256) * 256 && n_out > 0, $sformatf("%0d of %0d words out (whole blocks)", n_out, total));
    check(u_mem.err_count == 0, "SDRAM protocol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
