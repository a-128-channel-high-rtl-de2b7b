// tb_host_cmd_if: sends register commands on the 33 MHz side of host_cmd_if
// and checks what appears on the 40 MHz side: control bits, the trigger and
// JTAG start pulses (exactly one cycle each), configuration buffer writes at
// auto-incremented addresses, LUT writes, and the status snapshot returned
// with each command. Also checks that a command completes (busy falls) within
// a bounded number of cycles.
module tb_host_cmd_if;
  logic cmd_clk = 0, clk = 0, rst_n = 0;
  always #15 cmd_clk = ~cmd_clk;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic cmd_we = 0, cmd_busy, ro_enable, corr_en, sw_trig, jtag_start, cfg_we, lut_we;
  logic [3:0] cmd_addr = 0;
  logic [31:0] cmd_data = 0, cmd_status, cfg_wdata, status_in = 0;
  logic [6:0] cfg_addr;
  logic [7:0] lut_addr, lut_wdata;

  host_cmd_if dut (.cmd_clk, .cmd_rst_n(rst_n), .cmd_we, .cmd_addr, .cmd_data, .cmd_busy,
    .cmd_status, .clk, .rst_n, .ro_enable, .corr_en, .sw_trig, .jtag_start, .cfg_we,
    .cfg_addr, .cfg_wdata, .lut_we, .lut_addr, .lut_wdata, .status_in);

  int n_trig = 0, n_jstart = 0, trig_len = 0, max_trig_len = 0;
  logic [31:0] cfg_seen [128];
  int n_cfg = 0;
  logic [7:0] lut_seen [256];
  int n_lut = 0;
  always @(posedge clk) if (rst_n) begin
    if (sw_trig) begin n_trig++; end
    if (jtag_start) n_jstart++;
    trig_len = sw_trig ? trig_len + 1 : 0;
    if (trig_len > max_trig_len) max_trig_len = trig_len;
    if (cfg_we) begin cfg_seen[cfg_addr] = cfg_wdata; n_cfg++; end
    if (lut_we) begin lut_seen[lut_addr] = lut_wdata; n_lut++; end
  end

  task automatic send(input logic [3:0] a, input logic [31:0] d);
    int n;
    @(posedge cmd_clk);
    cmd_we <= 1; cmd_addr <= a; cmd_data <= d;
    @(posedge cmd_clk);
    cmd_we <= 0;
    @(posedge cmd_clk);
    n = 0;
    while (cmd_busy) begin @(posedge cmd_clk); n++; end
    check(n <= 8, $sformatf("command done in %0d cycles", n));
  endtask

  initial begin
    for (int i = 0; i < 128; i++) cfg_seen[i] = 0;
    for (int i = 0; i < 256; i++) lut_seen[i] = 0;
    repeat (3) @(posedge cmd_clk);
    rst_n = 1;
    check(!ro_enable && !corr_en, "disabled after reset");
    send(4'd0, 32'h3);
    check(ro_enable && corr_en, "CTRL bits set");
    send(4'd0, 32'h1);
    check(ro_enable && !corr_en, "CTRL bit 1 cleared");
    send(4'd1, 32'h1);
    send(4'd1, 32'h1);
    send(4'd1, 32'h2);
    repeat (4) @(posedge clk);
    check(n_trig == 2 && max_trig_len == 1, "two one-cycle software triggers");
    check(n_jstart == 1, "one JTAG start");
    send(4'd2, 32'd10);
    for (int i = 0; i < 5; i++) send(4'd3, 32'hA000_0000 + i);
    check(n_cfg == 5, "five buffer writes");
    for (int i = 0; i < 5; i++) check(cfg_seen[10 + i] == 32'hA000_0000 + i, "buffer address increments");
    send(4'd4, {16'd77, 8'd0, 8'hF3});
    send(4'd4, {16'd200, 8'd0, 8'h05});
    check(n_lut == 2 && lut_seen[77] == 8'hF3 && lut_seen[200] == 8'h05, "LUT writes");
    status_in = 32'h1234_5678;
    send(4'd5, 0);
    check(cmd_status == 32'h1234_5678, "status snapshot");
    status_in = 32'hCAFE_0001;
    check(cmd_status == 32'h1234_5678, "snapshot stable between commands");
    send(4'd5, 0);
    check(cmd_status == 32'hCAFE_0001, "new snapshot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
