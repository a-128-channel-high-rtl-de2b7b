// tb_ps_timing_gen: loads a configuration image (byte i = i*37+5 mod 256)
// into the flash model and lets ps_timing_gen configure the FPGA PS model.
// Checks: nCONFIG pulse length, the bytes the FPGA received equal the image
// and were read from flash address 0 with one READ command, CONF_DONE ends
// the loading, the initialisation clocks are given and done pulses. A second
// run with the FPGA reporting an error (nSTATUS low during loading) must end
// with error set and no done.
module tb_ps_timing_gen;
  localparam int IMG = 300;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic start = 0, busy, done, error, nconfig, nstatus, conf_done, dclk, data0;
  logic cs_n, sclk, mosi, miso;

  ps_timing_gen #(.INIT_CLKS(20)) dut (.clk, .rst_n, .start, .busy, .done, .error,
    .ps_nconfig(nconfig), .ps_nstatus(nstatus), .ps_conf_done(conf_done), .ps_dclk(dclk),
    .ps_data0(data0), .spi_cs_n(cs_n), .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso));
  spi_flash_model u_fl (.cs_n, .sclk, .mosi, .miso);
  fpga_ps_model #(.IMAGE_BYTES(IMG)) u_fpga (.nconfig, .nstatus, .conf_done, .dclk, .data0);

  int low_len = 0, n_done = 0;
  always @(posedge clk) if (rst_n) begin
    if (!nconfig) low_len++;
    if (done) n_done++;
  end

  initial begin
    for (int i = 0; i < IMG + 50; i++) u_fl.mem[i] = 8'(i * 37 + 5);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    wait (done || error);
    repeat (2) @(posedge clk);
    check(!error && n_done == 1, "configuration done");
    check(low_len == 80, $sformatf("nCONFIG low for %0d cycles", low_len));
    check(u_fpga.rx.size() == IMG, $sformatf("%0d bytes received", u_fpga.rx.size()));
    for (int i = 0; i < IMG; i++)
      check(u_fpga.rx[i] == 8'(i * 37 + 5), $sformatf("byte %0d", i));
    check(u_fpga.init_clks >= 20, $sformatf("%0d initialisation clocks", u_fpga.init_clks));
    check(cs_n, "flash deselected");
    check(!busy, "idle");
    // second attempt: configuration error reported by the FPGA
    u_fpga.err_at_byte = 100;
    n_done = 0;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    wait (!nconfig);
    wait (nconfig);
    wait (!busy);
    @(posedge clk);
    check(error && n_done == 0, $sformatf("configuration error reported (%0d %0d)", error, n_done));
    check(u_fpga.rx.size() == 100, $sformatf("second attempt stopped at byte %0d", u_fpga.rx.size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
