// tb_sflash_ctrl: presets the flash model with old contents, erases it
// through sflash_ctrl, programs three pages of random bytes and checks the
// flash model: erased bytes read FFh, programmed pages hold the new data,
// every program/erase was preceded by WRITE ENABLE, the controller waited for
// the write-in-progress bit before reporting done, and the SPI time of one
// page program (260 bytes at 17 cycles each) is respected.
module tb_sflash_ctrl;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic op_erase = 0, op_program = 0, pb_we = 0, busy, done, cs_n, sclk, mosi, miso;
  logic [23:0] prog_addr = 0;
  logic [7:0] pb_addr = 0, pb_wdata = 0;

  sflash_ctrl dut (.clk, .rst_n, .op_erase, .op_program, .prog_addr, .pb_we, .pb_addr,
    .pb_wdata, .busy, .done, .spi_cs_n(cs_n), .spi_sclk(sclk), .spi_mosi(mosi), .spi_miso(miso));
  spi_flash_model #(.BUSY_POLLS(4)) u_fl (.cs_n, .sclk, .mosi, .miso);

  logic [7:0] img [3][256];
  int cyc;

  task automatic wait_done(output int n);
    n = 0;
    @(posedge clk);
    while (!done) begin @(posedge clk); n++; end
  endtask

  initial begin
    u_fl.mem[100] = 8'h12; u_fl.mem[70000] = 8'h34;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); op_erase <= 1; @(posedge clk); op_erase <= 0;
    wait_done(cyc);
    check(u_fl.n_erase == 1 && u_fl.busy == 0, "erase done after write-in-progress cleared");
    check(u_fl.rd(100) == 8'hFF && u_fl.rd(70000) == 8'hFF, "erased");
    for (int p = 0; p < 3; p++) begin
      for (int i = 0; i < 256; i++) begin
        img[p][i] = 8'($urandom);
        @(posedge clk); pb_we <= 1; pb_addr <= 8'(i); pb_wdata <= img[p][i];
      end
      @(posedge clk); pb_we <= 0;
      @(posedge clk); op_program <= 1; prog_addr <= 24'(p * 256 + 4096); @(posedge clk); op_program <= 0;
      #1 check(busy, "busy during program");
      wait_done(cyc);
      check(cyc >= 260 * 17, $sformatf("program took %0d cycles", cyc));
      check(u_fl.busy == 0, "program finished in the flash");
    end
    check(u_fl.n_program == 3, "three page programs");
    for (int p = 0; p < 3; p++)
      for (int i = 0; i < 256; i++)
        check(u_fl.rd(24'(p * 256 + 4096 + i)) == img[p][i], $sformatf("page %0d byte %0d", p, i));
    check(u_fl.rd(4095) == 8'hFF && u_fl.rd(4096 + 768) == 8'hFF, "nothing outside the pages");
    check(u_fl.err_count == 0, "write enable before each program/erase");
    check(!busy, "idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
