// tb_hptdc_jtag_cfg: loads a random configuration into a chain of four HPTDC
// JTAG models through hptdc_jtag_cfg and checks that every chip ends with the
// SETUP instruction and its own part of the bit stream (the last chip in the
// chain gets the first bits shifted), that exactly one Update-DR happened
// and that the whole sequence takes the expected number of clock cycles.
module tb_hptdc_jtag_cfg;
  localparam int N = 4, SB = 647, DR = N * SB, NW = (DR + 31) / 32;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic cfg_we = 0, start = 0, busy, done, tck, tms, tdi, trst_n;
  logic [6:0] cfg_addr = 0;
  logic [31:0] cfg_wdata = 0, tdo_last;
  logic [N:0] chain;
  int checks = 0, failures = 0;

  hptdc_jtag_cfg dut (.clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .start, .busy, .done,
                      .tdo_last, .tck, .tms, .tdi, .trst_n, .tdo(chain[N]));
  assign chain[0] = tdi;
  for (genvar i = 0; i < N; i++) begin : g_chip
    hptdc_jtag_model #(.SETUP_BITS(SB)) u_chip (.tck, .tms, .tdi(chain[i]), .trst_n, .tdo(chain[i+1]));
  end

  logic [31:0] words [NW];
  logic [DR-1:0] stream;
  logic [SB-1:0] exp_chip [N];
  logic [SB-1:0] got [N];
  int cycles;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int w = 0; w < NW; w++) words[w] = $urandom;
    for (int b = 0; b < DR; b++) stream[b] = words[b/32][b%32];
    // first bits shifted end in the last chip of the chain
    for (int c = 0; c < N; c++) exp_chip[N-1-c] = stream[c*SB +: SB];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < NW; w++) begin
      @(posedge clk); cfg_we <= 1; cfg_addr <= 7'(w); cfg_wdata <= words[w];
    end
    @(posedge clk); cfg_we <= 0; start <= 1;
    @(posedge clk); start <= 0;
    cycles = 1;
    while (!done) begin @(posedge clk); cycles++; end
    // TCK periods: 5 reset, 1 to idle, 2 select, 2 to Shift-IR, IR bits,
    // 2 to Select-DR, 2 to Shift-DR, DR bits, 2 to idle; 2 clk per period,
    // plus the start cycle and the done cycle
    check(cycles == 2 * (5 + 1 + 2 + 2 + N*5 + 2 + 2 + DR + 2) + 2,
          $sformatf("sequence length %0d cycles", cycles));
    got[0] = g_chip[0].u_chip.setup_reg; got[1] = g_chip[1].u_chip.setup_reg;
    got[2] = g_chip[2].u_chip.setup_reg; got[3] = g_chip[3].u_chip.setup_reg;
    for (int c = 0; c < N; c++) check(got[c] == exp_chip[c], $sformatf("chip %0d setup data", c));
    check(g_chip[0].u_chip.ir == 5'h18 && g_chip[3].u_chip.ir == 5'h18, "SETUP instruction");
    check(g_chip[0].u_chip.n_update_dr == 1 && g_chip[3].u_chip.n_update_dr == 1, "one update");
    check(g_chip[0].u_chip.st == g_chip[0].u_chip.RTI, "TAP back in Run-Test/Idle");
    check(!busy, "idle after done");
    // second load: the old contents come back out of the chain on TDO
    @(posedge clk); start <= 1;
    @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    check(tdo_last == exp_chip[0][SB-1 -: 32], "TDO readback of previous setup");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
