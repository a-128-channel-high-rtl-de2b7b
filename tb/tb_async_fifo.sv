// tb_async_fifo: runs the 4096 x 32 dual-clock FIFO as FI (40 MHz write,
// 100 MHz read) and as FO (100 MHz write, 33 MHz read) with random write and
// read enables, in phases that fill it to full and drain it to empty. Checks:
// data comes out complete and in order; a write is refused only when 4096
// words are held; wrusedw never under- and rdusedw never over-states the
// real fill level, and both reach 4096 when full; rempty and wfull are seen.
module tb_async_fifo;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two instances: 0 = FI clocks, 1 = FO clocks
  logic wclk [2], rclk [2];
  logic rst_n = 0;
  logic wr_en [2], rd_en [2], wfull [2], rempty [2];
  logic [31:0] wdata [2], rdata [2];
  logic [12:0] wrusedw [2], rdusedw [2];
  int   wr_prob [2], rd_prob [2];
  logic [31:0] q0[$], q1[$];
  int   level [2], seen_full [2], seen_empty [2], n_rd [2];

  initial begin wclk[0] = 0; forever #12.5 wclk[0] = ~wclk[0]; end
  initial begin rclk[0] = 0; forever #5   rclk[0] = ~rclk[0]; end
  initial begin wclk[1] = 0; forever #5   wclk[1] = ~wclk[1]; end
  initial begin rclk[1] = 0; forever #15  rclk[1] = ~rclk[1]; end

  for (genvar k = 0; k < 2; k++) begin : g
    logic rd_pend = 0;
    async_fifo u (.wclk(wclk[k]), .wrst_n(rst_n), .wr_en(wr_en[k]), .wdata(wdata[k]),
      .wfull(wfull[k]), .wrusedw(wrusedw[k]), .rclk(rclk[k]), .rrst_n(rst_n),
      .rd_en(rd_en[k]), .rdata(rdata[k]), .rempty(rempty[k]), .rdusedw(rdusedw[k]));

    always @(posedge wclk[k]) if (rst_n) begin
      check(32'(wrusedw[k]) >= level[k], "wrusedw not below fill level");
      check(wfull[k] == (wrusedw[k] == 13'd4096), "wfull when 4096 words");
      if (wfull[k]) seen_full[k]++;
      if (wr_en[k] && !wfull[k]) begin
        if (k == 0) q0.push_back(wdata[k]); else q1.push_back(wdata[k]);
        level[k]++;
      end
      wr_en[k] <= ($urandom_range(99, 0) < wr_prob[k]);
      wdata[k] <= $urandom;
    end

    always @(posedge rclk[k]) if (rst_n) begin
      check(32'(rdusedw[k]) <= level[k], "rdusedw not above fill level");
      if (rempty[k]) seen_empty[k]++;
      if (rd_pend) begin
        logic [31:0] e;
        e = (k == 0) ? q0.pop_front() : q1.pop_front();
        check(rdata[k] == e, $sformatf("fifo %0d data %h exp %h", k, rdata[k], e));
        n_rd[k]++;
      end
      rd_pend = rd_en[k] && !rempty[k];
      if (rd_pend) level[k]--;
      rd_en[k] <= ($urandom_range(99, 0) < rd_prob[k]);
    end
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      wr_en[k] = 0; rd_en[k] = 0; level[k] = 0; wr_prob[k] = 0; rd_prob[k] = 0;
      seen_full[k] = 0; seen_empty[k] = 0; n_rd[k] = 0; wdata[k] = 0;
    end
    #100 rst_n = 1;
    // fill: writes only
    wr_prob = '{90, 90}; rd_prob = '{0, 0};
    #400000;
    check(wfull[0] && wfull[1], "both full after filling");
    check(rdusedw[0] == 13'd4096 && rdusedw[1] == 13'd4096, "rdusedw 4096 when full");
    // mixed traffic
    wr_prob = '{50, 30}; rd_prob = '{30, 70};
    #600000;
    // drain
    wr_prob = '{0, 0}; rd_prob = '{100, 100};
    #500000;
    check(rempty[0] && rempty[1], "both empty after draining");
    check(q0.size() == 0 && q1.size() == 0, "every word read");
    check(seen_full[0] > 0 && seen_full[1] > 0 && seen_empty[0] > 0 && seen_empty[1] > 0,
          "full and empty seen");
    check(n_rd[0] > 8000 && n_rd[1] > 8000, $sformatf("traffic %0d %0d", n_rd[0], n_rd[1]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
