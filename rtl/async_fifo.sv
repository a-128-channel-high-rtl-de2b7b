// async_fifo: dual-clock FIFO with used-word counts on both sides.
//
// Used twice in the module: 'FI' carries corrected TDC words from the 40 MHz
// readout domain to the 100 MHz SDRAM controller, and 'FO' carries words
// from the SDRAM controller to the 33 MHz CPLD/PCI side. Both are 4096 words
// of 32 bits (AW = 12, DW = 32), as in the module's description; the SDRAM
// controller decides on the read-used-word of FI and the write-used-word of
// FO.
//
// How it works (this design's choice, the usual one): binary read and write
// pointers of AW+1 bits, converted to Gray code and passed through two
// flip-flops into the other clock domain. Full and empty compare a local
// pointer with the synchronised remote one, so both flags are conservative:
// full may stay set, and empty may stay set, for two or three cycles after
// the other side has moved. wrusedw and rdusedw count words 0..2^AW with the
// same delay.
//
// Timing: a write with wr_en && !wfull stores wdata at that wclk edge. A read
// with rd_en && !rempty returns the word in rdata after the next rclk edge
// (normal, not show-ahead, mode; the memory read is registered).
module async_fifo #(
  parameter int unsigned DW = 32,
  parameter int unsigned AW = 12
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          wr_en,
  input  logic [DW-1:0] wdata,
  output logic          wfull,
  output logic [AW:0]   wrusedw,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          rd_en,
  output logic [DW-1:0] rdata,
  output logic          rempty,
  output logic [AW:0]   rdusedw
);

  logic [DW-1:0] mem [2**AW];

  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;
  logic [AW:0] rbin_w, wbin_r;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  logic do_wr;
  assign do_wr = wr_en && !wfull;

  always_ff @(posedge wclk) if (do_wr) mem[wbin[AW-1:0]] <= wdata;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (do_wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  assign rbin_w  = gray2bin(rgray_w2);
  assign wrusedw = wbin - rbin_w;
  assign wfull   = (wrusedw[AW] == 1'b1);

  // read side
  logic do_rd;
  assign do_rd = rd_en && !rempty;

  always_ff @(posedge rclk) if (do_rd) rdata <= mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (do_rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  assign wbin_r  = gray2bin(wgray_r2);
  assign rdusedw = wbin_r - rbin;
  assign rempty  = (rdusedw == '0);

endmodule
