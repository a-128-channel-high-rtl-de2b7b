// inl_corrector: real-time integral non-linearity correction of HPTDC times.
//
// A measurement that falls in TDC bin i is corrected by subtracting the INL of
// that bin: C_ideal = C_tdc - INL(i). In high resolution mode the HPTDC INL
// repeats every 40 MHz clock period, i.e. every 256 bins, so the table is
// indexed by the low 8 bits of the 19-bit time and holds LUT_DEPTH = 256
// entries (both from the module's description). The INL values come from a
// code density test done by the PC and are written in through lut_we.
//
// This design's choices: entries are signed two's complement INL values in
// whole bins (INL_W bits); the 19-bit time wraps modulo 2^19 like the HPTDC
// coarse counter; N_TABLES independent tables may be kept, selected by the
// upper bits of the global channel number {tdc_id, chan} (default: one table
// for all channels). Only leading and trailing measurement words are changed;
// all other words pass untouched. corr_en = 0 passes measurements
// unchanged as well.
//
// Timing: two-stage pipeline, one word per clock, out_valid two cycles after
// in_valid, order preserved. LUT writes take effect from the next cycle.
module inl_corrector
  import tdc_pkg::*;
#(
  parameter int unsigned LUT_DEPTH = 256,
  parameter int unsigned N_TABLES  = 1,
  parameter int unsigned INL_W     = 8,
  localparam int unsigned BW  = $clog2(LUT_DEPTH),
  localparam int unsigned TW  = (N_TABLES > 1) ? $clog2(N_TABLES) : 1,
  localparam int unsigned LAW = $clog2(LUT_DEPTH * N_TABLES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    corr_en,
  // LUT load port
  input  logic                    lut_we,
  input  logic [LAW-1:0]          lut_addr,   // {table, bin}
  input  logic [INL_W-1:0]        lut_wdata,  // two's complement
  // word stream
  input  logic                    in_valid,
  input  logic [31:0]             in_word,
  output logic                    out_valid,
  output logic [31:0]             out_word
);

  logic signed [INL_W-1:0] lut [LUT_DEPTH * N_TABLES];

  meas_word_t in_w, s1_w, res_w;
  logic       s1_valid, s1_meas;
  logic signed [INL_W-1:0] s1_inl;
  logic [LAW-1:0] rd_addr;
  logic [6:0]     gch;
  logic [TW-1:0]  tsel;

  assign in_w = meas_word_t'(in_word);
  assign gch  = {in_w.tdc_id[1:0], in_w.chan};

  always_comb begin
    tsel = '0;
    if (N_TABLES > 1) tsel = TW'(gch >> (7 - TW));
    rd_addr = LAW'(32'(tsel) * LUT_DEPTH + 32'(in_w.value[BW-1:0]));
  end

  always_ff @(posedge clk) begin
    if (lut_we) lut[lut_addr] <= signed'(lut_wdata);
    s1_inl <= lut[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_w      <= '0;
      s1_meas   <= 1'b0;
      out_valid <= 1'b0;
      out_word  <= '0;
    end else begin
      s1_valid  <= in_valid;
      s1_w      <= in_w;
      s1_meas   <= corr_en && is_measurement(in_w.wtype);
      out_valid <= s1_valid;
      out_word  <= res_w;
    end
  end

  always_comb begin
    res_w = s1_w;
    if (s1_meas)
      res_w.value = s1_w.value - TIME_W'(s1_inl);   // sign-extended, mod 2^19
  end

endmodule
