// tb_inl_code_density: the calibration and resolution tests of the INL
// correction, run against inl_corrector the way they are run on the board.
//
// A model TDC with a known non-linearity stands in for the HPTDC: a true
// time t, counted in 1/16 of a bin, gives the code floor((t + f(t)) / 16),
// where f is a triangle that repeats every 256 bins (one 25 ns clock period)
// with +-1.5 bins amplitude. (The shape and size of f are this testbench's
// choice; what matters is that the error repeats every 256 bins.)
//
//  1. Code density test: 1048576 hits at random times are histogrammed by
//     bin within the period. The width of each bin is its share of the
//     hits, the running sum of the widths gives each bin's true position,
//     and its distance from the nominal position is the INL, rounded to
//     whole bins. This is the PC's part; the result is loaded into the LUT
//     of inl_corrector, and must match f within one bin.
//  2. Residual non-linearity: 4000 further random hits pass through
//     inl_corrector. The RMS of (measured - true) time, after removing the
//     mean, must fall below 0.6 of its uncorrected value and to about half a
//     bin or a little more (whole-bin table entries and the
//     statistics of the histogram leave about 0.4-0.5 bin).
//  3. Cable delay test: pairs of hits on two channels a fixed 8 ns apart,
//     at random phases. The RMS spread of the measured difference, divided
//     by sqrt(2), is the single-channel resolution; it must improve by at
//     least a factor 1.5 with the correction. The mean difference must stay
//     within one bin of 8 ns. With the default model this gives about
//     100 ps uncorrected and about 40 ps corrected.
module tb_inl_code_density;
  import tdc_pkg::*;

  localparam int FINE   = 16;            // fine steps per bin
  localparam int PERIOD = 256 * FINE;    // one clock period in fine steps
  localparam int AMP    = 3 * FINE / 2;  // INL amplitude, 1.5 bins
  localparam int NCD    = 1048576;       // code density hits
  localparam int NRES   = 4000;          // residual test hits
  localparam int NPAIR  = 2000;          // cable delay pairs
  localparam real BIN_PS = 25000.0 / 256.0;
  localparam int DELAY  = 1311;          // 8 ns = 81.9 bins, in fine steps

  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        corr_en = 0, lut_we = 0, in_valid = 0, out_valid;
  logic [7:0]  lut_addr = 0, lut_wdata = 0;
  logic [31:0] in_word = 0, out_word;

  inl_corrector dut (.clk, .rst_n, .corr_en, .lut_we, .lut_addr, .lut_wdata,
                     .in_valid, .in_word, .out_valid, .out_word);

  logic [18:0] out_q[$];
  always @(posedge clk) if (out_valid) out_q.push_back(out_word[18:0]);

  // the model TDC's error at a true time, in fine steps
  function automatic int f_fine(int t);
    int p, tri_v;
    p = t % PERIOD;
    tri_v = (p < PERIOD / 2) ? p : PERIOD - p;
    return tri_v * 4 * AMP / PERIOD - AMP;
  endfunction

  function automatic int tdc_code(int t);
    return (t + f_fine(t)) / FINE;
  endfunction

  // true times stay well inside the 19-bit range, away from wrap-around
  function automatic int rand_time();
    return PERIOD + int'($urandom_range(400 * PERIOD, 0));
  endfunction

  // push a list of codes through the corrector, return the corrected times
  task automatic run_codes(input int codes[$], input bit en, output int res[$]);
    corr_en <= en;
    out_q.delete();
    @(posedge clk);
    foreach (codes[i]) begin
      in_valid <= 1;
      in_word  <= {W_LEADING, 4'd0, 5'(i % 2), 19'(codes[i])};
      @(posedge clk);
    end
    in_valid <= 0;
    repeat (4) @(posedge clk);
    check(out_q.size() == codes.size(), "every word came out");
    res.delete();
    foreach (out_q[i]) res.push_back(int'(out_q[i]));
  endtask

  function automatic real rms(real v[$]);
    real m, s;
    m = 0; s = 0;
    foreach (v[i]) m += v[i];
    m /= v.size();
    foreach (v[i]) s += (v[i] - m) * (v[i] - m);
    return $sqrt(s / v.size());
  endfunction

  function automatic real mean(real v[$]);
    real m;
    m = 0;
    foreach (v[i]) m += v[i];
    return m / v.size();
  endfunction

  initial begin
    int hist[256];
    real width, edge_pos, inl_r[256], inl_mean;
    int lut[256];
    int t_q[$], c_q[$], r_unc[$], r_cor[$];
    real e_unc[$], e_cor[$], d_unc[$], d_cor[$];
    real rms_unc, rms_cor, res_unc, res_cor;

    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // 1. code density test
    foreach (hist[k]) hist[k] = 0;
    for (int n = 0; n < NCD; n++) begin
      int b;
      b = tdc_code(rand_time()) % 256;
      hist[b]++;
    end
    edge_pos = 0;
    inl_mean = 0;
    for (int k = 0; k < 256; k++) begin
      width = real'(hist[k]) * 256.0 / NCD;
      // the code's value minus the true centre of its bin
      inl_r[k] = (k + 0.5) - (edge_pos + width / 2.0);
      edge_pos += width;
      inl_mean += inl_r[k] / 256.0;
    end
    for (int k = 0; k < 256; k++) begin
      int expect_inl;
      lut[k] = int'($floor(inl_r[k] - inl_mean + 0.5));
      expect_inl = int'($floor(real'(f_fine(k * FINE)) / FINE + 0.5));
      check(lut[k] - expect_inl <= 1 && expect_inl - lut[k] <= 1,
            $sformatf("bin %0d: measured INL %0d, model %0d", k, lut[k], expect_inl));
    end
    for (int k = 0; k < 256; k++) begin
      @(posedge clk);
      lut_we <= 1; lut_addr <= 8'(k); lut_wdata <= 8'(lut[k]);
    end
    @(posedge clk);
    lut_we <= 0;

    // 2. residual non-linearity
    t_q.delete(); c_q.delete();
    for (int n = 0; n < NRES; n++) begin
      t_q.push_back(rand_time());
      c_q.push_back(tdc_code(t_q[n]));
    end
    run_codes(c_q, 1'b0, r_unc);
    run_codes(c_q, 1'b1, r_cor);
    foreach (t_q[n]) begin
      check(r_unc[n] == c_q[n], "uncorrected word passes unchanged");
      e_unc.push_back(real'(r_unc[n] * FINE + FINE / 2 - t_q[n]) / FINE);
      e_cor.push_back(real'(r_cor[n] * FINE + FINE / 2 - t_q[n]) / FINE);
    end
    rms_unc = rms(e_unc);
    rms_cor = rms(e_cor);
    $display("time error RMS: %0.2f bins uncorrected, %0.2f bins corrected", rms_unc, rms_cor);
    check(rms_cor < 0.6 * rms_unc, "INL correction reduces the time error");
    check(rms_cor < 0.55, "corrected error about half a bin or less");

    // 3. cable delay test on two channels
    c_q.delete();
    for (int n = 0; n < NPAIR; n++) begin
      int t;
      t = rand_time();
      c_q.push_back(tdc_code(t));
      c_q.push_back(tdc_code(t + DELAY));
    end
    run_codes(c_q, 1'b0, r_unc);
    run_codes(c_q, 1'b1, r_cor);
    for (int n = 0; n < NPAIR; n++) begin
      d_unc.push_back(real'(r_unc[2 * n + 1] - r_unc[2 * n]));
      d_cor.push_back(real'(r_cor[2 * n + 1] - r_cor[2 * n]));
    end
    res_unc = rms(d_unc) * BIN_PS / $sqrt(2.0);
    res_cor = rms(d_cor) * BIN_PS / $sqrt(2.0);
    $display("8 ns cable delay: resolution %0.1f ps uncorrected, %0.1f ps corrected; mean %0.2f bins (expected %0.2f)",
             res_unc, res_cor, mean(d_cor), real'(DELAY) / FINE);
    check(res_cor * 1.5 < res_unc, "INL correction improves the resolution");
    check(mean(d_cor) - real'(DELAY) / FINE < 1.0 && real'(DELAY) / FINE - mean(d_cor) < 1.0, "mean delay within one bin");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
