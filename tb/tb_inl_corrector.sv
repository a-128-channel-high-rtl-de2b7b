// tb_inl_corrector: loads a random INL table (values -20..+20 bins) into
// inl_corrector and sends random HPTDC words, with measurements, headers and
// trailers mixed. Each output must equal the input word with, for leading
// and trailing measurements only, time - INL(time mod 256) modulo 2^19; the
// latency must be exactly two cycles; with correction disabled words pass
// unchanged. A second instance with 128 tables checks per-channel tables.
module tb_inl_corrector;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  int checks = 0, failures = 0;
  logic corr_en = 0, lut_we = 0, in_valid = 0, out_valid, out_valid2, lut_we2 = 0;
  logic [7:0] lut_addr = 0, lut_wdata = 0;
  logic [14:0] lut_addr2 = 0;
  logic [31:0] in_word = 0, out_word, out_word2;
  logic signed [7:0] ref_lut [256];
  logic signed [7:0] ref_lut2 [32768];
  logic [31:0] exp_q[$], exp2_q[$];
  int cyc = 0, vcyc_q[$];

  inl_corrector dut (.clk, .rst_n, .corr_en, .lut_we, .lut_addr, .lut_wdata,
                     .in_valid, .in_word, .out_valid, .out_word);
  inl_corrector #(.N_TABLES(128)) dut2 (.clk, .rst_n, .corr_en, .lut_we(lut_we2),
    .lut_addr(lut_addr2), .lut_wdata, .in_valid, .in_word, .out_valid(out_valid2),
    .out_word(out_word2));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [31:0] model(logic [31:0] w, logic signed [7:0] inl, bit en);
    if (en && (w[31:28] == 4'h4 || w[31:28] == 4'h5))
      return {w[31:19], 19'(w[18:0] - 19'(inl))};
    return w;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (in_valid) vcyc_q.push_back(cyc);
    if (out_valid) begin
      logic [31:0] e; int vc;
      e = exp_q.pop_front(); vc = vcyc_q.pop_front();
      check(out_word == e, $sformatf("got %h exp %h", out_word, e));
      check(cyc - vc == 2, "two-cycle latency");
    end
    if (out_valid2) begin
      logic [31:0] e;
      e = exp2_q.pop_front();
      check(out_word2 == e, $sformatf("128-table: got %h exp %h", out_word2, e));
    end
  end

  task automatic send(input bit en);
    logic [31:0] w;
    int t;
    t = $urandom_range(7, 0);
    w = {4'(t < 5 ? 4 + (t % 2) : t - 5), 28'($urandom)};
    if ($urandom_range(9, 0) == 0) w[18:0] = 19'($urandom_range(3, 0));   // wrap-around
    @(posedge clk);
    in_valid <= 1; in_word <= w;
    exp_q.push_back(model(w, ref_lut[w[7:0]], en));
    exp2_q.push_back(model(w, ref_lut2[{w[25:19], w[7:0]}], en));
    @(posedge clk);
    in_valid <= 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      ref_lut[i] = 8'($signed($urandom_range(40, 0)) - 20);
      @(posedge clk); lut_we <= 1; lut_addr <= 8'(i); lut_wdata <= ref_lut[i];
    end
    @(posedge clk); lut_we <= 0;
    for (int i = 0; i < 32768; i++) begin
      ref_lut2[i] = 8'($signed($urandom_range(40, 0)) - 20);
      lut_we2 <= 1; lut_addr2 <= 15'(i); lut_wdata <= ref_lut2[i];
      @(posedge clk);
    end
    lut_we2 <= 0;
    corr_en = 0;
    for (int i = 0; i < 100; i++) send(0);
    @(posedge clk); corr_en = 1;
    for (int i = 0; i < 2000; i++) begin
      if ($urandom_range(1, 0)) send(1);
      else begin
        // back-to-back words
        logic [31:0] w;
        w = {4'h4, 28'($urandom)};
        @(posedge clk); in_valid <= 1; in_word <= w;
        exp_q.push_back(model(w, ref_lut[w[7:0]], 1));
        exp2_q.push_back(model(w, ref_lut2[{w[25:19], w[7:0]}], 1));
          end
    end
    @(posedge clk); in_valid <= 0;
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0 && exp2_q.size() == 0, "all words out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
