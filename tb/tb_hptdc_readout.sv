// tb_hptdc_readout: drives hptdc_readout with the HPTDC bus model. Triggers
// come from the front panel, the PXI line and the software pulse; each must
// produce exactly one trigger pulse. Every word the chips offer must come out
// once, in order, one cycle after it was taken; get_data must answer
// DataReady in the same cycle; event, word and error counters must match the
// model; with enable low no trigger is forwarded and nothing is read.
module tb_hptdc_readout;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic enable = 0, trig_front = 0, trig_pxi = 0, trig_sw = 0;
  logic hptdc_trigger, data_ready, get_data, out_valid, in_event;
  logic [31:0] data, out_word, word_count;
  logic [15:0] trig_count, event_count, err_count;
  int checks = 0, failures = 0, n_out = 0, n_trig = 0, n_same_cycle = 0;

  hptdc_readout dut (.clk, .rst_n, .enable, .trig_front, .trig_pxi, .trig_sw, .hptdc_trigger,
    .data_ready, .data, .get_data, .out_valid, .out_word, .in_event, .trig_count,
    .event_count, .word_count, .err_count);
  hptdc_bus_model #(.N_CHIPS(4)) u_tdc (.clk, .trigger(hptdc_trigger), .get_data,
    .data_ready, .data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output stream check
  always @(posedge clk) if (rst_n) begin
    if (hptdc_trigger) n_trig++;
    if (data_ready && enable) begin
      check(get_data, "get_data in the cycle DataReady is seen");
      n_same_cycle++;
    end
    if (out_valid) begin
      logic [31:0] e;
      e = u_tdc.exp_q.pop_front();
      check(out_word == e, $sformatf("word %0d got %h exp %h", n_out, out_word, e));
      n_out++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // disabled: triggers are ignored
    #3 trig_front = 1; #100 trig_front = 0;
    repeat (10) @(posedge clk);
    check(n_trig == 0 && trig_count == 0, "no trigger while disabled");
    enable = 1;
    for (int e = 0; e < 60; e++) begin
      int src = e % 3;
      #($urandom_range(40, 3));
      if (src == 0) begin trig_front = 1; #60 trig_front = 0; end
      else if (src == 1) begin trig_pxi = 1; #60 trig_pxi = 0; end
      else begin @(posedge clk); trig_sw <= 1; @(posedge clk); trig_sw <= 0; end
      repeat ($urandom_range(60, 20)) @(posedge clk);
    end
    repeat (200) @(posedge clk);
    check(n_trig == 60 && trig_count == 60, $sformatf("60 triggers, got %0d", n_trig));
    check(u_tdc.n_events == 60 && event_count == 60, "60 events read out");
    check(u_tdc.exp_q.size() == 0, "all offered words delivered");
    check(word_count == 32'(n_out), "word count");
    check(err_count == 16'(u_tdc.n_errwords), "error word count");
    check(u_tdc.proto_err == 0, "no get_data without DataReady");
    check(!in_event, "event closed by group trailer");
    check(n_same_cycle > 100, "readout happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
