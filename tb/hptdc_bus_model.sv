// hptdc_bus_model: behavioural model of N_CHIPS HPTDCs sharing one parallel
// readout bus with token passing, for testbenches only.
//
// On each trigger (sampled on the rising clk edge) an event is built: the
// master chip sends a group header, then each chip in turn its hits (0 to
// MAX_HITS leading or trailing measurement words, random channel and time;
// chip 1 may also send an error word), then the master sends the group
// trailer with the word count. A word is presented with data_ready high and
// is taken at a clock edge where get_data is high; between chips the token
// takes TOKEN_GAP cycles with data_ready low (the bus is released and the
// board pull-down holds it low). Every offered word is also pushed into
// exp_q so a testbench can compare. get_data without data_ready counts as a
// protocol error (proto_err).
module hptdc_bus_model #(
  parameter int N_CHIPS   = 4,
  parameter int MAX_HITS  = 4,
  parameter int TOKEN_GAP = 2
) (
  input  logic        clk,
  input  logic        trigger,
  input  logic        get_data,
  output logic        data_ready,
  output logic [31:0] data
);
  logic [31:0] exp_q[$];     // every word offered, in order
  logic [31:0] out_q[$];     // words still to send (0 = token gap marker below)
  bit          gap_q[$];
  int unsigned event_id = 0, n_events = 0, proto_err = 0, n_errwords = 0;
  int unsigned gap = 0;

  task automatic build_event();
    int unsigned nwords = 0;
    logic [31:0] w;
    w = {4'h0, 4'd0, 12'(event_id), 12'(event_id * 7)};
    out_q.push_back(w); gap_q.push_back(0); nwords++;
    for (int c = 0; c < N_CHIPS; c++) begin
      int nh = $urandom_range(MAX_HITS, 0);
      for (int h = 0; h < nh; h++) begin
        w = {(($urandom_range(1, 0) != 0) ? 4'h4 : 4'h5), 4'(c), 5'($urandom), 19'($urandom)};
        out_q.push_back(w); gap_q.push_back(h == 0 && c != 0); nwords++;
      end
      if (c == 1 && $urandom_range(3, 0) == 0) begin
        w = {4'h6, 4'(c), 9'd0, 15'h1};
        out_q.push_back(w); gap_q.push_back(0); nwords++;
        n_errwords++;
      end
    end
    nwords++;
    w = {4'h1, 4'd0, 12'(event_id), 12'(nwords)};
    out_q.push_back(w); gap_q.push_back(1);
    event_id++;
  endtask

  initial begin
    data_ready = 0;
    data = '0;
  end

  always @(posedge clk) begin
    bit taken;
    taken = data_ready && get_data;
    if (get_data && !data_ready) proto_err++;
    if (taken) begin
      void'(out_q.pop_front());
      void'(gap_q.pop_front());
      if (data[31:28] == 4'h1) n_events++;
    end
    if (trigger) build_event();
    if (data_ready && !taken) begin
      // keep presenting the same word until it is taken
    end else if (gap > 0) begin
      gap--;
      data_ready <= 1'b0;
    end else if (out_q.size() > 0 && gap_q[0]) begin
      gap_q[0] = 0;                  // token passes to the next chip
      gap = TOKEN_GAP - 1;
      data_ready <= 1'b0;
    end else if (out_q.size() > 0) begin
      data_ready <= 1'b1;
      data       <= out_q[0];
      exp_q.push_back(out_q[0]);
    end else begin
      data_ready <= 1'b0;
    end
  end
endmodule
