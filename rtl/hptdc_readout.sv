// hptdc_readout: trigger distribution and parallel readout of the HPTDCs.
//
// Trigger: a trigger comes from the front panel, from the PXI trigger bus or
// as a software command from the PC. The two external inputs are
// asynchronous; each is synchronised with two flip-flops and its rising edge
// detected. Any of the three sources produces a one-cycle pulse on the common
// trigger line of all HPTDCs (hptdc_trigger, registered).
//
// Readout: the HPTDCs share one 32-bit parallel bus and one DataReady line
// (tri-stated by the chips, pulled low on the board). The chips pass a token
// among themselves: the master chip sends a group header, each chip in turn
// sends its data, and the master closes the event with a group trailer. This
// block only has to answer: as soon as it sees DataReady high it drives
// get_data high in the same cycle (combinationally, while enabled) and
// registers the word on that clock edge. The chips check get_data before
// moving to the next word. Words are passed on with out_valid one cycle
// later. A group header opens an event (in_event), a group trailer closes it
// and bumps event_count; word_count counts all words taken, err_count
// counts HPTDC error words.
module hptdc_readout
  import tdc_pkg::*;
#(
  parameter int unsigned DW = 32
) (
  input  logic          clk,          // 40 MHz, common with the HPTDCs
  input  logic          rst_n,
  input  logic          enable,
  // trigger sources
  input  logic          trig_front,   // asynchronous
  input  logic          trig_pxi,     // asynchronous
  input  logic          trig_sw,      // one-cycle pulse, clk domain
  output logic          hptdc_trigger,
  // HPTDC parallel readout bus
  input  logic          data_ready,
  input  logic [DW-1:0] data,
  output logic          get_data,
  // readout stream
  output logic          out_valid,
  output logic [DW-1:0] out_word,
  // status
  output logic          in_event,
  output logic [15:0]   trig_count,
  output logic [15:0]   event_count,
  output logic [31:0]   word_count,
  output logic [15:0]   err_count
);

  logic [2:0] front_sync, pxi_sync;
  logic       trig_any;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      front_sync <= '0;
      pxi_sync   <= '0;
    end else begin
      front_sync <= {front_sync[1:0], trig_front};
      pxi_sync   <= {pxi_sync[1:0], trig_pxi};
    end
  end

  assign trig_any = enable && ((front_sync[1] && !front_sync[2]) ||
                               (pxi_sync[1]   && !pxi_sync[2])   || trig_sw);

  // answer DataReady in the same cycle
  assign get_data = enable && data_ready;

  logic [3:0] wtype;
  assign wtype = data[DW-1 -: 4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hptdc_trigger <= 1'b0;
      out_valid     <= 1'b0;
      out_word      <= '0;
      in_event      <= 1'b0;
      trig_count    <= '0;
      event_count   <= '0;
      word_count    <= '0;
      err_count     <= '0;
    end else begin
      hptdc_trigger <= trig_any;
      if (trig_any) trig_count <= trig_count + 16'd1;
      out_valid <= get_data;
      if (get_data) begin
        out_word   <= data;
        word_count <= word_count + 32'd1;
        if (wtype == W_GROUP_HDR) in_event <= 1'b1;
        if (wtype == W_GROUP_TRL) begin
          in_event    <= 1'b0;
          event_count <= event_count + 16'd1;
        end
        if (wtype == W_ERROR) err_count <= err_count + 16'd1;
      end
    end
  end

endmodule
