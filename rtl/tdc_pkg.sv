// tdc_pkg: types and constants shared by the time measurement module.
//
// The module digitises 128 channels with 4 HPTDC chips of 32 channels each
// (high resolution mode, about 100 ps per bin, 256 bins per 25 ns clock
// period). Every HPTDC readout word is 32 bits; the upper four bits give the
// word type. The word layout below follows the HPTDC data format (type,
// TDC id, channel, 19-bit time); it is not spelled out in the module's own
// description and is the layout this design assumes.
package tdc_pkg;

  localparam int unsigned N_HPTDC    = 4;
  localparam int unsigned CH_PER_TDC = 32;
  localparam int unsigned N_CH       = N_HPTDC * CH_PER_TDC;  // 128
  localparam int unsigned WORD_W     = 32;
  localparam int unsigned TIME_W     = 19;   // high resolution measurement
  localparam int unsigned BIN_W      = 8;    // 256 bins per 40 MHz period

  typedef enum logic [3:0] {
    W_GROUP_HDR = 4'h0,
    W_GROUP_TRL = 4'h1,
    W_TDC_HDR   = 4'h2,
    W_TDC_TRL   = 4'h3,
    W_LEADING   = 4'h4,
    W_TRAILING  = 4'h5,
    W_ERROR     = 4'h6,
    W_DEBUG     = 4'h7
  } word_type_e;

  typedef struct packed {
    logic [3:0]        wtype;
    logic [3:0]        tdc_id;
    logic [4:0]        chan;
    logic [TIME_W-1:0] value;
  } meas_word_t;

  function automatic logic is_measurement(logic [3:0] t);
    return (t == W_LEADING) || (t == W_TRAILING);
  endfunction

endpackage
