// hptdc_jtag_cfg: loads the setup register of a chain of HPTDC chips over
// one JTAG port.
//
// The HPTDCs sit in a single JTAG chain: TDI of the first chip comes from
// this block, TDO of each chip feeds TDI of the next, and the TMS, TCK and
// nTRST lines are common to all chips (this much follows the module's
// description). The PC first writes the whole configuration bit stream into
// a buffer (cfg_we/cfg_addr/cfg_wdata, 32 bits per word, bit 0 of word 0 is
// shifted first). A start pulse then runs the TAP sequence:
//   Test-Logic-Reset (5 x TMS=1) -> Run-Test/Idle -> Shift-IR, where the
//   SETUP instruction is shifted once per chip -> Update-IR -> Shift-DR,
//   where N_CHIPS*SETUP_BITS buffer bits are shifted -> Update-DR -> idle.
// The instruction code, instruction length and setup register length are
// this design's assumptions taken from the HPTDC data sheet values; they are
// parameters. Because the first bits shifted travel furthest, the buffer must
// hold the setup data of the last chip in the chain first.
//
// Timing: TCK runs at clk/2. Each TCK period starts with TCK low while
// TMS/TDI change, then TCK high (the chips sample on the rising edge). TDO is
// sampled on the rising edge and the last 32 TDO bits are kept in tdo_last
// for readback. busy is high from start until done pulses for one cycle.
module hptdc_jtag_cfg #(
  parameter int unsigned N_CHIPS     = 4,
  parameter int unsigned IR_BITS     = 5,
  parameter int unsigned SETUP_BITS  = 647,
  parameter logic [IR_BITS-1:0] SETUP_INSTR = 5'h18,
  localparam int unsigned DR_BITS    = N_CHIPS * SETUP_BITS,
  localparam int unsigned IRT_BITS   = N_CHIPS * IR_BITS,
  localparam int unsigned NWORDS     = (DR_BITS + 31) / 32,
  localparam int unsigned CAW        = $clog2(NWORDS)
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration buffer write port
  input  logic            cfg_we,
  input  logic [CAW-1:0]  cfg_addr,
  input  logic [31:0]     cfg_wdata,
  // control
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic [31:0]     tdo_last,
  // JTAG chain
  output logic            tck,
  output logic            tms,
  output logic            tdi,
  output logic            trst_n,
  input  logic            tdo
);

  typedef enum logic [3:0] {
    S_IDLE, S_RESET, S_RTI, S_SEL_DR, S_SEL_IR, S_CAP_IR, S_TO_SHIFT_IR,
    S_SHIFT_IR, S_UPD_IR, S_SEL_DR2, S_CAP_DR, S_TO_SHIFT_DR, S_SHIFT_DR, S_UPD_DR, S_END
  } state_e;

  logic [31:0] cfg_mem [NWORDS];
  always_ff @(posedge clk) if (cfg_we) cfg_mem[cfg_addr] <= cfg_wdata;

  state_e      state;
  logic        phase;          // 0: TCK low, 1: TCK high
  logic [15:0] cnt;            // bits remaining in the current state
  logic [31:0] cur_word;
  logic [4:0]  bit_idx;
  logic [CAW-1:0] word_idx;
  logic        tms_n, tdi_n;

  // TMS/TDI for the TCK period of the current state
  always_comb begin
    tms_n = 1'b0;
    tdi_n = 1'b0;
    unique case (state)
      S_RESET, S_SEL_DR, S_SEL_IR, S_UPD_IR, S_SEL_DR2, S_UPD_DR: tms_n = 1'b1;
      S_SHIFT_IR: begin
        tms_n = (cnt == 16'd1);
        tdi_n = SETUP_INSTR[(IRT_BITS - 32'(cnt)) % IR_BITS];
      end
      S_SHIFT_DR: begin
        tms_n = (cnt == 16'd1);
        tdi_n = cur_word[bit_idx];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      phase    <= 1'b0;
      cnt      <= '0;
      tck      <= 1'b0;
      tms      <= 1'b1;
      tdi      <= 1'b0;
      trst_n   <= 1'b0;
      done     <= 1'b0;
      bit_idx  <= '0;
      word_idx <= '0;
      cur_word <= '0;
      tdo_last <= '0;
    end else begin
      done <= 1'b0;
      if (state == S_IDLE) begin
        tck <= 1'b0;
        if (start) begin
          state  <= S_RESET;
          cnt    <= 16'd5;
          phase  <= 1'b0;
          trst_n <= 1'b1;
        end
      end else if (!phase) begin
        // TCK low half: present TMS/TDI
        tck   <= 1'b0;
        tms   <= tms_n;
        tdi   <= tdi_n;
        phase <= 1'b1;
      end else begin
        // TCK high half: the chain samples; advance the sequence
        tck   <= 1'b1;
        phase <= 1'b0;
        if (state == S_SHIFT_DR || state == S_SHIFT_IR) tdo_last <= {tdo, tdo_last[31:1]};
        if (state == S_SHIFT_DR) begin
          bit_idx <= bit_idx + 5'd1;
          if (bit_idx == 5'd31 && 32'(word_idx) < NWORDS - 1) begin
            word_idx <= word_idx + 1'b1;
            cur_word <= cfg_mem[word_idx + 1'b1];
          end
        end
        cnt <= cnt - 16'd1;
        if (cnt == 16'd1) begin
          cnt <= 16'd1;
          unique case (state)
            S_RESET:       state <= S_RTI;
            S_RTI:         state <= S_SEL_DR;
            S_SEL_DR:      state <= S_SEL_IR;
            S_SEL_IR:      state <= S_CAP_IR;
            S_CAP_IR:      state <= S_TO_SHIFT_IR;
            S_TO_SHIFT_IR: begin state <= S_SHIFT_IR; cnt <= 16'(IRT_BITS); end
            S_SHIFT_IR:    state <= S_UPD_IR;
            S_UPD_IR:      state <= S_SEL_DR2;
            S_SEL_DR2:     state <= S_CAP_DR;
            S_CAP_DR:      state <= S_TO_SHIFT_DR;
            S_TO_SHIFT_DR: begin
              state    <= S_SHIFT_DR;
              cnt      <= 16'(DR_BITS);
              bit_idx  <= '0;
              word_idx <= '0;
              cur_word <= cfg_mem[0];
            end
            S_SHIFT_DR:    state <= S_UPD_DR;
            S_UPD_DR:      state <= S_END;      // Update-DR -> Run-Test/Idle
            default: begin                       // S_END
              state <= S_IDLE;
              done  <= 1'b1;
            end
          endcase
        end
      end
    end
  end

  assign busy = (state != S_IDLE);

endmodule
