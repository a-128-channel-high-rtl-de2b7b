// host_cmd_if: FPGA end of the command link from the PC (via the CPLD).
//
// The PC configures the FPGA through the CPLD: it loads the HPTDC JTAG
// configuration buffer and the INL look-up table, sets the run controls and
// can issue a trigger over the PXI bus. How these commands are encoded is not
// given in the module's description; this block is this design's own simple
// register interface.
//
// Clock crossing: the CPLD side (cmd_clk, 33 MHz) latches one command
// (cmd_addr, cmd_data) into holding registers and flips a request toggle;
// cmd_busy is high until the FPGA side (clk, 40 MHz) has seen the toggle
// through two flip-flops, executed the command and returned an acknowledge
// toggle, again through two flip-flops. The holding registers are stable while
// busy, so no multi-bit value crosses unsynchronised. With every command the
// FPGA also takes a snapshot of status_in into cmd_status, readable by the
// CPLD once cmd_busy is low. A command takes about 3 clk plus 3 cmd_clk cycles.
//
// Register map (cmd_addr):
//   0 CTRL      bit0 readout enable, bit1 INL correction enable
//   1 ACTION    bit0 software trigger, bit1 start JTAG configuration (pulses)
//   2 CFG_ADDR  word address in the JTAG configuration buffer
//   3 CFG_DATA  write data at CFG_ADDR, then CFG_ADDR increments
//   4 LUT       bits [31:16] LUT address {table, bin}, bits [7:0] INL value
//   5 NOP       status snapshot only
module host_cmd_if #(
  parameter int unsigned CAW   = 7,    // JTAG buffer address bits
  parameter int unsigned LAW   = 8,    // LUT address bits
  parameter int unsigned INL_W = 8
) (
  // CPLD side
  input  logic              cmd_clk,
  input  logic              cmd_rst_n,
  input  logic              cmd_we,
  input  logic [3:0]        cmd_addr,
  input  logic [31:0]       cmd_data,
  output logic              cmd_busy,
  output logic [31:0]       cmd_status,
  // FPGA side
  input  logic              clk,
  input  logic              rst_n,
  output logic              ro_enable,
  output logic              corr_en,
  output logic              sw_trig,
  output logic              jtag_start,
  output logic              cfg_we,
  output logic [CAW-1:0]    cfg_addr,
  output logic [31:0]       cfg_wdata,
  output logic              lut_we,
  output logic [LAW-1:0]    lut_addr,
  output logic [INL_W-1:0]  lut_wdata,
  input  logic [31:0]       status_in
);

  // ---------------- CPLD side ----------------
  logic        req_tgl, ack_s1, ack_s2;
  logic [3:0]  hold_addr;
  logic [31:0] hold_data;
  logic        ack_tgl;

  always_ff @(posedge cmd_clk or negedge cmd_rst_n) begin
    if (!cmd_rst_n) begin
      req_tgl   <= 1'b0;
      ack_s1    <= 1'b0;
      ack_s2    <= 1'b0;
      hold_addr <= '0;
      hold_data <= '0;
    end else begin
      ack_s1 <= ack_tgl;
      ack_s2 <= ack_s1;
      if (cmd_we && !cmd_busy) begin
        hold_addr <= cmd_addr;
        hold_data <= cmd_data;
        req_tgl   <= ~req_tgl;
      end
    end
  end
  assign cmd_busy = (req_tgl != ack_s2);

  // ---------------- FPGA side ----------------
  logic req_s1, req_s2, req_s3;
  logic [CAW-1:0] cfg_ptr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_s1     <= 1'b0;
      req_s2     <= 1'b0;
      req_s3     <= 1'b0;
      ack_tgl    <= 1'b0;
      ro_enable  <= 1'b0;
      corr_en    <= 1'b0;
      sw_trig    <= 1'b0;
      jtag_start <= 1'b0;
      cfg_we     <= 1'b0;
      cfg_addr   <= '0;
      cfg_wdata  <= '0;
      cfg_ptr    <= '0;
      lut_we     <= 1'b0;
      lut_addr   <= '0;
      lut_wdata  <= '0;
      cmd_status <= '0;
    end else begin
      req_s1     <= req_tgl;
      req_s2     <= req_s1;
      req_s3     <= req_s2;
      sw_trig    <= 1'b0;
      jtag_start <= 1'b0;
      cfg_we     <= 1'b0;
      lut_we     <= 1'b0;
      if (req_s2 != req_s3) begin
        cmd_status <= status_in;
        unique case (hold_addr)
          4'd0: begin
            ro_enable <= hold_data[0];
            corr_en   <= hold_data[1];
          end
          4'd1: begin
            sw_trig    <= hold_data[0];
            jtag_start <= hold_data[1];
          end
          4'd2: cfg_ptr <= hold_data[CAW-1:0];
          4'd3: begin
            cfg_we    <= 1'b1;
            cfg_addr  <= cfg_ptr;
            cfg_wdata <= hold_data;
            cfg_ptr   <= cfg_ptr + 1'b1;
          end
          4'd4: begin
            lut_we    <= 1'b1;
            lut_addr  <= hold_data[16 +: LAW];
            lut_wdata <= hold_data[INL_W-1:0];
          end
          default: ;
        endcase
        ack_tgl <= req_s2;
      end
    end
  end

endmodule
