// hptdc_jtag_model: behavioural model of the JTAG port of one HPTDC, for
// testbenches only. A standard 16-state TAP controller with a 5-bit
// instruction register; instruction SETUP (18h) selects the setup scan
// register of SETUP_BITS bits, every other instruction the 1-bit bypass
// register. Shift registers take TDI at the rising TCK edge, LSB leaves on
// TDO at the falling edge. setup_reg and ir hold the updated values.
module hptdc_jtag_model #(
  parameter int unsigned SETUP_BITS = 647
) (
  input  logic tck,
  input  logic tms,
  input  logic tdi,
  input  logic trst_n,
  output logic tdo
);
  typedef enum logic [3:0] {
    TLR, RTI, SEL_DR, CAP_DR, SH_DR, EX1_DR, PA_DR, EX2_DR, UPD_DR,
    SEL_IR, CAP_IR, SH_IR, EX1_IR, PA_IR, EX2_IR, UPD_IR
  } tap_e;

  tap_e st = TLR;
  logic [4:0] ir = 5'h11, ir_sh = '0;
  logic [SETUP_BITS-1:0] setup_reg = '0, dr_sh = '0;
  logic byp = 1'b0;
  int   n_update_dr = 0;

  always @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      st <= TLR;
      ir <= 5'h11;
    end else begin
      unique case (st)
        CAP_IR: ir_sh <= 5'b00001;
        SH_IR:  ir_sh <= {tdi, ir_sh[4:1]};
        CAP_DR: if (ir == 5'h18) dr_sh <= setup_reg; else byp <= 1'b0;
        SH_DR:  if (ir == 5'h18) dr_sh <= {tdi, dr_sh[SETUP_BITS-1:1]}; else byp <= tdi;
        UPD_IR: ;
        default: ;
      endcase
      if (st == UPD_IR) ir <= ir_sh;
      if (st == UPD_DR && ir == 5'h18) begin
        setup_reg   <= dr_sh;
        n_update_dr <= n_update_dr + 1;
      end
      unique case (st)
        TLR:    st <= tms ? TLR : RTI;
        RTI:    st <= tms ? SEL_DR : RTI;
        SEL_DR: st <= tms ? SEL_IR : CAP_DR;
        CAP_DR: st <= tms ? EX1_DR : SH_DR;
        SH_DR:  st <= tms ? EX1_DR : SH_DR;
        EX1_DR: st <= tms ? UPD_DR : PA_DR;
        PA_DR:  st <= tms ? EX2_DR : PA_DR;
        EX2_DR: st <= tms ? UPD_DR : SH_DR;
        UPD_DR: st <= tms ? SEL_DR : RTI;
        SEL_IR: st <= tms ? TLR : CAP_IR;
        CAP_IR: st <= tms ? EX1_IR : SH_IR;
        SH_IR:  st <= tms ? EX1_IR : SH_IR;
        EX1_IR: st <= tms ? UPD_IR : PA_IR;
        PA_IR:  st <= tms ? EX2_IR : PA_IR;
        EX2_IR: st <= tms ? UPD_IR : SH_IR;
        default: st <= tms ? SEL_DR : RTI;   // UPD_IR
      endcase
    end
  end

  always @(negedge tck) begin
    if (st == SH_IR)      tdo <= ir_sh[0];
    else if (st == SH_DR) tdo <= (ir == 5'h18) ? dr_sh[0] : byp;
  end
endmodule
