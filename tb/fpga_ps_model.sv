// fpga_ps_model: behavioural model of the passive-serial configuration port
// of the FPGA, for testbenches only. nCONFIG low clears the device and holds
// nSTATUS low; NSTATUS_DELAY ns after nCONFIG rises nSTATUS is released. Each
// rising DCLK edge then takes one DATA0 bit, least significant bit of each
// byte first; after IMAGE_BYTES bytes CONF_DONE goes high and further DCLK
// edges are counted as initialisation clocks. If err_at_byte is set (>= 0)
// the model signals a configuration error by pulling nSTATUS low when that
// byte has arrived.
module fpga_ps_model #(
  parameter int IMAGE_BYTES   = 64,
  parameter int NSTATUS_DELAY = 500
) (
  input  logic nconfig,
  output logic nstatus,
  output logic conf_done,
  input  logic dclk,
  input  logic data0
);
  logic [7:0] rx [$];
  logic [7:0] sh = 0;
  int nbit = 0, init_clks = 0, n_cfg_starts = 0, err_at_byte = -1;

  initial begin nstatus = 0; conf_done = 0; end

  always @(negedge nconfig) begin
    nstatus = 0; conf_done = 0; rx.delete(); nbit = 0; init_clks = 0;
  end
  always @(posedge nconfig) begin
    n_cfg_starts++;
    #(NSTATUS_DELAY) if (nconfig) nstatus = 1;
  end

  always @(posedge dclk) if (nconfig && nstatus) begin
    if (conf_done) init_clks++;
    else begin
      sh = {data0, sh[7:1]};
      nbit++;
      if (nbit == 8) begin
        rx.push_back(sh);
        nbit = 0;
        if (err_at_byte >= 0 && rx.size() == err_at_byte) nstatus = 0;
        else if (rx.size() == IMAGE_BYTES) conf_done = 1;
      end
    end
  end
endmodule
