// spi_byte: one-byte SPI master shifter (mode 0, MSB first), used by the
// serial flash controller and the configuration timing generator.
//
// A start pulse with tx loads the byte; SCLK then runs at clk/2 for eight
// periods. MOSI changes while SCLK is low and MISO is sampled on the rising
// SCLK edge, so the flash sees a plain mode-0 transfer. done pulses for one
// cycle with the received byte in rx, 17 cycles after start. Chip select is
// handled by the caller, which may run several bytes back to back.
module spi_byte (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [7:0] tx,
  output logic [7:0] rx,
  output logic       busy,
  output logic       done,
  output logic       sclk,
  output logic       mosi,
  input  logic       miso
);

  logic [7:0] sh;
  logic [3:0] nbit;
  logic       phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh    <= '0;
      rx    <= '0;
      nbit  <= '0;
      phase <= 1'b0;
      busy  <= 1'b0;
      done  <= 1'b0;
      sclk  <= 1'b0;
      mosi  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        sclk <= 1'b0;
        if (start) begin
          busy  <= 1'b1;
          sh    <= tx;
          nbit  <= 4'd8;
          phase <= 1'b0;
        end
      end else if (!phase) begin
        sclk  <= 1'b0;
        mosi  <= sh[7];
        phase <= 1'b1;
      end else begin
        sclk  <= 1'b1;                 // flash samples MOSI, drives next MISO
        sh    <= {sh[6:0], miso};
        phase <= 1'b0;
        nbit  <= nbit - 4'd1;
        if (nbit == 4'd1) begin
          busy <= 1'b0;
          done <= 1'b1;
          rx   <= {sh[6:0], miso};
        end
      end
    end
  end

endmodule
