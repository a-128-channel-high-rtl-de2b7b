// spi_flash_model: behavioural model of a serial configuration flash (SPI
// mode 0), for testbenches only. Supports WRITE ENABLE (06h), READ STATUS
// (05h, bit0 write in progress, bit1 write enable latch), READ (03h, 24-bit
// address, continuous), PAGE PROGRAM (02h, bits can only go from 1 to 0,
// address wraps within the 256-byte page) and BULK ERASE (C7h, all bytes
// FFh). Program and erase need the write enable latch and leave the
// write-in-progress bit set for BUSY_POLLS status reads. Commands executed
// without the latch are counted in err_count. Memory is sparse; the
// testbench can preset bytes through mem. Input bits are taken at the rising
// SCLK edge, output bits change at the falling edge.
module spi_flash_model #(
  parameter int BUSY_POLLS = 3
) (
  input  logic cs_n,
  input  logic sclk,
  input  logic mosi,
  output logic miso
);
  logic [7:0] mem [int];
  logic [7:0] sh = 0, cmd = 0, out_sh = 0;
  int  nbits = 0, nbytes = 0, busy = 0;
  bit  wel = 0;
  logic [23:0] addr = 0;
  int unsigned err_count = 0, n_erase = 0, n_program = 0, n_read_bytes = 0;
  logic [7:0] pp_buf [256];
  int pp_n = 0;

  initial miso = 0;

  function automatic logic [7:0] rd(logic [23:0] a);
    return mem.exists(int'(a)) ? mem[int'(a)] : 8'hFF;
  endfunction

  // end of a command
  always @(posedge cs_n) begin
    if (cmd == 8'h02 && nbytes >= 4) begin
      if (!wel || busy > 0) err_count++;
      else begin
        for (int i = 0; i < pp_n; i++) begin
          logic [23:0] a;
          a = {addr[23:8], 8'(addr[7:0] + i)};
          mem[int'(a)] = rd(a) & pp_buf[i];
        end
        n_program++;
        busy = BUSY_POLLS; wel = 0;
      end
    end else if (cmd == 8'hC7 && nbytes == 1) begin
      if (!wel || busy > 0) err_count++;
      else begin mem.delete(); n_erase++; busy = BUSY_POLLS; wel = 0; end
    end else if (cmd == 8'h06 && nbytes == 1) begin
      wel = 1;
    end else if (cmd == 8'h05 && busy > 0) begin
      busy--;
    end
    nbits = 0; nbytes = 0; cmd = 0; pp_n = 0;
  end

  always @(posedge sclk) if (!cs_n) begin
    sh = {sh[6:0], mosi};
    nbits++;
    if (nbits % 8 == 0) begin
      if (nbytes == 0) cmd = sh;
      else if (nbytes <= 3 && (cmd == 8'h03 || cmd == 8'h02)) addr = {addr[15:0], sh};
      else if (cmd == 8'h02) begin
        pp_buf[pp_n % 256] = sh; if (pp_n < 256) pp_n++;
      end
      nbytes++;
      // prepare the next byte to shift out
      if (cmd == 8'h05) out_sh = {6'd0, wel, busy > 0};
      else if (cmd == 8'h03 && nbytes >= 4) begin
        out_sh = rd(addr); addr = addr + 1; n_read_bytes++;
      end else out_sh = 8'h00;
    end
  end

  always @(negedge sclk) if (!cs_n) begin
    if (nbits % 8 == 0 && nbits > 0) miso <= out_sh[7];
    else miso <= out_sh[7 - (nbits % 8)];
  end
endmodule
