// sflash_ctrl: serial flash controller of the CPLD (erase and program).
//
// For an on-line update of the FPGA logic the PC sends a new configuration
// image over the PXI bus; this block erases the serial flash and writes the
// image into it, page by page. The flash is then read by ps_timing_gen to
// configure the FPGA. The commands used are the common SPI flash set
// (this design's choice, as the flash type is not named): WRITE ENABLE 06h,
// BULK ERASE C7h, PAGE PROGRAM 02h + 24-bit address + 256 data bytes, READ
// STATUS 05h, polled until the write-in-progress bit (bit 0) clears.
//
// Use: write the 256 bytes of a page into the page buffer (pb_we, pb_addr,
// pb_wdata), then pulse op_program with prog_addr (page aligned); or pulse
// op_erase to erase the whole flash. busy is high until done pulses, after
// the flash reports it has finished. Each SPI byte takes 17 clk cycles and chip
// select is held high for at least GAP cycles between commands.
// Only bit 0 of the status byte is examined, so the other received bits are
// unused.
module sflash_ctrl #(
  parameter int unsigned GAP = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        op_erase,
  input  logic        op_program,
  input  logic [23:0] prog_addr,
  input  logic        pb_we,
  input  logic [7:0]  pb_addr,
  input  logic [7:0]  pb_wdata,
  output logic        busy,
  output logic        done,
  // SPI flash
  output logic        spi_cs_n,
  output logic        spi_sclk,
  output logic        spi_mosi,
  input  logic        spi_miso
);

  typedef enum logic [2:0] {S_IDLE, S_WREN, S_MAIN, S_POLL, S_GAP} state_e;

  logic [7:0] page_buf [256];
  always_ff @(posedge clk) if (pb_we) page_buf[pb_addr] <= pb_wdata;

  state_e      state, after_gap;
  logic        is_prog;
  logic [23:0] addr;
  logic [8:0]  idx;           // byte index within the command
  logic [8:0]  nbytes;
  logic [3:0]  gap_cnt;
  logic        b_start, b_busy, b_done;
  logic [7:0]  b_tx, b_rx;
  logic        in_byte;       // a byte has been started and not finished

  spi_byte u_spi (
    .clk(clk), .rst_n(rst_n), .start(b_start), .tx(b_tx), .rx(b_rx),
    .busy(b_busy), .done(b_done), .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso)
  );

  // byte to send for the current command and index
  always_comb begin
    b_tx = 8'h00;
    unique case (state)
      S_WREN: b_tx = 8'h06;
      S_POLL: b_tx = (idx == 9'd0) ? 8'h05 : 8'h00;
      S_MAIN:
        if (!is_prog)           b_tx = 8'hC7;
        else if (idx == 9'd0)   b_tx = 8'h02;
        else if (idx == 9'd1)   b_tx = addr[23:16];
        else if (idx == 9'd2)   b_tx = addr[15:8];
        else if (idx == 9'd3)   b_tx = addr[7:0];
        else                    b_tx = page_buf[8'(idx - 9'd4)];
      default: ;
    endcase
  end

  assign b_start = (state == S_WREN || state == S_MAIN || state == S_POLL) &&
                   !b_busy && !in_byte && !b_done;
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      after_gap <= S_IDLE;
      is_prog   <= 1'b0;
      addr      <= '0;
      idx       <= '0;
      nbytes    <= '0;
      gap_cnt   <= '0;
      spi_cs_n  <= 1'b1;
      done      <= 1'b0;
      in_byte   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (b_start) begin
        in_byte  <= 1'b1;
        spi_cs_n <= 1'b0;
      end
      unique case (state)
        S_IDLE: if (op_erase || op_program) begin
          is_prog <= op_program;
          addr    <= prog_addr;
          idx     <= '0;
          nbytes  <= 9'd1;
          state   <= S_WREN;
        end
        S_WREN, S_MAIN, S_POLL: if (b_done) begin
          in_byte <= 1'b0;
          idx     <= idx + 9'd1;
          if (idx + 9'd1 == nbytes) begin
            spi_cs_n <= 1'b1;
            gap_cnt  <= 4'(GAP);
            idx      <= '0;
            state    <= S_GAP;
            unique case (state)
              S_WREN: begin
                after_gap <= S_MAIN;
                nbytes    <= is_prog ? 9'd260 : 9'd1;
              end
              S_MAIN: begin
                after_gap <= S_POLL;
                nbytes    <= 9'd2;
              end
              default: begin             // S_POLL: status byte in b_rx
                if (b_rx[0]) after_gap <= S_POLL;
                else begin
                  after_gap <= S_IDLE;
                  state     <= S_IDLE;
                  done      <= 1'b1;
                end
              end
            endcase
          end
        end
        S_GAP: begin
          if (gap_cnt != '0) gap_cnt <= gap_cnt - 4'd1;
          else state <= after_gap;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
