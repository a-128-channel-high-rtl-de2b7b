// ps_timing_gen: configures the FPGA in passive-serial mode from the serial
// flash (the "timing generator" of the CPLD).
//
// In normal operation the FPGA is configured in passive-serial (PS) mode by
// the CPLD, which reads the configuration image from the serial flash. The
// sequence generated here is the usual PS sequence (details are this design's
// choices, sized for a 40 MHz clock):
//   1. drive nCONFIG low for NCONFIG_LOW cycles, then release it;
//   2. wait until the FPGA releases nSTATUS (high), then ST2CK cycles;
//   3. open a flash READ (03h, 24-bit start address IMG_ADDR) and keep chip
//      select low; each byte read from the flash (MSB first) is shifted into
//      DATA0 least significant bit first, one bit per DCLK period
//      (DATA0 changes while DCLK is low, the FPGA samples on the rising edge);
//   4. when CONF_DONE goes high, give INIT_CLKS further DCLK periods for the
//      FPGA's initialisation and report done.
// nSTATUS going low during loading, or MAX_BYTES bytes without CONF_DONE,
// ends the attempt with error set. start (from the PC or at power-up) begins
// a new attempt.
module ps_timing_gen #(
  parameter int unsigned NCONFIG_LOW = 80,       // 2 us at 40 MHz
  parameter int unsigned ST2CK       = 80,       // 2 us at 40 MHz
  parameter int unsigned INIT_CLKS   = 299,
  parameter int unsigned MAX_BYTES   = 1048576,
  parameter logic [23:0] IMG_ADDR    = 24'h000000
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic busy,
  output logic done,
  output logic error,
  // FPGA passive-serial port
  output logic ps_nconfig,
  input  logic ps_nstatus,
  input  logic ps_conf_done,
  output logic ps_dclk,
  output logic ps_data0,
  // SPI flash
  output logic spi_cs_n,
  output logic spi_sclk,
  output logic spi_mosi,
  input  logic spi_miso
);

  typedef enum logic [2:0] {
    S_IDLE, S_NCONFIG, S_WAIT_ST, S_CMD, S_READ, S_SHIFT, S_INIT
  } state_e;

  state_e      state;
  logic [15:0] cnt;
  logic [20:0] nbytes;
  logic [2:0]  cmd_idx;
  logic [7:0]  sh;
  logic [3:0]  nbit;
  logic        ph;
  logic        b_start, b_busy, b_done, in_byte;
  logic [7:0]  b_tx, b_rx;

  spi_byte u_spi (
    .clk(clk), .rst_n(rst_n), .start(b_start), .tx(b_tx), .rx(b_rx),
    .busy(b_busy), .done(b_done), .sclk(spi_sclk), .mosi(spi_mosi), .miso(spi_miso)
  );

  always_comb begin
    unique case (cmd_idx)
      3'd0:    b_tx = 8'h03;
      3'd1:    b_tx = IMG_ADDR[23:16];
      3'd2:    b_tx = IMG_ADDR[15:8];
      3'd3:    b_tx = IMG_ADDR[7:0];
      default: b_tx = 8'h00;
    endcase
  end

  assign b_start = (state == S_CMD || state == S_READ) && !b_busy && !in_byte;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      nbytes     <= '0;
      cmd_idx    <= '0;
      sh         <= '0;
      nbit       <= '0;
      ph         <= 1'b0;
      in_byte    <= 1'b0;
      done       <= 1'b0;
      error      <= 1'b0;
      ps_nconfig <= 1'b1;
      ps_dclk    <= 1'b0;
      ps_data0   <= 1'b0;
      spi_cs_n   <= 1'b1;
    end else begin
      done <= 1'b0;
      if (b_start) in_byte <= 1'b1;
      if (b_done)  in_byte <= 1'b0;
      if (cnt != '0) cnt <= cnt - 16'd1;

      // loading: a configuration error aborts
      if ((state == S_READ || state == S_SHIFT) && !ps_nstatus) begin
        state    <= S_IDLE;
        error    <= 1'b1;
        spi_cs_n <= 1'b1;
        ps_dclk  <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: if (start) begin
            ps_nconfig <= 1'b0;
            cnt        <= 16'(NCONFIG_LOW - 1);
            error      <= 1'b0;
            state      <= S_NCONFIG;
          end
          S_NCONFIG: if (cnt == '0) begin
            ps_nconfig <= 1'b1;
            cnt        <= 16'(ST2CK);
            state      <= S_WAIT_ST;
          end
          S_WAIT_ST: begin
            if (!ps_nstatus) cnt <= 16'(ST2CK);
            else if (cnt == '0) begin
              spi_cs_n <= 1'b0;
              cmd_idx  <= '0;
              nbytes   <= '0;
              state    <= S_CMD;
            end
          end
          S_CMD: if (b_done) begin
            cmd_idx <= cmd_idx + 3'd1;
            if (cmd_idx == 3'd3) state <= S_READ;
          end
          S_READ: if (b_done) begin
            sh     <= b_rx;
            nbit   <= 4'd8;
            ph     <= 1'b0;
            nbytes <= nbytes + 21'd1;
            state  <= S_SHIFT;
          end
          S_SHIFT: begin
            if (!ph) begin
              ps_dclk  <= 1'b0;
              ps_data0 <= sh[0];
              ph       <= 1'b1;
            end else begin
              ps_dclk <= 1'b1;
              ph      <= 1'b0;
              sh      <= {1'b0, sh[7:1]};
              nbit    <= nbit - 4'd1;
              if (nbit == 4'd1) begin
                if (ps_conf_done) begin
                  spi_cs_n <= 1'b1;
                  cnt      <= 16'(INIT_CLKS);
                  state    <= S_INIT;
                end else if (32'(nbytes) >= MAX_BYTES) begin
                  spi_cs_n <= 1'b1;
                  error    <= 1'b1;
                  state    <= S_IDLE;
                end else begin
                  state <= S_READ;
                end
              end
            end
          end
          S_INIT: begin
            // free-running DCLK for the initialisation clocks
            ps_data0 <= 1'b1;
            ps_dclk  <= ~ps_dclk;
            if (!ps_dclk) cnt <= cnt;
            if (cnt == '0 && ps_dclk) begin
              ps_dclk <= 1'b0;
              state   <= S_IDLE;
              done    <= 1'b1;
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
