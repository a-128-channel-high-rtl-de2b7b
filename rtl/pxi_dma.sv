// pxi_dma: DMA engine in the CPLD that moves TDC data from FO to the PC.
//
// The module sends its data over the PXI (PCI) bus by DMA bursts through a
// PCI core (Altera pci_mt32, not part of this RTL). The PC programs a bus
// address and a transfer length and starts the engine; the engine asks the
// core for one master write burst of that length and feeds it words read
// from the FO FIFO; when the last word has been taken it raises done and a
// one-cycle irq. The time between transfers is why longer DMA lengths give a
// higher average rate. The register map and the handshake towards the core
// are this design's own, generic choices:
//
//   tgt_addr 0 DMA_ADDR  PC bus byte address of the buffer
//   tgt_addr 1 DMA_LEN   length in bytes (multiple of 4, up to 256 kB)
//   tgt_addr 2 CTRL      write bit0 = 1 to start
//   tgt_addr 3 STATUS    bit0 busy, bit1 done (write bit1 = 1 to clear)
//   tgt_addr 4 FO level  read-used-word of FO
//
// Master side: mst_req stays high with mst_addr/mst_len (words) until the
// core answers mst_ack. Then a valid/ready word stream follows: the core
// takes mst_data when mst_valid && mst_ready. A 4-word prefetch buffer hides
// the one-cycle read latency of FO, so a word can be handed over every cycle
// while FO has data; an empty FO only pauses the stream (mst_valid low).
module pxi_dma #(
  parameter int unsigned FAW = 12
) (
  input  logic          clk,          // 33 MHz PCI clock
  input  logic          rst_n,
  // PCI target register access
  input  logic          tgt_we,
  input  logic [3:0]    tgt_addr,
  input  logic [31:0]   tgt_wdata,
  output logic [31:0]   tgt_rdata,
  // FO read side
  output logic          fo_rd_en,
  input  logic [31:0]   fo_rdata,
  input  logic          fo_rempty,
  input  logic [FAW:0]  fo_rdusedw,
  // PCI core master side
  output logic          mst_req,
  output logic [31:0]   mst_addr,
  output logic [15:0]   mst_len,
  input  logic          mst_ack,
  output logic          mst_valid,
  output logic [31:0]   mst_data,
  input  logic          mst_ready,
  output logic          irq
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_XFER} state_e;

  state_e      state;
  logic [31:0] reg_addr;
  logic [17:0] reg_len;
  logic        done;
  logic [15:0] fetched, sent;

  // prefetch buffer
  logic [31:0] pf_mem [4];
  logic [1:0]  pf_wp, pf_rp;
  logic [2:0]  pf_cnt;
  logic        pf_inflight;
  logic        pf_push, pf_pop;

  assign mst_len   = reg_len[17:2];
  assign mst_addr  = reg_addr;
  assign mst_req   = (state == S_REQ);
  assign mst_valid = (state == S_XFER) && (pf_cnt != 3'd0);
  assign mst_data  = pf_mem[pf_rp];
  assign pf_pop    = mst_valid && mst_ready;
  assign pf_push   = pf_inflight;

  assign fo_rd_en = (state != S_IDLE) && !fo_rempty && (fetched != mst_len) &&
                    (32'(pf_cnt) + 32'(pf_inflight) < 3);

  always_comb begin
    unique case (tgt_addr)
      4'd0:    tgt_rdata = reg_addr;
      4'd1:    tgt_rdata = 32'(reg_len);
      4'd3:    tgt_rdata = {30'd0, done, state != S_IDLE};
      4'd4:    tgt_rdata = 32'(fo_rdusedw);
      default: tgt_rdata = '0;
    endcase
  end

  always_ff @(posedge clk) if (pf_push) pf_mem[pf_wp] <= fo_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      reg_addr    <= '0;
      reg_len     <= '0;
      done        <= 1'b0;
      irq         <= 1'b0;
      fetched     <= '0;
      sent        <= '0;
      pf_wp       <= '0;
      pf_rp       <= '0;
      pf_cnt      <= '0;
      pf_inflight <= 1'b0;
    end else begin
      irq         <= 1'b0;
      pf_inflight <= fo_rd_en;
      if (fo_rd_en) fetched <= fetched + 16'd1;
      if (pf_push)  pf_wp <= pf_wp + 2'd1;
      if (pf_pop)   pf_rp <= pf_rp + 2'd1;
      pf_cnt <= pf_cnt + 3'(pf_push) - 3'(pf_pop);

      if (tgt_we) begin
        unique case (tgt_addr)
          4'd0: reg_addr <= tgt_wdata;
          4'd1: if (state == S_IDLE) reg_len <= {tgt_wdata[17:2], 2'b00};
          4'd3: if (tgt_wdata[1]) done <= 1'b0;
          default: ;
        endcase
      end

      unique case (state)
        S_IDLE: if (tgt_we && tgt_addr == 4'd2 && tgt_wdata[0] &&
                    reg_len[17:2] != '0) begin
          state   <= S_REQ;
          done    <= 1'b0;
          fetched <= '0;
          sent    <= '0;
        end
        S_REQ: if (mst_ack) state <= S_XFER;
        S_XFER: if (pf_pop) begin
          sent <= sent + 16'd1;
          if (sent + 16'd1 == mst_len) begin
            state <= S_IDLE;
            done  <= 1'b1;
            irq   <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
