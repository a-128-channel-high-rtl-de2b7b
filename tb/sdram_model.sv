// sdram_model: behavioural model of a 32-bit single data rate SDRAM of the
// MT48LC4M32B2 kind (4 banks, 4096 rows, 256 columns), for testbenches only.
// Commands are decoded at the rising clock edge from {cs_n, ras_n, cas_n,
// we_n}. Burst length 1 is assumed (the mode register's CAS latency is
// used). The model checks the rules a controller must keep and counts
// violations in err_count: no command before the mode register is loaded
// (except precharge and refresh), ACTIVATE only to an idle bank and at least
// T_RP after its precharge, READ/WRITE only to the open row and at least
// T_RCD after ACTIVATE, REFRESH only with all banks idle and commands at
// least T_RFC after it, and no gap between refreshes over REF_MAX cycles (refreshes may be
// postponed a little as long as the average rate holds).
// Storage is sparse (associative array).
module sdram_model #(
  parameter int T_RCD   = 2,
  parameter int T_RP    = 2,
  parameter int T_RFC   = 7,
  parameter int REF_MAX = 2000
) (
  input  logic        clk,
  input  logic        cs_n, ras_n, cas_n, we_n,
  input  logic [1:0]  ba,
  input  logic [11:0] addr,
  input  logic [31:0] dq_in,     // written data (controller output)
  output logic [31:0] dq_out     // read data (to the controller)
);
  logic [31:0] mem [int];
  bit          open_b [4];
  logic [11:0] row_b [4];
  int          t_act [4], t_pre [4];
  int          cyc = 0, t_ref = -1000, last_ref = 0, cl = 2;
  bit          mode_set = 0;
  int unsigned err_count = 0, n_wr = 0, n_rd = 0, n_ref = 0, n_act = 0;
  logic [31:0] pipe [4];

  initial begin
    for (int b = 0; b < 4; b++) begin open_b[b] = 0; t_act[b] = -100; t_pre[b] = -100; end
    dq_out = '0;
  end

  function automatic int key(logic [1:0] b, logic [11:0] r, logic [7:0] c);
    return int'({b, r, c});
  endfunction

  task automatic err(input string s);
    err_count++;
    if (err_count < 10) $display("SDRAM model: %s at cycle %0d", s, cyc);
  endtask

  always @(posedge clk) begin
    cyc++;
    // read data pipeline: the word of a READ sampled at edge E is driven so
    // that the controller samples it at edge E+cl
    pipe[3] = pipe[2]; pipe[2] = pipe[1]; pipe[1] = pipe[0]; pipe[0] = '0;
    if (!cs_n) begin
      if (cyc - t_ref < T_RFC && {ras_n, cas_n, we_n} != 3'b111) err("command during tRFC");
      unique case ({ras_n, cas_n, we_n})
        3'b011: begin   // ACTIVATE
          n_act++;
          if (!mode_set) err("ACTIVATE before mode set");
          if (open_b[ba]) err("ACTIVATE to open bank");
          if (cyc - t_pre[ba] < T_RP) err("tRP violated");
          open_b[ba] = 1; row_b[ba] = addr; t_act[ba] = cyc;
        end
        3'b100, 3'b101: begin   // WRITE / READ
          if (!open_b[ba]) err("access to closed bank");
          if (cyc - t_act[ba] < T_RCD) err("tRCD violated");
          if (we_n == 1'b0) begin
            mem[key(ba, row_b[ba], addr[7:0])] = dq_in;
            n_wr++;
          end else begin
            pipe[0] = mem.exists(key(ba, row_b[ba], addr[7:0])) ?
                      mem[key(ba, row_b[ba], addr[7:0])] : 32'hDEAD_BEEF;
            n_rd++;
          end
        end
        3'b010: begin   // PRECHARGE
          for (int b = 0; b < 4; b++)
            if (addr[10] || b == int'(ba)) begin open_b[b] = 0; t_pre[b] = cyc; end
        end
        3'b001: begin   // AUTO REFRESH
          if (open_b[0] || open_b[1] || open_b[2] || open_b[3]) err("refresh with open bank");
          if (mode_set && cyc - last_ref > REF_MAX) err("refresh interval exceeded");
          t_ref = cyc; last_ref = cyc; n_ref++;
        end
        3'b000: begin   // LOAD MODE REGISTER
          cl = int'(addr[6:4]);
          if (addr[2:0] != 3'b000) err("burst length not 1");
          mode_set = 1; last_ref = cyc;
        end
        default: ;
      endcase
    end
    if (mode_set && cyc - last_ref > REF_MAX + 300) begin
      err("no refresh"); last_ref = cyc;
    end
    dq_out <= pipe[cl - 1];
  end
endmodule
