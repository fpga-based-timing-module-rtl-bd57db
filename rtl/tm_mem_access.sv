// tm_mem_access: Timing Module memory access module.
//
// Holds the register window behind BAR0 (2 KB, 512 DWORDs). The first
// TM_N_CFG DWORDs are read/write configuration registers, all a full 32
// bits wide, written with byte enables and driven to the timing logic
// (cfg). The next N_STAT DWORDs are read-only status registers. Their
// values are copied from the timing logic at every Tsync (snap), so the
// host reads a coherent set of values belonging to one frame, which is
// when the thesis says the read-only registers are refreshed. Other
// addresses read as zero and ignore writes.
//
// Interrupt registers: every masked interrupt event from the timing logic
// ORs its sources into the sticky interrupt status register and requests
// an interrupt (intr_req, one cycle). A host write to the interrupt clear
// register clears the written status bits and tells the interrupt state
// machine that the interrupt has been serviced (intr_clr, one cycle).
//
// Reads take one cycle: rd_data is valid the cycle after rd_addr changes.
module tm_mem_access
  import sns_pkg::*;
#(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned N_STAT = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [3:0]        wr_be,
  input  logic [31:0]       wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [31:0]       rd_data,
  output logic [31:0]       cfg  [TM_N_CFG],
  input  logic [31:0]       stat [N_STAT],
  input  logic              snap,
  input  logic              int_evt,
  input  logic [N_INT-1:0]  int_src,
  output logic              intr_req,
  output logic              intr_clr
);
  logic [31:0]      shadow [N_STAT];
  logic [N_INT-1:0] int_status;

  // reset values: Tsync from PT0, 60 Hz test divisor, everything else 0
  function automatic logic [31:0] cfg_reset(input int unsigned a);
    if (a == int'(R_FREE_DIV)) return DIV_60HZ_CYC;
    return '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < TM_N_CFG; a++) cfg[a] <= cfg_reset(a);
    end else if (wr_en && wr_addr < ADDR_W'(TM_N_CFG)) begin
      for (int b = 0; b < 4; b++)
        if (wr_be[b]) cfg[wr_addr[$clog2(TM_N_CFG)-1:0]][8*b +: 8] <= wr_data[8*b +: 8];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_STAT; i++) shadow[i] <= '0;
    end else if (snap) begin
      for (int i = 0; i < N_STAT; i++) shadow[i] <= stat[i];
    end
  end

  // interrupt status and clear
  logic clr_wr;
  assign clr_wr = wr_en && wr_addr == ADDR_W'(R_INT_CLEAR);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_status <= '0;
      intr_req   <= 1'b0;
      intr_clr   <= 1'b0;
    end else begin
      intr_req <= int_evt;
      intr_clr <= clr_wr;
      int_status <= (int_status & ~(clr_wr ? wr_data[N_INT-1:0] : '0)) |
                    (int_evt ? int_src : '0);
    end
  end

  // read port
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data <= '0;
    end else begin
      if (rd_addr < ADDR_W'(TM_N_CFG))
        rd_data <= cfg[rd_addr[$clog2(TM_N_CFG)-1:0]];
      else if (rd_addr == ADDR_W'(R_INT_STATUS))
        rd_data <= 32'(int_status);
      else if (rd_addr < ADDR_W'(TM_N_CFG + N_STAT))
        rd_data <= shadow[ADDR_W'(rd_addr - ADDR_W'(TM_N_CFG))];
      else
        rd_data <= '0;
    end
  end
endmodule
