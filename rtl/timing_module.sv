// timing_module: Timing Module firmware behind the PCI Express endpoint.
//
// The Timing Module produces the Tsync, veto and chopper reference pulses
// of a neutron instrument from the accelerator's PT0/Tstart signals and
// the chopper TDC pulses, and measures PT0 periods and chopper phases.
// The host reads and writes its registers over PCI Express with single
// DWORD programmed-I/O accesses.
//
// This module joins the interface logic (receive engine, transmit engine,
// memory access and interrupt state machine) with the timing logic. Its
// PCIe-side ports are the transaction and interrupt ports of the vendor
// endpoint core (Endpoint Block Plus, x4 lane, 2 KB BAR0), which is not
// part of this RTL; the timing-loop side ports would connect to the
// optical link receiver and transmitters.
//
// One clock is used for the engines and the timing logic. On the board
// the transaction clock (125 MHz for x4) and the 9.42 ns timing clock
// differ; joining them into one domain is this design's simplification.
// Interrupts: masked timing events request INTA; the host's write to the
// interrupt clear register ends the interrupt.
module timing_module
  import sns_pkg::*;
#(
  parameter int unsigned N_CHOP    = sns_pkg::N_CHOPPERS,
  parameter int unsigned PULSE_CYC = sns_pkg::PULSE_1US_CYC,
  parameter int unsigned REF_CYC   = sns_pkg::CHOP_REF_CYC
) (
  input  logic              clk,
  input  logic              rst_n,
  // receive transaction interface
  input  logic [63:0]       trn_rd,
  input  logic [7:0]        trn_rrem_n,
  input  logic              trn_rsof_n,
  input  logic              trn_reof_n,
  input  logic              trn_rsrc_rdy_n,
  input  logic [6:0]        trn_rbar_hit_n,
  output logic              trn_rdst_rdy_n,
  // transmit transaction interface
  output logic [63:0]       trn_td,
  output logic [7:0]        trn_trem_n,
  output logic              trn_tsof_n,
  output logic              trn_teof_n,
  output logic              trn_tsrc_rdy_n,
  input  logic              trn_tdst_rdy_n,
  // configuration / interrupt interface
  input  logic [15:0]       cfg_completer_id,
  input  logic              cfg_interrupt_rdy_n,
  output logic              cfg_interrupt_n,
  output logic              cfg_interrupt_assert_n,
  output logic [7:0]        cfg_interrupt_di,
  // timing loop
  input  logic              pt0,
  input  logic              tstart,
  input  logic              beam_veto,
  input  logic              loss_of_lock,
  input  logic [N_CHOP-1:0] chop_tdc,
  input  logic [N_CHOP-1:0] chop_veto,
  output logic              tsync,
  output logic              veto,
  output logic [N_CHOP-1:0] chop_ref
);
  localparam int unsigned ADDR_W = 9;   // 2 KB BAR0
  localparam int unsigned N_STAT = 64;

  logic              wr_en, req_compl, compl_done;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [3:0]        wr_be;
  logic [31:0]       wr_data, rd_data;
  cpl_req_t          cpl;
  logic [31:0]       cfg  [TM_N_CFG];
  logic [31:0]       stat [N_STAT];
  logic              int_evt, intr_req, intr_clr;
  logic [N_INT-1:0]  int_src;
  logic [2:0]        intr_state;
  logic              tsync_evt, int_src_tsync;

  tm_rx_engine #(.ADDR_W(ADDR_W)) u_rx (
    .clk, .rst_n, .trn_rd, .trn_rrem_n, .trn_rsof_n, .trn_reof_n,
    .trn_rsrc_rdy_n, .trn_rbar_hit_n, .trn_rdst_rdy_n,
    .wr_en, .wr_addr, .wr_be, .wr_data, .req_compl, .cpl, .rd_addr, .compl_done
  );

  tm_tx_engine u_tx (
    .clk, .rst_n, .req_compl, .cpl, .rd_data, .completer_id(cfg_completer_id),
    .trn_td, .trn_trem_n, .trn_tsof_n, .trn_teof_n, .trn_tsrc_rdy_n,
    .trn_tdst_rdy_n, .compl_done
  );

  tm_mem_access #(.ADDR_W(ADDR_W), .N_STAT(N_STAT)) u_mem (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_be, .wr_data, .rd_addr, .rd_data,
    .cfg, .stat, .snap(int_src_tsync), .int_evt, .int_src, .intr_req, .intr_clr
  );

  intr_ctrl u_intr (
    .clk, .rst_n, .intr_req, .intr_clr, .cfg_interrupt_rdy_n,
    .cfg_interrupt_n, .cfg_interrupt_assert_n, .cfg_interrupt_di, .intr_state
  );

  timing_logic #(.N_CHOP(N_CHOP), .PULSE_CYC(PULSE_CYC), .REF_CYC(REF_CYC),
                 .N_STAT(N_STAT)) u_timing (
    .clk, .rst_n, .pt0, .tstart, .beam_veto, .loss_of_lock, .chop_tdc,
    .chop_veto, .tsync, .veto, .chop_ref, .cfg, .stat, .int_evt, .int_src,
    .tsync_evt
  );
  assign int_src_tsync = tsync_evt;

  logic unused;
  assign unused = ^intr_state;
endmodule
