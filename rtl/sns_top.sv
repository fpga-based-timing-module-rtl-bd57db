// sns_top: the two firmware designs of the SNS timing/communication board
// side by side.
//
// One PCI Express board serves both as the Timing Module and as the
// Optical Communication Card (OCC); each is its own FPGA design behind
// its own PCI Express endpoint core. This top holds both, each with its
// own clock, reset, endpoint-core transaction and interrupt ports and
// external links, prefixed tm_ and occ_. The endpoint cores, transceivers
// and clocking are vendor parts outside this RTL.
module sns_top
  import sns_pkg::*;
(
  // ---------------------------------------------------- Timing Module
  input  logic        tm_clk,
  input  logic        tm_rst_n,
  input  logic [63:0] tm_trn_rd,
  input  logic [7:0]  tm_trn_rrem_n,
  input  logic        tm_trn_rsof_n,
  input  logic        tm_trn_reof_n,
  input  logic        tm_trn_rsrc_rdy_n,
  input  logic [6:0]  tm_trn_rbar_hit_n,
  output logic        tm_trn_rdst_rdy_n,
  output logic [63:0] tm_trn_td,
  output logic [7:0]  tm_trn_trem_n,
  output logic        tm_trn_tsof_n,
  output logic        tm_trn_teof_n,
  output logic        tm_trn_tsrc_rdy_n,
  input  logic        tm_trn_tdst_rdy_n,
  input  logic [15:0] tm_cfg_completer_id,
  input  logic        tm_cfg_interrupt_rdy_n,
  output logic        tm_cfg_interrupt_n,
  output logic        tm_cfg_interrupt_assert_n,
  output logic [7:0]  tm_cfg_interrupt_di,
  input  logic        tm_pt0,
  input  logic        tm_tstart,
  input  logic        tm_beam_veto,
  input  logic        tm_loss_of_lock,
  input  logic [7:0]  tm_chop_tdc,
  input  logic [7:0]  tm_chop_veto,
  output logic        tm_tsync,
  output logic        tm_veto,
  output logic [7:0]  tm_chop_ref,
  // -------------------------------------------------------------- OCC
  input  logic        occ_clk,
  input  logic        occ_rst_n,
  input  logic [63:0] occ_trn_rd,
  input  logic [7:0]  occ_trn_rrem_n,
  input  logic        occ_trn_rsof_n,
  input  logic        occ_trn_reof_n,
  input  logic        occ_trn_rsrc_rdy_n,
  output logic        occ_trn_rdst_rdy_n,
  output logic [63:0] occ_trn_td,
  output logic [7:0]  occ_trn_trem_n,
  output logic        occ_trn_tsof_n,
  output logic        occ_trn_teof_n,
  output logic        occ_trn_tsrc_rdy_n,
  input  logic        occ_trn_tdst_rdy_n,
  input  logic [15:0] occ_cfg_completer_id,
  input  logic        occ_cfg_interrupt_rdy_n,
  output logic        occ_cfg_interrupt_n,
  output logic        occ_cfg_interrupt_assert_n,
  output logic [7:0]  occ_cfg_interrupt_di,
  output logic [15:0] occ_tlk_txd,
  output logic        occ_tlk_tx_en,
  input  logic [15:0] occ_tlk_rxd,
  input  logic        occ_tlk_rx_dv,
  input  logic        occ_tlk_rx_er,
  output logic [2:0]  occ_lvds_tx,
  output logic        occ_lvds_tx_clk,
  input  logic [2:0]  occ_lvds_rx,
  input  logic        occ_lvds_rx_clk,
  output logic        occ_wr_dma_done,
  output logic        occ_rd_dma_done,
  output logic        occ_tx_ip
);
  timing_module u_tm (
    .clk(tm_clk), .rst_n(tm_rst_n),
    .trn_rd(tm_trn_rd), .trn_rrem_n(tm_trn_rrem_n), .trn_rsof_n(tm_trn_rsof_n),
    .trn_reof_n(tm_trn_reof_n), .trn_rsrc_rdy_n(tm_trn_rsrc_rdy_n),
    .trn_rbar_hit_n(tm_trn_rbar_hit_n), .trn_rdst_rdy_n(tm_trn_rdst_rdy_n),
    .trn_td(tm_trn_td), .trn_trem_n(tm_trn_trem_n), .trn_tsof_n(tm_trn_tsof_n),
    .trn_teof_n(tm_trn_teof_n), .trn_tsrc_rdy_n(tm_trn_tsrc_rdy_n),
    .trn_tdst_rdy_n(tm_trn_tdst_rdy_n),
    .cfg_completer_id(tm_cfg_completer_id), .cfg_interrupt_rdy_n(tm_cfg_interrupt_rdy_n),
    .cfg_interrupt_n(tm_cfg_interrupt_n), .cfg_interrupt_assert_n(tm_cfg_interrupt_assert_n),
    .cfg_interrupt_di(tm_cfg_interrupt_di),
    .pt0(tm_pt0), .tstart(tm_tstart), .beam_veto(tm_beam_veto),
    .loss_of_lock(tm_loss_of_lock), .chop_tdc(tm_chop_tdc), .chop_veto(tm_chop_veto),
    .tsync(tm_tsync), .veto(tm_veto), .chop_ref(tm_chop_ref)
  );

  occ u_occ (
    .clk(occ_clk), .rst_n(occ_rst_n),
    .trn_rd(occ_trn_rd), .trn_rrem_n(occ_trn_rrem_n), .trn_rsof_n(occ_trn_rsof_n),
    .trn_reof_n(occ_trn_reof_n), .trn_rsrc_rdy_n(occ_trn_rsrc_rdy_n),
    .trn_rdst_rdy_n(occ_trn_rdst_rdy_n),
    .trn_td(occ_trn_td), .trn_trem_n(occ_trn_trem_n), .trn_tsof_n(occ_trn_tsof_n),
    .trn_teof_n(occ_trn_teof_n), .trn_tsrc_rdy_n(occ_trn_tsrc_rdy_n),
    .trn_tdst_rdy_n(occ_trn_tdst_rdy_n),
    .cfg_completer_id(occ_cfg_completer_id), .cfg_interrupt_rdy_n(occ_cfg_interrupt_rdy_n),
    .cfg_interrupt_n(occ_cfg_interrupt_n), .cfg_interrupt_assert_n(occ_cfg_interrupt_assert_n),
    .cfg_interrupt_di(occ_cfg_interrupt_di),
    .tlk_txd(occ_tlk_txd), .tlk_tx_en(occ_tlk_tx_en), .tlk_rxd(occ_tlk_rxd),
    .tlk_rx_dv(occ_tlk_rx_dv), .tlk_rx_er(occ_tlk_rx_er),
    .lvds_tx(occ_lvds_tx), .lvds_tx_clk(occ_lvds_tx_clk),
    .lvds_rx(occ_lvds_rx), .lvds_rx_clk(occ_lvds_rx_clk),
    .wr_dma_done(occ_wr_dma_done), .rd_dma_done(occ_rd_dma_done), .tx_ip(occ_tx_ip)
  );
endmodule
