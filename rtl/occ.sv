// occ: Optical Communication Card firmware behind the PCI Express
// endpoint.
//
// The OCC moves neutron event data from the detector electronics to host
// memory, and commands from the host to the detectors, over either a
// fiber-optic link (through a TLK2501 transceiver, 16-bit interface) or
// an LVDS link (21 signals on 3 pairs plus a clock pair). A simple mux,
// selected by the OPTCVR control bit, chooses the link. Data received
// from the link goes into the output FIFO and is moved to host memory by
// bus-master DMA writes; data fetched from host memory by DMA reads
// lands in the IDMA buffer and is sent on the link when TX_GO is set.
// Without DMA, the host can also write the IDMA and, in target-read mode
// (TGT_RD), read link data from the 16 KB ODMA buffer with register reads.
//
// Blocks: occ_rx_engine and occ_tx_engine on the endpoint core's
// transaction interface, occ_dma_engine (registers, DMA sequencing, IDMA
// ODMA and output FIFO), intr_ctrl (legacy INTA, the same machine as in the
// Timing Module), occ_tlk_sync for the optical link, lvds_sync for the
// LVDS link. The endpoint core (x8, BAR0 4 KB) is outside this RTL; its
// ports are this module's ports.
//
// On the LVDS link each 21-bit word slot carries one 16-bit half of a
// 32-bit word in bits 15:0 with bit 16 marking a valid half (this
// design's choice; the thesis does not give the signal assignment). One
// clock is used throughout; the LVDS serializer runs on it as its bit
// clock, so the LVDS word rate is a seventh of it.
module occ
  import sns_pkg::*;
#(
  parameter int unsigned IDMA_DEPTH  = 2048,
  parameter int unsigned OFIFO_DEPTH = 2048,
  parameter int unsigned ODMA_DEPTH  = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  // receive transaction interface
  input  logic [63:0] trn_rd,
  input  logic [7:0]  trn_rrem_n,
  input  logic        trn_rsof_n,
  input  logic        trn_reof_n,
  input  logic        trn_rsrc_rdy_n,
  output logic        trn_rdst_rdy_n,
  // transmit transaction interface
  output logic [63:0] trn_td,
  output logic [7:0]  trn_trem_n,
  output logic        trn_tsof_n,
  output logic        trn_teof_n,
  output logic        trn_tsrc_rdy_n,
  input  logic        trn_tdst_rdy_n,
  // configuration / interrupt interface
  input  logic [15:0] cfg_completer_id,
  input  logic        cfg_interrupt_rdy_n,
  output logic        cfg_interrupt_n,
  output logic        cfg_interrupt_assert_n,
  output logic [7:0]  cfg_interrupt_di,
  // TLK2501 parallel interface
  output logic [15:0] tlk_txd,
  output logic        tlk_tx_en,
  input  logic [15:0] tlk_rxd,
  input  logic        tlk_rx_dv,
  input  logic        tlk_rx_er,
  // LVDS link
  output logic [2:0]  lvds_tx,
  output logic        lvds_tx_clk,
  input  logic [2:0]  lvds_rx,
  input  logic        lvds_rx_clk,
  // status
  output logic        wr_dma_done,
  output logic        rd_dma_done,
  output logic        tx_ip
);
  localparam int unsigned ADDR_W = 10;  // 4 KB BAR0

  logic              wr_en, req_compl, compl_done;
  logic [ADDR_W-1:0] wr_addr, rd_addr;
  logic [31:0]       wr_data, rd_data;
  cpl_req_t          cpl;
  logic [1:0]        cpl_push, pl_pop;
  logic [31:0]       cpl_dw0, cpl_dw1, pl_dw0, pl_dw1;
  logic              mwr_req, mwr_done, mrd_req, mrd_done;
  logic [31:0]       mwr_addr, mrd_addr;
  logic [9:0]        mwr_len, mrd_len;
  logic [7:0]        mrd_tag;
  logic              intr_req, intr_clr, optcvr;
  logic [2:0]        intr_state;

  occ_rx_engine #(.ADDR_W(ADDR_W)) u_rx (
    .clk, .rst_n, .trn_rd, .trn_rrem_n, .trn_rsof_n, .trn_reof_n,
    .trn_rsrc_rdy_n, .trn_rdst_rdy_n, .wr_en, .wr_addr, .wr_data, .rd_addr,
    .req_compl, .cpl, .compl_done, .cpl_push, .cpl_dw0, .cpl_dw1
  );

  occ_tx_engine u_tx (
    .clk, .rst_n, .completer_id(cfg_completer_id),
    .req_compl, .cpl, .rd_data, .compl_done,
    .mwr_req, .mwr_addr, .mwr_len, .mwr_done, .pl_dw0, .pl_dw1, .pl_pop,
    .mrd_req, .mrd_addr, .mrd_len, .mrd_tag, .mrd_done,
    .trn_td, .trn_trem_n, .trn_tsof_n, .trn_teof_n, .trn_tsrc_rdy_n, .trn_tdst_rdy_n
  );

  logic        link_rx_valid, link_tx_valid, link_tx_ready;
  logic [31:0] link_rx_data, link_tx_data;

  // only register reads ask for a completion, so req_compl marks a read
  occ_dma_engine #(.ADDR_W(ADDR_W), .IDMA_DEPTH(IDMA_DEPTH), .OFIFO_DEPTH(OFIFO_DEPTH),
                   .ODMA_DEPTH(ODMA_DEPTH)) u_dma (
    .clk, .rst_n, .wr_en, .wr_addr, .wr_data, .rd_addr, .rd_en(req_compl), .rd_data,
    .mwr_req, .mwr_addr, .mwr_len, .mwr_done, .pl_dw0, .pl_dw1, .pl_pop,
    .mrd_req, .mrd_addr, .mrd_len, .mrd_tag, .mrd_done,
    .cpl_push, .cpl_dw0, .cpl_dw1,
    .link_rx_valid, .link_rx_data, .link_tx_valid, .link_tx_data, .link_tx_ready,
    .optcvr, .intr_req, .intr_clr, .wr_dma_done, .rd_dma_done, .tx_ip
  );

  intr_ctrl u_intr (
    .clk, .rst_n, .intr_req, .intr_clr, .cfg_interrupt_rdy_n,
    .cfg_interrupt_n, .cfg_interrupt_assert_n, .cfg_interrupt_di, .intr_state
  );

  // ------------------------------------------------------- optical link
  logic        opt_rx_valid, opt_tx_ready;
  logic [31:0] opt_rx_data, opt_rx_count;
  occ_tlk_sync u_tlk (
    .clk, .rst_n, .tx_ce(1'b1),
    .tx_data(link_tx_data), .tx_valid(link_tx_valid && optcvr), .tx_ready(opt_tx_ready),
    .tlk_txd, .tlk_tx_en, .tlk_rxd, .tlk_rx_dv, .tlk_rx_er,
    .rx_data(opt_rx_data), .rx_valid(opt_rx_valid), .rx_count(opt_rx_count)
  );

  // ---------------------------------------------------------- LVDS link
  logic [20:0] lv_tx_word, lv_rx_word;
  logic        lv_load, lv_rx_valid;
  logic [15:0] lv_half;
  logic        lv_half_en;
  logic        lvds_rx_valid, lvds_tx_ready;
  logic [31:0] lvds_rx_data, lvds_rx_count;

  occ_tlk_sync u_lvds_frm (
    .clk, .rst_n, .tx_ce(lv_load),
    .tx_data(link_tx_data), .tx_valid(link_tx_valid && !optcvr), .tx_ready(lvds_tx_ready),
    .tlk_txd(lv_half), .tlk_tx_en(lv_half_en),
    .tlk_rxd(lv_rx_word[15:0]), .tlk_rx_dv(lv_rx_valid && lv_rx_word[16]), .tlk_rx_er(1'b0),
    .rx_data(lvds_rx_data), .rx_valid(lvds_rx_valid), .rx_count(lvds_rx_count)
  );

  // the framer's output half is registered on the load strobe, so it is
  // stable when the serializer samples it at the next load
  assign lv_tx_word = {4'd0, lv_half_en, lv_half};

  lvds_sync u_lvds (
    .clk, .rst_n, .tx_word(lv_tx_word), .tx_load(lv_load), .lvds_tx, .lvds_tx_clk,
    .lvds_rx, .lvds_rx_clk, .rx_word(lv_rx_word), .rx_valid(lv_rx_valid)
  );

  // ---------------------------------------------------------- link mux
  assign link_rx_valid = optcvr ? opt_rx_valid : lvds_rx_valid;
  assign link_rx_data  = optcvr ? opt_rx_data  : lvds_rx_data;
  assign link_tx_ready = optcvr ? opt_tx_ready : lvds_tx_ready;

  logic unused;
  assign unused = ^{intr_state, opt_rx_count, lvds_rx_count, lv_rx_word[20:17]};
endmodule
