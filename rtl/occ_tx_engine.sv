// occ_tx_engine: OCC transmit engine.
//
// Sends outbound TLPs on the endpoint core's 64-bit transmit transaction
// interface (active-low controls). Three states, as in the thesis: RST
// picks the next request (a register read completion first, then a DMA
// memory write, then a DMA memory read); FMT (TLP format type) sends the
// header, and for a completion or a memory read request also its last
// QWORD, then returns to RST; for a memory write it moves to PAYLOAD,
// which sends the address and the payload DWORDs, two per QWORD, taken
// from the output FIFO, until the expected count has been sent.
//
// Requests: req_compl/cpl/rd_data (completion with data for a register
// read; rd_data valid from the cycle after req_compl); mwr_req with
// mwr_addr/mwr_len (level, held by the DMA engine until mwr_done);
// mrd_req with mrd_addr/mrd_len/mrd_tag (likewise until mrd_done). The
// *_done outputs are combinational and high in the cycle the core takes
// the TLP's last QWORD. The payload source shows two DWORDs (pl_dw0,
// pl_dw1) and is popped by pl_pop; the DMA engine starts a write only
// when mwr_len DWORDs are stored. Header fields follow the PCI Express
// base specification with 32-bit addresses and all byte enables set.
module occ_tx_engine
  import sns_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] completer_id,
  // register read completion
  input  logic        req_compl,
  input  cpl_req_t    cpl,
  input  logic [31:0] rd_data,
  output logic        compl_done,
  // DMA write
  input  logic        mwr_req,
  input  logic [31:0] mwr_addr,
  input  logic [9:0]  mwr_len,
  output logic        mwr_done,
  input  logic [31:0] pl_dw0,
  input  logic [31:0] pl_dw1,
  output logic [1:0]  pl_pop,
  // DMA read request
  input  logic        mrd_req,
  input  logic [31:0] mrd_addr,
  input  logic [9:0]  mrd_len,
  input  logic [7:0]  mrd_tag,
  output logic        mrd_done,
  // transmit transaction interface
  output logic [63:0] trn_td,
  output logic [7:0]  trn_trem_n,
  output logic        trn_tsof_n,
  output logic        trn_teof_n,
  output logic        trn_tsrc_rdy_n,
  input  logic        trn_tdst_rdy_n
);
  typedef enum logic [1:0] {TX_RST, TX_FMT, TX_PAYLOAD} tx_state_e;
  typedef enum logic [1:0] {K_CPL, K_MWR, K_MRD} kind_e;
  tx_state_e   state;
  kind_e       kind;
  logic        cpl_pend, hb, first_pl;
  cpl_req_t    c;
  logic [9:0]  rem;
  logic [31:0] dw0, dw1, dw2;
  logic        take;

  assign take = !trn_tdst_rdy_n && !trn_tsrc_rdy_n;

  always_comb begin
    unique case (kind)
      K_CPL: begin
        dw0 = {1'b0, TLP_CPLD, 1'b0, c.tc, 4'b0, 2'b0, c.attr, 2'b0, 10'd1};
        dw1 = {completer_id, 3'b000, 1'b0, cpl_byte_count(c.first_be)};
        dw2 = {c.req_id, c.tag, 1'b0, c.lower_addr};
      end
      K_MWR: begin
        dw0 = {1'b0, TLP_MWR32, 14'h0, mwr_len};
        dw1 = {completer_id, 8'h00, (mwr_len == 10'd1) ? 4'h0 : 4'hF, 4'hF};
        dw2 = {mwr_addr[31:2], 2'b00};
      end
      default: begin
        dw0 = {1'b0, TLP_MRD32, 14'h0, mrd_len};
        dw1 = {completer_id, mrd_tag, (mrd_len == 10'd1) ? 4'h0 : 4'hF, 4'hF};
        dw2 = {mrd_addr[31:2], 2'b00};
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= TX_RST;
      kind     <= K_CPL;
      cpl_pend <= 1'b0;
      c        <= '0;
      hb       <= 1'b0;
      first_pl <= 1'b0;
      rem      <= '0;
    end else begin
      if (req_compl) begin
        cpl_pend <= 1'b1;
        c        <= cpl;
      end
      unique case (state)
        TX_RST: begin
          hb <= 1'b0;
          if (cpl_pend) begin
            kind <= K_CPL; state <= TX_FMT;
          end else if (mwr_req) begin
            kind <= K_MWR; state <= TX_FMT;
          end else if (mrd_req) begin
            kind <= K_MRD; state <= TX_FMT;
          end
        end
        TX_FMT: begin
          if (take) begin
            if (!hb) begin
              if (kind == K_MWR) begin
                state    <= TX_PAYLOAD;
                rem      <= mwr_len;
                first_pl <= 1'b1;
              end else begin
                hb <= 1'b1;
              end
            end else begin
              state <= TX_RST;
              if (kind == K_CPL) cpl_pend <= 1'b0;
            end
          end
        end
        TX_PAYLOAD: begin
          if (take) begin
            first_pl <= 1'b0;
            rem      <= rem - 10'(pl_pop);
            if (!trn_teof_n) state <= TX_RST;
          end
        end
        default: state <= TX_RST;
      endcase
    end
  end

  always_comb begin
    trn_td         = '0;
    trn_trem_n     = 8'h00;
    trn_tsof_n     = 1'b1;
    trn_teof_n     = 1'b1;
    trn_tsrc_rdy_n = 1'b1;
    pl_pop         = 2'd0;
    compl_done     = 1'b0;
    mwr_done       = 1'b0;
    mrd_done       = 1'b0;
    unique case (state)
      TX_FMT: begin
        trn_tsrc_rdy_n = 1'b0;
        if (!hb) begin
          trn_td     = {dw0, dw1};
          trn_tsof_n = 1'b0;
        end else begin
          trn_teof_n = 1'b0;
          if (kind == K_CPL) begin
            trn_td     = {dw2, bswap32(rd_data)};
            compl_done = !trn_tdst_rdy_n;
          end else begin
            trn_td     = {dw2, 32'h0};
            trn_trem_n = 8'h0F;
            mrd_done   = !trn_tdst_rdy_n;
          end
        end
      end
      TX_PAYLOAD: begin
        trn_tsrc_rdy_n = 1'b0;
        if (first_pl) begin
          trn_td = {dw2, bswap32(pl_dw0)};
          pl_pop = trn_tdst_rdy_n ? 2'd0 : 2'd1;
          trn_teof_n = (rem != 10'd1);
        end else if (rem == 10'd1) begin
          trn_td     = {bswap32(pl_dw0), 32'h0};
          trn_trem_n = 8'h0F;
          pl_pop     = trn_tdst_rdy_n ? 2'd0 : 2'd1;
          trn_teof_n = 1'b0;
        end else begin
          trn_td     = {bswap32(pl_dw0), bswap32(pl_dw1)};
          pl_pop     = trn_tdst_rdy_n ? 2'd0 : 2'd2;
          trn_teof_n = (rem != 10'd2);
        end
        mwr_done = !trn_teof_n && !trn_tdst_rdy_n;
      end
      default: ;
    endcase
  end
endmodule
