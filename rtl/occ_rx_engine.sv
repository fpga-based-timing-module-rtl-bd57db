// occ_rx_engine: OCC receive engine.
//
// Processes inbound TLPs from the endpoint core's 64-bit receive
// transaction interface (active-low controls). Four states, as in the
// thesis: RST decodes the first header QWORD; FMT (TLP format type)
// takes the address QWORD of a one-DWORD memory write (register write)
// or memory read (register read, handed to the transmit engine); WAIT
// stalls the link (trn_rdst_rdy_n high) until the transmit engine has
// sent the completion; PAYLOAD takes the data of a completion with data
// (the answer to a DMA read request) and hands its DWORDs to the DMA
// engine's IDMA buffer, returning to RST at the end of the TLP.
//
// Only 3-DWORD headers (32-bit addresses) are handled; that is this
// design's choice. Payload DWORDs are byte-swapped from the
// little-endian link order. cpl_push is 0, 1 or 2 DWORDs per cycle
// (cpl_dw0 first). Register accesses use DWORD addresses in BAR0
// (ADDR_W = 10 for the 4 KB BAR0).
module occ_rx_engine
  import sns_pkg::*;
#(
  parameter int unsigned ADDR_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [63:0]       trn_rd,
  input  logic [7:0]        trn_rrem_n,
  input  logic              trn_rsof_n,
  input  logic              trn_reof_n,
  input  logic              trn_rsrc_rdy_n,
  output logic              trn_rdst_rdy_n,
  // register access
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [31:0]       wr_data,
  output logic [ADDR_W-1:0] rd_addr,
  output logic              req_compl,
  output cpl_req_t          cpl,
  input  logic              compl_done,
  // completion payload towards the IDMA buffer
  output logic [1:0]        cpl_push,
  output logic [31:0]       cpl_dw0,
  output logic [31:0]       cpl_dw1
);
  typedef enum logic [1:0] {RX_RST, RX_FMT, RX_PAYLOAD, RX_WAIT} rx_state_e;
  rx_state_e state;

  logic beat, is_wr, first_pl;
  assign beat = !trn_rsrc_rdy_n && !trn_rdst_rdy_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= RX_RST;
      trn_rdst_rdy_n <= 1'b1;
      wr_en          <= 1'b0;
      wr_addr        <= '0;
      wr_data        <= '0;
      rd_addr        <= '0;
      req_compl      <= 1'b0;
      cpl            <= '0;
      cpl_push       <= '0;
      cpl_dw0        <= '0;
      cpl_dw1        <= '0;
      is_wr          <= 1'b0;
      first_pl       <= 1'b0;
    end else begin
      wr_en     <= 1'b0;
      req_compl <= 1'b0;
      cpl_push  <= '0;
      unique case (state)
        RX_RST: begin
          trn_rdst_rdy_n <= 1'b0;
          if (beat && !trn_rsof_n && trn_reof_n) begin
            cpl.tc        <= trn_rd[54:52];
            cpl.attr      <= trn_rd[45:44];
            cpl.req_id    <= trn_rd[31:16];
            cpl.tag       <= trn_rd[15:8];
            cpl.first_be  <= trn_rd[3:0];
            cpl.with_data <= 1'b1;
            unique case (trn_rd[62:56])
              TLP_MWR32: begin is_wr <= 1'b1; state <= RX_FMT; end
              TLP_MRD32: begin is_wr <= 1'b0; state <= RX_FMT; end
              TLP_CPLD:  begin first_pl <= 1'b1; state <= RX_PAYLOAD; end
              default: ;
            endcase
          end
        end
        RX_FMT: begin
          if (beat) begin
            if (is_wr) begin
              wr_addr <= trn_rd[32+2 +: ADDR_W];
              wr_data <= bswap32(trn_rd[31:0]);
              wr_en   <= 1'b1;
              state   <= RX_RST;
            end else begin
              rd_addr        <= trn_rd[32+2 +: ADDR_W];
              cpl.lower_addr <= {trn_rd[38:34], cpl_low_addr(cpl.first_be)};
              req_compl      <= 1'b1;
              trn_rdst_rdy_n <= 1'b1;
              state          <= RX_WAIT;
            end
          end
        end
        RX_PAYLOAD: begin
          if (beat) begin
            first_pl <= 1'b0;
            if (first_pl) begin
              cpl_dw0  <= bswap32(trn_rd[31:0]);
              cpl_push <= 2'd1;
            end else begin
              cpl_dw0  <= bswap32(trn_rd[63:32]);
              cpl_dw1  <= bswap32(trn_rd[31:0]);
              cpl_push <= (!trn_reof_n && trn_rrem_n != 8'h00) ? 2'd1 : 2'd2;
            end
            if (!trn_reof_n) state <= RX_RST;
          end
        end
        RX_WAIT: begin
          if (compl_done) begin
            trn_rdst_rdy_n <= 1'b0;
            state          <= RX_RST;
          end
        end
        default: state <= RX_RST;
      endcase
    end
  end
endmodule
