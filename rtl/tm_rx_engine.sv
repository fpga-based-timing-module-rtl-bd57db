// tm_rx_engine: Timing Module receive engine.
//
// Takes inbound TLPs from the 64-bit transaction interface of the PCI
// Express endpoint core (all control signals active low, as on the
// core) and turns one-DWORD memory and I/O requests into register
// accesses. A four-state machine, as in the thesis: RST waits for a start
// of frame and decodes the first QWORD (header DWORDs 0 and 1); a write
// goes to WR_TLP, a read to RD_TLP, where the address (and, for writes,
// the data) QWORDs are taken; then WAIT holds trn_rdst_rdy_n high until
// the write has been done or the completion has been sent, and returns to
// RST. Both 3-DWORD (32-bit address) and 4-DWORD (64-bit address)
// headers are accepted, as in the programmed-I/O design the Timing Module
// follows. Other TLP types are dropped.
//
// QWORD layout (Fig. 4.7): the first DWORD of a pair is on bits 63:32.
// Payload DWORDs arrive as little-endian byte streams and are
// byte-swapped into register order.
//
// Outputs: wr_en/wr_addr/wr_be/wr_data is a one-cycle register write;
// req_compl with cpl and rd_addr asks the transmit engine for a completion
// (with data for reads, without data for I/O writes); compl_done from the
// transmit engine ends the wait. Addresses are DWORD indexes inside the
// BAR window (ADDR_W bits; 9 for the 2 KB BAR0).
module tm_rx_engine
  import sns_pkg::*;
#(
  parameter int unsigned ADDR_W = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [63:0]       trn_rd,
  input  logic [7:0]        trn_rrem_n,
  input  logic              trn_rsof_n,
  input  logic              trn_reof_n,
  input  logic              trn_rsrc_rdy_n,
  input  logic [6:0]        trn_rbar_hit_n,
  output logic              trn_rdst_rdy_n,
  output logic              wr_en,
  output logic [ADDR_W-1:0] wr_addr,
  output logic [3:0]        wr_be,
  output logic [31:0]       wr_data,
  output logic              req_compl,
  output cpl_req_t          cpl,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic              compl_done
);
  typedef enum logic [1:0] {RX_RST, RX_WR_TLP, RX_RD_TLP, RX_WAIT} rx_state_e;
  rx_state_e state;

  logic       beat;
  logic       hdr4, is_io, wait_cpl, addr_seen;
  logic [6:0] fmt_type;
  assign beat     = !trn_rsrc_rdy_n && !trn_rdst_rdy_n;
  assign fmt_type = trn_rd[62:56];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= RX_RST;
      trn_rdst_rdy_n <= 1'b1;
      wr_en          <= 1'b0;
      wr_addr        <= '0;
      wr_be          <= '0;
      wr_data        <= '0;
      req_compl      <= 1'b0;
      cpl            <= '0;
      rd_addr        <= '0;
      hdr4           <= 1'b0;
      is_io          <= 1'b0;
      wait_cpl       <= 1'b0;
      addr_seen      <= 1'b0;
    end else begin
      wr_en     <= 1'b0;
      req_compl <= 1'b0;
      unique case (state)
        RX_RST: begin
          trn_rdst_rdy_n <= 1'b0;
          addr_seen      <= 1'b0;
          if (beat && !trn_rsof_n && trn_rbar_hit_n != 7'h7f &&
              trn_rd[41:32] == 10'd1 && trn_reof_n) begin
            cpl.tc       <= trn_rd[54:52];
            cpl.attr     <= trn_rd[45:44];
            cpl.req_id   <= trn_rd[31:16];
            cpl.tag      <= trn_rd[15:8];
            cpl.first_be <= trn_rd[3:0];
            wr_be        <= trn_rd[3:0];
            hdr4         <= trn_rd[61];
            unique case (fmt_type)
              TLP_MWR32, TLP_MWR64, TLP_IOWR: begin
                is_io <= (fmt_type == TLP_IOWR);
                state <= RX_WR_TLP;
              end
              TLP_MRD32, TLP_MRD64, TLP_IORD: begin
                is_io <= 1'b0;
                state <= RX_RD_TLP;
              end
              default: ;
            endcase
          end
        end
        RX_WR_TLP: begin
          if (beat) begin
            if (!hdr4) begin
              wr_addr <= trn_rd[32+2 +: ADDR_W];
              wr_data <= bswap32(trn_rd[31:0]);
              wr_en   <= 1'b1;
            end else if (!addr_seen) begin
              wr_addr   <= trn_rd[2 +: ADDR_W];
              addr_seen <= 1'b1;
            end else begin
              wr_data <= bswap32(trn_rd[63:32]);
              wr_en   <= 1'b1;
            end
            if (!trn_reof_n) begin
              trn_rdst_rdy_n <= 1'b1;
              state          <= RX_WAIT;
              wait_cpl       <= is_io;
              if (is_io) begin
                req_compl      <= 1'b1;
                cpl.with_data  <= 1'b0;
                cpl.lower_addr <= {hdr4 ? trn_rd[6:2] : trn_rd[38:34],
                                   cpl_low_addr(cpl.first_be)};
              end
            end
          end
        end
        RX_RD_TLP: begin
          if (beat) begin
            rd_addr <= hdr4 ? trn_rd[2 +: ADDR_W] : trn_rd[32+2 +: ADDR_W];
            cpl.lower_addr <= {hdr4 ? trn_rd[6:2] : trn_rd[38:34],
                               cpl_low_addr(cpl.first_be)};
            if (!trn_reof_n) begin
              cpl.with_data  <= 1'b1;
              req_compl      <= 1'b1;
              trn_rdst_rdy_n <= 1'b1;
              wait_cpl       <= 1'b1;
              state          <= RX_WAIT;
            end
          end
        end
        RX_WAIT: begin
          if (!wait_cpl || compl_done) begin
            wait_cpl       <= 1'b0;
            trn_rdst_rdy_n <= 1'b0;
            state          <= RX_RST;
          end
        end
        default: state <= RX_RST;
      endcase
    end
  end

  logic unused;
  assign unused = ^trn_rrem_n;
endmodule
