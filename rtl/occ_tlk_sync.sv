// occ_tlk_sync: OCC optical serializer and deserializer logic for the
// 16-bit parallel interface of a TLK2501 transceiver.
//
// The optical link carries 32-bit words over a 16-bit interface: the
// lower 16 bits go in the first clock cycle and the upper 16 bits in the
// next, as the OCC protocol describes. Transmit: a word offered on
// tx_valid is taken (tx_ready) when the low half is sent; the high half
// follows in the next cycle; tlk_tx_en marks valid halves. Receive: halves
// marked by tlk_rx_dv are paired low-then-high into rx_data/rx_valid (one
// cycle strobe); a receive error (tlk_rx_er) drops a half-assembled word.
// rx_count counts received words (the input count kept by the FPGA).
// tx_ce lets the transmit side advance only in some cycles (tie it high
// for the TLK2501, which takes a half every cycle); the same framing is
// used, one half per 21-bit word slot, on the LVDS link (see occ).
//
// Timing: a word accepted in cycle t is on tlk_txd in t+1 (low) and t+2
// (high); a word whose high half arrives in cycle t is on rx_data in t+1.
module occ_tlk_sync (
  input  logic        clk,
  input  logic        rst_n,
  // transmit
  input  logic        tx_ce,
  input  logic [31:0] tx_data,
  input  logic        tx_valid,
  output logic        tx_ready,
  output logic [15:0] tlk_txd,
  output logic        tlk_tx_en,
  // receive
  input  logic [15:0] tlk_rxd,
  input  logic        tlk_rx_dv,
  input  logic        tlk_rx_er,
  output logic [31:0] rx_data,
  output logic        rx_valid,
  output logic [31:0] rx_count
);
  logic        tx_hi;     // next half to send is the high one
  logic [15:0] tx_hold;

  assign tx_ready = tx_ce && !tx_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_hi     <= 1'b0;
      tx_hold   <= '0;
      tlk_txd   <= '0;
      tlk_tx_en <= 1'b0;
    end else if (tx_ce) begin
      tlk_tx_en <= 1'b0;
      if (tx_hi) begin
        tlk_txd   <= tx_hold;
        tlk_tx_en <= 1'b1;
        tx_hi     <= 1'b0;
      end else if (tx_valid) begin
        tlk_txd   <= tx_data[15:0];
        tx_hold   <= tx_data[31:16];
        tlk_tx_en <= 1'b1;
        tx_hi     <= 1'b1;
      end
    end
  end

  logic        rx_hi;
  logic [15:0] rx_lo;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_hi    <= 1'b0;
      rx_lo    <= '0;
      rx_data  <= '0;
      rx_valid <= 1'b0;
      rx_count <= '0;
    end else begin
      rx_valid <= 1'b0;
      if (tlk_rx_er) begin
        rx_hi <= 1'b0;
      end else if (tlk_rx_dv) begin
        if (!rx_hi) begin
          rx_lo <= tlk_rxd;
          rx_hi <= 1'b1;
        end else begin
          rx_data  <= {tlk_rxd, rx_lo};
          rx_valid <= 1'b1;
          rx_count <= rx_count + 1'b1;
          rx_hi    <= 1'b0;
        end
      end
    end
  end
endmodule
