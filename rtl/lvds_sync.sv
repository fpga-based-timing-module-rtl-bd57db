// lvds_sync: serializer and deserializer of the OCC's high-speed LVDS
// data links.
//
// Each link carries 21 signals on three LVDS data pairs, seven bits per
// pair per word, with a fourth pair carrying the data clock, as the OCC
// link description gives. This block runs on the bit clock (seven times
// the word rate). Transmit: a 21-bit word is taken every seven bit-clock
// cycles (tx_load strobes when tx_word is sampled); lane j sends bits
// [7j+6:7j], most significant first, and the clock pair sends the pattern
// 1100011, high for the first two and last two bits of a word, the
// framing used by 7:1 "channel link" serializers. Receive: the block
// shifts in the three data lanes and the clock lane; when the last seven
// clock-lane bits equal 1100011 a word boundary has been found and
// rx_word is delivered with a one-cycle rx_valid.
//
// The bit order and the clock pattern are this design's choice; the
// thesis gives only the 21:3 ratio and the forwarded clock. On a board
// the serial side would use I/O serializer primitives.
module lvds_sync #(
  localparam int unsigned NBITS = 21,
  localparam int unsigned NLANE = 3,
  localparam int unsigned SER   = 7
) (
  input  logic             clk,       // bit clock
  input  logic             rst_n,
  // transmit
  input  logic [NBITS-1:0] tx_word,
  output logic             tx_load,
  output logic [NLANE-1:0] lvds_tx,
  output logic             lvds_tx_clk,
  // receive
  input  logic [NLANE-1:0] lvds_rx,
  input  logic             lvds_rx_clk,
  output logic [NBITS-1:0] rx_word,
  output logic             rx_valid
);
  localparam logic [SER-1:0] CLK_PAT = 7'b1100011;

  logic [2:0]       tx_ph;
  logic [SER-1:0]   tx_sh [NLANE];
  logic [SER-1:0]   tx_ck;

  assign tx_load = (tx_ph == 3'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_ph       <= '0;
      tx_ck       <= '0;
      lvds_tx     <= '0;
      lvds_tx_clk <= 1'b0;
      for (int j = 0; j < NLANE; j++) tx_sh[j] <= '0;
    end else begin
      tx_ph <= (tx_ph == 3'(SER-1)) ? 3'd0 : tx_ph + 1'b1;
      if (tx_load) begin
        for (int j = 0; j < NLANE; j++) begin
          lvds_tx[j] <= tx_word[SER*j + SER-1];
          tx_sh[j]   <= {tx_word[SER*j +: SER-1], 1'b0};
        end
        lvds_tx_clk <= CLK_PAT[SER-1];
        tx_ck       <= {CLK_PAT[SER-2:0], 1'b0};
      end else begin
        for (int j = 0; j < NLANE; j++) begin
          lvds_tx[j] <= tx_sh[j][SER-1];
          tx_sh[j]   <= {tx_sh[j][SER-2:0], 1'b0};
        end
        lvds_tx_clk <= tx_ck[SER-1];
        tx_ck       <= {tx_ck[SER-2:0], 1'b0};
      end
    end
  end

  logic [SER-1:0] rx_sh [NLANE];
  logic [SER-1:0] rx_ck;
  logic [SER-1:0] rx_ck_n;
  assign rx_ck_n = {rx_ck[SER-2:0], lvds_rx_clk};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_ck    <= '0;
      rx_word  <= '0;
      rx_valid <= 1'b0;
      for (int j = 0; j < NLANE; j++) rx_sh[j] <= '0;
    end else begin
      rx_ck    <= rx_ck_n;
      rx_valid <= 1'b0;
      for (int j = 0; j < NLANE; j++) rx_sh[j] <= {rx_sh[j][SER-2:0], lvds_rx[j]};
      if (rx_ck_n == CLK_PAT) begin
        rx_valid <= 1'b1;
        for (int j = 0; j < NLANE; j++)
          rx_word[SER*j +: SER] <= {rx_sh[j][SER-2:0], lvds_rx[j]};
      end
    end
  end
endmodule
