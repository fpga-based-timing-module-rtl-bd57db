// tm_tx_engine: Timing Module transmit engine.
//
// Sends the completion TLP for each request handed over by the receive
// engine, on the 64-bit transmit transaction interface of the endpoint
// core (active-low controls). Three states, as in the thesis: in TX_RST
// the engine raises trn_tsrc_rdy_n/trn_tsof_n low and presents the first
// QWORD (completion header DWORDs 0 and 1) and keeps it there until the
// core takes it (trn_tdst_rdy_n low). It then moves to TX_CPLD for a
// completion with data (header DWORD 2 plus the register value, trem 00h)
// or TX_CPL for a completion without data (header DWORD 2 plus a null
// DWORD, trem 0Fh), presents that last QWORD with trn_teof_n low, and
// returns to TX_RST when it is taken, pulsing compl_done.
//
// Header fields follow the PCI Express base specification: successful
// status, length 1, byte count and lower address from the request's
// first byte enables. The register value is byte-swapped into the
// little-endian payload order. rd_data must be valid from the cycle after
// req_compl (the memory access module reads in one cycle).
module tm_tx_engine
  import sns_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_compl,
  input  cpl_req_t    cpl,
  input  logic [31:0] rd_data,
  input  logic [15:0] completer_id,
  output logic [63:0] trn_td,
  output logic [7:0]  trn_trem_n,
  output logic        trn_tsof_n,
  output logic        trn_teof_n,
  output logic        trn_tsrc_rdy_n,
  input  logic        trn_tdst_rdy_n,
  output logic        compl_done
);
  typedef enum logic [1:0] {TX_RST, TX_CPLD, TX_CPL} tx_state_e;
  tx_state_e state;
  logic      pending;
  cpl_req_t  c;
  logic [31:0] dw0, dw1, dw2;

  assign dw0 = {1'b0, c.with_data ? TLP_CPLD : TLP_CPL, 1'b0, c.tc, 4'b0,
                1'b0, 1'b0, c.attr, 2'b0, c.with_data ? 10'd1 : 10'd0};
  assign dw1 = {completer_id, 3'b000, 1'b0,
                c.with_data ? cpl_byte_count(c.first_be) : 12'd4};
  assign dw2 = {c.req_id, c.tag, 1'b0, c.lower_addr};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= TX_RST;
      pending    <= 1'b0;
      c          <= '0;
      compl_done <= 1'b0;
    end else begin
      compl_done <= 1'b0;
      if (req_compl) begin
        pending <= 1'b1;
        c       <= cpl;
      end
      unique case (state)
        TX_RST:
          if (pending && !trn_tdst_rdy_n)
            state <= c.with_data ? TX_CPLD : TX_CPL;
        TX_CPLD, TX_CPL:
          if (!trn_tdst_rdy_n) begin
            state      <= TX_RST;
            pending    <= 1'b0;
            compl_done <= 1'b1;
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
    unique case (state)
      TX_RST: if (pending) begin
        trn_td         = {dw0, dw1};
        trn_tsof_n     = 1'b0;
        trn_tsrc_rdy_n = 1'b0;
      end
      TX_CPLD: begin
        trn_td         = {dw2, bswap32(rd_data)};
        trn_teof_n     = 1'b0;
        trn_tsrc_rdy_n = 1'b0;
      end
      TX_CPL: begin
        trn_td         = {dw2, 32'h0};
        trn_trem_n     = 8'h0F;
        trn_teof_n     = 1'b0;
        trn_tsrc_rdy_n = 1'b0;
      end
      default: ;
    endcase
  end
endmodule
