// intr_ctrl: legacy (INTx) interrupt state machine towards the PCI
// Express endpoint core's configuration interface.
//
// Five states, named as in the thesis: intr_rst waits for a request and
// then drives cfg_interrupt_n and cfg_interrupt_assert_n low (an Assert
// INTA message); intr_ack waits for the core to accept it
// (cfg_interrupt_rdy_n low), then releases cfg_interrupt_n; intr_srvc
// waits until the host has serviced the interrupt (intr_clr), then drives
// cfg_interrupt_n low with cfg_interrupt_assert_n high (Deassert INTA);
// intr_ack2 waits for the core to accept that and releases both;
// intr_done returns to intr_rst. cfg_interrupt_di selects INTA (00h).
//
// A request that arrives while an interrupt is in progress is remembered
// and starts the next cycle through the states (this design's choice).
// Requests are active high here; the simulation in the thesis drives an
// active-low intr_in. All outputs are registered.
module intr_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       intr_req,
  input  logic       intr_clr,
  input  logic       cfg_interrupt_rdy_n,
  output logic       cfg_interrupt_n,
  output logic       cfg_interrupt_assert_n,
  output logic [7:0] cfg_interrupt_di,
  output logic [2:0] intr_state
);
  typedef enum logic [2:0] {
    INTR_RST, INTR_ACK, INTR_SRVC, INTR_ACK2, INTR_DONE
  } intr_state_e;
  intr_state_e state;
  logic        pend;

  assign cfg_interrupt_di = 8'h00;
  assign intr_state       = state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state                  <= INTR_RST;
      pend                   <= 1'b0;
      cfg_interrupt_n        <= 1'b1;
      cfg_interrupt_assert_n <= 1'b1;
    end else begin
      if (intr_req) pend <= 1'b1;
      unique case (state)
        INTR_RST:
          if (intr_req || pend) begin
            pend                   <= 1'b0;
            cfg_interrupt_n        <= 1'b0;
            cfg_interrupt_assert_n <= 1'b0;
            state                  <= INTR_ACK;
          end
        INTR_ACK:
          if (!cfg_interrupt_rdy_n) begin
            cfg_interrupt_n <= 1'b1;
            state           <= INTR_SRVC;
          end
        INTR_SRVC:
          if (intr_clr) begin
            cfg_interrupt_n        <= 1'b0;
            cfg_interrupt_assert_n <= 1'b1;
            state                  <= INTR_ACK2;
          end
        INTR_ACK2:
          if (!cfg_interrupt_rdy_n) begin
            cfg_interrupt_n <= 1'b1;
            state           <= INTR_DONE;
          end
        INTR_DONE: state <= INTR_RST;
        default:   state <= INTR_RST;
      endcase
    end
  end

  // the core only sees a request while cfg_interrupt_n is low
  a_assert_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (state == INTR_ACK) |-> (!cfg_interrupt_n && !cfg_interrupt_assert_n));
endmodule
