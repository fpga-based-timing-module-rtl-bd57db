// chopper_phase_regs: chopper phase registers of the timing and phase
// register circuit.
//
// For every chopper the block measures, in timing-clock cycles, the time
// between successive Top Dead Center (TDC) pulses (period_q) and the time
// from the latest reference event to the TDC pulse (phase_q). The
// reference is the output of the PT0/Tstart/Tsync mux that the circuit
// diagram draws into these registers; measuring TDC against it is this
// design's reading of that connection, the text itself only names the
// TDC-to-TDC time.
//
// Interface: ref_evt and tdc_evt[i] are one-cycle strobes; the registers
// update on the clock edge after tdc_evt[i]. tdc_seen[i] is set once a
// chopper has produced two TDC pulses.
module chopper_phase_regs #(
  parameter int unsigned N_CHOP = 8,
  parameter int unsigned W      = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ref_evt,
  input  logic [N_CHOP-1:0] tdc_evt,
  output logic [W-1:0]      period_q [N_CHOP],
  output logic [W-1:0]      phase_q  [N_CHOP],
  output logic [N_CHOP-1:0] tdc_seen
);
  logic [W-1:0]      cnt, last_ref;
  logic [W-1:0]      last_tdc [N_CHOP];
  logic [N_CHOP-1:0] first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      last_ref <= '0;
      first    <= '0;
      tdc_seen <= '0;
      for (int i = 0; i < N_CHOP; i++) begin
        last_tdc[i] <= '0;
        period_q[i] <= '0;
        phase_q[i]  <= '0;
      end
    end else begin
      cnt <= cnt + 1'b1;
      if (ref_evt) last_ref <= cnt;
      for (int i = 0; i < N_CHOP; i++) begin
        if (tdc_evt[i]) begin
          last_tdc[i] <= cnt;
          first[i]    <= 1'b1;
          phase_q[i]  <= cnt - last_ref;
          if (first[i]) begin
            period_q[i] <= cnt - last_tdc[i];
            tdc_seen[i] <= 1'b1;
          end
        end
      end
    end
  end
endmodule
