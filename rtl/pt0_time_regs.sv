// pt0_time_regs: PT0-to-PT0 time registers of the timing and phase
// register circuit.
//
// A free running counter of timing-clock cycles (9.42 ns each) is sampled
// at every reference event (PT0, Tstart or Tsync, selected upstream by the
// phase source mux). Register k (k = 0..N_REGS-1) then holds the time
// between the newest event n and event n-1-k: register 0 is
// PT0(n)-PT0(n-1), register 1 is PT0(n)-PT0(n-2), and so on, as the
// thesis describes for its 16 registers. The registers are updated
// without storing old timestamps: with d = PT0(n)-PT0(n-1), the new
// register k is d plus the old register k-1.
//
// Interface: evt is a one-cycle strobe. time_q and valid_q change on the
// clock edge after evt. valid_q[k] says that k+2 events have been seen so
// register k is meaningful. The thesis keeps these registers in block RAM;
// here they are flip-flops so that all of them can be read at once.
module pt0_time_regs #(
  parameter int unsigned N_REGS = 16,
  parameter int unsigned W      = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         evt,
  output logic [W-1:0] time_q  [N_REGS],
  output logic [N_REGS-1:0] valid_q
);
  logic [W-1:0] cnt, last;
  logic         seen;
  logic [W-1:0] d;

  assign d = cnt - last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      last    <= '0;
      seen    <= 1'b0;
      valid_q <= '0;
      for (int k = 0; k < N_REGS; k++) time_q[k] <= '0;
    end else begin
      cnt <= cnt + 1'b1;
      if (evt) begin
        last <= cnt;
        seen <= 1'b1;
        if (seen) begin
          time_q[0] <= d;
          for (int k = 1; k < N_REGS; k++) time_q[k] <= time_q[k-1] + d;
          valid_q <= {valid_q[N_REGS-2:0], 1'b1};
        end
      end
    end
  end
endmodule
