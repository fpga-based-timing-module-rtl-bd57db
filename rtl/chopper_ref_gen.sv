// chopper_ref_gen: chopper reference pulses.
//
// Each chopper control system gets a reference pulse of about 200 us
// (REF_CYC timing-clock cycles) phased with the accelerator's Tstart
// signal; the chopper controller locks its disk phase to it. On every
// Tstart strobe, chopper i loads its delay register value and, when that
// delay has elapsed, raises chop_ref[i] for REF_CYC cycles. The per
// chopper delay is this design's way of "phasing" the pulse with Tstart;
// the thesis gives only the pulse length and its reference.
//
// Timing: Tstart strobe in cycle t raises chop_ref[i] in cycle
// t+delay[i]+1. A Tstart during a running pulse restarts the delay.
module chopper_ref_gen
  import sns_pkg::*;
#(
  parameter int unsigned N_CHOP  = sns_pkg::N_CHOPPERS,
  parameter int unsigned W       = 32,
  parameter int unsigned REF_CYC = sns_pkg::CHOP_REF_CYC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              tstart_evt,
  input  logic [W-1:0]      delay [N_CHOP],
  output logic [N_CHOP-1:0] chop_ref
);
  localparam int unsigned PW = $clog2(REF_CYC + 1);

  for (genvar i = 0; i < N_CHOP; i++) begin : g_chop
    logic [W-1:0]  dly_cnt;
    logic          dly_run;
    logic [PW-1:0] pw_cnt;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        dly_cnt     <= '0;
        dly_run     <= 1'b0;
        pw_cnt      <= '0;
        chop_ref[i] <= 1'b0;
      end else begin
        if (pw_cnt != '0) begin
          pw_cnt <= pw_cnt - 1'b1;
          if (pw_cnt == 'd1) chop_ref[i] <= 1'b0;
        end
        if (tstart_evt) begin
          if (delay[i] == '0) begin
            chop_ref[i] <= 1'b1;
            pw_cnt      <= PW'(REF_CYC);
            dly_run     <= 1'b0;
          end else begin
            dly_cnt <= delay[i] - 1'b1;
            dly_run <= 1'b1;
          end
        end else if (dly_run) begin
          if (dly_cnt == '0) begin
            dly_run     <= 1'b0;
            chop_ref[i] <= 1'b1;
            pw_cnt      <= PW'(REF_CYC);
          end else begin
            dly_cnt <= dly_cnt - 1'b1;
          end
        end
      end
    end
  end
endmodule
