// timing_logic: the Timing Module's timing logic.
//
// Inputs are the timing-loop signals received from the accelerator and
// chopper systems (PT0, Tstart, beam veto, loss of lock, up to eight
// chopper TDC pulses and chopper vetoes). Each is synchronised with two
// flip-flops and turned into a one-cycle strobe on its rising edge
// (loss of lock is used as a level). The strobes feed the three
// subsystems of the thesis, the timing and phase registers
// (pt0_time_regs, chopper_phase_regs), the Tsync generation circuit
// (tsync_gen) and the veto generation circuit (veto_gen), plus the
// chopper reference pulse generator (chopper_ref_gen).
//
// Outputs are the Tsync and veto pulses for the detector electronics and
// the chopper reference pulses. Configuration comes in as the array of
// read/write registers (cfg, indexed by the DWORD addresses of sns_pkg)
// and the read-only status goes out as the array stat, indexed from
// R_PT0_TIME0. int_evt/int_src report masked interrupt causes to the
// interrupt logic; tsync_evt strobes when a Tsync pulse starts.
//
// The reference mux of the timing and phase registers (PT0, Tstart or
// Tsync) follows the circuit diagram; its select register, the register
// layout and the status counters are this design's own.
module timing_logic
  import sns_pkg::*;
#(
  parameter int unsigned N_CHOP     = sns_pkg::N_CHOPPERS,
  parameter int unsigned N_PT0      = sns_pkg::N_PT0_REGS,
  parameter int unsigned PULSE_CYC  = sns_pkg::PULSE_1US_CYC,
  parameter int unsigned REF_CYC    = sns_pkg::CHOP_REF_CYC,
  parameter int unsigned N_STAT     = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  // timing loop inputs
  input  logic              pt0,
  input  logic              tstart,
  input  logic              beam_veto,
  input  logic              loss_of_lock,
  input  logic [N_CHOP-1:0] chop_tdc,
  input  logic [N_CHOP-1:0] chop_veto,
  // timing loop outputs
  output logic              tsync,
  output logic              veto,
  output logic [N_CHOP-1:0] chop_ref,
  // register access
  input  logic [31:0]       cfg  [TM_N_CFG],
  output logic [31:0]       stat [N_STAT],
  output logic              int_evt,
  output logic [N_INT-1:0]  int_src,
  output logic              tsync_evt
);
  localparam int unsigned NIN = 3 + 2*N_CHOP;

  logic [NIN-1:0] s1, s2, s3, rise;
  logic pt0_e, tstart_e, beam_e, lol;
  logic [N_CHOP-1:0] tdc_e, cveto_e;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
    end else begin
      s1 <= {chop_veto, chop_tdc, beam_veto, tstart, pt0};
      s2 <= s1;
      s3 <= s2;
    end
  end
  assign rise = s2 & ~s3;
  assign pt0_e    = rise[0];
  assign tstart_e = rise[1];
  assign beam_e   = rise[2];
  assign tdc_e    = rise[3 +: N_CHOP];
  assign cveto_e  = rise[3+N_CHOP +: N_CHOP];

  logic lol_s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lol_s1 <= 1'b0; lol <= 1'b0;
    end else begin
      lol_s1 <= loss_of_lock; lol <= lol_s1;
    end
  end

  // ---------------------------------------------------- Tsync generation
  logic tsync_e, overdue_e, div_e;
  tsync_gen #(.PULSE_CYC(PULSE_CYC)) u_tsync (
    .clk, .rst_n,
    .pt0_evt(pt0_e), .tstart_evt(tstart_e),
    .src_sel(tsync_src_e'(cfg[R_TSYNC_CTRL][1:0])),
    .overdue_en(cfg[R_TSYNC_CTRL][2]),
    .delay(cfg[R_TSYNC_DELAY]), .overdue_time(cfg[R_PT0_OVERDUE]),
    .divisor(cfg[R_FREE_DIV]),
    .tsync, .tsync_evt(tsync_e), .overdue_evt(overdue_e), .div_evt(div_e)
  );

  // ------------------------------------------- timing and phase registers
  logic ref_e;
  always_comb begin
    unique case (cfg[R_PHASE_SRC][1:0])
      2'd0:    ref_e = pt0_e;
      2'd1:    ref_e = tstart_e;
      default: ref_e = tsync_e;
    endcase
  end

  logic [31:0] pt0_time [N_PT0];
  logic [N_PT0-1:0] pt0_valid;
  pt0_time_regs #(.N_REGS(N_PT0)) u_pt0 (
    .clk, .rst_n, .evt(ref_e), .time_q(pt0_time), .valid_q(pt0_valid)
  );

  logic [31:0] chop_period [N_CHOP];
  logic [31:0] chop_phase  [N_CHOP];
  logic [N_CHOP-1:0] tdc_seen;
  chopper_phase_regs #(.N_CHOP(N_CHOP)) u_phase (
    .clk, .rst_n, .ref_evt(ref_e), .tdc_evt(tdc_e),
    .period_q(chop_period), .phase_q(chop_phase), .tdc_seen
  );

  // ------------------------------------------------------ veto generation
  logic [N_INT-1:0] other_src;
  logic [N_CHOP-1:0] cmask;
  logic veto_e;
  always_comb begin
    other_src = '0;
    other_src[INT_PT0]    = pt0_e;
    other_src[INT_TSTART] = tstart_e;
    other_src[INT_LOL]    = lol;
    other_src[INT_TSYNC]  = tsync_e;
    for (int i = 0; i < N_CHOP; i++) cmask[i] = cfg[R_CHOP_VMASK0 + i][0];
  end

  veto_gen #(.N_CHOP(N_CHOP), .PULSE_CYC(PULSE_CYC)) u_veto (
    .clk, .rst_n,
    .beam_veto_evt(beam_e), .overdue_evt(overdue_e), .loss_of_lock(lol),
    .chop_veto_evt(cveto_e), .tsync_evt(tsync_e),
    .beam_mask(cfg[R_BEAM_VMASK][0]), .pt0_mask(cfg[R_PT0_VMASK][0]),
    .chop_mask(cmask), .frame_delay(cfg[R_VETO_CTRL][3:0]),
    .int_src(other_src), .int_mask(cfg[R_INT_MASK][N_INT-1:0]),
    .veto, .veto_evt(veto_e), .int_evt, .int_src_q(int_src)
  );

  // ----------------------------------------------- chopper reference pulses
  logic [31:0] ref_dly [N_CHOP];
  always_comb
    for (int i = 0; i < N_CHOP; i++) ref_dly[i] = cfg[R_CHOP_REFDLY0 + i];

  chopper_ref_gen #(.N_CHOP(N_CHOP), .REF_CYC(REF_CYC)) u_cref (
    .clk, .rst_n, .tstart_evt(tstart_e), .delay(ref_dly), .chop_ref
  );

  // --------------------------------------------------------- status words
  logic [31:0] veto_cnt, tsync_cnt;
  logic        overdue_seen;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      veto_cnt <= '0; tsync_cnt <= '0; overdue_seen <= 1'b0;
    end else begin
      if (veto_e)  veto_cnt  <= veto_cnt + 1'b1;
      if (tsync_e) tsync_cnt <= tsync_cnt + 1'b1;
      if (overdue_e) overdue_seen <= 1'b1;
      else if (pt0_e) overdue_seen <= 1'b0;
    end
  end

  always_comb begin
    for (int i = 0; i < N_STAT; i++) stat[i] = '0;
    for (int k = 0; k < N_PT0; k++)  stat[int'(R_PT0_TIME0 - R_PT0_TIME0) + k] = pt0_time[k];
    for (int i = 0; i < N_CHOP; i++) begin
      stat[int'(R_CHOP_PERIOD0 - R_PT0_TIME0) + i] = chop_period[i];
      stat[int'(R_CHOP_PHASE0 - R_PT0_TIME0) + i]  = chop_phase[i];
    end
    stat[int'(R_VETO_COUNT - R_PT0_TIME0)]  = veto_cnt;
    stat[int'(R_TSYNC_COUNT - R_PT0_TIME0)] = tsync_cnt;
    stat[int'(R_STATUS - R_PT0_TIME0)] = {8'(tdc_seen), pt0_valid, 6'd0, overdue_seen, lol};
  end

  assign tsync_evt = tsync_e;

  logic unused;
  assign unused = div_e;
endmodule
