// veto_gen: veto generation circuit.
//
// A veto tells the detector electronics to discard the neutron data of a
// frame. Veto causes are gathered during a frame: the beam veto pulse
// (if the beam veto mask enables it), an expired PT0 overdue counter (if
// the PT0 veto mask enables it), the veto of chopper i (if chopper veto
// mask i enables it), and loss of lock, which is never masked. At every
// Tsync the gathered cause is shifted into the veto shift register and
// the frame is cleared. A veto pulse of PULSE_CYC cycles is sent with the
// Tsync when the shift register bit selected by frame_delay is set:
// frame_delay = 0 vetoes the frame that just ended, frame_delay = 1 the
// one before it, which serves long instruments where a frame's neutrons
// arrive in the next frame. The shift register clocked by Tsync and the
// ungated loss-of-lock input follow the circuit diagram; the mask
// semantics (bit 0 of each mask register enables its cause) and the
// frame_delay selection are this design's reading.
//
// The interrupt mask gates the same causes (plus PT0, Tstart and Tsync
// events given on int_src) onto int_evt, a one-cycle strobe, and int_src_q
// which holds the sources of that strobe.
//
// Timing: veto rises one cycle after tsync_evt.
module veto_gen
  import sns_pkg::*;
#(
  parameter int unsigned N_CHOP    = sns_pkg::N_CHOPPERS,
  parameter int unsigned DEPTH     = 16,
  parameter int unsigned PULSE_CYC = sns_pkg::PULSE_1US_CYC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              beam_veto_evt,
  input  logic              overdue_evt,
  input  logic              loss_of_lock,
  input  logic [N_CHOP-1:0] chop_veto_evt,
  input  logic              tsync_evt,
  input  logic              beam_mask,
  input  logic              pt0_mask,
  input  logic [N_CHOP-1:0] chop_mask,
  input  logic [$clog2(DEPTH)-1:0] frame_delay,
  input  logic [N_INT-1:0]  int_src,     // other causes, by INT_* position
  input  logic [N_INT-1:0]  int_mask,
  output logic              veto,
  output logic              veto_evt,
  output logic              int_evt,
  output logic [N_INT-1:0]  int_src_q
);
  logic             cause, pending;
  logic [DEPTH-1:0] sr, sr_next;
  logic [$clog2(PULSE_CYC+1)-1:0] pw_cnt;
  logic [N_INT-1:0] all_src;

  assign cause = (beam_veto_evt && beam_mask) || (overdue_evt && pt0_mask) ||
                 |(chop_veto_evt & chop_mask) || loss_of_lock;
  assign sr_next = {sr[DEPTH-2:0], pending || cause};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending  <= 1'b0;
      sr       <= '0;
      veto     <= 1'b0;
      veto_evt <= 1'b0;
      pw_cnt   <= '0;
    end else begin
      veto_evt <= 1'b0;
      if (pw_cnt != '0) begin
        pw_cnt <= pw_cnt - 1'b1;
        if (pw_cnt == 'd1) veto <= 1'b0;
      end
      if (tsync_evt) begin
        sr      <= sr_next;
        pending <= 1'b0;
        if (sr_next[frame_delay]) begin
          veto     <= 1'b1;
          veto_evt <= 1'b1;
          pw_cnt   <= PULSE_CYC[$bits(pw_cnt)-1:0];
        end
      end else if (cause) begin
        pending <= 1'b1;
      end
    end
  end

  // interrupt mask
  always_comb begin
    all_src = int_src;
    all_src[INT_CHOP0 +: N_CHOP] = int_src[INT_CHOP0 +: N_CHOP] | chop_veto_evt;
    all_src[INT_BEAM]    = int_src[INT_BEAM] | beam_veto_evt;
    all_src[INT_OVERDUE] = int_src[INT_OVERDUE] | overdue_evt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_evt   <= 1'b0;
      int_src_q <= '0;
    end else begin
      int_evt   <= |(all_src & int_mask);
      int_src_q <= all_src & int_mask;
    end
  end
endmodule
