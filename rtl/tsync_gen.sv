// tsync_gen: Tsync generation circuit.
//
// The Tsync pulse tells the detector electronics to reset their time
// stamp counters. Its trigger comes from a mux selected by the Tsync
// control register: PT0, Tstart, or a free running divisor (a down
// counter reloaded from the divisor register, 60 Hz at the default) that
// replaces both for testing. The trigger starts the Tsync delay counter;
// when it runs out a pulse of PULSE_CYC cycles is sent. The delay is
// counted in timing-clock steps (9.42 ns), so a 21-bit value covers the
// 16.7 ms frame.
//
// The PT0 overdue counter is loaded with the PT0 overdue time whenever
// PT0 or Tstart is seen and counts down. If it runs out, overdue_evt
// pulses for one cycle (the veto circuit can veto the frame on it) and,
// when the control register enables it, a Tsync is started anyway and
// the counter reloads, so the detectors keep receiving frames while PT0
// is missing. Triggering a Tsync on overdue follows the arrow from the
// overdue counter to the delay register in the circuit diagram; the
// reload is this design's choice.
//
// Timing: overdue_evt strobes overdue_time+1 cycles after the last PT0 or
// Tstart strobe (and every overdue_time+1 cycles after that while it is
// enabled). A trigger strobe in cycle t raises tsync in cycle t+delay+1
// (tsync_evt strobes in that same cycle). A trigger that comes while a
// delay is running restarts the delay.
module tsync_gen
  import sns_pkg::*;
#(
  parameter int unsigned W         = 32,
  parameter int unsigned PULSE_CYC = sns_pkg::PULSE_1US_CYC
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         pt0_evt,
  input  logic         tstart_evt,
  input  tsync_src_e   src_sel,
  input  logic         overdue_en,
  input  logic [W-1:0] delay,
  input  logic [W-1:0] overdue_time,
  input  logic [W-1:0] divisor,
  output logic         tsync,
  output logic         tsync_evt,
  output logic         overdue_evt,
  output logic         div_evt
);
  logic [W-1:0] div_cnt, od_cnt, dly_cnt;
  logic         dly_run, od_run;
  logic [$clog2(PULSE_CYC+1)-1:0] pw_cnt;
  logic         trig, src_evt, od_fire;

  // free running divisor
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt <= '0;
      div_evt <= 1'b0;
    end else begin
      div_evt <= 1'b0;
      if (div_cnt == '0) begin
        div_cnt <= (divisor == '0) ? '0 : divisor - 1'b1;
        div_evt <= (divisor != '0);
      end else begin
        div_cnt <= div_cnt - 1'b1;
      end
    end
  end

  always_comb begin
    unique case (src_sel)
      TSRC_PT0:    src_evt = pt0_evt;
      TSRC_TSTART: src_evt = tstart_evt;
      TSRC_DIV:    src_evt = div_evt;
      default:     src_evt = 1'b0;
    endcase
  end

  // PT0 overdue counter
  assign od_fire = od_run && (od_cnt == 'd1) && !(pt0_evt || tstart_evt);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      od_cnt      <= '0;
      od_run      <= 1'b0;
      overdue_evt <= 1'b0;
    end else begin
      overdue_evt <= od_fire;
      if ((pt0_evt || tstart_evt) && overdue_time != '0) begin
        od_cnt <= overdue_time;
        od_run <= 1'b1;
      end else if (od_fire) begin
        od_cnt <= overdue_time;
        od_run <= overdue_en;
      end else if (od_run) begin
        od_cnt <= od_cnt - 1'b1;
      end
    end
  end

  assign trig = src_evt || (overdue_evt && overdue_en && src_sel != TSRC_OFF);

  // Tsync delay register and pulse former
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly_cnt   <= '0;
      dly_run   <= 1'b0;
      pw_cnt    <= '0;
      tsync     <= 1'b0;
      tsync_evt <= 1'b0;
    end else begin
      tsync_evt <= 1'b0;
      if (pw_cnt != '0) begin
        pw_cnt <= pw_cnt - 1'b1;
        if (pw_cnt == 'd1) tsync <= 1'b0;
      end
      if (trig) begin
        if (delay == '0) begin
          tsync     <= 1'b1;
          tsync_evt <= 1'b1;
          pw_cnt    <= PULSE_CYC[$bits(pw_cnt)-1:0];
          dly_run   <= 1'b0;
        end else begin
          dly_cnt <= delay - 1'b1;
          dly_run <= 1'b1;
        end
      end else if (dly_run) begin
        if (dly_cnt == '0) begin
          dly_run   <= 1'b0;
          tsync     <= 1'b1;
          tsync_evt <= 1'b1;
          pw_cnt    <= PULSE_CYC[$bits(pw_cnt)-1:0];
        end else begin
          dly_cnt <= dly_cnt - 1'b1;
        end
      end
    end
  end
endmodule
