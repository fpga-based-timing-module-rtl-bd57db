// tb_timing_logic: self-checking test of the Timing Module timing logic
// with short pulse lengths. PT0 and Tstart arrive every P cycles and the
// eight chopper TDC pulses every P cycles at chopper-specific offsets.
// Checks: Tsync follows each PT0 after the programmed delay (plus the
// two-flop input synchroniser and edge detector, 3 cycles), the PT0-to-PT0
// registers hold k*P, chopper periods and phases, the chopper reference
// pulses follow Tstart by their delays, a masked beam veto vetoes the
// frame, loss of lock vetoes unmasked, and Tsync interrupts are reported.
module tb_timing_logic;
  import sns_pkg::*;
  localparam int PW = 4, RC = 20, P = 200, DLY = 17;
  logic clk = 0, rst_n = 0;
  logic pt0 = 0, tstart = 0, beam_veto = 0, loss_of_lock = 0;
  logic [7:0] chop_tdc = '0, chop_veto = '0;
  logic tsync, veto, int_evt, tsync_evt;
  logic [7:0] chop_ref;
  logic [31:0] cfg [TM_N_CFG];
  logic [31:0] stat [64];
  logic [N_INT-1:0] int_src;
  int checks = 0, failures = 0;

  timing_logic #(.PULSE_CYC(PW), .REF_CYC(RC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int cyc = 0;
  int pt0_rise[$], ts_rise[$], cr_rise[8][$], veto_rise[$], nint = 0;
  logic ts_d = 0, v_d = 0; logic [7:0] cr_d = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
    ts_d <= tsync; v_d <= veto; cr_d <= chop_ref;
    if (tsync && !ts_d) ts_rise.push_back(cyc);
    if (veto && !v_d) veto_rise.push_back(cyc);
    for (int i = 0; i < 8; i++) if (chop_ref[i] && !cr_d[i]) cr_rise[i].push_back(cyc);
    if (int_evt && int_src[INT_TSYNC]) nint++;
    end
  end

  // accelerator and chopper stimulus: frame f starts at cycle base + f*P
  bit run = 0;
  int frame = 0;
  initial begin
    wait (run);
    forever begin
      for (int c = 0; c < P; c++) begin
        pt0    <= (c < 3);
        tstart <= (c < 3);
        for (int i = 0; i < 8; i++) chop_tdc[i] <= (c >= 10 + 7*i && c < 13 + 7*i);
        beam_veto <= (frame == 6 && c >= 50 && c < 53);
        if (c == 0) pt0_rise.push_back(cyc + 1);
        @(posedge clk);
      end
      frame++;
    end
  end

  initial begin
    foreach (cfg[i]) cfg[i] = 0;
    cfg[R_TSYNC_CTRL]  = 32'(TSRC_PT0);
    cfg[R_TSYNC_DELAY] = DLY;
    cfg[R_PHASE_SRC]   = 0;
    cfg[R_BEAM_VMASK]  = 1;
    cfg[R_INT_MASK]    = 1 << INT_TSYNC;
    for (int i = 0; i < 8; i++) cfg[R_CHOP_REFDLY0 + i] = 5 * i;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run = 1;
    wait (frame == 20);
    // Tsync latency and count
    check(ts_rise.size() == 20, $sformatf("%0d Tsyncs for 20 PT0", ts_rise.size()));
    foreach (ts_rise[i])
      check(ts_rise[i] == pt0_rise[i] + 3 + DLY,
            $sformatf("Tsync %0d at %0d, PT0 at %0d", i, ts_rise[i], pt0_rise[i]));
    check(nint == 20, $sformatf("Tsync interrupts %0d", nint));
    // PT0-to-PT0 registers (status index k)
    for (int k = 0; k < 16; k++) check(stat[k] == 32'((k + 1) * P), $sformatf("PT0 time %0d = %0d", k, stat[k]));
    // chopper periods and phases
    for (int i = 0; i < 8; i++) begin
      check(stat[16 + i] == P, $sformatf("chopper %0d period %0d", i, stat[16 + i]));
      check(stat[24 + i] == 32'(10 + 7*i), $sformatf("chopper %0d phase %0d", i, stat[24 + i]));
    end
    // chopper reference pulses
    for (int i = 0; i < 8; i++) begin
      check(cr_rise[i].size() == 20, "chopper reference count");
      check(cr_rise[i][4] == pt0_rise[4] + 3 + 5*i, $sformatf("chopper %0d reference phase", i));
    end
    // beam veto in frame 6 -> veto with the Tsync of frame 7
    check(veto_rise.size() == 1, $sformatf("%0d vetoes, expected 1", veto_rise.size()));
    if (veto_rise.size() == 1) check(veto_rise[0] == ts_rise[7] + 1, $sformatf("veto at %0d with the next Tsync %0d", veto_rise[0], ts_rise[7]));
    check(stat[R_VETO_COUNT - 64] == 1 && stat[R_TSYNC_COUNT - 64] == 20, $sformatf("veto %0d and Tsync %0d counters", stat[R_VETO_COUNT - 64], stat[R_TSYNC_COUNT - 64]));
    // loss of lock vetoes even with every mask cleared
    cfg[R_BEAM_VMASK] = 0;
    loss_of_lock <= 1;
    wait (frame == 21);
    check(stat[R_STATUS - 64][0] == 1, "loss of lock status");
    wait (frame == 22);
    loss_of_lock <= 0;
    check(veto_rise.size() >= 2, "loss of lock must veto");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
