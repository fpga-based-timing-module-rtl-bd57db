// tb_tsync_gen: self-checking test of the Tsync generation circuit.
// Checks the Tsync latency (trigger + delay + 1 cycles) and pulse width
// for PT0 and Tstart sources, that the unselected source is ignored, the
// 60 Hz-style free running divisor period, the PT0 overdue counter and the
// Tsync it substitutes for a missing PT0, and that "off" sends nothing.
module tb_tsync_gen;
  import sns_pkg::*;
  localparam int PW = 5;
  logic clk = 0, rst_n = 0, pt0_evt = 0, tstart_evt = 0;
  tsync_src_e src_sel = TSRC_PT0;
  logic overdue_en = 0;
  logic [31:0] delay = 0, overdue_time = 0, divisor = 0;
  logic tsync, tsync_evt, overdue_evt, div_evt;
  int checks = 0, failures = 0;
  int cyc = 0;
  int rises[$], od[$], tevt = 0;
  logic tsync_d = 0;

  tsync_gen #(.PULSE_CYC(PW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    tsync_d <= tsync;
    if (tsync && !tsync_d) rises.push_back(cyc);
    if (overdue_evt) od.push_back(cyc);
    if (tsync_evt) tevt++;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // strobe in cycle t: returns t (the cycle number when the DUT samples it)
  task automatic strobe(input bit is_pt0, output int t);
    if (is_pt0) pt0_evt <= 1; else tstart_evt <= 1;
    t = cyc + 1;   // cyc still holds the previous cycle here
    @(posedge clk);
    pt0_evt <= 0; tstart_evt <= 0;
  endtask

  int t, width;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // PT0 and Tstart sources with random delays
    for (int n = 0; n < 12; n++) begin
      bit use_pt0;
      use_pt0 = (n % 2 == 0);
      src_sel <= use_pt0 ? TSRC_PT0 : TSRC_TSTART;
      delay   <= $urandom_range(0, 40);
      @(posedge clk);
      rises.delete();
      // the other source must be ignored
      strobe(!use_pt0, t);
      repeat (60) @(posedge clk);
      check(rises.size() == 0, "unselected source made a Tsync");
      strobe(use_pt0, t);
      repeat (60) @(posedge clk);
      check(rises.size() == 1, $sformatf("one Tsync expected, got %0d", rises.size()));
      if (rises.size() == 1)
        check(rises[0] == t + int'(delay) + 1,
              $sformatf("Tsync at %0d, expected %0d (delay %0d)", rises[0], t + delay + 1, delay));
    end
    // pulse width
    src_sel <= TSRC_PT0; delay <= 3; @(posedge clk);
    strobe(1, t);
    width = 0;
    repeat (30) begin @(posedge clk); if (tsync) width++; end
    check(width == PW, $sformatf("Tsync width %0d", width));
    // free running divisor
    divisor <= 50; src_sel <= TSRC_DIV; delay <= 0;
    repeat (60) @(posedge clk);
    rises.delete();
    repeat (500) @(posedge clk);
    check(rises.size() == 10, $sformatf("divisor: %0d Tsyncs in 500 cycles", rises.size()));
    for (int i = 1; i < rises.size(); i++)
      check(rises[i] - rises[i-1] == 50, "divisor period");
    // off
    divisor <= 0; src_sel <= TSRC_OFF;
    repeat (60) @(posedge clk);
    rises.delete();
    strobe(1, t); strobe(0, t);
    repeat (100) @(posedge clk);
    check(rises.size() == 0, "source off still sends Tsync");
    // PT0 overdue: one PT0, then silence
    src_sel <= TSRC_PT0; overdue_time <= 30; overdue_en <= 1; delay <= 0;
    @(posedge clk);
    od.delete(); rises.delete();
    strobe(1, t);
    repeat (75) @(posedge clk);
    check(od.size() == 2, $sformatf("overdue events %0d, expected 2", od.size()));
    if (od.size() >= 1) check(od[0] == t + 31, $sformatf("overdue at %0d, expected %0d", od[0], t + 31));
    check(rises.size() == 3, $sformatf("PT0 + substitute Tsyncs: %0d", rises.size()));
    // PT0 arriving in time keeps the counter from expiring
    od.delete();
    repeat (6) begin strobe(1, t); repeat (20) @(posedge clk); end
    check(od.size() == 0, "overdue despite regular PT0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
