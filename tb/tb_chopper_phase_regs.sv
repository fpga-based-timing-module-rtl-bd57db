// tb_chopper_phase_regs: self-checking test of the chopper phase
// registers. Random reference events and random TDC pulses on all eight
// choppers; a model of the last event times gives the expected TDC period
// and reference-to-TDC phase of every chopper.
module tb_chopper_phase_regs;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, ref_evt = 0;
  logic [N-1:0] tdc_evt = '0;
  logic [31:0] period_q [N];
  logic [31:0] phase_q  [N];
  logic [N-1:0] tdc_seen;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0, last_ref = 0;
  longint unsigned last_tdc [N];
  int ntdc [N];
  bit ref_seen = 0;

  chopper_phase_regs #(.N_CHOP(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    foreach (ntdc[i]) ntdc[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // count cycles from the first cycle after reset, like the DUT
    for (int s = 0; s < 3000; s++) begin
      logic r; logic [N-1:0] t;
      r = ($urandom_range(0, 99) < 3);
      t = '0;
      for (int i = 0; i < N; i++) t[i] = ($urandom_range(0, 99) < 4);
      ref_evt <= r; tdc_evt <= t;
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) if (t[i]) begin
        ntdc[i]++;
        // a reference in the same cycle as the TDC counts for the next one
        if (ref_seen) check(phase_q[i] == 32'(cyc - last_ref),
              $sformatf("chopper %0d phase %0d != %0d", i, phase_q[i], cyc - last_ref));
        if (ntdc[i] > 1) check(period_q[i] == 32'(cyc - last_tdc[i]),
                               $sformatf("chopper %0d period %0d != %0d", i, period_q[i], cyc - last_tdc[i]));
        check(tdc_seen[i] == (ntdc[i] > 1), "tdc_seen");
        last_tdc[i] = cyc;
      end
      if (r) begin last_ref = cyc; ref_seen = 1; end
      cyc++;
    end
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
