// tb_chopper_ref_gen: self-checking test of the chopper reference pulse
// generator. Each Tstart strobe must raise chopper i's reference after
// its own delay + 1 cycles, for exactly REF_CYC cycles.
module tb_chopper_ref_gen;
  localparam int N = 8, RC = 20;
  logic clk = 0, rst_n = 0, tstart_evt = 0;
  logic [31:0] delay [N];
  logic [N-1:0] chop_ref;
  int checks = 0, failures = 0;
  int cyc = 0;
  int rise [N], fall [N];
  logic [N-1:0] d = '0;

  chopper_ref_gen #(.N_CHOP(N), .REF_CYC(RC)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    d <= chop_ref;
    for (int i = 0; i < N; i++) begin
      if (chop_ref[i] && !d[i]) rise[i] = cyc;
      if (!chop_ref[i] && d[i]) fall[i] = cyc;
    end
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int t;
  initial begin
    foreach (delay[i]) delay[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 20; n++) begin
      foreach (delay[i]) delay[i] = $urandom_range(0, 100);
      foreach (rise[i]) begin rise[i] = -1; fall[i] = -1; end
      @(posedge clk);
      tstart_evt <= 1; t = cyc + 1;
      @(posedge clk); tstart_evt <= 0;
      repeat (150) @(posedge clk);
      for (int i = 0; i < N; i++) begin
        check(rise[i] == t + int'(delay[i]) + 1,
              $sformatf("chopper %0d rise %0d expected %0d", i, rise[i], t + delay[i] + 1));
        check(fall[i] - rise[i] == RC, $sformatf("chopper %0d width %0d", i, fall[i] - rise[i]));
      end
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
