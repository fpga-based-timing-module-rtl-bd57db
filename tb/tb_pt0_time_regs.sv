// tb_pt0_time_regs: self-checking test of the PT0-to-PT0 time registers.
// Sends events at random intervals, keeps its own list of event times and
// checks that register k equals PT0(n) - PT0(n-1-k) for every k that has
// enough history, and that the valid flags fill in order.
module tb_pt0_time_regs;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, evt = 0;
  logic [31:0] time_q [N];
  logic [N-1:0] valid_q;
  int checks = 0, failures = 0;
  longint unsigned cyc = 0;
  longint unsigned ts[$];

  pt0_time_regs #(.N_REGS(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 40; e++) begin
      repeat ($urandom_range(3, 60)) @(posedge clk);
      evt <= 1; ts.push_front(cyc);
      @(posedge clk); evt <= 0;
      @(posedge clk); #1;
      for (int k = 0; k < N; k++) begin
        if (k + 1 < ts.size()) begin
          check(valid_q[k] == 1, $sformatf("valid %0d after %0d events", k, e + 1));
          check(time_q[k] == 32'(ts[0] - ts[k+1]),
                $sformatf("event %0d reg %0d: %0d != %0d", e, k, time_q[k], ts[0] - ts[k+1]));
        end else begin
          check(valid_q[k] == 0, $sformatf("valid %0d too early", k));
        end
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
