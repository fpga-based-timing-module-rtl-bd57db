// tb_veto_gen: self-checking test of the veto generation circuit.
// Runs many frames (a frame ends with a Tsync strobe). In each frame it
// randomly fires beam veto, PT0 overdue, chopper vetoes and loss of lock
// under random masks and frame delays, and predicts with its own shift
// register model whether a veto pulse must follow the Tsync. It also
// checks the pulse width and the masked interrupt output.
module tb_veto_gen;
  import sns_pkg::*;
  localparam int PW = 4;
  logic clk = 0, rst_n = 0;
  logic beam_veto_evt = 0, overdue_evt = 0, loss_of_lock = 0, tsync_evt = 0;
  logic [7:0] chop_veto_evt = '0;
  logic beam_mask = 0, pt0_mask = 0;
  logic [7:0] chop_mask = '0;
  logic [3:0] frame_delay = '0;
  logic [N_INT-1:0] int_src = '0, int_mask = '0;
  logic veto, veto_evt, int_evt;
  logic [N_INT-1:0] int_src_q;
  int checks = 0, failures = 0;
  int vetoes = 0;

  veto_gen #(.N_CHOP(8), .DEPTH(16), .PULSE_CYC(PW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [15:0] model_sr = '0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 300; f++) begin
      bit cause;
      int width;
      cause = 0;
      beam_mask   <= $urandom_range(0, 1);
      pt0_mask    <= $urandom_range(0, 1);
      chop_mask   <= 8'($urandom);
      frame_delay <= (f < 150) ? 4'd0 : 4'($urandom_range(0, 3));
      @(posedge clk);
      repeat ($urandom_range(1, 4)) begin
        int k;
        k = $urandom_range(0, 9);
        beam_veto_evt <= (k == 0);
        overdue_evt   <= (k == 1);
        chop_veto_evt <= (k >= 2 && k <= 7) ? 8'(1 << $urandom_range(0, 7)) : 8'h0;
        loss_of_lock  <= (k == 8 && $urandom_range(0, 3) == 0);
        @(posedge clk);
        cause |= (beam_veto_evt && beam_mask) || (overdue_evt && pt0_mask) ||
                 |(chop_veto_evt & chop_mask) || loss_of_lock;
        beam_veto_evt <= 0; overdue_evt <= 0; chop_veto_evt <= 0; loss_of_lock <= 0;
        @(posedge clk);
      end
      model_sr = {model_sr[14:0], cause};
      tsync_evt <= 1;
      @(posedge clk);
      tsync_evt <= 0;
      #1;
      check(veto == model_sr[frame_delay],
            $sformatf("frame %0d: veto %0d expected %0d", f, veto, model_sr[frame_delay]));
      width = 0;
      while (veto) begin width++; @(posedge clk); #1; end
      if (model_sr[frame_delay]) begin
        vetoes++;
        check(width == PW, $sformatf("veto width %0d", width));
      end
    end
    check(vetoes > 20, "too few vetoes exercised");
    // interrupt mask
    for (int i = 0; i < 50; i++) begin
      logic [N_INT-1:0] m, s;
      m = N_INT'($urandom); s = N_INT'($urandom);
      s[INT_BEAM] = 0; s[INT_OVERDUE] = 0; s[7:0] = 0;
      int_mask <= m; int_src <= s;
      @(posedge clk); int_src <= '0; #1;
      check(int_evt == |(s & m), "int_evt");
      check(int_src_q == (s & m), "int_src_q");
    end
    int_mask <= '1; beam_veto_evt <= 1;
    @(posedge clk); beam_veto_evt <= 0; #1;
    check(int_evt && int_src_q[INT_BEAM], "beam veto interrupt");
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
