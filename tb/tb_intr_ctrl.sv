// tb_intr_ctrl: self-checking test of the legacy interrupt state machine
// against a model of the endpoint core's interrupt handshake. The core
// model acknowledges (cfg_interrupt_rdy_n low for one cycle) a random
// number of cycles after it sees cfg_interrupt_n low, and records whether
// each request was an Assert or a Deassert INTA message. The host model
// clears the interrupt a random time later. Checks the message order,
// that cfg_interrupt_n is released after each acknowledge, that a
// request arriving during service is not lost, and the state sequence.
module tb_intr_ctrl;
  logic clk = 0, rst_n = 0, intr_req = 0, intr_clr = 0, cfg_interrupt_rdy_n = 1;
  logic cfg_interrupt_n, cfg_interrupt_assert_n;
  logic [7:0] cfg_interrupt_di;
  logic [2:0] intr_state;
  int checks = 0, failures = 0;
  int asserts = 0, deasserts = 0;
  bit inta_level = 0;

  intr_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // endpoint core model
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && !cfg_interrupt_n && cfg_interrupt_rdy_n) begin
        bit as;
        repeat ($urandom_range(0, 5)) @(posedge clk);
        as = !cfg_interrupt_assert_n;
        cfg_interrupt_rdy_n <= 0;
        @(posedge clk);
        cfg_interrupt_rdy_n <= 1;
        if (as) begin
          check(!inta_level, "assert while INTA already asserted");
          inta_level = 1; asserts++;
        end else begin
          check(inta_level, "deassert while INTA not asserted");
          inta_level = 0; deasserts++;
        end
        #1;
        check(cfg_interrupt_n, "cfg_interrupt_n not released after acknowledge");
        check(cfg_interrupt_di == 8'h00, "INTA not selected");
      end
    end
  end

  // state sequence monitor: rst -> ack -> srvc -> ack2 -> done -> rst
  logic [2:0] prev = 0;
  int bad_seq = 0;
  always @(posedge clk) if (rst_n) begin
    if (intr_state != prev) begin
      if (!((prev == 0 && intr_state == 1) || (prev == 1 && intr_state == 2) ||
            (prev == 2 && intr_state == 3) || (prev == 3 && intr_state == 4) ||
            (prev == 4 && intr_state == 0))) bad_seq++;
    end
    prev <= intr_state;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 30; n++) begin
      intr_req <= 1; @(posedge clk); intr_req <= 0;
      // wait until the interrupt is asserted at the core
      while (!inta_level) @(posedge clk);
      #1 check(intr_state == 3'd2, "not in service state while asserted");
      if (n % 5 == 0) begin           // a second request during service
        intr_req <= 1; @(posedge clk); intr_req <= 0;
      end
      repeat ($urandom_range(1, 20)) @(posedge clk);
      intr_clr <= 1; @(posedge clk); intr_clr <= 0;
      while (inta_level) @(posedge clk);
      if (n % 5 == 0) begin
        while (!inta_level) @(posedge clk);
        intr_clr <= 1; @(posedge clk); intr_clr <= 0;
        while (inta_level) @(posedge clk);
      end
      repeat (5) @(posedge clk);
      check(intr_state == 3'd0, "not back in intr_rst");
    end
    check(asserts == 36 && deasserts == 36,
          $sformatf("asserts %0d deasserts %0d, expected 36 each", asserts, deasserts));
    check(bad_seq == 0, "illegal state transition");
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
