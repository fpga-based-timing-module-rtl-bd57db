// tb_timing_module: end-to-end test of the Timing Module card through its
// PCI Express transaction interface. A root-complex model sends memory
// write and read TLPs (with random source stalls), a sink takes
// completions with random destination stalls, and an endpoint-core model
// acknowledges INTA assert/deassert messages. The testbench programs the
// timing registers, reads them back, then runs accelerator frames
// (PT0 and Tstart every P cycles, one beam veto) with the Tsync interrupt
// enabled, services every interrupt by reading INT_STATUS and writing
// INT_CLEAR, and finally reads the PT0-to-PT0 time and counters.
// Short pulse lengths (PULSE_CYC, REF_CYC) keep the run short.
module tb_timing_module;
  import sns_pkg::*;
  import tb_tlp_pkg::*;
  localparam int P = 400;
  logic clk = 0, rst_n = 0;
  logic [63:0] trn_rd = 0; logic [7:0] trn_rrem_n = 0;
  logic trn_rsof_n = 1, trn_reof_n = 1, trn_rsrc_rdy_n = 1;
  logic [6:0] trn_rbar_hit_n = 7'h7E;
  logic trn_rdst_rdy_n;
  logic [63:0] trn_td; logic [7:0] trn_trem_n;
  logic trn_tsof_n, trn_teof_n, trn_tsrc_rdy_n, trn_tdst_rdy_n = 1;
  logic [15:0] cfg_completer_id = 16'h0300;
  logic cfg_interrupt_rdy_n = 1, cfg_interrupt_n, cfg_interrupt_assert_n;
  logic [7:0] cfg_interrupt_di;
  logic pt0 = 0, tstart = 0, beam_veto = 0, loss_of_lock = 0;
  logic [7:0] chop_tdc = 0, chop_veto = 0;
  logic tsync, veto; logic [7:0] chop_ref;
  int checks = 0, failures = 0;

  timing_module #(.PULSE_CYC(4), .REF_CYC(20)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // completion sink
  tlp_t rx_q[$];
  tlp_t cur;
  always @(posedge clk) begin
    trn_tdst_rdy_n <= ($urandom_range(0, 3) == 0);
    if (rst_n && !trn_tsrc_rdy_n && !trn_tdst_rdy_n) begin
      beat_t b;
      b.d = trn_td; b.sof = !trn_tsof_n; b.eof = !trn_teof_n; b.rem_n = trn_trem_n;
      cur.push_back(b);
      if (b.eof) begin rx_q.push_back(cur); cur.delete(); end
    end
  end

  // endpoint core interrupt model
  bit inta = 0; int asserts = 0, deasserts = 0;
  initial forever begin
    @(posedge clk);
    if (rst_n && !cfg_interrupt_n && cfg_interrupt_rdy_n) begin
      bit as;
      repeat ($urandom_range(0, 4)) @(posedge clk);
      as = !cfg_interrupt_assert_n;
      cfg_interrupt_rdy_n <= 0;
      @(posedge clk);
      cfg_interrupt_rdy_n <= 1;
      if (as) begin check(!inta, "double assert"); inta = 1; asserts++; end
      else begin check(inta, "deassert without assert"); inta = 0; deasserts++; end
    end
  end

  task automatic send(input tlp_t t);
    foreach (t[i]) begin
      while ($urandom_range(0, 3) == 0) begin trn_rsrc_rdy_n <= 1; @(posedge clk); end
      trn_rd <= t[i].d; trn_rsof_n <= !t[i].sof; trn_reof_n <= !t[i].eof;
      trn_rrem_n <= t[i].rem_n; trn_rsrc_rdy_n <= 0;
      do @(posedge clk); while (trn_rdst_rdy_n);
    end
    trn_rsrc_rdy_n <= 1; trn_rsof_n <= 1; trn_reof_n <= 1;
  endtask

  task automatic wr(input logic [8:0] a, input logic [31:0] d);
    send(mwr32({21'h0, a, 2'b00}, d));
  endtask

  int nrd = 0;
  task automatic rd(input logic [8:0] a, output logic [31:0] d);
    logic [31:0] dws[$]; logic [7:0] tag;
    tag = 8'($urandom);
    send(mrd32({21'h0, a, 2'b00}, tag));
    for (int w = 0; w < 200 && rx_q.size() == 0; w++) @(posedge clk);
    check(rx_q.size() == 1, "one completion per read");
    if (rx_q.size() == 0) begin d = 'x; return; end
    unpack(rx_q.pop_front(), dws);
    check(dws.size() == 4, "completion with one data DWORD");
    check(dws[0][30:24] == 7'b10_01010 && dws[0][9:0] == 1, "CplD header");
    check(dws[1][31:16] == 16'h0300 && dws[1][11:0] == 12'd4, "completer id and byte count");
    check(dws[2][31:8] == {16'h0100, tag}, "requester id and tag");
    d = sw(dws[3]);
    nrd++;
  endtask

  // accelerator model
  bit run = 0; int frame = 0; int ts_n = 0, veto_n = 0, cr_n = 0;
  logic ts_d = 0, v_d = 0, c_d = 0;
  always @(posedge clk) begin
    ts_d <= tsync; v_d <= veto; c_d <= chop_ref[0];
    if (rst_n && tsync && !ts_d) ts_n++;
    if (rst_n && veto && !v_d) veto_n++;
    if (rst_n && chop_ref[0] && !c_d) cr_n++;
  end
  initial begin
    wait (run);
    forever begin
      for (int c = 0; c < P; c++) begin
        pt0 <= (c < 3); tstart <= (c < 3);
        chop_tdc <= {8{c >= 40 && c < 43}};
        beam_veto <= (frame == 2 && c >= 100 && c < 103);
        @(posedge clk);
      end
      frame++;
    end
  end

  initial begin
    logic [31:0] v, shadow [64];
    int serviced = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    // register write and read-back over PCI Express
    for (int i = 0; i < 64; i++) shadow[i] = 0;
    for (int n = 0; n < 30; n++) begin
      logic [8:0] a; logic [31:0] d;
      a = 9'($urandom_range(32, 63)); d = $urandom;
      wr(a, d); shadow[a] = d;
      a = 9'($urandom_range(32, 63));
      rd(a, v);
      check(v == shadow[a], $sformatf("read-back %0h: %h expected %h", a, v, shadow[a]));
    end
    rd(R_FREE_DIV, v);
    check(v == DIV_60HZ_CYC, "free-running divisor reset value");
    wr(R_TSYNC_DELAY, 10);
    wr(R_BEAM_VMASK, 1);
    wr(R_INT_MASK, 1 << INT_TSYNC);
    wr(R_TSYNC_CTRL, 32'(TSRC_PT0));
    rd(R_TSYNC_DELAY, v); check(v == 10, "Tsync delay read-back");
    run = 1;
    // interrupt service loop for 8 frames
    while (frame < 8) begin
      @(posedge clk);
      if (inta) begin
        rd(R_INT_STATUS, v);
        check(v[INT_TSYNC], $sformatf("INT_STATUS %h lacks Tsync", v));
        wr(R_INT_CLEAR, v);
        for (int w = 0; w < 100 && inta; w++) @(posedge clk);
        check(!inta, "interrupt deasserted after INT_CLEAR");
        serviced++;
      end
    end
    wr(R_INT_MASK, 0);
    repeat (50) @(posedge clk);
    rd(R_PT0_TIME0, v);        check(v == P, $sformatf("PT0 time %0d", v));
    rd(R_PT0_TIME0 + 1, v);    check(v == 2 * P, $sformatf("PT0 time 1 %0d", v));
    rd(R_CHOP_PERIOD0, v);     check(v == P, $sformatf("chopper period %0d", v));
    rd(R_VETO_COUNT, v);       check(v == 1, $sformatf("veto count %0d", v));
    // the shadow copy is taken at a Tsync, before that Tsync is counted
    rd(R_TSYNC_COUNT, v);      check(v == 32'(ts_n - 1), $sformatf("Tsync count %0d vs %0d", v, ts_n));
    check(ts_n >= 8, "Tsync every frame");
    check(veto_n == 1, $sformatf("veto pulses %0d", veto_n));
    check(cr_n >= 8, "chopper reference pulses");
    check(serviced >= 6, $sformatf("interrupts serviced %0d", serviced));
    check(asserts == deasserts && asserts == serviced, "assert/deassert pairs");
    check(nrd >= 38, "reads completed");
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
