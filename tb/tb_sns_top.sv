// tb_sns_top: full-size end-to-end test of the whole design, the Timing
// Module card and the Optical Communication Card, with every parameter at
// its default (the document's values: 9.42 ns clock, 1 us Tsync pulse,
// 200 us chopper reference pulse, 60 Hz divisor reset value, 8 KB IDMA,
// 16 KB ODMA).
// Each card has its own clock, reset, root-complex model (register
// writes and reads over the 64-bit transaction interface, random stalls),
// endpoint-core interrupt model and interrupt service routine.
// Timing Module: accelerator frames of 30000 cycles with PT0, Tstart and
// chopper TDC pulses; a beam veto; one frame without PT0 and Tstart so
// the overdue counter substitutes a Tsync; then Tsync from Tstart, then
// from the free-running divisor at its reset value (60 Hz, 1769285 cycles).
// OCC: optical and LVDS links looped back; for each link a read DMA from
// host memory, TX_GO onto the link, then a write DMA of the looped-back
// data to host memory, which must equal the source. Then target access
// without DMA: words written into the IDMA by register writes are sent
// on the LVDS link in target-read mode and read back from the ODMA.
// Every mechanism is counted and the test fails if any count is zero.
module tb_sns_top;
  import sns_pkg::*;
  import occ_pkg::*;
  import tb_tlp_pkg::*;
  localparam int P = 30000;
  // Timing Module side
  logic tm_clk = 0, tm_rst_n = 0;
  logic [63:0] tm_trn_rd = 0; logic [7:0] tm_trn_rrem_n = 0;
  logic tm_trn_rsof_n = 1, tm_trn_reof_n = 1, tm_trn_rsrc_rdy_n = 1, tm_trn_rdst_rdy_n;
  logic [6:0] tm_trn_rbar_hit_n = 7'h7E;
  logic [63:0] tm_trn_td; logic [7:0] tm_trn_trem_n;
  logic tm_trn_tsof_n, tm_trn_teof_n, tm_trn_tsrc_rdy_n, tm_trn_tdst_rdy_n = 1;
  logic [15:0] tm_cfg_completer_id = 16'h0300;
  logic tm_cfg_interrupt_rdy_n = 1, tm_cfg_interrupt_n, tm_cfg_interrupt_assert_n;
  logic [7:0] tm_cfg_interrupt_di;
  logic tm_pt0 = 0, tm_tstart = 0, tm_beam_veto = 0, tm_loss_of_lock = 0;
  logic [7:0] tm_chop_tdc = 0, tm_chop_veto = 0;
  logic tm_tsync, tm_veto; logic [7:0] tm_chop_ref;
  // OCC side
  logic occ_clk = 0, occ_rst_n = 0;
  logic [63:0] occ_trn_rd = 0; logic [7:0] occ_trn_rrem_n = 0;
  logic occ_trn_rsof_n = 1, occ_trn_reof_n = 1, occ_trn_rsrc_rdy_n = 1, occ_trn_rdst_rdy_n;
  logic [63:0] occ_trn_td; logic [7:0] occ_trn_trem_n;
  logic occ_trn_tsof_n, occ_trn_teof_n, occ_trn_tsrc_rdy_n, occ_trn_tdst_rdy_n = 1;
  logic [15:0] occ_cfg_completer_id = 16'h0400;
  logic occ_cfg_interrupt_rdy_n = 1, occ_cfg_interrupt_n, occ_cfg_interrupt_assert_n;
  logic [7:0] occ_cfg_interrupt_di;
  logic [15:0] occ_tlk_txd, occ_tlk_rxd; logic occ_tlk_tx_en, occ_tlk_rx_dv, occ_tlk_rx_er;
  logic [2:0] occ_lvds_tx, occ_lvds_rx = 0; logic occ_lvds_tx_clk, occ_lvds_rx_clk = 0;
  logic occ_wr_dma_done, occ_rd_dma_done, occ_tx_ip;
  int checks = 0, failures = 0;

  assign occ_tlk_rxd = occ_tlk_txd; assign occ_tlk_rx_dv = occ_tlk_tx_en;
  assign occ_tlk_rx_er = 1'b0;
  always @(posedge occ_clk) begin occ_lvds_rx <= occ_lvds_tx; occ_lvds_rx_clk <= occ_lvds_tx_clk; end

  sns_top dut (.*);

  // 9.42 ns timing clock (in ps); OCC at 8 ns (125 MHz, this test's choice)
  always #4710 tm_clk = ~tm_clk;
  always #4000 occ_clk = ~occ_clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] hmem [logic [31:0]];
  function automatic logic [31:0] src(input logic [31:0] a);
    return a * 32'h0101_0101 + 32'h1357_0000;
  endfunction
  int n_mrd = 0, n_mwr = 0;

  // ---- TM root-complex and endpoint-core models
  tlp_t tm_txq[$];
  initial forever begin
    tlp_t t;
    wait (tm_txq.size() > 0);
    t = tm_txq.pop_front();
    foreach (t[i]) begin
      while ($urandom_range(0, 3) == 0) begin tm_trn_rsrc_rdy_n <= 1; @(posedge tm_clk); end
      tm_trn_rd <= t[i].d; tm_trn_rsof_n <= !t[i].sof; tm_trn_reof_n <= !t[i].eof;
      tm_trn_rrem_n <= t[i].rem_n; tm_trn_rsrc_rdy_n <= 0;
      do @(posedge tm_clk); while (tm_trn_rdst_rdy_n);
    end
    tm_trn_rsrc_rdy_n <= 1; tm_trn_rsof_n <= 1; tm_trn_reof_n <= 1;
    #1;
  end

  logic [31:0] tm_cpl_data [logic [7:0]];
  tlp_t tm_cur;
  int tm_n_cpl = 0;
  always @(posedge tm_clk) begin
    tm_trn_tdst_rdy_n <= ($urandom_range(0, 4) == 0);
    if (tm_rst_n && !tm_trn_tsrc_rdy_n && !tm_trn_tdst_rdy_n) begin
      beat_t b;
      b.d = tm_trn_td; b.sof = !tm_trn_tsof_n; b.eof = !tm_trn_teof_n; b.rem_n = tm_trn_trem_n;
      tm_cur.push_back(b);
      if (b.eof) begin
        logic [31:0] dws[$], pay[$];
        unpack(tm_cur, dws); tm_cur.delete();
        case (dws[0][30:24])
          7'b10_01010: begin  // completion for a register read
            check(dws[1][31:16] == 16'h0300, "completer id");
            tm_cpl_data[dws[2][15:8]] = sw(dws[3]); tm_n_cpl++;
          end
          default: check(0, "unexpected TLP");
        endcase
      end
    end
  end

  bit tm_inta = 0; int tm_n_assert = 0, tm_n_deassert = 0;
  initial forever begin
    @(posedge tm_clk);
    if (tm_rst_n && !tm_cfg_interrupt_n && tm_cfg_interrupt_rdy_n) begin
      bit as;
      repeat ($urandom_range(0, 4)) @(posedge tm_clk);
      as = !tm_cfg_interrupt_assert_n;
      tm_cfg_interrupt_rdy_n <= 0;
      @(posedge tm_clk);
      tm_cfg_interrupt_rdy_n <= 1;
      if (as) begin check(!tm_inta, "double assert"); tm_inta = 1; tm_n_assert++; end
      else begin check(tm_inta, "deassert without assert"); tm_inta = 0; tm_n_deassert++; end
    end
  end

  int tm_tagn = 0, tm_n_wr = 0, tm_n_rd = 0;
  task automatic tm_wr(input logic [8:0] a, input logic [31:0] d);
    tm_txq.push_back(mwr32({21'h0, a, 2'b00}, d));
    wait (tm_txq.size() == 0);
    repeat (4) @(posedge tm_clk);
    tm_n_wr++;
  endtask
  task automatic tm_rd(input logic [8:0] a, output logic [31:0] d);
    logic [7:0] tag;
    tag = 8'(tm_tagn++);
    tm_cpl_data.delete(tag);
    tm_txq.push_back(mrd32({21'h0, a, 2'b00}, tag));
    for (int w = 0; w < 2000 && !tm_cpl_data.exists(tag); w++) @(posedge tm_clk);
    check(tm_cpl_data.exists(tag), "register read completed");
    d = tm_cpl_data.exists(tag) ? tm_cpl_data[tag] : 'x;
    tm_n_rd++;
  endtask

  // ---- OCC root-complex and endpoint-core models
  tlp_t occ_txq[$];
  initial forever begin
    tlp_t t;
    wait (occ_txq.size() > 0);
    t = occ_txq.pop_front();
    foreach (t[i]) begin
      while ($urandom_range(0, 3) == 0) begin occ_trn_rsrc_rdy_n <= 1; @(posedge occ_clk); end
      occ_trn_rd <= t[i].d; occ_trn_rsof_n <= !t[i].sof; occ_trn_reof_n <= !t[i].eof;
      occ_trn_rrem_n <= t[i].rem_n; occ_trn_rsrc_rdy_n <= 0;
      do @(posedge occ_clk); while (occ_trn_rdst_rdy_n);
    end
    occ_trn_rsrc_rdy_n <= 1; occ_trn_rsof_n <= 1; occ_trn_reof_n <= 1;
    #1;
  end

  logic [31:0] occ_cpl_data [logic [7:0]];
  tlp_t occ_cur;
  int occ_n_cpl = 0;
  always @(posedge occ_clk) begin
    occ_trn_tdst_rdy_n <= ($urandom_range(0, 4) == 0);
    if (occ_rst_n && !occ_trn_tsrc_rdy_n && !occ_trn_tdst_rdy_n) begin
      beat_t b;
      b.d = occ_trn_td; b.sof = !occ_trn_tsof_n; b.eof = !occ_trn_teof_n; b.rem_n = occ_trn_trem_n;
      occ_cur.push_back(b);
      if (b.eof) begin
        logic [31:0] dws[$], pay[$];
        unpack(occ_cur, dws); occ_cur.delete();
        case (dws[0][30:24])
          7'b10_01010: begin  // completion for a register read
            check(dws[1][31:16] == 16'h0400, "completer id");
            occ_cpl_data[dws[2][15:8]] = sw(dws[3]); occ_n_cpl++;
          end
          7'b00_00000: begin  // DMA read request
            pay.delete();
            for (int i = 0; i < int'(dws[0][9:0]); i++) begin
              logic [31:0] a;
              a = dws[2] + 32'(4 * i);
              pay.push_back(hmem.exists(a) ? hmem[a] : src(a));
            end
            occ_txq.push_back(cpld(dws[1][31:16], dws[1][15:8], pay));
            n_mrd++;
          end
          7'b10_00000: begin  // DMA write
            check(dws.size() == 3 + int'(dws[0][9:0]), "write TLP length");
            for (int i = 0; i < int'(dws[0][9:0]); i++) hmem[dws[2] + 32'(4 * i)] = sw(dws[3 + i]);
            n_mwr++;
          end
          default: check(0, "unexpected TLP");
        endcase
      end
    end
  end

  bit occ_inta = 0; int occ_n_assert = 0, occ_n_deassert = 0;
  initial forever begin
    @(posedge occ_clk);
    if (occ_rst_n && !occ_cfg_interrupt_n && occ_cfg_interrupt_rdy_n) begin
      bit as;
      repeat ($urandom_range(0, 4)) @(posedge occ_clk);
      as = !occ_cfg_interrupt_assert_n;
      occ_cfg_interrupt_rdy_n <= 0;
      @(posedge occ_clk);
      occ_cfg_interrupt_rdy_n <= 1;
      if (as) begin check(!occ_inta, "double assert"); occ_inta = 1; occ_n_assert++; end
      else begin check(occ_inta, "deassert without assert"); occ_inta = 0; occ_n_deassert++; end
    end
  end

  int occ_tagn = 0, occ_n_wr = 0, occ_n_rd = 0;
  task automatic occ_wr(input logic [9:0] a, input logic [31:0] d);
    occ_txq.push_back(mwr32({20'h0, a, 2'b00}, d));
    wait (occ_txq.size() == 0);
    repeat (4) @(posedge occ_clk);
    occ_n_wr++;
  endtask
  task automatic occ_rd(input logic [9:0] a, output logic [31:0] d);
    logic [7:0] tag;
    tag = 8'(occ_tagn++);
    occ_cpl_data.delete(tag);
    occ_txq.push_back(mrd32({20'h0, a, 2'b00}, tag));
    for (int w = 0; w < 2000 && !occ_cpl_data.exists(tag); w++) @(posedge occ_clk);
    check(occ_cpl_data.exists(tag), "register read completed");
    d = occ_cpl_data.exists(tag) ? occ_cpl_data[tag] : 'x;
    occ_n_rd++;
  endtask

  // ---- Timing Module: accelerator model and output monitors
  int phase = 0;  // 1: PT0 source, 2: Tstart source, 3: divisor source
  int frame = 0; bit run = 0, skip = 0;
  int ts_n[4] = '{0, 0, 0, 0}, ts_last = 0, ts_gap = 0, ts_width = 0, cr_width = 0;
  int n_veto = 0, n_cref = 0, n_overdue_ts = 0, cyc = 0, ts_rise = 0, cr_rise = 0;
  logic ts_d = 0, v_d = 0, c_d = 0;
  always @(posedge tm_clk) begin
    cyc <= cyc + 1;
    ts_d <= tm_tsync; v_d <= tm_veto; c_d <= tm_chop_ref[0];
    if (tm_rst_n) begin
      if (tm_tsync && !ts_d) begin
        ts_n[phase]++;
        if (skip) n_overdue_ts++;
        ts_gap = cyc - ts_last; ts_last = cyc; ts_rise = cyc;
      end
      if (!tm_tsync && ts_d) ts_width = cyc - ts_rise;
      if (tm_veto && !v_d) n_veto++;
      if (tm_chop_ref[0] && !c_d) begin n_cref++; cr_rise = cyc; end
      if (!tm_chop_ref[0] && c_d) cr_width = cyc - cr_rise;
    end
  end
  initial begin
    wait (run);
    forever begin
      skip = (frame == 4);
      for (int c = 0; c < P; c++) begin
        tm_pt0 <= (c < 5) && !skip && phase == 1;
        tm_tstart <= (c < 5) && !skip;
        tm_chop_tdc <= {8{c >= 300 && c < 305}};
        tm_beam_veto <= (frame == 2 && c >= 1000 && c < 1005);
        @(posedge tm_clk);
      end
      frame++;
    end
  end

  // Timing Module interrupt service routine
  logic [31:0] tm_int_seen = 0; int tm_serviced = 0; bit tm_isr_on = 0;
  initial forever begin
    logic [31:0] v;
    @(posedge tm_clk);
    if (tm_isr_on && tm_inta) begin
      tm_rd(R_INT_STATUS, v);
      tm_int_seen |= v;
      tm_wr(R_INT_CLEAR, v);
      for (int w = 0; w < 200 && tm_inta; w++) @(posedge tm_clk);
      tm_serviced++;
    end
  end

  task automatic tm_test();
    logic [31:0] v;
    tm_rd(R_FREE_DIV, v);
    check(v == DIV_60HZ_CYC, $sformatf("divisor reset value %0d (60 Hz)", v));
    tm_wr(R_TSYNC_DELAY, 100);
    tm_wr(R_BEAM_VMASK, 1);
    tm_wr(R_PT0_OVERDUE, P + P / 2);
    tm_wr(R_INT_MASK, (1 << INT_BEAM) | (1 << INT_OVERDUE));
    tm_wr(R_TSYNC_CTRL, 32'(TSRC_PT0) | 32'h4);
    tm_rd(R_TSYNC_DELAY, v); check(v == 100, "Tsync delay read-back");
    tm_isr_on = 1;
    phase = 1; run = 1;
    wait (frame == 6);
    tm_wr(R_TSYNC_CTRL, 32'(TSRC_TSTART));
    phase = 2;
    wait (frame == 9);
    // the divisor keeps its reset value: Tsync at 60 Hz
    tm_wr(R_TSYNC_CTRL, 32'(TSRC_DIV));
    phase = 3;
    wait (frame == 10);
    ts_n[3] = 0;
    wait (ts_n[3] == 2);
    repeat (200) @(posedge tm_clk);
    tm_rd(R_PT0_TIME0, v);   check(v != 0, "PT0 time register");
    tm_rd(R_CHOP_PERIOD0, v); check(v == P, $sformatf("chopper period %0d", v));
    tm_rd(R_VETO_COUNT, v);   check(v >= 1, "veto count register");
    check(ts_n[1] >= 4, $sformatf("Tsync from PT0: %0d", ts_n[1]));
    check(ts_n[2] >= 2, $sformatf("Tsync from Tstart: %0d", ts_n[2]));
    check(ts_n[3] >= 2, $sformatf("Tsync from divisor: %0d", ts_n[3]));
    check(ts_gap == DIV_60HZ_CYC, $sformatf("divisor Tsync spacing %0d", ts_gap));
    check(ts_width == PULSE_1US_CYC, $sformatf("Tsync width %0d", ts_width));
    check(n_overdue_ts >= 1, "Tsync substituted by the overdue counter");
    check(n_veto >= 1, "beam veto");
    check(n_cref >= 8 && cr_width == CHOP_REF_CYC, $sformatf("chopper reference %0d, width %0d", n_cref, cr_width));
    check(tm_int_seen[INT_OVERDUE] && tm_int_seen[INT_BEAM], $sformatf("interrupt sources %h", tm_int_seen));
    check(tm_serviced >= 2 && tm_n_assert == tm_n_deassert, "Timing Module interrupts");
  endtask

  // ---- OCC flow
  int occ_serviced = 0, n_opt = 0, n_lvds = 0, n_tgt = 0;
  task automatic occ_service(output logic [31:0] st);
    for (int w = 0; w < 50000 && !occ_inta; w++) @(posedge occ_clk);
    check(occ_inta, "OCC interrupt asserted");
    occ_rd(O_STATUS, st);
    occ_wr(O_INT_CLEAR, 1);
    for (int w = 0; w < 200 && occ_inta; w++) @(posedge occ_clk);
    check(!occ_inta, "OCC interrupt deasserted");
    occ_serviced++;
  endtask

  task automatic run_link(input bit opt, input logic [31:0] sbase, input logic [31:0] dbase,
                          input int size, input int count);
    logic [31:0] v, ctl;
    ctl = opt ? 32'h2 : 32'h0;
    occ_wr(O_CTRL, ctl);
    occ_wr(O_RD_ADDR, sbase); occ_wr(O_RD_SIZE, size); occ_wr(O_RD_COUNT, count);
    occ_wr(O_INT_ENABLE, 32'h4);
    occ_wr(O_CTRL, ctl | 32'h8);
    occ_service(v);
    check(v[3], "rd_dma_done in STATUS");
    occ_wr(O_TX_LEN, size * count);
    occ_wr(O_INT_ENABLE, 32'h1);
    occ_wr(O_CTRL, ctl | 32'h1);
    occ_service(v);
    for (int w = 0; w < 20000; w++) begin
      occ_rd(O_OFIFO_COUNT, v);
      if (v == 32'(size * count)) break;
      repeat (50) @(posedge occ_clk);
    end
    check(v == 32'(size * count), $sformatf("output FIFO holds %0d words", v));
    if (opt) n_opt++; else n_lvds++;
    occ_wr(O_WR_ADDR, dbase); occ_wr(O_WR_SIZE, size); occ_wr(O_WR_COUNT, count);
    occ_wr(O_INT_ENABLE, 32'h2);
    occ_wr(O_CTRL, ctl | 32'h4);
    occ_service(v);
    check(v[2], "wr_dma_done in STATUS");
    for (int i = 0; i < size * count; i++) begin
      logic [31:0] a, b;
      a = sbase + 32'(4 * i); b = dbase + 32'(4 * i);
      check(hmem.exists(b) && hmem[b] == src(a), $sformatf("host word %0d via %s link", i, opt ? "optical" : "LVDS"));
    end
  endtask

  task automatic occ_test();
    logic [31:0] v;
    occ_rd(O_CTRL, v); check(v[1] == 1, "optical link selected at reset");
    run_link(1, 32'h0001_0000, 32'h0004_0000, 32, 16);
    run_link(0, 32'h0002_0000, 32'h0005_0000, 32, 4);
    occ_rd(O_IN_COUNT, v); check(v == 32 * 20, $sformatf("input count %0d", v));
    // target write into the IDMA, LVDS loopback into the ODMA, target read
    begin
      logic [31:0] tw[8];
      foreach (tw[i]) begin tw[i] = $urandom; occ_wr(O_IDMA_DATA, tw[i]); end
      occ_wr(O_TX_LEN, 8);
      occ_wr(O_INT_ENABLE, 32'h1);
      occ_wr(O_CTRL, 32'h11);
      occ_service(v);
      for (int w = 0; w < 2000; w++) begin
        occ_rd(O_ODMA_LEN, v);
        if (v == 32) break;
        repeat (20) @(posedge occ_clk);
      end
      check(v == 32, $sformatf("ODMA holds %0d bytes", v));
      occ_rd(O_STATUS, v); check(v[1], "STATUS: target-read data available");
      foreach (tw[i]) begin
        occ_rd(O_ODMA_DATA, v);
        check(v == tw[i], $sformatf("target read word %0d", i));
        if (v == tw[i]) n_tgt++;
      end
      occ_rd(O_ODMA_LEN, v); check(v == 0, "ODMA empty after the target reads");
    end
  endtask

  initial begin
    repeat (3) @(posedge tm_clk);
    tm_rst_n <= 1; occ_rst_n <= 1;
    repeat (3) @(posedge tm_clk);
    fork
      tm_test();
      occ_test();
    join
    $display("mechanisms: tsync_pt0=%0d tsync_tstart=%0d tsync_div=%0d overdue=%0d veto=%0d chop_ref=%0d tm_irq=%0d tm_wr=%0d tm_rd=%0d occ_mrd=%0d occ_mwr=%0d optical=%0d lvds=%0d target=%0d occ_irq=%0d occ_wr=%0d occ_rd=%0d",
             ts_n[1], ts_n[2], ts_n[3], n_overdue_ts, n_veto, n_cref, tm_serviced, tm_n_wr, tm_n_rd,
             n_mrd, n_mwr, n_opt, n_lvds, n_tgt, occ_serviced, occ_n_wr, occ_n_rd);
    check(ts_n[1] > 0 && ts_n[2] > 0 && ts_n[3] > 0 && n_overdue_ts > 0 && n_veto > 0 && n_cref > 0 &&
          tm_serviced > 0 && tm_n_wr > 0 && tm_n_rd > 0 && n_mrd > 0 && n_mwr > 0 && n_opt > 0 &&
          n_lvds > 0 && n_tgt > 0 && occ_serviced > 0 && occ_n_wr > 0 && occ_n_rd > 0, "every mechanism happened");
    check(n_mrd == 20 && n_mwr == 20, "DMA TLP counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge tm_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
