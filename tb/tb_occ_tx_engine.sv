// tb_occ_tx_engine: self-checking test of the OCC transmit engine. Each
// round raises a random subset of the three requests in the same cycle:
// a register-read completion (one cycle ahead), a DMA memory write of 1 to 32 DWORDs (taken
// from a payload queue model through pl_pop) and a DMA memory read
// request. A sink with random destination stalls collects the TLPs. The
// testbench checks the order (completion, write, read), every header
// field, the byte-swapped data and payload, trem_n on odd lengths, and
// that each *_done pulses exactly once.
module tb_occ_tx_engine;
  import sns_pkg::*;
  import tb_tlp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] completer_id = 16'h0500;
  logic req_compl = 0, compl_done; cpl_req_t cpl = '0; logic [31:0] rd_data = 0;
  logic mwr_req = 0, mwr_done; logic [31:0] mwr_addr = 0; logic [9:0] mwr_len = 0;
  logic [31:0] pl_dw0 = 0, pl_dw1 = 0; logic [1:0] pl_pop;
  logic mrd_req = 0, mrd_done; logic [31:0] mrd_addr = 0; logic [9:0] mrd_len = 0; logic [7:0] mrd_tag = 0;
  logic [63:0] trn_td; logic [7:0] trn_trem_n;
  logic trn_tsof_n, trn_teof_n, trn_tsrc_rdy_n, trn_tdst_rdy_n = 1;
  int checks = 0, failures = 0;

  occ_tx_engine dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // payload queue model (first-word-fall-through, two words visible)
  logic [31:0] plq[$];
  int ncd = 0, nwd = 0, nrd = 0;
  always @(posedge clk) begin
    for (int k = 0; k < int'(pl_pop); k++) begin
      check(plq.size() > 0, "pop from an empty payload queue");
      if (plq.size() > 0) void'(plq.pop_front());
    end
    pl_dw0 <= plq.size() > 0 ? plq[0] : 32'h0;
    pl_dw1 <= plq.size() > 1 ? plq[1] : 32'h0;
    if (compl_done) ncd++;
    if (mwr_done) nwd++;
    if (mrd_done) nrd++;
  end

  // sink
  tlp_t rx_q[$], cur;
  always @(posedge clk) begin
    trn_tdst_rdy_n <= ($urandom_range(0, 2) == 0);
    if (rst_n && !trn_tsrc_rdy_n && !trn_tdst_rdy_n) begin
      beat_t b;
      b.d = trn_td; b.sof = !trn_tsof_n; b.eof = !trn_teof_n; b.rem_n = trn_trem_n;
      check(b.sof == (cur.size() == 0), "sof on the first beat only");
      cur.push_back(b);
      if (b.eof) begin rx_q.push_back(cur); cur.delete(); end
    end
  end

  initial begin
    int seen[3] = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      bit dc, dw, dr; logic [31:0] pay[$], dws[$], rdv; int c0, w0, r0;
      dc = $urandom_range(0, 1); dw = $urandom_range(0, 1); dr = $urandom_range(0, 1);
      c0 = ncd; w0 = nwd; r0 = nrd;
      if (dw) begin
        mwr_len = 10'($urandom_range(1, 32));
        mwr_addr = $urandom & 32'hFFFF_FFFC;
        pay.delete();
        for (int i = 0; i < mwr_len; i++) begin pay.push_back($urandom); plq.push_back(pay[i]); end
        @(posedge clk); @(posedge clk);
      end
      cpl.req_id = 16'($urandom); cpl.tag = 8'($urandom); cpl.tc = 3'($urandom);
      cpl.attr = 2'($urandom); cpl.first_be = 4'hF; cpl.lower_addr = 7'($urandom) & 7'h7C;
      cpl.with_data = 1;
      mrd_addr = $urandom & 32'hFFFF_FFFC; mrd_len = 10'($urandom_range(1, 32)); mrd_tag = 8'($urandom);
      rdv = $urandom;
      // the completion request is a one-cycle pulse that is registered as
      // pending; the DMA requests are levels raised in the next cycle
      req_compl <= dc;
      @(posedge clk);
      req_compl <= 0; mwr_req <= dw; mrd_req <= dr;
      rd_data <= rdv;
      #1;
      for (int w = 0; w < 500 && (mwr_req || mrd_req); w++) begin
        @(posedge clk);
        if (mwr_done) mwr_req <= 0;
        if (mrd_done) mrd_req <= 0;
      end
      repeat (10) @(posedge clk);
      check(ncd == c0 + int'(dc) && nwd == w0 + int'(dw) && nrd == r0 + int'(dr), "one done pulse per request");
      check(rx_q.size() == int'(dc) + int'(dw) + int'(dr), "one TLP per request");
      if (dc && rx_q.size() > 0) begin
        unpack(rx_q.pop_front(), dws); seen[0]++;
        check(dws.size() == 4, "completion is 4 DWORDs");
        check(dws[0][30:24] == 7'b10_01010 && dws[0][22:20] == cpl.tc && dws[0][13:12] == cpl.attr &&
              dws[0][9:0] == 1, "completion DW0");
        check(dws[1] == {16'h0500, 4'h0, 12'd4}, "completion DW1");
        check(dws[2] == {cpl.req_id, cpl.tag, 1'b0, cpl.lower_addr}, "completion DW2");
        check(dws[3] == sw(rdv), "completion data");
      end
      if (dw && rx_q.size() > 0) begin
        unpack(rx_q.pop_front(), dws); seen[1]++;
        check(dws.size() == 3 + mwr_len, $sformatf("write TLP %0d DWORDs for %0d", dws.size(), mwr_len));
        check(dws[0] == {1'b0, 7'b10_00000, 14'h0, mwr_len}, "write DW0");
        check(dws[1][31:16] == 16'h0500 && dws[1][3:0] == 4'hF, "write DW1");
        check(dws[2] == mwr_addr, "write address");
        for (int i = 0; i < mwr_len && i + 3 < dws.size(); i++)
          check(dws[3 + i] == sw(pay[i]), $sformatf("write payload %0d", i));
      end
      if (dr && rx_q.size() > 0) begin
        unpack(rx_q.pop_front(), dws); seen[2]++;
        check(dws.size() == 3, "read request is 3 DWORDs");
        check(dws[0] == {1'b0, 7'b00_00000, 14'h0, mrd_len}, "read DW0");
        check(dws[1][31:8] == {16'h0500, mrd_tag} && dws[1][3:0] == 4'hF, "read DW1");
        check(dws[2] == mrd_addr, "read address");
      end
      rx_q.delete();
      check(plq.size() == 0, "payload fully taken");
    end
    check(seen[0] > 100 && seen[1] > 100 && seen[2] > 100, "all request kinds");
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
