// tb_tm_tx_engine: self-checking test of the Timing Module transmit
// engine. Requests completions with random fields, with and without
// data, while a core model drops trn_tdst_rdy_n at random. Checks every
// header field of the received completion, the byte-swapped payload,
// trem_n, start/end of frame, that a QWORD stays unchanged while the core
// is not ready, and one compl_done per completion.
module tb_tm_tx_engine;
  import sns_pkg::*;
  import tb_tlp_pkg::*;
  logic clk = 0, rst_n = 0, req_compl = 0, trn_tdst_rdy_n = 1;
  cpl_req_t cpl = '0;
  logic [31:0] rd_data = '0;
  logic [15:0] completer_id = 16'hBEEF;
  logic [63:0] trn_td;
  logic [7:0] trn_trem_n;
  logic trn_tsof_n, trn_teof_n, trn_tsrc_rdy_n, compl_done;
  int checks = 0, failures = 0;

  tm_tx_engine dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // core model
  tlp_t rx; tlp_t got[$];
  logic [63:0] held; bit holding = 0;
  int ndone = 0;
  always @(posedge clk) begin
    if (compl_done) ndone++;
    if (!trn_tsrc_rdy_n) begin
      if (holding) check(trn_td == held, "QWORD changed while core not ready");
      if (!trn_tdst_rdy_n) begin
        beat_t b;
        b.d = trn_td; b.sof = !trn_tsof_n; b.eof = !trn_teof_n; b.rem_n = trn_trem_n;
        rx.push_back(b);
        if (b.eof) begin got.push_back(rx); rx.delete(); end
        holding = 0;
      end else begin
        holding = 1; held = trn_td;
      end
    end
    trn_tdst_rdy_n <= ($urandom_range(0, 2) == 0);
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      cpl_req_t c; logic [31:0] d; logic [31:0] dws[$]; tlp_t t;
      c.req_id = 16'($urandom); c.tag = 8'($urandom); c.tc = 3'($urandom);
      c.attr = 2'($urandom); c.first_be = 4'($urandom_range(1, 15));
      c.lower_addr = 7'($urandom); c.with_data = ($urandom_range(0, 3) != 0);
      d = $urandom;
      cpl <= c; req_compl <= 1; @(posedge clk); req_compl <= 0;
      rd_data <= d;
      while (got.size() == 0) @(posedge clk);
      t = got.pop_front();
      unpack(t, dws);
      check(t[0].sof && !t[t.size()-1].sof, "sof");
      check(t.size() == 2, "two QWORDs");
      check(dws[0][30:24] == (c.with_data ? TLP_CPLD : TLP_CPL), "fmt/type");
      check(dws[0][9:0] == (c.with_data ? 10'd1 : 10'd0), "length");
      check(dws[0][22:20] == c.tc && dws[0][13:12] == c.attr, "tc/attr");
      check(dws[1][31:16] == 16'hBEEF, "completer id");
      check(dws[1][15:13] == 3'b000, "status");
      check(dws[1][11:0] == (c.with_data ? cpl_byte_count(c.first_be) : 12'd4), "byte count");
      check(dws[2] == {c.req_id, c.tag, 1'b0, c.lower_addr}, "requester id, tag, lower address");
      if (c.with_data) begin
        check(dws.size() == 4 && t[1].rem_n == 8'h00, "CplD carries one DWORD");
        check(dws[3] == sw(d), $sformatf("payload %h != %h", dws[3], sw(d)));
      end else begin
        check(dws.size() == 3 && t[1].rem_n == 8'h0F, "Cpl has no payload (trem 0Fh)");
      end
      repeat (2) @(posedge clk);
      check(ndone == n + 1, "compl_done count");
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
