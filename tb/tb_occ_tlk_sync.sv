// tb_occ_tlk_sync: self-checking test of the 32-bit to 16-bit optical link
// framing. Part 1 loops the transmit halves back into the receiver
// (tx_ce high, random tx_valid) and checks that every word arrives once,
// in order, low half first on the wire, and that rx_count matches.
// Part 2 gates the transmitter with a random tx_ce and rebuilds words from
// the halves present after each enabled cycle. Part 3 drives the receiver
// directly and checks that tlk_rx_er drops a half-assembled word.
module tb_occ_tlk_sync;
  logic clk = 0, rst_n = 0;
  logic tx_ce = 1, tx_valid = 0, tx_ready, tlk_tx_en;
  logic [31:0] tx_data = 0, rx_data, rx_count;
  logic [15:0] tlk_txd, tlk_rxd;
  logic tlk_rx_dv, tlk_rx_er, rx_valid;
  logic loop = 1, d_dv = 0, d_er = 0; logic [15:0] d_rxd = 0;
  int checks = 0, failures = 0;

  assign tlk_rxd   = loop ? tlk_txd : d_rxd;
  assign tlk_rx_dv = loop ? tlk_tx_en : d_dv;
  assign tlk_rx_er = loop ? 1'b0 : d_er;

  occ_tlk_sync dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] sent[$], got[$], wire_w[$];
  logic [15:0] lo; bit have_lo = 0; logic ce_d = 0;
  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) sent.push_back(tx_data);
    if (rst_n && rx_valid) got.push_back(rx_data);
    ce_d <= tx_ce;
    // wire monitor: halves present after an enabled cycle
    if (rst_n && ce_d && tlk_tx_en) begin
      if (!have_lo) begin lo = tlk_txd; have_lo = 1; end
      else begin wire_w.push_back({tlk_txd, lo}); have_lo = 0; end
    end
  end

  initial begin
    int n0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // part 1: loopback, TLK2501 style (a half every cycle)
    for (int n = 0; n < 3000; n++) begin
      if (!tx_valid || tx_ready) begin
        tx_valid <= ($urandom_range(0, 3) != 0);
        tx_data  <= $urandom;
      end
      @(posedge clk);
    end
    tx_valid <= 0;
    repeat (5) @(posedge clk);
    check(sent.size() > 1000, "enough words sent");
    check(got.size() == sent.size(), $sformatf("received %0d of %0d", got.size(), sent.size()));
    check(rx_count == 32'(got.size()), "rx_count");
    foreach (got[i]) if (i < sent.size()) check(got[i] == sent[i], $sformatf("word %0d", i));
    check(wire_w.size() == sent.size(), "wire halves");
    foreach (wire_w[i]) if (i < sent.size()) check(wire_w[i] == sent[i], "low half first on the wire");
    // part 2: gated transmitter
    loop <= 0;
    sent.delete(); wire_w.delete();
    for (int n = 0; n < 3000; n++) begin
      if (!tx_valid || (tx_ready && tx_valid)) begin
        tx_valid <= ($urandom_range(0, 1) != 0);
        tx_data  <= $urandom;
      end
      tx_ce <= ($urandom_range(0, 6) == 0);
      @(posedge clk);
    end
    tx_valid <= 0; tx_ce <= 1;
    repeat (5) @(posedge clk);
    check(sent.size() > 100, "gated words sent");
    check(wire_w.size() == sent.size(), $sformatf("gated halves %0d of %0d", wire_w.size(), sent.size()));
    foreach (wire_w[i]) if (i < sent.size()) check(wire_w[i] == sent[i], "gated word order");
    // part 3: receive error drops a half word
    got.delete(); n0 = rx_count;
    d_dv <= 1; d_rxd <= 16'h1111; @(posedge clk);
    d_dv <= 0; d_er <= 1; @(posedge clk);
    d_er <= 0; d_dv <= 1; d_rxd <= 16'h3333; @(posedge clk);
    d_rxd <= 16'h4444; @(posedge clk);
    d_dv <= 0; repeat (2) @(posedge clk);
    check(got.size() == 1 && got[0] == 32'h4444_3333, "word after receive error");
    check(rx_count == 32'(n0 + 1), "count after receive error");
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
