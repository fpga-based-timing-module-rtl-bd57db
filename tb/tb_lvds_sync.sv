// tb_lvds_sync: self-checking test of the 21-bit, 3-pair LVDS link. The
// serial lanes and the clock lane are looped back through a delay line
// whose length is chosen at random for each of three runs, so the
// receiver must find the word boundary from the 1100011 clock pattern by
// itself. Every word loaded on tx_load must come out once and in order
// (after the first boundary is found). The serial bit order on the wire
// (lane j carries bits 7j+6 down to 7j) and the clock pair pattern
// 1100011 are checked directly.
module tb_lvds_sync;
  logic clk = 0, rst_n = 0;
  logic [20:0] tx_word = 0, rx_word;
  logic tx_load, lvds_tx_clk, rx_valid;
  logic [2:0] lvds_tx, lvds_rx;
  logic lvds_rx_clk;
  logic [3:0] dl [16];
  int lat = 0;
  int checks = 0, failures = 0;

  assign lvds_rx     = dl[lat][2:0];
  assign lvds_rx_clk = dl[lat][3];

  lvds_sync dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) begin
    dl[0] <= {lvds_tx_clk, lvds_tx};
    for (int i = 1; i < 16; i++) dl[i] <= dl[i-1];
  end

  logic [20:0] sent[$], got[$];
  int wire_ok = 0;
  always @(posedge clk) begin
    if (rst_n && tx_load) begin
      sent.push_back(tx_word);
      tx_word <= 21'($urandom);
    end
    if (rst_n && rx_valid) got.push_back(rx_word);
  end
  // wire order: bit k (0..6) of a word on lane j is tx_word[7j+6-k]
  // clock pair pattern per word, first bit on the left (independent copy)
  localparam logic [6:0] CK = 7'b1100011;
  logic [20:0] ll = 0; int k = -1;
  always @(posedge clk) begin
    if (!rst_n) k = -1;
    else if (tx_load) begin ll = tx_word; k = 0; end
    else if (k >= 0) k++;
    #1;
    if (rst_n && k >= 0 && k < 7) begin
      for (int j = 0; j < 3; j++)
        if (lvds_tx[j] !== ll[7*j + 6 - k] || lvds_tx_clk !== CK[6 - k]) begin
          if (wire_ok >= 0) $display("lane %0d bit %0d at %0t", j, k, $time);
          wire_ok = -1000000;
        end
      wire_ok++;
    end
  end

  initial begin
    foreach (dl[i]) dl[i] = 0;
    for (int run = 0; run < 3; run++) begin
      rst_n <= 0;
      lat = $urandom_range(0, 15);
      sent.delete(); got.delete();
      repeat (3) @(posedge clk);
      rst_n <= 1;
      repeat (7 * 300) @(posedge clk);
      // drop words sent before the receiver found its first boundary
      check(got.size() > 250, $sformatf("run %0d: %0d words received", run, got.size()));
      while (sent.size() > 0 && got.size() > 0 && sent[0] != got[0]) void'(sent.pop_front());
      check(sent.size() - got.size() <= 3, "no words lost");
      foreach (got[i]) check(got[i] == sent[i], $sformatf("run %0d word %0d", run, i));
    end
    check(wire_ok > 1000, "serial bit order on the lanes");
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
