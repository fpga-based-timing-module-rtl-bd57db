// tb_occ_dma_engine: self-checking test of the OCC DMA engine with models
// of the transmit engine (takes memory write payload one or two DWORDs
// per cycle, acknowledges requests after random delays), of host memory
// (answers each memory read request with completion data derived from its
// address, pushed one or two DWORDs per cycle) and of the link (random
// ready, random receive words). Sequence: a read DMA of RD_COUNT TLPs,
// then TX_GO sends the IDMA contents on the link, then a write DMA of
// WR_COUNT TLPs from the link receive words, with the interrupts enabled;
// then target writes into the IDMA sent with TX_GO, target-read mode
// (link words into the ODMA, read back one register read at a time, and
// a read of the empty ODMA); then INT_CLEAR. Addresses, payloads, counters, done flags, interrupt
// requests and register reads are checked.
module tb_occ_dma_engine;
  import occ_pkg::*;
  localparam int RS = 8, RCNT = 5, WS = 16, WCNT = 3;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0; logic [9:0] wr_addr = 0, rd_addr = 0; logic [31:0] wr_data = 0, rd_data;
  logic mwr_req, mwr_done = 0, mrd_req, mrd_done = 0;
  logic [31:0] mwr_addr, pl_dw0, pl_dw1, mrd_addr; logic [9:0] mwr_len, mrd_len; logic [7:0] mrd_tag;
  logic [1:0] pl_pop = 0, cpl_push = 0; logic [31:0] cpl_dw0 = 0, cpl_dw1 = 0;
  logic link_rx_valid = 0, link_tx_valid, link_tx_ready = 0, optcvr;
  logic [31:0] link_rx_data = 0, link_tx_data;
  logic intr_req, intr_clr, wr_dma_done, rd_dma_done, tx_ip;
  int checks = 0, failures = 0;

  occ_dma_engine dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] host(input logic [31:0] a);
    return a ^ 32'h5A5A_0000;
  endfunction

  int nintr = 0, nclr = 0;
  always @(posedge clk) begin
    if (intr_req) nintr++;
    if (intr_clr) nclr++;
  end

  // transmit engine model: memory reads
  logic [31:0] rd_reqs[$];
  initial forever begin
    @(posedge clk);
    if (rst_n && mrd_req && !mrd_done) begin
      repeat ($urandom_range(0, 6)) @(posedge clk);
      check(mrd_len == RS, "read request length");
      rd_reqs.push_back(mrd_addr);
      mrd_done <= 1; @(posedge clk); mrd_done <= 0; @(posedge clk);
    end
  end
  // host memory model: completions
  initial forever begin
    @(posedge clk);
    if (rd_reqs.size() > 0) begin
      logic [31:0] a; int i;
      a = rd_reqs.pop_front();
      repeat ($urandom_range(2, 10)) @(posedge clk);
      i = 0;
      while (i < RS) begin
        int n;
        n = (RS - i >= 2) ? $urandom_range(0, 2) : $urandom_range(0, 1);
        cpl_push <= 2'(n); cpl_dw0 <= host(a + 4 * i); cpl_dw1 <= host(a + 4 * (i + 1));
        i += n;
        @(posedge clk);
      end
      cpl_push <= 0;
    end
  end
  // transmit engine model: memory writes
  logic [31:0] wr_addrs[$], wr_pay[$];
  initial forever begin
    @(posedge clk);
    if (rst_n && mwr_req && !mwr_done) begin
      int i;
      wr_addrs.push_back(mwr_addr);
      i = 0;
      while (i < int'(mwr_len)) begin
        int n;
        n = (int'(mwr_len) - i >= 2) ? $urandom_range(0, 2) : $urandom_range(0, 1);
        #1;
        if (n >= 1) wr_pay.push_back(pl_dw0);
        if (n == 2) wr_pay.push_back(pl_dw1);
        pl_pop <= 2'(n);
        i += n;
        @(posedge clk);
        pl_pop <= 0;
      end
      mwr_done <= 1; @(posedge clk); mwr_done <= 0; @(posedge clk);
    end
  end
  // link model
  logic [31:0] link_out[$], link_in[$];
  always @(posedge clk) begin
    link_tx_ready <= $urandom_range(0, 1);
    if (rst_n && link_tx_valid && link_tx_ready) link_out.push_back(link_tx_data);
  end

  task automatic wr(input logic [9:0] a, input logic [31:0] d);
    wr_en <= 1; wr_addr <= a; wr_data <= d; @(posedge clk); #1 wr_en <= 0; @(posedge clk); #1;
  endtask
  task automatic rd(input logic [9:0] a, output logic [31:0] d);
    rd_addr <= a; rd_en <= 1; @(posedge clk); #1 rd_en <= 0; @(posedge clk); #1 d = rd_data; @(posedge clk);
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    rd(O_WR_SIZE, v); check(v == 32, "write TLP size reset value");
    rd(O_CTRL, v);    check(v[1] == 1, "optical link selected at reset");
    // read DMA
    wr(O_INT_ENABLE, 7);
    wr(O_RD_ADDR, 32'h0001_0000); wr(O_RD_SIZE, RS); wr(O_RD_COUNT, RCNT);
    wr(O_CTRL, 32'h0000_0008);
    for (int w = 0; w < 5000 && !rd_dma_done; w++) @(posedge clk);
    repeat (3) @(posedge clk); #1;
    check(rd_dma_done, "read DMA done");
    check(nintr == 1, "interrupt for read DMA");
    rd(O_DMA_RD_CNT, v); check(v == RCNT, $sformatf("dma_rd_count %0d", v));
    rd(O_IDMA_PROD, v);  check(v == RS * RCNT, $sformatf("IDMA producer %0d", v));
    rd(O_STATUS, v);     check(v[3] == 1, "status rd_dma_done");
    check(optcvr == 0, "CTRL write selected LVDS");
    // send the IDMA contents on the link
    wr(O_TX_LEN, RS * RCNT);
    wr(O_CTRL, 32'h0000_0003);
    check(tx_ip, "TX_IP set by TX_GO");
    for (int w = 0; w < 5000 && tx_ip; w++) @(posedge clk);
    repeat (3) @(posedge clk); #1;
    check(!tx_ip, "TX_IP cleared");
    check(optcvr == 1, "optical link selected");
    check(link_out.size() == RS * RCNT, $sformatf("link words %0d", link_out.size()));
    for (int t = 0; t < RCNT; t++)
      for (int i = 0; i < RS; i++)
        if (t * RS + i < link_out.size())
          check(link_out[t * RS + i] == host(32'h0001_0000 + 4 * (t * RS + i)), "link word from host memory");
    check(nintr == 2, "interrupt for link transmit");
    rd(O_IDMA_CONS, v); check(v == RS * RCNT, "IDMA consumer");
    // write DMA from link receive words
    wr(O_WR_ADDR, 32'h0002_0000); wr(O_WR_SIZE, WS); wr(O_WR_COUNT, WCNT);
    wr(O_CTRL, 32'h0000_0006);
    // one non-blocking update of the link inputs per cycle
    for (int i = 0; i < WS * WCNT; ) begin
      bit v;
      v = $urandom_range(0, 2) != 0;
      link_rx_valid <= v; link_rx_data <= $urandom;
      @(posedge clk);
      if (v) begin link_in.push_back(link_rx_data); i++; end
    end
    link_rx_valid <= 0;
    for (int w = 0; w < 5000 && !wr_dma_done; w++) @(posedge clk);
    repeat (3) @(posedge clk); #1;
    check(wr_dma_done, "write DMA done");
    check(wr_addrs.size() == WCNT, "write TLP count");
    foreach (wr_addrs[t]) check(wr_addrs[t] == 32'h0002_0000 + 4 * WS * t, "write TLP address");
    check(wr_pay.size() == WS * WCNT, "write payload size");
    foreach (wr_pay[i]) if (i < link_in.size()) check(wr_pay[i] == link_in[i], $sformatf("write payload %0d", i));
    rd(O_DMA_WR_CNT, v); check(v == WCNT, "dma_wr_count");
    rd(O_IN_COUNT, v);   check(v == WS * WCNT, "input count");
    rd(O_OFIFO_COUNT, v); check(v == 0, "output FIFO drained");
    check(nintr == 3, $sformatf("interrupts %0d", nintr));
    // target writes into the IDMA, then sent on the link
    begin
      logic [31:0] tw[$]; int n0, nt;
      nt = $urandom_range(3, 9);
      n0 = link_out.size();
      for (int i = 0; i < nt; i++) begin tw.push_back($urandom); wr(O_IDMA_DATA, tw[i]); end
      rd(O_IDMA_PROD, v); check(v == RS * RCNT + nt, $sformatf("IDMA producer after target writes %0d", v));
      wr(O_TX_LEN, nt);
      wr(O_CTRL, 32'h0000_0003);
      for (int w = 0; w < 5000 && tx_ip; w++) @(posedge clk);
      repeat (3) @(posedge clk); #1;
      check(link_out.size() == n0 + nt, $sformatf("target-written words sent %0d", link_out.size() - n0));
      for (int i = 0; i < nt; i++)
        if (n0 + i < link_out.size()) check(link_out[n0 + i] == tw[i], "target-written word on the link");
      check(nintr == 4, "interrupt for the second link transmit");
    end
    // target-read mode: link words go to the ODMA and are read by the host
    begin
      logic [31:0] tr[$]; int nr;
      nr = $urandom_range(4, 12);
      wr(O_CTRL, 32'h0000_0012);
      rd(O_CTRL, v); check(v[4] == 1, "TGT_RD set");
      rd(O_STATUS, v); check(v[1] == 0, "no data available yet");
      for (int i = 0; i < nr; ) begin
        bit vv;
        vv = $urandom_range(0, 1) != 0;
        link_rx_valid <= vv; link_rx_data <= $urandom;
        @(posedge clk);
        if (vv) begin tr.push_back(link_rx_data); i++; end
      end
      link_rx_valid <= 0;
      repeat (2) @(posedge clk); #1;
      rd(O_OFIFO_COUNT, v); check(v == 0, "output FIFO bypassed in target-read mode");
      rd(O_STATUS, v);      check(v[1] == 1, "status: received data available");
      rd(O_ODMA_LEN, v);    check(v == 4 * nr, $sformatf("ODMA length %0d bytes", v));
      rd(O_IN_COUNT, v);    check(v == WS * WCNT + nr, "input count in target-read mode");
      for (int i = 0; i < nr; i++) begin
        rd(O_ODMA_DATA, v); check(v == tr[i], $sformatf("ODMA word %0d", i));
      end
      rd(O_ODMA_LEN, v);    check(v == 0, "ODMA emptied by the reads");
      rd(O_STATUS, v);      check(v[1] == 0, "status: no data left");
      rd(O_ODMA_DATA, v);   check(v == 0, "read of the empty ODMA");
    end
    wr(O_INT_CLEAR, 1);
    @(posedge clk);
    check(nclr == 1, "interrupt clear");
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
