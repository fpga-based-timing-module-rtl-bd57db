// tb_occ: end-to-end test of the Optical Communication Card firmware.
// The optical (TLK2501 side) and LVDS links are looped back, so data the
// OCC sends on a link returns as link receive data. A root-complex model
// serves the transaction interface: it sends register reads and writes,
// answers the OCC's DMA memory read requests from a host memory model
// (completions of the requested length) and stores the OCC's DMA memory
// writes; an endpoint-core model acknowledges INTA messages and an
// interrupt service routine reads the status and writes INT_CLEAR.
// Flow, once per link (optical, then LVDS): read DMA from host memory
// into the IDMA buffer, TX_GO sends it on the link, the looped-back words
// fill the output FIFO, a write DMA moves them to a second host buffer,
// which must equal the source buffer. Then target access on the optical
// link: words written into the IDMA by register writes are sent with
// TX_GO in target-read mode and read back one by one from the ODMA.
// Small buffers are used (IDMA, output FIFO and ODMA of 512 DWORDs) to
// keep the run short.
module tb_occ;
  import tb_tlp_pkg::*;
  import occ_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [63:0] trn_rd = 0; logic [7:0] trn_rrem_n = 0;
  logic trn_rsof_n = 1, trn_reof_n = 1, trn_rsrc_rdy_n = 1, trn_rdst_rdy_n;
  logic [63:0] trn_td; logic [7:0] trn_trem_n;
  logic trn_tsof_n, trn_teof_n, trn_tsrc_rdy_n, trn_tdst_rdy_n = 1;
  logic [15:0] cfg_completer_id = 16'h0400;
  logic cfg_interrupt_rdy_n = 1, cfg_interrupt_n, cfg_interrupt_assert_n;
  logic [7:0] cfg_interrupt_di;
  logic [15:0] tlk_txd, tlk_rxd; logic tlk_tx_en, tlk_rx_dv, tlk_rx_er;
  logic [2:0] lvds_tx, lvds_rx; logic lvds_tx_clk, lvds_rx_clk;
  logic wr_dma_done, rd_dma_done, tx_ip;
  int checks = 0, failures = 0;

  assign tlk_rxd = tlk_txd; assign tlk_rx_dv = tlk_tx_en; assign tlk_rx_er = 1'b0;
  always @(posedge clk) begin lvds_rx <= lvds_tx; lvds_rx_clk <= lvds_tx_clk; end

  occ #(.IDMA_DEPTH(512), .OFIFO_DEPTH(512), .ODMA_DEPTH(512)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // host memory and mechanism counters
  logic [31:0] hmem [logic [31:0]];
  function automatic logic [31:0] src(input logic [31:0] a);
    return a * 32'h0101_0101 + 32'h1357_0000;
  endfunction
  int n_mrd = 0, n_mwr = 0, n_cpl = 0, n_assert = 0, n_deassert = 0, n_serviced = 0;

  // TLPs to send, single driver
  tlp_t txq[$];
  initial forever begin
    tlp_t t;
    wait (txq.size() > 0);
    t = txq.pop_front();
    foreach (t[i]) begin
      while ($urandom_range(0, 3) == 0) begin trn_rsrc_rdy_n <= 1; @(posedge clk); end
      trn_rd <= t[i].d; trn_rsof_n <= !t[i].sof; trn_reof_n <= !t[i].eof;
      trn_rrem_n <= t[i].rem_n; trn_rsrc_rdy_n <= 0;
      do @(posedge clk); while (trn_rdst_rdy_n);
    end
    trn_rsrc_rdy_n <= 1; trn_rsof_n <= 1; trn_reof_n <= 1;
    #1;
  end

  // TLPs from the OCC
  logic [31:0] cpl_data [logic [7:0]];
  tlp_t cur;
  always @(posedge clk) begin
    trn_tdst_rdy_n <= ($urandom_range(0, 4) == 0);
    if (rst_n && !trn_tsrc_rdy_n && !trn_tdst_rdy_n) begin
      beat_t b;
      b.d = trn_td; b.sof = !trn_tsof_n; b.eof = !trn_teof_n; b.rem_n = trn_trem_n;
      cur.push_back(b);
      if (b.eof) begin
        logic [31:0] dws[$], pay[$];
        unpack(cur, dws); cur.delete();
        case (dws[0][30:24])
          7'b10_01010: begin  // completion for a register read
            cpl_data[dws[2][15:8]] = sw(dws[3]); n_cpl++;
          end
          7'b00_00000: begin  // DMA read request
            pay.delete();
            for (int i = 0; i < int'(dws[0][9:0]); i++) begin
              logic [31:0] a;
              a = dws[2] + 32'(4 * i);
              pay.push_back(hmem.exists(a) ? hmem[a] : src(a));
            end
            txq.push_back(cpld(dws[1][31:16], dws[1][15:8], pay));
            n_mrd++;
          end
          7'b10_00000: begin  // DMA write
            check(dws.size() == 3 + int'(dws[0][9:0]), "write TLP length");
            for (int i = 0; i < int'(dws[0][9:0]); i++) hmem[dws[2] + 32'(4 * i)] = sw(dws[3 + i]);
            n_mwr++;
          end
          default: check(0, "unexpected TLP from the OCC");
        endcase
      end
    end
  end

  // endpoint core interrupt model
  bit inta = 0;
  initial forever begin
    @(posedge clk);
    if (rst_n && !cfg_interrupt_n && cfg_interrupt_rdy_n) begin
      bit as;
      repeat ($urandom_range(0, 4)) @(posedge clk);
      as = !cfg_interrupt_assert_n;
      cfg_interrupt_rdy_n <= 0;
      @(posedge clk);
      cfg_interrupt_rdy_n <= 1;
      if (as) begin check(!inta, "double assert"); inta = 1; n_assert++; end
      else begin check(inta, "deassert without assert"); inta = 0; n_deassert++; end
    end
  end

  int tagn = 0;
  task automatic wr(input logic [9:0] a, input logic [31:0] d);
    txq.push_back(mwr32({20'h0, a, 2'b00}, d));
    wait (txq.size() == 0);
    repeat (4) @(posedge clk);
  endtask
  task automatic rd(input logic [9:0] a, output logic [31:0] d);
    logic [7:0] tag;
    tag = 8'(tagn++);
    cpl_data.delete(tag);
    txq.push_back(mrd32({20'h0, a, 2'b00}, tag));
    for (int w = 0; w < 2000 && !cpl_data.exists(tag); w++) @(posedge clk);
    check(cpl_data.exists(tag), "register read completed");
    d = cpl_data.exists(tag) ? cpl_data[tag] : 'x;
  endtask

  // interrupt service: read STATUS, clear, wait for the deassert
  task automatic service(output logic [31:0] st);
    for (int w = 0; w < 20000 && !inta; w++) @(posedge clk);
    check(inta, "interrupt asserted");
    rd(O_STATUS, st);
    wr(O_INT_CLEAR, 1);
    for (int w = 0; w < 200 && inta; w++) @(posedge clk);
    check(!inta, "interrupt deasserted");
    n_serviced++;
  endtask

  int n_opt = 0, n_lvds = 0;
  task automatic run_link(input bit opt, input logic [31:0] sbase, input logic [31:0] dbase,
                          input int size, input int count);
    logic [31:0] v, ctl;
    ctl = opt ? 32'h2 : 32'h0;
    wr(O_CTRL, ctl);
    // read DMA into the IDMA buffer
    wr(O_RD_ADDR, sbase); wr(O_RD_SIZE, size); wr(O_RD_COUNT, count);
    wr(O_INT_ENABLE, 32'h4);
    wr(O_CTRL, ctl | 32'h8);
    service(v);
    check(v[3], "rd_dma_done in STATUS");
    rd(O_DMA_RD_CNT, v); check(v == 32'(count), $sformatf("dma_rd_count %0d", v));
    // send the IDMA contents on the link; the loopback fills the output FIFO
    wr(O_TX_LEN, size * count);
    wr(O_INT_ENABLE, 32'h1);
    wr(O_CTRL, ctl | 32'h1);
    service(v);
    for (int w = 0; w < 20000; w++) begin
      rd(O_OFIFO_COUNT, v);
      if (v == 32'(size * count)) break;
      repeat (50) @(posedge clk);
    end
    check(v == 32'(size * count), $sformatf("output FIFO holds %0d words", v));
    if (opt) n_opt++; else n_lvds++;
    // write DMA to the second host buffer
    wr(O_WR_ADDR, dbase); wr(O_WR_SIZE, size); wr(O_WR_COUNT, count);
    wr(O_INT_ENABLE, 32'h2);
    wr(O_CTRL, ctl | 32'h4);
    service(v);
    check(v[2], "wr_dma_done in STATUS");
    rd(O_DMA_WR_CNT, v); check(v == 32'(count), "dma_wr_count");
    for (int i = 0; i < size * count; i++) begin
      logic [31:0] a, b;
      a = sbase + 32'(4 * i); b = dbase + 32'(4 * i);
      check(hmem.exists(b) && hmem[b] == src(a), $sformatf("host word %0d via %s link", i, opt ? "optical" : "LVDS"));
    end
  endtask

  initial begin
    logic [31:0] v;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    rd(O_CTRL, v);    check(v[1] == 1, "optical link selected at reset");
    rd(O_RD_SIZE, v); check(v == 32, "read TLP size reset value");
    run_link(1, 32'h0001_0000, 32'h0004_0000, 32, 8);
    run_link(0, 32'h0002_0000, 32'h0005_0000, 16, 4);
    // target write, optical loopback into the ODMA, target read
    begin
      logic [31:0] tw[$]; int nt;
      nt = $urandom_range(5, 40);
      for (int i = 0; i < nt; i++) begin tw.push_back($urandom); wr(O_IDMA_DATA, tw[i]); end
      wr(O_TX_LEN, nt);
      wr(O_INT_ENABLE, 32'h1);
      wr(O_CTRL, 32'h13);
      service(v);
      for (int w = 0; w < 2000; w++) begin
        rd(O_ODMA_LEN, v);
        if (v == 32'(4 * nt)) break;
        repeat (20) @(posedge clk);
      end
      check(v == 32'(4 * nt), $sformatf("ODMA holds %0d bytes", v));
      rd(O_STATUS, v);        check(v[1], "STATUS: target-read data available");
      rd(O_OFIFO_COUNT, v);   check(v == 0, "output FIFO not used in target-read mode");
      for (int i = 0; i < nt; i++) begin
        rd(O_ODMA_DATA, v); check(v == tw[i], $sformatf("target read word %0d", i));
      end
      rd(O_ODMA_LEN, v);      check(v == 0, "ODMA empty after the target reads");
      rd(O_STATUS, v);        check(!v[1], "STATUS: nothing left to read");
    end
    check(n_mrd == 12 && n_mwr == 12, $sformatf("DMA TLPs %0d read %0d write", n_mrd, n_mwr));
    check(n_opt == 1 && n_lvds == 1, "both links used");
    check(n_serviced == 7 && n_assert == 7 && n_deassert == 7, "interrupt handshakes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
