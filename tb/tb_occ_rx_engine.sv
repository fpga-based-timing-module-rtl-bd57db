// tb_occ_rx_engine: self-checking test of the OCC receive engine. A
// root-complex model sends a random mix of one-DWORD memory writes
// (register writes), memory reads (register reads) and completions with
// 1 to 32 data DWORDs (DMA read data), with random source stalls. The
// testbench checks each register write (address, byte-swapped data),
// each read request (address, requester id, tag, byte enables) and that
// the link is held (trn_rdst_rdy_n high) until compl_done, and that the
// completion payload reaches cpl_push in order and byte-swapped back.
module tb_occ_rx_engine;
  import sns_pkg::*;
  import tb_tlp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [63:0] trn_rd = 0; logic [7:0] trn_rrem_n = 0;
  logic trn_rsof_n = 1, trn_reof_n = 1, trn_rsrc_rdy_n = 1, trn_rdst_rdy_n;
  logic wr_en, req_compl, compl_done = 0;
  logic [9:0] wr_addr, rd_addr; logic [31:0] wr_data, cpl_dw0, cpl_dw1;
  cpl_req_t cpl; logic [1:0] cpl_push;
  int checks = 0, failures = 0;

  occ_rx_engine dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int nwr = 0, ncpl = 0;
  logic [9:0] last_wa, last_ra; logic [31:0] last_wd; cpl_req_t last_cpl;
  logic [31:0] pl[$];
  always @(posedge clk) begin
    if (wr_en) begin nwr++; last_wa = wr_addr; last_wd = wr_data; end
    if (req_compl) begin ncpl++; last_cpl = cpl; last_ra = rd_addr; end
    if (cpl_push >= 1) pl.push_back(cpl_dw0);
    if (cpl_push == 2) pl.push_back(cpl_dw1);
  end
  // transmit-side model
  initial forever begin
    @(posedge clk);
    if (req_compl) begin
      repeat ($urandom_range(1, 8)) begin
        @(posedge clk); #1;
        check(trn_rdst_rdy_n, "link held while a completion is pending");
      end
      compl_done <= 1; @(posedge clk); compl_done <= 0;
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

  initial begin
    int kinds[3] = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      int kind, w0, c0; logic [31:0] a, d; logic [7:0] tag; logic [3:0] be;
      logic [31:0] data[$];
      kind = $urandom_range(0, 2);
      a = {$urandom} & 32'h0000_0FFC; d = $urandom; tag = 8'($urandom);
      be = 4'($urandom_range(1, 15));
      w0 = nwr; c0 = ncpl;
      kinds[kind]++;
      case (kind)
        0: begin
          send(mwr32(a, d));
          repeat (3) @(posedge clk);
          check(nwr == w0 + 1, "one register write");
          check(last_wa == a[11:2] && last_wd == d, $sformatf("write %h=%h got %h=%h", a[11:2], d, last_wa, last_wd));
        end
        1: begin
          send(mrd32(a, tag, be, 16'h0208));
          repeat (3) @(posedge clk);
          check(ncpl == c0 + 1, "one read request");
          check(last_ra == a[11:2], "read address");
          check(last_cpl.req_id == 16'h0208 && last_cpl.tag == tag && last_cpl.first_be == be,
                "completion fields");
          repeat (12) @(posedge clk);
        end
        default: begin
          int len;
          len = $urandom_range(1, 32);
          data.delete(); pl.delete();
          for (int i = 0; i < len; i++) data.push_back($urandom);
          send(cpld(16'h0100, tag, data));
          repeat (3) @(posedge clk);
          check(pl.size() == len, $sformatf("payload %0d of %0d DWORDs", pl.size(), len));
          foreach (pl[i]) if (i < len) check(pl[i] == data[i], $sformatf("payload DWORD %0d", i));
          check(nwr == w0 && ncpl == c0, "a completion is not a register access");
        end
      endcase
    end
    check(kinds[0] > 50 && kinds[1] > 50 && kinds[2] > 50, "all TLP kinds sent");
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
