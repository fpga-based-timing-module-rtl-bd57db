// tb_tm_rx_engine: self-checking test of the Timing Module receive
// engine. A root-complex model sends memory writes and reads with 32-bit
// and 64-bit addresses, I/O writes and an unsupported TLP, with random
// gaps in trn_rsrc_rdy_n. Checks every register write (address, byte
// enables, byte-swapped data), every completion request (with/without
// data, requester ID, tag, lower address) and that the engine holds
// trn_rdst_rdy_n high until the transmit side reports compl_done.
module tb_tm_rx_engine;
  import sns_pkg::*;
  import tb_tlp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [63:0] trn_rd = '0;
  logic [7:0] trn_rrem_n = '0;
  logic trn_rsof_n = 1, trn_reof_n = 1, trn_rsrc_rdy_n = 1;
  logic [6:0] trn_rbar_hit_n = 7'h7e;
  logic trn_rdst_rdy_n;
  logic wr_en, req_compl, compl_done = 0;
  logic [8:0] wr_addr, rd_addr;
  logic [3:0] wr_be;
  logic [31:0] wr_data;
  cpl_req_t cpl;
  int checks = 0, failures = 0;

  tm_rx_engine #(.ADDR_W(9)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // monitor
  int nwr = 0, ncpl = 0;
  logic [8:0] last_wa; logic [31:0] last_wd; logic [3:0] last_be;
  cpl_req_t last_cpl; logic [8:0] last_ra;
  always @(posedge clk) begin
    if (wr_en) begin nwr++; last_wa = wr_addr; last_wd = wr_data; last_be = wr_be; end
    if (req_compl) begin ncpl++; last_cpl = cpl; end
  end
  // transmit-side model: completion sent some cycles after the request
  initial forever begin
    @(posedge clk);
    if (req_compl) begin
      last_ra = rd_addr;
      repeat ($urandom_range(1, 8)) begin
        @(posedge clk); #1;
        check(trn_rdst_rdy_n, "rdst_rdy_n must stay high while a completion is pending");
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
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      int kind; logic [31:0] a, d; logic [3:0] be; logic [7:0] tag;
      int w0, c0;
      kind = $urandom_range(0, 5);
      a = {$urandom} & 32'h0000_07FC; d = $urandom; tag = 8'($urandom);
      be = 4'($urandom_range(1, 15));
      w0 = nwr; c0 = ncpl;
      case (kind)
        0: send(mwr32(a, d, be));
        1: send(mwr64(a, d, be));
        2: send(iowr(a, d, tag));
        3: send(mrd32(a, tag, be, 16'h1234));
        4: send(mrd64(a, tag));
        default: begin            // completion TLP: not for this engine
          logic [31:0] q[$]; q = '{d};
          send(cpld(16'h0, tag, q));
        end
      endcase
      repeat (12) @(posedge clk);
      case (kind)
        0, 1, 2: begin
          check(nwr == w0 + 1, $sformatf("kind %0d: write not seen", kind));
          check(last_wa == a[10:2], "write address");
          check(last_wd == d, $sformatf("write data %h != %h", last_wd, d));
          check(last_be == ((kind == 2) ? 4'hF : be), "write byte enables");
          check(ncpl == c0 + (kind == 2), "I/O write completion request");
          if (kind == 2) begin
            check(!last_cpl.with_data && last_cpl.tag == tag, "I/O write completion fields");
          end
        end
        3, 4: begin
          check(nwr == w0, "read made a write");
          check(ncpl == c0 + 1, "read completion not requested");
          check(last_ra == a[10:2], "read address");
          check(last_cpl.with_data && last_cpl.tag == tag, "read completion fields");
          if (kind == 3) begin
            check(last_cpl.req_id == 16'h1234, "requester id");
            check(last_cpl.first_be == be, "first BE");
            check(last_cpl.lower_addr == {a[6:2], cpl_low_addr(be)}, "lower address");
          end
        end
        default: check(nwr == w0 && ncpl == c0, "completion TLP was not ignored");
      endcase
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
