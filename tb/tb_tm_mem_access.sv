// tb_tm_mem_access: self-checking test of the Timing Module register
// window. Random byte-enabled writes to the configuration registers are
// checked on the cfg outputs and by reading back; status values must
// appear only after a snapshot (Tsync); the interrupt status must collect
// masked sources, raise intr_req, and clear the written bits and raise
// intr_clr on a write to the clear register.
module tb_tm_mem_access;
  import sns_pkg::*;
  logic clk = 0, rst_n = 0, wr_en = 0, snap = 0, int_evt = 0;
  logic [8:0] wr_addr = '0, rd_addr = '0;
  logic [3:0] wr_be = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic [31:0] cfg [TM_N_CFG];
  logic [31:0] stat [64];
  logic [N_INT-1:0] int_src = '0;
  logic intr_req, intr_clr;
  int checks = 0, failures = 0;
  logic [31:0] model [TM_N_CFG];

  tm_mem_access #(.ADDR_W(9), .N_STAT(64)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(input logic [8:0] a, input logic [31:0] d, input logic [3:0] be);
    wr_en <= 1; wr_addr <= a; wr_data <= d; wr_be <= be;
    @(posedge clk); wr_en <= 0;
  endtask
  task automatic rd(input logic [8:0] a, output logic [31:0] d);
    rd_addr <= a; @(posedge clk); @(posedge clk); #1 d = rd_data;
  endtask

  logic [31:0] v;
  int nreq = 0, nclr = 0;
  always @(posedge clk) begin
    if (intr_req) nreq++;
    if (intr_clr) nclr++;
  end

  initial begin
    foreach (stat[i]) stat[i] = 32'h1000 + i;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int a = 0; a < TM_N_CFG; a++) model[a] = (a == int'(R_FREE_DIV)) ? DIV_60HZ_CYC : 0;
    check(cfg[R_FREE_DIV] == DIV_60HZ_CYC, "divisor reset value");
    for (int n = 0; n < 300; n++) begin
      logic [8:0] a; logic [31:0] d; logic [3:0] be;
      a = 9'($urandom_range(0, TM_N_CFG - 1)); d = $urandom; be = 4'($urandom);
      if (a == R_INT_CLEAR) continue;
      wr(a, d, be);
      for (int b = 0; b < 4; b++) if (be[b]) model[a][8*b +: 8] = d[8*b +: 8];
      #1 check(cfg[a] == model[a], $sformatf("cfg[%0d] %h != %h", a, cfg[a], model[a]));
      rd(9'($urandom_range(0, TM_N_CFG - 1)), v);
      check(v == model[rd_addr], "config read back");
    end
    // writes above the configuration area change nothing
    wr(9'h100, 32'hFFFF_FFFF, 4'hF);
    rd(9'h100, v); check(v == 0, "unmapped address reads 0");
    // status registers: snapshot at Tsync
    rd(R_PT0_TIME0 + 3, v); check(v == 0, "status before snapshot");
    snap <= 1; @(posedge clk); snap <= 0; #1;
    foreach (stat[i]) stat[i] = 32'h2000 + i;
    for (int i = 0; i < 64; i++) begin
      if (9'(TM_N_CFG + i) == R_INT_STATUS) continue;
      rd(9'(TM_N_CFG + i), v);
      check(v == 32'h1000 + i, $sformatf("status %0d = %h", i, v));
    end
    // interrupt status
    int_src <= 14'h0204; int_evt <= 1; @(posedge clk); int_evt <= 0;
    int_src <= 14'h0011; int_evt <= 1; @(posedge clk); int_evt <= 0;
    repeat (2) @(posedge clk);
    check(nreq == 2, "intr_req per interrupt event");
    rd(R_INT_STATUS, v); check(v == 32'h0215, $sformatf("interrupt status %h", v));
    wr(R_INT_CLEAR, 32'h0014, 4'hF);
    repeat (2) @(posedge clk);
    check(nclr == 1, "intr_clr on clear write");
    rd(R_INT_STATUS, v); check(v == 32'h0201, $sformatf("after clear %h", v));
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
