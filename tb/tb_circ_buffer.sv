// tb_circ_buffer: self-checking test of the circular buffer against a
// queue model. A 16-word instance is filled and drained at random, one or
// two words per cycle on each side (never beyond the free space or the
// stored count), so the indexes wrap many times. Every cycle the
// fall-through words, the count and the empty/full flags (full at
// DEPTH-1 words) are compared with the model. A full-size (2048-word)
// instance is then filled to full and drained once.
module tb_circ_buffer;
  localparam int D = 16;
  logic clk = 0, rst_n = 0;
  logic [1:0] wr_push = 0, rd_pop = 0;
  logic [31:0] wr_data = 0, wr_data1 = 0, rd_data, rd_data1;
  logic [3:0] prod_idx, cons_idx; logic [4:0] count; logic empty, full;
  logic [1:0] b_push = 0, b_pop = 0;
  logic [31:0] b_d = 0, b_d1 = 0, b_rd, b_rd1;
  logic [10:0] b_prod, b_cons; logic [11:0] b_count; logic b_empty, b_full;
  int checks = 0, failures = 0;

  circ_buffer #(.DEPTH(D)) dut (.*);
  circ_buffer big (.clk, .rst_n, .wr_push(b_push), .wr_data(b_d), .wr_data1(b_d1),
                   .rd_pop(b_pop), .rd_data(b_rd), .rd_data1(b_rd1), .prod_idx(b_prod),
                   .cons_idx(b_cons), .count(b_count), .empty(b_empty), .full(b_full));

  always #5 clk = ~clk;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [31:0] q[$];
  int max_seen = 0, wraps = 0;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    for (int n = 0; n < 5000; n++) begin
      int np, nq, space;
      // compare outputs with the model
      check(count == 5'(q.size()), $sformatf("count %0d model %0d", count, q.size()));
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == D - 1), "full flag");
      if (q.size() > 0) check(rd_data == q[0], "first word");
      if (q.size() > 1) check(rd_data1 == q[1], "second word");
      if (q.size() > max_seen) max_seen = q.size();
      space = D - 1 - q.size();
      // bias towards filling in the first half of each 400 cycles
      np = $urandom_range(0, 2); nq = $urandom_range(0, 2);
      if ((n / 400) % 2 == 0 && $urandom_range(0, 1)) nq = 0;
      if (np > space) np = space;
      if (nq > q.size()) nq = q.size();
      wr_push <= 2'(np); rd_pop <= 2'(nq);
      wr_data <= $urandom; wr_data1 <= $urandom;
      #0;
      @(posedge clk);
      for (int k = 0; k < nq; k++) void'(q.pop_front());
      if (np >= 1) q.push_back(wr_data);
      if (np == 2) q.push_back(wr_data1);
      if (prod_idx == 0 && np > 0) wraps++;
      #1;
    end
    wr_push <= 0; rd_pop <= 0;
    check(max_seen == D - 1, "buffer reached full");
    // full-size instance: fill to 2047 words, then drain
    for (int i = 0; i < 2047; i++) begin
      b_push <= 1; b_d <= 32'(i * 7 + 3); @(posedge clk);
    end
    b_push <= 0; @(posedge clk); #1;
    check(b_full && b_count == 2047, "full-size buffer full at 2047 words");
    for (int i = 0; i < 2047; i += 2) begin
      check(b_rd == 32'(i * 7 + 3), $sformatf("full-size read %0d: %0d cons %0d", i, b_rd, b_cons));
      if (i + 1 < 2047) check(b_rd1 == 32'((i + 1) * 7 + 3), "full-size second word");
      b_pop <= (i + 1 < 2047) ? 2 : 1; @(posedge clk); #1;
    end
    b_pop <= 0;
    @(posedge clk); #1;
    check(b_empty, "full-size buffer empty after drain");
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
