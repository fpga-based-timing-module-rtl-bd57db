// circ_buffer: dual-port circular buffer with producer and consumer
// indexes, used for the OCC's IDMA (input FIFO), ODMA and output FIFO
// areas.
//
// As in the OCC memory description, the producer index marks the next
// word to write and the consumer index the next word to read; the buffer
// is empty when both are equal and full when the producer index is one
// less than the consumer index, so it holds at most DEPTH-1 words. DEPTH
// must be a power of two (the thesis sizes: 8 KB IDMA = 2048 DWORDs).
//
// The read side is first-word-fall-through and shows two words, rd_data
// (at the consumer index) and rd_data1 (the one after), so a 64-bit
// consumer can take two DWORDs per cycle: rd_pop is 0, 1 or 2. A write
// to a full buffer and a pop beyond the count are errors (asserted).
// count is the number of stored words.
module circ_buffer #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    wr_push,
  input  logic [W-1:0]  wr_data,
  input  logic [W-1:0]  wr_data1,
  input  logic [1:0]    rd_pop,
  output logic [W-1:0]  rd_data,
  output logic [W-1:0]  rd_data1,
  output logic [AW-1:0] prod_idx,
  output logic [AW-1:0] cons_idx,
  output logic [AW:0]   count,
  output logic          empty,
  output logic          full
);
  logic [W-1:0] mem [DEPTH];

  assign empty    = (prod_idx == cons_idx);
  assign full     = (AW'(prod_idx + 1'b1) == cons_idx);
  assign count    = {1'b0, AW'(prod_idx - cons_idx)};
  assign rd_data  = mem[cons_idx];
  assign rd_data1 = mem[AW'(cons_idx + 1'b1)];

  always_ff @(posedge clk) begin
    if (wr_push != 2'd0) mem[prod_idx] <= wr_data;
    if (wr_push == 2'd2) mem[AW'(prod_idx + 1'b1)] <= wr_data1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_idx <= '0;
      cons_idx <= '0;
    end else begin
      prod_idx <= prod_idx + AW'(wr_push);
      cons_idx <= cons_idx + AW'(rd_pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n)
                                   (count + {{(AW-1){1'b0}}, wr_push}) < (AW+1)'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   {{(AW-1){1'b0}}, rd_pop} <= count);
endmodule
