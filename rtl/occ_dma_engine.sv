// occ_dma_engine: OCC DMA engine with its configuration and status
// registers and the IDMA and output FIFO buffers.
//
// Write DMA (OCC to host memory): software sets the write DMA address,
// TLP size (DWORDs) and TLP count, then sets wr_dma_start. For each TLP
// the engine waits until the output FIFO (filled from the optical or LVDS
// receiver) holds a full TLP, asks the transmit engine for a memory write
// of that size at address + n*size*4, and counts dma_wr_count. When the
// count matches the TLP count, wr_dma_done is set and an interrupt is
// requested.
// Read DMA (host memory to OCC): after rd_dma_start the engine asks the
// transmit engine for TLP-count memory read requests of TLP-size DWORDs;
// the completion data arrives from the receive engine and is stored in
// the IDMA circular buffer. When the payload received equals TLP count
// times TLP size, rd_dma_done is set and an interrupt is requested.
// Link transmit: setting TX_GO sets TX_IP and sends TX_LEN DWORDs from the
// IDMA to the selected link (OPTCVR: optical, else LVDS); TX_IP clears
// and an interrupt is requested when done.
// Target access: the host fills the IDMA one DWORD at a time through
// O_IDMA_DATA (target write) before TX_GO. With TGT_RD set, data from the
// link goes to the ODMA circular buffer instead of the output FIFO; the
// host reads O_ODMA_LEN (bytes waiting) and takes the data through
// O_ODMA_DATA (target read, no DMA), each read popping one DWORD; a
// read of an empty ODMA returns 0.
//
// The sequencing follows the thesis; the register layout (occ_pkg), the
// interrupt enable register and sending TLPs one at a time are this
// design's choices, and so is reaching the IDMA and ODMA through data
// port registers in BAR0 rather than a BAR1 window; target writes are
// ignored while a read DMA fills the IDMA. Sizes: IDMA 8 KB (2048
// DWORDs) and ODMA 16 KB (4096 DWORDs) as the thesis gives; the output
// FIFO depth is assumed (OFIFO_DEPTH). Register reads take one cycle;
// rd_en marks the cycle in which a read of rd_addr is requested (it
// pops the ODMA for O_ODMA_DATA).
module occ_dma_engine
  import occ_pkg::*;
#(
  parameter int unsigned ADDR_W      = 10,
  parameter int unsigned IDMA_DEPTH  = 2048,
  parameter int unsigned OFIFO_DEPTH = 2048,
  parameter int unsigned ODMA_DEPTH  = 4096
) (
  input  logic              clk,
  input  logic              rst_n,
  // register access
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [31:0]       wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic              rd_en,
  output logic [31:0]       rd_data,
  // transmit engine requests
  output logic              mwr_req,
  output logic [31:0]       mwr_addr,
  output logic [9:0]        mwr_len,
  input  logic              mwr_done,
  output logic [31:0]       pl_dw0,
  output logic [31:0]       pl_dw1,
  input  logic [1:0]        pl_pop,
  output logic              mrd_req,
  output logic [31:0]       mrd_addr,
  output logic [9:0]        mrd_len,
  output logic [7:0]        mrd_tag,
  input  logic              mrd_done,
  // completion data from the receive engine
  input  logic [1:0]        cpl_push,
  input  logic [31:0]       cpl_dw0,
  input  logic [31:0]       cpl_dw1,
  // link side
  input  logic              link_rx_valid,
  input  logic [31:0]       link_rx_data,
  output logic              link_tx_valid,
  output logic [31:0]       link_tx_data,
  input  logic              link_tx_ready,
  output logic              optcvr,
  // interrupts
  output logic              intr_req,
  output logic              intr_clr,
  // events, for observation
  output logic              wr_dma_done,
  output logic              rd_dma_done,
  output logic              tx_ip
);
  localparam int unsigned IAW = $clog2(IDMA_DEPTH);
  localparam int unsigned OAW = $clog2(OFIFO_DEPTH);
  localparam int unsigned DAW = $clog2(ODMA_DEPTH);

  logic [31:0] wr_base, wr_size, wr_count, rd_base, rd_size, rd_count, tx_len;
  logic [31:0] dma_wr_cnt, dma_rd_cnt, in_count, tx_rem, rd_dw_cnt, rd_req_cnt;
  logic [31:0] cur_dw, rd_total;
  logic [3:0]  int_en;
  logic        wr_busy, rd_busy, tgt_rd;

  // ------------------------------------------------------------ buffers
  logic [IAW-1:0] i_prod, i_cons;
  logic [IAW:0]   i_count;
  logic           i_empty, i_full;
  logic [31:0]    i_dw0, i_dw1;
  logic [1:0]     i_pop;

  logic [1:0]     i_push;
  logic [31:0]    i_wdata;
  logic           tgt_wr;

  // target writes of the host and read DMA completions share the write side
  assign tgt_wr  = wr_en && wr_addr == O_IDMA_DATA && !rd_busy && !i_full;
  assign i_push  = tgt_wr ? 2'd1 : cpl_push;
  assign i_wdata = tgt_wr ? wr_data : cpl_dw0;

  circ_buffer #(.DEPTH(IDMA_DEPTH)) u_idma (
    .clk, .rst_n, .wr_push(i_push), .wr_data(i_wdata), .wr_data1(cpl_dw1),
    .rd_pop(i_pop), .rd_data(i_dw0), .rd_data1(i_dw1),
    .prod_idx(i_prod), .cons_idx(i_cons), .count(i_count), .empty(i_empty), .full(i_full)
  );

  logic [OAW-1:0] o_prod, o_cons;
  logic [OAW:0]   o_count;
  logic           o_empty, o_full;
  logic [1:0]     o_push;

  assign o_push = (link_rx_valid && !tgt_rd && !o_full) ? 2'd1 : 2'd0;
  circ_buffer #(.DEPTH(OFIFO_DEPTH)) u_ofifo (
    .clk, .rst_n, .wr_push(o_push), .wr_data(link_rx_data), .wr_data1(32'h0),
    .rd_pop(pl_pop), .rd_data(pl_dw0), .rd_data1(pl_dw1),
    .prod_idx(o_prod), .cons_idx(o_cons), .count(o_count), .empty(o_empty), .full(o_full)
  );

  logic [DAW-1:0] d_prod, d_cons;
  logic [DAW:0]   d_count;
  logic           d_empty, d_full, d_take;
  logic [1:0]     d_push, d_pop;
  logic [31:0]    d_dw0, d_dw1, d_q;

  assign d_push = (link_rx_valid && tgt_rd && !d_full) ? 2'd1 : 2'd0;
  assign d_take = rd_en && rd_addr == O_ODMA_DATA && !d_empty;
  assign d_pop  = d_take ? 2'd1 : 2'd0;
  circ_buffer #(.DEPTH(ODMA_DEPTH)) u_odma (
    .clk, .rst_n, .wr_push(d_push), .wr_data(link_rx_data), .wr_data1(32'h0),
    .rd_pop(d_pop), .rd_data(d_dw0), .rd_data1(d_dw1),
    .prod_idx(d_prod), .cons_idx(d_cons), .count(d_count), .empty(d_empty), .full(d_full)
  );

  // --------------------------------------------------- link transmission
  assign link_tx_valid = tx_ip && !i_empty && tx_rem != '0;
  assign link_tx_data  = i_dw0;
  assign i_pop         = (link_tx_valid && link_tx_ready) ? 2'd1 : 2'd0;

  // ------------------------------------------------------------ requests
  assign mwr_len  = wr_size[9:0];
  assign mrd_len  = rd_size[9:0];
  assign mrd_tag  = rd_req_cnt[7:0];

  logic wr_hit;
  assign wr_hit = wr_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_base <= '0; wr_size <= 32'd32; wr_count <= '0;
      rd_base <= '0; rd_size <= 32'd32; rd_count <= '0;
      tx_len <= '0; int_en <= '0; optcvr <= 1'b1; tgt_rd <= 1'b0; d_q <= '0;
      dma_wr_cnt <= '0; dma_rd_cnt <= '0; in_count <= '0; tx_rem <= '0;
      rd_dw_cnt <= '0; rd_req_cnt <= '0; cur_dw <= '0; rd_total <= '0;
      mwr_addr <= '0; mrd_addr <= '0;
      wr_busy <= 1'b0; rd_busy <= 1'b0; tx_ip <= 1'b0;
      mwr_req <= 1'b0; mrd_req <= 1'b0;
      wr_dma_done <= 1'b0; rd_dma_done <= 1'b0;
      intr_req <= 1'b0; intr_clr <= 1'b0;
    end else begin
      intr_req <= 1'b0;
      intr_clr <= 1'b0;
      if (o_push != 2'd0 || d_push != 2'd0) in_count <= in_count + 1'b1;
      if (d_take) d_q <= d_dw0;
      else if (rd_en && rd_addr == O_ODMA_DATA) d_q <= '0;

      // register writes
      if (wr_hit) begin
        unique case (wr_addr)
          O_CTRL: begin
            optcvr <= wr_data[1];
            tgt_rd <= wr_data[4];
            if (wr_data[0] && !tx_ip) begin
              tx_ip <= 1'b1; tx_rem <= tx_len;
            end
            if (wr_data[2] && !wr_busy) begin
              wr_busy <= 1'b1; wr_dma_done <= 1'b0; dma_wr_cnt <= '0;
              mwr_addr <= wr_base;
            end
            if (wr_data[3] && !rd_busy) begin
              rd_busy <= 1'b1; rd_dma_done <= 1'b0; dma_rd_cnt <= '0;
              rd_req_cnt <= '0; rd_dw_cnt <= '0; cur_dw <= '0; rd_total <= '0;
              mrd_addr <= rd_base;
            end
          end
          O_WR_ADDR:    wr_base  <= wr_data;
          O_WR_SIZE:    wr_size  <= wr_data;
          O_WR_COUNT:   wr_count <= wr_data;
          O_RD_ADDR:    rd_base  <= wr_data;
          O_RD_SIZE:    rd_size  <= wr_data;
          O_RD_COUNT:   rd_count <= wr_data;
          O_TX_LEN:     tx_len   <= wr_data;
          O_INT_ENABLE: int_en   <= wr_data[3:0];
          O_INT_CLEAR:  intr_clr <= 1'b1;
          default: ;
        endcase
      end

      // link transmission from the IDMA
      if (i_pop != 2'd0) begin
        tx_rem <= tx_rem - 1'b1;
        if (tx_rem == 32'd1) begin
          tx_ip    <= 1'b0;
          intr_req <= int_en[0];
        end
      end else if (tx_ip && tx_rem == '0) begin
        tx_ip <= 1'b0;
      end

      // write DMA
      if (wr_busy) begin
        if (mwr_done) begin
          mwr_req    <= 1'b0;
          mwr_addr   <= mwr_addr + {wr_size[29:0], 2'b00};
          dma_wr_cnt <= dma_wr_cnt + 1'b1;
          if (dma_wr_cnt + 1'b1 == wr_count) begin
            wr_busy     <= 1'b0;
            wr_dma_done <= 1'b1;
            intr_req    <= int_en[1];
          end
        end else if (!mwr_req) begin
          if (dma_wr_cnt == wr_count) begin
            wr_busy <= 1'b0; wr_dma_done <= 1'b1;
          end else if ({{(31-OAW){1'b0}}, o_count} >= wr_size) begin
            mwr_req <= 1'b1;
          end
        end
      end

      // read DMA
      if (rd_busy) begin
        if (mrd_done) begin
          mrd_req    <= 1'b0;
          mrd_addr   <= mrd_addr + {rd_size[29:0], 2'b00};
          rd_req_cnt <= rd_req_cnt + 1'b1;
          rd_total   <= rd_total + rd_size;
        end else if (!mrd_req && rd_req_cnt != rd_count) begin
          mrd_req <= 1'b1;
        end
        if (cpl_push != 2'd0) begin
          rd_dw_cnt <= rd_dw_cnt + 32'(cpl_push);
          if (cur_dw + 32'(cpl_push) >= rd_size) begin
            dma_rd_cnt <= dma_rd_cnt + 1'b1;
            cur_dw     <= cur_dw + 32'(cpl_push) - rd_size;
          end else begin
            cur_dw     <= cur_dw + 32'(cpl_push);
          end
          if (rd_req_cnt == rd_count && rd_dw_cnt + 32'(cpl_push) == rd_total) begin
            rd_busy     <= 1'b0;
            rd_dma_done <= 1'b1;
            intr_req    <= int_en[2];
          end
        end
      end

      if (int_en[3] && (o_push != 2'd0 && o_empty || d_push != 2'd0 && d_empty))
        intr_req <= 1'b1;
    end
  end

  // register reads
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_data <= '0;
    end else begin
      unique case (rd_addr)
        O_CTRL:        rd_data <= {27'd0, tgt_rd, 2'b00, optcvr, 1'b0};
        O_STATUS:      rd_data <= {28'd0, rd_dma_done, wr_dma_done,
                                   tgt_rd ? !d_empty : !o_empty, tx_ip};
        O_WR_ADDR:     rd_data <= wr_base;
        O_WR_SIZE:     rd_data <= wr_size;
        O_WR_COUNT:    rd_data <= wr_count;
        O_RD_ADDR:     rd_data <= rd_base;
        O_RD_SIZE:     rd_data <= rd_size;
        O_RD_COUNT:    rd_data <= rd_count;
        O_DMA_WR_CNT:  rd_data <= dma_wr_cnt;
        O_DMA_RD_CNT:  rd_data <= dma_rd_cnt;
        O_TX_LEN:      rd_data <= tx_len;
        O_IN_COUNT:    rd_data <= in_count;
        O_IDMA_PROD:   rd_data <= 32'(i_prod);
        O_IDMA_CONS:   rd_data <= 32'(i_cons);
        O_OFIFO_COUNT: rd_data <= 32'(o_count);
        O_INT_ENABLE:  rd_data <= {28'd0, int_en};
        O_ODMA_DATA:   rd_data <= d_take ? d_dw0 : d_q;
        O_ODMA_LEN:    rd_data <= {{(29-DAW){1'b0}}, d_count, 2'b00};
        default:       rd_data <= '0;
      endcase
    end
  end

  logic unused;
  assign unused = ^{o_prod, o_cons, i_count, i_dw1, d_prod, d_cons, d_dw1};
endmodule
