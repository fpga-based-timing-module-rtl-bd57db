// occ_pkg: register map of the OCC's BAR0 window (4 KB, DWORD addresses).
//
// The thesis names the OCC's configuration bits (TX_GO, TX_IP, OPTCVR,
// "received data available"), the DMA parameters (write/read DMA
// address, TLP size and TLP count, dma_wr_count, dma_rd_count,
// wr/rd_dma_start, wr/rd_dma_done) and the buffers' producer and
// consumer indexes, but not their addresses; the layout below is this
// design's own.
package occ_pkg;
  localparam logic [9:0] O_CTRL        = 10'h000; // [0] TX_GO (w1), [1] OPTCVR, [2] wr_dma_start (w1), [3] rd_dma_start (w1), [4] TGT_RD (link data to the ODMA)
  localparam logic [9:0] O_STATUS      = 10'h001; // [0] TX_IP, [1] rx data available, [2] wr_dma_done, [3] rd_dma_done
  localparam logic [9:0] O_WR_ADDR     = 10'h002; // write DMA address (bytes)
  localparam logic [9:0] O_WR_SIZE     = 10'h003; // write DMA TLP size (DWORDs)
  localparam logic [9:0] O_WR_COUNT    = 10'h004; // write DMA TLP count
  localparam logic [9:0] O_RD_ADDR     = 10'h005; // read DMA address (bytes)
  localparam logic [9:0] O_RD_SIZE     = 10'h006; // read DMA TLP size (DWORDs)
  localparam logic [9:0] O_RD_COUNT    = 10'h007; // read DMA TLP count
  localparam logic [9:0] O_DMA_WR_CNT  = 10'h008; // RO: write TLPs sent
  localparam logic [9:0] O_DMA_RD_CNT  = 10'h009; // RO: read TLPs completed
  localparam logic [9:0] O_TX_LEN      = 10'h00A; // IDMA DWORDs to send on TX_GO
  localparam logic [9:0] O_IN_COUNT    = 10'h00B; // RO: DWORDs received from the link
  localparam logic [9:0] O_INT_CLEAR   = 10'h00C; // W: interrupt serviced
  localparam logic [9:0] O_IDMA_PROD   = 10'h00D; // RO
  localparam logic [9:0] O_IDMA_CONS   = 10'h00E; // RO
  localparam logic [9:0] O_OFIFO_COUNT = 10'h00F; // RO
  localparam logic [9:0] O_INT_ENABLE  = 10'h010; // [0] tx done, [1] wr dma done, [2] rd dma done, [3] rx data
  localparam logic [9:0] O_IDMA_DATA   = 10'h011; // W: target write, one DWORD into the IDMA
  localparam logic [9:0] O_ODMA_DATA   = 10'h012; // R: target read, one DWORD out of the ODMA
  localparam logic [9:0] O_ODMA_LEN    = 10'h013; // RO: bytes waiting in the ODMA
endpackage
