// sns_pkg: types and constants shared by the Timing Module and the
// Optical Communication Card (OCC) firmware.
//
// Holds the PCI Express transaction-layer packet (TLP) header codes used
// by the receive and transmit engines (fmt/type fields of the PCI Express
// base specification), the timing constants of the timing logic, and the
// register map of the Timing Module BAR0 window.
//
// Timing constants follow the description of the timing signals: the
// Tsync delay steps are 9.42 ns (one timing clock, about 106.2 MHz), PT0
// repeats every 16.67 ms (60 Hz), the Tsync, veto and PT0-class pulses are
// about 1 us long and the chopper reference pulse is about 200 us long.
// The cycle counts below are those times divided by 9.42 ns.
// The register addresses are this design's own choice: the thesis names
// the registers but gives no map.
package sns_pkg;

  // ---------------------------------------------------------------- timing
  localparam int unsigned CLK_PERIOD_PS     = 9420;     // 9.42 ns step
  localparam int unsigned PULSE_1US_CYC     = 106;      // ~1 us
  localparam int unsigned CHOP_REF_CYC      = 21231;    // ~200 us
  localparam int unsigned DIV_60HZ_CYC      = 1769285;  // 16.67 ms
  localparam int unsigned N_CHOPPERS        = 8;
  localparam int unsigned N_PT0_REGS        = 16;

  // Tsync source selection (Tsync control register bits [1:0])
  typedef enum logic [1:0] {
    TSRC_PT0    = 2'd0,
    TSRC_TSTART = 2'd1,
    TSRC_DIV    = 2'd2,   // free running 60 Hz divisor, for testing
    TSRC_OFF    = 2'd3
  } tsync_src_e;

  // ------------------------------------------------------------ PCIe TLPs
  // {fmt[1:0], type[4:0]} of the first header DWORD
  localparam logic [6:0] TLP_MRD32 = 7'b00_00000;
  localparam logic [6:0] TLP_MRD64 = 7'b01_00000;
  localparam logic [6:0] TLP_MWR32 = 7'b10_00000;
  localparam logic [6:0] TLP_MWR64 = 7'b11_00000;
  localparam logic [6:0] TLP_IORD  = 7'b00_00010;
  localparam logic [6:0] TLP_IOWR  = 7'b10_00010;
  localparam logic [6:0] TLP_CPL   = 7'b00_01010;
  localparam logic [6:0] TLP_CPLD  = 7'b10_01010;

  // A decoded one-DWORD request handed from a receive engine to a
  // transmit engine (everything a completion needs).
  typedef struct packed {
    logic [15:0] req_id;
    logic [7:0]  tag;
    logic [2:0]  tc;
    logic [1:0]  attr;
    logic [3:0]  first_be;
    logic [6:0]  lower_addr;
    logic        with_data;   // 1: CplD (read), 0: Cpl (I/O write)
  } cpl_req_t;

  // byte count field of a completion for a one-DWORD request
  function automatic logic [11:0] cpl_byte_count(input logic [3:0] be);
    casez (be)
      4'b1??1: return 12'd4;
      4'b01?1: return 12'd3;
      4'b1?10: return 12'd3;
      4'b0011, 4'b0110, 4'b1100: return 12'd2;
      default: return 12'd1;
    endcase
  endfunction

  // lower address bits [1:0] of a completion from the first byte enable
  function automatic logic [1:0] cpl_low_addr(input logic [3:0] be);
    casez (be)
      4'b???1: return 2'd0;
      4'b??10: return 2'd1;
      4'b?100: return 2'd2;
      4'b1000: return 2'd3;
      default: return 2'd0;
    endcase
  endfunction

  // PCIe payloads are little-endian byte streams; the registers are
  // little-endian DWORDs, so each DWORD is byte-swapped at the link.
  function automatic logic [31:0] bswap32(input logic [31:0] d);
    return {d[7:0], d[15:8], d[23:16], d[31:24]};
  endfunction

  // --------------------------------------------- Timing Module BAR0 map
  // DWORD addresses inside the 2 KB BAR0 window (512 DWORDs).
  // 0x000-0x03F : read/write configuration registers
  localparam int unsigned TM_N_CFG = 64;
  localparam logic [8:0] R_TSYNC_CTRL   = 9'h000; // [1:0] source, [2] overdue enable
  localparam logic [8:0] R_TSYNC_DELAY  = 9'h001; // delay in 9.42 ns steps
  localparam logic [8:0] R_PT0_OVERDUE  = 9'h002; // PT0 overdue time
  localparam logic [8:0] R_FREE_DIV     = 9'h003; // free running divisor
  localparam logic [8:0] R_BEAM_VMASK   = 9'h004; // [0] enable
  localparam logic [8:0] R_PT0_VMASK    = 9'h005; // [0] enable
  localparam logic [8:0] R_INT_MASK     = 9'h006; // interrupt source enables
  localparam logic [8:0] R_VETO_CTRL    = 9'h007; // [3:0] frame delay of veto shift reg
  localparam logic [8:0] R_INT_CLEAR    = 9'h008; // write: interrupt serviced
  localparam logic [8:0] R_PHASE_SRC    = 9'h009; // [1:0] phase reference mux
  localparam logic [8:0] R_CHOP_VMASK0  = 9'h010; // +i, i = 0..7, [0] enable
  localparam logic [8:0] R_CHOP_REFDLY0 = 9'h018; // +i, reference pulse delay
  // 0x040-0x07F : read-only status registers
  localparam logic [8:0] R_PT0_TIME0    = 9'h040; // +k, k = 0..15 : PT0(n)-PT0(n-1-k)
  localparam logic [8:0] R_CHOP_PERIOD0 = 9'h050; // +i : TDC to TDC time
  localparam logic [8:0] R_CHOP_PHASE0  = 9'h058; // +i : reference to TDC time
  localparam logic [8:0] R_INT_STATUS   = 9'h060; // latched interrupt sources
  localparam logic [8:0] R_VETO_COUNT   = 9'h061;
  localparam logic [8:0] R_TSYNC_COUNT  = 9'h062;
  localparam logic [8:0] R_STATUS       = 9'h063; // [0] loss of lock, [1] overdue

  // interrupt source bit positions
  localparam int unsigned INT_CHOP0   = 0;  // 0..7 chopper vetoes
  localparam int unsigned INT_BEAM    = 8;
  localparam int unsigned INT_PT0     = 9;
  localparam int unsigned INT_TSTART  = 10;
  localparam int unsigned INT_LOL     = 11;
  localparam int unsigned INT_OVERDUE = 12;
  localparam int unsigned INT_TSYNC   = 13;
  localparam int unsigned N_INT       = 14;

endpackage
