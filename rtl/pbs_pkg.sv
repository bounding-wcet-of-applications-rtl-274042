// pbs_pkg: constants and types shared by the PBS-arbitrated, bank-interleaved
// SDRAM memory system.
//
// The memory is a DDR2 device with 4 banks, burst length 4 and a 16-bit data
// bus. A 32-byte cache line is split into four 8-byte chunks, one chunk per
// bank (bank interleaving), so every line access touches all four banks once
// with auto-precharge. The worst-case command widths and read latency below
// were measured at the controller's user port and are the basis of the
// replenishment period of the Priority Based Budget Scheduler:
//   WcCmdWd = ceil((WcRdCmdWd + WcWrCmdWd) / 2)        (12 cycles)
//   Rp      = WcCmdWd * sum(Budget[i])
// Line size, bank count, burst length and the three worst-case numbers follow
// the source design; row/column widths, data width, tREFI and tRFC in cycles
// are this implementation's choices for a 512 Mb x16 DDR2 part at 125 MHz.
package pbs_pkg;

  // Masters sharing the memory (six traffic generators in the reference setup).
  localparam int unsigned N_MASTERS  = 6;
  localparam int unsigned MID_W      = $clog2(N_MASTERS);

  // SDRAM organisation.
  localparam int unsigned N_BANKS    = 4;
  localparam int unsigned BANK_W     = $clog2(N_BANKS);
  localparam int unsigned ROW_W      = 13;
  localparam int unsigned COL_W      = 10;
  localparam int unsigned DQ_W       = 16;
  localparam int unsigned BL         = 4;

  // Cache line and its split into per-bank chunks.
  localparam int unsigned LINE_BYTES  = 32;
  localparam int unsigned LINE_W      = LINE_BYTES * 8;        // 256 bits
  localparam int unsigned CHUNK_W     = LINE_W / N_BANKS;      // 64 bits = BL x DQ_W
  localparam int unsigned CHUNK_COL_W = COL_W - $clog2(BL);    // burst-aligned column
  localparam int unsigned LINE_AW     = ROW_W + CHUNK_COL_W;   // line address width

  // Worst-case latencies at the controller user port, in clock cycles.
  localparam int unsigned WC_RD_CMD_WD = 13;
  localparam int unsigned WC_WR_CMD_WD = 10;
  localparam int unsigned WC_RD_LAT    = 6;
  localparam int unsigned WC_CMD_WD    = (WC_RD_CMD_WD + WC_WR_CMD_WD + 1) / 2;  // Eq. (1)

  // Refresh timing at 125 MHz: tREFI = 7.8 us, tRFC = 105 ns (rounded up).
  localparam int unsigned TREFI_CYC    = 975;
  localparam int unsigned TRFC_CYC     = 14;

  // Width of the per-master budget counters.
  localparam int unsigned BUD_W        = 8;

  // One cache-line access as a master presents it.
  typedef struct packed {
    logic               write;
    logic [LINE_AW-1:0] addr;
    logic [LINE_W-1:0]  wdata;
  } line_req_t;

  // One per-bank chunk command at the controller user port.
  typedef struct packed {
    logic               write;
    logic               autopch;
    logic [BANK_W-1:0]  bank;
    logic [ROW_W-1:0]   row;
    logic [COL_W-1:0]   col;
    logic [CHUNK_W-1:0] wdata;
  } chunk_cmd_t;

endpackage
