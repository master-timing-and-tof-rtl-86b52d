// mtt_pkg: widths, sizes and the host address map shared by the Master Timing
// and TOF design.
//
// The clock counter, Gray code, pattern words and TOF time stamps are 24 bits
// wide; every memory is 32K words deep (15-bit address); vernier codes and
// channel identification numbers are 8 bits, so up to 256 channels can be
// named although 16 are built. The dead time of 7 clocks is the 140 ns minimum
// pulse separation at the 50 MHz clock. The TOF section re-arms its vernier
// 4 clocks after it records a pulse, so that it records every pulse the Time
// Master can send (its pulses reach the recorder about 3 clocks before they are
// stored); that number is this design's own. The host address map and the 32-bit
// host data word are this design's own choice.
package mtt_pkg;

  localparam int unsigned CLK_W      = 24;     // clock counter / Gray code width
  localparam int unsigned ADDR_W     = 15;     // memory address width (32K words)
  localparam int unsigned DEPTH      = 32768;  // memory depth
  localparam int unsigned VER_W      = 8;      // vernier code width
  localparam int unsigned CHID_W     = 8;      // channel identification width
  localparam int unsigned NCH        = 16;     // channels built
  localparam int unsigned DEAD       = 7;      // 140 ns at 20 ns per clock
  localparam int unsigned TOF_DEAD   = 4;      // TOF re-arm time, 80 ns
  localparam int unsigned HOST_DW    = 32;     // host data width
  localparam int unsigned HOST_AW    = 18;     // {region, word address}

  // Region selected by host_addr[17:15].
  typedef enum logic [2:0] {
    REG_PAT      = 3'd0,  // PAT MEM, write
    REG_VER      = 3'd1,  // VER MEM, write
    REG_CHID     = 3'd2,  // CHID MEM, write
    REG_TOF_TIME = 3'd3,  // TOF TIME MEM, read
    REG_TOF_CHID = 3'd4,  // TOF CHID MEM, read
    REG_TOF_VER  = 3'd5,  // TOF VER MEM, read
    REG_CTRL     = 3'd6   // control and status registers
  } region_e;

  // Word addresses inside REG_CTRL.
  localparam logic [ADDR_W-1:0] CTRL_PATLEN = 15'd0;  // R/W pattern length in words
  localparam logic [ADDR_W-1:0] CTRL_CMD    = 15'd1;  // W: bit0 start, bit1 stop
  localparam logic [ADDR_W-1:0] CTRL_STATUS = 15'd2;  // R: see host_interface
  localparam logic [ADDR_W-1:0] CTRL_TOFCNT = 15'd3;  // R: number of TOF records

endpackage
