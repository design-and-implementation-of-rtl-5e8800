// mbc_pkg: constants and types shared by the fault-tolerant magnetic bearing
// controller (four DSP modules in triple modular redundancy with a hot spare,
// a voter, a channel bus controller and an SEC-protected I/O bus).
//
// Numbers that come from the design description: four processor modules,
// 32-bit processor words, an 8 us watchdog window for "lost" processors, a
// 4.0 MHz synchronous I/O bus shared in clock with the voter, 512 addressable
// channels (6 board bits + 3 channel bits), 8 channels per board, 10 backplane
// slots and 14-bit converters.
//
// Choices of this design: the I/O bus carries 16 data bits; a tenth address
// bit selects the "update" address space (board update addresses and the three
// global update addresses); the command word layout the processors send to the
// bus controller; the Hamming check-bit counts follow from those widths.
package mbc_pkg;

  // ---- processors and voter ----------------------------------------------
  localparam int unsigned NPROC      = 4;          // T1..T3 voting, T4 hot spare
  localparam int unsigned WORD_W     = 32;         // processor word
  localparam int unsigned CLK_HZ     = 4_000_000;  // voter / bus controller clock
  localparam int unsigned TIMEOUT_NS = 8_000;      // lost-processor window
  localparam int unsigned TIMEOUT_CYCLES =
      int'((64'(TIMEOUT_NS) * 64'(CLK_HZ)) / 64'd1_000_000_000);  // 32

  // Voter operating modes (one state each).
  typedef enum logic [1:0] {
    MODE_NORMAL   = 2'd0,   // T1,T2,T3 vote, T4 hot standby
    MODE_RECONFIG = 2'd1,   // spare has replaced a failed voter
    MODE_FAILED   = 2'd2    // simplex: one working processor drives the bus
  } vmode_e;

  // ---- I/O bus -------------------------------------------------------------
  localparam int unsigned BOARD_BITS   = 6;
  localparam int unsigned CHAN_BITS    = 3;
  localparam int unsigned CH_PER_BOARD = 1 << CHAN_BITS;            // 8
  localparam int unsigned BUS_ADDR_W   = 1 + BOARD_BITS + CHAN_BITS; // 10
  localparam int unsigned BUS_DATA_W   = 16;
  localparam int unsigned CONV_W       = 14;   // A/D and D/A resolution
  localparam int unsigned NSLOTS       = 10;

  // Number of Hamming check bits for k data bits: smallest r, 2^r >= k+r+1.
  function automatic int unsigned sec_r(input int unsigned k);
    int unsigned r;
    r = 1;
    while ((1 << r) < k + r + 1) r++;
    return r;
  endfunction

  localparam int unsigned ADDR_CHK_W = sec_r(BUS_ADDR_W);  // 4
  localparam int unsigned DATA_CHK_W = sec_r(BUS_DATA_W);  // 5

  // Address map. A[9]=0: regular address, board A[8:3], channel A[2:0].
  // A[9]=1: update space. {1,000,board} is the board's update address; the
  // three global update addresses sit at the top of the space.
  localparam logic [BUS_ADDR_W-1:0] UPD_BASE       = 10'h200;
  localparam logic [BUS_ADDR_W-1:0] ADDR_SAMPLE_ALL = 10'h3FD;  // all input boards
  localparam logic [BUS_ADDR_W-1:0] ADDR_UPDATE_ALL = 10'h3FE;  // all output boards
  localparam logic [BUS_ADDR_W-1:0] ADDR_BOTH_ALL   = 10'h3FF;  // both at once

  // One bus cycle from the bus controller to the boards. cyc and wr are
  // triplicated; every board votes them.
  typedef struct packed {
    logic [2:0]                 cyc;    // bus cycle in progress
    logic [2:0]                 wr;     // 1 write, 0 read
    logic [BUS_ADDR_W-1:0]      addr;
    logic [ADDR_CHK_W-1:0]      achk;
    logic [BUS_DATA_W-1:0]      wdata;
    logic [DATA_CHK_W-1:0]      wchk;
  } iobus_req_t;

  // Read data returned by the boards (wired-OR of all boards; a board drives
  // zeros unless it answers).
  typedef struct packed {
    logic [BUS_DATA_W-1:0]      rdata;
    logic [DATA_CHK_W-1:0]      rchk;
  } iobus_rsp_t;

  // Cycles from a read address on the bus to its data on the bus.
  localparam int unsigned READ_LAT = 2;

  // ---- command words from the processors to the bus controller ----------
  // Header: [31:30] op, [29:20] word count - 1, [9:0] start address.
  // A block write header is followed by count data words (low 16 bits used);
  // a block read returns count words to the inbound FIFOs.
  typedef enum logic [1:0] {
    OP_NOP   = 2'b00,
    OP_WRITE = 2'b01,
    OP_READ  = 2'b10
  } busop_e;

  localparam int unsigned CNT_W = 10;

  function automatic logic [WORD_W-1:0] mk_header(input busop_e op,
                                                  input int unsigned count,
                                                  input logic [BUS_ADDR_W-1:0] addr);
    logic [WORD_W-1:0] h;
    h = '0;
    h[31:30] = op;
    h[29:20] = CNT_W'(count - 1);
    h[BUS_ADDR_W-1:0] = addr;
    return h;
  endfunction

  // Event pulses brought out of the controller for status and test.
  typedef struct packed {
    logic strobe;        // a vote was taken and all outbound FIFOs popped
    logic masked;        // a bad word from one voter was outvoted
    logic reconf_data;   // spare swapped in after two bad words
    logic reconf_lost;   // spare swapped in after a control-flag timeout
    logic simplex;       // switched to simplex (failed) mode
    logic timeout;       // control-flag watchdog expired
    logic in_load;       // sensor word loaded into all inbound FIFOs
    logic in_wait;       // sensor word held for a slow processor
    logic wr_op;         // block write started on the I/O bus
    logic rd_op;         // block read started on the I/O bus
    logic rd_corr;       // read word corrected by the bus controller
    logic board_corr;    // address or write data corrected on a board
  } mbc_events_t;

endpackage
