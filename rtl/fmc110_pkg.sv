// fmc110_pkg: types and constants shared by the 1 GSPS acquisition and
// spectrum-averaging firmware.
//
// The ADC delivers 12-bit two's-complement samples plus an over-range (OVR)
// flag, 13 bit lines in all, at 1 GSPS. A 1:8 deserializer turns this into
// 8 parallel samples per 125 MHz cycle, so every parallel bus in the design
// carries PAR = 8 samples. These numbers follow the hardware described for
// the ADS5400 / Virtex-6 pairing; the register bus layout below is this
// design's own choice (a plain synchronous write/read strobe bus standing in
// for the Ethernet command path of the host).
package fmc110_pkg;

  localparam int SAMPLE_W = 12;          // ADC resolution
  localparam int ADC_LINES = SAMPLE_W + 1; // 12 data bits + OVR
  localparam int PAR      = 8;           // samples per 125 MHz cycle

  // Host register access, one bus per addressed module.
  localparam int REG_AW = 4;
  localparam int REG_DW = 32;

  typedef struct packed {
    logic              wr;
    logic              rd;
    logic [REG_AW-1:0] addr;
    logic [REG_DW-1:0] wdata;
  } reg_req_t;

  typedef struct packed {
    logic              rvalid;
    logic [REG_DW-1:0] rdata;
  } reg_rsp_t;

  // Trigger sources selectable in the FMC110 control block.
  typedef enum logic [2:0] {
    TRIG_SOFTWARE = 3'd0,
    TRIG_RISING   = 3'd1,
    TRIG_FALLING  = 3'd2,
    TRIG_BOTH     = 3'd3,
    TRIG_PATTERN  = 3'd4
  } trig_src_e;

  // Memory interface commands (register 0 of the memory interface).
  typedef enum logic [1:0] {
    MEM_NOP   = 2'd0,
    MEM_READ  = 2'd1,
    MEM_WRITE = 2'd2
  } mem_cmd_e;

  // Write pattern selection (register 5 of the memory interface).
  typedef enum logic [1:0] {
    PAT_USER    = 2'd0,
    PAT_ZERO    = 2'd1,
    PAT_ADDRESS = 2'd2
  } mem_pat_e;

endpackage
