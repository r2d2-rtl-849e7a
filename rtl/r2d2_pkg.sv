// r2d2_pkg: types and constants shared by the R2D2 toggle-detection blocks.
//
// The detector is configured through a small register bus. Each request carries
// a privilege bit, and only privileged requests may read or write the monitoring
// window (MTW) and attack threshold (AT) registers. The register map and the
// request struct are this design's own choices. The default window of 256 cycles
// and threshold of 64 toggles, with 8-bit and 6-bit counters, are the values the
// demonstration chip was built with.
`timescale 1ns / 1ps
package r2d2_pkg;

  // Values used on the demonstration chip.
  localparam int unsigned DEFAULT_T_M  = 256;  // monitoring window, clock cycles
  localparam int unsigned DEFAULT_A_TH = 64;   // toggles per window that raise the alarm

  localparam int unsigned CFG_ADDR_W = 4;
  localparam int unsigned CFG_DATA_W = 32;

  // Register map. AT registers of channel i sit at CFG_ADDR_AT0 + i.
  typedef enum logic [CFG_ADDR_W-1:0] {
    CFG_ADDR_CTRL = 4'h0,  // bit 0: detection enable
    CFG_ADDR_MTW  = 4'h1,  // window length minus one
    CFG_ADDR_AT0  = 4'h2   // threshold minus one, channel 0
  } cfg_addr_e;

  typedef struct packed {
    logic                  valid;  // a request is present this cycle
    logic                  write;  // 1 = write, 0 = read
    logic                  priv;   // issued by privileged software
    logic [CFG_ADDR_W-1:0] addr;
    logic [CFG_DATA_W-1:0] wdata;
  } cfg_req_t;

endpackage
