// Shared constants and types of the film-processing platform.
// Pixel and link widths follow the design description (10-bit components,
// 30-bit RGB pixels, 64-bit FPGA-to-FPGA words, 64-bit DDR SDRAM moving two
// words per clock, 8-word bursts). The control-bus format and the SDRAM
// command encoding are this design's own choices.
package flexfilm_pkg;
  localparam int unsigned COMP_W   = 10;   // bits per colour component
  localparam int unsigned RGB_W    = 30;   // 10-bit RGB pixel
  localparam int unsigned LINK_W   = 64;   // one link word per 125 MHz cycle
  localparam int unsigned MEM_DW   = 128;  // two 64-bit DDR words per clock
  localparam int unsigned MEM_BEATS = 4;   // 8 words of 64 bit = 4 clocks
  localparam int unsigned MEM_AW   = 22;   // burst address (64 B units)
  localparam int unsigned CB_AW    = 16;   // control bus address
  localparam int unsigned CB_DW    = 32;   // control bus data

  // SDRAM command bus encoding (RAS#, CAS#, WE# style, active high here)
  typedef enum logic [2:0] {
    SD_NOP = 3'd0,
    SD_ACT = 3'd1,
    SD_RDA = 3'd2,   // read with auto precharge
    SD_WRA = 3'd3,   // write with auto precharge
    SD_REF = 3'd4    // auto refresh
  } sd_cmd_e;

  // one control-bus write: addr[15:8] selects the macro, addr[7:0] the register
  typedef struct packed {
    logic             we;
    logic [CB_AW-1:0] addr;
    logic [CB_DW-1:0] wdata;
  } cb_t;
endpackage
