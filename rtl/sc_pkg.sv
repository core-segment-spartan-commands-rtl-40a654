// sc_pkg -- shared definitions of the core/segment slow-control command processor.
//
// A command frame is a byte stream:
//   byte 0    : {segment, type[1:0], 5'b0}          (NW=00, LW=01, SR=10)
//   bytes 1-3 : length of the rest of the frame, MSB first
//   byte 4    : byte 0 | module id (0x10 segment, 0x0C core)
//   byte 5    : command code
//   bytes 6.. : parameters / payload
// The header formulas and command codes follow the command list; the
// request structs for the SRAM and flash ports are this design's own choice.
package sc_pkg;

  typedef enum logic [1:0] {
    FT_NW = 2'b00,   // write without reply
    FT_LW = 2'b01,   // long write (payload follows)
    FT_SR = 2'b10,   // short read (reply frame returned)
    FT_SW = 2'b11    // short write, reserved
  } frame_type_e;

  // command codes
  localparam logic [7:0] CMD_STORE_SRAM = 8'h09;  // store received stream in SRAM
  localparam logic [7:0] CMD_DUMP_SRAM  = 8'h0A;  // send SRAM start..stop to the host
  localparam logic [7:0] CMD_PROG_FLASH = 8'h0B;  // program flash from SRAM
  localparam logic [7:0] CMD_SET_PTR    = 8'h0C;  // write start/stop pointers
  localparam logic [7:0] CMD_GET_PTR    = 8'h0D;  // read start/stop pointers
  localparam logic [7:0] CMD_STATUS     = 8'h0E;  // read 6 status bytes
  localparam logic [7:0] CMD_MEM_CHECK  = 8'h0F;  // SRAM memory check
  localparam logic [7:0] CMD_LOAD_SRAM  = 8'h10;  // load SRAM from flash
  localparam logic [7:0] CMD_VCLK_EN    = 8'h11;  // enable/disable ADC 100 MHz clock (core)
  localparam logic [7:0] CMD_V2P_LOAD   = 8'h12;  // serial/parallel Virtex-II Pro load
  localparam logic [7:0] CMD_TEMP       = 8'h13;  // read temperatures
  localparam logic [7:0] CMD_POWER      = 8'h14;  // shut down power (core)
  localparam logic [7:0] CMD_CLK_SEL    = 8'h28;  // internal/external ADC clock (core)

  localparam int unsigned NPARAM = 6;             // parameter bytes captured per frame

  // header byte 0 for a frame type
  function automatic logic [7:0] hdr0(input bit is_core, input frame_type_e t);
    return {~is_core, t, 5'b0};
  endfunction

  // header byte 4 for a frame type
  function automatic logic [7:0] hdr4(input bit is_core, input frame_type_e t);
    return hdr0(is_core, t) | (is_core ? 8'h0C : 8'h10);
  endfunction

  // SRAM memory-check pattern: XOR of the address bytes
  function automatic logic [7:0] mem_pattern(input logic [23:0] a);
    return a[7:0] ^ a[15:8] ^ a[23:16];
  endfunction

  typedef struct packed {
    frame_type_e ftype;
    logic [23:0] len;                 // bytes from byte 4 to the end
    logic [7:0]  cmd;
    logic [NPARAM-1:0][7:0] p;        // p[0] = byte 6, p[1] = byte 7, ...
  } frame_t;

  // one SRAM access per cycle; read data returns on the next cycle
  typedef struct packed {
    logic        en;
    logic        we;
    logic [23:0] addr;
    logic [7:0]  wdata;
  } sram_req_t;

  // flash byte access: held until the device acknowledges
  typedef struct packed {
    logic        req;
    logic        we;
    logic        sel;                 // flash IC 0 or 1
    logic [23:0] addr;
    logic [7:0]  wdata;
  } flash_req_t;

endpackage
