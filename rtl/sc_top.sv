// sc_top -- slow-control command processor of a core or segment module.
//
// A host PC sends command frames through an XPort serial-to-Ethernet bridge.
// uart_rx turns the serial line into bytes, frame_rx recognises frames for
// this module and writes their bodies into the on-board SRAM from address 0,
// and cmd_ctrl executes each complete command: it keeps the pointer, status
// and control registers, starts one of the engines (sram_check for the
// memory test, flash_copy between flash and SRAM, temp_reader for the
// temperature sensors, v2pro_loader for the ADC-card FPGAs) and sends SR
// replies back through uart_tx. Only one command runs at a time; bytes that
// arrive meanwhile are dropped. Every idle unit drives a zero SRAM request,
// so the SRAM requests are simply ORed; the flash port goes to whichever
// engine holds its request bit.
//
// External parts are reached through ports: a byte-wide SRAM (registered
// request, read data one cycle after it is sampled), two flash ICs behind a
// request/acknowledge byte port, SPI temperature sensors, the configuration
// pins of up to four Virtex-II Pro ADC cards, the PSU monitors and the ADC
// clock enable/select and power shut-down lines.
// IS_CORE selects the core build (commands 17, 20 and 40 present, header
// bytes 00/20/40 and 0C/2C/4C) or the segment build (80/A0/C0, 90/B0/D0).
module sc_top
  import sc_pkg::*;
#(
  parameter bit          IS_CORE      = 1'b1,
  parameter logic [6:0]  VERSION      = 7'd17,
  parameter int unsigned CLKS_PER_BIT = 347,
  parameter int unsigned SRAM_AW      = 21,
  parameter int unsigned WDT_CYCLES   = 4_000_000,
  parameter int unsigned N_SENS       = 10,
  parameter int unsigned SCK_DIV      = 20,
  parameter int unsigned N_CARDS      = 4,
  parameter logic [23:0] BS_FIRST     = 24'h000008,
  parameter logic [23:0] BS_LAST      = 24'h161B33,
  parameter int unsigned PROG_CYCLES  = 40,
  parameter int unsigned CFG_TIMEOUT  = 48_000_000
) (
  input  logic                clk,
  input  logic                rst_n,
  // XPort serial link
  input  logic                uart_rx,
  output logic                uart_tx,
  // SRAM
  output logic                sram_en,
  output logic                sram_we,
  output logic [SRAM_AW-1:0]  sram_addr,
  output logic [7:0]          sram_wdata,
  input  logic [7:0]          sram_rdata,
  // flash ICs
  output logic                fl_req,
  output logic                fl_we,
  output logic                fl_sel,
  output logic [23:0]         fl_addr,
  output logic [7:0]          fl_wdata,
  input  logic                fl_ack,
  input  logic [7:0]          fl_rdata,
  // temperature sensors
  output logic                ts_sck,
  output logic [N_SENS-1:0]   ts_cs_n,
  input  logic [N_SENS-1:0]   ts_so,
  // ADC-card configuration
  output logic [N_CARDS-1:0]  cfg_prog_b,
  output logic [N_CARDS-1:0]  cfg_smap,
  output logic [N_CARDS-1:0]  cfg_cs_b,
  output logic                cfg_cclk,
  output logic [7:0]          cfg_d,
  input  logic [N_CARDS-1:0]  cfg_init_b,
  input  logic [N_CARDS-1:0]  cfg_done,
  output logic [N_CARDS-1:0]  cfg_fail,
  // status and control
  input  logic                psu_ok_core,
  input  logic                psu_ok_seg,
  output logic                vclk_en,
  output logic                clk_int_sel,
  output logic                pwr_shutdown
);
  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_valid, tx_ready;
  frame_t     frame;
  logic       frame_done, wdt_timeout, hdr_err, busy;
  sram_req_t  sr_rx, sr_ctrl, sr_chk, sr_fc, sr;
  flash_req_t fl_fc, fl_v2, fl;
  logic       chk_start, chk_done, fc_start, fc_to_flash, fc_sel, fc_done;
  logic       ts_start, ts_done, v2_start, v2_done;
  logic [23:0] chk_last_good, start_ptr, stop_ptr;
  logic [7:0] v2_aa, v2_bb;
  logic [N_SENS-1:0][15:0] temps;

  uart_rx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_rx (
    .clk, .rst_n, .rx(uart_rx), .data(rx_data), .valid(rx_valid));

  uart_tx #(.CLKS_PER_BIT(CLKS_PER_BIT)) u_tx (
    .clk, .rst_n, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .tx(uart_tx));

  frame_rx #(.IS_CORE(IS_CORE), .SRAM_AW(SRAM_AW), .WDT_CYCLES(WDT_CYCLES)) u_frame (
    .clk, .rst_n, .rx_data, .rx_valid, .busy, .frame, .frame_done,
    .sram_req(sr_rx), .wdt_timeout, .hdr_err);

  cmd_ctrl #(.IS_CORE(IS_CORE), .VERSION(VERSION), .SRAM_AW(SRAM_AW), .N_SENS(N_SENS)) u_ctrl (
    .clk, .rst_n, .frame, .frame_done, .wdt_timeout, .busy,
    .tx_data, .tx_valid, .tx_ready, .sram_req(sr_ctrl), .sram_rdata,
    .chk_start, .chk_done, .chk_last_good,
    .fc_start, .fc_to_flash, .fc_sel, .fc_done,
    .ts_start, .ts_done, .temps,
    .v2_start, .v2_aa, .v2_bb, .v2_done,
    .psu_ok_core, .psu_ok_seg, .vclk_en, .clk_int_sel, .pwr_shutdown,
    .start_ptr, .stop_ptr);

  sram_check #(.AW(SRAM_AW)) u_chk (
    .clk, .rst_n, .start(chk_start), .done(chk_done), .last_good(chk_last_good),
    .sram_req(sr_chk), .sram_rdata);

  flash_copy #(.AW(SRAM_AW), .FIRST(BS_FIRST), .LAST(BS_LAST)) u_fc (
    .clk, .rst_n, .start(fc_start), .to_flash(fc_to_flash), .sel(fc_sel), .done(fc_done),
    .fl(fl_fc), .fl_ack, .fl_rdata, .sram_req(sr_fc), .sram_rdata);

  temp_reader #(.N_SENS(N_SENS), .SCK_DIV(SCK_DIV)) u_temp (
    .clk, .rst_n, .start(ts_start), .done(ts_done), .ts_sck, .ts_cs_n, .ts_so, .temps);

  v2pro_loader #(.N_CARDS(N_CARDS), .FIRST(BS_FIRST), .LAST(BS_LAST),
                 .PROG_CYCLES(PROG_CYCLES), .TIMEOUT(CFG_TIMEOUT)) u_v2 (
    .clk, .rst_n, .start(v2_start), .aa(v2_aa), .bb(v2_bb), .done(v2_done), .fail(cfg_fail),
    .cfg_prog_b, .cfg_smap, .cfg_cs_b, .cfg_cclk, .cfg_d, .cfg_init_b, .cfg_done,
    .fl(fl_v2), .fl_ack, .fl_rdata);

  // idle units drive zero SRAM requests; a flash request counts only
  // while its req bit is set (the engines keep address and select)
  assign sr = sr_rx | sr_ctrl | sr_chk | sr_fc;
  assign fl = fl_fc.req ? fl_fc : fl_v2;

  assign sram_en    = sr.en;
  assign sram_we    = sr.we;
  assign sram_addr  = sr.addr[SRAM_AW-1:0];
  assign sram_wdata = sr.wdata;
  assign fl_req     = fl.req;
  assign fl_we      = fl.we;
  assign fl_sel     = fl.sel;
  assign fl_addr    = fl.addr;
  assign fl_wdata   = fl.wdata;

  // at most one unit may use each shared port
  a_sram_one: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({sr_rx.en, sr_ctrl.en, sr_chk.en, sr_fc.en}));
  a_flash_one: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({fl_fc.req, fl_v2.req}));
endmodule
